// tb_sprite_system_full: one frame of the multi-unit sprite drawing system
// at its default size: three units, a 1280x720 screen and 50 sprites of
// 64x64 pixels, the smallest sprite count of the document's evaluation.
// The system is instantiated without parameter overrides.
//
// Like tb_sprite_system, it acts as the host processor for one frame of
// single-frame sprite drawing. In each frame every unit first erases its own horizontal band of
// the screen, then draws its list of sprites, lowest priority first, at new
// random positions inside its band. The units run concurrently, each on its
// own port of a shared memory model with latency and random stalls. A
// reference copy of the memory is updated here by the drawing rule, and the
// whole memory is compared at the end of every frame. Cycle counts per frame
// are printed.
//
// Coverage: the test counts erase calls, draw calls, cycles in which two or
// more units were busy at once (sharing the memory), port-cycles with a
// stalled memory request, read/write interleaving on a unit's port (its two
// stages overlapping), transparent sprite pixels that let the screen show
// through, and sprites overlapping an earlier sprite. Each of them must have
// happened at least once.
module tb_sprite_system_full;
  import sprite_pkg::*;

  localparam int unsigned N_UNITS  = 3;
  localparam int unsigned GAME_DW  = GAME_DW_DEF;
  localparam int unsigned GAME_DH  = GAME_DH_DEF;
  localparam int unsigned MAX_SPW  = MAX_SPW_DEF;
  localparam int unsigned SPR_W    = 64;   // sprite width used
  localparam int unsigned SPR_H    = 64;   // sprite height used
  localparam int unsigned N_SPR    = 50;   // sprites per frame
  localparam int unsigned FRAMES   = 1;
  localparam int unsigned N_IMG    = 4;
  localparam int unsigned LAT      = 6;
  localparam int unsigned STALL    = 15;
  localparam int unsigned BAND     = GAME_DH / N_UNITS;
  localparam int unsigned SCR_W    = GAME_DW / 2 * GAME_DH;
  localparam int unsigned SP_BASE  = SCR_W;
  localparam int unsigned SP_SIZE  = SPR_W * SPR_H / 2;
  localparam int unsigned WORDS    = SP_BASE + N_IMG * SP_SIZE;
  localparam longint unsigned WATCHDOG = 5_000_000;

  logic                     clk = 0, rst_n = 0;
  logic      [N_UNITS-1:0]  start, busy, done;
  draw_cmd_t [N_UNITS-1:0]  cmd;
  logic      [N_UNITS-1:0]  m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t  [N_UNITS-1:0]  m_req;
  word_t     [N_UNITS-1:0]  m_rsp_rdata;

  int checks = 0, failures = 0;
  int n_erase = 0, n_draw = 0, n_shared = 0, n_interleave = 0;
  int n_transparent = 0, n_overlap_sprites = 0;

  sprite_system dut (.*);

  ddr_model #(.NP(N_UNITS), .WORDS(WORDS), .LAT(LAT), .STALL_PCT(STALL)) u_mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req(m_req), .req_ready(m_req_ready),
    .rsp_valid(m_rsp_valid), .rsp_rdata(m_rsp_rdata)
  );

  always #5 clk = ~clk;

  word_t ref_mem [WORDS];
  logic  covered [GAME_DH][GAME_DW / 2];   // screen words drawn this frame

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Port-level coverage. On each unit's port, a read accepted between two
  // writes shows the read stage fetching the next line while the write
  // stage is still writing.
  logic [1:0] hist [N_UNITS];
  always @(posedge clk) begin
    for (int u = 0; u < N_UNITS; u++) begin
      if (!rst_n) hist[u] <= 2'b00;
      else if (m_req_valid[u] && m_req_ready[u]) begin
        if (m_req[u].we && hist[u] == 2'b10) n_interleave++;
        hist[u] <= {hist[u][0], m_req[u].we};
      end
    end
    if (rst_n && $countones(busy) > 1) n_shared++;
  end

  function automatic pixel_t rand_pix(int zero_in);
    return ($urandom_range(zero_in - 1) == 0) ? '0 : pixel_t'($urandom);
  endfunction

  task automatic model(input draw_cmd_t c);
    for (int i = 0; i < c.h; i++)
      for (int j = 0; j < c.w / 2; j++) begin
        int unsigned sa, da, row, col;
        word_t s, o;
        row = i + c.y;
        col = c.x / 2 + j;
        sa = c.scp + row * (GAME_DW / 2) + col;
        da = c.scn + row * (GAME_DW / 2) + col;
        if (c.mode == MODE_ERASE) ref_mem[da] = '0;
        else begin
          if (covered[row][col]) n_overlap_sprites++;
          covered[row][col] = 1'b1;
          s = ref_mem[c.sp + i * (c.w / 2) + j];
          o = ref_mem[sa];
          for (int p = 0; p < 2; p++)
            if (s[p*32 +: 32] != 0) o[p*32 +: 32] = s[p*32 +: 32];
            else if (o[p*32 +: 32] != 0) n_transparent++;
          ref_mem[da] = o;
        end
      end
  endtask

  // One call on unit u; the reference is updated when the call has ended.
  task automatic call(input int u, input draw_cmd_t c);
    @(negedge clk);
    cmd[u] = c;
    start[u] = 1'b1;
    @(negedge clk);
    start[u] = 1'b0;
    while (!done[u]) @(negedge clk);
    if (c.mode == MODE_ERASE) n_erase++; else n_draw++;
    model(c);
  endtask

  task automatic unit_frame(input int u);
    draw_cmd_t c;
    // erase this unit's band
    c = '0;
    c.mode = MODE_ERASE;
    c.w = dim_t'(GAME_DW); c.h = dim_t'(BAND); c.y = dim_t'(u * BAND);
    c.scn = 0;
    call(u, c);
    // draw this unit's sprites, lowest priority first
    for (int k = u; k < N_SPR; k += N_UNITS) begin
      c = '0;
      c.mode = MODE_DRAW;
      c.w = dim_t'(SPR_W); c.h = dim_t'(SPR_H);
      c.x = dim_t'(2 * $urandom_range(0, (GAME_DW - SPR_W) / 2));
      c.y = dim_t'(u * BAND + $urandom_range(0, BAND - SPR_H));
      c.sp = addr_t'(SP_BASE + (k % N_IMG) * SP_SIZE);
      c.scp = 0; c.scn = 0;
      call(u, c);
    end
  endtask

  task automatic compare(input int frame);
    int bad;
    bad = 0;
    for (int a = 0; a < WORDS; a++) begin
      checks++;
      if (u_mem.mem[a] !== ref_mem[a]) begin
        failures++;
        bad++;
        if (bad < 6) $display("frame %0d word %0d: %h, expected %h", frame, a, u_mem.mem[a], ref_mem[a]);
      end
    end
  endtask

  initial begin
    longint unsigned t0;
    start = '0;
    cmd = '0;
    // previous frame's garbage on the screen, sprite images with transparent pixels
    for (int a = 0; a < WORDS; a++) begin
      if (a < SP_BASE) ref_mem[a] = {rand_pix(8), rand_pix(8)};
      else             ref_mem[a] = {rand_pix(3), rand_pix(3)};
      u_mem.mem[a] = ref_mem[a];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < GAME_DH; r++)
        for (int q = 0; q < GAME_DW / 2; q++) covered[r][q] = 1'b0;
      t0 = u_mem.cycle;
      fork
        begin
          for (int u = 0; u < N_UNITS; u++) begin
            automatic int uu = u;
            fork
              unit_frame(uu);
            join_none
          end
          wait fork;
        end
      join
      $display("frame %0d: %0d cycles = %0.2f ms at 100 MHz", f, u_mem.cycle - t0,
               real'(u_mem.cycle - t0) / 100000.0);
      $display("frame %0d: %0d cycles (%0d units, %0d sprites of %0dx%0d on %0dx%0d)",
               f, u_mem.cycle - t0, N_UNITS, N_SPR, SPR_W, SPR_H, GAME_DW, GAME_DH);
      repeat (2) @(posedge clk);
      compare(f);
    end
    $display("erase calls=%0d draw calls=%0d concurrent-unit cycles=%0d stalls=%0d interleave=%0d transparent=%0d overlaps=%0d",
             n_erase, n_draw, n_shared, u_mem.n_stalls, n_interleave, n_transparent, n_overlap_sprites);
    checks++;
    if (n_erase == 0 || n_draw == 0 || n_shared == 0 || u_mem.n_stalls == 0 || n_interleave == 0
        || n_transparent == 0 || n_overlap_sprites == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
