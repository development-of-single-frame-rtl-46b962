// tb_sprite_draw_hw: self-checking test of one drawing unit.
//
// The unit works on a 64x16-pixel screen and 16x16 sprites in a memory
// model with latency and random stalls. A reference copy of the memory is
// updated here by the drawing rule (erase: the rectangle becomes 0; draw:
// for each sprite pixel that is not 0 the screen pixel is replaced) and the
// whole memory is compared after every call. The sequence: a full-screen
// erase without stalls (its cycle count is checked against one word per
// cycle), random sprite draws with stalls, a draw from one screen into a
// second screen, a partial erase, and a draw without stalls whose cycle
// count shows that reading and writing overlap. It counts how often the
// read and write stages overlapped on the bus.
module tb_sprite_draw_hw;
  import sprite_pkg::*;

  localparam int unsigned GAME_DW = 64;
  localparam int unsigned GAME_DH = 16;
  localparam int unsigned MAX_SPW = 16;
  localparam int unsigned SCR_W   = GAME_DW / 2 * GAME_DH;   // words per screen
  localparam int unsigned SP_BASE = SCR_W;                   // 4 sprite images
  localparam int unsigned SP_SIZE = MAX_SPW * MAX_SPW / 2;
  localparam int unsigned SCR_B   = SP_BASE + 4 * SP_SIZE;   // second screen
  localparam int unsigned WORDS   = SCR_B + SCR_W;
  localparam int unsigned LAT     = 6;

  logic      clk = 0, rst_n = 0;
  logic      start, busy, done;
  draw_cmd_t cmd;
  logic      m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t  m_req;
  word_t     m_rsp_rdata;

  int checks = 0, failures = 0;
  int n_overlap = 0, n_transparent = 0;

  sprite_draw_hw #(.GAME_DW(GAME_DW), .MAX_SPW(MAX_SPW)) dut (.*);

  ddr_model #(.WORDS(WORDS), .LAT(LAT), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req(m_req), .req_ready(m_req_ready),
    .rsp_valid(m_rsp_valid), .rsp_rdata(m_rsp_rdata)
  );

  always #5 clk = ~clk;

  word_t ref_mem [WORDS];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Overlap: a read accepted between two writes of the same call means the
  // read stage was fetching the next line while the write stage was busy.
  logic [1:0] hist;  // kinds of the last two accepted requests, 1 = write
  always @(posedge clk) begin
    if (!rst_n || start) hist <= 2'b00;
    else if (m_req_valid && m_req_ready) begin
      if (m_req.we && hist == 2'b10) n_overlap++;
      hist <= {hist[0], m_req.we};
    end
  end

  function automatic pixel_t rand_pix();
    return ($urandom_range(3) == 0) ? '0 : pixel_t'($urandom);
  endfunction

  task automatic model(input draw_cmd_t c);
    for (int i = 0; i < c.h; i++)
      for (int j = 0; j < c.w / 2; j++) begin
        int unsigned sa, da;
        word_t s, o;
        sa = c.scp + (i + c.y) * (GAME_DW / 2) + c.x / 2 + j;
        da = c.scn + (i + c.y) * (GAME_DW / 2) + c.x / 2 + j;
        if (c.mode == MODE_ERASE) ref_mem[da] = '0;
        else begin
          s = ref_mem[c.sp + i * (c.w / 2) + j];
          o = ref_mem[sa];
          for (int p = 0; p < 2; p++)
            if (s[p*32 +: 32] != 0) o[p*32 +: 32] = s[p*32 +: 32];
            else n_transparent++;
          ref_mem[da] = o;
        end
      end
  endtask

  task automatic run(input draw_cmd_t c, output int cycles);
    @(negedge clk);
    cmd = c; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (busy) begin
      failures++;
      $display("busy still high after done");
    end
    model(c);
    for (int a = 0; a < WORDS; a++) begin
      checks++;
      if (u_mem.mem[a] !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("word %0d: %h, expected %h", a, u_mem.mem[a], ref_mem[a]);
      end
    end
  endtask

  function automatic draw_cmd_t rand_sprite();
    draw_cmd_t c;
    c = '0;
    c.mode = MODE_DRAW;
    c.w    = dim_t'(2 * $urandom_range(1, MAX_SPW / 2));
    c.h    = dim_t'($urandom_range(1, MAX_SPW));
    c.x    = dim_t'(2 * $urandom_range(0, (GAME_DW - c.w) / 2));
    c.y    = dim_t'($urandom_range(0, GAME_DH - c.h));
    c.sp   = addr_t'(SP_BASE + $urandom_range(3) * SP_SIZE);
    return c;
  endfunction

  initial begin
    int cyc;
    draw_cmd_t c;
    start = 0; cmd = '0;
    for (int a = 0; a < WORDS; a++) begin
      ref_mem[a] = {rand_pix(), rand_pix()};
      u_mem.mem[a] = ref_mem[a];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. full-screen erase, memory never stalls: one word per cycle
    u_mem.stall_pct = 0;
    c = '0; c.mode = MODE_ERASE; c.w = GAME_DW; c.h = GAME_DH;
    run(c, cyc);
    checks++;
    if (cyc < SCR_W || cyc > SCR_W + 4) begin
      failures++;
      $display("erase took %0d cycles, expected %0d..%0d", cyc, SCR_W, SCR_W + 4);
    end
    $display("full-screen erase: %0d cycles for %0d words", cyc, SCR_W);

    // 2. random sprites with stalls
    u_mem.stall_pct = 20;
    for (int t = 0; t < 30; t++) begin
      c = rand_sprite();
      run(c, cyc);
    end

    // 3. from the first screen into the second
    c = rand_sprite();
    c.scn = addr_t'(SCR_B);
    run(c, cyc);

    // 4. partial erase
    c = '0; c.mode = MODE_ERASE; c.x = 10; c.y = 3; c.w = 20; c.h = 7;
    run(c, cyc);

    // 5. a full 16x16 sprite with no stalls: each line costs its 24 bus
    //    transfers plus the read latency and a few cycles of hand-over
    u_mem.stall_pct = 0;
    c = rand_sprite();
    c.w = 16; c.h = 16; c.x = 8; c.y = 0;
    run(c, cyc);
    $display("16x16 draw: %0d cycles (bus transfers %0d)", cyc, 16 * 24);
    checks++;
    if (cyc < 16 * 24 || cyc > 16 * (24 + LAT + 4)) begin
      failures++;
      $display("draw too slow: %0d cycles", cyc);
    end

    checks++;
    if (n_overlap == 0 || n_transparent == 0) begin
      failures++;
      $display("coverage: overlap=%0d transparent=%0d", n_overlap, n_transparent);
    end
    $display("overlap events=%0d transparent pixels=%0d", n_overlap, n_transparent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
