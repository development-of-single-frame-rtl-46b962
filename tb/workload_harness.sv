// workload_harness: runs single-frame sprite drawing workloads on one
// sprite_system instance at full size (1280x720 screen, 64x64 sprites) and
// checks the resulting screen against a reference model.
//
// When go rises, it runs one frame for each sprite count in {50, 150, 300}:
// every unit erases its band of the screen, all units wait for each other,
// then each unit draws its share of the sprites at random positions inside
// its band. The memory model has a fixed latency and never stalls. Erase and
// draw times are printed in cycles and in milliseconds at 100 MHz, the
// clock of the document's system. Each unit has its own memory port, and
// the memory serves all ports in the same cycle (no bandwidth limit), so
// the times show the drawing units alone. checks and failures accumulate; finished
// rises when all three frames are done.
module workload_harness
  import sprite_pkg::*;
#(
  parameter int unsigned N_UNITS = 1
) (
  input  logic clk,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int unsigned GAME_DW = GAME_DW_DEF;
  localparam int unsigned GAME_DH = GAME_DH_DEF;
  localparam int unsigned SPR     = 64;
  localparam int unsigned N_IMG   = 4;
  localparam int unsigned BAND    = GAME_DH / N_UNITS;
  localparam int unsigned SCR_W   = GAME_DW / 2 * GAME_DH;
  localparam int unsigned SP_BASE = SCR_W;
  localparam int unsigned SP_SIZE = SPR * SPR / 2;
  localparam int unsigned WORDS   = SP_BASE + N_IMG * SP_SIZE;

  logic                     rst_n = 0;
  logic      [N_UNITS-1:0]  start, busy, done;
  draw_cmd_t [N_UNITS-1:0]  cmd;
  logic      [N_UNITS-1:0]  m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t  [N_UNITS-1:0]  m_req;
  word_t     [N_UNITS-1:0]  m_rsp_rdata;

  sprite_system #(.N_UNITS(N_UNITS)) dut (.*);

  ddr_model #(.NP(N_UNITS), .WORDS(WORDS), .LAT(6), .STALL_PCT(0)) u_mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req(m_req), .req_ready(m_req_ready),
    .rsp_valid(m_rsp_valid), .rsp_rdata(m_rsp_rdata)
  );

  word_t ref_mem [WORDS];

  task automatic model(input draw_cmd_t c);
    for (int i = 0; i < int'(c.h); i++)
      for (int j = 0; j < int'(c.w) / 2; j++) begin
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
          ref_mem[da] = o;
        end
      end
  endtask

  task automatic call(input int u, input draw_cmd_t c);
    @(negedge clk);
    cmd[u] = c;
    start[u] = 1'b1;
    @(negedge clk);
    start[u] = 1'b0;
    while (!done[u]) @(negedge clk);
    model(c);
  endtask

  task automatic unit_erase(input int u);
    draw_cmd_t c;
    c = '0;
    c.mode = MODE_ERASE;
    c.w = dim_t'(GAME_DW); c.h = dim_t'(BAND); c.y = dim_t'(u * BAND);
    call(u, c);
  endtask

  task automatic unit_draw(input int u, input int n_spr);
    draw_cmd_t c;
    for (int k = u; k < n_spr; k += N_UNITS) begin
      c = '0;
      c.mode = MODE_DRAW;
      c.w = dim_t'(SPR); c.h = dim_t'(SPR);
      c.x = dim_t'(2 * $urandom_range(0, (GAME_DW - SPR) / 2));
      c.y = dim_t'(u * BAND + $urandom_range(0, BAND - SPR));
      c.sp = addr_t'(SP_BASE + (k % N_IMG) * SP_SIZE);
      call(u, c);
    end
  endtask

  function automatic pixel_t rand_pix(int zero_in);
    return ($urandom_range(zero_in - 1) == 0) ? '0 : pixel_t'($urandom);
  endfunction

  initial begin
    int counts [3] = '{50, 150, 300};
    longint unsigned t0, t1, t2;
    finished = 0; checks = 0; failures = 0;
    start = '0; cmd = '0;
    for (int a = 0; a < WORDS; a++) begin
      ref_mem[a] = (a < SP_BASE) ? {rand_pix(8), rand_pix(8)} : {rand_pix(3), rand_pix(3)};
      u_mem.mem[a] = ref_mem[a];
    end
    wait (go);
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (counts[n]) begin
      t0 = u_mem.cycle;
      for (int u = 0; u < N_UNITS; u++) begin
        automatic int uu = u;
        fork unit_erase(uu); join_none
      end
      wait fork;
      t1 = u_mem.cycle;
      for (int u = 0; u < N_UNITS; u++) begin
        automatic int uu = u;
        automatic int nn = counts[n];
        fork unit_draw(uu, nn); join_none
      end
      wait fork;
      t2 = u_mem.cycle;
      $display("%0dHW %3d sprites: erase %7d cycles (%5.2f ms), draw %7d cycles (%5.2f ms), frame %5.2f ms",
               N_UNITS, counts[n], t1 - t0, real'(t1 - t0) / 1.0e5, t2 - t1, real'(t2 - t1) / 1.0e5,
               real'(t2 - t0) / 1.0e5);
      repeat (2) @(posedge clk);
      for (int a = 0; a < WORDS; a++) begin
        checks++;
        if (u_mem.mem[a] !== ref_mem[a]) failures++;
      end
      // the units share the erase, each writing a word per cycle
      checks++;
      if (t1 - t0 < SCR_W / N_UNITS || t1 - t0 > SCR_W / N_UNITS + 100) begin
        failures++;
        $display("%0dHW erase took %0d cycles, expected about %0d", N_UNITS, t1 - t0, SCR_W / N_UNITS);
      end
    end
    finished = 1;
  end

endmodule
