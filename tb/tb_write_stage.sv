// tb_write_stage: self-checking test of the write stage.
//
// The line buffers are stood in for by a function of (line, word): sprite
// and screen words with random pixels, a third of them 0. Bank flags are
// kept here: a pretend read stage marks the banks full in turn after random
// delays, and line_drained empties them. Each write request is compared with
// the next one expected: address scn[(i+y)*(GAME_DW/2)+x/2+j] in line and
// word order, data the merge of the two buffer words worked out here (or 0
// when erasing). No write may use a bank that is not full. With a port that
// never stalls, an erase of h lines of w/2 words must take h*w/2 cycles plus
// at most two.
module tb_write_stage;
  import sprite_pkg::*;

  localparam int unsigned GAME_DW = 64;
  localparam int unsigned MAX_SPW = 16;
  localparam int unsigned HW      = MAX_SPW / 2;

  logic      clk = 0, rst_n = 0;
  logic      start, busy, done;
  draw_cmd_t cmd;
  logic      req_valid, req_ready;
  mem_req_t  req;
  logic [0:0] buf_bank;
  logic [2:0] buf_idx;
  word_t     sl_rdata, scl_rdata;
  logic      bank_ready, line_drained;

  int checks = 0, failures = 0;
  int stall_pct = 30;
  int n_wait = 0, n_transparent = 0, n_opaque = 0;

  write_stage #(.GAME_DW(GAME_DW), .MAX_SPW(MAX_SPW), .NBANK(2)) dut (.*);

  always #5 clk = ~clk;

  // Buffer contents: a hash of the line number, the word and which buffer.
  function automatic pixel_t pix(int line, int idx, int p, int which);
    int unsigned h;
    h = (line * 7919 + idx * 104729 + p * 31 + which * 1299709) * 2654435761;
    return (h[3:0] < 5) ? '0 : pixel_t'(h);
  endfunction
  function automatic word_t buf_word(int line, int idx, int which);
    return {pix(line, idx, 1, which), pix(line, idx, 0, which)};
  endfunction

  logic full [2];
  int   fill_ptr, drain_ptr, fill_timer, lines_filled, lines_drained;
  int   exp_line, exp_j;

  // The line a bank holds: banks alternate, so bank b holds the oldest
  // undrained line of parity b.
  assign sl_rdata  = buf_word(lines_drained, int'(buf_idx), 0);
  assign scl_rdata = buf_word(lines_drained, int'(buf_idx), 1);
  assign bank_ready = full[buf_bank];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst_n || start) begin
      full[0] <= 0; full[1] <= 0; fill_ptr <= 0; drain_ptr <= 0;
      fill_timer <= 0; lines_filled <= 0; lines_drained <= 0;
      req_ready <= 0;
    end else begin
      req_ready <= ($urandom_range(99) >= stall_pct);
      if (busy && !bank_ready && !req_valid) n_wait++;
      if (cmd.mode == MODE_DRAW && lines_filled < cmd.h && !full[fill_ptr]) begin
        if (fill_timer == 0) begin
          full[fill_ptr] <= 1;
          fill_ptr <= 1 - fill_ptr;
          lines_filled <= lines_filled + 1;
          fill_timer <= $urandom_range(20);
        end else fill_timer <= fill_timer - 1;
      end
      if (line_drained) begin
        full[drain_ptr] <= 0;
        drain_ptr <= 1 - drain_ptr;
        lines_drained <= lines_drained + 1;
      end
      if (req_valid && req_ready) begin
        int unsigned e_addr;
        word_t e_data;
        e_addr = cmd.scn + (exp_line + cmd.y) * (GAME_DW / 2) + cmd.x / 2 + exp_j;
        if (cmd.mode == MODE_ERASE) e_data = '0;
        else begin
          for (int p = 0; p < 2; p++) begin
            pixel_t s, c;
            s = pix(exp_line, exp_j, p, 0);
            c = pix(exp_line, exp_j, p, 1);
            e_data[p*32 +: 32] = (s != 0) ? s : c;
            if (s != 0) n_opaque++; else n_transparent++;
          end
        end
        checks++;
        if (!req.we || req.addr != e_addr || req.wdata !== e_data) begin
          failures++;
          $display("line %0d word %0d: we=%0d addr %0d data %h, expected addr %0d data %h",
                   exp_line, exp_j, req.we, req.addr, req.wdata, e_addr, e_data);
        end
        if (cmd.mode == MODE_DRAW) begin
          checks++;
          if (!full[buf_bank]) begin
            failures++;
            $display("write from a bank that is not full");
          end
        end
        if (exp_j == cmd.w / 2 - 1) begin
          exp_j <= 0;
          exp_line <= exp_line + 1;
        end else exp_j <= exp_j + 1;
      end
    end
  end

  task automatic run(input draw_cmd_t c, output int cycles);
    @(negedge clk);
    cmd = c; start = 1; exp_line = 0; exp_j = 0;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (exp_line != c.h) begin
      failures++;
      $display("%0d lines written, expected %0d", exp_line, c.h);
    end
  endtask

  initial begin
    int cyc;
    draw_cmd_t c;
    start = 0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      c = '0;
      c.mode = (t % 5 == 4) ? MODE_ERASE : MODE_DRAW;
      c.w    = dim_t'(2 * $urandom_range(1, HW));
      c.h    = dim_t'($urandom_range(1, MAX_SPW));
      c.x    = dim_t'(2 * $urandom_range(0, (GAME_DW - c.w) / 2));
      c.y    = dim_t'($urandom_range(0, 32));
      c.scn  = addr_t'($urandom_range(0, 4096));
      run(c, cyc);
    end
    // erase a whole 64x20 screen with a port that never stalls
    stall_pct = 0;
    c = '0;
    c.mode = MODE_ERASE; c.w = GAME_DW; c.h = 20; c.scn = 100;
    run(c, cyc);
    checks++;
    if (cyc < 20 * GAME_DW / 2 || cyc > 20 * GAME_DW / 2 + 2) begin
      failures++;
      $display("full-width erase took %0d cycles, expected %0d", cyc, 20 * GAME_DW / 2);
    end
    $display("erase cycles=%0d wait cycles=%0d transparent=%0d opaque=%0d", cyc, n_wait, n_transparent, n_opaque);
    checks++;
    if (n_wait == 0 || n_transparent == 0 || n_opaque == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
