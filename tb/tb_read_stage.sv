// tb_read_stage: self-checking test of the read stage.
//
// The stage reads from a memory model with random stalls whose words hold
// known random values. Bank flags are kept here as the unit keeps them: a
// bank is marked full when line_filled pulses and is emptied a random time
// later, standing in for the write stage. For a series of random sprite
// positions and sizes the test checks every line buffer write: the sprite
// buffer must receive sp[i*(w/2)+j] and the screen buffer
// scp[(i+y)*(GAME_DW/2)+x/2+j] at index j of the right bank, each exactly
// once per line, and never into a bank still full. It also checks that an
// erase call makes no memory request and finishes at once.
module tb_read_stage;
  import sprite_pkg::*;

  localparam int unsigned GAME_DW = 64;
  localparam int unsigned GAME_DH = 16;
  localparam int unsigned MAX_SPW = 16;
  localparam int unsigned HW      = MAX_SPW / 2;
  localparam int unsigned SP_BASE = GAME_DW / 2 * GAME_DH;   // sprite image after screen
  localparam int unsigned WORDS   = SP_BASE + MAX_SPW * HW;

  logic      clk = 0, rst_n = 0;
  logic      start, busy, done;
  draw_cmd_t cmd;
  logic      req_valid, req_ready, rsp_valid;
  mem_req_t  req;
  word_t     rsp_rdata;
  logic      sl_we, scl_we, bank_free, line_filled;
  logic [0:0] buf_bank;
  logic [2:0] buf_idx;
  word_t     buf_wdata;

  int checks = 0, failures = 0;
  int n_wait = 0;

  read_stage #(.GAME_DW(GAME_DW), .MAX_SPW(MAX_SPW), .NBANK(2)) dut (.*);

  ddr_model #(.WORDS(WORDS), .LAT(4), .STALL_PCT(30)) u_mem (
    .clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp_rdata
  );

  always #5 clk = ~clk;

  word_t image [WORDS];
  logic  full [2];
  int    fill_ptr, drain_ptr, drain_timer;
  int    cur_line;
  int    sl_seen [HW], scl_seen [HW];

  assign bank_free = !full[buf_bank];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bank flags and a pretend consumer.
  always @(posedge clk) begin
    if (!rst_n || start) begin
      full[0] <= 0; full[1] <= 0; fill_ptr <= 0; drain_ptr <= 0; drain_timer <= 0;
    end else begin
      if (busy && !bank_free) n_wait++;  // only while waiting to start a line
      if (line_filled) begin
        full[fill_ptr] <= 1;
        fill_ptr <= 1 - fill_ptr;
      end
      if (full[drain_ptr]) begin
        if (drain_timer == 0) begin
          full[drain_ptr] <= 0;
          drain_ptr <= 1 - drain_ptr;
          drain_timer <= $urandom_range(30);
        end else drain_timer <= drain_timer - 1;
      end
    end
  end

  // Line buffer write checker.
  always @(posedge clk) begin
    if (rst_n) begin
      if (sl_we || scl_we) begin
        int unsigned e_addr;
        checks++;
        if (full[buf_bank]) begin
          failures++;
          $display("write into full bank %0d", buf_bank);
        end
        if (sl_we && scl_we) begin
          failures++;
          $display("both buffers written in one cycle");
        end
        if (sl_we) begin
          e_addr = cmd.sp + cur_line * (cmd.w / 2) + buf_idx;
          sl_seen[buf_idx]++;
        end else begin
          e_addr = cmd.scp + (cur_line + cmd.y) * (GAME_DW / 2) + cmd.x / 2 + buf_idx;
          scl_seen[buf_idx]++;
        end
        checks++;
        if (buf_wdata !== image[e_addr]) begin
          failures++;
          $display("line %0d idx %0d %s: got %h expected %h (addr %0d)", cur_line, buf_idx,
                   sl_we ? "sprite" : "screen", buf_wdata, image[e_addr], e_addr);
        end
      end
      if (line_filled) begin
        for (int j = 0; j < HW; j++) begin
          checks++;
          if (j < cmd.w / 2 && (sl_seen[j] != 1 || scl_seen[j] != 1)) begin
            failures++;
            $display("line %0d idx %0d written %0d/%0d times", cur_line, j, sl_seen[j], scl_seen[j]);
          end
          sl_seen[j] = 0; scl_seen[j] = 0;
        end
        cur_line++;
      end
    end
  end

  task automatic run(input draw_cmd_t c, output int cycles);
    @(negedge clk);
    cmd = c; start = 1; cur_line = 0;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    @(posedge clk);  // let the checker see the last line_filled
    #1;
  endtask

  initial begin
    int cyc;
    draw_cmd_t c;
    start = 0; cmd = '0;
    for (int a = 0; a < WORDS; a++) begin
      image[a] = {$urandom, $urandom};
      u_mem.mem[a] = image[a];
    end
    for (int j = 0; j < HW; j++) begin sl_seen[j] = 0; scl_seen[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      c = '0;
      c.mode = MODE_DRAW;
      c.w    = dim_t'(2 * $urandom_range(1, HW));
      c.h    = dim_t'($urandom_range(1, MAX_SPW));
      c.x    = dim_t'(2 * $urandom_range(0, (GAME_DW - c.w) / 2));
      c.y    = dim_t'($urandom_range(0, GAME_DH - c.h));
      c.sp   = addr_t'(SP_BASE);
      c.scp  = 0;
      c.scn  = 0;
      run(c, cyc);
      checks++;
      if (cur_line != c.h) begin
        failures++;
        $display("call %0d: %0d lines filled, expected %0d", t, cur_line, c.h);
      end
    end
    // erase: no reads, done right away
    c.mode = MODE_ERASE;
    begin
      longint unsigned r0;
      r0 = u_mem.n_reads;
      run(c, cyc);
      checks++;
      if (cyc > 2 || u_mem.n_reads != r0) begin
        failures++;
        $display("erase call took %0d cycles and made %0d reads", cyc, u_mem.n_reads - r0);
      end
    end
    checks++;
    if (n_wait == 0) begin
      failures++;
      $display("the stage never waited for a free bank");
    end
    $display("bank wait cycles=%0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
