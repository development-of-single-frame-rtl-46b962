// tb_line_buffer: self-checking test of the two-bank line buffer.
//
// Writes random words at random bank/index pairs while reading random
// locations, and compares every read with a copy of the contents kept here.
// Also checks that a word written at one edge is readable in the next cycle.
module tb_line_buffer;
  import sprite_pkg::*;

  localparam int unsigned DEPTH = 32;
  localparam int unsigned NBANK = 2;

  logic                     clk = 0;
  logic                     we;
  logic [0:0]               wbank, rbank;
  logic [$clog2(DEPTH)-1:0] waddr, raddr;
  word_t                    wdata, rdata;
  word_t                    model [NBANK][DEPTH];
  int                       checks = 0, failures = 0;

  line_buffer #(.DEPTH(DEPTH), .NBANK(NBANK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wbank = 0; rbank = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill everything first
    for (int b = 0; b < NBANK; b++)
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        we = 1; wbank = b[0:0]; waddr = i[4:0]; wdata = {$urandom, $urandom};
        model[b][i] = wdata;
      end
    @(negedge clk); we = 0;
    // random mixed traffic
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rbank = 1'($urandom); raddr = 5'($urandom);
      #1;
      checks++;
      if (rdata !== model[rbank][raddr]) begin
        failures++;
        $display("read mismatch bank %0d idx %0d: %h vs %h", rbank, raddr, rdata, model[rbank][raddr]);
      end
      we = 1'($urandom); wbank = 1'($urandom); waddr = 5'($urandom); wdata = {$urandom, $urandom};
      @(posedge clk);
      if (we) model[wbank][waddr] = wdata;
      // the written word must be visible right after the edge
      @(negedge clk);
      if (we) begin
        rbank = wbank; raddr = waddr; we = 0;
        #1;
        checks++;
        if (rdata !== model[rbank][raddr]) begin
          failures++;
          $display("write-through mismatch bank %0d idx %0d", rbank, raddr);
        end
      end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
