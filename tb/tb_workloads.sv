// tb_workloads: the evaluated workloads at full size.
//
// Runs single-frame sprite drawing with 1, 2 and 3 drawing units (one
// sprite_system instance each) and 50, 150 and 300 sprites of 64x64 pixels
// on a 1280x720 screen, one configuration after another. Each frame is
// checked word by word against a reference model, and the erase and draw
// times are printed for comparison with measurements of the design. The
// memory model answers reads after 6 cycles and never stalls, so the
// times are those of the drawing units alone.
module tb_workloads;
  logic clk = 0;
  logic go [3];
  logic finished [3];
  int   checks [3], failures [3];
  int   total_checks, total_failures;

  always #5 clk = ~clk;

  workload_harness #(.N_UNITS(1)) u_hw1 (.clk, .go(go[0]), .finished(finished[0]), .checks(checks[0]), .failures(failures[0]));
  workload_harness #(.N_UNITS(2)) u_hw2 (.clk, .go(go[1]), .finished(finished[1]), .checks(checks[1]), .failures(failures[1]));
  workload_harness #(.N_UNITS(3)) u_hw3 (.clk, .go(go[2]), .finished(finished[2]), .checks(checks[2]), .failures(failures[2]));

  initial begin
    repeat (30_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  initial begin
    go[0] = 0; go[1] = 0; go[2] = 0;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      go[k] = 1;
      wait (finished[k]);
    end
    total_checks = checks[0] + checks[1] + checks[2];
    total_failures = failures[0] + failures[1] + failures[2];
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
