// tb_callrw_configs - the end-to-end program in the other three builds
// compared in the evaluation: two-entry stack without call rewinding (the
// unprotected baseline), no stack without call rewinding, and no stack
// with call rewinding (every return in U- and M-mode is checked).
//
// Each build runs the same program as tb_callrw_top with its own checker,
// which expects, for instance, no exception and no check without call
// rewinding, and no correctly predicted return without a stack. Also
// confirms that with no stack, rewinding costs cycles over the unprotected
// build, since every return is then checked. A watchdog bounds the run.
module tb_callrw_configs;
  logic clk = 0;
  logic done[3];
  int   checks[3], failures[3], cycles[3];
  int   total_checks, total_failures;

  always #5 clk = ~clk;

  tb_callrw_pair #(.RAS_DEPTH(2), .CALL_RW_EN(1'b0)) base (
    .clk_i(clk), .done_o(done[0]), .checks_o(checks[0]), .failures_o(failures[0]),
    .cycles_o(cycles[0]));
  tb_callrw_pair #(.RAS_DEPTH(0), .CALL_RW_EN(1'b0)) noras (
    .clk_i(clk), .done_o(done[1]), .checks_o(checks[1]), .failures_o(failures[1]),
    .cycles_o(cycles[1]));
  tb_callrw_pair #(.RAS_DEPTH(0), .CALL_RW_EN(1'b1)) noras_rw (
    .clk_i(clk), .done_o(done[2]), .checks_o(checks[2]), .failures_o(failures[2]),
    .cycles_o(cycles[2]));

  initial begin
    repeat (2) @(posedge clk);  // let the checkers clear done first
    fork
      wait (done[0] && done[1] && done[2]);
      repeat (20000) @(posedge clk);
    join_any
    total_checks   = checks[0] + checks[1] + checks[2];
    total_failures = failures[0] + failures[1] + failures[2];
    if (!(done[0] && done[1] && done[2])) begin
      total_failures++;
      $display("watchdog expired");
    end else begin
      total_checks++;
      if (cycles[2] <= cycles[1]) begin
        total_failures++;
        $display("FAIL rewinding without a stack took %0d cycles, unprotected %0d",
                 cycles[2], cycles[1]);
      end
    end
    $display("cycles: baseline %0d, no stack %0d, no stack with rewinding %0d",
             cycles[0], cycles[1], cycles[2]);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
