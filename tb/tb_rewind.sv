// tb_rewind - self-checking test of the rewind check sequence.
//
// Starts a check with a random rwa and return pc, then, in the check cycle,
// presents the scan of one of five kinds of chunk: 32-bit call at rwa,
// 16-bit call at rwa + 2, 16-bit call at rwa only, 16-bit calls at both
// positions, or no call. The reference verdict is valid for the first,
// second and fourth kinds. It checks the cycle timing (check exactly one
// cycle after start, resume in that cycle, exception from the next cycle
// until accepted), the resume address ra = rwa + 4, the exception pc and
// tval, and that a flush during the check or the exception abandons it. A
// second instance without compressed instructions accepts only a 32-bit
// call at rwa. A watchdog bounds the run.
module tb_rewind;
  import callrw_pkg::*;
  localparam int unsigned XLEN = 64;

  logic            clk = 0, rst_n = 0;
  logic            flush, start, ack;
  logic [XLEN-1:0] rwa, ret_pc;
  scan_t           scan;
  logic            is_rw[2], resume[2], ex[2];
  logic [XLEN-1:0] ra[2], ex_pc[2], ex_tval[2];
  int              checks = 0, failures = 0;
  int              n_valid = 0, n_invalid = 0, n_flush = 0;

  rewind #(.XLEN(XLEN), .RVC(1)) dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .start_i(start), .rwa_i(rwa),
    .ret_pc_i(ret_pc), .scan_i(scan), .ex_ack_i(ack), .is_rewind_o(is_rw[0]),
    .resume_o(resume[0]), .ra_o(ra[0]), .ex_invalid_ra_o(ex[0]), .ex_pc_o(ex_pc[0]),
    .ex_tval_o(ex_tval[0]));
  rewind #(.XLEN(XLEN), .RVC(0)) dut_norvc (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .start_i(start), .rwa_i(rwa),
    .ret_pc_i(ret_pc), .scan_i(scan), .ex_ack_i(ack), .is_rewind_o(is_rw[1]),
    .resume_o(resume[1]), .ra_o(ra[1]), .ex_invalid_ra_o(ex[1]), .ex_pc_o(ex_pc[1]),
    .ex_tval_o(ex_tval[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int   kind, flush_at;
    logic exp_valid[2];
    flush = 0; start = 0; ack = 0; rwa = '0; ret_pc = '0; scan = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5000) begin
      // idle cycles, outputs quiet
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        scan = scan_t'({$urandom, $urandom});
        #1;
        for (int k = 0; k < 2; k++)
          check("idle quiet", !is_rw[k] && !resume[k] && !ex[k]);
      end
      // t0: start
      @(negedge clk);
      start  = 1;
      rwa    = {$urandom, $urandom} & ~64'd1;
      ret_pc = {$urandom, $urandom} & ~64'd1;
      kind   = $urandom_range(0, 4);
      flush_at = ($urandom_range(0, 5) == 0) ? $urandom_range(1, 2) : 0;
      @(negedge clk);
      // t1: check cycle
      start = 0;
      scan  = scan_t'({$urandom, $urandom});
      scan.lo_call32 = (kind == 0);
      scan.hi_ccall  = (kind == 1 || kind == 3);
      scan.lo_ccall  = (kind == 2 || kind == 3);
      exp_valid[0] = (kind == 0 || kind == 1 || kind == 3);
      exp_valid[1] = (kind == 0);
      flush = (flush_at == 1);
      #1;
      for (int k = 0; k < 2; k++) begin
        check("check cycle", is_rw[k] && !ex[k]);
        check("verdict", resume[k] == (exp_valid[k] && !flush));
        check("ra", ra[k] == rwa + 4);
      end
      if (flush) n_flush++;
      else if (exp_valid[0]) n_valid++;
      else n_invalid++;
      @(negedge clk);
      // t2
      flush = 0;
      scan  = scan_t'({$urandom, $urandom});
      for (int k = 0; k < 2; k++) begin
        #0;
        check("after check", !is_rw[k] && !resume[k]);
        check("exception raised", ex[k] == (!exp_valid[k] && flush_at != 1));
        if (ex[k]) check("exception pc/tval", ex_pc[k] == ret_pc && ex_tval[k] == rwa + 4);
      end
      // hold the exception a few cycles, then accept or flush it
      if (ex[0] || ex[1]) begin
        repeat ($urandom_range(0, 2)) begin
          @(negedge clk);
          for (int k = 0; k < 2; k++)
            check("exception held", ex[k] == (!exp_valid[k] && flush_at != 1));
        end
        @(negedge clk);
        if (flush_at == 2) begin flush = 1; n_flush++; end
        else ack = 1;
        @(negedge clk);
        flush = 0; ack = 0;
        #1;
        for (int k = 0; k < 2; k++) check("exception cleared", !ex[k]);
      end
    end
    check("all verdicts seen", n_valid > 0 && n_invalid > 0 && n_flush > 0);
    $display("valid %0d, invalid %0d, flushed %0d", n_valid, n_invalid, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
