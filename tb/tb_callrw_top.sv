// tb_callrw_top - end-to-end test of callrw_top in its default build
// (RV64, two-entry return address stack, call rewinding and compressed
// instructions on), with no parameter overridden.
//
// tb_callrw_bench drives the design through a small program that makes
// every mechanism happen: correctly predicted returns, stack overflow,
// checked returns found valid after a 32-bit and after a 16-bit call,
// invalid returns raising INVALID_RETURN_ADDRESS in M- and U-mode, an
// unchecked return in S-mode, an interrupt during a check, and plain
// mispredictions; it checks results and redirect timing cycle by cycle.
// This module supplies the clock, connects the two by port name and
// bounds the run with a watchdog.
module tb_callrw_top;
  import callrw_pkg::*;

  logic        clk_i = 0;
  logic        rst_ni, flush_i, imem_req_o, fe_valid_o, fe_ready_i, fe_rvc_o, fe_ex_valid_o;
  logic [63:0] boot_addr_i, flush_pc_i, imem_addr_o, fe_pc_o, fe_predict_addr_o;
  logic [63:0] fe_ex_cause_o, fe_ex_tval_o;
  logic [31:0] imem_data_i, fe_instr_o;
  priv_t       priv_i;
  cf_t         fe_cf_o, bu_cf_i, res_cf_o;
  logic        bu_valid_i, bu_rvc_i, bu_branch_taken_i;
  logic [63:0] bu_pc_i, bu_operand_a_i, bu_imm_i, bu_predict_addr_i;
  logic        res_valid_o, res_mispredict_o, res_taken_o;
  logic [63:0] res_pc_o, res_target_o, bu_link_addr_o;
  logic        is_rewind_o, ex_invalid_ra_o, ras_overflow_o;
  logic        done;
  int          checks, failures, cycles;

  always #5 clk_i = ~clk_i;

  callrw_top dut (.*);

  tb_callrw_bench #(.RAS_DEPTH(2), .CALL_RW_EN(1'b1)) bench (
    .*, .done_o(done), .checks_o(checks), .failures_o(failures), .cycles_o(cycles));

  initial begin
    repeat (2) @(posedge clk_i);  // let the checkers clear done first
    fork
      wait (done);
      repeat (20000) @(posedge clk_i);
    join_any
    if (!done) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
