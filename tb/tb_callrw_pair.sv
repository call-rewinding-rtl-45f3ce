// tb_callrw_pair - one callrw_top build and its program checker.
//
// Instantiates callrw_top with the given RAS_DEPTH and CALL_RW_EN and a
// tb_callrw_bench expecting that build, connected by port name, and passes
// the checker's totals out. Used to run several builds side by side.
module tb_callrw_pair
  import callrw_pkg::*;
#(
  parameter int unsigned RAS_DEPTH  = 2,
  parameter bit          CALL_RW_EN = 1'b1
) (
  input  logic clk_i,
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   cycles_o
);
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

  callrw_top #(.RAS_DEPTH(RAS_DEPTH), .CALL_RW_EN(CALL_RW_EN)) dut (.*);

  tb_callrw_bench #(.RAS_DEPTH(RAS_DEPTH), .CALL_RW_EN(CALL_RW_EN)) bench (.*);
endmodule
