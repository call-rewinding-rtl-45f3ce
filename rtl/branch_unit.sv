// branch_unit - control-flow resolution in the execute stage, with the
// call-rewinding change.
//
// For each control-flow instruction issued to it the unit computes the
// real next address: pc + imm for a direct jump, (rs1 + imm) with bit 0
// cleared for an indirect jump or return, pc + imm or the fall-through
// address for a conditional branch (the comparison result comes from the
// ALU). It compares that address with the one fetch predicted and reports
// a misprediction so fetch can redirect. It also gives the link address
// (pc + 2 or pc + 4) to be written to rd.
//
// Call rewinding: when a return is mispredicted and rewinding is active
// (built in with CALL_RW_EN and the hart not in S-mode), the address sent
// to fetch is not ra but rwa = ra - 4, the address before the return
// target; fetch then checks the instruction there before going to ra.
// Returns whose prediction was right are trusted and not checked. Without
// a return address stack (RAS_DEPTH = 0) every return counts as
// mispredicted, so every return is checked.
//
// Purely combinational: the res_* outputs are valid in the cycle valid_i
// is high. The rwa computation, the mispredict comparison, the forced
// mispredict without a stack and the S-mode exemption follow the
// document; operand and result port layout is this design's own.
module branch_unit
  import callrw_pkg::*;
#(
  parameter int unsigned XLEN       = 64,
  parameter bit          CALL_RW_EN = 1'b1,
  parameter int unsigned RAS_DEPTH  = 2
) (
  input  logic            valid_i,
  input  logic [XLEN-1:0] pc_i,
  input  cf_t             cf_i,             // class found by instruction scan
  input  logic            rvc_i,            // instruction is 16 bits wide
  input  logic [XLEN-1:0] operand_a_i,      // rs1 value
  input  logic [XLEN-1:0] imm_i,            // sign-extended offset
  input  logic            branch_taken_i,   // ALU comparison result
  input  logic [XLEN-1:0] predict_addr_i,   // next address fetch predicted
  input  priv_t           priv_i,
  output logic            res_valid_o,
  output logic [XLEN-1:0] res_pc_o,
  output logic [XLEN-1:0] res_target_o,     // where fetch must go (rwa when rewinding)
  output logic            res_mispredict_o,
  output cf_t             res_cf_o,
  output logic            res_taken_o,
  output logic [XLEN-1:0] link_addr_o
);

  logic [XLEN-1:0] next_seq, addr;
  logic            taken, rewind;

  assign next_seq = pc_i + (rvc_i ? XLEN'(2) : XLEN'(4));

  always_comb begin
    taken = 1'b1;
    unique case (cf_i)
      CF_BRANCH: begin
        taken = branch_taken_i;
        addr  = branch_taken_i ? pc_i + imm_i : next_seq;
      end
      CF_JUMP:             addr = pc_i + imm_i;
      CF_JUMPR, CF_RETURN: addr = (operand_a_i + imm_i) & ~XLEN'(1);
      default: begin
        taken = 1'b0;
        addr  = next_seq;
      end
    endcase

    res_mispredict_o = valid_i && (cf_i != CF_NONE) && (addr != predict_addr_i);
    if (RAS_DEPTH == 0 && cf_i == CF_RETURN && rewind_active(CALL_RW_EN, priv_i))
      res_mispredict_o = valid_i;

    rewind       = res_mispredict_o && (cf_i == CF_RETURN) && rewind_active(CALL_RW_EN, priv_i);
    res_target_o = rewind ? addr - XLEN'(4) : addr;
  end

  assign res_valid_o = valid_i && (cf_i != CF_NONE);
  assign res_pc_o    = pc_i;
  assign res_cf_o    = cf_i;
  assign res_taken_o = taken;
  assign link_addr_o = next_seq;

endmodule
