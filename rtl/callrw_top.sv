// callrw_top - fetch stage and branch unit of an in-order RISC-V core with
// call rewinding (backward-edge protection).
//
// Idea: every return target legitimately follows a call. When a return
// was not predicted correctly by the return address stack, the core first
// fetches the instruction just before the target (rwa = ra - 4), checks
// that it is a call, discards it, and only then continues at ra; otherwise
// it raises INVALID_RETURN_ADDRESS (cause 25). Correctly predicted returns
// are trusted, since only calls fill the stack.
//
// What is inside:
//   * PC select and a one-instruction-per-cycle fetch from imem (32 bits
//     read at any halfword address, combinationally);
//   * instr_scan, classifying the fetched instruction;
//   * ras, pushed by calls and popped by returns at fetch time;
//   * rewind, which holds rwa and checks the chunk fetched there;
//   * branch_unit, resolving control flow for the execute stage.
// Decode, issue, the register file, the ALU comparison and commit belong to
// the host core and are reached through ports: fe_* carries a fetch entry
// (pc, instruction, prediction, or an exception) out with a valid/ready
// handshake; bu_* brings a control-flow instruction with its rs1 value back
// in for resolution; res_* reports the result, and a misprediction there
// means the core must drop every younger instruction. flush_i/flush_pc_i
// redirect fetch on a trap or trap return and abandon a check in progress.
//
// Timing: a mispredicted jump redirects fetch in the next cycle; a checked
// return fetches rwa in the next cycle, ra one cycle later (one extra
// cycle), or presents the exception entry then. After the exception entry
// is accepted fetch stops until flush_i. Conditional branches are
// predicted not taken and indirect jumps sequential (the host core's
// branch history and target buffers are not modelled). Rewinding is off in
// S-mode and on in U- and M-mode, as in the document; parameter defaults
// are the document's main configuration (RV64, two-entry stack, rewinding
// and compressed instructions enabled).
module callrw_top
  import callrw_pkg::*;
#(
  parameter int unsigned XLEN       = 64,
  parameter int unsigned RAS_DEPTH  = 2,
  parameter bit          CALL_RW_EN = 1'b1,
  parameter bit          RVC        = 1'b1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic [XLEN-1:0] boot_addr_i,
  input  priv_t           priv_i,
  // trap entry / return from the core's commit stage
  input  logic            flush_i,
  input  logic [XLEN-1:0] flush_pc_i,
  // instruction memory
  output logic            imem_req_o,
  output logic [XLEN-1:0] imem_addr_o,
  input  logic [31:0]     imem_data_i,
  // fetch entry to decode
  output logic            fe_valid_o,
  input  logic            fe_ready_i,
  output logic [XLEN-1:0] fe_pc_o,
  output logic [31:0]     fe_instr_o,
  output logic            fe_rvc_o,
  output cf_t             fe_cf_o,
  output logic [XLEN-1:0] fe_predict_addr_o,
  output logic            fe_ex_valid_o,
  output logic [XLEN-1:0] fe_ex_cause_o,
  output logic [XLEN-1:0] fe_ex_tval_o,
  // control-flow instruction issued to the branch unit
  input  logic            bu_valid_i,
  input  logic [XLEN-1:0] bu_pc_i,
  input  cf_t             bu_cf_i,
  input  logic            bu_rvc_i,
  input  logic [XLEN-1:0] bu_operand_a_i,
  input  logic [XLEN-1:0] bu_imm_i,
  input  logic            bu_branch_taken_i,
  input  logic [XLEN-1:0] bu_predict_addr_i,
  // resolution, to the core
  output logic            res_valid_o,
  output logic [XLEN-1:0] res_pc_o,
  output logic [XLEN-1:0] res_target_o,
  output logic            res_mispredict_o,
  output cf_t             res_cf_o,
  output logic            res_taken_o,
  output logic [XLEN-1:0] bu_link_addr_o,
  // status
  output logic            is_rewind_o,
  output logic            ex_invalid_ra_o,
  output logic            ras_overflow_o
);

  logic [XLEN-1:0] pc_q, seq_pc, pred_pc;
  logic            halted_q;
  scan_t           scan;
  logic [XLEN-1:0] ras_top;
  logic            ras_valid;
  logic            fetch_fire, rw_start, rw_resume, rw_ex;
  logic [XLEN-1:0] rw_ra, rw_ex_pc, rw_ex_tval;

  // ---------------------------------------------------------------- execute
  branch_unit #(
    .XLEN(XLEN), .CALL_RW_EN(CALL_RW_EN), .RAS_DEPTH(RAS_DEPTH)
  ) i_branch_unit (
    .valid_i         (bu_valid_i),
    .pc_i            (bu_pc_i),
    .cf_i            (bu_cf_i),
    .rvc_i           (bu_rvc_i),
    .operand_a_i     (bu_operand_a_i),
    .imm_i           (bu_imm_i),
    .branch_taken_i  (bu_branch_taken_i),
    .predict_addr_i  (bu_predict_addr_i),
    .priv_i          (priv_i),
    .res_valid_o     (res_valid_o),
    .res_pc_o        (res_pc_o),
    .res_target_o    (res_target_o),
    .res_mispredict_o(res_mispredict_o),
    .res_cf_o        (res_cf_o),
    .res_taken_o     (res_taken_o),
    .link_addr_o     (bu_link_addr_o)
  );

  // ------------------------------------------------------------------ fetch
  assign imem_req_o  = !halted_q && !ex_invalid_ra_o;
  assign imem_addr_o = pc_q;

  instr_scan #(.XLEN(XLEN)) i_instr_scan (
    .data_i(imem_data_i),
    .scan_o(scan)
  );

  assign seq_pc = pc_q + (scan.rvc ? XLEN'(2) : XLEN'(4));

  always_comb begin
    unique case (scan.cf)
      CF_JUMP:   pred_pc = pc_q + {{(XLEN-32){scan.imm[31]}}, scan.imm};
      CF_RETURN: pred_pc = ras_valid ? ras_top : seq_pc;
      default:   pred_pc = seq_pc;
    endcase
  end

  ras #(.DEPTH(RAS_DEPTH), .XLEN(XLEN)) i_ras (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .push_i     (fetch_fire && scan.ras_push),
    .pop_i      (fetch_fire && scan.ras_pop),
    .data_i     (seq_pc),
    .top_o      (ras_top),
    .top_valid_o(ras_valid),
    .overflow_o (ras_overflow_o)
  );

  assign rw_start = res_mispredict_o && (res_cf_o == CF_RETURN) &&
                    rewind_active(CALL_RW_EN, priv_i);

  rewind #(.XLEN(XLEN), .RVC(RVC)) i_rewind (
    .clk_i          (clk_i),
    .rst_ni         (rst_ni),
    .flush_i        (flush_i),
    .start_i        (rw_start && !flush_i),
    .rwa_i          (res_target_o),
    .ret_pc_i       (res_pc_o),
    .scan_i         (scan),
    .ex_ack_i       (fe_ready_i),
    .is_rewind_o    (is_rewind_o),
    .resume_o       (rw_resume),
    .ra_o           (rw_ra),
    .ex_invalid_ra_o(rw_ex),
    .ex_pc_o        (rw_ex_pc),
    .ex_tval_o      (rw_ex_tval)
  );

  assign ex_invalid_ra_o = rw_ex;

  // A normal entry is offered unless fetch is stopped, checking rwa, or
  // being redirected this cycle; the exception entry takes its place.
  assign fetch_fire = fe_valid_o && fe_ready_i && !rw_ex;

  always_comb begin
    fe_valid_o        = !halted_q && !is_rewind_o && !res_mispredict_o && !flush_i;
    fe_pc_o           = pc_q;
    fe_instr_o        = imem_data_i;
    fe_rvc_o          = scan.rvc;
    fe_cf_o           = scan.cf;
    fe_predict_addr_o = pred_pc;
    fe_ex_valid_o     = 1'b0;
    fe_ex_cause_o     = '0;
    fe_ex_tval_o      = '0;
    if (rw_ex) begin
      fe_valid_o        = !flush_i;
      fe_pc_o           = rw_ex_pc;
      fe_instr_o        = '0;
      fe_rvc_o          = 1'b0;
      fe_cf_o           = CF_NONE;
      fe_predict_addr_o = '0;
      fe_ex_valid_o     = 1'b1;
      fe_ex_cause_o     = XLEN'(EXC_INVALID_RA);
      fe_ex_tval_o      = rw_ex_tval;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pc_q     <= boot_addr_i;
      halted_q <= 1'b0;
    end else if (flush_i) begin
      pc_q     <= flush_pc_i;
      halted_q <= 1'b0;
    end else if (res_mispredict_o) begin
      pc_q <= res_target_o;               // rwa when the return is checked
    end else if (rw_resume) begin
      pc_q <= rw_ra;
    end else if (rw_ex) begin
      if (fe_ready_i) halted_q <= 1'b1;   // wait for the trap redirect
    end else if (fetch_fire) begin
      pc_q <= pred_pc;
    end
  end

  // The entry may only change while it is offered if fetch is redirected.
  a_entry_stable : assert property (@(posedge clk_i) disable iff (!rst_ni)
    (fe_valid_o && !fe_ready_i && !fe_ex_valid_o) |=>
      (fe_pc_o == $past(fe_pc_o)) || $past(res_mispredict_o) || $past(flush_i) || !fe_valid_o);

endmodule
