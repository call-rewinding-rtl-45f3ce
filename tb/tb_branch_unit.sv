// tb_branch_unit - self-checking test of control-flow resolution.
//
// Three instances share random stimulus: the main configuration (call
// rewinding on, two-entry stack), call rewinding off, and call rewinding
// with no stack. For each random instruction class, pc, rs1, offset,
// comparison result, privilege level and prediction (often exactly right)
// a reference computes the true target, the misprediction and, for a
// mispredicted return with rewinding active outside S-mode, the rewinded
// address ra - 4. Counts that each case (correct return, rewound return,
// S-mode return, return without stack) occurred. A watchdog bounds the run.
module tb_branch_unit;
  import callrw_pkg::*;
  localparam int unsigned XLEN = 64;

  logic            clk = 0;
  logic            valid, rvc, taken_in;
  logic [XLEN-1:0] pc, opa, imm, pred;
  cf_t             cf;
  priv_t           priv;
  int              checks = 0, failures = 0;
  int              n_ret_ok = 0, n_ret_rw = 0, n_ret_s = 0, n_ret_noras = 0;

  typedef struct packed {
    logic            valid;
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] target;
    logic            mis;
    cf_t             cf;
    logic            taken;
    logic [XLEN-1:0] link;
  } res_t;
  res_t r[3];

  branch_unit #(.XLEN(XLEN), .CALL_RW_EN(1), .RAS_DEPTH(2)) dut_main (
    .valid_i(valid), .pc_i(pc), .cf_i(cf), .rvc_i(rvc), .operand_a_i(opa), .imm_i(imm),
    .branch_taken_i(taken_in), .predict_addr_i(pred), .priv_i(priv),
    .res_valid_o(r[0].valid), .res_pc_o(r[0].pc), .res_target_o(r[0].target),
    .res_mispredict_o(r[0].mis), .res_cf_o(r[0].cf), .res_taken_o(r[0].taken),
    .link_addr_o(r[0].link));
  branch_unit #(.XLEN(XLEN), .CALL_RW_EN(0), .RAS_DEPTH(2)) dut_off (
    .valid_i(valid), .pc_i(pc), .cf_i(cf), .rvc_i(rvc), .operand_a_i(opa), .imm_i(imm),
    .branch_taken_i(taken_in), .predict_addr_i(pred), .priv_i(priv),
    .res_valid_o(r[1].valid), .res_pc_o(r[1].pc), .res_target_o(r[1].target),
    .res_mispredict_o(r[1].mis), .res_cf_o(r[1].cf), .res_taken_o(r[1].taken),
    .link_addr_o(r[1].link));
  branch_unit #(.XLEN(XLEN), .CALL_RW_EN(1), .RAS_DEPTH(0)) dut_noras (
    .valid_i(valid), .pc_i(pc), .cf_i(cf), .rvc_i(rvc), .operand_a_i(opa), .imm_i(imm),
    .branch_taken_i(taken_in), .predict_addr_i(pred), .priv_i(priv),
    .res_valid_o(r[2].valid), .res_pc_o(r[2].pc), .res_target_o(r[2].target),
    .res_mispredict_o(r[2].mis), .res_cf_o(r[2].cf), .res_taken_o(r[2].taken),
    .link_addr_o(r[2].link));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cf_t             classes[5];
    priv_t           privs[3];
    logic [XLEN-1:0] seq, tgt, exp_target;
    logic            exp_mis, en;
    classes = '{CF_NONE, CF_BRANCH, CF_JUMP, CF_JUMPR, CF_RETURN};
    privs   = '{PRIV_U, PRIV_S, PRIV_M};
    repeat (20000) begin
      @(negedge clk);
      valid    = ($urandom_range(0, 9) != 0);
      cf       = classes[$urandom_range(0, 4)];
      rvc      = $urandom_range(0, 1);
      pc       = {$urandom, $urandom} & ~64'd1;
      opa      = {$urandom, $urandom};
      imm      = 64'(signed'(12'($urandom)));
      taken_in = $urandom_range(0, 1);
      priv     = privs[$urandom_range(0, 2)];
      seq      = pc + (rvc ? 2 : 4);
      unique case (cf)
        CF_BRANCH:           tgt = taken_in ? pc + imm : seq;
        CF_JUMP:             tgt = pc + imm;
        CF_JUMPR, CF_RETURN: tgt = {opa[63:1] + imm[63:1] + 63'(opa[0] & imm[0]), 1'b0};
        default:             tgt = seq;
      endcase
      pred = ($urandom_range(0, 1) != 0) ? tgt : {$urandom, $urandom};
      #1;
      for (int k = 0; k < 3; k++) begin
        en = (k != 1) && (priv != PRIV_S);
        exp_mis = valid && cf != CF_NONE && tgt != pred;
        if (k == 2 && cf == CF_RETURN && en) exp_mis = valid;
        exp_target = (exp_mis && cf == CF_RETURN && en) ? tgt - 4 : tgt;
        checks++;
        if (r[k].valid !== (valid && cf != CF_NONE) || r[k].mis !== exp_mis ||
            r[k].target !== exp_target || r[k].link !== seq || r[k].pc !== pc ||
            r[k].cf !== cf || (cf == CF_BRANCH && r[k].taken !== taken_in)) begin
          failures++;
          $display("FAIL inst %0d cf=%s priv=%s: target=%h mis=%b, expected %h %b",
                   k, cf.name(), priv.name(), r[k].target, r[k].mis, exp_target, exp_mis);
        end
      end
      if (valid && cf == CF_RETURN) begin
        if (priv == PRIV_S) n_ret_s++;
        else if (tgt == pred) n_ret_ok++;
        else n_ret_rw++;
        if (priv != PRIV_S) n_ret_noras++;
      end
    end
    checks++;
    if (n_ret_ok == 0 || n_ret_rw == 0 || n_ret_s == 0 || n_ret_noras == 0) begin
      failures++;
      $display("FAIL a return case never occurred");
    end
    $display("returns: predicted %0d, rewound %0d, S-mode %0d, without stack %0d",
             n_ret_ok, n_ret_rw, n_ret_s, n_ret_noras);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
