// tb_callrw_bench - program runner and checker for callrw_top.
//
// Connects by name to the ports of one callrw_top instance and plays the
// rest of an in-order core around it: fetch entries wait LAT cycles
// (decode, issue) in a queue, then a reference interpreter executes them in
// order (addi, jal, jalr, beq, c.jr, c.jalr, c.nop), hands each control-flow
// instruction with its rs1 value to the branch unit, drops younger entries
// on a misprediction, takes the INVALID_RETURN_ADDRESS exception (cause 25)
// and resumes at a recovery address held in t6, as a trap handler would.
// Markers "addi x0, x0, 0x7F0..0x7F3" switch to S-, M- or U-mode or arm an
// interrupt that fires while the next rewind check is in progress.
//
// The program: a correctly predicted return; a four-deep call chain that
// overflows a two-entry stack; returns to a 32-bit call site and to a
// 16-bit c.jalr at ra - 2 (valid); returns after a 16-bit call at ra - 4
// and after an addi (invalid); the same invalid return in S-mode (never
// checked) and U-mode; an interrupt during a check (check repeated); a
// c.jalr call and a taken branch (plain misprediction). Every return site
// continues at t6, so the program also completes without the protection.
//
// Expected verdicts come from the bench's own reading of memory, for the
// build given by RAS_DEPTH and CALL_RW_EN. It checks every executed pc,
// every resolution, the exception record, the cycle at which fetch delivers
// a redirect target (one cycle after a plain misprediction, two after a
// checked return) and how often each mechanism happened. done_o rises with
// the totals when the program reaches its final self-loop.
module tb_callrw_bench
  import callrw_pkg::*;
  import tb_enc_pkg::*;
#(
  parameter int unsigned RAS_DEPTH  = 2,
  parameter bit          CALL_RW_EN = 1'b1
) (
  input  logic            clk_i,
  output logic            rst_ni,
  output logic [63:0]     boot_addr_i,
  output priv_t           priv_i,
  output logic            flush_i,
  output logic [63:0]     flush_pc_i,
  input  logic            imem_req_o,
  input  logic [63:0]     imem_addr_o,
  output logic [31:0]     imem_data_i,
  input  logic            fe_valid_o,
  output logic            fe_ready_i,
  input  logic [63:0]     fe_pc_o,
  input  logic [31:0]     fe_instr_o,
  input  logic            fe_rvc_o,
  input  cf_t             fe_cf_o,
  input  logic [63:0]     fe_predict_addr_o,
  input  logic            fe_ex_valid_o,
  input  logic [63:0]     fe_ex_cause_o,
  input  logic [63:0]     fe_ex_tval_o,
  output logic            bu_valid_i,
  output logic [63:0]     bu_pc_i,
  output cf_t             bu_cf_i,
  output logic            bu_rvc_i,
  output logic [63:0]     bu_operand_a_i,
  output logic [63:0]     bu_imm_i,
  output logic            bu_branch_taken_i,
  output logic [63:0]     bu_predict_addr_i,
  input  logic            res_valid_o,
  input  logic [63:0]     res_pc_o,
  input  logic [63:0]     res_target_o,
  input  logic            res_mispredict_o,
  input  cf_t             res_cf_o,
  input  logic            res_taken_o,
  input  logic [63:0]     bu_link_addr_o,
  input  logic            is_rewind_o,
  input  logic            ex_invalid_ra_o,
  input  logic            ras_overflow_o,
  output logic            done_o,
  output int              checks_o,
  output int              failures_o,
  output int              cycles_o
);
  localparam int unsigned XLEN = 64;
  localparam int          LAT  = 2;   // decode + issue cycles
  localparam int          QMAX = 3;
  localparam logic [XLEN-1:0] BOOT = 64'h100;
  localparam logic [4:0] RA = 5'd1, S0 = 5'd8, S1 = 5'd9, S2 = 5'd18, S7 = 5'd23, T6 = 5'd31;

  initial begin
    done_o = 0;
    rst_ni = 0;
  end
  assign boot_addr_i = BOOT;

  // ---------------------------------------------------------------- memory
  logic [15:0] mem [0:2047];
  assign imem_data_i = {mem[11'((imem_addr_o >> 1) + 1)], mem[11'(imem_addr_o >> 1)]};

  function automatic void put32(input int a, input logic [31:0] w);
    mem[a/2]     = w[15:0];
    mem[a/2 + 1] = w[31:16];
  endfunction
  function automatic void put16(input int a, input logic [15:0] h);
    mem[a/2] = h;
  endfunction
  function automatic logic [31:0] rd32(input logic [XLEN-1:0] a);
    return {mem[11'((a >> 1) + 1)], mem[11'(a >> 1)]};
  endfunction

  // Is the target ra preceded by a call? (testbench's own reading)
  function automatic logic lnk(input logic [4:0] r);
    return r == 5'd1 || r == 5'd5;
  endfunction
  function automatic int call_before(input logic [XLEN-1:0] ra);
    logic [31:0] w;
    logic [15:0] h;
    w = rd32(ra - 4);
    h = mem[11'((ra - 2) >> 1)];
    if (w[1:0] == 2'b11 && (w[6:0] == 7'h6F || (w[6:0] == 7'h67 && w[14:12] == 0)) &&
        lnk(w[11:7])) return 32;
    if (h[1:0] == 2'b10 && h[15:12] == 4'b1001 && h[6:2] == 0 && h[11:7] != 0) return 16;
    return 0;
  endfunction

  int a;   // emission cursor
  logic [XLEN-1:0] end_pc;

  function automatic void e32(input logic [31:0] w);
    put32(a, w);
    a += 4;
  endfunction
  function automatic void e16(input logic [15:0] h);
    put16(a, h);
    a += 2;
  endfunction
  // ra := site, t6 := address after the return, then return (jalr or c.jr)
  function automatic void ret_to(input int site, input logic compressed);
    e32(enc_addi(RA, 0, site));
    e32(enc_addi(T6, 0, a + 8));
    if (compressed) begin
      e16(enc_c_jr(RA));
      e16(C_NOP);
    end else e32(enc_jalr(0, RA, 0));
  endfunction

  task automatic load_program();
    for (int i = 0; i < 2048; i++) mem[i] = 16'h0001;  // c.nop filler
    a = int'(BOOT);
    e32(enc_jal(RA, 'h300 - a));          // predicted return
    e32(enc_jal(RA, 'h320 - a));          // four-deep chain, stack overflow
    ret_to('h444, 0);                     // 32-bit call at rwa: valid
    ret_to('h404, 1);                     // 16-bit call at rwa + 2: valid (c.jr ra)
    ret_to('h504, 0);                     // 16-bit call at rwa: invalid
    ret_to('h604, 0);                     // addi at rwa: invalid
    e32(enc_addi(0, 0, 'h7F0));           // S-mode: not checked
    ret_to('h604, 0);
    e32(enc_addi(0, 0, 'h7F1));           // M-mode
    e32(enc_addi(0, 0, 'h7F3));           // interrupt during the next check
    ret_to('h404, 0);
    e32(enc_addi(0, 0, 'h7F2));           // U-mode: invalid return
    ret_to('h504, 0);
    e32(enc_addi(0, 0, 'h7F1));
    e32(enc_addi(S7, 0, 'h380));          // compressed call
    e16(enc_c_jalr(S7));
    e16(C_NOP);
    e32(enc_beq(0, 0, 8));                // taken branch, predicted not taken
    e32(enc_jal(0, 0));
    end_pc = XLEN'(a);
    e32(enc_jal(0, 0));
    // callees: leaf, and a chain f1 -> f2 -> f3 -> f4 saving ra in s0..s2
    put32('h300, enc_jalr(0, RA, 0));
    put32('h320, enc_addi(S0, RA, 0));
    put32('h324, enc_jal(RA, 'h340 - 'h324));
    put32('h328, enc_addi(RA, S0, 0));
    put32('h32C, enc_jalr(0, RA, 0));
    put32('h340, enc_addi(S1, RA, 0));
    put32('h344, enc_jal(RA, 'h360 - 'h344));
    put32('h348, enc_addi(RA, S1, 0));
    put32('h34C, enc_jalr(0, RA, 0));
    put32('h360, enc_addi(S2, RA, 0));
    put32('h364, enc_jal(RA, 'h380 - 'h364));
    put32('h368, enc_addi(RA, S2, 0));
    put32('h36C, enc_jalr(0, RA, 0));
    put32('h380, enc_jalr(0, RA, 0));
    // return sites; each continues at the address held in t6
    put16('h400, 16'h9112);  put16('h402, 16'h9B82);   // c.add sp,tp ; c.jalr s7
    put32('h404, enc_jalr(0, T6, 0));
    put32('h440, 32'h72C010EF);                        // jal ra
    put32('h444, enc_jalr(0, T6, 0));
    put16('h500, 16'h9A02);  put16('h502, 16'h670D);   // c.jalr s4 ; c.lui a4,0x3
    put32('h504, enc_jalr(0, T6, 0));
    put32('h600, 32'h00268793);                        // addi a5,a3,2
    put32('h604, enc_jalr(0, T6, 0));
  endtask

  // ------------------------------------------------------------ core model
  typedef struct {
    logic [XLEN-1:0] pc, pred, cause, tval;
    logic [31:0]     instr;
    logic            rvc, ex;
    cf_t             cf;
    int              age;
  } entry_t;
  entry_t q[$];

  logic [XLEN-1:0] regs [32];
  logic [XLEN-1:0] exp_pc;
  int checks = 0, failures = 0, cyc = 0;
  int n_ras_hit = 0, n_ovf = 0, n_rw32 = 0, n_rw16 = 0, n_exc = 0, n_exc_u = 0;
  int n_smode = 0, n_irq = 0, n_plain = 0, n_timing = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask


  always @(posedge clk_i) if (rst_ni && ras_overflow_o) n_ovf++;

  initial begin
    entry_t e;
    logic            done, pending_flush, irq_armed, exp_exc, exec_cf;
    logic [XLEN-1:0] pending_pc, last_ret_pc, exc_ra, exc_pc, nxt, seq, opa, imm, ra_t;
    logic [XLEN-1:0] want_pc;
    int              want_cyc, exc_cyc;
    logic [4:0]      rd, rs1, rs2;
    logic [6:0]      op;
    logic            taken, mis, rwd, act;
    cf_t             cf;
    int              kind;

    load_program();
    foreach (regs[i]) regs[i] = '0;
    priv_i = PRIV_M; flush_i = 0; flush_pc_i = '0; fe_ready_i = 0;
    bu_valid_i = 0; bu_pc_i = '0; bu_cf_i = CF_NONE; bu_rvc_i = 0; bu_operand_a_i = '0; bu_imm_i = '0;
    bu_branch_taken_i = 0; bu_predict_addr_i = '0;
    done = 0; pending_flush = 0; irq_armed = 0; exp_exc = 0;
    exp_pc = BOOT; want_cyc = -1; exc_cyc = -1; last_ret_pc = '0;
    exc_ra = '0; exc_pc = '0; pending_pc = '0; want_pc = '0;
    repeat (3) @(posedge clk_i);
    rst_ni = 1;

    while (!done) begin
      @(negedge clk_i);
      bu_valid_i = 0; flush_i = 0; exec_cf = 0;
      nxt = '0; cf = CF_NONE;
      if (pending_flush) begin
        // trap handler entry: resume at the recovery address
        flush_i = 1; flush_pc_i = pending_pc; exp_pc = pending_pc;
        pending_flush = 0; q.delete();
      end else if (irq_armed && is_rewind_o) begin
        // interrupt while the check is in progress: restart at the return
        flush_i = 1; flush_pc_i = last_ret_pc; exp_pc = last_ret_pc;
        irq_armed = 0; q.delete(); want_cyc = -1; n_irq++;
      end else if (q.size() != 0 && q[0].age >= LAT) begin
        e = q.pop_front();
        if (e.ex) begin
          check("exception expected", exp_exc);
          check("exception cycle", cyc >= exc_cyc);
          check("exception record", e.cause == 25 && e.tval == exc_ra && e.pc == exc_pc);
          if (priv_i == PRIV_U) n_exc_u++;
          n_exc++;
          exp_exc = 0; pending_flush = 1; pending_pc = regs[T6]; q.delete();
        end else begin
          check($sformatf("pc %h expected %h", e.pc, exp_pc), e.pc == exp_pc && !exp_exc);
          if (e.pc == end_pc) done = 1;
          op = e.instr[6:0]; rd = e.instr[11:7]; rs1 = e.instr[19:15]; rs2 = e.instr[24:20];
          seq = e.pc + (e.instr[1:0] == 2'b11 ? 4 : 2);
          nxt = seq; imm = '0; opa = '0; taken = 0;
          if (e.instr[1:0] == 2'b11) begin
            unique case (op)
              7'h13: begin
                imm = 64'(signed'(e.instr[31:20]));
                if (rd == 0 && rs1 == 0) begin
                  if (imm == 'h7F0) priv_i = PRIV_S;
                  if (imm == 'h7F1) priv_i = PRIV_M;
                  if (imm == 'h7F2) priv_i = PRIV_U;
                  if (imm == 'h7F3) irq_armed = 1;
                end else if (rd != 0) regs[rd] = regs[rs1] + imm;
              end
              7'h6F: begin
                cf = CF_JUMP;
                imm = 64'(signed'({e.instr[31], e.instr[19:12], e.instr[20], e.instr[30:21], 1'b0}));
                nxt = e.pc + imm;
                if (rd != 0) regs[rd] = seq;
              end
              7'h67: begin
                imm = 64'(signed'(e.instr[31:20]));
                opa = regs[rs1];
                cf = (lnk(rs1) && !(lnk(rd) && rd == rs1)) ? CF_RETURN : CF_JUMPR;
                nxt = (opa + imm) & ~64'd1;
                if (rd != 0) regs[rd] = seq;
              end
              7'h63: begin
                cf = CF_BRANCH;
                imm = 64'(signed'({e.instr[31], e.instr[7], e.instr[30:25], e.instr[11:8], 1'b0}));
                taken = regs[rs1] == regs[rs2];
                nxt = taken ? e.pc + imm : seq;
              end
              default: check($sformatf("known instruction %h", e.instr), 0);
            endcase
          end else if (e.instr[15:0] == C_NOP) begin
            // nothing
          end else if (e.instr[1:0] == 2'b10 && e.instr[15:13] == 3'b100 &&
                       e.instr[6:2] == 0 && e.instr[11:7] != 0) begin
            rs1 = e.instr[11:7];
            opa = regs[rs1];
            nxt = opa & ~64'd1;
            if (e.instr[12]) begin
              cf = (rs1 == 5'd5) ? CF_RETURN : CF_JUMPR;
              regs[RA] = seq;
            end else cf = lnk(rs1) ? CF_RETURN : CF_JUMPR;
          end else check($sformatf("known instruction %h", e.instr[15:0]), 0);
          check("scan class", e.cf == cf);
          if (cf != CF_NONE) begin
            exec_cf  = 1;
            bu_valid_i = 1; bu_pc_i = e.pc; bu_cf_i = e.cf; bu_rvc_i = e.rvc; bu_operand_a_i = opa;
            bu_imm_i = imm; bu_branch_taken_i = taken; bu_predict_addr_i = e.pred;
          end
          exp_pc = nxt;
        end
      end
      for (int i = 0; i < q.size(); i++) q[i].age++;
      fe_ready_i = (q.size() < QMAX) && !flush_i;
      #1;
      // ---- resolution checks
      if (exec_cf) begin
        act = CALL_RW_EN && priv_i != PRIV_S;
        mis = (nxt != e.pred) || (RAS_DEPTH == 0 && cf == CF_RETURN && act);
        rwd = mis && cf == CF_RETURN && act;
        check("resolution record", res_pc_o == e.pc && res_cf_o == cf &&
              (cf != CF_BRANCH || res_taken_o == taken));
        check("resolution", res_valid_o && res_mispredict_o == mis &&
              res_target_o == (rwd ? nxt - 4 : nxt) && bu_link_addr_o == e.pc + (e.rvc ? 2 : 4));
        if (mis) begin
          check("entry killed on redirect", !fe_valid_o);
          q.delete();
        end
        if (cf == CF_RETURN) last_ret_pc = e.pc;
        if (rwd) begin
          kind = call_before(nxt);
          if (kind == 32) n_rw32++;
          if (kind == 16) n_rw16++;
          if (kind != 0) begin want_pc = nxt; want_cyc = cyc + 2; end
          else begin exp_exc = 1; exc_ra = nxt; exc_pc = e.pc; exc_cyc = cyc + 2; end
        end else if (mis) begin
          if (cf == CF_RETURN) n_smode++; else n_plain++;
          want_pc = nxt; want_cyc = cyc + 1;
        end else if (cf == CF_RETURN) n_ras_hit++;
      end
      // ---- fetch timing after a redirect
      if (cyc == want_cyc) begin
        check($sformatf("target %h fetched on time", want_pc),
              fe_valid_o && !fe_ex_valid_o && fe_pc_o == want_pc);
        n_timing++;
        want_cyc = -1;
      end
      if (cyc == exc_cyc) check("exception entry on time", fe_valid_o && fe_ex_valid_o);
      if (cyc == exc_cyc - 1) check("rewind discards rwa", is_rewind_o && !fe_valid_o);
      if (fe_valid_o) check("fetch status", ex_invalid_ra_o == fe_ex_valid_o &&
                             imem_req_o == !fe_ex_valid_o);
      // ---- accept the fetch entry
      if (fe_valid_o && fe_ready_i)
        q.push_back('{pc: fe_pc_o, pred: fe_predict_addr_o, cause: fe_ex_cause_o, tval: fe_ex_tval_o,
                      instr: fe_instr_o, rvc: fe_rvc_o, ex: fe_ex_valid_o, cf: fe_cf_o, age: 0});
      @(posedge clk_i);
      cyc++;
    end

    check("correctly predicted return", (n_ras_hit > 0) == (RAS_DEPTH > 0));
    check("stack overflow", (n_ovf > 0) == (RAS_DEPTH > 0));
    check("valid return after 32-bit call", (n_rw32 > 0) == CALL_RW_EN);
    check("valid return after 16-bit call", (n_rw16 > 0) == CALL_RW_EN);
    check("invalid return exceptions", n_exc == (CALL_RW_EN ? 3 : 0) && n_exc_u == int'(CALL_RW_EN));
    check("S-mode return not checked", n_smode > 0);
    check("interrupt during check", n_irq == int'(CALL_RW_EN));
    check("plain misprediction", n_plain > 0);
    $display("[RAS_DEPTH=%0d CALL_RW_EN=%0d] predicted returns %0d, overflows %0d,",
             RAS_DEPTH, CALL_RW_EN, n_ras_hit, n_ovf);
    $display("  checked valid 32-bit %0d / 16-bit %0d, exceptions %0d (U-mode %0d),",
             n_rw32, n_rw16, n_exc, n_exc_u);
    $display("  unchecked mispredicted returns %0d, interrupted checks %0d,", n_smode, n_irq);
    $display("  plain mispredictions %0d, timed redirects %0d, cycles %0d",
             n_plain, n_timing, cyc);
    done_o     = 1;
  end
  assign checks_o   = checks;
  assign failures_o = failures;
  assign cycles_o   = cyc;

endmodule
