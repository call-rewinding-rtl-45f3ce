// rewind - the call-rewinding check in the fetch stage.
//
// When the branch unit reports a mispredicted return while rewinding is
// active (start_i), it sends rwa = ra - 4 as the redirect address. This
// module registers rwa and the return's pc and steps through three cycles:
//   t0  start_i: the return resolves, fetch is redirected to rwa;
//   t1  CHECK:   the chunk fetched at rwa is scanned (scan_i), is_rewind_o
//                tells fetch to discard it, and the verdict is taken;
//   t2  fetch resumes at ra (resume_o was given in t1), or the
//       INVALID_RETURN_ADDRESS exception is presented (EXC) until taken.
// Compared with a plain misprediction the check costs one cycle.
//
// Verdict: the target is valid when a 32-bit call starts at rwa, or, with
// compressed instructions (RVC), when a 16-bit call sits at rwa + 2. A
// 16-bit call at rwa with no call at rwa + 2 is invalid: a return can never
// land four bytes after a 16-bit call. Since the size of the original call
// is unknown, rwa is always ra - 4 and both positions are examined.
//
// flush_i (an exception or interrupt taken by the core) abandons a check in
// progress; execution restarts at the return, so the check is repeated.
// The check sequence, the validity rules, cause 25, the flush rule and the
// one-cycle cost follow the document. Reporting the return's pc as the
// exception pc and ra as its tval, and holding the exception until it is
// accepted, are this design's choices.
module rewind
  import callrw_pkg::*;
#(
  parameter int unsigned XLEN = 64,
  parameter bit          RVC  = 1'b1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            flush_i,      // trap taken: abandon the check
  input  logic            start_i,      // mispredicted return with rewinding active
  input  logic [XLEN-1:0] rwa_i,        // ra - 4, from the branch unit
  input  logic [XLEN-1:0] ret_pc_i,     // pc of the return instruction
  input  scan_t           scan_i,       // scan of the chunk fetched at rwa
  input  logic            ex_ack_i,     // the exception was handed to decode
  output logic            is_rewind_o,  // fetch is at rwa: discard what it reads
  output logic            resume_o,     // the target is valid: fetch ra next
  output logic [XLEN-1:0] ra_o,         // the checked return address
  output logic            ex_invalid_ra_o,
  output logic [XLEN-1:0] ex_pc_o,
  output logic [XLEN-1:0] ex_tval_o
);

  typedef enum logic [1:0] {IDLE, CHECK, EXC} state_t;

  state_t          state_q;
  logic [XLEN-1:0] rwa_q, ret_pc_q;
  logic            valid_call;

  assign valid_call      = scan_i.lo_call32 || (RVC && scan_i.hi_ccall);
  assign is_rewind_o     = (state_q == CHECK);
  assign resume_o        = (state_q == CHECK) && valid_call && !flush_i;
  assign ra_o            = rwa_q + XLEN'(4);
  assign ex_invalid_ra_o = (state_q == EXC);
  assign ex_pc_o         = ret_pc_q;
  assign ex_tval_o       = ra_o;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q  <= IDLE;
      rwa_q    <= '0;
      ret_pc_q <= '0;
    end else if (flush_i) begin
      state_q <= IDLE;
    end else begin
      unique case (state_q)
        IDLE: if (start_i) begin
          state_q  <= CHECK;
          rwa_q    <= rwa_i;
          ret_pc_q <= ret_pc_i;
        end
        CHECK:   state_q <= valid_call ? IDLE : EXC;
        EXC:     if (ex_ack_i) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  // A return cannot resolve while an older return is still being checked.
  a_no_overlap : assert property (@(posedge clk_i) disable iff (!rst_ni)
    start_i |-> (state_q == IDLE));

endmodule
