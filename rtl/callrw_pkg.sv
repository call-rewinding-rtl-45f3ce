// callrw_pkg - types and helper functions shared by the call-rewinding
// fetch stage and branch unit.
//
// Holds the control-flow classes produced by instruction scanning, the
// privilege encoding that gates the protection, the scan result record,
// the fetch entry handed to decode, the resolved-branch record sent from
// the branch unit back to fetch, and the INVALID_RETURN_ADDRESS exception
// cause (25). The link-register test (x1 = ra or x5 = t0) and the call
// predicates follow the RISC-V return-address-stack hints; the record
// layouts are this design's own.
package callrw_pkg;

  // Exception cause raised when a return target is not preceded by a call.
  localparam int unsigned EXC_INVALID_RA = 25;

  // Control-flow class of a scanned instruction.
  typedef enum logic [2:0] {
    CF_NONE   = 3'd0,  // not a control-flow instruction
    CF_BRANCH = 3'd1,  // conditional branch
    CF_JUMP   = 3'd2,  // direct jump (jal, c.j, c.jal)
    CF_JUMPR  = 3'd3,  // indirect jump that is not a return
    CF_RETURN = 3'd4   // indirect jump that pops the return address stack
  } cf_t;

  // RISC-V privilege levels (mstatus.MPP encoding).
  typedef enum logic [1:0] {
    PRIV_U = 2'b00,
    PRIV_S = 2'b01,
    PRIV_M = 2'b11
  } priv_t;

  // What instruction scanning reports about a 32-bit fetch chunk.
  typedef struct packed {
    logic        rvc;         // instruction at offset 0 is 16 bits wide
    cf_t         cf;          // its control-flow class
    logic        ras_push;    // it pushes the return address stack (a call)
    logic        ras_pop;     // it pops the return address stack (a return)
    logic [31:0] imm;         // sign-extended offset of a direct jump or branch
    logic        lo_call32;   // a 32-bit call starts at offset 0
    logic        lo_ccall;    // a 16-bit call sits at offset 0
    logic        hi_ccall;    // a 16-bit call sits at offset 2
  } scan_t;

  // Register x1 (ra) or x5 (t0): a link register.
  function automatic logic is_link(input logic [4:0] r);
    return (r == 5'd1) || (r == 5'd5);
  endfunction

  // A 32-bit jal or jalr whose destination is a link register.
  function automatic logic is_call32(input logic [31:0] w);
    logic jal_op, jalr_op;
    jal_op  = (w[6:0] == 7'b1101111);
    jalr_op = (w[6:0] == 7'b1100111) && (w[14:12] == 3'b000);
    return (jal_op || jalr_op) && is_link(w[11:7]);
  endfunction

  // A 16-bit call: c.jalr (any XLEN) or c.jal (RV32 only; on RV64 the same
  // encoding is c.addiw).
  function automatic logic is_ccall(input logic [15:0] h, input int unsigned xlen);
    logic c_jalr, c_jal;
    c_jalr = (h[1:0] == 2'b10) && (h[15:13] == 3'b100) && h[12] &&
             (h[6:2] == 5'd0) && (h[11:7] != 5'd0);
    c_jal  = (xlen == 32) && (h[1:0] == 2'b01) && (h[15:13] == 3'b001);
    return c_jalr || c_jal;
  endfunction

  // Call rewinding is active when built in and the hart is not in S-mode.
  function automatic logic rewind_active(input logic en, input priv_t priv);
    return en && (priv != PRIV_S);
  endfunction

endpackage
