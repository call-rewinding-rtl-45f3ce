// tb_enc_pkg - RISC-V instruction encoders for the testbenches.
//
// Builds the machine words the testbenches place in instruction memory or
// feed to the scanner, straight from the RISC-V base and compressed
// instruction formats, so expected values never come from the design.
package tb_enc_pkg;

  function automatic logic [31:0] enc_jal(input logic [4:0] rd, input int off);
    logic [20:0] i;
    i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] enc_jalr(input logic [4:0] rd, input logic [4:0] rs1,
                                           input int off);
    logic [11:0] i;
    i = 12'(off);
    return {i, rs1, 3'b000, rd, 7'b1100111};
  endfunction

  function automatic logic [31:0] enc_addi(input logic [4:0] rd, input logic [4:0] rs1,
                                           input int imm);
    logic [11:0] i;
    i = 12'(imm);
    return {i, rs1, 3'b000, rd, 7'b0010011};
  endfunction

  function automatic logic [31:0] enc_beq(input logic [4:0] rs1, input logic [4:0] rs2,
                                          input int off);
    logic [12:0] i;
    i = 13'(off);
    return {i[12], i[10:5], rs2, rs1, 3'b000, i[4:1], i[11], 7'b1100011};
  endfunction

  function automatic logic [15:0] enc_c_jr(input logic [4:0] rs1);
    return {3'b100, 1'b0, rs1, 5'd0, 2'b10};
  endfunction

  function automatic logic [15:0] enc_c_jalr(input logic [4:0] rs1);
    return {3'b100, 1'b1, rs1, 5'd0, 2'b10};
  endfunction

  function automatic logic [15:0] enc_c_j(input int off);
    logic [11:0] i;
    i = 12'(off);
    return {3'b101, i[11], i[4], i[9:8], i[10], i[6], i[7], i[3:1], i[5], 2'b01};
  endfunction

  function automatic logic [15:0] enc_c_beqz(input logic [2:0] rs1p, input int off);
    logic [8:0] i;
    i = 9'(off);
    return {3'b110, i[8], i[4:3], rs1p, i[7:6], i[2:1], i[5], 2'b01};
  endfunction

  localparam logic [15:0] C_NOP = 16'h0001;

endpackage
