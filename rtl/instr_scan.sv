// instr_scan - predecoder of the fetch stage.
//
// Looks at 32 bits fetched from a halfword-aligned address and reports,
// without a clock, what the instruction at offset 0 is as far as control
// flow is concerned: its width (16 or 32 bits), its class (branch, direct
// jump, indirect jump, return), its direct offset, and whether it pushes or
// pops the return address stack. Pushes and pops follow the RISC-V link
// hints: jal pushes when rd is a link register (ra or t0); jalr and c.jr /
// c.jalr follow the rd/rs1 table (pop when only rs1 is a link, push when
// only rd is, pop-then-push when both are links and differ, push when they
// are the same link).
//
// For call rewinding the same scan also reports the three facts the rewind
// check needs about the chunk fetched at the rewinded address rwa: a 32-bit
// call starts at rwa, a 16-bit call sits at rwa, or a 16-bit call sits at
// rwa+2. Deciding what these mean is left to the rewind module.
//
// The document gives the purpose (classify call/ret from the encoded
// hints); the decoding itself is written from the RISC-V encodings. With
// XLEN = 64 the c.jal encoding is c.addiw and is not treated as a call.
module instr_scan
  import callrw_pkg::*;
#(
  parameter int unsigned XLEN = 64
) (
  input  logic [31:0] data_i,   // bits at offsets 0..3 of the scanned address
  output scan_t       scan_o
);

  logic [15:0] lo, hi;
  logic [6:0]  opcode;
  logic [4:0]  rd, rs1, c_rs1, c_rs2;
  logic [2:0]  c_f3;

  assign lo     = data_i[15:0];
  assign hi     = data_i[31:16];
  assign opcode = data_i[6:0];
  assign rd     = data_i[11:7];
  assign rs1    = data_i[19:15];
  assign c_f3   = lo[15:13];
  assign c_rs1  = lo[11:7];
  assign c_rs2  = lo[6:2];

  always_comb begin
    scan_o           = '0;
    scan_o.cf        = CF_NONE;
    scan_o.rvc       = (lo[1:0] != 2'b11);
    scan_o.lo_call32 = !scan_o.rvc && is_call32(data_i);
    scan_o.lo_ccall  = is_ccall(lo, XLEN);
    scan_o.hi_ccall  = is_ccall(hi, XLEN);

    if (!scan_o.rvc) begin
      unique case (opcode)
        7'b1101111: begin  // jal
          scan_o.cf       = CF_JUMP;
          scan_o.imm      = {{12{data_i[31]}}, data_i[19:12], data_i[20], data_i[30:21], 1'b0};
          scan_o.ras_push = is_link(rd);
        end
        7'b1100111: begin  // jalr
          if (data_i[14:12] == 3'b000) begin
            scan_o.imm      = {{20{data_i[31]}}, data_i[31:20]};
            scan_o.ras_push = is_link(rd);
            scan_o.ras_pop  = is_link(rs1) && !(is_link(rd) && rd == rs1);
            scan_o.cf       = scan_o.ras_pop ? CF_RETURN : CF_JUMPR;
          end
        end
        7'b1100011: begin  // conditional branches
          scan_o.cf  = CF_BRANCH;
          scan_o.imm = {{20{data_i[31]}}, data_i[7], data_i[30:25], data_i[11:8], 1'b0};
        end
        default: ;
      endcase
    end else begin
      unique case ({lo[1:0], c_f3})
        5'b01_101: begin  // c.j
          scan_o.cf  = CF_JUMP;
          scan_o.imm = {{21{lo[12]}}, lo[8], lo[10:9], lo[6], lo[7], lo[2], lo[11], lo[5:3], 1'b0};
        end
        5'b01_001: begin  // c.jal on RV32, c.addiw on RV64
          if (XLEN == 32) begin
            scan_o.cf       = CF_JUMP;
            scan_o.imm      = {{21{lo[12]}}, lo[8], lo[10:9], lo[6], lo[7], lo[2], lo[11], lo[5:3], 1'b0};
            scan_o.ras_push = 1'b1;
          end
        end
        5'b01_110, 5'b01_111: begin  // c.beqz, c.bnez
          scan_o.cf  = CF_BRANCH;
          scan_o.imm = {{24{lo[12]}}, lo[6:5], lo[2], lo[11:10], lo[4:3], 1'b0};
        end
        5'b10_100: begin  // c.jr (rd = x0) and c.jalr (rd = ra)
          if (c_rs2 == 5'd0 && c_rs1 != 5'd0) begin
            scan_o.ras_push = lo[12];
            scan_o.ras_pop  = is_link(c_rs1) && !(lo[12] && c_rs1 == 5'd1);
            scan_o.cf       = scan_o.ras_pop ? CF_RETURN : CF_JUMPR;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
