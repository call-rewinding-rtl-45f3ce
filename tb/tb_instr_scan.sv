// tb_instr_scan - self-checking test of the instruction scanner.
//
// Applies the four fetch chunks of the rewinding scenarios (32-bit call at
// rwa, 16-bit call at rwa + 2, 16-bit call at rwa, non-call at rwa), every
// rd/rs1 hint combination of jalr, c.jr and c.jalr, and random jal, jalr,
// branch, c.j and c.beqz encodings built with tb_enc_pkg. The expected
// class, stack action and offset come from a reference written here from
// the RISC-V rules. Purely combinational; a watchdog bounds the run.
module tb_instr_scan;
  import callrw_pkg::*;
  import tb_enc_pkg::*;

  logic [31:0] data;
  scan_t       scan;
  int          checks = 0, failures = 0;
  logic        clk = 0;

  instr_scan #(.XLEN(64)) dut (.data_i(data), .scan_o(scan));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_scan(input string what, input logic rvc, input cf_t cf,
                             input logic push, input logic pop, input logic [31:0] imm,
                             input logic check_imm);
    #1;
    checks++;
    if (scan.rvc !== rvc || scan.cf !== cf || scan.ras_push !== push ||
        scan.ras_pop !== pop || (check_imm && scan.imm !== imm)) begin
      failures++;
      $display("FAIL %s data=%h: rvc=%b cf=%s push=%b pop=%b imm=%h, expected %b %s %b %b %h",
               what, data, scan.rvc, scan.cf.name(), scan.ras_push, scan.ras_pop, scan.imm,
               rvc, cf.name(), push, pop, imm);
    end
  endtask

  task automatic expect_rw(input string what, input logic c32, input logic lo_c,
                           input logic hi_c);
    #1;
    checks++;
    if (scan.lo_call32 !== c32 || scan.lo_ccall !== lo_c || scan.hi_ccall !== hi_c) begin
      failures++;
      $display("FAIL %s data=%h: call32=%b lo_ccall=%b hi_ccall=%b, expected %b %b %b",
               what, data, scan.lo_call32, scan.lo_ccall, scan.hi_ccall, c32, lo_c, hi_c);
    end
  endtask

  function automatic logic lnk(input logic [4:0] r);
    return r == 5'd1 || r == 5'd5;
  endfunction

  // Return-address-stack hints of jalr: {push, pop}
  function automatic logic [1:0] jalr_hint(input logic [4:0] rd, input logic [4:0] rs1);
    if (!lnk(rd) && !lnk(rs1)) return 2'b00;
    if (!lnk(rd) &&  lnk(rs1)) return 2'b01;
    if ( lnk(rd) && !lnk(rs1)) return 2'b10;
    if (rd != rs1)             return 2'b11;
    return 2'b10;
  endfunction

  initial begin
    logic [4:0] regs[6];
    logic [1:0] h;
    int off;
    regs = '{5'd0, 5'd1, 5'd5, 5'd6, 5'd8, 5'd23};

    // rewinding scenarios: halfword at rwa in bits 15:0, at rwa+2 in 31:16
    data = 32'h72C010EF;  // jal ra (32-bit call at rwa)
    expect_rw("case a", 1, 0, 0);
    expect_scan("case a", 0, CF_JUMP, 1, 0, 32'd5932, 1);
    data = {16'h9B82, 16'h9112};  // c.add sp,tp ; c.jalr s7
    expect_rw("case b", 0, 0, 1);
    expect_scan("case b", 1, CF_NONE, 0, 0, 0, 0);
    data = {16'h670D, 16'h9A02};  // c.jalr s4 ; c.lui a4,0x3
    expect_rw("case c", 0, 1, 0);
    expect_scan("case c", 1, CF_JUMPR, 1, 0, 0, 0);
    data = 32'h00268793;  // addi a5,a3,2
    expect_rw("case d", 0, 0, 0);
    expect_scan("case d", 0, CF_NONE, 0, 0, 0, 0);

    // every jalr / c.jr / c.jalr hint combination
    foreach (regs[i]) foreach (regs[j]) begin
      h = jalr_hint(regs[i], regs[j]);
      data = enc_jalr(regs[i], regs[j], 12);
      expect_scan("jalr", 0, h[0] ? CF_RETURN : CF_JUMPR, h[1], h[0], 32'd12, 1);
      expect_rw("jalr", lnk(regs[i]), 0, 0);
    end
    foreach (regs[j]) if (regs[j] != 0) begin
      data = {16'h0001, enc_c_jr(regs[j])};
      h = jalr_hint(5'd0, regs[j]);
      expect_scan("c.jr", 1, h[0] ? CF_RETURN : CF_JUMPR, h[1], h[0], 0, 0);
      data = {enc_c_jalr(regs[j]), enc_c_jalr(regs[j])};
      h = jalr_hint(5'd1, regs[j]);
      expect_scan("c.jalr", 1, h[0] ? CF_RETURN : CF_JUMPR, h[1], h[0], 0, 0);
      expect_rw("c.jalr pair", 0, 1, 1);
    end
    data = {16'h0001, 16'h2085};  // c.addiw ra,1 on RV64 (c.jal on RV32)
    expect_scan("c.addiw", 1, CF_NONE, 0, 0, 0, 0);
    expect_rw("c.addiw", 0, 0, 0);

    // random direct offsets
    repeat (2000) begin
      off = int'($urandom_range(0, 32'h1FFFFF)) - 32'h100000;
      off = off & ~1;
      data = enc_jal(regs[$urandom_range(0, 5)], off);
      expect_scan("jal", 0, CF_JUMP, lnk(data[11:7]), 0, 32'(off), 1);
      off = (int'($urandom_range(0, 8191)) - 4096) & ~1;
      data = enc_beq(5'($urandom), 5'($urandom), off);
      expect_scan("beq", 0, CF_BRANCH, 0, 0, 32'(off), 1);
      off = (int'($urandom_range(0, 4095)) - 2048) & ~1;
      data = {16'($urandom), enc_c_j(off)};
      expect_scan("c.j", 1, CF_JUMP, 0, 0, 32'(off), 1);
      off = (int'($urandom_range(0, 511)) - 256) & ~1;
      data = {16'($urandom), enc_c_beqz(3'($urandom), off)};
      expect_scan("c.beqz", 1, CF_BRANCH, 0, 0, 32'(off), 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
