// tb_ras - self-checking test of the return address stack.
//
// Drives random pushes, pops and pop-then-push operations into a two-entry
// stack and compares the top entry, its valid flag and the overflow flag
// every cycle with a queue-based reference that keeps the newest DEPTH
// entries. A second instance with no stack must predict address 0, never
// valid. A watchdog bounds the run.
module tb_ras;
  localparam int unsigned DEPTH = 2;
  localparam int unsigned XLEN  = 64;

  logic            clk = 0, rst_n = 0;
  logic            push, pop;
  logic [XLEN-1:0] din, top, top0;
  logic            top_valid, top_valid0, ovf, ovf0;
  int              checks = 0, failures = 0;
  int              n_ovf = 0, n_empty_pop = 0;
  logic [XLEN-1:0] model[$];

  ras #(.DEPTH(DEPTH), .XLEN(XLEN)) dut (
    .clk_i(clk), .rst_ni(rst_n), .push_i(push), .pop_i(pop), .data_i(din),
    .top_o(top), .top_valid_o(top_valid), .overflow_o(ovf));

  ras #(.DEPTH(0), .XLEN(XLEN)) dut_none (
    .clk_i(clk), .rst_ni(rst_n), .push_i(push), .pop_i(pop), .data_i(din),
    .top_o(top0), .top_valid_o(top_valid0), .overflow_o(ovf0));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_ovf;
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20000) begin
      @(negedge clk);
      push = ($urandom_range(0, 2) != 0) ? $urandom_range(0, 1) : 0;
      pop  = $urandom_range(0, 1);
      din  = {$urandom, $urandom};
      #1;
      // compare before the edge
      checks++;
      if (top_valid !== (model.size() != 0) ||
          (model.size() != 0 && top !== model[0])) begin
        failures++;
        $display("FAIL top=%h valid=%b model size=%0d top=%h", top, top_valid,
                 model.size(), model.size() ? model[0] : 0);
      end
      exp_ovf = push && !pop && model.size() == DEPTH;
      checks++;
      if (ovf !== exp_ovf) begin
        failures++;
        $display("FAIL overflow=%b expected %b", ovf, exp_ovf);
      end
      checks++;
      if (top0 !== '0 || top_valid0 !== 1'b0 || ovf0 !== 1'b0) begin
        failures++;
        $display("FAIL absent stack predicts %h valid %b", top0, top_valid0);
      end
      // reference update
      if (push && pop) begin
        if (model.size() != 0) void'(model.pop_front());
        model.push_front(din);
      end else if (push) begin
        model.push_front(din);
        if (model.size() > DEPTH) begin
          void'(model.pop_back());
          n_ovf++;
        end
      end else if (pop) begin
        if (model.size() != 0) void'(model.pop_front());
        else n_empty_pop++;
      end
      @(posedge clk);
    end
    checks++;
    if (n_ovf == 0 || n_empty_pop == 0) begin
      failures++;
      $display("FAIL overflow (%0d) or empty pop (%0d) never happened", n_ovf, n_empty_pop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
