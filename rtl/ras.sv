// ras - return address stack of the fetch stage.
//
// A small hardware stack holding the link addresses of the calls the fetch
// stage has seen. A call pushes its link address (the address of the
// instruction after it); a return pops the top entry, which is the
// predicted return address. A call that is also a return (pop then push,
// used for coroutines) replaces the top entry. When the stack is full a
// push drops the oldest entry (overflow_o pulses): deep call chains and
// recursion therefore leave later returns without a prediction, which the
// branch unit then finds mispredicted.
//
// Interface: push_i/pop_i/data_i are sampled on the rising clock edge;
// top_o/top_valid_o show the current top entry combinationally (the
// prediction for a return being scanned this cycle). With DEPTH = 0 the
// stack is absent and the prediction is hardwired to address 0 and
// invalid, so every return is mispredicted. Reset empties the stack.
// The stack is not flushed on mispredictions, traps or context switches:
// a stale entry only costs a misprediction. The depth default of 2 is the host core's default configuration; the
// shift-register organisation is this design's own.
module ras #(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned XLEN  = 64
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            push_i,
  input  logic            pop_i,
  input  logic [XLEN-1:0] data_i,       // link address to push
  output logic [XLEN-1:0] top_o,        // predicted return address
  output logic            top_valid_o,
  output logic            overflow_o    // a push dropped the oldest entry
);

  if (DEPTH == 0) begin : g_none
    assign top_o       = '0;
    assign top_valid_o = 1'b0;
    assign overflow_o  = 1'b0;
  end else begin : g_stack
    logic [XLEN-1:0] addr_q  [DEPTH];
    logic            valid_q [DEPTH];

    assign top_o       = addr_q[0];
    assign top_valid_o = valid_q[0];
    assign overflow_o  = push_i && !pop_i && valid_q[DEPTH-1];

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        for (int i = 0; i < DEPTH; i++) begin
          addr_q[i]  <= '0;
          valid_q[i] <= 1'b0;
        end
      end else if (push_i && pop_i) begin
        addr_q[0]  <= data_i;
        valid_q[0] <= 1'b1;
      end else if (push_i) begin
        for (int i = DEPTH - 1; i > 0; i--) begin
          addr_q[i]  <= addr_q[i-1];
          valid_q[i] <= valid_q[i-1];
        end
        addr_q[0]  <= data_i;
        valid_q[0] <= 1'b1;
      end else if (pop_i) begin
        for (int i = 0; i < DEPTH - 1; i++) begin
          addr_q[i]  <= addr_q[i+1];
          valid_q[i] <= valid_q[i+1];
        end
        valid_q[DEPTH-1] <= 1'b0;
      end
    end
  end

endmodule
