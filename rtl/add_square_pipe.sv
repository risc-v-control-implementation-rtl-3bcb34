// add_square_pipe: the two-step example circuit for pipelining, in its
// pipelined form.
//
// Computes y = (a + b) * (a + b). The adder's WIDTH-bit sum (carry out
// dropped) is held in a register, and the multiplier squares the
// register's output, giving the full 2*WIDTH-bit product. Without the
// register the critical path would be adder plus multiplier. With it, each
// cycle holds only the slower of the two, at the cost of one cycle of
// latency: y shows the square of the sum of the a and b sampled at the
// previous rising edge. The register loads every cycle and clears on a
// synchronous reset. The structure (adder, register, multiplier fed twice
// from the register) is the standard example; the width, the reset and the
// full-width product are this design's choices.
module add_square_pipe #(
  parameter int unsigned WIDTH = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic [2*WIDTH-1:0]   y
);

  logic [WIDTH-1:0] sum_d, sum_q;

  assign sum_d = a + b;

  always_ff @(posedge clk) begin
    if (rst) sum_q <= '0;
    else     sum_q <= sum_d;
  end

  assign y = sum_q * sum_q;

endmodule
