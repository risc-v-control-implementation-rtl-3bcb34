// pipe_reg: one pipeline register of the five-stage RV32I pipeline.
//
// Holds, for the instruction in flight between two stages, everything the
// later stages need: data values, the instruction itself and the control
// bits already decoded. It loads d at every rising clock edge (the pipeline
// never stalls) and loads RESET_VAL on a synchronous reset; the pipeline
// uses a NOP with all write enables off as RESET_VAL, so that a reset
// pipeline holds only bubbles. T is the struct of the register's fields.
module pipe_reg #(
  parameter type T = logic [31:0],
  parameter T RESET_VAL = '0
) (
  input  logic clk,
  input  logic rst,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst) q <= RESET_VAL;
    else     q <= d;
  end

endmodule
