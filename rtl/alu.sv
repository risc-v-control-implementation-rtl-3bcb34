// alu: the 32-bit ALU of the RV32I datapath.
//
// Purely combinational. ALUSel picks one of the RV32I integer operations:
// add, sub, sll, slt, sltu, xor, srl, sra, or, and, plus "pass B", which
// LUI uses to move its upper immediate to the result. Shift amounts are
// b[4:0]. The 4-bit ALUSel width follows the datapath's controller; the
// encoding ({inst[30], funct3} for register-register ops, 4'b1111 for
// pass B) is this design's own choice, defined in rv32i_pkg.
module alu
  import rv32i_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_sel_e    alu_sel,
  output logic [31:0] y
);

  always_comb begin
    unique case (alu_sel)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SLT:   y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'd0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = a + b;
    endcase
  end

endmodule
