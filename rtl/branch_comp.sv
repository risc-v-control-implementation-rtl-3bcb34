// branch_comp: branch comparator of the RV32I datapath.
//
// Combinational. Compares R[rs1] (a) with R[rs2] (b) and reports
// BrEq (a == b) and BrLT (a < b). BrUn = 0 makes the less-than compare
// signed, BrUn = 1 unsigned. The controller turns these two flags into the
// branch decision for beq/bne/blt/bge/bltu/bgeu.
module branch_comp (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        br_un,
  output logic        br_eq,
  output logic        br_lt
);

  always_comb begin
    br_eq = (a == b);
    br_lt = br_un ? (a < b) : ($signed(a) < $signed(b));
  end

endmodule
