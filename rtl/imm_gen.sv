// imm_gen: immediate generator of the RV32I datapath.
//
// Combinational. From inst[31:7] it assembles the 32-bit immediate of the
// format chosen by ImmSel, sign-extended from inst[31]:
//   I: inst[31:20]                         (loads, OP-IMM, jalr)
//   S: inst[31:25], inst[11:7]             (stores)
//   B: inst[31], inst[7], inst[30:25], inst[11:8], 0   (branches)
//   U: inst[31:12], 12 zeros               (lui, auipc)
//   J: inst[31], inst[19:12], inst[20], inst[30:21], 0 (jal)
// The bit placement is the RV32I encoding; the ImmSel encoding (I=0, S=1,
// B=2, U=3, J=4) is this design's choice.
module imm_gen
  import rv32i_pkg::*;
(
  input  logic [31:7] inst,
  input  imm_sel_e    imm_sel,
  output logic [31:0] imm
);

  always_comb begin
    unique case (imm_sel)
      IMM_I:   imm = {{21{inst[31]}}, inst[30:20]};
      IMM_S:   imm = {{21{inst[31]}}, inst[30:25], inst[11:7]};
      IMM_B:   imm = {{20{inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_U:   imm = {inst[31:12], 12'd0};
      IMM_J:   imm = {{12{inst[31]}}, inst[19:12], inst[20], inst[30:21], 1'b0};
      default: imm = {{21{inst[31]}}, inst[30:20]};
    endcase
  end

endmodule
