// riscv_single_cycle: single-cycle RV32I processor.
//
// Every instruction completes in one clock cycle (CPI = 1). In that cycle
// the PC addresses IMEM; the instruction's register fields address Reg[]
// (rs1 = inst[19:15], rs2 = inst[24:20], rd = inst[11:7]); Imm Gen builds
// the immediate; the branch comparator compares R[rs1] with R[rs2]; ASel
// picks R[rs1] or PC and BSel picks R[rs2] or the immediate for the ALU;
// DMEM is addressed by the ALU result and written with R[rs2]; the
// write-back mux (WBSel: 0 mem, 1 alu, 2 pc+4) drives DataD; and the PC
// mux (PCSel: 0 pc+4, 1 alu) chooses the next PC. The control signals come
// from control_rom, addressed by inst[30], inst[14:12], inst[6:2], BrEq
// and BrLT. This structure follows the standard RV32I teaching datapath.
//
// This design's own additions: synchronous reset to PC = 0, a program load
// port on IMEM, and trace outputs that show the register and memory writes
// of the current instruction (they commit at the next rising edge).
module riscv_single_cycle
  import rv32i_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic                          clk,
  input  logic                          rst,
  // program load
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  logic [31:0]                   imem_wdata,
  // observation
  output logic [31:0]                   pc,
  output logic [31:0]                   inst,
  output logic                          rf_we,
  output logic [4:0]                    rf_waddr,
  output logic [31:0]                   rf_wdata,
  output logic                          dm_we,
  output logic [31:0]                   dm_addr,
  output logic [31:0]                   dm_wdata
);

  logic [31:0] pc_q, pc_plus4, pc_next;
  logic [31:0] rs1_val, rs2_val, imm, a_op, b_op, alu_out, mem_out, wb;
  logic        br_eq, br_lt;
  ctrl_t       ctrl;

  // PC register and PC mux
  assign pc_plus4 = pc_q + 32'd4;
  assign pc_next  = ctrl.pc_sel ? alu_out : pc_plus4;

  always_ff @(posedge clk) begin
    if (rst) pc_q <= 32'd0;
    else     pc_q <= pc_next;
  end

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .addr      (pc_q),
    .inst      (inst),
    .load_we   (imem_we),
    .load_addr (imem_waddr),
    .load_data (imem_wdata)
  );

  control_rom u_ctrl (
    .inst  (inst),
    .br_eq (br_eq),
    .br_lt (br_lt),
    .ctrl  (ctrl)
  );

  regfile u_rf (
    .clk     (clk),
    .rst     (rst),
    .addr_a  (inst[19:15]),
    .addr_b  (inst[24:20]),
    .addr_d  (inst[11:7]),
    .data_d  (wb),
    .reg_wen (ctrl.reg_wen),
    .data_a  (rs1_val),
    .data_b  (rs2_val)
  );

  imm_gen u_imm (
    .inst    (inst[31:7]),
    .imm_sel (ctrl.imm_sel),
    .imm     (imm)
  );

  branch_comp u_bc (
    .a     (rs1_val),
    .b     (rs2_val),
    .br_un (ctrl.br_un),
    .br_eq (br_eq),
    .br_lt (br_lt)
  );

  assign a_op = ctrl.a_sel ? pc_q : rs1_val;
  assign b_op = ctrl.b_sel ? imm  : rs2_val;

  alu u_alu (
    .a       (a_op),
    .b       (b_op),
    .alu_sel (ctrl.alu_sel),
    .y       (alu_out)
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk    (clk),
    .addr   (alu_out),
    .data_w (rs2_val),
    .mem_rw (ctrl.mem_rw),
    .funct3 (inst[14:12]),
    .data_r (mem_out)
  );

  // write-back mux
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb = mem_out;
      WB_ALU:  wb = alu_out;
      WB_PC4:  wb = pc_plus4;
      default: wb = alu_out;
    endcase
  end

  assign pc       = pc_q;
  assign rf_we    = ctrl.reg_wen && (inst[11:7] != 5'd0);
  assign rf_waddr = inst[11:7];
  assign rf_wdata = wb;
  assign dm_we    = ctrl.mem_rw;
  assign dm_addr  = alu_out;
  assign dm_wdata = rs2_val;

endmodule
