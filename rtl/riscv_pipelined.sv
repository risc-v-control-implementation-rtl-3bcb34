// riscv_pipelined: five-stage pipelined RV32I processor.
//
// The single-cycle datapath cut by four pipeline registers into the stages
//   IF  : PC, IMEM, PC+4 adder and PC mux
//   ID  : register file read (rs1, rs2 from inst_D)
//   EX  : controller, Imm Gen, branch comparator, A/B muxes, ALU
//   MEM : DMEM, PC+4 recomputed from pc_M, write-back mux
//   WB  : register file write (rd from inst_W)
// Up to five instructions are in flight; once the pipe is full one
// instruction completes per cycle and each takes five cycles. The
// instruction word travels down the pipe with its data (inst_D, inst_X,
// inst_M, inst_W). The controller (control_rom) decodes inst_X together
// with BrEq/BrLT in EX; its MEM and WB bits (MemRW, WBSel, RegWEn) are
// stored in the EX/MEM and MEM/WB registers for use in the later stages.
// Branches and jumps resolve in EX: PCSel_X selects alu_X as the next
// fetch PC. The PC travels only to MEM, where PC+4 is recomputed for
// jal/jalr, so that only one of PC and PC+4 is carried.
//
// Hazards are not handled, as in the basic pipeline this follows: there is
// no forwarding, stalling or flushing. A register result can be read by an
// instruction fetched four or more instructions later (the register file
// has no write-to-read bypass), and the two instructions fetched after a
// taken branch or jump are executed. Software must schedule around both,
// for instance with NOPs. Reset (PC = 0, all pipeline registers holding
// NOPs), the IMEM load port and the trace outputs
// (including stage_inst, the instruction in each stage) are this design's own.
module riscv_pipelined
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
  output logic [31:0]                   pc_f,
  output logic                          rf_we,
  output logic [4:0]                    rf_waddr,
  output logic [31:0]                   rf_wdata,
  output logic                          dm_we,
  output logic [31:0]                   dm_addr,
  output logic [31:0]                   dm_wdata,
  // instruction held in each stage: [0] IF, [1] ID, [2] EX, [3] MEM, [4] WB
  output logic [4:0][31:0]              stage_inst
);

  if_id_t  if_id_d,  if_id_q;
  id_ex_t  id_ex_d,  id_ex_q;
  ex_mem_t ex_mem_d, ex_mem_q;
  mem_wb_t mem_wb_d, mem_wb_q;

  // ---------------------------------------------------------------- IF
  logic [31:0] pc_q, inst_f;
  logic        pc_sel_x;
  logic [31:0] alu_x;

  always_ff @(posedge clk) begin
    if (rst) pc_q <= 32'd0;
    else     pc_q <= pc_sel_x ? alu_x : pc_q + 32'd4;
  end

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .addr      (pc_q),
    .inst      (inst_f),
    .load_we   (imem_we),
    .load_addr (imem_waddr),
    .load_data (imem_wdata)
  );

  assign if_id_d = '{pc: pc_q, inst: inst_f};

  pipe_reg #(.T(if_id_t), .RESET_VAL(IF_ID_RESET)) u_if_id (
    .clk (clk), .rst (rst), .d (if_id_d), .q (if_id_q)
  );

  // ---------------------------------------------------------------- ID
  logic [31:0] rs1_d, rs2_d;

  regfile u_rf (
    .clk     (clk),
    .rst     (rst),
    .addr_a  (if_id_q.inst[19:15]),
    .addr_b  (if_id_q.inst[24:20]),
    .addr_d  (mem_wb_q.inst[11:7]),
    .data_d  (mem_wb_q.wb),
    .reg_wen (mem_wb_q.reg_wen),
    .data_a  (rs1_d),
    .data_b  (rs2_d)
  );

  assign id_ex_d = '{pc: if_id_q.pc, rs1: rs1_d, rs2: rs2_d, inst: if_id_q.inst};

  pipe_reg #(.T(id_ex_t), .RESET_VAL(ID_EX_RESET)) u_id_ex (
    .clk (clk), .rst (rst), .d (id_ex_d), .q (id_ex_q)
  );

  // ---------------------------------------------------------------- EX
  ctrl_t       ctrl_x;
  logic        br_eq_x, br_lt_x;
  logic [31:0] imm_x, a_x, b_x;

  control_rom u_ctrl (
    .inst  (id_ex_q.inst),
    .br_eq (br_eq_x),
    .br_lt (br_lt_x),
    .ctrl  (ctrl_x)
  );

  imm_gen u_imm (
    .inst    (id_ex_q.inst[31:7]),
    .imm_sel (ctrl_x.imm_sel),
    .imm     (imm_x)
  );

  branch_comp u_bc (
    .a     (id_ex_q.rs1),
    .b     (id_ex_q.rs2),
    .br_un (ctrl_x.br_un),
    .br_eq (br_eq_x),
    .br_lt (br_lt_x)
  );

  assign a_x = ctrl_x.a_sel ? id_ex_q.pc : id_ex_q.rs1;
  assign b_x = ctrl_x.b_sel ? imm_x      : id_ex_q.rs2;

  alu u_alu (
    .a       (a_x),
    .b       (b_x),
    .alu_sel (ctrl_x.alu_sel),
    .y       (alu_x)
  );

  assign pc_sel_x = ctrl_x.pc_sel;

  assign ex_mem_d = '{pc: id_ex_q.pc, alu: alu_x, rs2: id_ex_q.rs2, inst: id_ex_q.inst,
                      mem_rw: ctrl_x.mem_rw, reg_wen: ctrl_x.reg_wen,
                      wb_sel: ctrl_x.wb_sel};

  pipe_reg #(.T(ex_mem_t), .RESET_VAL(EX_MEM_RESET)) u_ex_mem (
    .clk (clk), .rst (rst), .d (ex_mem_d), .q (ex_mem_q)
  );

  // --------------------------------------------------------------- MEM
  logic [31:0] mem_m, pc4_m, wb_m;

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk    (clk),
    .addr   (ex_mem_q.alu),
    .data_w (ex_mem_q.rs2),
    .mem_rw (ex_mem_q.mem_rw),
    .funct3 (ex_mem_q.inst[14:12]),
    .data_r (mem_m)
  );

  assign pc4_m = ex_mem_q.pc + 32'd4;

  always_comb begin
    unique case (ex_mem_q.wb_sel)
      WB_MEM:  wb_m = mem_m;
      WB_ALU:  wb_m = ex_mem_q.alu;
      WB_PC4:  wb_m = pc4_m;
      default: wb_m = ex_mem_q.alu;
    endcase
  end

  assign mem_wb_d = '{wb: wb_m, inst: ex_mem_q.inst, reg_wen: ex_mem_q.reg_wen};

  pipe_reg #(.T(mem_wb_t), .RESET_VAL(MEM_WB_RESET)) u_mem_wb (
    .clk (clk), .rst (rst), .d (mem_wb_d), .q (mem_wb_q)
  );

  // ---------------------------------------------------------------- WB
  // (the write itself is the regfile's write port above)

  assign pc_f     = pc_q;
  assign rf_we    = mem_wb_q.reg_wen && (mem_wb_q.inst[11:7] != 5'd0);
  assign rf_waddr = mem_wb_q.inst[11:7];
  assign rf_wdata = mem_wb_q.wb;
  assign dm_we    = ex_mem_q.mem_rw;
  assign dm_addr  = ex_mem_q.alu;
  assign dm_wdata = ex_mem_q.rs2;

  assign stage_inst = {mem_wb_q.inst, ex_mem_q.inst, id_ex_q.inst, if_id_q.inst, inst_f};

endmodule
