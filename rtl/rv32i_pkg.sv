// rv32i_pkg: types and constants shared by the RV32I single-cycle and
// pipelined datapaths.
//
// The control word is the 15-bit output of the ROM controller, in the order
// PCSel, ImmSel[2:0], BrUn, ASel, BSel, ALUSel[3:0], MemRW, RegWEn,
// WBSel[1:0]. The field widths and their order are those of the classic
// RV32I teaching datapath; the binary encodings of ImmSel and ALUSel are
// this design's own choice (ALUSel = {inst[30], funct3} for R-type ops).
// The pipeline-register structs describe what each register between two
// stages holds.
package rv32i_pkg;

  // inst[6:2] of the RV32I major opcodes (inst[1:0] is always 2'b11).
  localparam logic [4:0] OP5_LOAD   = 5'b00000;
  localparam logic [4:0] OP5_FENCE  = 5'b00011;
  localparam logic [4:0] OP5_OPIMM  = 5'b00100;
  localparam logic [4:0] OP5_AUIPC  = 5'b00101;
  localparam logic [4:0] OP5_STORE  = 5'b01000;
  localparam logic [4:0] OP5_OP     = 5'b01100;
  localparam logic [4:0] OP5_LUI    = 5'b01101;
  localparam logic [4:0] OP5_BRANCH = 5'b11000;
  localparam logic [4:0] OP5_JALR   = 5'b11001;
  localparam logic [4:0] OP5_JAL    = 5'b11011;
  localparam logic [4:0] OP5_SYSTEM = 5'b11100;

  // addi x0, x0, 0
  localparam logic [31:0] NOP = 32'h0000_0013;

  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_sel_e;

  typedef enum logic [3:0] {
    ALU_ADD   = 4'b0000,
    ALU_SLL   = 4'b0001,
    ALU_SLT   = 4'b0010,
    ALU_SLTU  = 4'b0011,
    ALU_XOR   = 4'b0100,
    ALU_SRL   = 4'b0101,
    ALU_OR    = 4'b0110,
    ALU_AND   = 4'b0111,
    ALU_SUB   = 4'b1000,
    ALU_SRA   = 4'b1101,
    ALU_PASSB = 4'b1111
  } alu_sel_e;

  // Write-back mux inputs: 0 = mem, 1 = alu, 2 = pc+4.
  typedef enum logic [1:0] {
    WB_MEM = 2'd0,
    WB_ALU = 2'd1,
    WB_PC4 = 2'd2
  } wb_sel_e;

  typedef struct packed {
    logic     pc_sel;   // 0: PC+4, 1: ALU output
    imm_sel_e imm_sel;
    logic     br_un;    // 1: unsigned branch compare
    logic     a_sel;    // 0: R[rs1], 1: PC
    logic     b_sel;    // 0: R[rs2], 1: immediate
    alu_sel_e alu_sel;
    logic     mem_rw;   // 0: read, 1: write
    logic     reg_wen;
    wb_sel_e  wb_sel;
  } ctrl_t;

  // Control word of an instruction that changes no state.
  localparam ctrl_t CTRL_NOP = '{
    pc_sel: 1'b0, imm_sel: IMM_I, br_un: 1'b0, a_sel: 1'b0, b_sel: 1'b0,
    alu_sel: ALU_ADD, mem_rw: 1'b0, reg_wen: 1'b0, wb_sel: WB_ALU
  };

  // ROM address: {inst[30], inst[14:12], inst[6:2], BrEq, BrLT}.
  function automatic logic [10:0] rom_addr(logic [31:0] inst, logic br_eq, logic br_lt);
    return {inst[30], inst[14:12], inst[6:2], br_eq, br_lt};
  endfunction

  // Contents of one ROM word, written as the control table of the
  // datapath: PCSel = jump OR (branch AND condition holds).
  function automatic ctrl_t control_word(logic [10:0] addr);
    logic       i30;
    logic [2:0] f3;
    logic [4:0] op;
    logic       eq;
    logic       lt;
    ctrl_t      c;
    i30 = addr[10];
    f3  = addr[9:7];
    op  = addr[6:2];
    eq  = addr[1];
    lt  = addr[0];
    c   = CTRL_NOP;
    case (op)
      OP5_LUI: begin
        c.imm_sel = IMM_U; c.b_sel = 1'b1; c.alu_sel = ALU_PASSB;
        c.reg_wen = 1'b1;  c.wb_sel = WB_ALU;
      end
      OP5_AUIPC: begin
        c.imm_sel = IMM_U; c.a_sel = 1'b1; c.b_sel = 1'b1; c.alu_sel = ALU_ADD;
        c.reg_wen = 1'b1;  c.wb_sel = WB_ALU;
      end
      OP5_JAL: begin
        c.pc_sel  = 1'b1;  c.imm_sel = IMM_J; c.a_sel = 1'b1; c.b_sel = 1'b1;
        c.alu_sel = ALU_ADD; c.reg_wen = 1'b1; c.wb_sel = WB_PC4;
      end
      OP5_JALR: begin
        c.pc_sel  = 1'b1;  c.imm_sel = IMM_I; c.b_sel = 1'b1;
        c.alu_sel = ALU_ADD; c.reg_wen = 1'b1; c.wb_sel = WB_PC4;
      end
      OP5_BRANCH: begin
        c.imm_sel = IMM_B; c.a_sel = 1'b1; c.b_sel = 1'b1; c.alu_sel = ALU_ADD;
        c.br_un   = f3[1];
        case (f3)
          3'b000:         c.pc_sel = eq;   // beq
          3'b001:         c.pc_sel = !eq;  // bne
          3'b100, 3'b110: c.pc_sel = lt;   // blt, bltu
          3'b101, 3'b111: c.pc_sel = !lt;  // bge, bgeu
          default:        c.pc_sel = 1'b0;
        endcase
      end
      OP5_LOAD: begin
        c.imm_sel = IMM_I; c.b_sel = 1'b1; c.alu_sel = ALU_ADD;
        c.reg_wen = 1'b1;  c.wb_sel = WB_MEM;
      end
      OP5_STORE: begin
        c.imm_sel = IMM_S; c.b_sel = 1'b1; c.alu_sel = ALU_ADD;
        c.mem_rw  = 1'b1;
      end
      OP5_OPIMM: begin
        c.imm_sel = IMM_I; c.b_sel = 1'b1;
        // Only srai uses inst[30]; for the others it is immediate data.
        c.alu_sel = alu_sel_e'({(f3 == 3'b101) & i30, f3});
        c.reg_wen = 1'b1;  c.wb_sel = WB_ALU;
      end
      OP5_OP: begin
        c.alu_sel = alu_sel_e'({i30, f3});
        c.reg_wen = 1'b1;  c.wb_sel = WB_ALU;
      end
      default: c = CTRL_NOP;  // FENCE, SYSTEM and undefined opcodes
    endcase
    return c;
  endfunction

  // Pipeline registers (named after the two stages they separate).
  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] inst;
  } if_id_t;

  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] rs1;
    logic [31:0] rs2;
    logic [31:0] inst;
  } id_ex_t;

  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] alu;
    logic [31:0] rs2;
    logic [31:0] inst;
    logic        mem_rw;
    logic        reg_wen;
    wb_sel_e     wb_sel;
  } ex_mem_t;

  typedef struct packed {
    logic [31:0] wb;
    logic [31:0] inst;
    logic        reg_wen;
  } mem_wb_t;

  localparam if_id_t  IF_ID_RESET  = '{pc: 32'd0, inst: NOP};
  localparam id_ex_t  ID_EX_RESET  = '{pc: 32'd0, rs1: 32'd0, rs2: 32'd0, inst: NOP};
  localparam ex_mem_t EX_MEM_RESET = '{pc: 32'd0, alu: 32'd0, rs2: 32'd0, inst: NOP,
                                       mem_rw: 1'b0, reg_wen: 1'b0, wb_sel: WB_ALU};
  localparam mem_wb_t MEM_WB_RESET = '{wb: 32'd0, inst: NOP, reg_wen: 1'b0};

endpackage
