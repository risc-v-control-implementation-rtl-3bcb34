// tb_control_rom: self-checking test of the ROM controller.
// Each row of the datapath's control table (add, sub, the other R-R ops,
// addi, lw, sw, beq, bne, blt, bltu, jalr, jal, auipc) and the rows this
// design adds (bge, bgeu, lui, byte/half loads and stores, I-type ops) is
// written out here field by field. Every instruction is applied with
// random register fields and every BrEq/BrLT combination; don't-care
// fields of the table are masked out of the comparison.
module tb_control_rom;
  import rv32i_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] inst;
  logic        eq, lt;
  ctrl_t       ctrl;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_rom dut (.inst(inst), .br_eq(eq), .br_lt(lt), .ctrl(ctrl));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected fields; 'x' positions are expressed through the care mask.
  typedef struct {
    string       name;
    logic [31:0] word;      // opcode/funct bits; register fields randomised
    int          pcsel;     // 0, 1, or 2 = "taken when cond", 3 = "taken when !cond"
    int          cond;      // 0: BrEq decides, 1: BrLT decides
    int          immsel;    // -1 = don't care
    int          brun;      // -1 = don't care
    int          asel, bsel;
    int          alusel;
    int          memrw, regwen;
    int          wbsel;     // -1 = don't care
  } row_t;

  function automatic row_t row(string n, logic [31:0] w, int pcs, int cnd, int imm, int bu,
                               int as, int bs, int alu, int mrw, int rwe, int wb);
    row_t r;
    r.name = n; r.word = w; r.pcsel = pcs; r.cond = cnd; r.immsel = imm; r.brun = bu;
    r.asel = as; r.bsel = bs; r.alusel = alu; r.memrw = mrw; r.regwen = rwe; r.wbsel = wb;
    return r;
  endfunction

  // encoding used by this design: ImmSel I0 S1 B2 U3 J4; WBSel mem0 alu1 pc+4 2
  localparam int I = 0, S = 1, B = 2, U = 3, J = 4;
  localparam int MEM = 0, ALU = 1, PC4 = 2;

  task automatic apply(row_t r);
    logic [31:0] w;
    logic        exp_pc;
    for (int e = 0; e < 2; e++) for (int l = 0; l < 2; l++) begin
      // random rd/rs1/rs2 fields (bits 11:7, 19:15, 24:20)
      w = r.word;
      w[11:7]  = 5'($urandom);
      w[19:15] = 5'($urandom);
      if (r.word[6:0] != 7'b0010011 && r.word[6:0] != 7'b0000011 &&
          r.word[6:0] != 7'b1100111) w[24:20] = 5'($urandom);
      inst = w; eq = 1'(e); lt = 1'(l);
      #1;
      case (r.pcsel)
        0: exp_pc = 1'b0;
        1: exp_pc = 1'b1;
        2: exp_pc = r.cond ? lt : eq;
        default: exp_pc = r.cond ? !lt : !eq;
      endcase
      checks++;
      if (ctrl.pc_sel !== exp_pc ||
          (r.immsel >= 0 && int'(ctrl.imm_sel) != r.immsel) ||
          (r.brun >= 0 && int'(ctrl.br_un) != r.brun) ||
          int'(ctrl.a_sel) != r.asel || int'(ctrl.b_sel) != r.bsel ||
          int'(ctrl.alu_sel) != r.alusel || int'(ctrl.mem_rw) != r.memrw ||
          int'(ctrl.reg_wen) != r.regwen ||
          (r.wbsel >= 0 && int'(ctrl.wb_sel) != r.wbsel)) begin
        failures++;
        $display("FAIL %s eq=%0d lt=%0d ctrl=%p", r.name, e, l, ctrl);
      end
      @(posedge clk);
    end
  endtask

  initial begin
    row_t rows [$];
    //                  name     word          PCSel cond Imm Un  A  B  ALUSel   Mem Reg WB
    rows.push_back(row("add",   32'h0000_0033, 0, 0, -1, -1, 0, 0, 4'b0000, 0, 1, ALU));
    rows.push_back(row("sub",   32'h4000_0033, 0, 0, -1, -1, 0, 0, 4'b1000, 0, 1, ALU));
    rows.push_back(row("sll",   32'h0000_1033, 0, 0, -1, -1, 0, 0, 4'b0001, 0, 1, ALU));
    rows.push_back(row("slt",   32'h0000_2033, 0, 0, -1, -1, 0, 0, 4'b0010, 0, 1, ALU));
    rows.push_back(row("sltu",  32'h0000_3033, 0, 0, -1, -1, 0, 0, 4'b0011, 0, 1, ALU));
    rows.push_back(row("xor",   32'h0000_4033, 0, 0, -1, -1, 0, 0, 4'b0100, 0, 1, ALU));
    rows.push_back(row("srl",   32'h0000_5033, 0, 0, -1, -1, 0, 0, 4'b0101, 0, 1, ALU));
    rows.push_back(row("sra",   32'h4000_5033, 0, 0, -1, -1, 0, 0, 4'b1101, 0, 1, ALU));
    rows.push_back(row("or",    32'h0000_6033, 0, 0, -1, -1, 0, 0, 4'b0110, 0, 1, ALU));
    rows.push_back(row("and",   32'h0000_7033, 0, 0, -1, -1, 0, 0, 4'b0111, 0, 1, ALU));
    rows.push_back(row("addi",  32'h0000_0013, 0, 0, I,  -1, 0, 1, 4'b0000, 0, 1, ALU));
    rows.push_back(row("addi-", 32'hc000_0013, 0, 0, I,  -1, 0, 1, 4'b0000, 0, 1, ALU));
    rows.push_back(row("slti",  32'h0000_2013, 0, 0, I,  -1, 0, 1, 4'b0010, 0, 1, ALU));
    rows.push_back(row("xori",  32'h4000_4013, 0, 0, I,  -1, 0, 1, 4'b0100, 0, 1, ALU));
    rows.push_back(row("srli",  32'h0000_5013, 0, 0, I,  -1, 0, 1, 4'b0101, 0, 1, ALU));
    rows.push_back(row("srai",  32'h4000_5013, 0, 0, I,  -1, 0, 1, 4'b1101, 0, 1, ALU));
    rows.push_back(row("lw",    32'h0000_2003, 0, 0, I,  -1, 0, 1, 4'b0000, 0, 1, MEM));
    rows.push_back(row("lbu",   32'h0000_4003, 0, 0, I,  -1, 0, 1, 4'b0000, 0, 1, MEM));
    rows.push_back(row("sw",    32'h0000_2023, 0, 0, S,  -1, 0, 1, 4'b0000, 1, 0, -1));
    rows.push_back(row("sb",    32'h0000_0023, 0, 0, S,  -1, 0, 1, 4'b0000, 1, 0, -1));
    rows.push_back(row("beq",   32'h0000_0063, 2, 0, B,  -1, 1, 1, 4'b0000, 0, 0, -1));
    rows.push_back(row("bne",   32'h0000_1063, 3, 0, B,  -1, 1, 1, 4'b0000, 0, 0, -1));
    rows.push_back(row("blt",   32'h0000_4063, 2, 1, B,  0,  1, 1, 4'b0000, 0, 0, -1));
    rows.push_back(row("bge",   32'h0000_5063, 3, 1, B,  0,  1, 1, 4'b0000, 0, 0, -1));
    rows.push_back(row("bltu",  32'h0000_6063, 2, 1, B,  1,  1, 1, 4'b0000, 0, 0, -1));
    rows.push_back(row("bgeu",  32'h0000_7063, 3, 1, B,  1,  1, 1, 4'b0000, 0, 0, -1));
    rows.push_back(row("jalr",  32'h0000_0067, 1, 0, I,  -1, 0, 1, 4'b0000, 0, 1, PC4));
    rows.push_back(row("jal",   32'h0000_006f, 1, 0, J,  -1, 1, 1, 4'b0000, 0, 1, PC4));
    rows.push_back(row("auipc", 32'h0000_0017, 0, 0, U,  -1, 1, 1, 4'b0000, 0, 1, ALU));
    rows.push_back(row("lui",   32'h0000_0037, 0, 0, U,  -1, 0, 1, 4'b1111, 0, 1, ALU));
    // not implemented: must neither write nor jump
    rows.push_back(row("ecall", 32'h0000_0073, 0, 0, -1, -1, 0, 0, 4'b0000, 0, 0, -1));
    rows.push_back(row("fence", 32'h0000_000f, 0, 0, -1, -1, 0, 0, 4'b0000, 0, 0, -1));
    for (int rep = 0; rep < 20; rep++) foreach (rows[i]) apply(rows[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
