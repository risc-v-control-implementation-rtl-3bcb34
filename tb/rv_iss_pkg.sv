// rv_iss_pkg: testbench support for the RV32I processors.
//
// Holds three things the processor testbenches share:
//  * instruction encoders (enc_r/i/s/b/u/j) built from the RV32I formats;
//  * a program buffer and the standard test program, which exercises every
//    implemented RV32I instruction, forward and backward branches taken and
//    not taken, jal, jalr, all load/store widths and a random stretch of
//    ALU instructions. Each instruction may be followed by `pad` NOPs, which
//    keeps a program free of pipeline hazards when pad >= 4;
//  * an instruction-set model that executes the program one instruction at
//    a time, written directly from the ISA (not from the RTL), and records
//    the expected register writes and memory writes in order.
package rv_iss_pkg;

  localparam int PROG_WORDS = 1024;
  localparam int DM_BYTES   = 4096;
  localparam logic [31:0] NOP_I  = 32'h0000_0013;
  localparam logic [31:0] HALT_I = 32'h0000_006f;  // jal x0, 0

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] enc_r(logic [6:0] f7, int rs2, int rs1, logic [2:0] f3,
                                        int rd, logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_i(int imm, int rs1, logic [2:0] f3, int rd, logic [6:0] op);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_s(int imm, int rs2, int rs1, logic [2:0] f3);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), f3, m[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(int off, int rs1, int rs2, logic [2:0] f3);
    logic [12:0] m;
    m = 13'(off);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), f3, m[4:1], m[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_u(int imm20, int rd, logic [6:0] op);
    return {20'(imm20), 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_j(int off, int rd);
    logic [20:0] m;
    m = 21'(off);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
  endfunction

  // common instructions
  function automatic logic [31:0] addi(int rd, int rs1, int imm);
    return enc_i(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] rop(string name, int rd, int rs1, int rs2);
    case (name)
      "add":  return enc_r(7'h00, rs2, rs1, 3'b000, rd, 7'b0110011);
      "sub":  return enc_r(7'h20, rs2, rs1, 3'b000, rd, 7'b0110011);
      "sll":  return enc_r(7'h00, rs2, rs1, 3'b001, rd, 7'b0110011);
      "slt":  return enc_r(7'h00, rs2, rs1, 3'b010, rd, 7'b0110011);
      "sltu": return enc_r(7'h00, rs2, rs1, 3'b011, rd, 7'b0110011);
      "xor":  return enc_r(7'h00, rs2, rs1, 3'b100, rd, 7'b0110011);
      "srl":  return enc_r(7'h00, rs2, rs1, 3'b101, rd, 7'b0110011);
      "sra":  return enc_r(7'h20, rs2, rs1, 3'b101, rd, 7'b0110011);
      "or":   return enc_r(7'h00, rs2, rs1, 3'b110, rd, 7'b0110011);
      default: return enc_r(7'h00, rs2, rs1, 3'b111, rd, 7'b0110011);  // and
    endcase
  endfunction

  // ------------------------------------------------------ program buffer
  logic [31:0] prog [PROG_WORDS];
  int          plen;

  function automatic void prog_clear();
    for (int i = 0; i < PROG_WORDS; i++) prog[i] = NOP_I;
    plen = 0;
  endfunction

  // Append one instruction and `pad` NOPs; return the instruction's index.
  function automatic int emit(logic [31:0] inst, int pad);
    int at;
    at = plen;
    prog[plen] = inst;
    plen++;
    for (int i = 0; i < pad; i++) begin
      prog[plen] = NOP_I;
      plen++;
    end
    return at;
  endfunction

  // The standard test program. `pad` NOPs follow each instruction; with
  // dense = 1 a block of independent instructions without padding is added.
  function automatic void build_test_program(int pad, bit dense, int unsigned seed);
    int at, br, tgt, lp, k;
    int unsigned s;
    prog_clear();
    s = seed;
    void'(emit(enc_u(32'h12345, 1, 7'b0110111), pad));       // lui  x1
    void'(emit(addi(1, 1, 32'h678), pad));                    // x1 = 0x12345678
    void'(emit(addi(2, 0, -5), pad));
    void'(emit(addi(3, 0, 7), pad));
    if (dense) begin
      // Independent instructions back to back: five in flight at once.
      for (int i = 0; i < 8; i++) void'(emit(addi(24 + (i % 4), 0, 100 + i), 0));
      for (int i = 0; i < 4; i++) void'(emit(NOP_I, 0));
    end
    void'(emit(rop("add", 4, 1, 2), pad));
    void'(emit(rop("sub", 5, 2, 3), pad));
    void'(emit(rop("sll", 6, 3, 3), pad));
    void'(emit(rop("slt", 7, 2, 3), pad));
    void'(emit(rop("sltu", 8, 2, 3), pad));
    void'(emit(rop("xor", 9, 1, 2), pad));
    void'(emit(rop("srl", 10, 2, 3), pad));
    void'(emit(rop("sra", 11, 2, 3), pad));
    void'(emit(rop("or", 12, 1, 2), pad));
    void'(emit(rop("and", 13, 1, 2), pad));
    void'(emit(enc_i(-3, 2, 3'b010, 14, 7'b0010011), pad));      // slti
    void'(emit(enc_i(-3, 3, 3'b011, 15, 7'b0010011), pad));      // sltiu
    void'(emit(enc_i(12'h0f0, 1, 3'b100, 16, 7'b0010011), pad)); // xori
    void'(emit(enc_i(12'h80f, 1, 3'b110, 17, 7'b0010011), pad)); // ori
    void'(emit(enc_i(12'h0ff, 1, 3'b111, 18, 7'b0010011), pad)); // andi
    void'(emit(enc_i(4, 1, 3'b001, 19, 7'b0010011), pad));       // slli
    void'(emit(enc_i(4, 2, 3'b101, 20, 7'b0010011), pad));       // srli
    void'(emit(enc_i(32'h404, 2, 3'b101, 21, 7'b0010011), pad)); // srai
    void'(emit(enc_u(1, 22, 7'b0010111), pad));                  // auipc
    // loads and stores
    void'(emit(addi(20, 0, 32'h100), pad));
    void'(emit(enc_s(0, 1, 20, 3'b010), pad));                   // sw x1, 0(x20)
    void'(emit(enc_s(4, 2, 20, 3'b001), pad));                   // sh x2, 4(x20)
    void'(emit(enc_s(6, 3, 20, 3'b000), pad));                   // sb x3, 6(x20)
    void'(emit(enc_s(7, 2, 20, 3'b000), pad));                   // sb x2, 7(x20)
    void'(emit(enc_i(0, 20, 3'b010, 23, 7'b0000011), pad));      // lw
    void'(emit(enc_i(4, 20, 3'b001, 24, 7'b0000011), pad));      // lh
    void'(emit(enc_i(4, 20, 3'b101, 25, 7'b0000011), pad));      // lhu
    void'(emit(enc_i(7, 20, 3'b000, 26, 7'b0000011), pad));      // lb
    void'(emit(enc_i(7, 20, 3'b100, 27, 7'b0000011), pad));      // lbu
    void'(emit(enc_i(4, 20, 3'b010, 28, 7'b0000011), pad));      // lw
    void'(emit(enc_i(2, 20, 3'b001, 29, 7'b0000011), pad));      // lh (upper half)
    // branches: each taken one skips a poison addi x30,x30,1;
    // each not-taken one falls into addi x31,x31,1
    for (int f = 0; f < 8; f++) begin
      logic [2:0] f3;
      if (f == 2 || f == 3) continue;
      f3 = 3'(f);
      for (int v = 0; v < 2; v++) begin
        // v = 0: compare x2 (-5) with x3 (7); v = 1: x3 with itself
        br = emit(32'h0, pad);
        void'(emit(addi(30, 30, 1), pad));
        void'(emit(addi(31, 31, 1), pad));
        tgt = plen;
        prog[br] = enc_b((tgt - br) * 4 - 4 * (1 + pad), v ? 3 : 2, 3, f3);
      end
    end
    // jal over a poison instruction, linking x5
    at = emit(enc_j(2 * (1 + pad) * 4, 5), pad);
    void'(emit(addi(30, 30, 1), pad));
    // jalr: auipc x6, 0 ; jalr x7, off(x6) -> skip one poison
    void'(emit(enc_u(0, 6, 7'b0010111), pad));
    void'(emit(enc_i(3 * (1 + pad) * 4, 6, 3'b000, 7, 7'b1100111), pad));
    void'(emit(addi(30, 30, 1), pad));
    // backward loop: x8 counts 5 iterations, x9 accumulates
    void'(emit(addi(8, 0, 5), pad));
    lp = emit(addi(9, 9, 3), pad);
    void'(emit(addi(8, 8, -1), pad));
    at = emit(32'h0, pad);
    prog[at] = enc_b((lp - at) * 4, 8, 0, 3'b001);               // bne x8, x0, lp
    // random ALU stretch over x10..x19
    for (int i = 0; i < 40; i++) begin
      int rd, r1, r2;
      s  = s * 1103515245 + 12345;
      rd = 10 + int'((s >> 8) % 10);
      r1 = 1 + int'((s >> 12) % 19);
      r2 = 1 + int'((s >> 17) % 19);
      k  = int'((s >> 22) % 14);
      case (k)
        0:  void'(emit(rop("add", rd, r1, r2), pad));
        1:  void'(emit(rop("sub", rd, r1, r2), pad));
        2:  void'(emit(rop("sll", rd, r1, r2), pad));
        3:  void'(emit(rop("slt", rd, r1, r2), pad));
        4:  void'(emit(rop("sltu", rd, r1, r2), pad));
        5:  void'(emit(rop("xor", rd, r1, r2), pad));
        6:  void'(emit(rop("srl", rd, r1, r2), pad));
        7:  void'(emit(rop("sra", rd, r1, r2), pad));
        8:  void'(emit(rop("or", rd, r1, r2), pad));
        9:  void'(emit(rop("and", rd, r1, r2), pad));
        10: void'(emit(addi(rd, r1, int'(s[31:20]) - 2048), pad));
        11: void'(emit(enc_u(int'(s >> 5), rd, 7'b0110111), pad));
        12: void'(emit(enc_i(int'(s % 32), r1, 3'b001, rd, 7'b0010011), pad));
        default: void'(emit(enc_i(32'h400 | int'(s % 32), r1, 3'b101, rd, 7'b0010011), pad));
      endcase
    end
    // store the random results and read one back
    for (int i = 0; i < 10; i++) void'(emit(enc_s(32 + 4 * i, 10 + i, 20, 3'b010), pad));
    void'(emit(enc_i(36, 20, 3'b010, 29, 7'b0000011), pad));
    void'(emit(HALT_I, 0));
  endfunction

  // ---------------------------------------------------- instruction model
  typedef struct {
    bit          rf_we;
    logic [4:0]  rd;
    logic [31:0] rd_val;
    bit          dm_we;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [31:0] next_pc;
    bit          is_branch;
    bit          taken;
    bit          is_jal;
    bit          is_jalr;
    bit          is_load;
    bit          is_store;
  } step_t;

  logic [31:0] xr [32];
  logic [7:0]  dmb [DM_BYTES];
  logic [31:0] ipc;

  function automatic void iss_reset();
    for (int i = 0; i < 32; i++) xr[i] = '0;
    for (int i = 0; i < DM_BYTES; i++) dmb[i] = '0;
    ipc = '0;
  endfunction

  function automatic logic [31:0] sx(logic [31:0] v, int bits);
    return 32'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  function automatic step_t iss_step();
    step_t       r;
    logic [31:0] in, a, b, immi, imms, immb, immu, immj, ea, ld;
    logic [6:0]  op;
    logic [2:0]  f3;
    int          rd, rs1, rs2;
    in   = prog[ipc[11:2] % PROG_WORDS];
    op   = in[6:0];
    f3   = in[14:12];
    rd   = int'(in[11:7]);
    rs1  = int'(in[19:15]);
    rs2  = int'(in[24:20]);
    a    = xr[rs1];
    b    = xr[rs2];
    immi = sx({20'd0, in[31:20]}, 12);
    imms = sx({20'd0, in[31:25], in[11:7]}, 12);
    immb = sx({19'd0, in[31], in[7], in[30:25], in[11:8], 1'b0}, 13);
    immu = {in[31:12], 12'd0};
    immj = sx({11'd0, in[31], in[19:12], in[20], in[30:21], 1'b0}, 21);
    r = '{default: 0};
    r.next_pc = ipc + 4;
    case (op)
      7'b0110111: begin r.rf_we = 1; r.rd_val = immu; end
      7'b0010111: begin r.rf_we = 1; r.rd_val = ipc + immu; end
      7'b1101111: begin r.rf_we = 1; r.rd_val = ipc + 4; r.next_pc = ipc + immj; r.is_jal = 1; end
      7'b1100111: begin r.rf_we = 1; r.rd_val = ipc + 4; r.next_pc = a + immi; r.is_jalr = 1; end
      7'b1100011: begin
        r.is_branch = 1;
        case (f3)
          3'b000: r.taken = (a == b);
          3'b001: r.taken = (a != b);
          3'b100: r.taken = ($signed(a) < $signed(b));
          3'b101: r.taken = ($signed(a) >= $signed(b));
          3'b110: r.taken = (a < b);
          3'b111: r.taken = (a >= b);
          default: r.taken = 0;
        endcase
        if (r.taken) r.next_pc = ipc + immb;
      end
      7'b0000011: begin
        ea = a + immi;
        ld = {dmb[(ea + 3) % DM_BYTES], dmb[(ea + 2) % DM_BYTES],
              dmb[(ea + 1) % DM_BYTES], dmb[ea % DM_BYTES]};
        r.rf_we = 1; r.is_load = 1;
        case (f3)
          3'b000:  r.rd_val = sx(ld, 8);
          3'b001:  r.rd_val = sx(ld, 16);
          3'b100:  r.rd_val = ld & 32'hff;
          3'b101:  r.rd_val = ld & 32'hffff;
          default: r.rd_val = ld;
        endcase
      end
      7'b0100011: begin
        ea = a + imms;
        r.dm_we = 1; r.addr = ea; r.wdata = b; r.is_store = 1;
        dmb[ea % DM_BYTES] = b[7:0];
        if (f3 != 3'b000) dmb[(ea + 1) % DM_BYTES] = b[15:8];
        if (f3 == 3'b010) begin
          dmb[(ea + 2) % DM_BYTES] = b[23:16];
          dmb[(ea + 3) % DM_BYTES] = b[31:24];
        end
      end
      7'b0010011, 7'b0110011: begin
        logic [31:0] y, bb;
        bb = (op == 7'b0010011) ? immi : b;
        case (f3)
          3'b000: y = (op == 7'b0110011 && in[30]) ? a - bb : a + bb;
          3'b001: y = a << bb[4:0];
          3'b010: y = ($signed(a) < $signed(bb)) ? 1 : 0;
          3'b011: y = (a < bb) ? 1 : 0;
          3'b100: y = a ^ bb;
          3'b101: y = in[30] ? 32'($signed(a) >>> bb[4:0]) : a >> bb[4:0];
          3'b110: y = a | bb;
          default: y = a & bb;
        endcase
        r.rf_we = 1; r.rd_val = y;
      end
      default: ;
    endcase
    r.rd = 5'(rd);
    if (rd == 0) r.rf_we = 0;
    if (r.rf_we) xr[rd] = r.rd_val;
    ipc = r.next_pc;
    return r;
  endfunction

endpackage
