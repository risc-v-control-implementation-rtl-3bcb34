// tb_imm_gen: self-checking test of the immediate generator.
// Random immediates are encoded into instruction words here, field by
// field from the RV32I formats, and the generator must recover them.
module tb_imm_gen;
  import rv32i_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] inst, imm;
  imm_sel_e    sel;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  imm_gen dut (.inst(inst[31:7]), .imm_sel(sel), .imm(imm));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(imm_sel_e s, logic [31:0] word, logic [31:0] exp);
    inst = word; sel = s;
    @(posedge clk);
    checks++;
    if (imm !== exp) begin
      failures++;
      $display("FAIL %s inst=%h imm=%h exp=%h", s.name(), word, imm, exp);
    end
  endtask

  initial begin
    logic [31:0] v, w;
    int          n;
    for (int r = 0; r < 500; r++) begin
      // I: 12-bit signed
      n = int'($urandom % 4096) - 2048;
      w = {12'(n), 13'($urandom), 7'b0010011};
      check(IMM_I, w, 32'(n));
      // S
      n = int'($urandom % 4096) - 2048;
      v = 32'(n);
      w = {v[11:5], 10'($urandom), 3'b010, v[4:0], 7'b0100011};
      check(IMM_S, w, 32'(n));
      // B: even, 13-bit signed
      n = (int'($urandom % 4096) - 2048) * 2;
      v = 32'(n);
      w = {v[12], v[10:5], 13'($urandom), v[4:1], v[11], 7'b1100011};
      check(IMM_B, w, 32'(n));
      // U
      v = $urandom;
      w = {v[31:12], 5'($urandom), 7'b0110111};
      check(IMM_U, w, {v[31:12], 12'd0});
      // J: even, 21-bit signed
      n = (int'($urandom % 1048576) - 524288) * 2;
      v = 32'(n);
      w = {v[20], v[10:1], v[11], v[19:12], 5'($urandom), 7'b1101111};
      check(IMM_J, w, 32'(n));
    end
    // hand-worked: beq with offset -4 is 0xfe000ee3
    check(IMM_B, 32'hfe00_0ee3, 32'hffff_fffc);
    // jal x0, 0 has a zero offset
    check(IMM_J, 32'h0000_006f, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
