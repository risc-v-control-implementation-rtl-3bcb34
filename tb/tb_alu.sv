// tb_alu: self-checking test of the ALU.
// Drives directed corner cases and random operands through every ALUSel
// value and compares with results computed here from 64-bit arithmetic.
module tb_alu;
  import rv32i_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  alu_sel_e    sel;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  alu dut (.a(a), .b(b), .alu_sel(sel), .y(y));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(alu_sel_e s, logic [31:0] x, logic [31:0] z);
    longint sxl, szl;
    sxl = longint'($signed(x));
    szl = longint'($signed(z));
    case (s)
      ALU_ADD:   return 32'(64'(x) + 64'(z));
      ALU_SUB:   return 32'(64'(x) - 64'(z));
      ALU_SLL:   return 32'(64'(x) << z[4:0]);
      ALU_SLT:   return (sxl < szl) ? 32'd1 : 32'd0;
      ALU_SLTU:  return (64'(x) < 64'(z)) ? 32'd1 : 32'd0;
      ALU_XOR:   return (x | z) & ~(x & z);
      ALU_SRL:   return 32'(64'(x) >> z[4:0]);
      ALU_SRA:   return 32'(sxl >>> z[4:0]);
      ALU_OR:    return ~(~x & ~z);
      ALU_AND:   return ~(~x | ~z);
      ALU_PASSB: return z;
      default:   return 32'(64'(x) + 64'(z));
    endcase
  endfunction

  task automatic check(alu_sel_e s, logic [31:0] x, logic [31:0] z);
    logic [31:0] exp;
    a = x; b = z; sel = s;
    @(posedge clk);
    exp = model(s, x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h y=%h exp=%h", s.name(), x, z, y, exp);
    end
  endtask

  alu_sel_e ops [11] = '{ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
                         ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB};
  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000,
                              32'h7fff_ffff, 32'h0000_001f};

  initial begin
    // a few results worked out by hand
    a = 32'd5; b = 32'd7; sel = ALU_SUB; @(posedge clk);
    checks++; if (y !== 32'hffff_fffe) begin failures++; $display("FAIL 5-7"); end
    a = 32'hffff_fff0; b = 32'd4; sel = ALU_SRA; @(posedge clk);
    checks++; if (y !== 32'hffff_ffff) begin failures++; $display("FAIL sra"); end
    a = 32'hffff_fff0; b = 32'd4; sel = ALU_SRL; @(posedge clk);
    checks++; if (y !== 32'h0fff_ffff) begin failures++; $display("FAIL srl"); end
    a = 32'hffff_ffff; b = 32'd1; sel = ALU_SLT; @(posedge clk);
    checks++; if (y !== 32'd1) begin failures++; $display("FAIL slt"); end
    sel = ALU_SLTU; @(posedge clk);
    checks++; if (y !== 32'd0) begin failures++; $display("FAIL sltu"); end
    foreach (ops[o]) begin
      foreach (corner[i]) foreach (corner[j]) check(ops[o], corner[i], corner[j]);
      for (int r = 0; r < 300; r++) check(ops[o], $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
