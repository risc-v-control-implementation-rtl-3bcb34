// tb_branch_comp: self-checking test of the branch comparator.
// Checks BrEq and signed/unsigned BrLT on corner values and random pairs
// against comparisons done here on 33-bit extended operands.
module tb_branch_comp;
  logic        clk = 1'b0;
  logic [31:0] a, b;
  logic        un, eq, lt;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  branch_comp dut (.a(a), .b(b), .br_un(un), .br_eq(eq), .br_lt(lt));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] z, logic u);
    logic [32:0] xe, ze;
    logic        exp_lt;
    a = x; b = z; un = u;
    @(posedge clk);
    // extend by one bit: zero for unsigned, sign for signed, then compare
    // both as signed 33-bit numbers
    xe = u ? {1'b0, x} : {x[31], x};
    ze = u ? {1'b0, z} : {z[31], z};
    exp_lt = $signed(xe) < $signed(ze);
    checks++;
    if (eq !== (x == z) || lt !== exp_lt) begin
      failures++;
      $display("FAIL a=%h b=%h un=%b eq=%b lt=%b exp_lt=%b", x, z, u, eq, lt, exp_lt);
    end
  endtask

  logic [31:0] corner [5] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff};

  initial begin
    foreach (corner[i]) foreach (corner[j]) begin
      check(corner[i], corner[j], 1'b0);
      check(corner[i], corner[j], 1'b1);
    end
    for (int r = 0; r < 1000; r++) begin
      logic [31:0] x;
      x = $urandom;
      check(x, (r % 4 == 0) ? x : $urandom, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
