// tb_pipe_reg: self-checking test of a pipeline register.
// Uses the ID/EX struct: checks the reset value, and that every clock edge
// moves d to q one cycle later, with q held between edges.
module tb_pipe_reg;
  import rv32i_pkg::*;

  logic   clk = 1'b0, rst;
  id_ex_t d, q, prev;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  pipe_reg #(.T(id_ex_t), .RESET_VAL(ID_EX_RESET)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    d = '{pc: $urandom, rs1: $urandom, rs2: $urandom, inst: $urandom};
    @(posedge clk); #1;
    checks++;
    if (q !== ID_EX_RESET || q.inst !== 32'h0000_0013) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int r = 0; r < 1000; r++) begin
      prev = d;
      @(posedge clk); #1;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL cycle %0d", r); end
      d = '{pc: $urandom, rs1: $urandom, rs2: $urandom, inst: $urandom};
      #3;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL hold %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
