// tb_add_square_pipe: self-checking test of the pipelined add-then-square
// circuit. Random operands each cycle; the output must equal, one cycle
// later, the square of the truncated sum, computed here in 128-bit
// arithmetic. Also checks the reset value and that the result is not
// available in the same cycle (one cycle of latency).
module tb_add_square_pipe;
  localparam int unsigned W = 32;

  logic           clk = 1'b0, rst;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] y;
  int             checks = 0, failures = 0;

  always #5 clk = ~clk;

  add_square_pipe #(.WIDTH(W)) dut (.clk(clk), .rst(rst), .a(a), .b(b), .y(y));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*W-1:0] model(logic [W-1:0] x, logic [W-1:0] z);
    logic [127:0] s;
    s = 128'(x) + 128'(z);
    s = s % (128'd1 << W);
    return 64'(s * s);
  endfunction

  initial begin
    logic [2*W-1:0] exp;
    rst = 1'b1; a = $urandom; b = $urandom;
    @(posedge clk); #1;
    checks++;
    if (y !== '0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    a = 32'hffff_ffff; b = 32'd3;  // sum wraps to 2: y = 4 after one edge
    #1;
    checks++;
    if (y !== '0) begin failures++; $display("FAIL result appeared before the clock edge"); end
    @(posedge clk); #1;
    checks++;
    if (y !== 64'd4) begin failures++; $display("FAIL wrap y=%h", y); end
    for (int r = 0; r < 2000; r++) begin
      a = $urandom; b = (r % 5 == 0) ? 32'd0 : $urandom;
      exp = model(a, b);
      @(posedge clk); #1;
      checks++;
      if (y !== exp) begin failures++; $display("FAIL a=%h b=%h y=%h exp=%h", a, b, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
