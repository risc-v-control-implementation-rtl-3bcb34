// tb_imem: self-checking test of the instruction memory.
// Loads every word through the load port, then reads them back by byte
// address (ignoring the two low bits) in random order.
module tb_imem;
  localparam int unsigned WORDS = 1024;

  logic        clk = 1'b0;
  logic [31:0] addr, inst, ld_data;
  logic [9:0]  ld_addr;
  logic        ld_we;
  logic [31:0] shadow [WORDS];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  imem #(.WORDS(WORDS)) dut (.clk(clk), .addr(addr), .inst(inst),
                             .load_we(ld_we), .load_addr(ld_addr), .load_data(ld_data));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; ld_we = 1'b0; ld_addr = 0; ld_data = 0;
    for (int i = 0; i < WORDS; i++) begin
      shadow[i] = $urandom;
      ld_we = 1'b1; ld_addr = 10'(i); ld_data = shadow[i];
      @(posedge clk); #1;
    end
    ld_we = 1'b0;
    for (int r = 0; r < 4000; r++) begin
      int w;
      w = int'($urandom % WORDS);
      addr = {20'($urandom), 10'(w), 2'($urandom)};
      #1;
      checks++;
      if (inst !== shadow[w]) begin failures++; $display("FAIL word %0d %h exp %h", w, inst, shadow[w]); end
      @(posedge clk);
    end
    // a write with load_we low must not change memory
    ld_addr = 10'd5; ld_data = ~shadow[5]; @(posedge clk); #1;
    addr = 32'd20; #1;
    checks++;
    if (inst !== shadow[5]) begin failures++; $display("FAIL write without enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
