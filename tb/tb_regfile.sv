// tb_regfile: self-checking test of the register file.
// Random writes and reads on both ports against a shadow copy kept here;
// checks that x0 stays zero, that RegWEn = 0 blocks a write, that a read in
// the cycle of a write returns the old value, and that reset clears.
module tb_regfile;
  logic        clk = 1'b0, rst;
  logic [4:0]  aa, ab, ad;
  logic [31:0] dd, da, db;
  logic        we;
  logic [31:0] shadow [32];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile dut (.clk(clk), .rst(rst), .addr_a(aa), .addr_b(ab), .addr_d(ad),
               .data_d(dd), .reg_wen(we), .data_a(da), .data_b(db));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; aa = 0; ab = 0; ad = 0; dd = 0;
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 32; i++) shadow[i] = 32'd0;
    for (int i = 0; i < 32; i++) begin
      aa = 5'(i); ab = 5'(31 - i); #1;
      checks++;
      if (da !== 32'd0 || db !== 32'd0) begin failures++; $display("FAIL reset x%0d", i); end
    end
    for (int r = 0; r < 3000; r++) begin
      aa = 5'($urandom); ab = 5'($urandom); ad = 5'($urandom); dd = $urandom;
      we = ($urandom % 4) != 0;
      if (r % 7 == 0) aa = ad;  // read the register being written
      #1;
      checks++;
      if (da !== shadow[aa] || db !== shadow[ab]) begin
        failures++;
        $display("FAIL read a x%0d=%h exp %h, b x%0d=%h exp %h", aa, da, shadow[aa], ab, db, shadow[ab]);
      end
      @(posedge clk);
      if (we && ad != 5'd0) shadow[ad] = dd;
      #1;
    end
    // reset clears everything
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0; we = 1'b0;
    for (int i = 0; i < 32; i++) begin
      aa = 5'(i); #1;
      checks++;
      if (da !== 32'd0) begin failures++; $display("FAIL reset2 x%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
