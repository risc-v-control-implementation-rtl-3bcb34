// tb_dmem: self-checking test of the data memory.
// Random aligned byte, halfword and word stores and loads of every width
// against a byte-array model kept here; MemRW = 0 must leave memory as is.
module tb_dmem;
  localparam int unsigned WORDS = 256;

  logic        clk = 1'b0;
  logic [31:0] addr, dw, dr;
  logic        rw;
  logic [2:0]  f3;
  logic [7:0]  bytes [4 * WORDS];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  dmem #(.WORDS(WORDS)) dut (.clk(clk), .addr(addr), .data_w(dw), .mem_rw(rw),
                             .funct3(f3), .data_r(dr));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(int a, logic [2:0] f, logic [31:0] d);
    addr = 32'(a); dw = d; f3 = f; rw = 1'b1;
    @(posedge clk); #1 rw = 1'b0;
    bytes[a] = d[7:0];
    if (f != 3'b000) bytes[a + 1] = d[15:8];
    if (f == 3'b010) begin bytes[a + 2] = d[23:16]; bytes[a + 3] = d[31:24]; end
  endtask

  task automatic load(int a, logic [2:0] f);
    logic [31:0] exp;
    addr = 32'(a); f3 = f; rw = 1'b0; #1;
    case (f)
      3'b000: exp = {{24{bytes[a][7]}}, bytes[a]};
      3'b001: exp = {{16{bytes[a + 1][7]}}, bytes[a + 1], bytes[a]};
      3'b100: exp = {24'd0, bytes[a]};
      3'b101: exp = {16'd0, bytes[a + 1], bytes[a]};
      default: exp = {bytes[a + 3], bytes[a + 2], bytes[a + 1], bytes[a]};
    endcase
    checks++;
    if (dr !== exp) begin failures++; $display("FAIL load f3=%b addr=%0d %h exp %h", f, a, dr, exp); end
    @(posedge clk);
  endtask

  initial begin
    rw = 1'b0; addr = 0; dw = 0; f3 = 3'b010;
    for (int i = 0; i < WORDS; i++) store(4 * i, 3'b010, $urandom);
    for (int r = 0; r < 3000; r++) begin
      int a;
      logic [2:0] f;
      a = int'($urandom % (4 * WORDS));
      case ($urandom % 3)
        0: f = 3'b000;
        1: begin f = 3'b001; a = a & ~1; end
        default: begin f = 3'b010; a = a & ~3; end
      endcase
      if ($urandom % 2) store(a, f, $urandom);
      else begin
        logic [2:0] lf;
        case ($urandom % 5)
          0: lf = 3'b000; 1: lf = 3'b001; 2: lf = 3'b100; 3: lf = 3'b101; default: lf = 3'b010;
        endcase
        if (lf[1:0] == 2'b01) a = a & ~1;
        if (lf == 3'b010) a = a & ~3;
        load(a, lf);
      end
    end
    // a cycle with MemRW = 0 writes nothing
    addr = 32'd8; dw = 32'hdead_beef; f3 = 3'b010; rw = 1'b0;
    @(posedge clk);
    load(8, 3'b010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
