// regfile: the 32 x 32-bit integer register file Reg[] of RV32I.
//
// Two combinational read ports (AddrA -> DataA, AddrB -> DataB) and one
// write port (AddrD, DataD) that writes at the rising clock edge when
// RegWEn is high. Register x0 always reads as zero and ignores writes.
// A read in the same cycle as a write to that register returns the old
// value: there is no internal bypass. Synchronous reset clears every
// register (the reset behaviour is this design's choice).
module regfile (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  addr_a,
  input  logic [4:0]  addr_b,
  input  logic [4:0]  addr_d,
  input  logic [31:0] data_d,
  input  logic        reg_wen,
  output logic [31:0] data_a,
  output logic [31:0] data_b
);

  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (reg_wen && addr_d != 5'd0) begin
      regs[addr_d] <= data_d;
    end
  end

  assign data_a = (addr_a == 5'd0) ? 32'd0 : regs[addr_a];
  assign data_b = (addr_b == 5'd0) ? 32'd0 : regs[addr_b];

endmodule
