// dmem: data memory (DMEM) of the RV32I datapath.
//
// A WORDS x 32-bit array with a combinational read port (DataR) and a
// write port that writes at the rising clock edge when MemRW = 1 (write);
// MemRW = 0 is a passive read. funct3 (inst[14:12] of the load or store)
// gives the access size and, for loads, the extension:
//   000 lb/sb, 001 lh/sh, 010 lw/sw, 100 lbu, 101 lhu.
// The byte lanes are picked by addr[1:0]; accesses must be naturally
// aligned. Addresses wrap modulo the memory size. The funct3 input, the
// alignment rule and the 1024-word default size are this design's choices;
// the datapath figure shows only Addr, DataW, DataR and MemRW.
module dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] data_w,
  input  logic        mem_rw,
  input  logic [2:0]  funct3,
  output logic [31:0] data_r
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;
  logic [31:0]   word;
  logic [31:0]   shifted;
  logic [31:0]   wdata;
  logic [3:0]    wstrb;

  assign widx = addr[AW+1:2];
  assign word = mem[widx];

  // Load: shift the addressed lane down, then extend.
  always_comb begin
    shifted = word >> {addr[1:0], 3'b000};
    unique case (funct3)
      3'b000:  data_r = {{24{shifted[7]}}, shifted[7:0]};
      3'b001:  data_r = {{16{shifted[15]}}, shifted[15:0]};
      3'b100:  data_r = {24'd0, shifted[7:0]};
      3'b101:  data_r = {16'd0, shifted[15:0]};
      default: data_r = word;
    endcase
  end

  // Store: replicate the data across the lanes and enable the right bytes.
  always_comb begin
    unique case (funct3[1:0])
      2'b00: begin
        wdata = {4{data_w[7:0]}};
        wstrb = 4'b0001 << addr[1:0];
      end
      2'b01: begin
        wdata = {2{data_w[15:0]}};
        wstrb = addr[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        wdata = data_w;
        wstrb = 4'b1111;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (mem_rw) begin
      for (int i = 0; i < 4; i++) begin
        if (wstrb[i]) mem[widx][8*i +: 8] <= wdata[8*i +: 8];
      end
    end
  end

endmodule
