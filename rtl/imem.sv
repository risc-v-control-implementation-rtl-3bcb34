// imem: instruction memory (IMEM) of the RV32I datapath.
//
// A WORDS x 32-bit array read combinationally: inst = mem[addr[..:2]], so
// the instruction at the PC is available in the same cycle, as the
// single-cycle datapath needs. The two low address bits are ignored and
// addresses wrap modulo the memory size. A clocked load port
// (load_we/load_addr/load_data, word addressed) fills the memory with a
// program; it is this design's addition, as is the 1024-word default size.
module imem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  output logic [31:0]              inst,
  input  logic                     load_we,
  input  logic [$clog2(WORDS)-1:0] load_addr,
  input  logic [31:0]              load_data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign inst = mem[addr[AW+1:2]];

endmodule
