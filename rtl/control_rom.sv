// control_rom: ROM-based controller of the RV32I datapath.
//
// The nine instruction bits that tell the RV32I instructions apart,
// inst[30], inst[14:12] and inst[6:2], together with the branch
// comparator's BrEq and BrLT form an 11-bit address into a 2048-word ROM.
// Each 15-bit word is the control word of rv32i_pkg::ctrl_t:
// {PCSel, ImmSel[2:0], BrUn, ASel, BSel, ALUSel[3:0], MemRW, RegWEn,
// WBSel[1:0]}. The address layout and word width follow the classic
// ROM-controller picture of this datapath. The ROM contents are computed
// at elaboration by rv32i_pkg::control_word, which writes out the control
// table (don't-care entries as 0); PCSel is jump OR (branch AND
// condition). The read is combinational.
//
// Only PCSel depends on BrEq and BrLT; the other fields are the same in all
// four BrEq/BrLT columns of the table. BrUn feeds the branch comparator that
// produces BrEq and BrLT, so a single lookup would form a combinational
// loop through the address. The ROM is therefore read twice: the
// instruction's row with BrEq = BrLT = 0 gives every field but PCSel, and
// the full address gives PCSel. The contents are one table either way.
module control_rom
  import rv32i_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        br_eq,
  input  logic        br_lt,
  output ctrl_t       ctrl
);

  localparam int unsigned DEPTH = 2048;

  typedef logic [DEPTH-1:0][$bits(ctrl_t)-1:0] rom_t;

  function automatic rom_t build_rom();
    rom_t r;
    for (int i = 0; i < DEPTH; i++) r[i] = control_word(11'(i));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  ctrl_t row_word;
  ctrl_t full_word;

  assign row_word  = ctrl_t'(ROM[rom_addr(inst, 1'b0, 1'b0)]);
  assign full_word = ctrl_t'(ROM[rom_addr(inst, br_eq, br_lt)]);

  always_comb begin
    ctrl        = row_word;
    ctrl.pc_sel = full_word.pc_sel;
  end

endmodule
