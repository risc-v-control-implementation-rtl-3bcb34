// riscv_top: the two RV32I implementations side by side.
//
// u_sc is the single-cycle processor (one instruction per cycle, the clock
// period set by the slowest instruction); u_pl is the five-stage pipelined
// processor built from the same units (one instruction per cycle once the
// pipe is full, a shorter clock period, five cycles of latency, and no
// hazard handling). They share only clock and reset; each has its own
// program-load port and its own trace outputs (sc_* and pl_*), so the same
// program can be run on both and their register and memory writes
// compared. u_as is the separate add-then-square example of circuit
// pipelining (as_* ports); it shares only clock and reset with the
// processors.
module riscv_top #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic                          clk,
  input  logic                          rst,
  // single-cycle processor
  input  logic                          sc_imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] sc_imem_waddr,
  input  logic [31:0]                   sc_imem_wdata,
  output logic [31:0]                   sc_pc,
  output logic [31:0]                   sc_inst,
  output logic                          sc_rf_we,
  output logic [4:0]                    sc_rf_waddr,
  output logic [31:0]                   sc_rf_wdata,
  output logic                          sc_dm_we,
  output logic [31:0]                   sc_dm_addr,
  output logic [31:0]                   sc_dm_wdata,
  // pipelined processor
  input  logic                          pl_imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] pl_imem_waddr,
  input  logic [31:0]                   pl_imem_wdata,
  output logic [31:0]                   pl_pc_f,
  output logic                          pl_rf_we,
  output logic [4:0]                    pl_rf_waddr,
  output logic [31:0]                   pl_rf_wdata,
  output logic                          pl_dm_we,
  output logic [31:0]                   pl_dm_addr,
  output logic [31:0]                   pl_dm_wdata,
  output logic [4:0][31:0]              pl_stage_inst,
  // add-then-square pipelining example
  input  logic [31:0]                   as_a,
  input  logic [31:0]                   as_b,
  output logic [63:0]                   as_y
);

  riscv_single_cycle #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_sc (
    .clk        (clk),
    .rst        (rst),
    .imem_we    (sc_imem_we),
    .imem_waddr (sc_imem_waddr),
    .imem_wdata (sc_imem_wdata),
    .pc         (sc_pc),
    .inst       (sc_inst),
    .rf_we      (sc_rf_we),
    .rf_waddr   (sc_rf_waddr),
    .rf_wdata   (sc_rf_wdata),
    .dm_we      (sc_dm_we),
    .dm_addr    (sc_dm_addr),
    .dm_wdata   (sc_dm_wdata)
  );

  riscv_pipelined #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_pl (
    .clk        (clk),
    .rst        (rst),
    .imem_we    (pl_imem_we),
    .imem_waddr (pl_imem_waddr),
    .imem_wdata (pl_imem_wdata),
    .pc_f       (pl_pc_f),
    .rf_we      (pl_rf_we),
    .rf_waddr   (pl_rf_waddr),
    .rf_wdata   (pl_rf_wdata),
    .dm_we      (pl_dm_we),
    .dm_addr    (pl_dm_addr),
    .dm_wdata   (pl_dm_wdata),
    .stage_inst (pl_stage_inst)
  );

  add_square_pipe #(.WIDTH(32)) u_as (
    .clk (clk),
    .rst (rst),
    .a   (as_a),
    .b   (as_b),
    .y   (as_y)
  );

endmodule
