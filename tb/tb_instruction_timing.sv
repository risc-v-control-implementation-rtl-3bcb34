// tb_instruction_timing: the five-instruction timing example on both
// processors.
//
// Runs add, beq (not taken), lw, sw and jal, the instruction mix of the
// classic single-cycle timing example, on the single-cycle and the
// pipelined processor side by side (riscv_top at its default sizes). A
// short preamble sets up the operands, with NOPs so that the timed group
// itself has no hazards. It measures:
//   * single-cycle: cycles from fetching add to fetching the jal target;
//     expected 5 (CPI = 1), i.e. 5 x 800 ps = 4000 ps;
//   * pipelined: cycles from fetching add to jal's write-back; expected
//     5 + 4 = 9 (one per instruction plus four to fill the pipe), i.e.
//     9 x 200 ps = 1800 ps.
// The 800 ps and 200 ps clock periods are the stage-delay figures of the
// example (longest instruction, and slowest stage); the RTL has no delays.
// The results written by the group (x5, x7, x1 and the stored word) are
// checked on both processors.
module tb_instruction_timing;
  import rv_iss_pkg::*;

  localparam int T_SC_PS = 800;
  localparam int T_PL_PS = 200;

  logic        clk = 1'b0, rst;
  logic        imem_we;
  logic [9:0]  imem_waddr;
  logic [31:0] imem_wdata;
  logic [31:0] sc_pc, sc_inst, sc_rf_wdata, sc_dm_addr, sc_dm_wdata;
  logic        sc_rf_we, sc_dm_we;
  logic [4:0]  sc_rf_waddr;
  logic [31:0] pl_pc_f, pl_rf_wdata, pl_dm_addr, pl_dm_wdata;
  logic        pl_rf_we, pl_dm_we;
  logic [4:0]  pl_rf_waddr;
  logic [4:0][31:0] pl_stage_inst;
  int          checks = 0, failures = 0;
  int          t_start, t_target, t_halt;

  always #5 clk = ~clk;

  riscv_top dut (
    .clk(clk), .rst(rst),
    .sc_imem_we(imem_we), .sc_imem_waddr(imem_waddr), .sc_imem_wdata(imem_wdata),
    .sc_pc(sc_pc), .sc_inst(sc_inst), .sc_rf_we(sc_rf_we), .sc_rf_waddr(sc_rf_waddr),
    .sc_rf_wdata(sc_rf_wdata), .sc_dm_we(sc_dm_we), .sc_dm_addr(sc_dm_addr),
    .sc_dm_wdata(sc_dm_wdata),
    .pl_imem_we(imem_we), .pl_imem_waddr(imem_waddr), .pl_imem_wdata(imem_wdata),
    .pl_pc_f(pl_pc_f), .pl_rf_we(pl_rf_we), .pl_rf_waddr(pl_rf_waddr),
    .pl_rf_wdata(pl_rf_wdata), .pl_dm_we(pl_dm_we), .pl_dm_addr(pl_dm_addr),
    .pl_dm_wdata(pl_dm_wdata), .pl_stage_inst(pl_stage_inst)
  );

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_write(string who, logic we, logic [4:0] rd, logic [31:0] v,
                              logic [4:0] exp_rd, logic [31:0] exp_v);
    checks++;
    if (!we || rd !== exp_rd || v !== exp_v) begin
      failures++;
      $display("FAIL %s write we=%b x%0d=%h exp x%0d=%h", who, we, rd, v, exp_rd, exp_v);
    end
  endtask

  initial begin
    int sc_cycles, pl_cycles, jal_at;
    logic [31:0] start_pc, target_pc;
    rst = 1'b1; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    prog_clear();
    // preamble: x6 = 1, x20 = 0x40, mem[0x40] = 1
    void'(emit(addi(6, 0, 1), 0));
    void'(emit(addi(20, 0, 32'h40), 4));
    void'(emit(enc_s(0, 6, 20, 3'b010), 4));
    // timed group
    t_start = emit(rop("add", 5, 6, 6), 0);               // add  x5, x6, x6
    void'(emit(enc_b(64, 6, 0, 3'b000), 0));              // beq  x6, x0, +64 (not taken)
    void'(emit(enc_i(0, 20, 3'b010, 7, 7'b0000011), 0));  // lw   x7, 0(x20)
    void'(emit(enc_s(4, 6, 20, 3'b010), 0));              // sw   x6, 4(x20)
    jal_at = emit(enc_j(12, 1), 0);                       // jal  x1, +12
    void'(emit(NOP_I, 0));
    void'(emit(NOP_I, 0));
    t_target = emit(HALT_I, 0);
    start_pc  = 32'(t_start * 4);
    target_pc = 32'(t_target * 4);

    for (int i = 0; i < PROG_WORDS; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;

    fork
      begin : single_cycle
        int c;
        c = 0;
        while (sc_pc !== start_pc && c < 100) begin @(negedge clk); c++; end
        sc_cycles = 0;
        while (sc_pc !== target_pc && sc_cycles < 100) begin
          if (sc_inst == rop("add", 5, 6, 6)) expect_write("sc add", sc_rf_we, sc_rf_waddr, sc_rf_wdata, 5, 2);
          if (sc_inst == enc_i(0, 20, 3'b010, 7, 7'b0000011))
            expect_write("sc lw", sc_rf_we, sc_rf_waddr, sc_rf_wdata, 7, 1);
          if (sc_inst == enc_j(12, 1))
            expect_write("sc jal", sc_rf_we, sc_rf_waddr, sc_rf_wdata, 1, 32'(jal_at * 4 + 4));
          if (sc_dm_we) begin
            checks++;
            if (sc_dm_addr !== 32'h44 || sc_dm_wdata !== 32'd1) begin failures++; $display("FAIL sc sw"); end
          end
          @(negedge clk);
          sc_cycles++;
        end
      end
      begin : pipelined
        int c;
        c = 0;
        while (pl_pc_f !== start_pc && c < 100) begin @(negedge clk); c++; end
        pl_cycles = 0;
        forever begin
          @(negedge clk);
          pl_cycles++;
          if (pl_rf_we && pl_rf_waddr == 5'd5) expect_write("pl add", pl_rf_we, pl_rf_waddr, pl_rf_wdata, 5, 2);
          if (pl_rf_we && pl_rf_waddr == 5'd7) expect_write("pl lw", pl_rf_we, pl_rf_waddr, pl_rf_wdata, 7, 1);
          if (pl_dm_we) begin
            checks++;
            if (pl_dm_addr !== 32'h44 || pl_dm_wdata !== 32'd1) begin failures++; $display("FAIL pl sw"); end
          end
          if (pl_rf_we && pl_rf_waddr == 5'd1) begin
            expect_write("pl jal", pl_rf_we, pl_rf_waddr, pl_rf_wdata, 1, 32'(jal_at * 4 + 4));
            pl_cycles++;  // count the write-back cycle itself
            break;
          end
          if (pl_cycles > 100) break;
        end
      end
    join

    $display("single-cycle: 5 instructions in %0d cycles = %0d ps at %0d ps per cycle",
             sc_cycles, sc_cycles * T_SC_PS, T_SC_PS);
    $display("pipelined:    5 instructions in %0d cycles = %0d ps at %0d ps per cycle",
             pl_cycles, pl_cycles * T_PL_PS, T_PL_PS);
    checks++;
    if (sc_cycles != 5) begin failures++; $display("FAIL single-cycle took %0d cycles", sc_cycles); end
    checks++;
    if (pl_cycles != 9) begin failures++; $display("FAIL pipeline took %0d cycles", pl_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
