// tb_riscv_top: end-to-end test of both processors at default sizes.
//
// The same hazard-free program (the standard test program with four NOPs
// after each instruction and a block of independent instructions) is
// loaded into both processors, which then run side by side from one reset.
// The single-cycle processor is checked in lock-step against the
// instruction-set model (PC, register write and memory write every cycle,
// one instruction per cycle). The pipelined processor must produce the
// model's register and memory writes in the same order, write back its
// first result in its fifth cycle and have five instructions in flight at
// some point. Both must reach the final halt loop. Every mechanism the
// design has is counted and must occur at least once: taken and not-taken
// branches, jal, jalr, loads, stores, the three write-back sources and a
// full pipeline. The add-then-square example beside the processors is fed
// random operands throughout the run, and each result is checked one cycle
// after its operands.
module tb_riscv_top;
  import rv_iss_pkg::*;

  typedef struct { logic [4:0] rd; logic [31:0] v; } rfw_t;
  typedef struct { logic [31:0] a; logic [31:0] d; } dmw_t;

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
  int          n_taken = 0, n_not_taken = 0, n_jal = 0, n_jalr = 0, n_load = 0, n_store = 0;
  int          n_wb_alu = 0, n_full = 0, first_wb = -1, sc_cycles = 0, n_steps = 0;
  rfw_t        rf_exp [$];
  dmw_t        dm_exp [$];
  step_t       trace [$];
  logic [31:0] halt_pc;
  logic [31:0] as_a = '0, as_b = '0;
  logic [63:0] as_y;
  logic        as_run = 1'b0;
  int          n_as = 0;

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
    .pl_dm_wdata(pl_dm_wdata), .pl_stage_inst(pl_stage_inst),
    .as_a(as_a), .as_b(as_b), .as_y(as_y)
  );

  // add-then-square: y after an edge is the square of the 32-bit sum of the
  // operands sampled at that edge
  always @(posedge clk) begin
    logic [31:0] s;
    logic [63:0] e;
    s = as_a + as_b;
    e = 64'(s) * 64'(s);
    #1;
    if (as_run) begin
      checks++;
      n_as++;
      if (as_y !== e) begin failures++; $display("FAIL add_square y=%h exp=%h", as_y, e); end
    end
    @(negedge clk);
    as_a = $urandom; as_b = $urandom;
    as_run = !rst;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sc();
    step_t r;
    int    i;
    i = 0;
    while (i < trace.size()) begin
      @(negedge clk);
      r = trace[i];
      checks++;
      if (sc_rf_we !== r.rf_we || (r.rf_we && (sc_rf_waddr !== r.rd || sc_rf_wdata !== r.rd_val)) ||
          sc_dm_we !== r.dm_we || (r.dm_we && (sc_dm_addr !== r.addr || sc_dm_wdata !== r.wdata))) begin
        failures++;
        $display("FAIL single-cycle step %0d pc %h", i, sc_pc);
      end
      i++;
      sc_cycles++;
    end
    @(negedge clk);
    checks++;
    if (sc_pc !== halt_pc) begin failures++; $display("FAIL single-cycle pc %h", sc_pc); end
  endtask

  task automatic check_pl();
    int cyc, quiet;
    cyc = 0; quiet = 0;
    while (cyc < 20000 && quiet < 12) begin
      @(negedge clk);
      if (pl_stage_inst[0] != NOP_I && pl_stage_inst[1] != NOP_I && pl_stage_inst[2] != NOP_I &&
          pl_stage_inst[3] != NOP_I && pl_stage_inst[4] != NOP_I) n_full++;
      if (pl_rf_we) begin
        rfw_t e;
        if (first_wb < 0) first_wb = cyc;
        checks++;
        if (rf_exp.size() == 0) begin
          failures++; $display("FAIL pipeline unexpected write");
        end else begin
          e = rf_exp.pop_front();
          if (pl_rf_waddr !== e.rd || pl_rf_wdata !== e.v) begin
            failures++;
            $display("FAIL pipeline write x%0d=%h exp x%0d=%h", pl_rf_waddr, pl_rf_wdata, e.rd, e.v);
          end
        end
      end
      if (pl_dm_we) begin
        dmw_t e;
        checks++;
        if (dm_exp.size() == 0) begin
          failures++; $display("FAIL pipeline unexpected store");
        end else begin
          e = dm_exp.pop_front();
          if (pl_dm_addr !== e.a || pl_dm_wdata !== e.d) begin
            failures++; $display("FAIL pipeline store");
          end
        end
      end
      if (rf_exp.size() == 0 && dm_exp.size() == 0) quiet++;
      cyc++;
    end
    checks++;
    if (rf_exp.size() != 0 || dm_exp.size() != 0 || pl_pc_f < halt_pc || pl_pc_f > halt_pc + 8) begin
      failures++;
      $display("FAIL pipeline: %0d writes missing, pc %h", rf_exp.size() + dm_exp.size(), pl_pc_f);
    end
  endtask

  initial begin
    step_t r;
    rst = 1'b1; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    build_test_program(4, 1'b1, 2024);
    iss_reset();
    while (prog[ipc[11:2]] != HALT_I && n_steps < 5000) begin
      r = iss_step();
      n_steps++;
      trace.push_back(r);
      if (r.rf_we) rf_exp.push_back('{rd: r.rd, v: r.rd_val});
      if (r.dm_we) dm_exp.push_back('{a: r.addr, d: r.wdata});
      if (r.is_branch && r.taken) n_taken++;
      if (r.is_branch && !r.taken) n_not_taken++;
      n_jal   += int'(r.is_jal);
      n_jalr  += int'(r.is_jalr);
      n_load  += int'(r.is_load);
      n_store += int'(r.is_store);
      if (r.rf_we && !r.is_load && !r.is_jal && !r.is_jalr) n_wb_alu++;
    end
    halt_pc = ipc;
    for (int i = 0; i < PROG_WORDS; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;
    fork
      check_sc();
      check_pl();
    join
    // single-cycle CPI = 1; pipeline latency of five stages
    checks++;
    if (sc_cycles != n_steps) begin failures++; $display("FAIL sc cycles %0d", sc_cycles); end
    checks++;
    if (first_wb != 4) begin failures++; $display("FAIL pipeline first write-back cycle %0d", first_wb); end
    $display("instructions=%0d taken=%0d not_taken=%0d jal=%0d jalr=%0d load=%0d store=%0d wb_alu=%0d five_in_flight=%0d",
             n_steps, n_taken, n_not_taken, n_jal, n_jalr, n_load, n_store, n_wb_alu, n_full);
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_jal == 0 || n_jalr == 0 || n_load == 0 ||
        n_store == 0 || n_wb_alu == 0 || n_full == 0 || n_as == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
