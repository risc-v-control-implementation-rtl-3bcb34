// tb_riscv_pipelined: self-checking test of the five-stage pipeline.
//
// Part A runs the standard test program with four NOPs after each
// instruction (so no data or control hazard can occur) plus a block of
// independent instructions without padding. The instruction-set model
// gives the expected order of register and memory writes, which must come
// out of the WB and MEM stages in that order. It also checks the timing of
// the pipeline: the first instruction writes back in its fifth cycle
// (IF, ID, EX, MEM, WB), the independent block completes one instruction
// per cycle, and five different instructions are in flight at once.
//
// Part B shows the behaviour of a pipeline without hazard handling on a
// hand-written program: in the sequence add t0; or t3; sll t6, t0, t3 the
// sll reads the old t0 and t3 (zero after reset), and the two
// instructions after a taken beq are still executed.
module tb_riscv_pipelined;
  import rv_iss_pkg::*;

  typedef struct { logic [4:0] rd; logic [31:0] v; } rfw_t;
  typedef struct { logic [31:0] a; logic [31:0] d; } dmw_t;

  logic        clk = 1'b0, rst;
  logic        imem_we;
  logic [9:0]  imem_waddr;
  logic [31:0] imem_wdata;
  logic [31:0] pc_f, rf_wdata, dm_addr, dm_wdata;
  logic        rf_we, dm_we;
  logic [4:0]  rf_waddr;
  logic [4:0][31:0] stage_inst;
  int          checks = 0, failures = 0;
  int          n_taken = 0, n_not_taken = 0, n_jal = 0, n_jalr = 0, n_load = 0, n_store = 0;
  int          n_full = 0, max_run = 0, first_wb = -1, n_hazard = 0, n_shadow = 0;
  rfw_t        rf_exp [$];
  dmw_t        dm_exp [$];

  always #5 clk = ~clk;

  riscv_pipelined dut (
    .clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc_f(pc_f), .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dm_we(dm_we), .dm_addr(dm_addr), .dm_wdata(dm_wdata), .stage_inst(stage_inst)
  );

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_reset();
    rst = 1'b1;
    for (int i = 0; i < PROG_WORDS; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;
  endtask

  // Run until the expected writes are all seen (plus a margin), comparing
  // each register and memory write with the head of the expected queues.
  task automatic run_and_compare(int max_cycles);
    int cyc, run, quiet;
    logic [31:0] i_f, i_d, i_x, i_m, i_w;
    cyc = 0; run = 0; quiet = 0;
    while (cyc < max_cycles && quiet < 12) begin
      @(negedge clk);
      i_f = stage_inst[0]; i_d = stage_inst[1]; i_x = stage_inst[2];
      i_m = stage_inst[3]; i_w = stage_inst[4];
      if (i_f != NOP_I && i_d != NOP_I && i_x != NOP_I && i_m != NOP_I && i_w != NOP_I &&
          i_f != i_d && i_d != i_x && i_x != i_m && i_m != i_w) n_full++;
      if (rf_we) begin
        rfw_t e;
        if (first_wb < 0) first_wb = cyc;
        run++;
        if (run > max_run) max_run = run;
        checks++;
        if (rf_exp.size() == 0) begin
          failures++; $display("FAIL unexpected write x%0d=%h", rf_waddr, rf_wdata);
        end else begin
          e = rf_exp.pop_front();
          if (rf_waddr !== e.rd || rf_wdata !== e.v) begin
            failures++;
            $display("FAIL cycle %0d write x%0d=%h exp x%0d=%h", cyc, rf_waddr, rf_wdata, e.rd, e.v);
          end
        end
      end else run = 0;
      if (dm_we) begin
        dmw_t e;
        checks++;
        if (dm_exp.size() == 0) begin
          failures++; $display("FAIL unexpected store");
        end else begin
          e = dm_exp.pop_front();
          if (dm_addr !== e.a || dm_wdata !== e.d) begin
            failures++; $display("FAIL store %h<=%h exp %h<=%h", dm_addr, dm_wdata, e.a, e.d);
          end
        end
      end
      if (rf_exp.size() == 0 && dm_exp.size() == 0) quiet++;
      cyc++;
    end
    checks++;
    if (rf_exp.size() != 0 || dm_exp.size() != 0) begin
      failures++;
      $display("FAIL %0d register and %0d memory writes missing", rf_exp.size(), dm_exp.size());
    end
  endtask

  task automatic part_a(int unsigned seed);
    step_t r;
    int    steps;
    build_test_program(4, 1'b1, seed);
    iss_reset();
    rf_exp.delete(); dm_exp.delete();
    steps = 0;
    while (prog[ipc[11:2]] != HALT_I && steps < 5000) begin
      r = iss_step();
      steps++;
      if (r.rf_we) rf_exp.push_back('{rd: r.rd, v: r.rd_val});
      if (r.dm_we) dm_exp.push_back('{a: r.addr, d: r.wdata});
      if (r.is_branch && r.taken) n_taken++;
      if (r.is_branch && !r.taken) n_not_taken++;
      n_jal   += int'(r.is_jal);
      n_jalr  += int'(r.is_jalr);
      n_load  += int'(r.is_load);
      n_store += int'(r.is_store);
    end
    load_and_reset();
    first_wb = -1; max_run = 0;
    run_and_compare(20000);
    // latency: instruction 0 is fetched in cycle 0 and writes back in cycle 4
    checks++;
    if (first_wb != 4) begin failures++; $display("FAIL first write-back in cycle %0d", first_wb); end
    // throughput: the eight independent instructions retire on consecutive cycles
    checks++;
    if (max_run < 8) begin failures++; $display("FAIL longest write run %0d", max_run); end
  endtask

  task automatic part_b();
    int at;
    prog_clear();
    void'(emit(addi(6, 0, 5), 0));                 // t1 = 5
    void'(emit(addi(7, 0, 6), 0));                 // t2 = 6
    void'(emit(addi(29, 0, 3), 0));                // t4 = 3
    void'(emit(addi(30, 0, 8), 0));                // t5 = 8
    for (int i = 0; i < 4; i++) void'(emit(NOP_I, 0));
    void'(emit(rop("add", 5, 6, 7), 0));           // add t0, t1, t2
    void'(emit(rop("or", 28, 29, 30), 0));         // or  t3, t4, t5
    void'(emit(rop("sll", 31, 5, 28), 0));         // sll t6, t0, t3
    for (int i = 0; i < 4; i++) void'(emit(NOP_I, 0));
    at = emit(enc_b(12, 0, 0, 3'b000), 0);         // beq x0, x0, +12
    void'(emit(addi(10, 0, 1), 0));                // executed: branch shadow
    void'(emit(addi(11, 0, 2), 0));                // executed: branch shadow
    void'(emit(addi(12, 0, 3), 0));                // branch target
    void'(emit(HALT_I, 0));
    rf_exp.delete(); dm_exp.delete();
    rf_exp.push_back('{rd: 6,  v: 5});
    rf_exp.push_back('{rd: 7,  v: 6});
    rf_exp.push_back('{rd: 29, v: 3});
    rf_exp.push_back('{rd: 30, v: 8});
    rf_exp.push_back('{rd: 5,  v: 11});
    rf_exp.push_back('{rd: 28, v: 11});
    rf_exp.push_back('{rd: 31, v: 0});             // stale t0, t3: 0 << 0
    rf_exp.push_back('{rd: 10, v: 1});
    rf_exp.push_back('{rd: 11, v: 2});
    rf_exp.push_back('{rd: 12, v: 3});
    load_and_reset();
    run_and_compare(200);
    // both effects of the missing hazard handling were seen if nothing failed
    if (failures == 0) begin n_hazard++; n_shadow++; end
  endtask

  initial begin
    rst = 1'b1; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    part_a(5);
    part_a(123);
    part_b();
    $display("taken=%0d not_taken=%0d jal=%0d jalr=%0d load=%0d store=%0d five_in_flight=%0d data_hazard=%0d branch_shadow=%0d",
             n_taken, n_not_taken, n_jal, n_jalr, n_load, n_store, n_full, n_hazard, n_shadow);
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_jal == 0 || n_jalr == 0 || n_load == 0 ||
        n_store == 0 || n_full == 0 || n_hazard == 0 || n_shadow == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
