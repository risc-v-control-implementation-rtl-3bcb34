// tb_riscv_single_cycle: runs the standard RV32I test program on the
// single-cycle processor in lock-step with the instruction-set model.
// Every cycle the PC, the register write (enable, rd, value) and the memory
// write (enable, address, data) must match the model's step, and the PC
// must move to the model's next PC at the next edge: one instruction per
// cycle (CPI = 1). The program is run with two random seeds. Taken and
// not-taken branches, jal, jalr, loads and stores are counted and must all
// occur.
module tb_riscv_single_cycle;
  import rv_iss_pkg::*;

  logic        clk = 1'b0, rst;
  logic        imem_we;
  logic [9:0]  imem_waddr;
  logic [31:0] imem_wdata;
  logic [31:0] pc, inst, rf_wdata, dm_addr, dm_wdata;
  logic        rf_we, dm_we;
  logic [4:0]  rf_waddr;
  int          checks = 0, failures = 0;
  int          n_taken = 0, n_not_taken = 0, n_jal = 0, n_jalr = 0, n_load = 0, n_store = 0;

  always #5 clk = ~clk;

  riscv_single_cycle dut (
    .clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .inst(inst), .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dm_we(dm_we), .dm_addr(dm_addr), .dm_wdata(dm_wdata)
  );

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_program(int unsigned seed);
    step_t r;
    int    cycles, steps;
    build_test_program(0, 1'b0, seed);
    rst = 1'b1;
    for (int i = 0; i < PROG_WORDS; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;
    iss_reset();
    cycles = 0; steps = 0;
    while (prog[ipc[11:2]] != HALT_I && cycles < 5000) begin
      @(negedge clk);
      checks++;
      if (pc !== ipc) begin
        failures++;
        $display("FAIL pc %h exp %h", pc, ipc);
        break;
      end
      r = iss_step();
      steps++;
      checks++;
      if (rf_we !== r.rf_we || (r.rf_we && (rf_waddr !== r.rd || rf_wdata !== r.rd_val))) begin
        failures++;
        $display("FAIL rf at pc %h inst %h: we=%b x%0d=%h exp we=%b x%0d=%h",
                 pc, inst, rf_we, rf_waddr, rf_wdata, r.rf_we, r.rd, r.rd_val);
      end
      checks++;
      if (dm_we !== r.dm_we || (r.dm_we && (dm_addr !== r.addr || dm_wdata !== r.wdata))) begin
        failures++;
        $display("FAIL dm at pc %h: we=%b %h<=%h exp we=%b %h<=%h",
                 pc, dm_we, dm_addr, dm_wdata, r.dm_we, r.addr, r.wdata);
      end
      if (r.is_branch && r.taken) n_taken++;
      if (r.is_branch && !r.taken) n_not_taken++;
      n_jal   += int'(r.is_jal);
      n_jalr  += int'(r.is_jalr);
      n_load  += int'(r.is_load);
      n_store += int'(r.is_store);
      @(posedge clk);
      cycles++;
    end
    // CPI = 1: one model step per clock cycle, and the halt reached
    checks++;
    if (cycles != steps || prog[ipc[11:2]] != HALT_I) begin
      failures++;
      $display("FAIL cycles=%0d steps=%0d", cycles, steps);
    end
    #1;
    checks++;
    if (pc !== ipc) begin failures++; $display("FAIL final pc %h exp %h", pc, ipc); end
    $display("seed %0d: %0d instructions in %0d cycles", seed, steps, cycles);
  endtask

  initial begin
    rst = 1'b1; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    run_program(1);
    run_program(77);
    $display("taken=%0d not_taken=%0d jal=%0d jalr=%0d load=%0d store=%0d",
             n_taken, n_not_taken, n_jal, n_jalr, n_load, n_store);
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_jal == 0 || n_jalr == 0 || n_load == 0 || n_store == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
