// tb_ft_core_8way -- the same end-to-end test as tb_ft_core on the 8-way
// configuration (8 slots, 8 functional units, 4 data ports) with redundant
// load accesses enabled, so that reissued loads repeat their memory access.
//
// Loads the loop program of tb_prog_pkg with N_ITER iterations, runs it to
// HALT and compares every committed instruction (PC, destination, value), in
// order, with the reference model's trace, then compares the stored arrays
// and the sum in data memory. While the program runs, transient faults are
// injected into the functional units at fixed intervals; the check is that
// each is caught by the reissue comparison, that no wrong value is ever
// committed and that the program still ends with the right results. The test
// also requires that every mechanism of the design happened at least once:
// reissue, fault detection with recovery, control redirect at commit, fetch
// steered by a taken prediction, RUU-full
// stall, busy-unit stall, store-to-load forwarding, a load held behind an
// unknown store address, and multiply/divide use.
module tb_ft_core_8way;
  import ft_pkg::*;
  import tb_prog_pkg::*;

  localparam int N_ITER   = 200;
  localparam int WIDTH    = 8;
  localparam int NFU      = 8;
  localparam int MAXCYC   = 200000;
  localparam int INJ_EVERY = 997;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic imem_we = 1'b0; pc_t imem_waddr = '0; instr_t imem_wdata = '0;
  logic dm_we = 1'b0; word_t dm_addr = '0, dm_data = '0;
  word_t dbg_addr = '0, dbg_data;
  logic  inject [NFU];
  word_t inject_mask = '0;
  logic  cm_valid [WIDTH], cm_we [WIDTH];
  areg_t cm_rd [WIDTH];
  word_t cm_value [WIDTH];
  pc_t   cm_pc [WIDTH];
  logic  halted;
  core_stats_t stats;

  ft_core #(.WIDTH(8), .NFU(8), .MPORTS(4), .REDUNDANT_LOAD(1'b1)) dut (
    .clk, .rst_n, .start_i(start),
    .imem_we_i(imem_we), .imem_waddr_i(imem_waddr), .imem_wdata_i(imem_wdata),
    .dmem_ld_we_i(dm_we), .dmem_ld_addr_i(dm_addr), .dmem_ld_data_i(dm_data),
    .dmem_dbg_addr_i(dbg_addr), .dmem_dbg_data_o(dbg_data),
    .inject_i(inject), .inject_mask_i(inject_mask),
    .cm_valid_o(cm_valid), .cm_we_o(cm_we), .cm_rd_o(cm_rd), .cm_value_o(cm_value),
    .cm_pc_o(cm_pc), .halted_o(halted), .stats_o(stats)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ncm = 0;
  int cyc = 0;
  int injected = 0;
  ref_model rm;
  instr_t prog [];
  int plen;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles", MAXCYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // commit trace against the reference model
  always @(posedge clk) if (rst_n && start) begin
    cyc++;
    for (int c = 0; c < WIDTH; c++) if (cm_valid[c]) begin
      if (ncm < rm.n) begin
        check(cm_pc[c] == rm.tr_pc[ncm], $sformatf("commit %0d pc %0d exp %0d", ncm, cm_pc[c], rm.tr_pc[ncm]));
        check(cm_we[c] == rm.tr_we[ncm], $sformatf("commit %0d we", ncm));
        if (rm.tr_we[ncm])
          check(cm_rd[c] == rm.tr_rd[ncm] && cm_value[c] == rm.tr_value[ncm],
                $sformatf("commit %0d pc %0d r%0d=%0h exp r%0d=%0h", ncm, cm_pc[c], cm_rd[c],
                          cm_value[c], rm.tr_rd[ncm], rm.tr_value[ncm]));
      end else begin
        check(1'b0, "commit beyond the end of the trace");
      end
      ncm++;
    end
  end

  // transient faults: flip one bit of a result of one unit now and then
  always @(posedge clk) begin
    for (int f = 0; f < NFU; f++) inject[f] <= 1'b0;
    if (rst_n && start && !halted && cyc > 0 && (cyc % INJ_EVERY) == 0) begin
      inject[injected % NFU] <= 1'b1;
      inject_mask <= word_t'(1) << (injected % 61);
      injected++;
    end
  end

  initial begin
    for (int f = 0; f < NFU; f++) inject[f] = 1'b0;
    plen = build_program(prog, N_ITER);
    rm = new();
    foreach (rm.mem[i]) rm.mem[i] = '0;
    for (int i = 0; i <= N_ITER; i++) rm.mem[(A_BASE >> 3) + i] = a_init(i);
    rm.run(prog, plen);
    $display("reference: %0d instructions", rm.n);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // clear data memory, load a[] and the program
    for (int i = 0; i < DWORDS; i++) begin
      @(negedge clk);
      dm_we = 1'b1; dm_addr = word_t'(i * 8);
      dm_data = (i >= (A_BASE >> 3) && i <= (A_BASE >> 3) + N_ITER) ? a_init(i - (A_BASE >> 3)) : '0;
    end
    @(negedge clk); dm_we = 1'b0;
    for (int i = 0; i < plen; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = pc_t'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 1'b0;
    start = 1'b1;

    wait (halted);
    repeat (2) @(posedge clk);
    check(ncm == rm.n, $sformatf("committed %0d of %0d", ncm, rm.n));
    check(stats.committed == 32'(rm.n), "committed counter");
    for (int i = 0; i < N_ITER; i++) begin
      @(negedge clk); dbg_addr = word_t'(B_BASE) + word_t'(8 * i); #1;
      check(dbg_data == rm.mem[(B_BASE >> 3) + i], $sformatf("b[%0d]", i));
      @(negedge clk); dbg_addr = word_t'(C_BASE) + word_t'(8 * i); #1;
      check(dbg_data == rm.mem[(C_BASE >> 3) + i], $sformatf("c[%0d]", i));
    end
    @(negedge clk); dbg_addr = word_t'(S_ADDR); #1;
    check(dbg_data == rm.mem[S_ADDR >> 3], "sum");

    $display("cycles=%0d committed=%0d IPC=%0d.%02d first-issues=%0d reissues=%0d",
             stats.cycles, stats.committed, stats.committed / stats.cycles,
             (100 * stats.committed / stats.cycles) % 100, stats.dispatched, stats.reissued);
    $display("faults injected=%0d detected=%0d redirects=%0d ruu_full=%0d fu_busy=%0d fwd=%0d mem_wait=%0d reads=%0d",
             injected, stats.faults, stats.mispredicts, stats.ruu_full_stalls,
             stats.fu_busy_stalls, stats.load_forwards, stats.mem_waits, stats.mem_reads);
    check(stats.reissued >= stats.committed, "every committed instruction was reissued");
    check(stats.faults > 0, "fault detection and recovery happened");
    check(stats.mispredicts > 0, "control redirect happened");
    check(stats.ruu_full_stalls > 0, "RUU-full stall happened");
    check(stats.fu_busy_stalls > 0, "busy-unit stall happened");
    check(stats.load_forwards > 0, "store-to-load forwarding happened");
    check(stats.mem_waits > 0, "load held behind unknown store address");
    check(stats.mem_reads > 0, "memory reads happened");
    $display("taken transfers followed on the predicted path=%0d", stats.pred_taken_ok);
    check(stats.pred_taken_ok > 32'(N_ITER), "predictor steered fetch on taken transfers");
    // every committed load read memory twice, unless forwarded
    check(stats.mem_reads + stats.load_forwards >= 32'(3 * 2 * N_ITER), "reissued loads repeated their access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
