// tb_ruu -- the register update unit with the real rename table, register
// file, functional units, load/store ports and data memory around it, fed by
// a simple in-order front end written here. It runs random straight-line
// programs (all arithmetic, multiply, divide, loads and stores to a small
// area, with addresses that depend on a divide) and compares the commit
// stream with the reference model. The RUU is kept small (16 entries) so that
// it fills, and the redundant-load variant is enabled so that reissued loads
// repeat their memory access. Faults are injected at random into the units;
// each must be detected and retried without a wrong commit.
module tb_ruu;
  import ft_pkg::*;
  import tb_prog_pkg::*;
  localparam int W = 4, SZ = 16, NF = 4, MP = 2, TW = 4, PLEN = 300, NPROG = 4;

  logic clk = 0, rst_n = 0;
  logic gv [W]; uop_t gu [W]; pc_t gp [W]; pc_t gnp [W]; instr_t gi [W]; logic stall;
  areg_t rfa [2*W]; word_t rfd [2*W]; areg_t rta [2*W]; logic rtv [2*W]; logic [TW-1:0] rtt [2*W];
  logic rtwe [W]; areg_t rtwr [W]; logic [TW-1:0] rtwt [W];
  logic fqv [NF]; fu_req_t fq [NF]; logic [TW-1:0] fqt [NF]; logic fqp [NF]; logic frdy [NF];
  logic frv [NF]; fu_res_t fr [NF]; logic [TW-1:0] frt [NF]; logic frp [NF];
  logic inj [NF]; word_t injm;
  logic mqv [MP]; logic [TW-1:0] mqt [MP]; word_t mqa [MP]; logic mqp [MP]; logic mfv [MP]; word_t mfd [MP];
  logic mrv [MP]; logic [TW-1:0] mrt [MP]; word_t mrd [MP]; logic mrp [MP]; logic mrf [MP];
  word_t dma [MP], dmd [MP];
  logic cv [W], cwe [W]; areg_t crd [W]; word_t cval [W]; pc_t cpc [W]; logic [TW-1:0] ctag [W];
  logic ctv [W];
  logic swe [MP]; word_t swa [MP], swd [MP];
  logic flush, halted; pc_t rpc; core_stats_t stats;
  logic lwe = 0; word_t la = '0, ldat = '0, dbgd;

  ruu #(.WIDTH(W), .SIZE(SZ), .NFU(NF), .MPORTS(MP), .SPORTS(MP), .REDUNDANT_LOAD(1'b1)) dut (
    .clk, .rst_n, .grp_valid_i(gv), .grp_uop_i(gu), .grp_pc_i(gp), .grp_pnpc_i(gnp), .stall_o(stall),
    .rf_raddr_o(rfa), .rf_rdata_i(rfd), .rt_raddr_o(rta), .rt_valid_i(rtv), .rt_tag_i(rtt),
    .rt_we_o(rtwe), .rt_wreg_o(rtwr), .rt_wtag_o(rtwt),
    .fu_req_valid_o(fqv), .fu_req_o(fq), .fu_req_tag_o(fqt), .fu_req_pass2_o(fqp), .fu_ready_i(frdy),
    .fu_res_valid_i(frv), .fu_res_i(fr), .fu_res_tag_i(frt), .fu_res_pass2_i(frp),
    .mem_req_valid_o(mqv), .mem_req_tag_o(mqt), .mem_req_addr_o(mqa), .mem_req_pass2_o(mqp),
    .mem_fwd_valid_o(mfv), .mem_fwd_data_o(mfd), .mem_res_valid_i(mrv), .mem_res_tag_i(mrt),
    .mem_res_data_i(mrd), .mem_res_pass2_i(mrp),
    .cm_valid_o(cv), .cm_we_o(cwe), .cm_rd_o(crd), .cm_value_o(cval), .cm_pc_o(cpc), .cm_tag_o(ctag),
    .st_we_o(swe), .st_addr_o(swa), .st_data_o(swd),
    .bp_upd_valid_o(), .bp_upd_pc_o(), .bp_upd_op_o(), .bp_upd_link_o(), .bp_upd_taken_o(), .bp_upd_target_o(), .flush_o(flush), .redirect_pc_o(rpc),
    .halted_o(halted), .stats_o(stats));
  rename_table #(.TAGW(TW), .RPORTS(2*W), .WPORTS(W), .CPORTS(W)) rt (.clk, .rst_n, .flush_i(flush),
    .raddr_i(rta), .rvalid_o(rtv), .rtag_o(rtt), .we_i(rtwe), .wreg_i(rtwr), .wtag_i(rtwt),
    .cvalid_i(ctv), .creg_i(crd), .ctag_i(ctag));
  always_comb for (int c = 0; c < W; c++) ctv[c] = cv[c] && cwe[c];
  int_regfile #(.RPORTS(2*W), .WPORTS(W)) rf (.clk, .rst_n, .raddr_i(rfa), .rdata_o(rfd),
    .we_i(ctv), .waddr_i(crd), .wdata_i(cval));
  for (genvar f = 0; f < NF; f++) begin : g_fu
    func_unit #(.TAGW(TW)) fu (.clk, .rst_n, .flush_i(flush), .req_valid_i(fqv[f]), .req_i(fq[f]),
      .req_tag_i(fqt[f]), .req_pass2_i(fqp[f]), .ready_o(frdy[f]), .res_valid_o(frv[f]), .res_o(fr[f]),
      .res_tag_o(frt[f]), .res_pass2_o(frp[f]), .inject_i(inj[f]), .inject_mask_i(injm));
  end
  load_store_unit #(.PORTS(MP), .TAGW(TW)) lsu (.clk, .rst_n, .flush_i(flush), .req_valid_i(mqv),
    .req_tag_i(mqt), .req_addr_i(mqa), .req_pass2_i(mqp), .fwd_valid_i(mfv), .fwd_data_i(mfd),
    .mem_addr_o(dma), .mem_data_i(dmd), .res_valid_o(mrv), .res_tag_o(mrt), .res_data_o(mrd),
    .res_pass2_o(mrp), .res_fwd_o(mrf));
  data_mem #(.WORDS(DWORDS), .RPORTS(MP), .WPORTS(MP)) dm (.clk, .raddr_i(dma), .rdata_o(dmd),
    .we_i(swe), .waddr_i(swa), .wdata_i(swd), .ld_we_i(lwe), .ld_addr_i(la), .ld_data_i(ldat),
    .dbg_addr_i('0), .dbg_data_o(dbgd));
  for (genvar i = 0; i < W; i++) begin : g_dec
    decoder dec (.instr_i(gi[i]), .uop_o(gu[i]));
  end

  always #5 clk = ~clk;

  // simple front end: WIDTH sequential slots, cut after HALT
  instr_t prog [];
  instr_t pmem [1024];
  int plen = 0;
  pc_t pc;
  logic run = 0;
  always_comb begin
    logic cut; cut = 0;
    for (int i = 0; i < W; i++) begin
      gi[i] = (int'(pc) + i < plen) ? pmem[(int'(pc) + i) % 1024] : '0;
      gp[i] = pc + pc_t'(i);
      gnp[i] = pc + pc_t'(i) + 1;
      gv[i] = run && !cut && (int'(pc) + i < plen);
      if (gi[i][31:26] == 6'(OP_HALT)) cut = 1;
    end
  end
  always @(posedge clk) begin
    if (flush) pc <= rpc;
    else if (!stall) begin
      int n; n = 0;
      for (int i = 0; i < W; i++) if (gv[i]) n++;
      pc <= pc + pc_t'(n);
    end
  end

  int checks = 0, failures = 0, ncm = 0, inj_n = 0;
  ref_model rm;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endtask

  always @(posedge clk) if (run) begin
    for (int c = 0; c < W; c++) if (cv[c]) begin
      if (ncm < rm.n) begin
        chk(cpc[c] == rm.tr_pc[ncm] && cwe[c] == rm.tr_we[ncm], $sformatf("commit %0d pc %0d exp %0d", ncm, cpc[c], rm.tr_pc[ncm]));
        if (rm.tr_we[ncm]) chk(crd[c] == rm.tr_rd[ncm] && cval[c] == rm.tr_value[ncm], $sformatf("commit %0d value", ncm));
      end else chk(0, "extra commit");
      ncm++;
    end
  end
  always @(posedge clk) begin
    for (int f = 0; f < NF; f++) inj[f] <= 0;
    if (run && $urandom_range(150, 0) == 0) begin
      inj[$urandom_range(NF - 1, 0)] <= 1; injm <= word_t'(1) << $urandom_range(63, 0); inj_n++;
    end
  end

  initial begin repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic void make_prog(int len);
    opcode_e ops [14] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_ADDI, OP_LUI,
                          OP_MUL, OP_DIV, OP_LD, OP_ST};
    prog = new[len + 4];
    prog[0] = enc_i(OP_ADDI, 9, 0, 'h400);
    prog[1] = enc_i(OP_ADDI, 10, 0, 8);
    prog[2] = enc_r(OP_DIV, 8, 9, 10);          // r8 = 0x80, late
    for (int k = 3; k < len + 3; k++) begin
      opcode_e op; int rd, a, b;
      op = ops[$urandom_range(13, 0)];
      if (op inside {OP_LD, OP_ST} || $urandom_range(3, 0) == 0) op = ops[$urandom_range(13, 12)];
      rd = $urandom_range(7, 1); a = $urandom_range(7, 0); b = $urandom_range(7, 0);
      case (op)
        OP_LD, OP_ST: prog[k] = enc_i(op, rd, ($urandom_range(1, 0) == 1) ? 8 : 0, 8 * $urandom_range(15, 0));
        OP_ADDI, OP_LUI: prog[k] = enc_i(op, rd, a, $urandom_range(65535, 0));
        default: prog[k] = enc_r(op, rd, a, b);
      endcase
    end
    prog[len + 3] = enc_i(OP_HALT, 0, 0, 0);
  endfunction

  initial begin
    int tot_faults; tot_faults = 0;
    for (int f = 0; f < NF; f++) inj[f] = 0;
    injm = '0; pc = '0;
    rm = new();
    for (int t = 0; t < NPROG; t++) begin
      make_prog(PLEN);
      foreach (rm.mem[i]) rm.mem[i] = '0;
      rm.run(prog, prog.size());
      plen = prog.size();
      for (int i = 0; i < plen; i++) pmem[i] = prog[i];
      rst_n = 0; run = 0; ncm = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      for (int i = 0; i < 64; i++) begin @(negedge clk); lwe = 1; la = word_t'(i * 8); ldat = '0; end
      @(negedge clk); lwe = 0; pc = '0; run = 1;
      wait (halted);
      @(negedge clk); run = 0;
      chk(ncm == rm.n, $sformatf("program %0d committed %0d of %0d", t, ncm, rm.n));
      $display("program %0d: cycles=%0d committed=%0d reissued=%0d faults=%0d ruu_full=%0d fwd=%0d wait=%0d reads=%0d",
               t, stats.cycles, stats.committed, stats.reissued, stats.faults, stats.ruu_full_stalls,
               stats.load_forwards, stats.mem_waits, stats.mem_reads);
      chk(stats.ruu_full_stalls > 0, "RUU filled");
      chk(stats.reissued >= stats.committed, "all reissued");
      tot_faults += stats.faults;
    end
    chk(tot_faults > 0, "faults detected");
    $display("faults injected=%0d detected=%0d", inj_n, tot_faults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
