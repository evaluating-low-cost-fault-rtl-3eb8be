// ft_core -- out-of-order superscalar core that detects and recovers from
// transient faults in its datapath by executing every committed instruction
// twice.
//
// Organisation (front to back): fetch_unit and instr_mem supply WIDTH
// instructions per cycle along the path branch_predictor (gshare, BTB,
// return stack, trained at commit) predicts; one decoder per slot; dispatch renames through
// rename_table and reads int_regfile into the ruu, a RUU_SIZE-entry register
// update unit; NFU universal func_units execute everything (1 cycle, multiply
// 4, divide 12); loads read data_mem through the MPORTS ports of
// load_store_unit; commit writes int_regfile and data_mem. The ruu reissues
// every instruction that is ready to commit, compares the two outcomes and,
// on a mismatch, flushes and re-executes from the faulty instruction, so the
// retry of a transient fault is invisible to software. The protected part is
// the execution datapath and its control (functional units, issue, address
// calculation); storage is meant to carry parity or ECC, which is not
// modelled. With REDUNDANT_LOAD = 0 (default) a reissued load repeats only
// its address calculation; 1 repeats the memory access too.
//
// Defaults give the 4-way machine: WIDTH 4, 64 RUU entries, 2 data ports.
// The 8-way machine is WIDTH 8, NFU 8, MPORTS 4. The number of functional
// units equal to the width is this design's reading of the machine. Caches
// are replaced by always-hit memories of the L1 capacities; mispredictions
// are resolved when the control instruction commits.
//
// Interface: hold rst_n low, load the program through imem_we_i and data
// through dmem_ld_we_i, then raise start_i. The core runs until it commits
// HALT (halted_o). The commit trace (cm_*) and the event counters (stats_o)
// are for observation; inject_i[f] arms a one-shot bit-flip (inject_mask_i)
// on the next result of functional unit f, a model of a transient fault.
module ft_core
  import ft_pkg::*;
#(
  parameter int unsigned WIDTH          = 4,
  parameter int unsigned RUU_SIZE       = 64,
  parameter int unsigned NFU            = WIDTH,
  parameter int unsigned MPORTS         = WIDTH / 2,
  parameter bit          REDUNDANT_LOAD = 1'b0,
  parameter int unsigned IMEM_WORDS     = 32768,
  parameter int unsigned DMEM_WORDS     = 16384
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        imem_we_i,
  input  pc_t         imem_waddr_i,
  input  instr_t      imem_wdata_i,
  input  logic        dmem_ld_we_i,
  input  word_t       dmem_ld_addr_i,
  input  word_t       dmem_ld_data_i,
  input  word_t       dmem_dbg_addr_i,
  output word_t       dmem_dbg_data_o,
  input  logic        inject_i [NFU],
  input  word_t       inject_mask_i,
  output logic        cm_valid_o [WIDTH],
  output logic        cm_we_o    [WIDTH],
  output areg_t       cm_rd_o    [WIDTH],
  output word_t       cm_value_o [WIDTH],
  output pc_t         cm_pc_o    [WIDTH],
  output logic        halted_o,
  output core_stats_t stats_o
);
  localparam int unsigned TAGW = $clog2(RUU_SIZE);

  // front end
  pc_t    imem_pc;
  instr_t imem_instr [WIDTH];
  logic   grp_valid  [WIDTH];
  instr_t grp_instr  [WIDTH];
  pc_t    grp_pc     [WIDTH];
  uop_t   grp_uop    [WIDTH];
  pc_t    grp_pnpc   [WIDTH];
  logic   bp_taken   [WIDTH];
  pc_t    bp_target  [WIDTH];
  logic   fire;
  logic   fire_slot  [WIDTH];
  logic   bp_upd_valid, bp_upd_link, bp_upd_taken;
  pc_t    bp_upd_pc, bp_upd_target;
  opcode_e bp_upd_op;
  logic   stall, flush, halted;
  pc_t    redirect_pc;

  // operand sources
  areg_t           rf_raddr [2*WIDTH];
  word_t           rf_rdata [2*WIDTH];
  areg_t           rt_raddr [2*WIDTH];
  logic            rt_valid [2*WIDTH];
  logic [TAGW-1:0] rt_tag   [2*WIDTH];
  logic            rt_we    [WIDTH];
  areg_t           rt_wreg  [WIDTH];
  logic [TAGW-1:0] rt_wtag  [WIDTH];
  logic            ct_valid [WIDTH];
  logic [TAGW-1:0] cm_tag   [WIDTH];

  // functional units
  logic            fu_req_valid [NFU];
  fu_req_t         fu_req       [NFU];
  logic [TAGW-1:0] fu_req_tag   [NFU];
  logic            fu_req_pass2 [NFU];
  logic            fu_ready     [NFU];
  logic            fu_res_valid [NFU];
  fu_res_t         fu_res       [NFU];
  logic [TAGW-1:0] fu_res_tag   [NFU];
  logic            fu_res_pass2 [NFU];

  // memory ports
  logic            mem_req_valid [MPORTS];
  logic [TAGW-1:0] mem_req_tag   [MPORTS];
  word_t           mem_req_addr  [MPORTS];
  logic            mem_req_pass2 [MPORTS];
  logic            mem_fwd_valid [MPORTS];
  word_t           mem_fwd_data  [MPORTS];
  logic            mem_res_valid [MPORTS];
  logic [TAGW-1:0] mem_res_tag   [MPORTS];
  word_t           mem_res_data  [MPORTS];
  logic            mem_res_pass2 [MPORTS];
  logic            mem_res_fwd   [MPORTS];
  word_t           dm_raddr      [MPORTS];
  word_t           dm_rdata      [MPORTS];
  logic            st_we         [MPORTS];
  word_t           st_addr       [MPORTS];
  word_t           st_data       [MPORTS];

  fetch_unit #(.WIDTH(WIDTH)) u_fetch (
    .clk, .rst_n,
    .start_i       (start_i && !halted),
    .stall_i       (stall),
    .redirect_i    (flush),
    .redirect_pc_i (redirect_pc),
    .imem_pc_o     (imem_pc),
    .imem_instr_i  (imem_instr),
    .pred_taken_i  (bp_taken),
    .pred_target_i (bp_target),
    .fire_o        (fire),
    .fire_slot_o   (fire_slot),
    .grp_valid_o   (grp_valid),
    .grp_instr_o   (grp_instr),
    .grp_pc_o      (grp_pc),
    .grp_pnpc_o    (grp_pnpc)
  );

  branch_predictor #(.WIDTH(WIDTH)) u_bp (
    .clk, .rst_n,
    .flush_i       (flush),
    .pc_i          (imem_pc),
    .instr_i       (imem_instr),
    .pred_taken_o  (bp_taken),
    .pred_target_o (bp_target),
    .fire_i        (fire),
    .fire_slot_i   (fire_slot),
    .upd_valid_i   (bp_upd_valid),
    .upd_pc_i      (bp_upd_pc),
    .upd_op_i      (bp_upd_op),
    .upd_link_i    (bp_upd_link),
    .upd_taken_i   (bp_upd_taken),
    .upd_target_i  (bp_upd_target)
  );

  instr_mem #(.WORDS(IMEM_WORDS), .WIDTH(WIDTH)) u_imem (
    .clk,
    .pc_i    (imem_pc),
    .instr_o (imem_instr),
    .we_i    (imem_we_i),
    .waddr_i (imem_waddr_i),
    .wdata_i (imem_wdata_i)
  );

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_dec
    decoder u_dec (.instr_i(grp_instr[i]), .uop_o(grp_uop[i]));
  end

  rename_table #(.TAGW(TAGW), .RPORTS(2*WIDTH), .WPORTS(WIDTH), .CPORTS(WIDTH)) u_rename (
    .clk, .rst_n,
    .flush_i  (flush),
    .raddr_i  (rt_raddr),
    .rvalid_o (rt_valid),
    .rtag_o   (rt_tag),
    .we_i     (rt_we),
    .wreg_i   (rt_wreg),
    .wtag_i   (rt_wtag),
    .cvalid_i (ct_valid),
    .creg_i   (cm_rd_o),
    .ctag_i   (cm_tag)
  );

  always_comb begin
    for (int c = 0; c < int'(WIDTH); c++) ct_valid[c] = cm_valid_o[c] && cm_we_o[c];
  end

  int_regfile #(.RPORTS(2*WIDTH), .WPORTS(WIDTH)) u_rf (
    .clk, .rst_n,
    .raddr_i (rf_raddr),
    .rdata_o (rf_rdata),
    .we_i    (ct_valid),
    .waddr_i (cm_rd_o),
    .wdata_i (cm_value_o)
  );

  ruu #(
    .WIDTH(WIDTH), .SIZE(RUU_SIZE), .NFU(NFU), .MPORTS(MPORTS), .SPORTS(MPORTS),
    .REDUNDANT_LOAD(REDUNDANT_LOAD)
  ) u_ruu (
    .clk, .rst_n,
    .grp_valid_i     (grp_valid),
    .grp_uop_i       (grp_uop),
    .grp_pc_i        (grp_pc),
    .grp_pnpc_i      (grp_pnpc),
    .stall_o         (stall),
    .rf_raddr_o      (rf_raddr),
    .rf_rdata_i      (rf_rdata),
    .rt_raddr_o      (rt_raddr),
    .rt_valid_i      (rt_valid),
    .rt_tag_i        (rt_tag),
    .rt_we_o         (rt_we),
    .rt_wreg_o       (rt_wreg),
    .rt_wtag_o       (rt_wtag),
    .fu_req_valid_o  (fu_req_valid),
    .fu_req_o        (fu_req),
    .fu_req_tag_o    (fu_req_tag),
    .fu_req_pass2_o  (fu_req_pass2),
    .fu_ready_i      (fu_ready),
    .fu_res_valid_i  (fu_res_valid),
    .fu_res_i        (fu_res),
    .fu_res_tag_i    (fu_res_tag),
    .fu_res_pass2_i  (fu_res_pass2),
    .mem_req_valid_o (mem_req_valid),
    .mem_req_tag_o   (mem_req_tag),
    .mem_req_addr_o  (mem_req_addr),
    .mem_req_pass2_o (mem_req_pass2),
    .mem_fwd_valid_o (mem_fwd_valid),
    .mem_fwd_data_o  (mem_fwd_data),
    .mem_res_valid_i (mem_res_valid),
    .mem_res_tag_i   (mem_res_tag),
    .mem_res_data_i  (mem_res_data),
    .mem_res_pass2_i (mem_res_pass2),
    .cm_valid_o      (cm_valid_o),
    .cm_we_o         (cm_we_o),
    .cm_rd_o         (cm_rd_o),
    .cm_value_o      (cm_value_o),
    .cm_pc_o         (cm_pc_o),
    .cm_tag_o        (cm_tag),
    .st_we_o         (st_we),
    .st_addr_o       (st_addr),
    .st_data_o       (st_data),
    .bp_upd_valid_o  (bp_upd_valid),
    .bp_upd_pc_o     (bp_upd_pc),
    .bp_upd_op_o     (bp_upd_op),
    .bp_upd_link_o   (bp_upd_link),
    .bp_upd_taken_o  (bp_upd_taken),
    .bp_upd_target_o (bp_upd_target),
    .flush_o         (flush),
    .redirect_pc_o   (redirect_pc),
    .halted_o        (halted),
    .stats_o         (stats_o)
  );

  for (genvar f = 0; f < int'(NFU); f++) begin : g_fu
    func_unit #(.TAGW(TAGW)) u_fu (
      .clk, .rst_n,
      .flush_i       (flush),
      .req_valid_i   (fu_req_valid[f]),
      .req_i         (fu_req[f]),
      .req_tag_i     (fu_req_tag[f]),
      .req_pass2_i   (fu_req_pass2[f]),
      .ready_o       (fu_ready[f]),
      .res_valid_o   (fu_res_valid[f]),
      .res_o         (fu_res[f]),
      .res_tag_o     (fu_res_tag[f]),
      .res_pass2_o   (fu_res_pass2[f]),
      .inject_i      (inject_i[f]),
      .inject_mask_i (inject_mask_i)
    );
  end

  load_store_unit #(.PORTS(MPORTS), .TAGW(TAGW)) u_lsu (
    .clk, .rst_n,
    .flush_i     (flush),
    .req_valid_i (mem_req_valid),
    .req_tag_i   (mem_req_tag),
    .req_addr_i  (mem_req_addr),
    .req_pass2_i (mem_req_pass2),
    .fwd_valid_i (mem_fwd_valid),
    .fwd_data_i  (mem_fwd_data),
    .mem_addr_o  (dm_raddr),
    .mem_data_i  (dm_rdata),
    .res_valid_o (mem_res_valid),
    .res_tag_o   (mem_res_tag),
    .res_data_o  (mem_res_data),
    .res_pass2_o (mem_res_pass2),
    .res_fwd_o   (mem_res_fwd)
  );

  data_mem #(.WORDS(DMEM_WORDS), .RPORTS(MPORTS), .WPORTS(MPORTS)) u_dmem (
    .clk,
    .raddr_i    (dm_raddr),
    .rdata_o    (dm_rdata),
    .we_i       (st_we),
    .waddr_i    (st_addr),
    .wdata_i    (st_data),
    .ld_we_i    (dmem_ld_we_i),
    .ld_addr_i  (dmem_ld_addr_i),
    .ld_data_i  (dmem_ld_data_i),
    .dbg_addr_i (dmem_dbg_addr_i),
    .dbg_data_o (dmem_dbg_data_o)
  );

  assign halted_o = halted;
endmodule
