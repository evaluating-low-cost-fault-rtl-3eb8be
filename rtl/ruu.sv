// ruu -- register update unit with reissue-based detection of transient
// faults.
//
// The RUU is a SIZE-entry circular instruction window that renames, wakes up,
// selects, holds results and commits in program order. On top of this normal
// out-of-order operation every instruction is executed twice:
//
//  * First pass. An entry whose operands are ready is issued, oldest first, to
//    any free universal functional unit. Its result is broadcast to waiting
//    consumers and also kept in the entry. A load first computes its address
//    in a functional unit and then reads memory through a load/store port,
//    once no older store has an unknown address; an older store to the same
//    word forwards its data.
//  * Reissue. An instruction becomes ready for commitment when it and every
//    older instruction in the window have their first outcome and no older
//    control instruction has turned out to redirect. Such an instruction is
//    issued a second time from the operand values it kept, competing for the
//    same units (oldest first, so reissues are preferred). Because all its
//    dependences are resolved it can go whenever a unit is free.
//  * Check. The second outcome is compared with the held one in a
//    result_comparator. With REDUNDANT_LOAD = 0 a reissued load repeats only
//    its address calculation and only the address is compared; with
//    REDUNDANT_LOAD = 1 it also repeats the memory access and compares the
//    data.
//  * Commit. Up to WIDTH checked entries retire per cycle from the head,
//    writing the register file and, for stores (at most SPORTS per cycle),
//    the data memory. At most one control instruction commits per cycle; it
//    trains the branch predictor (bp_upd_*). An entry whose outcomes differ is not committed: the
//    fault is treated like a misspeculation, the whole window and the
//    in-flight work are flushed and fetch restarts at the faulty
//    instruction, which then executes twice again. A committed control
//    instruction whose next PC differs from the one the front end predicted
//    flushes and redirects in the same way (the branch recovery the fault
//    recovery reuses). A committed HALT stops the core.
//
// Timing: a result broadcast in cycle t lets a consumer issue in cycle t+1.
// Dispatch takes a whole fetch group or nothing (stall_o). Recovery by full
// flush and resolution of mispredictions at commit are this design's choices; the
// reissue, the comparison, the load variant and the retry-on-mismatch follow
// the mechanism it implements.
module ruu
  import ft_pkg::*;
#(
  parameter int unsigned WIDTH          = 4,
  parameter int unsigned SIZE           = 64,
  parameter int unsigned NFU            = 4,
  parameter int unsigned MPORTS         = 2,
  parameter int unsigned SPORTS         = 2,
  parameter bit          REDUNDANT_LOAD = 1'b0,
  localparam int unsigned TAGW          = $clog2(SIZE)
) (
  input  logic            clk,
  input  logic            rst_n,
  // dispatch (decoded fetch group, slots filled from 0)
  input  logic            grp_valid_i [WIDTH],
  input  uop_t            grp_uop_i   [WIDTH],
  input  pc_t             grp_pc_i    [WIDTH],
  input  pc_t             grp_pnpc_i  [WIDTH],
  output logic            stall_o,
  // operand sources
  output areg_t           rf_raddr_o  [2*WIDTH],
  input  word_t           rf_rdata_i  [2*WIDTH],
  output areg_t           rt_raddr_o  [2*WIDTH],
  input  logic            rt_valid_i  [2*WIDTH],
  input  logic [TAGW-1:0] rt_tag_i    [2*WIDTH],
  output logic            rt_we_o     [WIDTH],
  output areg_t           rt_wreg_o   [WIDTH],
  output logic [TAGW-1:0] rt_wtag_o   [WIDTH],
  // functional units
  output logic            fu_req_valid_o [NFU],
  output fu_req_t         fu_req_o       [NFU],
  output logic [TAGW-1:0] fu_req_tag_o   [NFU],
  output logic            fu_req_pass2_o [NFU],
  input  logic            fu_ready_i     [NFU],
  input  logic            fu_res_valid_i [NFU],
  input  fu_res_t         fu_res_i       [NFU],
  input  logic [TAGW-1:0] fu_res_tag_i   [NFU],
  input  logic            fu_res_pass2_i [NFU],
  // load/store ports
  output logic            mem_req_valid_o [MPORTS],
  output logic [TAGW-1:0] mem_req_tag_o   [MPORTS],
  output word_t           mem_req_addr_o  [MPORTS],
  output logic            mem_req_pass2_o [MPORTS],
  output logic            mem_fwd_valid_o [MPORTS],
  output word_t           mem_fwd_data_o  [MPORTS],
  input  logic            mem_res_valid_i [MPORTS],
  input  logic [TAGW-1:0] mem_res_tag_i   [MPORTS],
  input  word_t           mem_res_data_i  [MPORTS],
  input  logic            mem_res_pass2_i [MPORTS],
  // commit
  output logic            cm_valid_o [WIDTH],
  output logic            cm_we_o    [WIDTH],
  output areg_t           cm_rd_o    [WIDTH],
  output word_t           cm_value_o [WIDTH],
  output pc_t             cm_pc_o    [WIDTH],
  output logic [TAGW-1:0] cm_tag_o   [WIDTH],
  output logic            st_we_o    [SPORTS],
  output word_t           st_addr_o  [SPORTS],
  output word_t           st_data_o  [SPORTS],
  // predictor training (one committed control instruction per cycle)
  output logic            bp_upd_valid_o,
  output pc_t             bp_upd_pc_o,
  output opcode_e         bp_upd_op_o,
  output logic            bp_upd_link_o,
  output logic            bp_upd_taken_o,
  output pc_t             bp_upd_target_o,
  // recovery and status
  output logic            flush_o,
  output pc_t             redirect_pc_o,
  output logic            halted_o,
  output core_stats_t     stats_o
);
  localparam int unsigned NB = NFU + MPORTS;   // result broadcast buses

  // ---------------------------------------------------------------- entries
  logic            e_valid [SIZE];
  rstate_e         e_st    [SIZE];
  uop_t            e_uop   [SIZE];
  pc_t             e_pc    [SIZE];
  pc_t             e_pnpc  [SIZE];   // next PC the front end predicted
  logic            e_rdy1  [SIZE];
  logic            e_rdy2  [SIZE];
  logic [TAGW-1:0] e_tag1  [SIZE];
  logic [TAGW-1:0] e_tag2  [SIZE];
  word_t           e_v1    [SIZE];
  word_t           e_v2    [SIZE];
  word_t           e_value [SIZE];
  word_t           e_aux   [SIZE];
  logic            e_fault [SIZE];

  logic [TAGW-1:0] head_q, tail_q;
  logic [TAGW:0]   count_q;
  logic            halted_q;
  core_stats_t     stats_q;

  // A control instruction redirects when its next PC is not the predicted one.
  function automatic logic redirects(input logic is_ctrl, input pc_t pnpc, input word_t aux);
    return is_ctrl && (aux != word_t'(pnpc));
  endfunction

  // ------------------------------------------------------------- broadcasts
  logic            bc_valid [NB];
  logic [TAGW-1:0] bc_tag   [NB];
  word_t           bc_value [NB];

  always_comb begin
    for (int f = 0; f < int'(NFU); f++) begin
      bc_tag[f]   = fu_res_tag_i[f];
      bc_value[f] = fu_res_i[f].value;
      bc_valid[f] = fu_res_valid_i[f] && !fu_res_pass2_i[f] &&
                    e_uop[fu_res_tag_i[f]].writes_rd && !e_uop[fu_res_tag_i[f]].is_load;
    end
    for (int p = 0; p < int'(MPORTS); p++) begin
      bc_tag[NFU+p]   = mem_res_tag_i[p];
      bc_value[NFU+p] = mem_res_data_i[p];
      bc_valid[NFU+p] = mem_res_valid_i[p] && !mem_res_pass2_i[p] &&
                        e_uop[mem_res_tag_i[p]].writes_rd;
    end
  end

  // ----------------------------------------------------------------- commit
  logic [TAGW:0]   n_commit;
  logic            cm_flush;
  pc_t             cm_redirect;
  logic            cm_halt, cm_fault, cm_mispredict, cm_pred_ok;

  always_comb begin
    logic stop;
    int unsigned n_st;
    pc_t seq;
    seq           = '0;
    stop          = 1'b0;
    n_st          = 0;
    n_commit      = '0;
    cm_flush      = 1'b0;
    cm_redirect   = '0;
    cm_halt       = 1'b0;
    cm_fault      = 1'b0;
    cm_mispredict = 1'b0;
    cm_pred_ok    = 1'b0;
    bp_upd_valid_o  = 1'b0;
    bp_upd_pc_o     = '0;
    bp_upd_op_o     = OP_NOP;
    bp_upd_link_o   = 1'b0;
    bp_upd_taken_o  = 1'b0;
    bp_upd_target_o = '0;
    for (int s = 0; s < int'(SPORTS); s++) begin
      st_we_o[s] = 1'b0; st_addr_o[s] = '0; st_data_o[s] = '0;
    end
    for (int c = 0; c < int'(WIDTH); c++) begin
      logic [TAGW-1:0] idx;
      idx = head_q + TAGW'(c);
      cm_valid_o[c] = 1'b0;
      cm_we_o[c]    = 1'b0;
      cm_rd_o[c]    = e_uop[idx].rd;
      cm_value_o[c] = e_value[idx];
      cm_pc_o[c]    = e_pc[idx];
      cm_tag_o[c]   = idx;
      if (!stop && (c < int'(count_q)) && e_valid[idx] && e_st[idx] == S_DONE2) begin
        if (e_fault[idx]) begin
          cm_flush    = 1'b1;
          cm_fault    = 1'b1;
          cm_redirect = e_pc[idx];
          stop        = 1'b1;
        end else if (e_uop[idx].is_store && n_st == SPORTS) begin
          stop = 1'b1;
        end else begin
          cm_valid_o[c] = 1'b1;
          cm_we_o[c]    = e_uop[idx].writes_rd;
          n_commit      = n_commit + 1'b1;
          if (e_uop[idx].is_store) begin
            st_we_o[n_st]   = 1'b1;
            st_addr_o[n_st] = e_aux[idx];
            st_data_o[n_st] = e_value[idx];
            n_st++;
          end
          if (e_uop[idx].is_ctrl) begin
            seq             = e_pc[idx] + pc_t'(1);
            bp_upd_valid_o  = 1'b1;
            bp_upd_pc_o     = e_pc[idx];
            bp_upd_op_o     = e_uop[idx].op;
            bp_upd_link_o   = e_uop[idx].writes_rd;
            bp_upd_taken_o  = (pc_t'(e_aux[idx]) != seq);
            bp_upd_target_o = pc_t'(e_aux[idx]);
            stop            = 1'b1;          // one predictor update per cycle
            if (redirects(1'b1, e_pnpc[idx], e_aux[idx])) begin
              cm_flush      = 1'b1;
              cm_mispredict = 1'b1;
              cm_redirect   = pc_t'(e_aux[idx]);
            end else if (pc_t'(e_aux[idx]) != seq) begin
              cm_pred_ok    = 1'b1;
            end
          end
          if (e_uop[idx].is_halt) begin
            cm_flush    = 1'b1;
            cm_halt     = 1'b1;
            cm_redirect = e_pc[idx] + pc_t'(1);
            stop        = 1'b1;
          end
        end
      end else begin
        stop = 1'b1;
      end
    end
  end

  assign flush_o       = cm_flush;
  assign redirect_pc_o = cm_redirect;
  assign halted_o      = halted_q;
  assign stats_o       = stats_q;

  // --------------------------------------------------------------- dispatch
  logic [TAGW:0] n_in;
  logic          do_dispatch;
  logic          d_rdy  [WIDTH][2];
  logic [TAGW-1:0] d_tag [WIDTH][2];
  word_t         d_val  [WIDTH][2];

  always_comb begin
    n_in = '0;
    for (int i = 0; i < int'(WIDTH); i++) if (grp_valid_i[i]) n_in = n_in + 1'b1;
    stall_o     = (n_in > (TAGW+1)'(SIZE) - count_q) || cm_flush || halted_q;
    do_dispatch = (n_in != '0) && !stall_o;

    for (int i = 0; i < int'(WIDTH); i++) begin
      rf_raddr_o[2*i]   = grp_uop_i[i].rs1;
      rf_raddr_o[2*i+1] = grp_uop_i[i].rs2;
      rt_raddr_o[2*i]   = grp_uop_i[i].rs1;
      rt_raddr_o[2*i+1] = grp_uop_i[i].rs2;
      rt_we_o[i]        = do_dispatch && grp_valid_i[i] && grp_uop_i[i].writes_rd;
      rt_wreg_o[i]      = grp_uop_i[i].rd;
      rt_wtag_o[i]      = tail_q + TAGW'(i);
    end

    for (int i = 0; i < int'(WIDTH); i++) begin
      for (int s = 0; s < 2; s++) begin
        areg_t r;
        logic  used, in_grp;
        logic [TAGW-1:0] ptag;
        r    = (s == 0) ? grp_uop_i[i].rs1 : grp_uop_i[i].rs2;
        used = (s == 0) ? grp_uop_i[i].uses_rs1 : grp_uop_i[i].uses_rs2;
        d_rdy[i][s] = 1'b1;
        d_tag[i][s] = '0;
        d_val[i][s] = '0;
        in_grp      = 1'b0;
        ptag        = '0;
        if (used && r != '0) begin
          for (int j = 0; j < i; j++)
            if (grp_valid_i[j] && grp_uop_i[j].writes_rd && grp_uop_i[j].rd == r) begin
              in_grp = 1'b1;
              ptag   = tail_q + TAGW'(j);
            end
          if (in_grp) begin
            d_rdy[i][s] = 1'b0;
            d_tag[i][s] = ptag;
          end else if (rt_valid_i[2*i+s]) begin
            ptag        = rt_tag_i[2*i+s];
            d_tag[i][s] = ptag;
            if (e_st[ptag] >= S_DONE1) begin
              d_val[i][s] = e_value[ptag];
            end else begin
              d_rdy[i][s] = 1'b0;
              for (int b = 0; b < int'(NB); b++)
                if (bc_valid[b] && bc_tag[b] == ptag) begin
                  d_rdy[i][s] = 1'b1;
                  d_val[i][s] = bc_value[b];
                end
            end
          end else begin
            d_val[i][s] = rf_rdata_i[2*i+s];
          end
        end
      end
    end
  end

  // ------------------------------------------------ functional unit select
  logic [TAGW-1:0] sel_idx [NFU];
  logic            fu_stall_ev;

  always_comb begin
    logic [TAGW-1:0] pick [NFU];
    int unsigned nfree, nsel, j;
    logic prefix_ok;
    nfree = 0;
    for (int f = 0; f < int'(NFU); f++) if (fu_ready_i[f]) nfree++;
    nsel        = 0;
    prefix_ok   = 1'b1;
    fu_stall_ev = 1'b0;
    for (int f = 0; f < int'(NFU); f++) pick[f] = '0;
    for (int k = 0; k < int'(SIZE); k++) begin
      logic [TAGW-1:0] idx;
      logic cand;
      idx  = head_q + TAGW'(k);
      cand = 1'b0;
      if (k < int'(count_q)) begin
        cand = (e_st[idx] == S_WAIT && e_rdy1[idx] && e_rdy2[idx]) ||
               (e_st[idx] == S_DONE1 && prefix_ok);
        if (cand) begin
          if (nsel < nfree) begin
            pick[nsel] = idx;
            nsel++;
          end else begin
            fu_stall_ev = 1'b1;
          end
        end
        prefix_ok = prefix_ok && (e_st[idx] >= S_DONE1) &&
                    !redirects(e_uop[idx].is_ctrl, e_pnpc[idx], e_aux[idx]);
      end
    end
    j = 0;
    for (int f = 0; f < int'(NFU); f++) begin
      logic [TAGW-1:0] idx;
      fu_req_valid_o[f] = 1'b0;
      idx               = '0;
      if (fu_ready_i[f] && j < nsel) begin
        fu_req_valid_o[f] = !cm_flush;
        idx               = pick[j];
        j++;
      end
      sel_idx[f]           = idx;
      fu_req_tag_o[f]      = idx;
      fu_req_pass2_o[f]    = (e_st[idx] == S_DONE1);
      fu_req_o[f].op       = e_uop[idx].op;
      fu_req_o[f].a        = e_v1[idx];
      fu_req_o[f].b        = e_v2[idx];
      fu_req_o[f].imm      = e_uop[idx].imm;
      fu_req_o[f].pc       = e_pc[idx];
    end
  end

  // ------------------------------------------------------ memory port select
  logic [TAGW-1:0] msel_idx [MPORTS];
  logic            mem_wait_ev;

  always_comb begin
    int unsigned nm;
    logic unknown_st;
    logic [TAGW:0] mk [MPORTS];
    nm          = 0;
    unknown_st  = 1'b0;
    mem_wait_ev = 1'b0;
    for (int p = 0; p < int'(MPORTS); p++) begin
      mem_req_valid_o[p] = 1'b0;
      msel_idx[p]        = '0;
      mk[p]              = '0;
    end
    for (int k = 0; k < int'(SIZE); k++) begin
      logic [TAGW-1:0] idx;
      idx = head_q + TAGW'(k);
      if (k < int'(count_q)) begin
        if (e_st[idx] == S_MEMQ1 || e_st[idx] == S_MEMQ2) begin
          if (unknown_st) begin
            mem_wait_ev = 1'b1;
          end else if (nm < MPORTS) begin
            mem_req_valid_o[nm] = !cm_flush;
            msel_idx[nm]        = idx;
            mk[nm]              = (TAGW+1)'(k);
            nm++;
          end
        end
        if (e_uop[idx].is_store && e_st[idx] < S_DONE1) unknown_st = 1'b1;
      end
    end
    // Forward from the youngest older store to the same word.
    for (int p = 0; p < int'(MPORTS); p++) begin
      logic [TAGW-1:0] li;
      li                 = msel_idx[p];
      mem_req_tag_o[p]   = li;
      mem_req_addr_o[p]  = e_aux[li];
      mem_req_pass2_o[p] = (e_st[li] == S_MEMQ2);
      mem_fwd_valid_o[p] = 1'b0;
      mem_fwd_data_o[p]  = '0;
      for (int k = 0; k < int'(SIZE); k++) begin
        logic [TAGW-1:0] si;
        si = head_q + TAGW'(k);
        if ((TAGW+1)'(k) < mk[p] && e_uop[si].is_store && e_st[si] >= S_DONE1 &&
            e_aux[si][XLEN-1:3] == e_aux[li][XLEN-1:3]) begin
          mem_fwd_valid_o[p] = 1'b1;
          mem_fwd_data_o[p]  = e_value[si];
        end
      end
    end
  end

  // ------------------------------------------------------------- comparators
  logic fu_mismatch  [NFU];
  logic mem_mismatch [MPORTS];

  for (genvar f = 0; f < int'(NFU); f++) begin : g_fcmp
    fu_res_t first;
    assign first.value = e_value[fu_res_tag_i[f]];
    assign first.aux   = e_aux[fu_res_tag_i[f]];
    result_comparator u_cmp (
      .first_i     (first),
      .second_i    (fu_res_i[f]),
      .cmp_value_i (!e_uop[fu_res_tag_i[f]].is_load),
      .cmp_aux_i   (1'b1),
      .fault_o     (fu_mismatch[f])
    );
  end

  for (genvar p = 0; p < int'(MPORTS); p++) begin : g_mcmp
    fu_res_t first, second;
    assign first.value  = e_value[mem_res_tag_i[p]];
    assign first.aux    = '0;
    assign second.value = mem_res_data_i[p];
    assign second.aux   = '0;
    result_comparator u_cmp (
      .first_i     (first),
      .second_i    (second),
      .cmp_value_i (1'b1),
      .cmp_aux_i   (1'b0),
      .fault_o     (mem_mismatch[p])
    );
  end

  // ------------------------------------------------------------- state update
  logic [31:0] n_first_iss, n_re_iss, n_fwd, n_mrd;
  always_comb begin
    n_first_iss = '0;
    n_re_iss    = '0;
    n_fwd       = '0;
    n_mrd       = '0;
    for (int f = 0; f < int'(NFU); f++)
      if (fu_req_valid_o[f]) begin
        if (fu_req_pass2_o[f]) n_re_iss++;
        else                   n_first_iss++;
      end
    for (int p = 0; p < int'(MPORTS); p++)
      if (mem_req_valid_o[p]) begin
        if (mem_fwd_valid_o[p]) n_fwd++;
        else                    n_mrd++;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q   <= '0;
      tail_q   <= '0;
      count_q  <= '0;
      halted_q <= 1'b0;
      stats_q  <= '0;
      for (int e = 0; e < int'(SIZE); e++) begin
        e_valid[e] <= 1'b0;
        e_st[e]    <= S_WAIT;
        e_uop[e]   <= '0;
        e_pc[e]    <= '0;
        e_pnpc[e]  <= '0;
        e_rdy1[e]  <= 1'b0;
        e_rdy2[e]  <= 1'b0;
        e_tag1[e]  <= '0;
        e_tag2[e]  <= '0;
        e_v1[e]    <= '0;
        e_v2[e]    <= '0;
        e_value[e] <= '0;
        e_aux[e]   <= '0;
        e_fault[e] <= 1'b0;
      end
    end else begin
      // statistics
      stats_q.cycles          <= stats_q.cycles + 1;
      stats_q.committed       <= stats_q.committed + 32'(n_commit);
      stats_q.dispatched      <= stats_q.dispatched + n_first_iss;
      stats_q.reissued        <= stats_q.reissued + n_re_iss;
      stats_q.faults          <= stats_q.faults + 32'(cm_fault);
      stats_q.mispredicts     <= stats_q.mispredicts + 32'(cm_mispredict);
      stats_q.ruu_full_stalls <= stats_q.ruu_full_stalls +
                                 32'((n_in != '0) && !cm_flush && !halted_q &&
                                     (n_in > (TAGW+1)'(SIZE) - count_q));
      stats_q.load_forwards   <= stats_q.load_forwards + n_fwd;
      stats_q.mem_waits       <= stats_q.mem_waits + 32'(mem_wait_ev);
      stats_q.fu_busy_stalls  <= stats_q.fu_busy_stalls + 32'(fu_stall_ev);
      stats_q.mem_reads       <= stats_q.mem_reads + n_mrd;
      stats_q.pred_taken_ok   <= stats_q.pred_taken_ok + 32'(cm_pred_ok);
      if (cm_halt) halted_q <= 1'b1;

      if (cm_flush) begin
        head_q  <= '0;
        tail_q  <= '0;
        count_q <= '0;
        for (int e = 0; e < int'(SIZE); e++) begin
          e_valid[e] <= 1'b0;
          e_st[e]    <= S_WAIT;
        end
      end else begin
        // wakeup
        for (int e = 0; e < int'(SIZE); e++)
          for (int b = 0; b < int'(NB); b++) if (bc_valid[b]) begin
            if (!e_rdy1[e] && e_tag1[e] == bc_tag[b]) begin
              e_rdy1[e] <= 1'b1;
              e_v1[e]   <= bc_value[b];
            end
            if (!e_rdy2[e] && e_tag2[e] == bc_tag[b]) begin
              e_rdy2[e] <= 1'b1;
              e_v2[e]   <= bc_value[b];
            end
          end
        // issue to functional units
        for (int f = 0; f < int'(NFU); f++)
          if (fu_req_valid_o[f])
            e_st[sel_idx[f]] <= (e_st[sel_idx[f]] == S_DONE1) ? S_EXEC2 : S_EXEC1;
        // issue to memory ports
        for (int p = 0; p < int'(MPORTS); p++)
          if (mem_req_valid_o[p])
            e_st[msel_idx[p]] <= (e_st[msel_idx[p]] == S_MEMQ2) ? S_MEM2 : S_MEM1;
        // functional unit results
        for (int f = 0; f < int'(NFU); f++)
          if (fu_res_valid_i[f]) begin
            logic [TAGW-1:0] t;
            t = fu_res_tag_i[f];
            if (!fu_res_pass2_i[f]) begin
              e_aux[t] <= fu_res_i[f].aux;
              if (e_uop[t].is_load) begin
                e_st[t] <= S_MEMQ1;
              end else begin
                e_value[t] <= fu_res_i[f].value;
                e_st[t]    <= S_DONE1;
              end
            end else begin
              e_fault[t] <= fu_mismatch[f];
              if (REDUNDANT_LOAD && e_uop[t].is_load && !fu_mismatch[f]) e_st[t] <= S_MEMQ2;
              else                                                       e_st[t] <= S_DONE2;
            end
          end
        // memory results
        for (int p = 0; p < int'(MPORTS); p++)
          if (mem_res_valid_i[p]) begin
            logic [TAGW-1:0] t;
            t = mem_res_tag_i[p];
            if (!mem_res_pass2_i[p]) begin
              e_value[t] <= mem_res_data_i[p];
              e_st[t]    <= S_DONE1;
            end else begin
              e_fault[t] <= mem_mismatch[p];
              e_st[t]    <= S_DONE2;
            end
          end
        // retire
        for (int c = 0; c < int'(WIDTH); c++)
          if (cm_valid_o[c]) e_valid[head_q + TAGW'(c)] <= 1'b0;
        // allocate
        if (do_dispatch) begin
          for (int i = 0; i < int'(WIDTH); i++)
            if (grp_valid_i[i]) begin
              logic [TAGW-1:0] t;
              t = tail_q + TAGW'(i);
              e_valid[t] <= 1'b1;
              e_st[t]    <= S_WAIT;
              e_uop[t]   <= grp_uop_i[i];
              e_pc[t]    <= grp_pc_i[i];
              e_pnpc[t]  <= grp_pnpc_i[i];
              e_rdy1[t]  <= d_rdy[i][0];
              e_rdy2[t]  <= d_rdy[i][1];
              e_tag1[t]  <= d_tag[i][0];
              e_tag2[t]  <= d_tag[i][1];
              e_v1[t]    <= d_val[i][0];
              e_v2[t]    <= d_val[i][1];
              e_value[t] <= '0;
              e_aux[t]   <= '0;
              e_fault[t] <= 1'b0;
            end
          tail_q <= tail_q + TAGW'(n_in);
        end
        head_q  <= head_q + TAGW'(n_commit);
        count_q <= count_q + (do_dispatch ? n_in : '0) - n_commit;
      end
    end
  end

  initial assert (SIZE == (1 << TAGW)) else $error("ruu: SIZE must be a power of two");
  // A committed entry must have passed both executions and agreed.
  for (genvar c = 0; c < int'(WIDTH); c++) begin : g_cm_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      cm_valid_o[c] |-> (e_st[head_q + TAGW'(c)] == S_DONE2 && !e_fault[head_q + TAGW'(c)]));
  end
endmodule
