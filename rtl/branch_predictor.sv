// branch_predictor -- control-flow prediction for the fetch stage: a gshare
// two-level direction predictor, a set-associative branch target buffer and
// a return address stack, all trained when instructions commit.
//
// Lookup (combinational) covers the WIDTH slots of the fetch group at pc_i,
// using the raw instruction words to tell control instructions apart:
//  * BEQ/BNE are predicted taken when their 2-bit counter, indexed by
//    pc XOR global history, is in the upper half and the BTB holds a target;
//  * JAL is predicted taken to its BTB target when the BTB hits;
//  * JR is predicted taken to the top of the speculative return stack when
//    that stack is not empty.
// The fetch stage cuts its group after the first predicted-taken slot and
// reports, with fire_i and fire_slot_i, which slots it really took; a taken
// JAL that writes a link register pushes its return address on the
// speculative stack and a taken JR pops it.
//
// Update (one committed control instruction per cycle, upd_*): the counter
// of a conditional branch moves toward its outcome and the global history
// shifts it in; a taken branch or any jump writes its target into the BTB
// (same tag: refresh; otherwise the way named by the set's round-robin
// pointer); committed calls and returns drive a second, committed return
// stack. flush_i (any recovery) copies the committed stack into the
// speculative one. Sizes follow the evaluated machine (4K counters, 1K
// entries in 4 ways, 8 return addresses); history length 12 (= log2 of the
// counter count), commit-time history, round-robin replacement and counters
// reset to weakly not taken are this design's choices.
module branch_predictor
  import ft_pkg::*;
#(
  parameter int unsigned WIDTH       = 4,
  parameter int unsigned PHT_ENTRIES = 4096,
  parameter int unsigned BTB_ENTRIES = 1024,
  parameter int unsigned BTB_WAYS    = 4,
  parameter int unsigned RAS_DEPTH   = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush_i,
  // lookup
  input  pc_t    pc_i,
  input  instr_t instr_i      [WIDTH],
  output logic   pred_taken_o [WIDTH],
  output pc_t    pred_target_o[WIDTH],
  input  logic   fire_i,
  input  logic   fire_slot_i  [WIDTH],
  // commit-time training
  input  logic   upd_valid_i,
  input  pc_t    upd_pc_i,
  input  opcode_e upd_op_i,
  input  logic   upd_link_i,     // JAL that writes a register: a call
  input  logic   upd_taken_i,
  input  pc_t    upd_target_i
);
  localparam int unsigned PHW  = $clog2(PHT_ENTRIES);
  localparam int unsigned SETS = BTB_ENTRIES / BTB_WAYS;
  localparam int unsigned SW   = $clog2(SETS);
  localparam int unsigned WW   = $clog2(BTB_WAYS);
  localparam int unsigned TW   = PCW - SW;
  localparam int unsigned RW   = $clog2(RAS_DEPTH);

  logic [1:0]    pht     [PHT_ENTRIES];
  logic [PHW-1:0] ghr;
  logic          btb_v   [SETS][BTB_WAYS];
  logic [TW-1:0] btb_tag [SETS][BTB_WAYS];
  pc_t           btb_tgt [SETS][BTB_WAYS];
  logic [WW-1:0] btb_rr  [SETS];
  pc_t           sras    [RAS_DEPTH];
  logic [RW:0]   sras_n;
  logic [RW-1:0] sras_top;
  pc_t           cras    [RAS_DEPTH];
  logic [RW:0]   cras_n;
  logic [RW-1:0] cras_top;

  function automatic logic [PHW-1:0] pht_idx(input pc_t pc, input logic [PHW-1:0] h);
    return pc[PHW-1:0] ^ h;
  endfunction

  // ------------------------------------------------------------- lookup
  always_comb begin
    for (int i = 0; i < int'(WIDTH); i++) begin
      pc_t     p;
      opcode_e op;
      logic    hit;
      pc_t     tgt;
      logic [SW-1:0] set;
      p   = pc_i + pc_t'(i);
      op  = opcode_e'(instr_i[i][31:26]);
      set = p[SW-1:0];
      hit = 1'b0;
      tgt = '0;
      for (int w = 0; w < int'(BTB_WAYS); w++)
        if (btb_v[set][w] && btb_tag[set][w] == p[PCW-1:SW]) begin
          hit = 1'b1;
          tgt = btb_tgt[set][w];
        end
      pred_taken_o[i]  = 1'b0;
      pred_target_o[i] = tgt;
      case (op)
        OP_BEQ, OP_BNE: pred_taken_o[i] = hit && pht[pht_idx(p, ghr)][1];
        OP_JAL:         pred_taken_o[i] = hit;
        OP_JR: begin
          pred_taken_o[i]  = (sras_n != '0);
          pred_target_o[i] = sras[sras_top - RW'(1)];
        end
        default: ;
      endcase
    end
  end

  // speculative stack operation of the fired group: its first taken slot
  logic ras_push, ras_pop;
  pc_t  ras_push_pc;
  always_comb begin
    logic done;
    done        = 1'b0;
    ras_push    = 1'b0;
    ras_pop     = 1'b0;
    ras_push_pc = '0;
    for (int i = 0; i < int'(WIDTH); i++)
      if (!done && fire_i && fire_slot_i[i] && pred_taken_o[i]) begin
        done = 1'b1;
        if (instr_i[i][31:26] == 6'(OP_JAL) && instr_i[i][25:21] != '0) begin
          ras_push    = 1'b1;
          ras_push_pc = pc_i + pc_t'(i) + pc_t'(1);
        end
        if (instr_i[i][31:26] == 6'(OP_JR)) ras_pop = 1'b1;
      end
  end

  // --------------------------------------------------------------- update
  logic [SW-1:0] u_set;
  logic          u_hit;
  logic [WW-1:0] u_way;
  logic          u_cond;
  assign u_set  = upd_pc_i[SW-1:0];
  assign u_cond = (upd_op_i == OP_BEQ) || (upd_op_i == OP_BNE);
  always_comb begin
    u_hit = 1'b0;
    u_way = btb_rr[u_set];
    for (int w = 0; w < int'(BTB_WAYS); w++)
      if (btb_v[u_set][w] && btb_tag[u_set][w] == upd_pc_i[PCW-1:SW]) begin
        u_hit = 1'b1;
        u_way = WW'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghr      <= '0;
      sras_n   <= '0;
      sras_top <= '0;
      cras_n   <= '0;
      cras_top <= '0;
      for (int e = 0; e < int'(PHT_ENTRIES); e++) pht[e] <= 2'b01;
      for (int s = 0; s < int'(SETS); s++) begin
        btb_rr[s] <= '0;
        for (int w = 0; w < int'(BTB_WAYS); w++) begin
          btb_v[s][w]   <= 1'b0;
          btb_tag[s][w] <= '0;
          btb_tgt[s][w] <= '0;
        end
      end
      for (int r = 0; r < int'(RAS_DEPTH); r++) begin
        sras[r] <= '0;
        cras[r] <= '0;
      end
    end else begin
      // training at commit
      if (upd_valid_i) begin
        if (u_cond) begin
          logic [PHW-1:0] ix;
          ix = pht_idx(upd_pc_i, ghr);
          if (upd_taken_i && pht[ix] != 2'b11)  pht[ix] <= pht[ix] + 2'b01;
          if (!upd_taken_i && pht[ix] != 2'b00) pht[ix] <= pht[ix] - 2'b01;
          ghr <= {ghr[PHW-2:0], upd_taken_i};
        end
        if (upd_taken_i && upd_op_i != OP_JR) begin
          btb_v[u_set][u_way]   <= 1'b1;
          btb_tag[u_set][u_way] <= upd_pc_i[PCW-1:SW];
          btb_tgt[u_set][u_way] <= upd_target_i;
          if (!u_hit) btb_rr[u_set] <= btb_rr[u_set] + WW'(1);
        end
      end
      // committed return stack (circular; overflow overwrites the oldest)
      if (upd_valid_i && upd_op_i == OP_JAL && upd_link_i) begin
        cras[cras_top] <= upd_pc_i + pc_t'(1);
        cras_top       <= cras_top + RW'(1);
        if (cras_n != (RW+1)'(RAS_DEPTH)) cras_n <= cras_n + 1'b1;
      end else if (upd_valid_i && upd_op_i == OP_JR && cras_n != '0) begin
        cras_top <= cras_top - RW'(1);
        cras_n   <= cras_n - 1'b1;
      end
      // speculative return stack
      if (flush_i) begin
        // the committed stack after this cycle's update
        for (int r = 0; r < int'(RAS_DEPTH); r++) sras[r] <= cras[r];
        sras_top <= cras_top;
        sras_n   <= cras_n;
        if (upd_valid_i && upd_op_i == OP_JAL && upd_link_i) begin
          sras[cras_top] <= upd_pc_i + pc_t'(1);
          sras_top       <= cras_top + RW'(1);
          if (cras_n != (RW+1)'(RAS_DEPTH)) sras_n <= cras_n + 1'b1;
        end else if (upd_valid_i && upd_op_i == OP_JR && cras_n != '0) begin
          sras_top <= cras_top - RW'(1);
          sras_n   <= cras_n - 1'b1;
        end
      end else if (ras_push) begin
        sras[sras_top] <= ras_push_pc;
        sras_top       <= sras_top + RW'(1);
        if (sras_n != (RW+1)'(RAS_DEPTH)) sras_n <= sras_n + 1'b1;
      end else if (ras_pop) begin
        sras_top <= sras_top - RW'(1);
        sras_n   <= sras_n - 1'b1;
      end
    end
  end
endmodule
