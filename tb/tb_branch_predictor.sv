// tb_branch_predictor -- self-checking test of the gshare / BTB / return
// stack predictor at its default sizes.
//
// Each cycle the bench drives a random fetch group (PCs drawn from a small
// pool so BTB entries hit and sets overflow their four ways), a random
// commit-time update and, now and then, a flush. A behavioural model kept in
// the bench (counter table, history, BTB with round-robin victims, a
// speculative and a committed circular return stack) predicts every slot;
// the direction of every slot and the target of every slot predicted taken
// are compared with the unit's outputs. The bench fires the group the way
// the fetch stage does: slots up to the first predicted-taken one.
// Counts of taken branch, jump and return predictions must be non-zero.
module tb_branch_predictor;
  import ft_pkg::*;

  localparam int W = 4, PHT = 4096, BTBN = 1024, WAYS = 4, SETS = BTBN / WAYS, RAS = 8;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   flush;
  pc_t    pc;
  instr_t instr [W];
  logic   ptk [W];
  pc_t    ptg [W];
  logic   fire;
  logic   fslot [W];
  logic   uv, ulink, utk;
  opcode_e uop;
  pc_t    upc, utgt;

  branch_predictor #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .flush_i(flush),
    .pc_i(pc), .instr_i(instr), .pred_taken_o(ptk), .pred_target_o(ptg),
    .fire_i(fire), .fire_slot_i(fslot),
    .upd_valid_i(uv), .upd_pc_i(upc), .upd_op_i(uop), .upd_link_i(ulink),
    .upd_taken_i(utk), .upd_target_i(utgt)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_br = 0, n_jal = 0, n_jr = 0;

  // ------------------------------------------------------------- model
  int unsigned m_pht [PHT];
  int unsigned m_ghr;
  bit          m_v   [SETS][WAYS];
  pc_t         m_tag [SETS][WAYS];
  pc_t         m_tgt [SETS][WAYS];
  int unsigned m_rr  [SETS];
  pc_t         s_stk [RAS];  int unsigned s_top, s_n;
  pc_t         c_stk [RAS];  int unsigned c_top, c_n;

  function automatic bit btb_find(pc_t p, output pc_t t, output int way);
    int unsigned s = p % SETS;
    for (int w = 0; w < WAYS; w++)
      if (m_v[s][w] && m_tag[s][w] == p / SETS) begin
        t = m_tgt[s][w]; way = w; return 1;
      end
    t = '0; way = -1;
    return 0;
  endfunction

  function automatic void predict(pc_t p, instr_t ins, output bit tk, output pc_t tgt);
    pc_t t; int way; bit hit;
    hit = btb_find(p, t, way);
    tk = 0; tgt = t;
    case (ins[31:26])
      6'(OP_BEQ), 6'(OP_BNE): tk = hit && (m_pht[(p ^ m_ghr) % PHT] >= 2);
      6'(OP_JAL): tk = hit;
      6'(OP_JR): begin tk = (s_n != 0); tgt = s_stk[(s_top + RAS - 1) % RAS]; end
      default: ;
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  pc_t pool [16];

  function automatic instr_t rand_instr();
    int k = $urandom_range(0, 9);
    logic [4:0] rd = ($urandom_range(0, 3) == 0) ? 5'd0 : 5'd31;
    case (k)
      0, 1, 2: return {6'(OP_BEQ), 5'd1, 5'd2, 16'h0};
      3, 4:    return {6'(OP_BNE), 5'd1, 5'd2, 16'h0};
      5, 6:    return {6'(OP_JAL), rd, 5'd0, 16'h0};
      7:       return {6'(OP_JR), 5'd0, 5'd31, 16'h0};
      default: return {6'(OP_ADD), 5'd3, 5'd1, 5'd2, 11'h0};
    endcase
  endfunction

  initial begin
    fork begin #20ms $display("FAIL watchdog"); failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none

    foreach (pool[i]) pool[i] = (i < 10) ? pc_t'($urandom_range(0, 4000)) : pc_t'(pool[i - 10] % SETS + SETS * (i - 9));
    foreach (m_pht[i]) m_pht[i] = 1;
    m_ghr = 0; s_top = 0; s_n = 0; c_top = 0; c_n = 0;
    foreach (m_v[s, w]) begin m_v[s][w] = 0; m_tag[s][w] = '0; m_tgt[s][w] = '0; end
    foreach (m_rr[s]) m_rr[s] = 0;
    foreach (s_stk[r]) begin s_stk[r] = '0; c_stk[r] = '0; end

    flush = 0; pc = '0; fire = 0; uv = 0; ulink = 0; utk = 0; uop = OP_NOP; upc = '0; utgt = '0;
    for (int i = 0; i < W; i++) begin instr[i] = '0; fslot[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit  mtk [W]; pc_t mtg [W];
      bit  cut, push, pop; pc_t push_pc;
      @(negedge clk);
      // fetch group
      pc = pool[$urandom_range(0, 15)] + pc_t'($urandom_range(0, 3));
      for (int i = 0; i < W; i++) instr[i] = rand_instr();
      fire = ($urandom_range(0, 9) < 7);
      // commit update
      uv = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 5))
        0, 1, 2: uop = ($urandom_range(0, 1) != 0) ? OP_BEQ : OP_BNE;
        3, 4:    uop = OP_JAL;
        default: uop = OP_JR;
      endcase
      upc   = pool[$urandom_range(0, 15)] + pc_t'($urandom_range(0, 3));
      ulink = (uop == OP_JAL) && ($urandom_range(0, 3) != 0);
      utk   = (uop == OP_JAL || uop == OP_JR) ? 1'b1 : ($urandom_range(0, 2) != 0);
      utgt  = pc_t'($urandom_range(0, 9999));
      flush = ($urandom_range(0, 19) == 0);

      // model prediction and the fired slots
      cut = 0; push = 0; pop = 0; push_pc = '0;
      for (int i = 0; i < W; i++) begin
        predict(pc + pc_t'(i), instr[i], mtk[i], mtg[i]);
        fslot[i] = !cut;
        if (!cut && mtk[i]) begin
          cut = 1;
          if (fire && instr[i][31:26] == 6'(OP_JAL) && instr[i][25:21] != 0) begin
            push = 1; push_pc = pc + pc_t'(i) + 1;
          end
          if (fire && instr[i][31:26] == 6'(OP_JR)) pop = 1;
        end
      end
      #1;
      for (int i = 0; i < W; i++) begin
        check(ptk[i] == mtk[i], $sformatf("direction slot %0d pc %0d op %0d dut %0d model %0d", i, pc + pc_t'(i), instr[i][31:26], ptk[i], mtk[i]));
        if (mtk[i]) begin
          check(ptg[i] == mtg[i], $sformatf("target slot %0d pc %0d", i, pc + pc_t'(i)));
          case (instr[i][31:26])
            6'(OP_JAL): n_jal++;
            6'(OP_JR):  n_jr++;
            default:    n_br++;
          endcase
        end
      end

      // model state update, as it happens at the coming clock edge
      if (uv) begin
        pc_t t; int way; bit hit;
        if (uop == OP_BEQ || uop == OP_BNE) begin
          int unsigned ix;
          ix = (upc ^ m_ghr) % PHT;
          if (utk && m_pht[ix] < 3) m_pht[ix]++;
          if (!utk && m_pht[ix] > 0) m_pht[ix]--;
          m_ghr = ((m_ghr << 1) | utk) % PHT;
        end
        if (utk && uop != OP_JR) begin
          int unsigned s;
          s = upc % SETS;
          hit = btb_find(upc, t, way);
          if (!hit) begin way = m_rr[s]; m_rr[s] = (m_rr[s] + 1) % WAYS; end
          m_v[s][way] = 1; m_tag[s][way] = upc / SETS; m_tgt[s][way] = utgt;
        end
        if (uop == OP_JAL && ulink) begin
          c_stk[c_top] = upc + 1; c_top = (c_top + 1) % RAS; if (c_n < RAS) c_n++;
        end else if (uop == OP_JR && c_n != 0) begin
          c_top = (c_top + RAS - 1) % RAS; c_n--;
        end
      end
      if (flush) begin
        s_stk = c_stk; s_top = c_top; s_n = c_n;
      end else if (push) begin
        s_stk[s_top] = push_pc; s_top = (s_top + 1) % RAS; if (s_n < RAS) s_n++;
      end else if (pop) begin
        s_top = (s_top + RAS - 1) % RAS; s_n--;
      end
    end

    $display("taken predictions checked: branches=%0d calls/jumps=%0d returns=%0d", n_br, n_jal, n_jr);
    check(n_br > 0, "taken branch predictions seen");
    check(n_jal > 0, "taken jump predictions seen");
    check(n_jr > 0, "return predictions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
