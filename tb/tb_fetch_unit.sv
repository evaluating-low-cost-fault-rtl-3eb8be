// tb_fetch_unit -- fetch_unit with an instr_mem holding a known pattern:
// checks sequential groups of WIDTH with their PCs, that a stall holds the
// group and the PC, that a group is cut after a HALT and fetch then pauses,
// that a redirect empties the group and restarts at the new PC, and that a
// slot predicted taken ends the group and sends fetch to its target.
module tb_fetch_unit;
  import ft_pkg::*;
  localparam int W = 4, WORDS = 1024;
  logic clk = 0, rst_n = 0, start = 0, stall = 0, redir = 0;
  pc_t rpc = '0, ipc; instr_t iins [W];
  logic gv [W]; instr_t gi [W]; pc_t gp [W]; pc_t gnp [W];
  logic ptk [W]; pc_t ptg [W]; logic fire; logic fslot [W];
  logic we = 0; pc_t wa = '0; instr_t wd = '0;
  int checks = 0, failures = 0;
  fetch_unit #(.WIDTH(W)) dut (.clk, .rst_n, .start_i(start), .stall_i(stall), .redirect_i(redir),
    .redirect_pc_i(rpc), .imem_pc_o(ipc), .imem_instr_i(iins),
    .pred_taken_i(ptk), .pred_target_i(ptg), .fire_o(fire), .fire_slot_o(fslot),
    .grp_valid_o(gv), .grp_instr_o(gi), .grp_pc_o(gp), .grp_pnpc_o(gnp));
  instr_mem #(.WORDS(WORDS), .WIDTH(W)) im (.clk, .pc_i(ipc), .instr_o(iins), .we_i(we), .waddr_i(wa), .wdata_i(wd));
  localparam int HALT_AT = 301;
  function automatic instr_t pat(int i);
    return (i == HALT_AT) ? {6'(OP_HALT), 26'd0} : {6'(OP_ADD), 26'(i)};
  endfunction
  // one slot, at PC 505, is predicted taken to 700
  always_comb for (int i = 0; i < W; i++) begin
    ptk[i] = (ipc + pc_t'(i) == 505);
    ptg[i] = 700;
  end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  always #5 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int exp_pc;
    for (int i = 0; i < WORDS; i++) begin @(negedge clk); we = 1; wa = pc_t'(i); wd = pat(i); end
    @(negedge clk); we = 0; rst_n = 1;
    @(negedge clk); start = 1;
    exp_pc = 0;
    @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < W; i++) chk(gv[i] && gp[i] == pc_t'(exp_pc + i) && gi[i] == pat(exp_pc + i), $sformatf("seq group at %0d", exp_pc));
      if (n % 5 == 2) begin
        stall = 1; @(negedge clk); @(negedge clk); stall = 0;
        for (int i = 0; i < W; i++) chk(gv[i] && gp[i] == pc_t'(exp_pc + i), "held during stall");
      end
      exp_pc += W;
      @(negedge clk);
    end
    // redirect next to the HALT: group is cut after it, then fetch pauses
    redir = 1; rpc = pc_t'(HALT_AT - 2); @(negedge clk); redir = 0;
    for (int i = 0; i < W; i++) chk(!gv[i], "empty after redirect");
    @(negedge clk);
    for (int i = 0; i < W; i++) chk(gv[i] == (i <= 2) && (!gv[i] || gp[i] == pc_t'(HALT_AT - 2 + i)), "cut after HALT");
    repeat (3) begin @(negedge clk); for (int i = 0; i < W; i++) chk(!gv[i], "paused after HALT"); end
    redir = 1; rpc = 500; @(negedge clk); redir = 0;
    @(negedge clk);
    for (int i = 0; i < W; i++) chk(gv[i] && gp[i] == pc_t'(500 + i) && gi[i] == pat(500 + i) && gnp[i] == gp[i] + 1, "restart after redirect");
    @(negedge clk);
    for (int i = 0; i < W; i++) chk(gv[i] == (i <= 1) && (!gv[i] || gp[i] == pc_t'(504 + i)), "cut after predicted-taken slot");
    chk(gnp[1] == 700 && gnp[0] == 505, "predicted next PCs");
    @(negedge clk);
    for (int i = 0; i < W; i++) chk(gv[i] && gp[i] == pc_t'(700 + i), "fetch continues at predicted target");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
