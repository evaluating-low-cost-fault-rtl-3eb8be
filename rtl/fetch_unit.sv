// fetch_unit -- program counter and fetch stage.
//
// Each cycle the unit reads WIDTH consecutive instructions at the PC from the
// instruction memory and, unless the next stage stalls it, latches them with
// their PCs and predicted next PCs into the fetch register that decode and
// dispatch read. The branch_predictor marks slots predicted taken; the group
// is cut after the first of them and fetch continues at its predicted
// target. A group is also cut after a HALT, and fetching then pauses until a
// redirect. fire_o/fire_slot_o tell the predictor which slots were latched.
// redirect_i, raised by the RUU when it commits a mispredicted control
// instruction or detects a fault, empties the fetch register and restarts at
// redirect_pc_i in the next cycle; it overrides stall_i. Reset starts
// fetching at address 0 once start_i is high.
module fetch_unit
  import ft_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start_i,
  input  logic   stall_i,
  input  logic   redirect_i,
  input  pc_t    redirect_pc_i,
  output pc_t    imem_pc_o,
  input  instr_t imem_instr_i [WIDTH],
  input  logic   pred_taken_i [WIDTH],
  input  pc_t    pred_target_i[WIDTH],
  output logic   fire_o,
  output logic   fire_slot_o  [WIDTH],
  output logic   grp_valid_o  [WIDTH],
  output instr_t grp_instr_o  [WIDTH],
  output pc_t    grp_pc_o     [WIDTH],
  output pc_t    grp_pnpc_o   [WIDTH]
);
  pc_t  pc_q;
  logic paused_q;
  logic take [WIDTH];

  assign imem_pc_o = pc_q;

  // Slots up to and including the first HALT or predicted-taken slot are
  // taken; next_pc follows the prediction.
  logic   halt_in;
  pc_t    next_pc;
  pc_t    pnpc [WIDTH];
  always_comb begin
    logic seen_cut;
    seen_cut      = 1'b0;
    halt_in       = 1'b0;
    next_pc       = pc_q;
    for (int i = 0; i < int'(WIDTH); i++) begin
      take[i] = !seen_cut;
      pnpc[i] = pred_taken_i[i] ? pred_target_i[i] : pc_q + pc_t'(i) + pc_t'(1);
      if (take[i]) begin
        next_pc = pnpc[i];
        if (pred_taken_i[i]) seen_cut = 1'b1;
        if (imem_instr_i[i][31:26] == 6'(OP_HALT)) begin
          seen_cut = 1'b1;
          halt_in  = 1'b1;
        end
      end
    end
  end

  assign fire_o = start_i && !paused_q && !stall_i && !redirect_i;
  always_comb for (int i = 0; i < int'(WIDTH); i++) fire_slot_o[i] = take[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q     <= '0;
      paused_q <= 1'b0;
      for (int i = 0; i < int'(WIDTH); i++) begin
        grp_valid_o[i] <= 1'b0;
        grp_instr_o[i] <= '0;
        grp_pc_o[i]    <= '0;
        grp_pnpc_o[i]  <= '0;
      end
    end else if (redirect_i) begin
      pc_q     <= redirect_pc_i;
      paused_q <= 1'b0;
      for (int i = 0; i < int'(WIDTH); i++) grp_valid_o[i] <= 1'b0;
    end else if (!stall_i) begin
      if (start_i && !paused_q) begin
        for (int i = 0; i < int'(WIDTH); i++) begin
          grp_valid_o[i] <= take[i];
          grp_instr_o[i] <= imem_instr_i[i];
          grp_pc_o[i]    <= pc_q + pc_t'(i);
          grp_pnpc_o[i]  <= pnpc[i];
        end
        pc_q <= next_pc;
        if (halt_in) paused_q <= 1'b1;
      end else begin
        for (int i = 0; i < int'(WIDTH); i++) grp_valid_o[i] <= 1'b0;
      end
    end
  end
endmodule
