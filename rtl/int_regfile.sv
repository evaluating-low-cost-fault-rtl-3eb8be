// int_regfile -- architectural integer register file, written only at commit.
//
// NREGS registers of XLEN bits; register 0 always reads zero. RPORTS
// combinational read ports serve operand fetch at dispatch; WPORTS write
// ports take the committing instructions. Writes land at the clock edge, so a
// read in the same cycle still sees the old value (the RUU entry of the
// committing instruction supplies the new one). When several ports write the
// same register in one cycle the highest-numbered port, which carries the
// youngest instruction, wins. Reset clears all registers. Port counts are
// this design's choice: two reads and one write per instruction of the
// dispatch/commit width.
module int_regfile
  import ft_pkg::*;
#(
  parameter int unsigned RPORTS = 8,
  parameter int unsigned WPORTS = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  areg_t raddr_i [RPORTS],
  output word_t rdata_o [RPORTS],
  input  logic  we_i    [WPORTS],
  input  areg_t waddr_i [WPORTS],
  input  word_t wdata_i [WPORTS]
);
  word_t regs [NAREGS];

  always_comb begin
    for (int p = 0; p < int'(RPORTS); p++)
      rdata_o[p] = (raddr_i[p] == '0) ? '0 : regs[raddr_i[p]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NAREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < int'(WPORTS); p++)
        if (we_i[p] && waddr_i[p] != '0) regs[waddr_i[p]] <= wdata_i[p];
    end
  end
endmodule
