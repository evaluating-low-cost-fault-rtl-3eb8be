// instr_mem -- instruction storage feeding the fetch stage.
//
// Stands in for the level-1 instruction cache with a flat memory of the same
// 128 KB capacity (WORDS 32-bit instructions) that always hits: tags, the
// 2-way organisation, misses and the level-2 backup are not modelled. WIDTH
// consecutive instructions starting at pc_i are read combinationally each
// cycle; addresses wrap around the memory. One write port loads programs.
// Contents are not reset.
module instr_mem
  import ft_pkg::*;
#(
  parameter int unsigned WORDS = 32768,
  parameter int unsigned WIDTH = 4
) (
  input  logic   clk,
  input  pc_t    pc_i,
  output instr_t instr_o [WIDTH],
  input  logic   we_i,
  input  pc_t    waddr_i,
  input  instr_t wdata_i
);
  localparam int unsigned AW = $clog2(WORDS);
  instr_t mem [WORDS];

  always_comb begin
    for (int i = 0; i < int'(WIDTH); i++) begin
      logic [AW-1:0] a;
      a = AW'(pc_i + pc_t'(i));
      instr_o[i] = mem[a];
    end
  end

  always_ff @(posedge clk) begin
    if (we_i) mem[AW'(waddr_i)] <= wdata_i;
  end
endmodule
