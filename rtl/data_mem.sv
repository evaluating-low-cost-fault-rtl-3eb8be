// data_mem -- data storage behind the load/store ports.
//
// Stands in for the level-1 data cache with a flat memory of the same 128 KB
// capacity (WORDS 64-bit words) that always hits: tags, 2-way organisation,
// misses and the level-2 backup are not modelled. RPORTS combinational read
// ports (one per cache port: 2 for the 4-way core, 4 for the 8-way core) feed
// the load/store unit, which registers the data, giving the one-cycle load
// latency after address calculation. WPORTS write ports take committing
// stores, in program order by port number. A separate write port loads the
// memory before a run and a debug read port lets a test inspect it.
// Addresses are byte addresses; bits [2:0] are ignored and addresses wrap.
// Contents are not reset.
module data_mem
  import ft_pkg::*;
#(
  parameter int unsigned WORDS  = 16384,
  parameter int unsigned RPORTS = 2,
  parameter int unsigned WPORTS = 2
) (
  input  logic  clk,
  input  word_t raddr_i [RPORTS],
  output word_t rdata_o [RPORTS],
  input  logic  we_i    [WPORTS],
  input  word_t waddr_i [WPORTS],
  input  word_t wdata_i [WPORTS],
  input  logic  ld_we_i,
  input  word_t ld_addr_i,
  input  word_t ld_data_i,
  input  word_t dbg_addr_i,
  output word_t dbg_data_o
);
  localparam int unsigned AW = $clog2(WORDS);
  word_t mem [WORDS];

  function automatic logic [AW-1:0] widx(input word_t a);
    return a[AW+2:3];
  endfunction

  always_comb begin
    for (int p = 0; p < int'(RPORTS); p++) rdata_o[p] = mem[widx(raddr_i[p])];
  end
  assign dbg_data_o = mem[widx(dbg_addr_i)];

  always_ff @(posedge clk) begin
    if (ld_we_i) mem[widx(ld_addr_i)] <= ld_data_i;
    for (int p = 0; p < int'(WPORTS); p++)
      if (we_i[p]) mem[widx(waddr_i[p])] <= wdata_i[p];
  end
endmodule
