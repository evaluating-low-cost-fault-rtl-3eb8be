// rename_table -- maps each architectural integer register to the RUU entry
// that will produce its newest value.
//
// A register whose mapping is invalid lives in the architectural register
// file. RPORTS combinational lookups return {valid, tag}. At the clock edge
// dispatched instructions (WPORTS, in program order, the highest-numbered
// port youngest) map their destination to their new RUU entry; committing
// instructions clear the mapping of their destination if it still names
// their entry and no dispatch in the same cycle remaps it. flush_i clears
// every mapping: recovery always empties the whole RUU, so no checkpoints are
// needed. Register 0 is never mapped. Reset clears the table.
module rename_table
  import ft_pkg::*;
#(
  parameter int unsigned TAGW   = 6,
  parameter int unsigned RPORTS = 8,
  parameter int unsigned WPORTS = 4,
  parameter int unsigned CPORTS = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush_i,
  input  areg_t           raddr_i  [RPORTS],
  output logic            rvalid_o [RPORTS],
  output logic [TAGW-1:0] rtag_o   [RPORTS],
  input  logic            we_i     [WPORTS],
  input  areg_t           wreg_i   [WPORTS],
  input  logic [TAGW-1:0] wtag_i   [WPORTS],
  input  logic            cvalid_i [CPORTS],
  input  areg_t           creg_i   [CPORTS],
  input  logic [TAGW-1:0] ctag_i   [CPORTS]
);
  logic            mvalid [NAREGS];
  logic [TAGW-1:0] mtag   [NAREGS];

  always_comb begin
    for (int p = 0; p < int'(RPORTS); p++) begin
      rvalid_o[p] = mvalid[raddr_i[p]] && (raddr_i[p] != '0);
      rtag_o[p]   = mtag[raddr_i[p]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NAREGS; r++) begin
        mvalid[r] <= 1'b0;
        mtag[r]   <= '0;
      end
    end else if (flush_i) begin
      for (int r = 0; r < NAREGS; r++) mvalid[r] <= 1'b0;
    end else begin
      for (int p = 0; p < int'(CPORTS); p++)
        if (cvalid_i[p] && mvalid[creg_i[p]] && mtag[creg_i[p]] == ctag_i[p])
          mvalid[creg_i[p]] <= 1'b0;
      for (int p = 0; p < int'(WPORTS); p++)
        if (we_i[p] && wreg_i[p] != '0) begin
          mvalid[wreg_i[p]] <= 1'b1;
          mtag[wreg_i[p]]   <= wtag_i[p];
        end
    end
  end
endmodule
