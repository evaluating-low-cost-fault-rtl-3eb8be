// load_store_unit -- the data-memory ports used by loads.
//
// Loads compute their address in a functional unit; the RUU then hands each
// load whose address is known, and which no older store with an unknown
// address precedes, to one of PORTS memory ports. The port either reads the
// data memory or, when the RUU found an older store to the same word, takes
// that store's data (fwd_valid_i). The data is registered, so it returns one
// cycle after the request, matching the one-cycle load latency after address
// calculation. Stores do not use these ports; they write memory at commit.
// The pass2 flag marks the repeated access of a reissued load, used only when
// redundant load accesses are enabled. flush_i drops the accesses in flight.
module load_store_unit
  import ft_pkg::*;
#(
  parameter int unsigned PORTS = 2,
  parameter int unsigned TAGW  = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush_i,
  input  logic            req_valid_i [PORTS],
  input  logic [TAGW-1:0] req_tag_i   [PORTS],
  input  word_t           req_addr_i  [PORTS],
  input  logic            req_pass2_i [PORTS],
  input  logic            fwd_valid_i [PORTS],
  input  word_t           fwd_data_i  [PORTS],
  output word_t           mem_addr_o  [PORTS],
  input  word_t           mem_data_i  [PORTS],
  output logic            res_valid_o [PORTS],
  output logic [TAGW-1:0] res_tag_o   [PORTS],
  output word_t           res_data_o  [PORTS],
  output logic            res_pass2_o [PORTS],
  output logic            res_fwd_o   [PORTS]
);
  always_comb begin
    for (int p = 0; p < int'(PORTS); p++) mem_addr_o[p] = req_addr_i[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(PORTS); p++) begin
        res_valid_o[p] <= 1'b0;
        res_tag_o[p]   <= '0;
        res_data_o[p]  <= '0;
        res_pass2_o[p] <= 1'b0;
        res_fwd_o[p]   <= 1'b0;
      end
    end else begin
      for (int p = 0; p < int'(PORTS); p++) begin
        res_valid_o[p] <= req_valid_i[p] && !flush_i;
        res_tag_o[p]   <= req_tag_i[p];
        res_data_o[p]  <= fwd_valid_i[p] ? fwd_data_i[p] : mem_data_i[p];
        res_pass2_o[p] <= req_pass2_i[p];
        res_fwd_o[p]   <= fwd_valid_i[p];
      end
    end
  end
endmodule
