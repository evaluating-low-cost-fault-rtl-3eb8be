// tb_rename_table -- random dispatch mappings and commit clears against a
// model: a commit clears only a mapping that still names its entry and that
// no same-cycle dispatch remaps; flush clears all; r0 is never mapped.
module tb_rename_table;
  import ft_pkg::*;
  localparam int RP = 8, WP = 4, CP = 4;
  logic clk = 0, rst_n = 0, flush = 0;
  areg_t ra [RP]; logic rv [RP]; logic [5:0] rt [RP];
  logic we [WP]; areg_t wr [WP]; logic [5:0] wt [WP];
  logic cv [CP]; areg_t cr [CP]; logic [5:0] ct [CP];
  logic mv [32]; logic [5:0] mt [32];
  int checks = 0, failures = 0;
  rename_table #(.TAGW(6), .RPORTS(RP), .WPORTS(WP), .CPORTS(CP)) dut (.clk, .rst_n, .flush_i(flush),
    .raddr_i(ra), .rvalid_o(rv), .rtag_o(rt), .we_i(we), .wreg_i(wr), .wtag_i(wt),
    .cvalid_i(cv), .creg_i(cr), .ctag_i(ct));
  always #5 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (mv[r]) begin mv[r] = 0; mt[r] = '0; end
    for (int p = 0; p < WP; p++) begin we[p] = 0; wr[p] = '0; wt[p] = '0; end
    for (int p = 0; p < CP; p++) begin cv[p] = 0; cr[p] = '0; ct[p] = '0; end
    for (int p = 0; p < RP; p++) ra[p] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < RP; p++) ra[p] = areg_t'($urandom_range(7, 0));
      for (int p = 0; p < WP; p++) begin we[p] = 1'($urandom); wr[p] = areg_t'($urandom_range(7, 0)); wt[p] = 6'($urandom); end
      for (int p = 0; p < CP; p++) begin
        cv[p] = 1'($urandom); cr[p] = areg_t'($urandom_range(7, 0));
        ct[p] = ($urandom_range(1, 0) == 1) ? mt[cr[p]] : 6'($urandom);
      end
      flush = ($urandom_range(60, 0) == 0);
      #1;
      for (int p = 0; p < RP; p++) begin
        checks++;
        if (rv[p] != (mv[ra[p]] && ra[p] != 0) || (rv[p] && rt[p] != mt[ra[p]])) begin
          failures++; $display("FAIL lookup r%0d", ra[p]); end
      end
      @(posedge clk);
      if (flush) foreach (mv[r]) mv[r] = 0;
      else begin
        for (int p = 0; p < CP; p++) if (cv[p] && mv[cr[p]] && mt[cr[p]] == ct[p]) mv[cr[p]] = 0;
        for (int p = 0; p < WP; p++) if (we[p] && wr[p] != 0) begin mv[wr[p]] = 1; mt[wr[p]] = wt[p]; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
