// tb_int_regfile -- random reads and writes on all ports against a model:
// r0 reads zero, writes land at the edge, the highest port wins a clash.
module tb_int_regfile;
  import ft_pkg::*;
  localparam int RP = 8, WP = 4;
  logic clk = 0, rst_n = 0;
  areg_t ra [RP]; word_t rd [RP];
  logic we [WP]; areg_t wa [WP]; word_t wd [WP];
  word_t model [32];
  int checks = 0, failures = 0;
  int_regfile #(.RPORTS(RP), .WPORTS(WP)) dut (.clk, .rst_n, .raddr_i(ra), .rdata_o(rd),
    .we_i(we), .waddr_i(wa), .wdata_i(wd));
  always #5 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (model[r]) model[r] = '0;
    for (int p = 0; p < WP; p++) begin we[p] = 0; wa[p] = '0; wd[p] = '0; end
    for (int p = 0; p < RP; p++) ra[p] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < RP; p++) ra[p] = areg_t'($urandom);
      for (int p = 0; p < WP; p++) begin
        we[p] = 1'($urandom); wa[p] = areg_t'($urandom_range(n % 3 == 0 ? 3 : 31, 0));
        wd[p] = {$urandom, $urandom};
      end
      #1;
      for (int p = 0; p < RP; p++) begin
        checks++;
        if (rd[p] != model[ra[p]]) begin failures++; $display("FAIL read r%0d", ra[p]); end
      end
      @(posedge clk);
      for (int p = 0; p < WP; p++) if (we[p] && wa[p] != 0) model[wa[p]] = wd[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
