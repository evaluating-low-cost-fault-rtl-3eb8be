// tb_data_mem -- random loads through the loading port and the store ports,
// with reads on every read port and the debug port checked against a model.
// Same-cycle stores to one word must leave the highest port's data.
module tb_data_mem;
  import ft_pkg::*;
  localparam int WORDS = 1024, RP = 2, WP = 2;
  logic clk = 0;
  word_t ra [RP], rd [RP]; logic we [WP]; word_t wa [WP], wd [WP];
  logic lwe = 0; word_t la = '0, ld = '0, da = '0, dd;
  word_t model [WORDS];
  int checks = 0, failures = 0;
  data_mem #(.WORDS(WORDS), .RPORTS(RP), .WPORTS(WP)) dut (.clk, .raddr_i(ra), .rdata_o(rd),
    .we_i(we), .waddr_i(wa), .wdata_i(wd), .ld_we_i(lwe), .ld_addr_i(la), .ld_data_i(ld),
    .dbg_addr_i(da), .dbg_data_o(dd));
  always #5 clk = ~clk;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int p = 0; p < WP; p++) begin we[p] = 0; wa[p] = '0; wd[p] = '0; end
    for (int p = 0; p < RP; p++) ra[p] = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); lwe = 1; la = word_t'(i * 8 + (i % 8)); ld = {$urandom, $urandom}; model[i] = ld;
    end
    @(negedge clk); lwe = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < RP; p++) ra[p] = word_t'($urandom_range(WORDS * 8 - 1, 0));
      da = word_t'($urandom_range(WORDS * 8 - 1, 0));
      for (int p = 0; p < WP; p++) begin
        we[p] = 1'($urandom); wa[p] = word_t'($urandom_range(n % 4 == 0 ? 15 : WORDS * 8 - 1, 0));
        wd[p] = {$urandom, $urandom};
      end
      #1;
      for (int p = 0; p < RP; p++) chk(rd[p] == model[ra[p][12:3]], "read port");
      chk(dd == model[da[12:3]], "debug port");
      @(posedge clk);
      for (int p = 0; p < WP; p++) if (we[p]) model[wa[p][12:3]] = wd[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
