// tb_load_store_unit -- drives random requests on both ports, with and
// without forwarded data, in front of a data_mem holding known contents;
// each result must appear exactly one cycle later with its tag, pass flag and
// either the forwarded or the stored word. A flush must drop the requests of
// its cycle.
module tb_load_store_unit;
  import ft_pkg::*;
  localparam int P = 2, WORDS = 256;
  logic clk = 0, rst_n = 0, flush = 0;
  logic rv [P], rp [P], fv [P], ov [P], op2 [P], ofw [P];
  logic [5:0] rt [P], ot [P];
  word_t ra [P], fd [P], ma [P], md [P], od [P];
  logic nowe [P]; word_t z [P];
  logic lwe = 0; word_t la = '0, ldd = '0, dbgd;
  int checks = 0, failures = 0;
  // expected results of the previous cycle
  logic e_v [P], e_p [P]; logic [5:0] e_t [P]; word_t e_d [P];

  load_store_unit #(.PORTS(P), .TAGW(6)) dut (.clk, .rst_n, .flush_i(flush),
    .req_valid_i(rv), .req_tag_i(rt), .req_addr_i(ra), .req_pass2_i(rp),
    .fwd_valid_i(fv), .fwd_data_i(fd), .mem_addr_o(ma), .mem_data_i(md),
    .res_valid_o(ov), .res_tag_o(ot), .res_data_o(od), .res_pass2_o(op2), .res_fwd_o(ofw));
  data_mem #(.WORDS(WORDS), .RPORTS(P), .WPORTS(P)) mem (.clk, .raddr_i(ma), .rdata_o(md),
    .we_i(nowe), .waddr_i(z), .wdata_i(z), .ld_we_i(lwe), .ld_addr_i(la), .ld_data_i(ldd),
    .dbg_addr_i('0), .dbg_data_o(dbgd));

  function automatic word_t content(int i); return word_t'(i) * 64'h9e3779b97f4a7c15; endfunction

  always #5 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int p = 0; p < P; p++) begin
      rv[p] = 0; rp[p] = 0; fv[p] = 0; rt[p] = '0; ra[p] = '0; fd[p] = '0; nowe[p] = 0; z[p] = '0; e_v[p] = 0;
      e_p[p] = 0; e_t[p] = '0; e_d[p] = '0;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin @(negedge clk); lwe = 1; la = word_t'(i * 8); ldd = content(i); end
    @(negedge clk); lwe = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        checks++;
        if (ov[p] != e_v[p] || (e_v[p] && (ot[p] != e_t[p] || od[p] != e_d[p] || op2[p] != e_p[p]))) begin
          failures++; $display("FAIL n=%0d port %0d", n, p);
        end
      end
      flush = ($urandom_range(20, 0) == 0);
      for (int p = 0; p < P; p++) begin
        int w;
        w = $urandom_range(WORDS - 1, 0);
        rv[p] = 1'($urandom); rt[p] = 6'($urandom); ra[p] = word_t'(w * 8 + $urandom_range(7, 0));
        rp[p] = 1'($urandom); fv[p] = 1'($urandom); fd[p] = {$urandom, $urandom};
        e_v[p] = rv[p] && !flush; e_t[p] = rt[p]; e_p[p] = rp[p];
        e_d[p] = fv[p] ? fd[p] : content(w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
