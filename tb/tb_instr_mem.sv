// tb_instr_mem -- writes random instructions, then reads groups of WIDTH
// consecutive words at random PCs, including groups that wrap at the end.
module tb_instr_mem;
  import ft_pkg::*;
  localparam int WORDS = 32768, W = 4;
  logic clk = 0, we = 0; pc_t pc = '0, wa = '0; instr_t wd = '0; instr_t ins [W];
  instr_t model [WORDS];
  int checks = 0, failures = 0;
  instr_mem #(.WORDS(WORDS), .WIDTH(W)) dut (.clk, .pc_i(pc), .instr_o(ins), .we_i(we), .waddr_i(wa), .wdata_i(wd));
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; wa = pc_t'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      pc = (n % 50 == 0) ? pc_t'(WORDS - 2) : pc_t'($urandom_range(WORDS - 1, 0));
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (ins[i] != model[(int'(pc) + i) % WORDS]) begin failures++; $display("FAIL pc %0d slot %0d", pc, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
