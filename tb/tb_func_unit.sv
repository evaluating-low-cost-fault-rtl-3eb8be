// tb_func_unit -- checks every operation of func_unit against values computed
// here, its latencies (1, 4 for multiply, 12 for divide), that it accepts a
// new single-cycle operation every cycle, that the tag and pass flag travel
// with the result, that flush drops an operation in flight and that an armed
// fault flips exactly the masked bit of the next result only.
module tb_func_unit;
  import ft_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, req_valid = 0, pass2 = 0, ready, res_valid, res_pass2;
  fu_req_t req;
  logic [5:0] tag, res_tag;
  fu_res_t res;
  logic inject = 0;
  word_t mask = '0;
  int checks = 0, failures = 0;

  func_unit #(.TAGW(6)) dut (.clk, .rst_n, .flush_i(flush), .req_valid_i(req_valid), .req_i(req),
    .req_tag_i(tag), .req_pass2_i(pass2), .ready_o(ready), .res_valid_o(res_valid), .res_o(res),
    .res_tag_o(res_tag), .res_pass2_o(res_pass2), .inject_i(inject), .inject_mask_i(mask));

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  function automatic fu_res_t model(fu_req_t r);
    fu_res_t m; pc_t t, q;
    m = '0; t = r.pc + pc_t'(r.imm); q = r.pc + 1;
    case (r.op)
      OP_ADD: m.value = r.a + r.b;   OP_SUB: m.value = r.a - r.b;
      OP_AND: m.value = r.a & r.b;   OP_OR:  m.value = r.a | r.b;
      OP_XOR: m.value = r.a ^ r.b;
      OP_SLT: m.value = ($signed(r.a) < $signed(r.b)) ? 1 : 0;
      OP_SLL: m.value = r.a << r.b[5:0]; OP_SRL: m.value = r.a >> r.b[5:0];
      OP_ADDI: m.value = r.a + r.imm; OP_LUI: m.value = r.imm << 16;
      OP_MUL: m.value = r.a * r.b;
      OP_DIV: m.value = (r.b == 0) ? '1 : word_t'($signed(r.a) / $signed(r.b));
      OP_LD:  m.aux = r.a + r.imm;
      OP_ST:  begin m.aux = r.a + r.imm; m.value = r.b; end
      OP_BEQ: m.aux = (r.a == r.b) ? word_t'(t) : word_t'(q);
      OP_BNE: m.aux = (r.a != r.b) ? word_t'(t) : word_t'(q);
      OP_JAL: begin m.value = word_t'(q); m.aux = word_t'(t); end
      OP_JR:  m.aux = word_t'(r.a[31:0]);
      default: ;
    endcase
    return m;
  endfunction

  // issue one op, wait for result, check value and latency
  task automatic run_one(opcode_e op, word_t a, word_t b, word_t imm, int exp_lat);
    fu_res_t exp; int lat;
    @(negedge clk);
    req.op = op; req.a = a; req.b = b; req.imm = imm; req.pc = pc_t'($urandom);
    tag = 6'($urandom); pass2 = 1'($urandom);
    exp = model(req);
    chk(ready, "ready before issue");
    req_valid = 1;
    @(negedge clk); req_valid = 0; lat = 1;
    while (!res_valid && lat < 40) begin @(negedge clk); lat++; end
    chk(lat == exp_lat, $sformatf("%s latency %0d exp %0d", op.name(), lat, exp_lat));
    chk(res == exp, $sformatf("%s result %h/%h exp %h/%h", op.name(), res.value, res.aux, exp.value, exp.aux));
    chk(res_tag == tag && res_pass2 == pass2, "tag/pass");
  endtask

  initial begin
    req = '0; tag = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      opcode_e op; word_t a, b;
      op = opcode_e'($urandom_range(19, 0));
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (n % 7 == 0) b = '0;
      if (n % 5 == 0) a = b;
      run_one(op, a, b, sext16(16'($urandom)), op == OP_MUL ? 4 : op == OP_DIV ? 12 : 1);
    end
    // back-to-back single-cycle operations
    @(negedge clk);
    for (int n = 0; n < 5; n++) begin
      req.op = OP_ADDI; req.a = word_t'(n); req.imm = 10; req_valid = 1; tag = 6'(n);
      @(negedge clk);
      chk(res_valid && res.value == word_t'(n + 10) && res_tag == 6'(n), "pipelined ADDI");
      chk(ready, "ready every cycle for ALU ops");
    end
    req_valid = 0;
    // busy during a divide
    @(negedge clk); req.op = OP_DIV; req.a = 100; req.b = 7; req_valid = 1;
    @(negedge clk); req_valid = 0; chk(!ready, "busy during divide");
    // flush drops it
    flush = 1; @(negedge clk); flush = 0;
    repeat (15) begin chk(!res_valid, "no result after flush"); @(negedge clk); end
    // fault injection: flips the bit of exactly the next result
    mask = word_t'(1) << 17; inject = 1; @(negedge clk); inject = 0;
    req.op = OP_ADD; req.a = 5; req.b = 6; req_valid = 1;
    @(negedge clk);
    chk(res_valid && res.value == (word_t'(11) ^ (word_t'(1) << 17)), "injected flip");
    @(negedge clk); req_valid = 0;
    chk(res_valid && res.value == word_t'(11), "next result clean");
    req.op = OP_LD; req.a = 64; req.imm = 8; req_valid = 1; inject = 1; mask = 4;
    @(negedge clk); inject = 0; req_valid = 0;
    chk(res_valid && res.aux == word_t'(72 ^ 4), "injected address flip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
