// tb_decoder -- encodes every opcode with random fields and checks the
// decoded sources, destination, immediate and class flags against the
// instruction-set table, including dropped writes to r0 and unknown opcodes.
module tb_decoder;
  import ft_pkg::*;
  instr_t in; uop_t u;
  int checks = 0, failures = 0;
  decoder dut (.instr_i(in), .uop_o(u));
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int opn, hi, s1, s2; bit rr, wr, u1, u2, ld, st, ct, hl;
      opcode_e op;
      opn = $urandom_range(25, 0);
      in = $urandom; in[31:26] = 6'(opn);
      hi = in[25:21]; s1 = in[20:16]; s2 = in[15:11];
      #1;
      op = (opn <= 19) ? opcode_e'(opn) : OP_NOP;
      rr = op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_MUL, OP_DIV};
      wr = rr || op inside {OP_ADDI, OP_LUI, OP_LD, OP_JAL};
      u1 = rr || op inside {OP_ADDI, OP_LD, OP_ST, OP_BEQ, OP_BNE, OP_JR};
      u2 = rr || op inside {OP_ST, OP_BEQ, OP_BNE};
      ld = (op == OP_LD); st = (op == OP_ST); ct = op inside {OP_BEQ, OP_BNE, OP_JAL, OP_JR}; hl = (op == OP_HALT);
      chk(u.op == op, "op");
      chk(u.writes_rd == (wr && hi != 0), $sformatf("writes_rd op %0d", opn));
      if (wr) chk(u.rd == areg_t'(hi), "rd");
      chk(u.uses_rs1 == u1 && u.uses_rs2 == u2, $sformatf("uses op %0d", opn));
      if (u1) chk(u.rs1 == areg_t'(s1), "rs1");
      if (u2) chk(u.rs2 == areg_t'(rr ? s2 : hi), "rs2");
      chk(u.imm == {{48{in[15]}}, in[15:0]}, "imm");
      chk(u.is_load == ld && u.is_store == st && u.is_ctrl == ct && u.is_halt == hl, "class");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
