// tb_prog_pkg -- helpers shared by the core testbenches: an instruction
// encoder, a reference instruction-set model that runs a program in order
// and records the commit trace the core must reproduce, and the benchmark
// program itself.
//
// The program walks two arrays: for each element a[i] it computes
// a[i]*a[i] / (a[i]+3), stores it to b[i], reloads it at once (store-to-load
// forwarding), accumulates a running sum and, through a store whose address
// depends on the divide, writes a copy into a third area that later loads
// must wait behind. A backward BNE closes the loop, so every iteration but
// the last jumps back, and each calls a two-instruction subroutine through
// JAL/JR, which exercises the branch target buffer, the direction predictor
// and the return address stack. A chain of divides followed by a long
// independent stretch then fills the instruction window.
package tb_prog_pkg;
  import ft_pkg::*;

  localparam int MAXTRACE = 40000;
  localparam int DWORDS   = 16384;

  function automatic instr_t enc_r(opcode_e op, int rd, int rs1, int rs2);
    return {6'(op), 5'(rd), 5'(rs1), 5'(rs2), 11'd0};
  endfunction
  function automatic instr_t enc_i(opcode_e op, int rd, int rs1, int imm);
    return {6'(op), 5'(rd), 5'(rs1), 16'(imm)};
  endfunction

  localparam int A_BASE = 'h100;    // byte address of a[]
  localparam int B_BASE = 'h4000;   // byte address of b[]
  localparam int C_BASE = 'h8000;   // byte address of the copies
  localparam int S_ADDR = 'h7000;   // byte address of the sum

  // Builds the program into prog[], returns its length.
  function automatic int build_program(ref instr_t prog [], input int n_iter);
    int k, jal_at;
    k = 0;
    prog = new[160];
    prog[k++] = enc_i(OP_ADDI, 1, 0, 0);          // r1 = i = 0
    prog[k++] = enc_i(OP_ADDI, 2, 0, n_iter);     // r2 = N
    prog[k++] = enc_i(OP_ADDI, 3, 0, A_BASE);     // r3 = &a[0]
    prog[k++] = enc_i(OP_ADDI, 4, 0, B_BASE);     // r4 = &b[0]
    prog[k++] = enc_i(OP_ADDI, 10, 0, 0);         // r10 = sum
    prog[k++] = enc_i(OP_ADDI, 14, 0, 1);         // r14 = 1
    // loop: (pc 6)
    prog[k++] = enc_i(OP_LD,   5, 3, 0);          // r5 = a[i]
    prog[k++] = enc_r(OP_MUL,  6, 5, 5);          // r6 = a*a
    prog[k++] = enc_i(OP_ADDI, 7, 5, 3);          // r7 = a+3
    prog[k++] = enc_r(OP_DIV,  8, 6, 7);          // r8 = r6/r7
    prog[k++] = enc_i(OP_ST,   8, 4, 0);          // b[i] = r8
    prog[k++] = enc_i(OP_LD,   9, 4, 0);          // r9 = b[i] (forwarded)
    prog[k++] = enc_r(OP_ADD, 10, 10, 9);         // sum += r9
    prog[k++] = enc_r(OP_AND, 13, 8, 0);          // r13 = 0, after the divide
    prog[k++] = enc_r(OP_ADD, 13, 13, 4);         // r13 = &b[i]
    prog[k++] = enc_i(OP_ST,   5, 13, C_BASE - B_BASE); // c[i] = a[i], late address
    prog[k++] = enc_i(OP_LD,  11, 3, 8);          // r11 = a[i+1], waits for it
    prog[k++] = enc_r(OP_XOR, 12, 11, 6);
    prog[k++] = enc_r(OP_SLT, 15, 12, 10);
    prog[k++] = enc_r(OP_SLL, 16, 15, 14);
    prog[k++] = enc_r(OP_SRL, 17, 6, 14);
    prog[k++] = enc_r(OP_SUB, 18, 17, 16);
    prog[k++] = enc_r(OP_OR,  19, 18, 12);
    prog[k++] = enc_i(OP_ADDI, 3, 3, 8);
    prog[k++] = enc_i(OP_ADDI, 4, 4, 8);
    prog[k++] = enc_i(OP_ADDI, 1, 1, 1);
    jal_at = k;
    prog[k++] = enc_i(OP_JAL, 31, 0, 0);          // call count(), patched below
    prog[k++] = enc_i(OP_BNE,  2, 1, -21);        // if (i != N) goto loop
    prog[k++] = enc_i(OP_JAL, 20, 0, 2);          // r20 = link, skip next
    prog[k++] = enc_i(OP_ADDI, 21, 0, 99);        // skipped
    prog[k++] = enc_i(OP_LUI, 22, 0, 1);
    // a chain of divides at the head of the window and a long independent
    // stretch behind it fill the RUU
    prog[k++] = enc_i(OP_ADDI, 23, 0, 1000);
    for (int d = 0; d < 4; d++) prog[k++] = enc_r(OP_DIV, 23, 23, 14);
    for (int d = 0; d < 80; d++) prog[k++] = enc_i(OP_ADDI, 24 + d % 4, 24 + d % 4, d);
    prog[k++] = enc_i(OP_ST,  10, 0, S_ADDR);     // store the sum
    prog[k++] = enc_i(OP_ST,  19, 0, S_ADDR + 8);
    prog[k++] = enc_i(OP_HALT, 0, 0, 0);
    // count(): r25 += 1, return through r31
    prog[jal_at] = enc_i(OP_JAL, 31, 0, k - jal_at);
    prog[k++] = enc_i(OP_ADDI, 25, 25, 1);
    prog[k++] = enc_r(OP_JR, 0, 31, 0);
    return k;
  endfunction

  function automatic word_t a_init(int i);
    return word_t'(i * 7 + 3);
  endfunction

  // Reference model: in-order execution, one instruction at a time.
  class ref_model;
    word_t regs [NAREGS];
    word_t mem  [DWORDS];
    pc_t   tr_pc    [MAXTRACE];
    logic  tr_we    [MAXTRACE];
    areg_t tr_rd    [MAXTRACE];
    word_t tr_value [MAXTRACE];
    int    n;

    function void run(instr_t prog [], int len);
      pc_t pc;
      bit  done;
      foreach (regs[r]) regs[r] = '0;
      pc = 0; n = 0; done = 0;
      while (!done && n < MAXTRACE) begin
        instr_t in;
        opcode_e op;
        int rd, s1, s2, hi;
        word_t a, b, c, imm, res, addr;
        logic we;
        pc_t npc;
        in  = (int'(pc) < len) ? prog[pc] : '0;
        op  = (in[31:26] <= 6'd19) ? opcode_e'(in[31:26]) : OP_NOP;
        hi  = int'(in[25:21]); s1 = int'(in[20:16]); s2 = int'(in[15:11]);
        imm = sext16(in[15:0]);
        a = regs[s1]; b = regs[s2]; c = regs[hi];
        res = '0; we = 1'b0; npc = pc + 1;
        case (op)
          OP_ADD:  begin res = a + b; we = 1; end
          OP_SUB:  begin res = a - b; we = 1; end
          OP_AND:  begin res = a & b; we = 1; end
          OP_OR:   begin res = a | b; we = 1; end
          OP_XOR:  begin res = a ^ b; we = 1; end
          OP_SLT:  begin res = ($signed(a) < $signed(b)) ? 1 : 0; we = 1; end
          OP_SLL:  begin res = a << b[5:0]; we = 1; end
          OP_SRL:  begin res = a >> b[5:0]; we = 1; end
          OP_MUL:  begin res = a * b; we = 1; end
          OP_DIV:  begin res = (b == 0) ? '1 : word_t'($signed(a) / $signed(b)); we = 1; end
          OP_ADDI: begin res = a + imm; we = 1; end
          OP_LUI:  begin res = imm << 16; we = 1; end
          OP_LD:   begin addr = a + imm; res = mem[addr[16:3]]; we = 1; end
          OP_ST:   begin addr = a + imm; mem[addr[16:3]] = c; end
          OP_BEQ:  if (c == a) npc = pc + pc_t'(imm);
          OP_BNE:  if (c != a) npc = pc + pc_t'(imm);
          OP_JAL:  begin res = {32'b0, pc + pc_t'(1)}; we = 1; npc = pc + pc_t'(imm); end
          OP_JR:   npc = pc_t'(a);
          OP_HALT: done = 1;
          default: ;
        endcase
        if (hi == 0) we = 0;
        if (we) regs[hi] = res;
        tr_pc[n] = pc; tr_we[n] = we; tr_rd[n] = areg_t'(hi); tr_value[n] = res;
        n++;
        pc = npc;
      end
    endfunction
  endclass
endpackage
