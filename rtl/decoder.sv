// decoder -- turns one 32-bit instruction into the micro-op held in an RUU
// entry (see ft_pkg for the encoding).
//
// Purely combinational. Register-register forms read rs1 and rs2; stores and
// conditional branches take their second source from bits [25:21]. Writes to
// r0 are dropped here so that r0 is never renamed. Unknown opcodes decode as
// NOP. The instruction set is this design's own; the decode stage itself
// appears in the processor organisation the design is built on.
module decoder
  import ft_pkg::*;
(
  input  instr_t instr_i,
  output uop_t   uop_o
);
  opcode_e op;
  areg_t   f_hi, f_rs1, f_rs2;
  logic [15:0] f_imm;

  assign f_hi  = instr_i[25:21];
  assign f_rs1 = instr_i[20:16];
  assign f_rs2 = instr_i[15:11];
  assign f_imm = instr_i[15:0];

  always_comb begin
    if (instr_i[31:26] <= 6'd19) op = opcode_e'(instr_i[31:26]);
    else                         op = OP_NOP;

    uop_o          = '0;
    uop_o.op       = op;
    uop_o.rs1      = f_rs1;
    uop_o.imm      = sext16(f_imm);
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_MUL, OP_DIV: begin
        uop_o.uses_rs1 = 1'b1; uop_o.uses_rs2 = 1'b1; uop_o.rs2 = f_rs2;
        uop_o.writes_rd = 1'b1; uop_o.rd = f_hi;
      end
      OP_ADDI: begin
        uop_o.uses_rs1 = 1'b1; uop_o.writes_rd = 1'b1; uop_o.rd = f_hi;
      end
      OP_LUI: begin
        uop_o.writes_rd = 1'b1; uop_o.rd = f_hi;
      end
      OP_LD: begin
        uop_o.uses_rs1 = 1'b1; uop_o.writes_rd = 1'b1; uop_o.rd = f_hi;
        uop_o.is_load = 1'b1;
      end
      OP_ST: begin
        uop_o.uses_rs1 = 1'b1; uop_o.uses_rs2 = 1'b1; uop_o.rs2 = f_hi;
        uop_o.is_store = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        uop_o.uses_rs1 = 1'b1; uop_o.uses_rs2 = 1'b1; uop_o.rs2 = f_hi;
        uop_o.is_ctrl = 1'b1;
      end
      OP_JAL: begin
        uop_o.writes_rd = 1'b1; uop_o.rd = f_hi; uop_o.is_ctrl = 1'b1;
      end
      OP_JR: begin
        uop_o.uses_rs1 = 1'b1; uop_o.is_ctrl = 1'b1;
      end
      OP_HALT: uop_o.is_halt = 1'b1;
      default: ;
    endcase
    if (uop_o.rd == '0) uop_o.writes_rd = 1'b0;
    if (!uop_o.uses_rs1) uop_o.rs1 = '0;
    if (!uop_o.uses_rs2) uop_o.rs2 = '0;
  end
endmodule
