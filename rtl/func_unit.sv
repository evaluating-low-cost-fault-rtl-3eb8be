// func_unit -- one universal functional unit: it executes every operation of
// the instruction set, as in the evaluated machine ("each functional unit can
// execute any operations").
//
// Latency is 1 cycle for every operation except multiply (4) and divide (12).
// A request is accepted when req_valid_i and ready_o are both high; its result
// is presented on res_valid_o exactly latency cycles later, with the RUU tag
// and the pass flag (first execution or reissue) that came with it. The unit
// is not pipelined: it takes a new request in the cycle its previous result
// leaves, so back-to-back single-cycle operations run at one per cycle.
// For a load the unit only computes the address; a store yields its address
// and its data. Division by zero gives all ones (the evaluated machine's rule
// is not stated). The result is formed when the request is accepted and held
// for the latency, a behavioural timing of the multiplier and divider.
//
// inject_i arms a one-shot transient-fault model: the next result the unit
// produces has inject_mask_i (sampled with inject_i) XORed into its value word
// (its aux word for loads, conditional branches and JR). Only tests use it.
// flush_i drops the operation in flight.
module func_unit
  import ft_pkg::*;
#(
  parameter int unsigned TAGW = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush_i,
  input  logic            req_valid_i,
  input  fu_req_t         req_i,
  input  logic [TAGW-1:0] req_tag_i,
  input  logic            req_pass2_i,
  output logic            ready_o,
  output logic            res_valid_o,
  output fu_res_t         res_o,
  output logic [TAGW-1:0] res_tag_o,
  output logic            res_pass2_o,
  input  logic            inject_i,
  input  word_t           inject_mask_i
);
  logic            busy;
  logic [3:0]      rem;
  fu_res_t         res_q;
  logic [TAGW-1:0] tag_q;
  logic            pass2_q;
  logic            armed;
  word_t           mask_q;
  logic            hit_aux_q;
  fu_res_t         calc;

  always_comb begin
    word_t a, b;
    pc_t   tgt, seq;
    a    = req_i.a;
    b    = req_i.b;
    tgt  = req_i.pc + pc_t'(req_i.imm);
    seq  = req_i.pc + pc_t'(1);
    calc = '0;
    case (req_i.op)
      OP_ADD:  calc.value = a + b;
      OP_SUB:  calc.value = a - b;
      OP_AND:  calc.value = a & b;
      OP_OR:   calc.value = a | b;
      OP_XOR:  calc.value = a ^ b;
      OP_SLT:  calc.value = ($signed(a) < $signed(b)) ? word_t'(1) : word_t'(0);
      OP_SLL:  calc.value = a << b[5:0];
      OP_SRL:  calc.value = a >> b[5:0];
      OP_ADDI: calc.value = a + req_i.imm;
      OP_LUI:  calc.value = req_i.imm << 16;
      OP_MUL:  calc.value = a * b;
      OP_DIV:  calc.value = (b == '0) ? '1 : word_t'($signed(a) / $signed(b));
      OP_LD:   calc.aux   = a + req_i.imm;
      OP_ST:   begin calc.aux = a + req_i.imm; calc.value = b; end
      OP_BEQ:  calc.aux = (a == b) ? word_t'(tgt) : word_t'(seq);
      OP_BNE:  calc.aux = (a != b) ? word_t'(tgt) : word_t'(seq);
      OP_JAL:  begin
        calc.value = word_t'(seq);
        calc.aux   = word_t'(tgt);
      end
      OP_JR:   calc.aux = word_t'(pc_t'(a));
      default: ;
    endcase
  end

  assign ready_o     = !busy || (rem == 4'd0);
  assign res_valid_o = busy && (rem == 4'd0);
  assign res_tag_o   = tag_q;
  assign res_pass2_o = pass2_q;

  // Fault model applied to the leaving result.
  always_comb begin
    res_o = res_q;
    if (armed) begin
      if (hit_aux_q) res_o.aux   = res_q.aux ^ mask_q;
      else           res_o.value = res_q.value ^ mask_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rem       <= '0;
      res_q     <= '0;
      tag_q     <= '0;
      pass2_q   <= 1'b0;
      armed     <= 1'b0;
      mask_q    <= '0;
      hit_aux_q <= 1'b0;
    end else begin
      if (res_valid_o && armed) armed <= 1'b0;
      if (inject_i) begin
        armed  <= 1'b1;
        mask_q <= inject_mask_i;
      end
      if (flush_i) begin
        busy <= 1'b0;
      end else if (req_valid_i && ready_o) begin
        busy      <= 1'b1;
        rem       <= 4'(op_latency(req_i.op) - 1);
        res_q     <= calc;
        tag_q     <= req_tag_i;
        pass2_q   <= req_pass2_i;
        hit_aux_q <= (req_i.op inside {OP_LD, OP_BEQ, OP_BNE, OP_JR});
      end else if (busy) begin
        if (rem == 4'd0) busy <= 1'b0;
        else             rem  <= rem - 4'd1;
      end
    end
  end
endmodule
