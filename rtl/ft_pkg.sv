// ft_pkg -- types and constants shared by the reissue-checked superscalar core.
//
// The core executes a small 64-bit integer instruction set of its own (the
// evaluated machine runs the Alpha ISA, which is not reproduced here). Every
// instruction is 32 bits:
//
//   [31:26] opcode   [25:21] rd / second source   [20:16] rs1
//   [15:11] rs2 (register-register forms)         [15:0]  imm16 (other forms)
//
//   ADD SUB AND OR XOR SLT SLL SRL MUL DIV : rd = rs1 op rs2
//   ADDI rd = rs1 + sext(imm)         LUI rd = sext(imm) << 16
//   LD   rd = mem[rs1 + sext(imm)]    ST  mem[rs1 + sext(imm)] = r[25:21]
//   BEQ/BNE  if (r[25:21] ==/!= rs1) pc = pc + sext(imm)
//   JAL  rd = pc + 1, pc = pc + sext(imm)       JR  pc = rs1
//   HALT stops the core
//
// Program counters count instruction words. Memory addresses are byte
// addresses of 64-bit words; the low three bits are ignored.
package ft_pkg;

  localparam int XLEN   = 64;
  localparam int ILEN   = 32;
  localparam int PCW    = 32;
  localparam int NAREGS = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [PCW-1:0]  pc_t;
  typedef logic [4:0]      areg_t;
  typedef logic [ILEN-1:0] instr_t;

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_ADD  = 6'd1,
    OP_SUB  = 6'd2,
    OP_AND  = 6'd3,
    OP_OR   = 6'd4,
    OP_XOR  = 6'd5,
    OP_SLT  = 6'd6,
    OP_SLL  = 6'd7,
    OP_SRL  = 6'd8,
    OP_ADDI = 6'd9,
    OP_LUI  = 6'd10,
    OP_MUL  = 6'd11,
    OP_DIV  = 6'd12,
    OP_LD   = 6'd13,
    OP_ST   = 6'd14,
    OP_BEQ  = 6'd15,
    OP_BNE  = 6'd16,
    OP_JAL  = 6'd17,
    OP_HALT = 6'd18,
    OP_JR   = 6'd19
  } opcode_e;

  // Decoded instruction as it is held in an RUU entry.
  typedef struct packed {
    opcode_e op;
    logic    uses_rs1;
    logic    uses_rs2;
    logic    writes_rd;
    areg_t   rd;
    areg_t   rs1;
    areg_t   rs2;
    word_t   imm;
    logic    is_load;
    logic    is_store;
    logic    is_ctrl;     // BEQ, BNE, JAL, JR: may redirect the PC
    logic    is_halt;
  } uop_t;

  // Execution latencies of the universal functional units (cycles).
  localparam int LAT_ALU = 1;
  localparam int LAT_MUL = 4;
  localparam int LAT_DIV = 12;

  // Life of an RUU entry. The order matters: every state from S_DONE1 on
  // holds the first execution's result.
  typedef enum logic [3:0] {
    S_WAIT  = 4'd0,   // waiting for operands or a functional unit
    S_EXEC1 = 4'd1,   // first execution in a functional unit
    S_MEMQ1 = 4'd2,   // load: address known, waiting for a memory port
    S_MEM1  = 4'd3,   // load: memory access in flight
    S_DONE1 = 4'd4,   // first outcome held, waiting to be reissued
    S_EXEC2 = 4'd5,   // reissued: second execution in a functional unit
    S_MEMQ2 = 4'd6,   // reissued load (redundant-load mode): waiting for a port
    S_MEM2  = 4'd7,   // reissued load (redundant-load mode): access in flight
    S_DONE2 = 4'd8    // both outcomes compared, ready to commit
  } rstate_e;

  // Functional unit request and result.
  typedef struct packed {
    opcode_e op;
    word_t   a;       // rs1 value
    word_t   b;       // second source value
    word_t   imm;
    pc_t     pc;
  } fu_req_t;

  typedef struct packed {
    word_t value;     // register result, or store data
    word_t aux;       // memory address, or next PC of a control instruction
  } fu_res_t;

  // Event counters brought out of the core.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] committed;
    logic [31:0] dispatched;      // first issues to functional units
    logic [31:0] reissued;        // second issues to functional units
    logic [31:0] faults;          // mismatches found at commit
    logic [31:0] mispredicts;     // control redirects at commit
    logic [31:0] ruu_full_stalls; // cycles a fetch group waited for RUU space
    logic [31:0] load_forwards;   // loads served from an older store
    logic [31:0] mem_waits;       // load-cycles held back by an unknown store address
    logic [31:0] fu_busy_stalls;  // cycles a ready instruction found no free unit
    logic [31:0] mem_reads;       // data memory read accesses
    logic [31:0] pred_taken_ok;   // committed taken control transfers fetched on the predicted path
  } core_stats_t;

  function automatic word_t sext16(input logic [15:0] v);
    return {{(XLEN-16){v[15]}}, v};
  endfunction

  function automatic int unsigned op_latency(input opcode_e op);
    case (op)
      OP_MUL:  return LAT_MUL;
      OP_DIV:  return LAT_DIV;
      default: return LAT_ALU;
    endcase
  endfunction

endpackage
