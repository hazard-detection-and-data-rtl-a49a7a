// risc_pkg: shared types and constants of the five-stage pipelined RISC core.
//
// The core is a 32-bit machine with 16 general registers. Its instructions
// are the ones the hazard/forwarding scheme is built around: MVI (move
// immediate), ADD, SUB, LDBI (load, base + index), STR (store, base + index)
// and BNE (branch if not equal to an absolute target). The word width, the
// register count and the instruction set follow the design description; the
// bit layout of an instruction word and the opcode numbers are this design's
// own choice, since no encoding is published for it.
//
// Instruction word layout (32 bits):
//   [31:26] opcode
//   MVI  : [25:22] rd     [21:0]  imm22 (zero-extended)
//   ADD  : [25:22] rd     [21:18] rs1   [17:14] rs2        rd = rs1 + rs2
//   SUB  : [25:22] rd     [21:18] rs1   [17:14] rs2        rd = rs1 - rs2
//   LDBI : [25:22] rd     [21:18] base  [17:0]  off18      rd = mem[base + sext(off18)]
//   STR  : [25:22] rdata  [21:18] base  [17:0]  off18      mem[base + sext(off18)] = rdata
//   BNE  : [25:22] rs1    [21:18] rs2   [17:0]  target18   if rs1 != rs2: pc = target18
//   any other opcode executes as NOP.
package risc_pkg;

  localparam int unsigned XLEN   = 32;  // data path width
  localparam int unsigned NREGS  = 16;  // general registers R0..R15
  localparam int unsigned RIDX_W = 4;   // register number width

  typedef logic [RIDX_W-1:0] ridx_t;

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_MVI  = 6'd1,
    OP_ADD  = 6'd2,
    OP_SUB  = 6'd3,
    OP_LDBI = 6'd4,
    OP_STR  = 6'd5,
    OP_BNE  = 6'd6
  } opcode_e;

  // Operation performed by the execute stage.
  typedef enum logic [2:0] {
    ALU_ADD,    // a + b
    ALU_SUB,    // a - b
    ALU_PASSB,  // b (immediate move)
    ALU_ADDR,   // a + imm (data pointer, base + index)
    ALU_CMPNE   // branch compare a != b; result = target
  } alu_op_e;

  // Decoded control of one instruction, carried from decode onwards.
  typedef struct packed {
    logic      valid;     // a real instruction (not a bubble)
    ridx_t     rs1;       // first source register
    ridx_t     rs2;       // second source register
    logic      use_rs1;   // rs1 is read
    logic      use_rs2;   // rs2 is read
    ridx_t     rd;        // destination register
    logic      wr_rd;     // rd is written back
    logic      is_load;   // LDBI
    logic      is_store;  // STR
    logic      is_branch; // BNE
    alu_op_e   alu_op;
    logic [XLEN-1:0] imm; // extended immediate / offset / branch target
  } ctrl_t;

  localparam ctrl_t CTRL_BUBBLE = '{
    valid: 1'b0, rs1: '0, rs2: '0, use_rs1: 1'b0, use_rs2: 1'b0, rd: '0,
    wr_rd: 1'b0, is_load: 1'b0, is_store: 1'b0, is_branch: 1'b0,
    alu_op: ALU_ADD, imm: '0};

  // Instruction word builders, used by testbenches to assemble programs.
  function automatic logic [31:0] enc_mvi(ridx_t rd, logic [21:0] imm);
    return {OP_MVI, rd, imm};
  endfunction
  function automatic logic [31:0] enc_rrr(opcode_e op, ridx_t rd, ridx_t rs1, ridx_t rs2);
    return {op, rd, rs1, rs2, 14'd0};
  endfunction
  function automatic logic [31:0] enc_rri(opcode_e op, ridx_t r_a, ridx_t r_b, logic [17:0] imm);
    return {op, r_a, r_b, imm};
  endfunction

endpackage
