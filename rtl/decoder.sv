// decoder: instruction decoder of the decode stage.
//
// Turns a 32-bit instruction word into the control bundle (risc_pkg::ctrl_t)
// that travels down the pipeline: the source registers that the hazard
// detection must compare, the destination register and whether it is written,
// the kind of memory access, the branch flag, the execute-stage operation and
// the extended immediate. Purely combinational; a word with valid_i low, or
// an unknown opcode, decodes to a bubble that reads and writes nothing.
//
// The instruction set (MVI, ADD, SUB, LDBI, STR, BNE) follows the design
// description; the field layout and the sign/zero extension choices are this
// design's own (see risc_pkg).
module decoder
  import risc_pkg::*;
(
  input  logic [31:0] instr_i,
  input  logic        valid_i,
  output ctrl_t       ctrl_o
);

  logic [5:0] opc;
  ridx_t      f_a, f_b, f_c;
  logic [17:0] imm18;

  assign opc   = instr_i[31:26];
  assign f_a   = instr_i[25:22];
  assign f_b   = instr_i[21:18];
  assign f_c   = instr_i[17:14];
  assign imm18 = instr_i[17:0];

  always_comb begin
    ctrl_o = CTRL_BUBBLE;
    if (valid_i) begin
      unique case (opc)
        OP_MVI: begin
          ctrl_o.valid  = 1'b1;
          ctrl_o.rd     = f_a;
          ctrl_o.wr_rd  = 1'b1;
          ctrl_o.alu_op = ALU_PASSB;
          ctrl_o.imm    = {{(XLEN-22){1'b0}}, instr_i[21:0]};
        end
        OP_ADD, OP_SUB: begin
          ctrl_o.valid   = 1'b1;
          ctrl_o.rd      = f_a;
          ctrl_o.wr_rd   = 1'b1;
          ctrl_o.rs1     = f_b;
          ctrl_o.rs2     = f_c;
          ctrl_o.use_rs1 = 1'b1;
          ctrl_o.use_rs2 = 1'b1;
          ctrl_o.alu_op  = (opc == OP_ADD) ? ALU_ADD : ALU_SUB;
        end
        OP_LDBI: begin
          ctrl_o.valid   = 1'b1;
          ctrl_o.rd      = f_a;
          ctrl_o.wr_rd   = 1'b1;
          ctrl_o.rs1     = f_b;
          ctrl_o.use_rs1 = 1'b1;
          ctrl_o.is_load = 1'b1;
          ctrl_o.alu_op  = ALU_ADDR;
          ctrl_o.imm     = {{(XLEN-18){imm18[17]}}, imm18};
        end
        OP_STR: begin
          ctrl_o.valid    = 1'b1;
          ctrl_o.rs1      = f_b;   // base
          ctrl_o.rs2      = f_a;   // data to store
          ctrl_o.use_rs1  = 1'b1;
          ctrl_o.use_rs2  = 1'b1;
          ctrl_o.is_store = 1'b1;
          ctrl_o.alu_op   = ALU_ADDR;
          ctrl_o.imm      = {{(XLEN-18){imm18[17]}}, imm18};
        end
        OP_BNE: begin
          ctrl_o.valid     = 1'b1;
          ctrl_o.rs1       = f_a;
          ctrl_o.rs2       = f_b;
          ctrl_o.use_rs1   = 1'b1;
          ctrl_o.use_rs2   = 1'b1;
          ctrl_o.is_branch = 1'b1;
          ctrl_o.alu_op    = ALU_CMPNE;
          ctrl_o.imm       = {{(XLEN-18){1'b0}}, imm18};
        end
        default: ctrl_o = CTRL_BUBBLE;  // NOP and unknown opcodes
      endcase
    end
  end

endmodule
