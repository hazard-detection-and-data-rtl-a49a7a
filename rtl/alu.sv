// alu: execute-stage arithmetic unit.
//
// Combinational. Given the two forwarded operands a_i and b_i and the
// extended immediate imm_i it computes, according to op_i:
//   ALU_ADD   a + b             (ADD)
//   ALU_SUB   a - b             (SUB)
//   ALU_PASSB imm               (MVI)
//   ALU_ADDR  a + imm           (LDBI/STR: the data pointer, base + index)
//   ALU_CMPNE result = imm, taken_o = (a != b)   (BNE to an absolute target)
// taken_o is low for every other operation. Arithmetic wraps modulo 2^XLEN.
// The operations follow the instructions of the design; the split into these
// five operation codes is this design's own.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  alu_op_e      op_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] imm_i,
  output logic [W-1:0] result_o,
  output logic         taken_o
);

  always_comb begin
    taken_o = 1'b0;
    unique case (op_i)
      ALU_ADD:   result_o = a_i + b_i;
      ALU_SUB:   result_o = a_i - b_i;
      ALU_PASSB: result_o = imm_i;
      ALU_ADDR:  result_o = a_i + imm_i;
      ALU_CMPNE: begin
        result_o = imm_i;
        taken_o  = (a_i != b_i);
      end
      default:   result_o = '0;
    endcase
  end

endmodule
