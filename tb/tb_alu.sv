// tb_alu: self-checking test of the execute-stage ALU.
// Directed values from the design's examples (R3 + 13223 = 441159,
// 432544 + 336250197 = 336682741, the BNE compare of 427040 and 427936) and
// random operands for every operation, compared with 64-bit reference
// arithmetic truncated to 32 bits.
module tb_alu;
  import risc_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, imm, res;
  logic taken;
  int checks = 0, failures = 0;

  alu dut (.op_i(op), .a_i(a), .b_i(b), .imm_i(imm), .result_o(res), .taken_o(taken));

  task automatic apply(alu_op_e o, logic [31:0] aa, logic [31:0] bb, logic [31:0] ii);
    logic [63:0] e;
    logic et;
    op = o; a = aa; b = bb; imm = ii;
    #1;
    et = 1'b0;
    case (o)
      ALU_ADD:   e = {32'd0, aa} + {32'd0, bb};
      ALU_SUB:   e = {32'd0, aa} + {32'd0, ~bb} + 64'd1;
      ALU_PASSB: e = {32'd0, ii};
      ALU_ADDR:  e = {32'd0, aa} + {32'd0, ii};
      default: begin e = {32'd0, ii}; et = (aa ^ bb) != 0; end
    endcase
    checks++;
    if (res !== e[31:0] || taken !== et) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d imm=%0d: got %0d/%b expected %0d/%b",
               o.name(), aa, bb, ii, res, taken, e[31:0], et);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(ALU_ADDR, 427936, 0, 13223);
    checks++; if (res !== 441159) failures++;
    apply(ALU_ADD, 432544, 336250197, 0);
    checks++; if (res !== 336682741) failures++;
    apply(ALU_CMPNE, 427040, 427936, 34647);
    checks++; if (!(taken && res == 34647)) failures++;
    apply(ALU_CMPNE, 5, 5, 34647);
    checks++; if (taken) failures++;
    apply(ALU_PASSB, 1, 2, 427936);
    for (int n = 0; n < 2000; n++) begin
      alu_op_e o;
      o = alu_op_e'($urandom_range(0, 4));
      apply(o, $urandom, (n % 7 == 0) ? a : $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
