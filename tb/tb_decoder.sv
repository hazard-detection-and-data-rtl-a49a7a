// tb_decoder: self-checking test of the instruction decoder.
// Random register numbers and immediates are assembled into each instruction
// type and the decoded control is compared field by field with what the
// instruction set defines; unknown opcodes and invalid words must decode to
// a bubble.
module tb_decoder;
  import risc_pkg::*;
  logic [31:0] instr;
  logic valid;
  ctrl_t c;
  int checks = 0, failures = 0;

  decoder dut (.instr_i(instr), .valid_i(valid), .ctrl_o(c));

  task automatic expect_ctrl(string what, ctrl_t exp);
    #1;
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, c, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      ridx_t x, y, z;
      logic [21:0] i22;
      logic [17:0] i18;
      ctrl_t e;
      x = 4'($urandom); y = 4'($urandom); z = 4'($urandom);
      i22 = 22'($urandom); i18 = 18'($urandom);
      valid = 1'b1;

      instr = enc_mvi(x, i22);
      e = CTRL_BUBBLE; e.valid = 1; e.rd = x; e.wr_rd = 1; e.alu_op = ALU_PASSB;
      e.imm = {10'd0, i22};
      expect_ctrl("MVI", e);

      instr = enc_rrr(OP_ADD, x, y, z);
      e = CTRL_BUBBLE; e.valid = 1; e.rd = x; e.wr_rd = 1; e.rs1 = y; e.rs2 = z;
      e.use_rs1 = 1; e.use_rs2 = 1; e.alu_op = ALU_ADD;
      expect_ctrl("ADD", e);

      instr = enc_rrr(OP_SUB, x, y, z);
      e.alu_op = ALU_SUB;
      expect_ctrl("SUB", e);

      instr = enc_rri(OP_LDBI, x, y, i18);
      e = CTRL_BUBBLE; e.valid = 1; e.rd = x; e.wr_rd = 1; e.rs1 = y; e.use_rs1 = 1;
      e.is_load = 1; e.alu_op = ALU_ADDR; e.imm = 32'(signed'(i18));
      expect_ctrl("LDBI", e);

      instr = enc_rri(OP_STR, x, y, i18);
      e = CTRL_BUBBLE; e.valid = 1; e.rs1 = y; e.rs2 = x; e.use_rs1 = 1; e.use_rs2 = 1;
      e.is_store = 1; e.alu_op = ALU_ADDR; e.imm = 32'(signed'(i18));
      expect_ctrl("STR", e);

      instr = enc_rri(OP_BNE, x, y, i18);
      e = CTRL_BUBBLE; e.valid = 1; e.rs1 = x; e.rs2 = y; e.use_rs1 = 1; e.use_rs2 = 1;
      e.is_branch = 1; e.alu_op = ALU_CMPNE; e.imm = {14'd0, i18};
      expect_ctrl("BNE", e);

      instr = {6'($urandom_range(7, 63)), 26'($urandom)};
      expect_ctrl("unknown opcode", CTRL_BUBBLE);

      instr = enc_rrr(OP_ADD, x, y, z);
      valid = 1'b0;
      expect_ctrl("invalid word", CTRL_BUBBLE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
