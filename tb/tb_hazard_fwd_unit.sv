// tb_hazard_fwd_unit: self-checking test of hazard detection and forwarding.
// First the dependence pattern of the design's example (MVI R3; MVI R4;
// ADD R5,R3,R4) is applied as it appears in the pipeline, then random
// decode/E/M/W contents are compared with a reference that walks the three
// preceding instructions from the youngest to the oldest.
module tb_hazard_fwd_unit;
  import risc_pkg::*;
  ctrl_t d, e, m;
  logic [31:0] rf1, rf2, mv, wv, op1, op2, xo1, xo2, xa, xb;
  logic we, f1, f2, stall, xf1, xf2;
  ridx_t wrd;
  int checks = 0, failures = 0;

  hazard_fwd_unit dut (
    .d_ctrl_i(d), .rf_rd1_i(rf1), .rf_rd2_i(rf2), .e_ctrl_i(e), .m_ctrl_i(m),
    .m_value_i(mv), .w_we_i(we), .w_rd_i(wrd), .w_value_i(wv),
    .d_op1_o(op1), .d_op2_o(op2), .d_fwd1_e_o(f1), .d_fwd2_e_o(f2), .stall_o(stall),
    .x_op1_i(xo1), .x_op2_i(xo2), .x_fwd1_i(xf1), .x_fwd2_i(xf2), .x_a_o(xa), .x_b_o(xb));

  // Reference for one source register: returns the operand decode should pass
  // on, whether execute must take the EX/MEM value, and whether to interlock.
  task automatic ref_src(input logic used, input ridx_t r, input logic [31:0] rfv,
                         output logic [31:0] val, output logic fe, output logic st);
    val = rfv; fe = 0; st = 0;
    if (!used) return;
    // oldest first, younger overrides
    if (we && wrd == r) val = wv;
    if (m.valid && m.wr_rd && m.rd == r) val = mv;
    if (e.valid && e.wr_rd && e.rd == r) begin
      if (e.is_load) st = 1; else fe = 1;
    end
  endtask

  task automatic check_all(string what);
    logic [31:0] v1, v2;
    logic fe1, fe2, s1, s2;
    #1;
    ref_src(d.use_rs1, d.rs1, rf1, v1, fe1, s1);
    ref_src(d.use_rs2, d.rs2, rf2, v2, fe2, s2);
    checks++;
    if (stall !== (s1 | s2) || f1 !== fe1 || f2 !== fe2) begin
      failures++;
      $display("FAIL %s: stall/f1/f2 %b%b%b expected %b%b%b", what, stall, f1, f2, s1|s2, fe1, fe2);
    end
    // the decode operand only matters when execute will not replace it
    checks++;
    if ((!fe1 && op1 !== v1) || (!fe2 && op2 !== v2)) begin
      failures++;
      $display("FAIL %s: op1/op2 %0d/%0d expected %0d/%0d", what, op1, op2, v1, v2);
    end
    checks++;
    if (xa !== (xf1 ? mv : xo1) || xb !== (xf2 ? mv : xo2)) begin
      failures++;
      $display("FAIL %s: execute mux", what);
    end
  endtask

  function automatic ctrl_t rnd_ctrl();
    ctrl_t c;
    c = CTRL_BUBBLE;
    c.valid   = ($urandom_range(0, 5) != 0);
    c.rs1     = 4'($urandom_range(0, 3));
    c.rs2     = 4'($urandom_range(0, 3));
    c.use_rs1 = $urandom;
    c.use_rs2 = $urandom;
    c.rd      = 4'($urandom_range(0, 3));
    c.wr_rd   = $urandom;
    c.is_load = c.wr_rd && ($urandom_range(0, 3) == 0);
    return c;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Cycle 4 of the example: ADD R5,R3,R4 in decode, MVI R4 in E, MVI R3 in M.
    d = CTRL_BUBBLE; d.valid = 1; d.rs1 = 3; d.rs2 = 4; d.use_rs1 = 1; d.use_rs2 = 1;
    d.rd = 5; d.wr_rd = 1;
    e = CTRL_BUBBLE; e.valid = 1; e.rd = 4; e.wr_rd = 1;
    m = CTRL_BUBBLE; m.valid = 1; m.rd = 3; m.wr_rd = 1;
    rf1 = 0; rf2 = 0; mv = 427936; wv = 0; we = 0; wrd = 0;
    xo1 = 0; xo2 = 0; xf1 = 0; xf2 = 0;
    #1;
    checks++;
    if (op1 !== 427936 || f1 || !f2 || stall) begin
      failures++; $display("FAIL example: R3 from M into decode, R4 flagged for execute");
    end
    // Next cycle: ADD in execute takes R4 = 432544 from EX/MEM.
    xo1 = op1; xf1 = f1; xf2 = f2; mv = 432544; #1;
    checks++;
    if (xa !== 427936 || xb !== 432544) begin
      failures++; $display("FAIL example: execute operands %0d %0d", xa, xb);
    end
    // Load followed by a user: interlock.
    e.is_load = 1; #1;
    checks++;
    if (!stall) begin failures++; $display("FAIL load-use interlock missing"); end

    for (int n = 0; n < 5000; n++) begin
      d = rnd_ctrl(); e = rnd_ctrl(); m = rnd_ctrl();
      rf1 = $urandom; rf2 = $urandom; mv = $urandom; wv = $urandom;
      we = $urandom; wrd = 4'($urandom_range(0, 3));
      xo1 = $urandom; xo2 = $urandom; xf1 = $urandom; xf2 = $urandom;
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
