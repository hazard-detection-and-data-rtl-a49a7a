// hazard_fwd_unit: hazard detection and data forwarding of the pipeline.
//
// Detection. Each source register of the instruction in decode is compared
// with the destination register of the three instructions ahead of it, which
// sit in execute (E), memory (M) and write-back (W). An instruction four or
// more places ahead has already written the register bank, so no further
// comparison is needed. Only instructions that really write a register take
// part (e_ctrl_i/m_ctrl_i .wr_rd, w_we_i).
//
// Forwarding, per source, the youngest match wins:
//   match in E, E is not a load -> fwd_e flag: execute takes the operand from
//                                  the EX/MEM register one cycle later
//                                  (the E2-M1 -> E3 path of the schedule)
//   match in E, E is a load     -> stall_o: one-cycle interlock; the next
//                                  cycle the load sits in M and is caught
//                                  by the line below
//   match in M                  -> d_op: M-stage value (ALU result, or the
//                                  load data returned during the memory cycle)
//   match in W                  -> d_op: write-back value
//   no match                    -> d_op: register bank output
// Execute side: x_a_o/x_b_o pick m_value_i when the flag stored with the
// operand in ID/EX is set, otherwise the operand read at decode.
//
// All combinational. The comparison with the three preceding destinations,
// the forwarding into decode and into execute, and the single interlock cycle
// for a load used by the very next instruction follow the design; the split of
// the work between a decode-side and an execute-side multiplexer is this
// design's own.
module hazard_fwd_unit
  import risc_pkg::*;
(
  // decode stage
  input  ctrl_t           d_ctrl_i,
  input  logic [XLEN-1:0] rf_rd1_i,
  input  logic [XLEN-1:0] rf_rd2_i,
  // the three instructions ahead
  input  ctrl_t           e_ctrl_i,
  input  ctrl_t           m_ctrl_i,
  input  logic [XLEN-1:0] m_value_i,
  input  logic            w_we_i,
  input  ridx_t           w_rd_i,
  input  logic [XLEN-1:0] w_value_i,
  // decode-side results
  output logic [XLEN-1:0] d_op1_o,
  output logic [XLEN-1:0] d_op2_o,
  output logic            d_fwd1_e_o,
  output logic            d_fwd2_e_o,
  output logic            stall_o,
  // execute side
  input  logic [XLEN-1:0] x_op1_i,
  input  logic [XLEN-1:0] x_op2_i,
  input  logic            x_fwd1_i,
  input  logic            x_fwd2_i,
  output logic [XLEN-1:0] x_a_o,
  output logic [XLEN-1:0] x_b_o
);

  logic e_wr, m_wr;
  logic hit1_e, hit1_m, hit1_w, hit2_e, hit2_m, hit2_w;

  assign e_wr = e_ctrl_i.valid && e_ctrl_i.wr_rd;
  assign m_wr = m_ctrl_i.valid && m_ctrl_i.wr_rd;

  assign hit1_e = d_ctrl_i.use_rs1 && e_wr   && (e_ctrl_i.rd == d_ctrl_i.rs1);
  assign hit1_m = d_ctrl_i.use_rs1 && m_wr   && (m_ctrl_i.rd == d_ctrl_i.rs1);
  assign hit1_w = d_ctrl_i.use_rs1 && w_we_i && (w_rd_i      == d_ctrl_i.rs1);
  assign hit2_e = d_ctrl_i.use_rs2 && e_wr   && (e_ctrl_i.rd == d_ctrl_i.rs2);
  assign hit2_m = d_ctrl_i.use_rs2 && m_wr   && (m_ctrl_i.rd == d_ctrl_i.rs2);
  assign hit2_w = d_ctrl_i.use_rs2 && w_we_i && (w_rd_i      == d_ctrl_i.rs2);

  assign stall_o    = e_ctrl_i.is_load && (hit1_e || hit2_e);
  assign d_fwd1_e_o = hit1_e && !e_ctrl_i.is_load;
  assign d_fwd2_e_o = hit2_e && !e_ctrl_i.is_load;

  always_comb begin
    if (hit1_m)      d_op1_o = m_value_i;
    else if (hit1_w) d_op1_o = w_value_i;
    else             d_op1_o = rf_rd1_i;
    if (hit2_m)      d_op2_o = m_value_i;
    else if (hit2_w) d_op2_o = w_value_i;
    else             d_op2_o = rf_rd2_i;
  end

  assign x_a_o = x_fwd1_i ? m_value_i : x_op1_i;
  assign x_b_o = x_fwd2_i ? m_value_i : x_op2_i;

endmodule
