// toplevel: 32-bit five-stage pipelined RISC core with hazard detection and
// data forwarding.
//
// Stages: fetch (fetch_stage), decode (decoder, reg_bank, hazard_fwd_unit),
// execute (alu), memory and write-back (mem_stage). This module holds the
// ID/EX and EX/MEM pipeline registers and connects the stages. The machine is
// Harvard: the instruction bus (pc_ss / instr_i) and the data bus
// (mem_acc_*) are separate, and both memories answer within the cycle in
// which they are addressed.
//
// Hazards handled:
//   * RAW on an ALU result: forwarded without a stall, either into decode
//     (producer two or three places ahead) or into execute (producer directly
//     ahead), so back-to-back dependent instructions run at one per cycle.
//   * RAW on a load result needed by the very next instruction: one interlock
//     cycle (a bubble enters execute, fetch and decode hold), after which the
//     load data is forwarded from the memory stage. One instruction later no
//     interlock is needed.
//   * BNE is resolved in execute. When taken, the instruction address switches
//     to the target in the same cycle and the one instruction in decode is
//     discarded: a taken branch occupies fetch, decode and execute, three
//     cycles.
// Timing: an instruction fetched in cycle n is decoded in n+1, executes in
// n+2, accesses memory in n+3 and is written back at the end of n+4.
// Reset is synchronous and active high; it empties the pipeline, clears the
// registers and restarts fetching at address 0.
//
// The five stages, the comparison against the three preceding destinations,
// the forwarding paths, the one-cycle load interlock, the 16 x 32-bit
// register bank and the port names clock, reset, pc_ss and mem_acc_* follow
// the design. The instruction encoding, the same-cycle memories, the read
// strobe mem_acc_rd_o, the name of the instruction input and the write strobe
// name mem_acc_wr_o are this design's own.
module toplevel
  import risc_pkg::*;
(
  input  logic            clock,
  input  logic            reset,
  // instruction bus
  output logic [XLEN-1:0] pc_ss,
  input  logic [31:0]     instr_i,
  // data bus
  output logic [XLEN-1:0] mem_acc_add_o,
  output logic [XLEN-1:0] mem_acc_data_o,
  output logic            mem_acc_wr_o,
  output logic            mem_acc_rd_o,
  input  logic [XLEN-1:0] mem_acc_data_i
);

  // ---------------------------------------------------------------- fetch
  logic            stall, redirect;
  logic [XLEN-1:0] target;
  logic [31:0]     ifid_instr;
  logic            ifid_valid;

  fetch_stage u_fetch (
    .clk          (clock),
    .rst          (reset),
    .stall_i      (stall),
    .redirect_i   (redirect),
    .target_i     (target),
    .pc_ss_o      (pc_ss),
    .instr_i      (instr_i),
    .ifid_instr_o (ifid_instr),
    .ifid_valid_o (ifid_valid)
  );

  // --------------------------------------------------------------- decode
  ctrl_t           d_ctrl;
  logic [XLEN-1:0] rf_rd1, rf_rd2;
  logic [XLEN-1:0] d_op1, d_op2;
  logic            d_fwd1_e, d_fwd2_e;

  decoder u_decoder (
    .instr_i (ifid_instr),
    .valid_i (ifid_valid),
    .ctrl_o  (d_ctrl)
  );

  logic            wb_we;
  ridx_t           wb_rd;
  logic [XLEN-1:0] wb_data;

  reg_bank #(.XLEN(XLEN), .NREGS(NREGS)) u_reg_bank (
    .clk   (clock),
    .rst   (reset),
    .ra1_i (d_ctrl.rs1),
    .rd1_o (rf_rd1),
    .ra2_i (d_ctrl.rs2),
    .rd2_o (rf_rd2),
    .we_i  (wb_we),
    .wa_i  (wb_rd),
    .wd_i  (wb_data)
  );

  // ID/EX register
  ctrl_t           x_ctrl;
  logic [XLEN-1:0] x_op1, x_op2;
  logic            x_fwd1, x_fwd2;

  // EX/MEM register
  ctrl_t           m_ctrl;
  logic [XLEN-1:0] m_result, m_sdata, m_value;

  logic [XLEN-1:0] x_a, x_b;

  hazard_fwd_unit u_hazard_fwd (
    .d_ctrl_i   (d_ctrl),
    .rf_rd1_i   (rf_rd1),
    .rf_rd2_i   (rf_rd2),
    .e_ctrl_i   (x_ctrl),
    .m_ctrl_i   (m_ctrl),
    .m_value_i  (m_value),
    .w_we_i     (wb_we),
    .w_rd_i     (wb_rd),
    .w_value_i  (wb_data),
    .d_op1_o    (d_op1),
    .d_op2_o    (d_op2),
    .d_fwd1_e_o (d_fwd1_e),
    .d_fwd2_e_o (d_fwd2_e),
    .stall_o    (stall),
    .x_op1_i    (x_op1),
    .x_op2_i    (x_op2),
    .x_fwd1_i   (x_fwd1),
    .x_fwd2_i   (x_fwd2),
    .x_a_o      (x_a),
    .x_b_o      (x_b)
  );

  always_ff @(posedge clock) begin
    if (reset || stall || redirect) begin
      // bubble: load interlock, or the instruction behind a taken branch
      x_ctrl <= CTRL_BUBBLE;
      x_op1  <= '0;
      x_op2  <= '0;
      x_fwd1 <= 1'b0;
      x_fwd2 <= 1'b0;
    end else begin
      x_ctrl <= d_ctrl;
      x_op1  <= d_op1;
      x_op2  <= d_op2;
      x_fwd1 <= d_fwd1_e;
      x_fwd2 <= d_fwd2_e;
    end
  end

  // -------------------------------------------------------------- execute
  logic [XLEN-1:0] x_result;
  logic            x_taken;

  alu u_alu (
    .op_i     (x_ctrl.alu_op),
    .a_i      (x_a),
    .b_i      (x_b),
    .imm_i    (x_ctrl.imm),
    .result_o (x_result),
    .taken_o  (x_taken)
  );

  assign redirect = x_ctrl.valid && x_ctrl.is_branch && x_taken;
  assign target   = x_result;

  always_ff @(posedge clock) begin
    if (reset) begin
      m_ctrl   <= CTRL_BUBBLE;
      m_result <= '0;
      m_sdata  <= '0;
    end else begin
      m_ctrl   <= x_ctrl;
      m_result <= x_result;
      m_sdata  <= x_b;
    end
  end

  // ----------------------------------------------- memory and write-back
  mem_stage u_mem (
    .clk            (clock),
    .rst            (reset),
    .m_ctrl_i       (m_ctrl),
    .m_result_i     (m_result),
    .m_sdata_i      (m_sdata),
    .mem_acc_add_o  (mem_acc_add_o),
    .mem_acc_data_o (mem_acc_data_o),
    .mem_acc_wr_o   (mem_acc_wr_o),
    .mem_acc_rd_o   (mem_acc_rd_o),
    .mem_acc_data_i (mem_acc_data_i),
    .m_value_o      (m_value),
    .wb_we_o        (wb_we),
    .wb_rd_o        (wb_rd),
    .wb_data_o      (wb_data)
  );

  // A load interlock and a taken branch never coincide: the instruction in
  // execute is either a load or a branch.
  a_stall_redirect_exclusive: assert property (@(posedge clock) disable iff (reset)
    !(stall && redirect));

endmodule
