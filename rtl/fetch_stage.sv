// fetch_stage: program counter and IF/ID pipeline register.
//
// The instruction memory is addressed by word: pc_ss_o counts 0, 1, 2, ...
// and the memory returns the word for that address on instr_i within the
// same cycle. At the clock edge the word is captured in the IF/ID register
// and the PC advances by one.
//   stall_i    (load interlock)  PC and IF/ID hold their contents.
//   redirect_i (BNE taken, resolved in execute) pc_ss_o shows target_i in
//              that same cycle, so the branch target is fetched at once and
//              the PC continues from target_i + 1. The younger instruction in
//              decode is discarded by the caller; the one being fetched is the
//              target, so a taken branch costs a single lost slot.
// Reset (synchronous, active high) sets the PC to 0 and empties IF/ID.
// Word addressing, the reset address 0 and the direct switch of the
// instruction address to the branch target follow the instruction address
// trace of the design's branch example (0, 1, 2, 3, 34647, 34648, ...); the
// same-cycle instruction return is this design's choice.
module fetch_stage
  import risc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            stall_i,
  input  logic            redirect_i,
  input  logic [XLEN-1:0] target_i,
  output logic [XLEN-1:0] pc_ss_o,
  input  logic [31:0]     instr_i,
  output logic [31:0]     ifid_instr_o,
  output logic            ifid_valid_o
);

  logic [XLEN-1:0] pc_q;

  assign pc_ss_o = redirect_i ? target_i : pc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q         <= '0;
      ifid_instr_o <= '0;
      ifid_valid_o <= 1'b0;
    end else if (redirect_i || !stall_i) begin
      pc_q         <= pc_ss_o + 1'b1;
      ifid_instr_o <= instr_i;
      ifid_valid_o <= 1'b1;
    end
  end

endmodule
