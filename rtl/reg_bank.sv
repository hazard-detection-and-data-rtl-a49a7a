// reg_bank: general register file of the core.
//
// NREGS registers of XLEN bits with two combinational read ports, used by the
// decode stage, and one write port, used by the write-back stage at the end
// of its cycle. A read of the register being written in the same cycle
// returns the old contents: the hazard detection and forwarding unit supplies
// the new value in that case. All registers clear to zero on reset, and R0 is
// an ordinary register.
//
// The 16 x 32-bit size follows the design; the reset to zero, the plain R0 and
// the read-before-write behaviour are this design's choices.
module reg_bank #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 16,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [AW-1:0]   ra1_i,
  output logic [XLEN-1:0] rd1_o,
  input  logic [AW-1:0]   ra2_i,
  output logic [XLEN-1:0] rd2_o,
  input  logic            we_i,
  input  logic [AW-1:0]   wa_i,
  input  logic [XLEN-1:0] wd_i
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we_i) begin
      regs[wa_i] <= wd_i;
    end
  end

  assign rd1_o = regs[ra1_i];
  assign rd2_o = regs[ra2_i];

endmodule
