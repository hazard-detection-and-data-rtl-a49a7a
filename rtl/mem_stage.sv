// mem_stage: memory access and write-back stages.
//
// Memory cycle: for a load or store the data pointer (the address computed in
// execute) is put on mem_acc_add_o; a store also drives mem_acc_data_o and
// mem_acc_wr_o, a load raises mem_acc_rd_o. The data memory answers a read on
// mem_acc_data_i within the same cycle. m_value_o is the value the instruction
// in this stage will write back (the load data, or the execute result) and is
// what the forwarding unit feeds back into decode and execute.
// At the clock edge that value, the destination and the write enable are
// captured in the MEM/WB register; in the next cycle they drive the register
// bank write port (wb_*), which writes at the end of that cycle.
// A store ends in the memory stage (four cycles in the pipeline), every other
// instruction in write-back (five cycles).
// Bus idle values (zero address and data when no access) and the separate
// read strobe are this design's choices; the signal names of the data bus
// follow the design.
module mem_stage
  import risc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  // EX/MEM register contents
  input  ctrl_t           m_ctrl_i,
  input  logic [XLEN-1:0] m_result_i,
  input  logic [XLEN-1:0] m_sdata_i,
  // data bus
  output logic [XLEN-1:0] mem_acc_add_o,
  output logic [XLEN-1:0] mem_acc_data_o,
  output logic            mem_acc_wr_o,
  output logic            mem_acc_rd_o,
  input  logic [XLEN-1:0] mem_acc_data_i,
  // forwarding value of the instruction in this stage
  output logic [XLEN-1:0] m_value_o,
  // MEM/WB register: write-back
  output logic            wb_we_o,
  output ridx_t           wb_rd_o,
  output logic [XLEN-1:0] wb_data_o
);

  logic ld, st;

  assign ld = m_ctrl_i.valid && m_ctrl_i.is_load;
  assign st = m_ctrl_i.valid && m_ctrl_i.is_store;

  assign mem_acc_add_o  = (ld || st) ? m_result_i : '0;
  assign mem_acc_data_o = st ? m_sdata_i : '0;
  assign mem_acc_wr_o   = st;
  assign mem_acc_rd_o   = ld;

  assign m_value_o = ld ? mem_acc_data_i : m_result_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_we_o   <= 1'b0;
      wb_rd_o   <= '0;
      wb_data_o <= '0;
    end else begin
      wb_we_o   <= m_ctrl_i.valid && m_ctrl_i.wr_rd;
      wb_rd_o   <= m_ctrl_i.rd;
      wb_data_o <= m_value_o;
    end
  end

endmodule
