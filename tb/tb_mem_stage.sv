// tb_mem_stage: self-checking test of the memory and write-back stages.
// Random EX/MEM contents (loads, stores, ALU results, bubbles) are applied
// with a model data memory that answers a read with a function of the
// address. The bus outputs, the forwarding value and, one cycle later, the
// MEM/WB write-back are compared with expectations. Includes the load of the
// design's example (address 441159 returning 336250197).
module tb_mem_stage;
  import risc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  ctrl_t mc;
  logic [31:0] res, sd, add, dout, din, mval, wbd;
  logic wr, rd, wbwe;
  ridx_t wbrd;
  int checks = 0, failures = 0;

  mem_stage dut (.clk(clk), .rst(rst), .m_ctrl_i(mc), .m_result_i(res), .m_sdata_i(sd),
                 .mem_acc_add_o(add), .mem_acc_data_o(dout), .mem_acc_wr_o(wr),
                 .mem_acc_rd_o(rd), .mem_acc_data_i(din), .m_value_o(mval),
                 .wb_we_o(wbwe), .wb_rd_o(wbrd), .wb_data_o(wbd));

  function automatic logic [31:0] mem_model(logic [31:0] a);
    return (a == 441159) ? 32'd336250197 : (a * 32'd2654435761);
  endfunction
  assign din = mem_model(add);
  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_we;
    ridx_t exp_rd;
    logic [31:0] exp_wd;
    mc = CTRL_BUBBLE; res = 0; sd = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check("reset we", 32'(wbwe), 0);
    for (int n = 0; n < 1000; n++) begin
      int kind;
      kind = (n == 0) ? 0 : $urandom_range(0, 3);
      mc = CTRL_BUBBLE;
      mc.valid = (n == 0) || ($urandom_range(0, 7) != 0);
      mc.rd = 4'($urandom);
      res = (n == 0) ? 441159 : $urandom;
      sd = $urandom;
      case (kind)
        0: begin mc.is_load = 1; mc.wr_rd = 1; end
        1: begin mc.is_store = 1; end
        default: mc.wr_rd = $urandom;
      endcase
      #1;
      if (mc.valid && kind == 0) begin
        check("ld addr", add, res); check("ld rd", 32'(rd), 1); check("ld wr", 32'(wr), 0);
        check("ld fwd", mval, mem_model(res));
      end else if (mc.valid && kind == 1) begin
        check("st addr", add, res); check("st data", dout, sd); check("st wr", 32'(wr), 1);
        check("st rd", 32'(rd), 0);
      end else begin
        check("idle wr", 32'(wr), 0); check("idle rd", 32'(rd), 0);
        check("alu fwd", mval, res);
      end
      if (n == 0) check("example load data", mval, 336250197);
      exp_we = mc.valid && mc.wr_rd;
      exp_rd = mc.rd;
      exp_wd = (mc.valid && kind == 0) ? mem_model(res) : res;
      @(posedge clk); #1;
      check("wb we", 32'(wbwe), 32'(exp_we));
      if (exp_we) begin
        check("wb rd", 32'(wbrd), 32'(exp_rd));
        check("wb data", wbd, exp_wd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
