// tb_reg_bank: self-checking test of the register bank.
// Checks that reset clears every register, then performs random writes and
// reads against a shadow array, including a read of the register written in
// the same cycle (old value expected, the write lands at the clock edge).
module tb_reg_bank;
  localparam int unsigned XLEN = 32, NREGS = 16;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] ra1, ra2, wa;
  logic [XLEN-1:0] rd1, rd2, wd;
  logic we;
  logic [XLEN-1:0] shadow [NREGS];
  int checks = 0, failures = 0;

  reg_bank dut (
    .clk(clk), .rst(rst), .ra1_i(ra1), .rd1_o(rd1), .ra2_i(ra2), .rd2_o(rd2),
    .we_i(we), .wa_i(wa), .wd_i(wd));

  always #5 clk = ~clk;

  task automatic check(string what, logic [XLEN-1:0] got, logic [XLEN-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < NREGS; i++) begin
      shadow[i] = '0;
      ra1 = 4'(i); ra2 = 4'(NREGS-1-i); #1;
      check("reset rd1", rd1, '0);
      check("reset rd2", rd2, '0);
    end
    for (int n = 0; n < 400; n++) begin
      we  = ($urandom_range(0, 3) != 0);
      wa  = 4'($urandom_range(0, NREGS-1));
      wd  = $urandom;
      ra1 = (n % 5 == 0) ? wa : 4'($urandom_range(0, NREGS-1));
      ra2 = 4'($urandom_range(0, NREGS-1));
      #1;
      check("rd1", rd1, shadow[ra1]);
      check("rd2", rd2, shadow[ra2]);
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
    end
    we = 0;
    for (int i = 0; i < NREGS; i++) begin
      ra1 = 4'(i); #1;
      check("final", rd1, shadow[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
