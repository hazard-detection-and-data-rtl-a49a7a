// tb_fetch_stage: self-checking test of the program counter and IF/ID.
// A model instruction memory returns ~address for each word address. The test
// checks the address sequence after reset, that a stall holds PC and IF/ID,
// and that a redirect puts the target on the bus in the same cycle and
// continues from target + 1 (the 0,1,2,3,34647,34648 trace of the design's
// branch example), then a random stall/redirect sequence against a model.
module tb_fetch_stage;
  import risc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic stall, redirect;
  logic [31:0] target, pc, instr, ifid;
  logic ifv;
  int checks = 0, failures = 0;

  fetch_stage dut (.clk(clk), .rst(rst), .stall_i(stall), .redirect_i(redirect),
                   .target_i(target), .pc_ss_o(pc), .instr_i(instr),
                   .ifid_instr_o(ifid), .ifid_valid_o(ifv));

  assign instr = ~pc;
  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = 0; redirect = 0; target = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check("reset valid", 32'(ifv), 0);
    check("pc0", pc, 0);
    for (int i = 1; i <= 3; i++) begin
      @(posedge clk); #1;
      check("pc seq", pc, i);
      check("ifid", ifid, ~(i - 1));
      check("ifid valid", 32'(ifv), 1);
    end
    // stall two cycles at pc 3
    stall = 1;
    repeat (2) begin
      @(posedge clk); #1;
      check("stall pc", pc, 3);
      check("stall ifid", ifid, ~32'd2);
    end
    stall = 0;
    // redirect to 34647 while pc would be 3
    redirect = 1; target = 34647; #1;
    check("redirect same cycle", pc, 34647);
    @(posedge clk); #1;
    redirect = 0; #1;
    check("after redirect pc", pc, 34648);
    check("target fetched", ifid, ~32'd34647);
    @(posedge clk); #1;
    check("pc continues", pc, 34649);
    // a redirect wins over a stall
    stall = 1; redirect = 1; target = 77; #1;
    @(posedge clk); #1;
    stall = 0; redirect = 0; #1;
    check("redirect over stall", pc, 78);
    // random stall/redirect sequence against a cycle model
    begin
      logic [31:0] mpc, mifid;
      mpc = pc; mifid = ifid;
      for (int n = 0; n < 500; n++) begin
        stall = ($urandom_range(0, 3) == 0);
        redirect = ($urandom_range(0, 5) == 0);
        target = $urandom_range(0, 100000);
        #1;
        check("random pc_ss", pc, redirect ? target : mpc);
        if (redirect || !stall) begin
          mifid = ~(redirect ? target : mpc);
          mpc = (redirect ? target : mpc) + 1;
        end
        @(posedge clk); #1;
        check("random ifid", ifid, mifid);
      end
      stall = 0; redirect = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
