// tb_toplevel: end-to-end test of the pipelined core at its default size.
//
// Behavioural instruction and data memories (associative arrays, answering
// within the cycle) surround the core. Three directed programs reproduce the
// design's examples:
//   case 1  MVI R3,427936; MVI R4,432544; ADD R5,R3,R4
//           -> R5 = 860480, no stall, R5 written 4 cycles after ADD is fetched
//   case 2  MVI R3,427936; MVI R4,432544; LDBI R5,R3,13223; ADD R6,R4,R5
//           -> load address 441159, R5 = 336250197, R6 = 336682741,
//              exactly one interlock cycle
//   store   STR R1,R10,5 drives address 105 and data 77 in its fourth cycle
//   case 3  MVI R2,427040; MVI R3,427936; BNE R2,R3,34647
//           -> instruction addresses 0,1,2,3,34647,34648, the instruction at
//              address 3 is discarded
// Then random programs (all instructions, dense register reuse, forward
// branches) are run and the final registers, the sequence of stores and the
// number of interlock cycles and taken branches are compared with an
// instruction-by-instruction reference model. Every mechanism (forward into
// execute, forward into decode from memory and from write-back, load data
// forward, interlock, taken branch, store) is counted and must occur.
module tb_toplevel;
  import risc_pkg::*;

  logic clock = 1'b0, reset = 1'b1;
  logic [31:0] pc_ss, instr, add_o, dout, din;
  logic wr_o, rd_o;

  toplevel dut (.clock(clock), .reset(reset), .pc_ss(pc_ss), .instr_i(instr),
                .mem_acc_add_o(add_o), .mem_acc_data_o(dout), .mem_acc_wr_o(wr_o),
                .mem_acc_rd_o(rd_o), .mem_acc_data_i(din));

  always #5 clock = ~clock;

  // ---------------------------------------------------------------- memories
  logic [31:0] imem [int unsigned];
  logic [31:0] dmem [int unsigned];

  function automatic logic [31:0] dmem_rd(logic [31:0] a);
    if (dmem.exists(a)) return dmem[a];
    return a * 32'd2246822519 + 32'd374761393;  // unwritten words: fixed pattern
  endfunction

  assign instr = imem.exists(pc_ss) ? imem[pc_ss] : 32'd0;
  assign din   = rd_o ? dmem_rd(add_o) : 32'd0;

  typedef struct { logic [31:0] a, d; } st_t;
  st_t st_seen[$];
  always_ff @(posedge clock) begin
    if (!reset && wr_o) begin
      dmem[add_o] = dout;
      st_seen.push_back('{add_o, dout});
    end
  end

  // ---------------------------------------------------------------- counters
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_stall = 0, n_redirect = 0, n_fwd_e = 0, n_fwd_dm = 0, n_fwd_dw = 0;
  int n_fwd_load = 0, n_store = 0;

  always_ff @(posedge clock) begin
    cyc <= cyc + 1;
    if (!reset) begin
      if (dut.stall) n_stall <= n_stall + 1;
      if (dut.redirect) n_redirect <= n_redirect + 1;
      if (dut.x_ctrl.valid && (dut.x_fwd1 || dut.x_fwd2)) n_fwd_e <= n_fwd_e + 1;
      if (!dut.stall && (dut.u_hazard_fwd.hit1_m || dut.u_hazard_fwd.hit2_m)) begin
        n_fwd_dm <= n_fwd_dm + 1;
        if (dut.m_ctrl.is_load) n_fwd_load <= n_fwd_load + 1;
      end
      if (!dut.stall && ((dut.u_hazard_fwd.hit1_w && !dut.u_hazard_fwd.hit1_m) ||
                         (dut.u_hazard_fwd.hit2_w && !dut.u_hazard_fwd.hit2_m)))
        n_fwd_dw <= n_fwd_dw + 1;
      if (wr_o) n_store <= n_store + 1;
    end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [31:0] reg_of(int r);
    return dut.u_reg_bank.regs[r];
  endfunction

  task automatic do_reset();
    reset = 1'b1;
    repeat (2) @(posedge clock);
    #1 reset = 1'b0;
  endtask

  // ------------------------------------------------------- reference model
  logic [31:0] ref_r [NREGS];
  st_t st_ref[$];
  logic [31:0] ref_mem [int unsigned];
  int ref_stalls, ref_taken, ref_len;

  task automatic ref_run(int prog_len);
    logic [31:0] pc, w;
    int limit;
    logic prev_load;
    ridx_t prev_rd;
    for (int i = 0; i < NREGS; i++) ref_r[i] = 0;
    st_ref.delete();
    ref_mem.delete();
    ref_stalls = 0; ref_taken = 0; ref_len = 0;
    prev_load = 0; prev_rd = 0;
    pc = 0; limit = 0;
    while (pc < 32'(prog_len) && limit < 100000) begin
      logic [5:0] op;
      ridx_t a, b, c;
      logic [31:0] off, addr;
      logic uses_prev;
      w = imem.exists(pc) ? imem[pc] : 32'd0;
      op = w[31:26]; a = w[25:22]; b = w[21:18]; c = w[17:14];
      off = {{14{w[17]}}, w[17:0]};
      limit++; ref_len++;
      uses_prev = 0;
      case (op)
        OP_ADD, OP_SUB: uses_prev = prev_load && (prev_rd == b || prev_rd == c);
        OP_LDBI:        uses_prev = prev_load && (prev_rd == b);
        OP_STR, OP_BNE: uses_prev = prev_load && (prev_rd == a || prev_rd == b);
        default:        uses_prev = 0;
      endcase
      if (uses_prev) ref_stalls++;
      prev_load = (op == OP_LDBI);
      prev_rd = a;
      pc = pc + 1;
      case (op)
        OP_MVI:  ref_r[a] = {10'd0, w[21:0]};
        OP_ADD:  ref_r[a] = ref_r[b] + ref_r[c];
        OP_SUB:  ref_r[a] = ref_r[b] - ref_r[c];
        OP_LDBI: begin
          addr = ref_r[b] + off;
          ref_r[a] = ref_mem.exists(addr) ? ref_mem[addr] : dmem_rd(addr);
        end
        OP_STR: begin
          addr = ref_r[b] + off;
          ref_mem[addr] = ref_r[a];
          st_ref.push_back('{addr, ref_r[a]});
        end
        OP_BNE:  if (ref_r[a] != ref_r[b]) begin pc = {14'd0, w[17:0]}; ref_taken++; end
        default: ;
      endcase
    end
  endtask

  // ----------------------------------------------------------------- tests
  task automatic case1();
    int t_fetch, t_wb;
    imem.delete();
    imem[0] = enc_mvi(3, 427936);
    imem[1] = enc_mvi(4, 432544);
    imem[2] = enc_rrr(OP_ADD, 5, 3, 4);
    do_reset();
    t_fetch = -1; t_wb = -1;
    for (int k = 0; k < 12; k++) begin
      if (pc_ss == 2 && t_fetch < 0) t_fetch = k;
      if (dut.wb_we && dut.wb_rd == 5 && t_wb < 0) t_wb = k;
      if (dut.stall) begin failures++; $display("FAIL case1: unexpected stall"); end
      @(posedge clock); #1;
    end
    check("case1 R3", reg_of(3), 427936);
    check("case1 R4", reg_of(4), 432544);
    check("case1 R5", reg_of(5), 860480);
    check("case1 ADD fetch-to-write-back cycles", 32'(t_wb - t_fetch), 4);
  endtask

  task automatic case2();
    int stalls, seen_addr, t_fetch, t_wb;
    imem.delete();
    dmem.delete();
    dmem[441159] = 336250197;
    imem[0] = enc_mvi(3, 427936);
    imem[1] = enc_mvi(4, 432544);
    imem[2] = enc_rri(OP_LDBI, 5, 3, 13223);
    imem[3] = enc_rrr(OP_ADD, 6, 4, 5);
    do_reset();
    stalls = 0; seen_addr = 0; t_fetch = -1; t_wb = -1;
    for (int k = 0; k < 14; k++) begin
      if (dut.stall) stalls++;
      if (rd_o && add_o == 441159 && din == 336250197) seen_addr++;
      if (pc_ss == 3 && t_fetch < 0) t_fetch = k;
      if (dut.wb_we && dut.wb_rd == 6 && t_wb < 0) t_wb = k;
      @(posedge clock); #1;
    end
    check("case2 load address on bus", 32'(seen_addr), 1);
    check("case2 R5", reg_of(5), 336250197);
    check("case2 R6", reg_of(6), 336682741);
    check("case2 interlock cycles", 32'(stalls), 1);
    check("case2 ADD fetch-to-write-back cycles (one interlock)", 32'(t_wb - t_fetch), 5);
  endtask

  task automatic case3();
    logic [31:0] trace [6];
    imem.delete();
    imem[0] = enc_mvi(2, 427040);
    imem[1] = enc_mvi(3, 427936);
    imem[2] = enc_rri(OP_BNE, 2, 3, 34647);
    imem[3] = enc_mvi(9, 1);            // must be discarded
    imem[4] = enc_mvi(9, 2);            // must never be fetched
    imem[34647] = enc_mvi(10, 5);
    do_reset();
    for (int k = 0; k < 6; k++) begin
      trace[k] = pc_ss;
      @(posedge clock); #1;
    end
    check("case3 pc 0", trace[0], 0);
    check("case3 pc 1", trace[1], 1);
    check("case3 pc 2", trace[2], 2);
    check("case3 pc 3", trace[3], 3);
    check("case3 pc target", trace[4], 34647);
    check("case3 pc target+1", trace[5], 34648);
    repeat (6) @(posedge clock);
    #1;
    check("case3 R2", reg_of(2), 427040);
    check("case3 R3", reg_of(3), 427936);
    check("case3 flushed R9", reg_of(9), 0);
    check("case3 target executed R10", reg_of(10), 5);
  endtask

  // Store timing: a store puts its data on the bus in its fourth cycle.
  task automatic case_store();
    int t_fetch, t_wr;
    imem.delete();
    imem[0] = enc_mvi(1, 77);
    imem[1] = enc_mvi(10, 100);
    imem[2] = enc_rri(OP_STR, 1, 10, 5);
    do_reset();
    t_fetch = -1; t_wr = -1;
    for (int k = 0; k < 10; k++) begin
      if (pc_ss == 2 && t_fetch < 0) t_fetch = k;
      if (wr_o && t_wr < 0) begin
        t_wr = k;
        check("store address", add_o, 105);
        check("store data", dout, 77);
      end
      @(posedge clock); #1;
    end
    check("store in its fourth cycle", 32'(t_wr - t_fetch), 3);
  endtask

  function automatic logic [31:0] rnd_instr(int pc, int len);
    ridx_t a, b, c;
    int k;
    a = 4'($urandom_range(0, 5)); b = 4'($urandom_range(0, 5)); c = 4'($urandom_range(0, 5));
    k = $urandom_range(0, 99);
    if (k < 15) return enc_mvi(a, 22'($urandom_range(0, 4095)));
    if (k < 35) return enc_rrr(OP_ADD, a, b, c);
    if (k < 50) return enc_rrr(OP_SUB, a, b, c);
    if (k < 68) return enc_rri(OP_LDBI, a, b, 18'($urandom_range(0, 63)));
    if (k < 83) return enc_rri(OP_STR, a, b, 18'($urandom_range(0, 63)));
    if (k < 95) return enc_rri(OP_BNE, a, b, 18'(pc + $urandom_range(1, 4) < len ?
                                                    pc + $urandom_range(1, 4) : len));
    return 32'd0;
  endfunction

  task automatic random_prog(int len);
    int s0, r0;
    imem.delete();
    dmem.delete();
    for (int p = 0; p < len; p++) imem[p] = rnd_instr(p, len);
    ref_run(len);
    dmem.delete();
    st_seen.delete();
    do_reset();
    s0 = n_stall; r0 = n_redirect;
    for (int k = 0; k < 4 * len + 50 && pc_ss < 32'(len + 6); k++) @(posedge clock);
    #1;
    check("random: program ran to its end", 32'(pc_ss >= 32'(len + 6)), 1);
    for (int r = 0; r < NREGS; r++) check($sformatf("random R%0d", r), reg_of(r), ref_r[r]);
    check("random: number of stores", 32'(st_seen.size()), 32'(st_ref.size()));
    for (int i = 0; i < st_ref.size() && i < st_seen.size(); i++) begin
      check("random store address", st_seen[i].a, st_ref[i].a);
      check("random store data", st_seen[i].d, st_ref[i].d);
    end
    check("random: interlock cycles", 32'(n_stall - s0), 32'(ref_stalls));
    check("random: taken branches", 32'(n_redirect - r0), 32'(ref_taken));
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    case1();
    case2();
    case3();
    case_store();
    for (int n = 0; n < 200; n++) random_prog(150);
    $display("events: fwd_execute=%0d fwd_decode_mem=%0d fwd_decode_wb=%0d load_fwd=%0d interlock=%0d taken_branch=%0d store=%0d",
             n_fwd_e, n_fwd_dm, n_fwd_dw, n_fwd_load, n_stall, n_redirect, n_store);
    checks++; if (n_fwd_e == 0)    begin failures++; $display("FAIL no forward into execute"); end
    checks++; if (n_fwd_dm == 0)   begin failures++; $display("FAIL no forward into decode from memory stage"); end
    checks++; if (n_fwd_dw == 0)   begin failures++; $display("FAIL no forward into decode from write-back"); end
    checks++; if (n_fwd_load == 0) begin failures++; $display("FAIL no load data forward"); end
    checks++; if (n_stall == 0)    begin failures++; $display("FAIL no load interlock"); end
    checks++; if (n_redirect == 0) begin failures++; $display("FAIL no taken branch"); end
    checks++; if (n_store == 0)    begin failures++; $display("FAIL no store"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
