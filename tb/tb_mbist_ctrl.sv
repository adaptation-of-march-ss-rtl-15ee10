// Self-checking testbench for mbist_ctrl.
//
// The testbench plays the address generator (a counter driven by ag_init,
// ag_init_up, ag_en and ud) and builds its own list of the operations that
// the word-oriented March SS test must perform on N = 8 words: W0 ascending,
// then for each pattern p an ascending and a descending element
// (Rp, Rp, Wp, Rp, Wp+1), then R0 ascending. Every cycle the controller's
// operation (read or write, pattern index, address) is compared with the
// next list entry. Some reads are declared faulty: the controller must then
// spend exactly one cycle in S7 with fault_log high and no memory operation,
// and resume with the next operation. The test length must be (2 + 10P) x N
// operations plus one cycle per fault, with test_done at the end. Runs for
// P = 2 (22N) and P = 8 (82N).
module tb_mbist_ctrl;
  import mbist_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int n_fault_states = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- DUT with 2 patterns ----------------
  logic tm2, last2, fault2, ud2, ini2, iniup2, en2, wr2, rd2, r0_2, r1_2, clr2, flog2, done2, busy2;
  logic [0:0] wsel2, rsel2;
  ctrl_state_t st2;
  logic [4:0] step2;
  int addr2;

  mbist_ctrl #(.NUM_PATTERNS(2)) dut2 (
    .clk, .rst_n, .tm(tm2), .last_addr(last2), .fault(fault2), .ud(ud2), .ag_init(ini2),
    .ag_init_up(iniup2), .ag_en(en2), .wr_test(wr2), .rd_test(rd2), .wsel(wsel2), .rsel(rsel2),
    .rd0(r0_2), .rd1(r1_2), .ora_clear(clr2), .fault_log(flog2), .test_done(done2), .busy(busy2),
    .state(st2), .march_step(step2));

  always_ff @(posedge clk) begin
    if (ini2)     addr2 <= iniup2 ? 0 : N - 1;
    else if (en2) addr2 <= ud2 ? addr2 + 1 : addr2 - 1;
  end
  assign last2 = ud2 ? (addr2 == N - 1) : (addr2 == 0);

  // ---------------- DUT with 8 patterns ----------------
  logic tm8, last8, fault8, ud8, ini8, iniup8, en8, wr8, rd8, r0_8, r1_8, clr8, flog8, done8, busy8;
  logic [2:0] wsel8, rsel8;
  ctrl_state_t st8;
  logic [4:0] step8;
  int addr8;

  mbist_ctrl #(.NUM_PATTERNS(8)) dut8 (
    .clk, .rst_n, .tm(tm8), .last_addr(last8), .fault(fault8), .ud(ud8), .ag_init(ini8),
    .ag_init_up(iniup8), .ag_en(en8), .wr_test(wr8), .rd_test(rd8), .wsel(wsel8), .rsel(rsel8),
    .rd0(r0_8), .rd1(r1_8), .ora_clear(clr8), .fault_log(flog8), .test_done(done8), .busy(busy8),
    .state(st8), .march_step(step8));

  always_ff @(posedge clk) begin
    if (ini8)     addr8 <= iniup8 ? 0 : N - 1;
    else if (en8) addr8 <= ud8 ? addr8 + 1 : addr8 - 1;
  end
  assign last8 = ud8 ? (addr8 == N - 1) : (addr8 == 0);

  // ---------------- expected operation list ----------------
  typedef struct { bit wr; int pat; int addr; int step; } op_t;

  function automatic void build(input int P, ref op_t ops[$]);
    ops.delete();
    for (int a = 0; a < N; a++) ops.push_back('{1, 0, a, 1});
    for (int dir = 0; dir < 2; dir++)
      for (int p = 0; p < P; p++)
        for (int i = 0; i < N; i++) begin
          int a = (dir == 0) ? i : N - 1 - i;
          int s = 2 + dir * P + p;
          ops.push_back('{0, p, a, s});
          ops.push_back('{0, p, a, s});
          ops.push_back('{1, p, a, s});
          ops.push_back('{0, p, a, s});
          ops.push_back('{1, (p + 1) % P, a, s});
        end
    for (int a = 0; a < N; a++) ops.push_back('{0, 0, a, 2 + 2 * P});
  endfunction

  // Runs one complete test on the selected DUT; faulty_ops lists the indices
  // of reads that are reported as failing.
  task automatic run_test(input int P, input int faulty_ops[$]);
    op_t ops[$];
    int idx = 0, cycles = 0, faults_given = 0;
    bit expect_s7 = 0, finished = 0;
    build(P, ops);
    @(negedge clk);
    if (P == 2) tm2 = 1; else tm8 = 1;
    @(negedge clk);   // S0 -> S1 taken at this edge
    while (!finished && cycles < 2000) begin
      logic wr, rd, flog, done;
      int wsel, rsel, addr, step;
      #1;
      if (P == 2) begin
        wr = wr2; rd = rd2; flog = flog2; done = done2; wsel = int'(wsel2); rsel = int'(rsel2); addr = addr2; step = int'(step2);
      end else begin
        wr = wr8; rd = rd8; flog = flog8; done = done8; wsel = int'(wsel8); rsel = int'(rsel8); addr = addr8; step = int'(step8);
      end
      cycles++;
      if (expect_s7) begin
        check(flog && !wr && !rd, $sformatf("P=%0d S7 cycle after fault at op %0d", P, idx - 1));
        if (flog) n_fault_states++;
        expect_s7 = 0;
      end else if (idx < ops.size()) begin
        op_t e = ops[idx];
        check(wr == e.wr && rd == !e.wr && addr == e.addr && step == e.step &&
              (e.wr ? wsel == e.pat : rsel == e.pat),
              $sformatf("P=%0d op %0d: wr=%0b rd=%0b sel=%0d addr=%0d step=%0d, expected wr=%0b pat=%0d addr=%0d step=%0d",
                        P, idx, wr, rd, e.wr ? wsel : rsel, addr, step, e.wr, e.pat, e.addr, e.step));
        if (rd && (idx inside {faulty_ops})) begin
          if (P == 2) fault2 = 1; else fault8 = 1;
          faults_given++;
          expect_s7 = 1;
        end
        idx++;
      end else begin
        check(done, $sformatf("P=%0d test_done after last operation", P));
        finished = 1;
      end
      @(negedge clk);
      fault2 = 0; fault8 = 0;
    end
    check(finished, $sformatf("P=%0d test finished", P));
    check(cycles == (2 + 10 * P) * N + faults_given + 1,
          $sformatf("P=%0d cycle count %0d, expected %0d", P, cycles, (2 + 10 * P) * N + faults_given + 1));
    tm2 = 0; tm8 = 0;
    @(negedge clk);
    #1 check(!busy2 && !busy8, "back in S0 after S8");
  endtask

  initial begin
    tm2 = 0; tm8 = 0; fault2 = 0; fault8 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // faults in the first ascending element, inside a descending element and
    // at the very last read of the test
    run_test(2, '{8, 9, 61, 101, 175});
    run_test(8, '{21, 401, 8 + 80 * 8 + 7});
    run_test(2, '{});
    check(n_fault_states == 8, $sformatf("S7 visits %0d", n_fault_states));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
