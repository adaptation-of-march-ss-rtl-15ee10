// Self-checking testbench for mbist_sram, the memory with its March SS
// self-test.
//
// Two instances: the default 1024 x 8 memory with two patterns (22N test)
// and stuck-at-1 faults in the MSB of words 3FFh and 003h, and a 64 x 8
// memory with all eight patterns (82N test) and a stuck-at-1 and a
// stuck-at-0 fault. For each, the testbench runs the March sequence on its
// own model of the faulty memory to find which reads must fail, then checks
// that the hardware reports exactly those faults (fault pulses, faulty_addr
// at fault_log), that fault_detected is set, that the test takes
// (2 + 10P) x N cycles plus one per failing read, and that normal-mode
// writes and reads work before and after the test.
module tb_mbist_sram;
  import mbist_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // ---- instance A: 1024 words, 2 patterns ----
  logic        tmA, wrA, rdA, fA, flA, fdA, doneA, busyA;
  logic [9:0]  addrA, faA;
  logic [7:0]  dinA, doutA;
  logic [4:0]  stepA;

  mbist_sram #(.ADDR_W(10), .NUM_PATTERNS(2), .FI_N(2),
               .FI_ADDRS({10'h003, 10'h3FF}), .FI_SA1({8'h80, 8'h80}), .FI_SA0(16'h0)) dutA (
    .clk, .rst_n, .tm(tmA), .addr_in(addrA), .data_in(dinA), .wr(wrA), .rd(rdA),
    .data_out(doutA), .fault(fA), .fault_log(flA), .faulty_addr(faA), .fault_detected(fdA),
    .test_done(doneA), .busy(busyA), .march_step(stepA));

  // ---- instance B: 1024 words, 8 patterns ----
  logic        tmB, wrB, rdB, fB, flB, fdB, doneB, busyB;
  logic [9:0]  addrB, faB;
  logic [7:0]  dinB, doutB;
  logic [4:0]  stepB;

  mbist_sram #(.ADDR_W(10), .NUM_PATTERNS(8), .FI_N(2),
               .FI_ADDRS({10'h321, 10'h005}), .FI_SA1({8'h00, 8'h04}), .FI_SA0({8'h10, 8'h00})) dutB (
    .clk, .rst_n, .tm(tmB), .addr_in(addrB), .data_in(dinB), .wr(wrB), .rd(rdB),
    .data_out(doutB), .fault(fB), .fault_log(flB), .faulty_addr(faB), .fault_detected(fdB),
    .test_done(doneB), .busy(busyB), .march_step(stepB));

  // Reference patterns written out independently of the package.
  localparam logic [7:0] PAT [8] = '{8'h00, 8'hFF, 8'h0F, 8'hF0, 8'h33, 8'hCC, 8'h55, 8'hAA};

  typedef struct { int addr; logic [7:0] sa1, sa0; } fi_t;

  // Runs the March test on a model memory; returns the addresses of the
  // failing reads in order.
  function automatic void model_march(input int N, input int P, input fi_t fi[$], ref int fails[$]);
    logic [7:0] m [];
    m = new[N];
    fails.delete();
    for (int a = 0; a < N; a++) m[a] = PAT[0];
    for (int dir = 0; dir < 2; dir++)
      for (int p = 0; p < P; p++)
        for (int i = 0; i < N; i++) begin
          int a = (dir == 0) ? i : N - 1 - i;
          for (int k = 0; k < 5; k++) begin
            if (k == 2)      m[a] = PAT[p];
            else if (k == 4) m[a] = PAT[(p + 1) % P];
            else begin
              logic [7:0] v = m[a];
              foreach (fi[j]) if (fi[j].addr == a) v = (v | fi[j].sa1) & ~fi[j].sa0;
              if (v != PAT[p]) fails.push_back(a);
            end
          end
        end
    for (int a = 0; a < N; a++) begin
      logic [7:0] v = m[a];
      foreach (fi[j]) if (fi[j].addr == a) v = (v | fi[j].sa1) & ~fi[j].sa0;
      if (v != PAT[0]) fails.push_back(a);
    end
  endfunction

  int n_fault_pulses, cyclesA, cyclesB;
  int logged[$];

  // Collect the logged faulty addresses of whichever test is running.
  always @(posedge clk) begin
    if (flA) logged.push_back(int'(faA));
    if (flB) logged.push_back(int'(faB));
    if (fA || fB) n_fault_pulses++;
  end

  initial begin
    int expA[$], expB[$];
    fi_t fiA[$], fiB[$];
    int c;

    tmA = 0; wrA = 0; rdA = 0; addrA = 0; dinA = 0;
    tmB = 0; wrB = 0; rdB = 0; addrB = 0; dinB = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // normal mode write / read on instance A
    @(negedge clk); addrA = 10'h155; dinA = 8'h3C; wrA = 1;
    @(negedge clk); wrA = 0; rdA = 1; #1;
    check(doutA == 8'h3C, "normal-mode read back");
    @(negedge clk); addrA = 10'h003; dinA = 8'h55; wrA = 1; rdA = 0;
    @(negedge clk); wrA = 0; rdA = 1; #1;
    check(doutA == 8'hD5, "stuck-at-1 MSB seen in normal mode (55h -> D5h)");
    @(negedge clk); rdA = 0;

    // ---- self-test A ----
    fiA.push_back('{'h3FF, 8'h80, 8'h00});
    fiA.push_back('{'h003, 8'h80, 8'h00});
    model_march(1024, 2, fiA, expA);
    logged.delete(); n_fault_pulses = 0; c = 0;
    @(negedge clk); tmA = 1;
    do begin @(negedge clk); c++; end while (!doneA && c < 100000);
    cyclesA = c;
    tmA = 0;
    check(doneA, "test A finished");
    check(cyclesA == 22 * 1024 + 1 + expA.size(),
          $sformatf("test A cycles %0d expected %0d", cyclesA, 22 * 1024 + 1 + expA.size()));
    check(expA.size() == 14, $sformatf("model predicts %0d failing reads", expA.size()));
    check(n_fault_pulses == expA.size(), $sformatf("fault pulses %0d", n_fault_pulses));
    check(logged.size() == expA.size(), $sformatf("logged %0d faults", logged.size()));
    foreach (expA[i]) if (i < logged.size())
      check(logged[i] == expA[i], $sformatf("fault %0d at %0h expected %0h", i, logged[i], expA[i]));
    check(fdA, "fault_detected set");
    @(negedge clk);
    // after the test every word holds W0
    rdA = 1;
    for (int a = 0; a < 1024; a += 1) begin
      addrA = 10'(a); #1;
      checks++;
      if (doutA != ((a == 'h3FF || a == 'h003) ? 8'h80 : 8'h00)) begin
        failures++; $display("FAIL word %0h after test = %h", a, doutA);
      end
      @(negedge clk);
    end
    rdA = 0;
    check(!busyA, "A idle after test");

    // ---- self-test B ----
    fiB.push_back('{'h05, 8'h04, 8'h00});
    fiB.push_back('{'h321, 8'h00, 8'h10});
    model_march(1024, 8, fiB, expB);
    logged.delete(); n_fault_pulses = 0; c = 0;
    @(negedge clk); tmB = 1;
    do begin @(negedge clk); c++; end while (!doneB && c < 200000);
    cyclesB = c;
    tmB = 0;
    check(cyclesB == 82 * 1024 + 1 + expB.size(),
          $sformatf("test B cycles %0d expected %0d", cyclesB, 82 * 1024 + 1 + expB.size()));
    check(expB.size() > 0 && logged.size() == expB.size(), $sformatf("B logged %0d of %0d", logged.size(), expB.size()));
    foreach (expB[i]) if (i < logged.size())
      check(logged[i] == expB[i], $sformatf("B fault %0d at %0h expected %0h", i, logged[i], expB[i]));
    check(fdB, "B fault_detected set");

    $display("test A: %0d cycles, %0d faults; test B: %0d cycles, %0d faults",
             cyclesA, expA.size(), cyclesB, expB.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
