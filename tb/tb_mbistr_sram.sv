// End-to-end testbench for mbistr_sram, the self-testing and self-repairing
// 1024 x 8 SRAM.
//
// Instance A has stuck-at-1 faults in the MSB of words 000h, 003h and 3FFh.
// The testbench runs the self-test (TM high until test_done), checks the
// test length (22 x 1024 operations plus one cycle per failing read), that
// the three faulty addresses are stored once each in order of detection,
// then returns to normal mode and checks that writing 55h to 003h reads back
// 55h on dout_repaired (the primary memory itself gives D5h) and that random
// reads and writes over the whole memory, including the faulty words, return
// the written data.
//
// Instance B has 18 faulty words, more than the 16 spare rows: the fault map
// must fill up (fam_addr = 16, fam_full) and the two words found last stay
// unrepaired while the first 16 are repaired.
//
// Mechanisms counted, each must occur: failing reads, S7 fault-log cycles,
// FAM writes, repeated detections of an already stored address, ascending
// and descending March elements, repaired writes, repaired reads, normal
// accesses, a full fault map.
module tb_mbistr_sram;
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

  // ---------------- instance A ----------------
  logic        tmA, wrA, rdA, readyA, fA, flA, fdA, doneA, busyA, fullA, mA, wrrA, rdrA;
  logic [9:0]  addrA, faA;
  logic [7:0]  dinA, drA, doA;
  logic [4:0]  stepA, famA;
  logic [3:0]  armaA;

  mbistr_sram #(.FI_N(3), .FI_ADDRS({10'h3FF, 10'h003, 10'h000}),
                .FI_SA1({8'h80, 8'h80, 8'h80}), .FI_SA0(24'h0)) dutA (
    .clk, .rst_n, .tm(tmA), .addr_in(addrA), .data_in(dinA), .wr(wrA), .rd(rdA),
    .ready(readyA), .dout_repaired(drA), .data_out(doA), .fault(fA), .fault_log(flA),
    .faulty_addr(faA), .fault_detected(fdA), .test_done(doneA), .busy(busyA),
    .march_step(stepA), .fam_addr(famA), .fam_full(fullA), .faulty_addr_matched(mA),
    .wr_rma(wrrA), .rd_rma(rdrA), .addr_rma(armaA));

  // ---------------- instance B: 18 faulty words ----------------
  localparam int NB = 18;
  function automatic logic [NB*10-1:0] b_addrs();
    for (int i = 0; i < NB; i++) b_addrs[i*10 +: 10] = 10'(37 * i + 5);
  endfunction
  function automatic logic [NB*8-1:0] b_sa0();
    for (int i = 0; i < NB; i++) b_sa0[i*8 +: 8] = 8'h01 << (i % 8);
  endfunction

  logic        tmB, wrB, rdB, readyB, fB, flB, fdB, doneB, busyB, fullB, mB, wrrB, rdrB;
  logic [9:0]  addrB, faB;
  logic [7:0]  dinB, drB, doB;
  logic [4:0]  stepB, famB;
  logic [3:0]  armaB;

  mbistr_sram #(.FI_N(NB), .FI_ADDRS(b_addrs()), .FI_SA1('0), .FI_SA0(b_sa0())) dutB (
    .clk, .rst_n, .tm(tmB), .addr_in(addrB), .data_in(dinB), .wr(wrB), .rd(rdB),
    .ready(readyB), .dout_repaired(drB), .data_out(doB), .fault(fB), .fault_log(flB),
    .faulty_addr(faB), .fault_detected(fdB), .test_done(doneB), .busy(busyB),
    .march_step(stepB), .fam_addr(famB), .fam_full(fullB), .faulty_addr_matched(mB),
    .wr_rma(wrrB), .rd_rma(rdrB), .addr_rma(armaB));

  // ---------------- mechanism counters ----------------
  int n_fault = 0, n_s7 = 0, n_fam_wr = 0, n_dup = 0, n_up = 0, n_down = 0;
  int n_rep_wr = 0, n_rep_rd = 0, n_norm = 0, n_full = 0;
  int storedA[$], storedB[$];
  logic [4:0] famA_q = 0, famB_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (fA || fB) n_fault++;
    if (flA) n_s7++;
    if (flB) n_s7++;
    // a logged fault that did not advance the fault map was already stored
    // (or the map was full)
    if (flA && famA == famA_q) n_dup++;
    if (flB && famB == famB_q && !fullB) n_dup++;
    if (famA != famA_q) begin n_fam_wr++; storedA.push_back(int'(faA)); end
    if (famB != famB_q) begin n_fam_wr++; storedB.push_back(int'(faB)); end
    famA_q <= famA;
    famB_q <= famB;
    if (stepA == 5'd2 || stepA == 5'd3) n_up++;
    if (stepA == 5'd4 || stepA == 5'd5) n_down++;
    if (wrrA || wrrB) n_rep_wr++;
    if (rdrA || rdrB) n_rep_rd++;
    if (fullB) n_full++;
  end

  // ---------------- functional access on instance A ----------------
  task automatic accessA(input logic is_wr, input logic [9:0] a, input logic [7:0] d,
                         output logic [7:0] q, output int lat);
    @(negedge clk);
    addrA = a; dinA = d; wrA = is_wr; rdA = !is_wr; lat = 0;
    forever begin
      #1;
      lat++;
      if (readyA || lat > 10) break;
      @(negedge clk);
    end
    q = drA;
    if (lat == 1) n_norm++;
    @(negedge clk);
    wrA = 0; rdA = 0;
  endtask

  task automatic accessB(input logic is_wr, input logic [9:0] a, input logic [7:0] d,
                         output logic [7:0] q);
    int lat = 0;
    @(negedge clk);
    addrB = a; dinB = d; wrB = is_wr; rdB = !is_wr;
    forever begin
      #1;
      lat++;
      if (readyB || lat > 10) break;
      @(negedge clk);
    end
    q = drB;
    @(negedge clk);
    wrB = 0; rdB = 0;
  endtask

  function automatic logic [7:0] faultyA(input int a, input logic [7:0] d);
    return (a == 'h000 || a == 'h003 || a == 'h3FF) ? (d | 8'h80) : d;
  endfunction

  logic [7:0] model [1024];

  initial begin
    logic [7:0] q;
    int lat, c, n_bad;

    tmA = 0; wrA = 0; rdA = 0; addrA = 0; dinA = 0;
    tmB = 0; wrB = 0; rdB = 0; addrB = 0; dinB = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- self-test of A ----
    @(negedge clk); tmA = 1;
    c = 0;
    do begin @(negedge clk); c++; end while (!doneA && c < 30000);
    tmA = 0;
    // 7 failing R0 reads per stuck-at-1 MSB word: 3 in each R0 element
    // (ascending and descending) and the final R0.
    check(c == 22 * 1024 + 1 + 3 * 7, $sformatf("A test cycles %0d expected %0d", c, 22 * 1024 + 1 + 21));
    check(famA == 5'd3 && !fullA, $sformatf("A fam_addr %0d", famA));
    check(storedA.size() == 3, "A three addresses stored");
    if (storedA.size() == 3)
      check(storedA[0] == 'h000 && storedA[1] == 'h003 && storedA[2] == 'h3FF,
            $sformatf("A stored %0h %0h %0h", storedA[0], storedA[1], storedA[2]));
    check(fdA, "A fault_detected");

    // ---- normal mode, the demonstration access: 55h into 003h ----
    accessA(1, 10'h003, 8'h55, q, lat);
    check(lat == 2, $sformatf("repaired write latency %0d", lat));
    @(negedge clk);
    addrA = 10'h003; rdA = 1;
    #1 check(mA && !readyA, "003h matched, waiting in S0");
    @(negedge clk);
    #1 check(readyA && drA == 8'h55 && doA == 8'hD5 && armaA == 4'd1,
             $sformatf("003h: dout_repaired=%h data_out=%h addr_rma=%0d", drA, doA, armaA));
    @(negedge clk); rdA = 0;
    accessA(1, 10'h004, 8'h55, q, lat);
    check(lat == 1, "normal write latency 1");

    // ---- random traffic over the whole memory ----
    for (int a = 0; a < 1024; a++) begin
      model[a] = 8'($urandom);
      accessA(1, 10'(a), model[a], q, lat);
    end
    n_bad = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int a = (i % 10 == 0) ? (((i / 10) % 2 != 0) ? 'h3FF : 'h000) : int'($urandom % 1024);
      if ($urandom % 3 == 0) begin
        model[a] = 8'($urandom);
        accessA(1, 10'(a), model[a], q, lat);
      end else begin
        accessA(0, 10'(a), 8'h00, q, lat);
        checks++;
        if (q !== model[a]) begin
          n_bad++; failures++;
          if (n_bad < 10) $display("FAIL read %0h = %h expected %h", a, q, model[a]);
        end
      end
    end

    // ---- self-test of B: more faulty words than spare rows ----
    @(negedge clk); tmB = 1;
    c = 0;
    do begin @(negedge clk); c++; end while (!doneB && c < 30000);
    tmB = 0;
    check(famB == 5'd16 && fullB, $sformatf("B fam_addr %0d full %0b", famB, fullB));
    check(storedB.size() == 16, $sformatf("B stored %0d", storedB.size()));
    for (int i = 0; i < NB; i++) begin
      automatic int a = 37 * i + 5;
      automatic logic [7:0] d = (i % 2 != 0) ? 8'hFF : 8'hA5;
      accessB(1, 10'(a), d, q);
      accessB(0, 10'(a), 8'h00, q);
      if (i < 16) check(q == d, $sformatf("B word %0h repaired (%h vs %h)", a, q, d));
      else        check(q == (d & ~(8'h01 << (i % 8))), $sformatf("B word %0h beyond the spare rows", a));
    end

    // ---- every mechanism must have happened ----
    check(n_fault > 0,  "failing reads seen");
    check(n_s7 == n_fault, $sformatf("S7 cycles %0d vs failing reads %0d", n_s7, n_fault));
    check(n_fam_wr == 19, $sformatf("FAM writes %0d", n_fam_wr));
    check(n_dup > 0,    "repeat detections of stored addresses");
    check(n_up > 0,     "ascending elements");
    check(n_down > 0,   "descending elements");
    check(n_rep_wr > 0, "repaired writes");
    check(n_rep_rd > 0, "repaired reads");
    check(n_norm > 0,   "normal accesses");
    check(n_full > 0,   "full fault map");
    $display("failing reads %0d, S7 %0d, FAM writes %0d, repeats %0d, up %0d, down %0d, rep wr %0d, rep rd %0d, normal %0d, full %0d",
             n_fault, n_s7, n_fam_wr, n_dup, n_up, n_down, n_rep_wr, n_rep_rd, n_norm, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
