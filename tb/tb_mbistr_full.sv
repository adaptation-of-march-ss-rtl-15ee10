// Full-size testbench for mbistr_sram with every parameter at its default
// (1024 x 8 memory, two March patterns, 16 spare rows, no injected faults).
// Runs one complete self-test and checks that it takes exactly 22 x 1024
// memory operations (one per clock) plus the start cycle, reports no fault
// and stores nothing, then writes and reads back every word in normal mode
// with one-cycle accesses.
module tb_mbistr_full;
  logic clk = 0, rst_n = 0;
  logic tm, wr, rd, ready, fault, fault_log, fault_detected, test_done, busy;
  logic fam_full, faulty_addr_matched, wr_rma, rd_rma;
  logic [9:0] addr_in, faulty_addr;
  logic [7:0] data_in, dout_repaired, data_out;
  logic [4:0] march_step, fam_addr;
  logic [3:0] addr_rma;
  int checks = 0, failures = 0, n_fault = 0;

  mbistr_sram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (fault) n_fault++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int c;
    tm = 0; wr = 0; rd = 0; addr_in = 0; data_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); tm = 1;
    c = 0;
    do begin @(negedge clk); c++; end while (!test_done && c < 30000);
    tm = 0;
    check(c == 22 * 1024 + 1, $sformatf("test cycles %0d expected %0d", c, 22 * 1024 + 1));
    check(n_fault == 0 && !fault_detected, "no fault reported");
    check(fam_addr == 0 && !fam_full, "fault map empty");
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      addr_in = 10'(a); data_in = 8'(a * 7 + (a >> 3)); wr = 1; rd = 0;
      #1 check(ready, "write ready in the same cycle");
    end
    for (int a = 1023; a >= 0; a--) begin
      @(negedge clk);
      addr_in = 10'(a); wr = 0; rd = 1;
      #1 check(ready && dout_repaired == 8'(a * 7 + (a >> 3)), $sformatf("read %0h", a));
    end
    @(negedge clk); rd = 0;
    $display("self-test: %0d cycles", c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
