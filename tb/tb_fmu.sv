// Self-checking testbench for fmu: random FAM contents and valid bits,
// addresses drawn both from the stored entries and at random; addr_matched
// and match_idx are compared with a linear search for the lowest valid
// matching entry.
module tb_fmu;
  logic clk = 0;
  logic [9:0] addr;
  logic [15:0][9:0] entries;
  logic [15:0] valid;
  logic addr_matched;
  logic [3:0] match_idx;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  fmu #(.FM_W(4), .ADDR_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      bit exp_m; int exp_i;
      @(negedge clk);
      for (int i = 0; i < 16; i++) entries[i] = 10'($urandom % 64);
      valid = 16'($urandom);
      addr = ($urandom % 2 != 0) ? entries[$urandom % 16] : 10'($urandom % 64);
      exp_m = 0; exp_i = 0;
      for (int i = 0; i < 16; i++)
        if (!exp_m && valid[i] && entries[i] == addr) begin exp_m = 1; exp_i = i; end
      #1;
      checks++;
      if (addr_matched != exp_m || (exp_m && match_idx != 4'(exp_i))) begin
        failures++;
        $display("FAIL addr=%h matched=%0b idx=%0d expected %0b %0d", addr, addr_matched, match_idx, exp_m, exp_i);
      end
      if (exp_m) hits++; else misses++;
    end
    checks++;
    if (hits == 0 || misses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
