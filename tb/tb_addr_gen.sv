// Self-checking testbench for addr_gen: an ascending pass from 0 to 1023
// and a descending pass from 1023 to 0, checking every address, last_addr
// at exactly the final address of each pass, that en = 0 holds the count,
// and that init restarts in either direction.
module tb_addr_gen;
  localparam int unsigned AW = 10;
  logic clk = 0, rst_n = 0;
  logic ud, init, init_up, en, last_addr;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  addr_gen #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (addr=%0h last=%0b)", what, addr, last_addr);
    end
  endtask

  initial begin
    ud = 1; init = 0; init_up = 1; en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ascending pass
    @(negedge clk); init = 1; init_up = 1;
    @(negedge clk); init = 0; ud = 1; en = 1;
    for (int a = 0; a < 2**AW; a++) begin
      #1;
      check(addr == AW'(a), $sformatf("up address %0d", a));
      check(last_addr == (a == 2**AW - 1), $sformatf("up last_addr at %0d", a));
      @(negedge clk);
    end
    // hold
    en = 0; init = 1; init_up = 1;
    @(negedge clk); init = 0; en = 0;
    repeat (3) @(negedge clk);
    #1 check(addr == '0, "hold with en low");
    // descending pass
    @(negedge clk); init = 1; init_up = 0; ud = 0;
    @(negedge clk); init = 0; en = 1;
    for (int a = 2**AW - 1; a >= 0; a--) begin
      #1;
      check(addr == AW'(a), $sformatf("down address %0d", a));
      check(last_addr == (a == 0), $sformatf("down last_addr at %0d", a));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
