// Self-checking testbench for fm_addr_gen: counts 20 inc pulses mixed with
// idle cycles and checks fm_addr, count and full against a reference count
// that stops at 16 (no wrap-around overwrite once full).
module tb_fm_addr_gen;
  logic clk = 0, rst_n = 0, inc, full;
  logic [3:0] fm_addr;
  logic [4:0] count;
  int checks = 0, failures = 0, ref_cnt = 0;

  fm_addr_gen #(.FM_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      #1;
      checks++;
      if (count != 5'(ref_cnt) || fm_addr != 4'(ref_cnt % 16) || full != (ref_cnt == 16)) begin
        failures++;
        $display("FAIL step %0d: count=%0d fm_addr=%0d full=%0b, expected %0d", i, count, fm_addr, full, ref_cnt);
      end
      inc = (i % 3) != 2;
      if (inc && ref_cnt < 16) ref_cnt++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
