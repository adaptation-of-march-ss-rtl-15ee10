// Self-checking testbench for ora: fault must follow rd_test and any
// difference between data_out and ref_pat; fault_indicator must become set
// after the first fault, stay set, and be cleared by clear.
module tb_ora;
  logic clk = 0, rst_n = 0;
  logic clear, rd_test, fault, fault_indicator;
  logic [7:0] data_out, ref_pat;
  logic sticky = 0;
  int checks = 0, failures = 0, n_faults = 0;

  ora dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; rd_test = 0; data_out = 0; ref_pat = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      logic exp_fault;
      @(negedge clk);
      #1;
      checks++;
      if (fault_indicator !== sticky) begin
        failures++;
        $display("FAIL sticky flag at %0d", i);
      end
      clear   = (i % 97 == 96);
      rd_test = ($urandom % 3) != 0;
      ref_pat = ($urandom % 2 != 0) ? 8'hFF : 8'h00;
      data_out = ref_pat;
      if ($urandom % 8 == 0) data_out[$urandom % 8] ^= 1'b1;
      #1;
      exp_fault = rd_test && (data_out != ref_pat);
      checks++;
      if (fault !== exp_fault) begin
        failures++;
        $display("FAIL fault at %0d", i);
      end
      if (exp_fault) n_faults++;
      if (clear) sticky = 0;
      else if (exp_fault) sticky = 1;
    end
    checks++;
    if (n_faults == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
