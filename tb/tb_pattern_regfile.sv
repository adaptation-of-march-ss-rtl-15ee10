// Self-checking testbench for pattern_regfile: after reset, both read ports
// must return the word test patterns 00, FF, 0F, F0, 33, CC, 55, AA (written
// out here independently of the package function), for the two-pattern and
// the eight-pattern register files.
module tb_pattern_regfile;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [7:0] exp_pat [8] = '{8'h00, 8'hFF, 8'h0F, 8'hF0, 8'h33, 8'hCC, 8'h55, 8'hAA};

  logic [0:0] wsel2, rsel2;
  logic [7:0] din2, ref2;
  logic [2:0] wsel8, rsel8;
  logic [7:0] din8, ref8;

  pattern_regfile #(.NUM_PATTERNS(2)) dut2 (.clk, .rst_n, .wsel(wsel2), .rsel(rsel2),
                                            .din_test(din2), .ref_pat(ref2));
  pattern_regfile #(.NUM_PATTERNS(8)) dut8 (.clk, .rst_n, .wsel(wsel8), .rsel(rsel8),
                                            .din_test(din8), .ref_pat(ref8));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    wsel2 = 0; rsel2 = 0; wsel8 = 0; rsel8 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int w = 0; w < 2; w++)
      for (int r = 0; r < 2; r++) begin
        @(negedge clk); wsel2 = 1'(w); rsel2 = 1'(r); #1;
        check(din2, exp_pat[w], $sformatf("2-pattern W%0d", w));
        check(ref2, exp_pat[r], $sformatf("2-pattern R%0d", r));
      end
    for (int w = 0; w < 8; w++)
      for (int r = 0; r < 8; r++) begin
        @(negedge clk); wsel8 = 3'(w); rsel8 = 3'(r); #1;
        check(din8, exp_pat[w], $sformatf("8-pattern W%0d", w));
        check(ref8, exp_pat[r], $sformatf("8-pattern R%0d", r));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
