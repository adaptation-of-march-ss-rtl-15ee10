// Self-checking testbench for mbist_mux: random functional and test inputs,
// both values of TM; every output must equal the input selected by TM.
module tb_mbist_mux;
  logic clk = 0;
  logic tm, wr_fun, wr_test, rd_fun, rd_test, wr_mem, rd_mem;
  logic [7:0] din_fun, din_test, din_mem;
  logic [9:0] addr_fun, addr_bist, addr_mem;
  int checks = 0, failures = 0;

  mbist_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      tm = i[0];
      {wr_fun, wr_test, rd_fun, rd_test} = 4'($urandom);
      din_fun = 8'($urandom); din_test = 8'($urandom);
      addr_fun = 10'($urandom); addr_bist = 10'($urandom);
      #1;
      checks++;
      if (din_mem  !== (tm ? din_test  : din_fun)  ||
          addr_mem !== (tm ? addr_bist : addr_fun) ||
          wr_mem   !== (tm ? wr_test   : wr_fun)   ||
          rd_mem   !== (tm ? rd_test   : rd_fun)) begin
        failures++;
        $display("FAIL tm=%0b", tm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
