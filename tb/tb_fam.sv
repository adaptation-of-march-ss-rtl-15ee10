// Self-checking testbench for fam: after reset no entry is valid; entries
// written at random indices must appear at their index with the valid bit
// set, and rewriting an entry replaces it.
module tb_fam;
  logic clk = 0, rst_n = 0, we;
  logic [3:0] waddr;
  logic [9:0] wdata;
  logic [15:0][9:0] entries;
  logic [15:0] valid;
  logic [9:0] model [16];
  logic [15:0] mvalid = '0;
  int checks = 0, failures = 0;

  fam #(.FM_W(4), .ADDR_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string when);
    checks++;
    if (valid != mvalid) begin
      failures++;
      $display("FAIL %s valid=%h expected %h", when, valid, mvalid);
    end
    for (int i = 0; i < 16; i++) if (mvalid[i]) begin
      checks++;
      if (entries[i] != model[i]) begin
        failures++;
        $display("FAIL %s entry %0d = %h expected %h", when, i, entries[i], model[i]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); compare("after reset");
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      waddr = 4'($urandom);
      wdata = 10'($urandom);
      if (we) begin model[waddr] = wdata; end
      @(negedge clk);
      if (we) mvalid[waddr] = 1'b1;
      we = 0;
      #1 compare($sformatf("step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
