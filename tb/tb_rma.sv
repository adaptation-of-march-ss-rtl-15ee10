// Self-checking testbench for the redundant memory array: sram_sp at the RMA
// size of 16 x 8. Fills all 16 rows, reads them back in a different order,
// overwrites some rows and checks the rest are untouched.
module tb_rma;
  localparam int unsigned AW = 4;
  localparam int unsigned DW = 8;

  logic clk = 0;
  logic [AW-1:0] addr;
  logic [DW-1:0] din, dout;
  logic wr, rd;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];

  sram_sp #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input int a);
    @(negedge clk);
    addr = AW'(a); rd = 1; wr = 0; #1;
    checks++;
    if (dout !== model[a]) begin
      failures++;
      $display("FAIL row %0d: got %h expected %h", a, dout, model[a]);
    end
  endtask

  initial begin
    wr = 0; rd = 0; addr = 0; din = 0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      addr = AW'(a); din = DW'(8'h11 * a + 8'h07); wr = 1;
      model[a] = din;
    end
    for (int a = 15; a >= 0; a--) read_check(a);
    for (int a = 0; a < 16; a += 3) begin
      @(negedge clk);
      addr = AW'(a); din = DW'($urandom); wr = 1; rd = 0;
      model[a] = din;
    end
    for (int a = 0; a < 16; a++) read_check((a * 7) % 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
