// Self-checking testbench for sram_sp: writes random words to every address
// of a 1024 x 8 memory, reads them back against a reference array, checks
// that rd = 0 gives 0, and checks the stuck-at-1 / stuck-at-0 fault
// injection at two addresses.
module tb_sram_sp;
  localparam int unsigned AW = 10;
  localparam int unsigned DW = 8;

  logic clk = 0;
  logic [AW-1:0] addr;
  logic [DW-1:0] din, dout;
  logic wr, rd;
  int checks = 0, failures = 0;

  sram_sp #(.ADDR_W(AW), .DATA_W(DW), .FI_N(2),
            .FI_ADDRS({10'h005, 10'h003}), .FI_SA1({8'h00, 8'h80}),
            .FI_SA0({8'h01, 8'h00})) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [DW-1:0] model [2**AW];

  initial begin
    wr = 0; rd = 0; addr = 0; din = 0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      addr = AW'(a); din = DW'($urandom); wr = 1; rd = 0;
      model[a] = din;
    end
    @(negedge clk); wr = 0;
    for (int a = 0; a < 2**AW; a++) begin
      logic [DW-1:0] exp;
      @(negedge clk);
      addr = AW'(a); rd = 1;
      #1;
      exp = model[a];
      if (a == 3) exp = exp | 8'h80;
      if (a == 5) exp = exp & 8'hFE;
      check(dout, exp, $sformatf("read %0h", a));
    end
    @(negedge clk); rd = 0; addr = 10'h003; #1;
    check(dout, '0, "rd low gives zero");
    // a write followed by a read in the next cycle
    @(negedge clk); addr = 10'h123; din = 8'h5A; wr = 1; rd = 1; #1;
    check(dout, model[10'h123], "old word before write edge");
    @(negedge clk); wr = 0; #1;
    check(dout, 8'h5A, "new word after write edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
