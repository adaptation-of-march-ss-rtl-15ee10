// Self-checking testbench for mbisr_ctrl: normal-address reads and writes
// must be acknowledged in the same cycle without touching the RMA; a
// matched address must give one cycle with ready low (S0), then one cycle
// with ready and wr_rma/rd_rma following the request (S1), then wait in S2
// until rd and wr are released. In test mode the FSM must stay idle.
module tb_mbisr_ctrl;
  logic clk = 0, rst_n = 0;
  logic tm, rd, wr, addr_matched, wr_rma, rd_rma, ready;
  logic [1:0] state_o;
  int checks = 0, failures = 0;

  mbisr_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic e_ready, input logic e_wr_rma, input logic e_rd_rma,
                            input logic [1:0] e_state, input string what);
    #1;
    checks++;
    if (ready !== e_ready || wr_rma !== e_wr_rma || rd_rma !== e_rd_rma || state_o !== e_state) begin
      failures++;
      $display("FAIL %s: ready=%0b wr_rma=%0b rd_rma=%0b state=%0d", what, ready, wr_rma, rd_rma, state_o);
    end
  endtask

  task automatic repaired_access(input logic is_wr, input int hold_extra);
    @(negedge clk); rd = !is_wr; wr = is_wr; addr_matched = 1;
    expect_out(0, 0, 0, 0, "S0 match");
    @(negedge clk);
    expect_out(1, is_wr, !is_wr, 1, "S1 RMA access");
    for (int i = 0; i < hold_extra; i++) begin
      @(negedge clk);
      expect_out(0, 0, 0, 2, "S2 waiting");
    end
    @(negedge clk); rd = 0; wr = 0; addr_matched = 0;
    expect_out(0, 0, 0, 2, "S2 released");
    @(negedge clk);
    expect_out(0, 0, 0, 0, "back in S0");
  endtask

  initial begin
    tm = 0; rd = 0; wr = 0; addr_matched = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); rd = 1;
    expect_out(1, 0, 0, 0, "normal read");
    @(negedge clk); rd = 0; wr = 1;
    expect_out(1, 0, 0, 0, "normal write");
    @(negedge clk); wr = 0;
    expect_out(0, 0, 0, 0, "idle");
    repaired_access(1, 0);
    repaired_access(0, 0);
    repaired_access(0, 2);
    // test mode: no repair even when the address matches
    @(negedge clk); tm = 1; rd = 1; addr_matched = 1;
    expect_out(0, 0, 0, 0, "test mode");
    @(negedge clk);
    expect_out(0, 0, 0, 0, "test mode still idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
