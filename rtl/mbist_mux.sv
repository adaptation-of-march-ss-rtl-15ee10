// Test/normal mode input multiplexer (the 2x1 MUX in front of the memory).
//
// Four 2:1 multiplexers, A to D, all steered by the test-mode input TM:
// A selects the write data (functional data_in or test pattern din_test),
// B the address (functional addr_in or the address generator's addr_bist),
// C the write strobe and D the read strobe (functional wr/rd or the
// controller's wr_test/rd_test). Purely combinational.
module mbist_mux #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 8
) (
  input  logic              tm,
  input  logic [DATA_W-1:0] din_fun,
  input  logic [DATA_W-1:0] din_test,
  input  logic [ADDR_W-1:0] addr_fun,
  input  logic [ADDR_W-1:0] addr_bist,
  input  logic              wr_fun,
  input  logic              wr_test,
  input  logic              rd_fun,
  input  logic              rd_test,
  output logic [DATA_W-1:0] din_mem,
  output logic [ADDR_W-1:0] addr_mem,
  output logic              wr_mem,
  output logic              rd_mem
);

  assign din_mem  = tm ? din_test  : din_fun;    // MUX A
  assign addr_mem = tm ? addr_bist : addr_fun;   // MUX B
  assign wr_mem   = tm ? wr_test   : wr_fun;     // MUX C
  assign rd_mem   = tm ? rd_test   : rd_fun;     // MUX D

endmodule
