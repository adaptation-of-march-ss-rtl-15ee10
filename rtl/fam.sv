// Faulty address memory (FAM): 2**FM_W entries of ADDR_W bits (16 x 10 by
// default) holding the addresses found faulty by the self-test.
//
// we writes wdata into entry waddr at the rising clock edge and marks the
// entry valid. All entries and their valid bits are visible at once
// (entries, valid) so that the fault map unit can compare an address with
// every entry in parallel. Reset clears the valid bits; entries are kept
// from one test to the next. The 16 x 10 size follows the published design, the valid
// bits are this implementation's choice.
module fam #(
  parameter int unsigned FM_W   = 4,
  parameter int unsigned ADDR_W = 10,
  localparam int unsigned DEPTH = 2**FM_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  logic [FM_W-1:0]               waddr,
  input  logic [ADDR_W-1:0]             wdata,
  output logic [DEPTH-1:0][ADDR_W-1:0]  entries,
  output logic [DEPTH-1:0]              valid
);

  always_ff @(posedge clk) begin
    if (we) entries[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  valid        <= '0;
    else if (we) valid[waddr] <= 1'b1;
  end

endmodule
