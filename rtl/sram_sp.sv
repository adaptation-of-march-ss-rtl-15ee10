// Single-port static RAM of 2**ADDR_W words of DATA_W bits.
//
// Used twice in the design: as the 1024 x 8 memory under test (MUT) and as
// the 16 x 8 redundant memory array (RMA) of the repair unit. A write takes
// place at the rising clock edge when wr is high. The read is asynchronous:
// while rd is high, dout shows the addressed word in the same cycle (0 while
// rd is low), so that the self-test can perform one March operation, write or
// read-and-compare, per clock cycle.
//
// Fault injection for simulation: FI_N entries, entry i addressing word
// FI_ADDRS[i*ADDR_W +: ADDR_W]. Bits set in FI_SA1[i*DATA_W +: DATA_W] read as
// 1 and bits set in FI_SA0[...] read as 0 at that word (stuck-at faults of the
// stored cell). The defaults inject nothing and the logic then reduces to a
// plain memory. The memory contents are not reset.
module sram_sp #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned FI_N   = 1,
  parameter logic [FI_N*ADDR_W-1:0] FI_ADDRS = '0,
  parameter logic [FI_N*DATA_W-1:0] FI_SA1   = '0,
  parameter logic [FI_N*DATA_W-1:0] FI_SA0   = '0
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  input  logic              wr,
  input  logic              rd,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (wr) mem[addr] <= din;
  end

  logic [DATA_W-1:0] sa1, sa0;
  always_comb begin
    sa1 = '0;
    sa0 = '0;
    for (int unsigned i = 0; i < FI_N; i++) begin
      if (FI_ADDRS[i*ADDR_W +: ADDR_W] == addr) begin
        sa1 |= FI_SA1[i*DATA_W +: DATA_W];
        sa0 |= FI_SA0[i*DATA_W +: DATA_W];
      end
    end
  end

  assign dout = rd ? ((mem[addr] | sa1) & ~sa0) : '0;

endmodule
