// Fault-map (FM) address generator: modulo-2**FM_W counter (mod-16 by
// default) that points at the next free entry of the faulty address memory.
//
// inc advances the counter by one at the rising clock edge; it is pulsed
// each time a new faulty address is written into the FAM. When the counter
// wraps after the last entry, full is set and further inc pulses are
// ignored, so no stored address is ever overwritten. count = {full, fm_addr}
// is the number of stored addresses, 0..2**FM_W. The mod-16 counter follows
// the published design; the full flag is this implementation's addition to make an
// overflowing fault map visible.
module fm_addr_gen #(
  parameter int unsigned FM_W = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            inc,
  output logic [FM_W-1:0] fm_addr,
  output logic            full,
  output logic [FM_W:0]   count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fm_addr <= '0;
      full    <= 1'b0;
    end else if (inc && !full) begin
      fm_addr <= fm_addr + 1'b1;
      if (fm_addr == '1) full <= 1'b1;
    end
  end

  assign count = {full, fm_addr};

endmodule
