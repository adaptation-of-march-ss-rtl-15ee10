// Fault map unit (FMU): compares an address with every valid entry of the
// faulty address memory in parallel.
//
// addr_matched is high, combinationally, when addr equals a valid entry;
// match_idx is then the index of that entry (the lowest one if several
// match), which is the row of the redundant memory array that replaces the
// faulty word. The address match and addr_matched signal follow the published design;
// returning the matching index as the spare-row address is this
// implementation's reading of how faulty addresses are mapped to the RMA.
module fmu #(
  parameter int unsigned FM_W   = 4,
  parameter int unsigned ADDR_W = 10,
  localparam int unsigned DEPTH = 2**FM_W
) (
  input  logic [ADDR_W-1:0]             addr,
  input  logic [DEPTH-1:0][ADDR_W-1:0]  entries,
  input  logic [DEPTH-1:0]              valid,
  output logic                          addr_matched,
  output logic [FM_W-1:0]               match_idx
);

  always_comb begin
    addr_matched = 1'b0;
    match_idx    = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid[i] && entries[i] == addr) begin
        addr_matched = 1'b1;
        match_idx    = FM_W'(i);
      end
    end
  end

endmodule
