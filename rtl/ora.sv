// Output response analyser (ORA).
//
// On every test read (rd_test high) the word read from the memory, data_out,
// is compared with the reference pattern ref_pat. fault is high in the same
// cycle when they differ. fault_indicator is a sticky flag: it is set by the
// first mismatch and stays set until clear (start of a new test) or reset.
// The comparison against the reference pattern follows the published design; the
// sticky flag and its clear input are the implementation's choice.
module ora
  import mbist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  rd_test,
  input  word_t data_out,
  input  word_t ref_pat,
  output logic  fault,
  output logic  fault_indicator
);

  assign fault = rd_test && (data_out != ref_pat);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     fault_indicator <= 1'b0;
    else if (clear) fault_indicator <= 1'b0;
    else if (fault) fault_indicator <= 1'b1;
  end

endmodule
