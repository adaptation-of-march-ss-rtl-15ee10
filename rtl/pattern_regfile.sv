// Test pattern register file (REG file).
//
// Holds NUM_PATTERNS word patterns, W0..W(NUM_PATTERNS-1) of the word-oriented
// March SS test, loaded at reset from mbist_pkg::test_pattern (00h, FFh, 0Fh,
// F0h, 33h, CCh, 55h, AAh). Two read ports: wsel picks the write pattern Wk
// that goes to the memory as test data (din_test), rsel picks the reference
// pattern Rk that the response analyser compares read data with (ref_pat).
// Both reads are combinational. The main configuration holds two patterns,
// W0 = 00h and W1 = FFh; holding them in reset-loaded registers follows the published
// design, while the two read ports are this implementation's choice.
module pattern_regfile
  import mbist_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 2,
  localparam int unsigned SEL_W = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SEL_W-1:0] wsel,
  input  logic [SEL_W-1:0] rsel,
  output word_t            din_test,
  output word_t            ref_pat
);

  word_t regs [NUM_PATTERNS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < NUM_PATTERNS; k++) regs[k] <= test_pattern(k);
    end else begin
      regs <= regs;
    end
  end

  assign din_test = regs[wsel];
  assign ref_pat  = regs[rsel];

  initial assert (NUM_PATTERNS >= 2 && NUM_PATTERNS <= MAX_PATTERNS)
    else $error("NUM_PATTERNS must be 2..8");

endmodule
