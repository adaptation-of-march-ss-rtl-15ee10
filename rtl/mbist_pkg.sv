// Shared constants and types for the word-oriented March SS memory self-test
// and repair design.
//
// DATA_W is the word length of the memory under test (8 bits). The eight word
// test patterns W0..W7 are the data backgrounds of the word-oriented March SS
// test: all-0, all-1, and the 4-, 2- and 1-bit checkerboards with their
// complements. The same word serves as the write pattern Wk and as the
// reference pattern Rk that a read is compared with. The main configuration
// uses only W0 and W1; the other six extend the test to coupling and
// pattern-sensitive faults.
//
// ctrl_state_t names the states of the self-test controller. S0..S8 keep the
// numbering of the controller's state diagram; S_UP and S_DOWN stand for the
// ascending and descending March elements (S2..S5 of the diagram when two
// patterns are used), told apart by the pattern index held beside the state.
package mbist_pkg;

  localparam int unsigned DATA_W     = 8;
  localparam int unsigned MAX_PATTERNS = 8;

  typedef logic [DATA_W-1:0] word_t;

  // Pattern k, bit b (b = 0 is the LSB), printed MSB first:
  //   W0 00000000  W1 11111111  W2 00001111  W3 11110000
  //   W4 00110011  W5 11001100  W6 01010101  W7 10101010
  function automatic word_t test_pattern(input int unsigned k);
    case (k)
      0:       return 8'h00;
      1:       return 8'hFF;
      2:       return 8'h0F;
      3:       return 8'hF0;
      4:       return 8'h33;
      5:       return 8'hCC;
      6:       return 8'h55;
      default: return 8'hAA;
    endcase
  endfunction

  typedef enum logic [2:0] {
    S0_IDLE  = 3'd0,  // normal mode, waiting for TM = 1
    S1_INIT  = 3'd1,  // W0 into every word
    S_UP     = 3'd2,  // ascending (Rp, Rp, Wp, Rp, Wp+1)
    S_DOWN   = 3'd3,  // descending (Rp, Rp, Wp, Rp, Wp+1)
    S6_FINAL = 3'd4,  // R0 of every word
    S7_FAULT = 3'd5,  // one cycle to log a detected fault
    S8_DONE  = 3'd6   // test complete
  } ctrl_state_t;

endpackage
