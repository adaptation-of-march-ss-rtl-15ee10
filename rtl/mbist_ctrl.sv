// MBIST controller: finite state machine that runs the word-oriented March SS
// test, one memory operation per clock cycle.
//
// With NUM_PATTERNS = P word patterns W0..W(P-1) the test is
//   S1  W0 into every word (ascending)
//   UP  for p = 0..P-1:  ascending  (Rp, Rp, Wp, Rp, W(p+1 mod P))
//   DN  for p = 0..P-1:  descending (Rp, Rp, Wp, Rp, W(p+1 mod P))
//   S6  R0 of every word (ascending)
// which is (2 + 10P) x N operations for N words: 22N for the main
// configuration P = 2 (states S1..S6 of the state diagram: S2/S3 ascending
// with p = 0/1, S4/S5 descending with p = 0/1) and 82N for P = 8, the 18
// March steps of the full sequence. march_step reports the step number
// (1 = S1, 2.. ascending, then descending, last = final R0); it is 5 bits
// wide to cover the 18 steps of P = 8, so with P = 2 its top bits stay 0.
//
// S0 waits for TM = 1. Within an element an operation index op (0..4) walks
// the five operations of the current word; after the fifth the address
// generator steps, and when it reports last_addr the next element starts.
// A read whose data differs from the reference (fault from the response
// analyser) still completes and the controller then spends one cycle in S7,
// during which fault_log is high so that the faulty address can be recorded,
// and resumes where it left off. S8 marks the end of the test for one cycle
// (test_done) and returns to S0; if TM is still high a new test starts, so
// TM should be lowered once test_done is seen.
//
// The states, their order and the fault and last_addr transitions follow the published
// state diagram. The "any order" elements run ascending, S7 lasting exactly
// one cycle and the S8 -> S0 return are choices of this implementation.
module mbist_ctrl
  import mbist_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 2,
  localparam int unsigned SEL_W = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tm,
  input  logic             last_addr,
  input  logic             fault,
  // address generator control
  output logic             ud,
  output logic             ag_init,
  output logic             ag_init_up,
  output logic             ag_en,
  // memory operation
  output logic             wr_test,
  output logic             rd_test,
  output logic [SEL_W-1:0] wsel,
  output logic [SEL_W-1:0] rsel,
  output logic             rd0,       // current read expects R0
  output logic             rd1,       // current read expects R1
  // status
  output logic             ora_clear,
  output logic             fault_log,
  output logic             test_done,
  output logic             busy,
  output ctrl_state_t      state,
  output logic [4:0]       march_step
);

  localparam logic [SEL_W-1:0] LAST_PAT = SEL_W'(NUM_PATTERNS - 1);

  ctrl_state_t      state_n, ret_q, resume;
  logic [SEL_W-1:0] pat_q, pat_n;
  logic [2:0]       op_q, op_n;

  function automatic logic [SEL_W-1:0] next_pat(input logic [SEL_W-1:0] p);
    return (p == LAST_PAT) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    resume     = state;
    pat_n      = pat_q;
    op_n       = op_q;
    ud         = 1'b1;
    ag_init    = 1'b0;
    ag_init_up = 1'b1;
    ag_en      = 1'b0;
    wr_test    = 1'b0;
    rd_test    = 1'b0;
    wsel       = '0;
    rsel       = '0;
    ora_clear  = 1'b0;
    fault_log  = 1'b0;
    test_done  = 1'b0;

    unique case (state)
      S0_IDLE: begin
        if (tm) begin
          resume    = S1_INIT;
          ag_init   = 1'b1;
          ora_clear = 1'b1;
          pat_n     = '0;
          op_n      = '0;
        end
      end

      S1_INIT: begin
        wr_test = 1'b1;
        wsel    = '0;
        if (last_addr) begin
          resume  = S_UP;
          ag_init = 1'b1;
        end else begin
          ag_en = 1'b1;
        end
      end

      S_UP, S_DOWN: begin
        ud = (state == S_UP);
        unique case (op_q)
          3'd2:    begin wr_test = 1'b1; wsel = pat_q;           end
          3'd4:    begin wr_test = 1'b1; wsel = next_pat(pat_q); end
          default: begin rd_test = 1'b1; rsel = pat_q;           end
        endcase
        if (op_q == 3'd4) begin
          op_n = '0;
          if (last_addr) begin
            ag_init = 1'b1;
            if (pat_q == LAST_PAT) begin
              pat_n      = '0;
              resume     = (state == S_UP) ? S_DOWN : S6_FINAL;
              ag_init_up = (state == S_DOWN);
            end else begin
              pat_n      = pat_q + 1'b1;
              ag_init_up = (state == S_UP);
            end
          end else begin
            ag_en = 1'b1;
          end
        end else begin
          op_n = op_q + 1'b1;
        end
      end

      S6_FINAL: begin
        rd_test = 1'b1;
        rsel    = '0;
        if (last_addr) resume = S8_DONE;
        else           ag_en  = 1'b1;
      end

      S7_FAULT: begin
        fault_log = 1'b1;
        resume    = ret_q;
      end

      S8_DONE: begin
        test_done = 1'b1;
        resume    = S0_IDLE;
      end

      default: resume = S0_IDLE;
    endcase

    state_n = fault ? S7_FAULT : resume;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S0_IDLE;
      ret_q <= S0_IDLE;
      pat_q <= '0;
      op_q  <= '0;
    end else begin
      state <= state_n;
      pat_q <= pat_n;
      op_q  <= op_n;
      if (fault) ret_q <= resume;
    end
  end

  assign rd0  = rd_test && (rsel == '0);
  assign rd1  = rd_test && (rsel == SEL_W'(1));
  assign busy = (state != S0_IDLE);

  always_comb begin
    unique case (state)
      S1_INIT:  march_step = 5'd1;
      S_UP:     march_step = 5'(2 + pat_q);
      S_DOWN:   march_step = 5'(2 + NUM_PATTERNS + pat_q);
      S6_FINAL: march_step = 5'(2 + 2 * NUM_PATTERNS);
      default:  march_step = 5'd0;
    endcase
  end

  // A fault can only be reported for a test read, never during a write.
  a_fault_on_read: assert property (@(posedge clk) disable iff (!rst_n) fault |-> rd_test);
  a_one_op:        assert property (@(posedge clk) disable iff (!rst_n) !(wr_test && rd_test));

endmodule
