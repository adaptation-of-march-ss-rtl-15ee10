// MBISR controller: three-state FSM that redirects functional accesses to a
// faulty address into the redundant memory array (RMA).
//
//   S0  compare: the request's address is checked in the FAM by the fault map
//       unit. A request (rd or wr) to a good address completes here in the
//       same cycle (ready = 1, main memory). A request whose address matches
//       (addr_matched) moves to S1 instead.
//   S1  self-repair: wr_rma or rd_rma follows the request's wr/rd, so the
//       word is written into or read from the RMA row of the matching entry;
//       ready = 1 ends the request. Always moves on to S2.
//   S2  repair done: waits until the memory access is complete, i.e. the
//       host has released rd and wr, then returns to S0.
//
// A request is held (rd or wr kept high, address and data stable) until
// ready is seen; after a repaired access the host must drop rd and wr for
// at least one cycle. The FSM only acts in functional mode (tm = 0). The
// three states and their transitions follow the published state diagram; the
// ready/release handshake is this implementation's choice.
module mbisr_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tm,
  input  logic       rd,
  input  logic       wr,
  input  logic       addr_matched,
  output logic       wr_rma,
  output logic       rd_rma,
  output logic       ready,
  output logic [1:0] state_o
);

  typedef enum logic [1:0] {S0 = 2'd0, S1 = 2'd1, S2 = 2'd2} rep_state_t;

  rep_state_t state, state_n;
  logic       req, mem_access_complete;

  assign req                 = !tm && (rd || wr);
  assign mem_access_complete = !(rd || wr);

  always_comb begin
    state_n = state;
    wr_rma  = 1'b0;
    rd_rma  = 1'b0;
    ready   = 1'b0;
    unique case (state)
      S0: begin
        if (req && addr_matched) state_n = S1;
        else                     ready   = req;
      end
      S1: begin
        wr_rma  = wr;
        rd_rma  = rd;
        ready   = 1'b1;
        state_n = S2;
      end
      S2: if (mem_access_complete) state_n = S0;
      default: state_n = S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S0;
    else        state <= state_n;
  end

  assign state_o = state;

  // A repaired request must still be present when the RMA is accessed.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
                               (state == S0 && state_n == S1) |=> (rd || wr));

endmodule
