// MBIST-enabled SRAM: a 2**ADDR_W x 8 single-port SRAM with a built-in
// word-oriented March SS self-test.
//
// Blocks: the memory under test (sram_sp), the 2x1 input multiplexer
// (mbist_mux), the test pattern register file (pattern_regfile), the up/down
// address generator (addr_gen), the output response analyser (ora) and the
// controller FSM (mbist_ctrl). With TM = 0 the memory is an ordinary
// asynchronous-read single-port RAM driven by addr_in, data_in, wr and rd,
// data_out being the addressed word. Raising TM starts the self-test: the
// multiplexer hands the memory to the controller, which performs one March
// operation per clock cycle, 22 x 2**ADDR_W operations with two patterns.
//
// Fault reporting: fault is high in the cycle of a failing test read; the
// address of that read is captured in faulty_addr and announced by fault_log
// in the following cycle (controller state S7), which is when a repair unit
// records it. fault_detected stays high from the first failing read until
// the next test starts. test_done pulses for one cycle at the end of the
// test (S8). Faults are injected in simulation with the FI_* parameters of
// the memory (see sram_sp); by default there are none.
//
// The block structure and the TM-steered multiplexing follow the published design;
// the capture register for faulty_addr is this implementation's choice.
module mbist_sram
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W       = 10,
  parameter int unsigned NUM_PATTERNS = 2,
  parameter int unsigned FI_N         = 1,
  parameter logic [FI_N*ADDR_W-1:0] FI_ADDRS = '0,
  parameter logic [FI_N*DATA_W-1:0] FI_SA1   = '0,
  parameter logic [FI_N*DATA_W-1:0] FI_SA0   = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tm,
  input  logic [ADDR_W-1:0] addr_in,
  input  word_t             data_in,
  input  logic              wr,
  input  logic              rd,
  output word_t             data_out,
  output logic              fault,
  output logic              fault_log,
  output logic [ADDR_W-1:0] faulty_addr,
  output logic              fault_detected,
  output logic              test_done,
  output logic              busy,
  output logic [4:0]        march_step
);

  localparam int unsigned SEL_W = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1;

  logic [ADDR_W-1:0] addr_bist, addr_mem;
  logic              last_addr, ud, ag_init, ag_init_up, ag_en;
  logic              wr_test, rd_test, wr_mem, rd_mem;
  logic              ora_clear;
  logic [SEL_W-1:0]  wsel, rsel;
  word_t             din_test, ref_pat, din_mem;

  mbist_mux #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mux (
    .tm       (tm),
    .din_fun  (data_in),
    .din_test (din_test),
    .addr_fun (addr_in),
    .addr_bist(addr_bist),
    .wr_fun   (wr),
    .wr_test  (wr_test),
    .rd_fun   (rd),
    .rd_test  (rd_test),
    .din_mem  (din_mem),
    .addr_mem (addr_mem),
    .wr_mem   (wr_mem),
    .rd_mem   (rd_mem)
  );

  sram_sp #(
    .ADDR_W  (ADDR_W),
    .DATA_W  (DATA_W),
    .FI_N    (FI_N),
    .FI_ADDRS(FI_ADDRS),
    .FI_SA1  (FI_SA1),
    .FI_SA0  (FI_SA0)
  ) u_mut (
    .clk (clk),
    .addr(addr_mem),
    .din (din_mem),
    .wr  (wr_mem),
    .rd  (rd_mem),
    .dout(data_out)
  );

  pattern_regfile #(.NUM_PATTERNS(NUM_PATTERNS)) u_regfile (
    .clk     (clk),
    .rst_n   (rst_n),
    .wsel    (wsel),
    .rsel    (rsel),
    .din_test(din_test),
    .ref_pat (ref_pat)
  );

  addr_gen #(.ADDR_W(ADDR_W)) u_addr_gen (
    .clk      (clk),
    .rst_n    (rst_n),
    .ud       (ud),
    .init     (ag_init),
    .init_up  (ag_init_up),
    .en       (ag_en),
    .addr     (addr_bist),
    .last_addr(last_addr)
  );

  ora u_ora (
    .clk            (clk),
    .rst_n          (rst_n),
    .clear          (ora_clear),
    .rd_test        (rd_test),
    .data_out       (data_out),
    .ref_pat        (ref_pat),
    .fault          (fault),
    .fault_indicator(fault_detected)
  );

  mbist_ctrl #(.NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .tm        (tm),
    .last_addr (last_addr),
    .fault     (fault),
    .ud        (ud),
    .ag_init   (ag_init),
    .ag_init_up(ag_init_up),
    .ag_en     (ag_en),
    .wr_test   (wr_test),
    .rd_test   (rd_test),
    .wsel      (wsel),
    .rsel      (rsel),
    .rd0       (),
    .rd1       (),
    .ora_clear (ora_clear),
    .fault_log (fault_log),
    .test_done (test_done),
    .busy      (busy),
    .state     (),
    .march_step(march_step)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     faulty_addr <= '0;
    else if (fault) faulty_addr <= addr_bist;
  end

endmodule
