// MBISTR-enabled SRAM: a 1024 x 8 single-port SRAM that tests itself with the
// word-oriented March SS algorithm and repairs up to 16 faulty words with
// spare rows.
//
// Structure: the MBIST-enabled SRAM (primary memory with its self-test) and
// a self-repair unit made of the faulty address memory (fam, 16 x 10), the
// fault-map address generator (fm_addr_gen, mod-16 counter), the fault map
// unit (fmu), the MBISR controller (mbisr_ctrl), the redundant memory array
// (RMA, an sram_sp of 16 x 8) and the output multiplexer.
//
// Test mode (tm = 1): the self-test runs (22 x 1024 memory operations, one
// per clock cycle, plus one cycle per failing read). Every failing read
// announces its address (fault_log, faulty_addr); if the address is not yet
// in the FAM and the FAM is not full, it is written at entry fam_addr and
// the counter advances. A word that fails several reads is stored once.
// test_done pulses at the end; the host then lowers tm.
//
// Functional mode (tm = 0): a request is addr_in with rd or wr (data_in for
// a write), held until ready. Good addresses are served by the primary
// memory in the same cycle. An address found in the FAM (faulty_addr_matched)
// is served one cycle later from the RMA row with the matching index
// (addr_rma) while the output multiplexer passes the RMA word to
// dout_repaired; the host then releases rd and wr for a cycle (see
// mbisr_ctrl). data_out always shows the primary memory's word.
//
// The block diagram, the FAM and RMA sizes and the mod-16 fault-map counter
// follow the published design. Storing each faulty address once, the full flag
// (fam_full; further faulty words go unrepaired) and the request/ready
// handshake are this implementation's choices.
module mbistr_sram
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W       = 10,
  parameter int unsigned FM_W         = 4,
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
  output logic              ready,
  output word_t             dout_repaired,
  output word_t             data_out,
  // self-test status
  output logic              fault,
  output logic              fault_log,
  output logic [ADDR_W-1:0] faulty_addr,
  output logic              fault_detected,
  output logic              test_done,
  output logic              busy,
  output logic [4:0]        march_step,
  // repair status
  output logic [FM_W:0]     fam_addr,
  output logic              fam_full,
  output logic              faulty_addr_matched,
  output logic              wr_rma,
  output logic              rd_rma,
  output logic [FM_W-1:0]   addr_rma
);

  localparam int unsigned DEPTH = 2**FM_W;

  logic [DEPTH-1:0][ADDR_W-1:0] fam_entries;
  logic [DEPTH-1:0]             fam_valid;
  logic [FM_W-1:0]              fm_addr, match_idx;
  logic [ADDR_W-1:0]            fmu_addr;
  logic                         addr_matched, fam_we;
  word_t                        dout_rma;

  mbist_sram #(
    .ADDR_W      (ADDR_W),
    .NUM_PATTERNS(NUM_PATTERNS),
    .FI_N        (FI_N),
    .FI_ADDRS    (FI_ADDRS),
    .FI_SA1      (FI_SA1),
    .FI_SA0      (FI_SA0)
  ) u_mbist (
    .clk           (clk),
    .rst_n         (rst_n),
    .tm            (tm),
    .addr_in       (addr_in),
    .data_in       (data_in),
    .wr            (wr),
    .rd            (rd),
    .data_out      (data_out),
    .fault         (fault),
    .fault_log     (fault_log),
    .faulty_addr   (faulty_addr),
    .fault_detected(fault_detected),
    .test_done     (test_done),
    .busy          (busy),
    .march_step    (march_step)
  );

  // The fault map unit checks the logged faulty address during the test
  // and the functional address otherwise.
  assign fmu_addr = tm ? faulty_addr : addr_in;

  fmu #(.FM_W(FM_W), .ADDR_W(ADDR_W)) u_fmu (
    .addr        (fmu_addr),
    .entries     (fam_entries),
    .valid       (fam_valid),
    .addr_matched(addr_matched),
    .match_idx   (match_idx)
  );

  assign fam_we = tm && fault_log && !addr_matched && !fam_full;

  fm_addr_gen #(.FM_W(FM_W)) u_fm_addr_gen (
    .clk    (clk),
    .rst_n  (rst_n),
    .inc    (fam_we),
    .fm_addr(fm_addr),
    .full   (fam_full),
    .count  (fam_addr)
  );

  fam #(.FM_W(FM_W), .ADDR_W(ADDR_W)) u_fam (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (fam_we),
    .waddr  (fm_addr),
    .wdata  (faulty_addr),
    .entries(fam_entries),
    .valid  (fam_valid)
  );

  mbisr_ctrl u_mbisr_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .tm          (tm),
    .rd          (rd),
    .wr          (wr),
    .addr_matched(addr_matched),
    .wr_rma      (wr_rma),
    .rd_rma      (rd_rma),
    .ready       (ready),
    .state_o     ()
  );

  assign addr_rma = match_idx;

  sram_sp #(.ADDR_W(FM_W), .DATA_W(DATA_W)) u_rma (
    .clk (clk),
    .addr(addr_rma),
    .din (data_in),
    .wr  (wr_rma),
    .rd  (rd_rma),
    .dout(dout_rma)
  );

  // Output multiplexer: spare row for a mapped faulty address.
  assign faulty_addr_matched = !tm && addr_matched;
  assign dout_repaired       = faulty_addr_matched ? dout_rma : data_out;

endmodule
