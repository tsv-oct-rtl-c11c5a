// octt_link - 32-bit TSV link with on-communication multiple-TSV defect localization.
//
// Data crosses a bundle of TSVs protected by a 4 x 8 parity product code (45 TSVs). The code
// corrects one faulty TSV per flit on the fly, but on its own can localize only one. The test
// logic runs alongside the normal traffic, without stopping it or injecting test patterns:
//   1. statistical detection watches the row/column checks of T consecutive cycles of traffic
//      and greedily marks every crossing of a failing row and a failing column as suspicious;
//   2. isolate-and-check removes all suspicious TSVs from the code (they still carry data),
//      then re-enables them one at a time and keeps isolated only those the code still shows
//      as faulty, clearing the false positives; detection is repeated with the confirmed
//      faulty TSVs isolated, so faults that were hidden behind them become visible.
// The result is the map of faulty TSVs (faulty_o), which a repair scheme would use.
//
// Structure: ppc_encoder -> tsv_bundle -> ppc_decoder on the data path; stat_det and
// isol_check on the receive side. The isolation mask reaches the encoder in the same cycle;
// how it would be carried back across the stack is outside this design. The TSV bundle is a
// behavioural model whose defect controls (short_i, open_i) are brought out so that defects
// can be injected.
//
// Interface: data_i/valid_i in on the transmit side, data_o/valid_o out on the receive side
// in the same cycle (the path is combinational apart from the TSV defect model). test_start_i
// (one cycle) starts a test; test_done_o rises when it has ended. corr_o pulses when the
// code corrected a single fault (at code position corr_pos_o), multi_o when it saw several.
// test_round_o counts the detection rounds of the current test, sd_busy_o shows a detection
// period in progress.
module octt_link #(
  parameter int unsigned M          = octt_pkg::PPC_M,
  parameter int unsigned N          = octt_pkg::PPC_N,
  parameter int unsigned T          = octt_pkg::SD_PERIOD,
  parameter int unsigned MAX_ROUNDS = 4,
  localparam int unsigned K = (M + 1) * (N + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // transmit side
  input  logic [M*N-1:0] data_i,
  input  logic           valid_i,
  // TSV defect injection (model only)
  input  logic [K-1:0]   short_i,
  input  logic [K-1:0]   open_i,
  // receive side
  output logic [M*N-1:0] data_o,
  output logic           valid_o,
  output logic           corr_o,
  output logic           multi_o,
  output logic [$clog2(K)-1:0] corr_pos_o,
  // test control and result
  input  logic           test_start_i,
  output logic           test_busy_o,
  output logic           test_done_o,
  output logic [K-1:0]   iso_o,
  output logic [K-1:0]   faulty_o,
  output logic [$clog2(MAX_ROUNDS+1)-1:0] test_round_o,
  output logic           sd_busy_o,
  // event pulses, for monitoring
  output logic           sd_single_ev_o,
  output logic           sd_multi_ev_o,
  output logic           confirm_ev_o,
  output logic           clear_ev_o
);

  logic [K-1:0] code_tx, code_rx, iso, susp;
  logic [M:0]   row_syn, row_en;
  logic [N:0]   col_syn, col_en;
  logic         single, multi, sd_start, sd_done, sd_busy;
  logic [$clog2(K)-1:0] pos;
  logic [$clog2(MAX_ROUNDS+1)-1:0] round;

  ppc_encoder #(.M(M), .N(N)) u_enc (
    .data_i (data_i),
    .iso_i  (iso),
    .code_o (code_tx)
  );

  tsv_bundle #(.K(K)) u_tsv (
    .clk     (clk),
    .rst_n   (rst_n),
    .tx_i    (code_tx),
    .short_i (short_i),
    .open_i  (open_i),
    .rx_o    (code_rx)
  );

  ppc_decoder #(.M(M), .N(N)) u_dec (
    .code_i    (code_rx),
    .iso_i     (iso),
    .row_syn_o (row_syn),
    .col_syn_o (col_syn),
    .row_en_o  (row_en),
    .col_en_o  (col_en),
    .data_o    (data_o),
    .single_o  (single),
    .multi_o   (multi),
    .pos_o     (pos)
  );

  stat_det #(.M(M), .N(N), .T(T)) u_sd (
    .clk         (clk),
    .rst_n       (rst_n),
    .start_i     (sd_start),
    .valid_i     (valid_i),
    .row_syn_i   (row_syn),
    .col_syn_i   (col_syn),
    .excl_i      (iso),
    .busy_o      (sd_busy),
    .done_o      (sd_done),
    .susp_o      (susp),
    .single_ev_o (sd_single_ev_o),
    .multi_ev_o  (sd_multi_ev_o)
  );

  isol_check #(.M(M), .N(N), .T(T), .MAX_ROUNDS(MAX_ROUNDS)) u_ic (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_i      (test_start_i),
    .valid_i      (valid_i),
    .row_syn_i    (row_syn),
    .col_syn_i    (col_syn),
    .row_en_i     (row_en),
    .col_en_i     (col_en),
    .sd_start_o   (sd_start),
    .sd_done_i    (sd_done),
    .sd_susp_i    (susp),
    .iso_o        (iso),
    .faulty_o     (faulty_o),
    .busy_o       (test_busy_o),
    .done_o       (test_done_o),
    .confirm_ev_o (confirm_ev_o),
    .clear_ev_o   (clear_ev_o),
    .round_o      (round)
  );

  assign valid_o = valid_i;
  assign corr_o  = valid_i & single;
  assign multi_o = valid_i & multi;
  assign iso_o   = iso;
  assign corr_pos_o   = pos;
  assign test_round_o = round;
  assign sd_busy_o    = sd_busy;

endmodule
