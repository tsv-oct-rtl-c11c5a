// stat_det - statistical detection: accumulates suspicious TSV positions over T cycles.
//
// A single faulty TSV is localized by the parity product code as the crossing of the one
// failing row and the one failing column. Because defects are often hidden (a shorted TSV is
// only wrong when it carries a 1, an open one only when its value changes), several faulty
// TSVs rarely show up in the same flit; watching the checks for a whole period catches them
// one at a time and accumulates their positions.
//
// Greedy localization (GREEDY = 1, the default): in every flit, every crossing of a failing
// row and a failing column is marked suspicious, even when several rows or columns fail at
// once. This catches more faulty TSVs at the cost of false positives (healthy TSVs at the
// crossings), which the isolate-and-check controller later removes. With GREEDY = 0 the unit
// is cautious and only marks a position when exactly one row and one column fail.
//
// Interface and timing: a one-cycle start_i clears the map and opens a period of exactly T
// clock cycles, in which every cycle with valid_i high is observed. done_o pulses in the
// cycle after the last observed cycle; susp_o then holds the map until the next start.
// Positions set in excl_i (the isolated TSVs) are never marked. single_ev_o and multi_ev_o
// pulse for observed flits with one, respectively several, marked crossings.
// The period, the marking of crossings and the greedy rule follow the scheme; counting the
// period in clock cycles whether or not a flit is sent is this design's choice.
module stat_det #(
  parameter int unsigned M      = octt_pkg::PPC_M,
  parameter int unsigned N      = octt_pkg::PPC_N,
  parameter int unsigned T      = octt_pkg::SD_PERIOD,
  parameter bit          GREEDY = 1'b1,
  localparam int unsigned K = (M + 1) * (N + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic         valid_i,
  input  logic [M:0]   row_syn_i,
  input  logic [N:0]   col_syn_i,
  input  logic [K-1:0] excl_i,
  output logic         busy_o,
  output logic         done_o,
  output logic [K-1:0] susp_o,
  output logic         single_ev_o,
  output logic         multi_ev_o
);

  localparam int unsigned CW = $clog2(T + 1);

  logic [CW-1:0] cnt_q;
  logic          busy_q, done_q;
  logic [K-1:0]  susp_q;
  logic [K-1:0]  xing;
  logic          one_row, one_col, any_row, any_col;

  // Crossings of failing rows and columns in the current flit.
  always_comb begin
    for (int r = 0; r <= M; r++)
      for (int c = 0; c <= N; c++)
        xing[r*(N+1)+c] = row_syn_i[r] & col_syn_i[c] & ~excl_i[r*(N+1)+c];
    any_row = |row_syn_i;
    any_col = |col_syn_i;
    one_row = any_row && ((row_syn_i & (row_syn_i - 1'b1)) == '0);
    one_col = any_col && ((col_syn_i & (col_syn_i - 1'b1)) == '0);
  end

  wire observe = busy_q & valid_i;
  wire single  = one_row & one_col;
  wire mark    = observe & (GREEDY ? 1'b1 : single);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
      susp_q <= '0;
    end else begin
      done_q <= 1'b0;
      if (start_i) begin
        cnt_q  <= '0;
        busy_q <= 1'b1;
        susp_q <= '0;
      end else if (busy_q) begin
        if (mark) susp_q <= susp_q | xing;
        if (cnt_q == CW'(T - 1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
        cnt_q <= cnt_q + 1'b1;
      end
    end

  // The period ends with exactly one done pulse, after which the unit is idle.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done_q |-> !busy_q);
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done_q |=> !done_q);

  assign busy_o      = busy_q;
  assign done_o      = done_q;
  assign susp_o      = susp_q;
  assign single_ev_o = observe & single & (|xing);
  assign multi_ev_o  = observe & any_row & any_col & !single & (|xing);

endmodule
