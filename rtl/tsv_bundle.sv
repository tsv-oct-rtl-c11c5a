// tsv_bundle - behavioural model of the K TSVs of a vertical link, with injectable defects.
//
// This is a model of physical interconnect, not logic to be synthesized into the link. Each
// TSV passes the value driven at its top end to its bottom end within the cycle. Two defect
// kinds can be switched on per TSV:
//   short_i[i]  short-to-substrate: the TSV leaks to ground and always reads 0, so it is only
//               wrong when a 1 is sent;
//   open_i[i]   open: the TSV charges too slowly and the receiver samples the value of the
//               previous clock cycle, so it is only wrong when the value changes.
// If both are set, the short wins. Both behaviours are the defect model the scheme is
// evaluated with; modelling them at cycle level with one register per TSV holding the previous
// value is this design's choice. The previous-value register resets to 0.
module tsv_bundle #(
  parameter int unsigned K = octt_pkg::code_bits(octt_pkg::PPC_M, octt_pkg::PPC_N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] tx_i,
  input  logic [K-1:0] short_i,
  input  logic [K-1:0] open_i,
  output logic [K-1:0] rx_o
);

  logic [K-1:0] prev_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) prev_q <= '0;
    else        prev_q <= tx_i;

  always_comb
    for (int i = 0; i < K; i++)
      rx_o[i] = short_i[i] ? 1'b0 : (open_i[i] ? prev_q[i] : tx_i[i]);

endmodule
