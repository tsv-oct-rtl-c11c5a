// ppc_encoder - parity product code encoder with per-TSV isolation.
//
// The M*N data bits are placed on a grid of M rows and N columns. The encoder appends a row
// parity bit to each row (column N), a column parity bit to each column (row M) and one
// all-bit parity bit at row M, column N, so every row and every column of the
// (M+1) x (N+1) word has even parity. Code position r*(N+1)+c carries row r, column c.
//
// Isolation: a TSV marked in iso_i still carries its data bit, but the bit is replaced by 0
// (a mux) before it enters any parity, so a suspicious TSV cannot disturb the checks. The
// parity bits themselves are always computed and driven; whether a check that uses an
// isolated parity TSV is trusted is decided by the decoder. The all-bit parity is the XOR of
// all data bits that are not isolated.
//
// Purely combinational; the code word is valid in the same cycle as data_i and iso_i.
// The code layout and the three kinds of parity follow the PPC description of the scheme; the
// bit ordering and the zero-substitution used for isolation are this design's choices.
module ppc_encoder #(
  parameter int unsigned M = octt_pkg::PPC_M,
  parameter int unsigned N = octt_pkg::PPC_N,
  localparam int unsigned K = (M + 1) * (N + 1)
) (
  input  logic [M*N-1:0] data_i,
  input  logic [K-1:0]   iso_i,
  output logic [K-1:0]   code_o
);

  logic [M-1:0] row_par;
  logic [N-1:0] col_par;
  logic         all_par;
  logic [M*N-1:0] eff;   // data as seen by the parity logic

  always_comb begin
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++)
        eff[r*N+c] = data_i[r*N+c] & ~iso_i[r*(N+1)+c];

    row_par = '0;
    col_par = '0;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++) begin
        row_par[r] ^= eff[r*N+c];
        col_par[c] ^= eff[r*N+c];
      end
    all_par = ^eff;

    code_o = '0;
    for (int r = 0; r < M; r++) begin
      for (int c = 0; c < N; c++)
        code_o[r*(N+1)+c] = data_i[r*N+c];   // isolated TSVs still carry their data
      code_o[r*(N+1)+N] = row_par[r];
    end
    for (int c = 0; c < N; c++)
      code_o[M*(N+1)+c] = col_par[c];
    code_o[M*(N+1)+N] = all_par;
  end

endmodule
