// ppc_decoder - parity product code checker, single-fault corrector and multi-fault flag.
//
// The received (M+1) x (N+1) word is checked row by row and column by column. A row or column
// whose check fails is marked F; a single faulty TSV shows up as exactly one failing row and
// exactly one failing column, and their crossing is its position. Two or more failing rows or
// columns (or a failing row with no failing column, or the reverse) mean several faulty TSVs:
// they are flagged but not localized here.
//
// Isolation: an isolated TSV is left out of the checks (its bit counts as 0, exactly as in
// the encoder). A check whose own parity TSV is isolated cannot be trusted and is disabled
// (row_en_o / col_en_o low, syndrome 0). The parity row and parity column are checked against
// the all-bit parity; there an isolated row or column parity bit is replaced by the value
// recomputed from the received, non-isolated data, so those two checks stay usable.
//
// Interface: code_i and iso_i in, syndromes, enables, corrected data and flags out. Purely
// combinational. The data of an isolated TSV is passed on unchanged: isolation only removes
// it from the code. Row/column checks and single-fault localization follow the PPC scheme;
// the handling of isolated parity TSVs is this design's choice.
module ppc_decoder #(
  parameter int unsigned M = octt_pkg::PPC_M,
  parameter int unsigned N = octt_pkg::PPC_N,
  localparam int unsigned K  = (M + 1) * (N + 1),
  localparam int unsigned PW = $clog2(K)
) (
  input  logic [K-1:0]   code_i,
  input  logic [K-1:0]   iso_i,
  output logic [M:0]     row_syn_o,
  output logic [N:0]     col_syn_o,
  output logic [M:0]     row_en_o,
  output logic [N:0]     col_en_o,
  output logic [M*N-1:0] data_o,
  output logic           single_o,
  output logic           multi_o,
  output logic [PW-1:0]  pos_o
);

  logic [K-1:0] eff;
  logic [M-1:0] rp;       // row parities recomputed from received data
  logic [N-1:0] rq;       // column parities recomputed from received data
  logic         p_sum, q_sum;
  int unsigned  n_row, n_col;
  logic [$clog2(M+1)-1:0] row_idx;
  logic [$clog2(N+1)-1:0] col_idx;

  always_comb begin
    eff = code_i & ~iso_i;

    rp = '0;
    rq = '0;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++) begin
        rp[r] ^= eff[r*(N+1)+c];
        rq[c] ^= eff[r*(N+1)+c];
      end

    for (int r = 0; r < M; r++) begin
      row_en_o[r]  = ~iso_i[r*(N+1)+N];
      row_syn_o[r] = row_en_o[r] & (rp[r] ^ code_i[r*(N+1)+N]);
    end
    for (int c = 0; c < N; c++) begin
      col_en_o[c]  = ~iso_i[M*(N+1)+c];
      col_syn_o[c] = col_en_o[c] & (rq[c] ^ code_i[M*(N+1)+c]);
    end

    // Parity row and parity column against the all-bit parity.
    q_sum = 1'b0;
    for (int c = 0; c < N; c++)
      q_sum ^= iso_i[M*(N+1)+c] ? rq[c] : code_i[M*(N+1)+c];
    p_sum = 1'b0;
    for (int r = 0; r < M; r++)
      p_sum ^= iso_i[r*(N+1)+N] ? rp[r] : code_i[r*(N+1)+N];
    row_en_o[M]  = ~iso_i[K-1];
    col_en_o[N]  = ~iso_i[K-1];
    row_syn_o[M] = row_en_o[M] & (q_sum ^ code_i[K-1]);
    col_syn_o[N] = col_en_o[N] & (p_sum ^ code_i[K-1]);

    // Count failing checks and remember the (last) failing row and column.
    n_row   = 0;
    n_col   = 0;
    row_idx = '0;
    col_idx = '0;
    for (int r = 0; r <= M; r++)
      if (row_syn_o[r]) begin
        n_row++;
        row_idx = r[$clog2(M+1)-1:0];
      end
    for (int c = 0; c <= N; c++)
      if (col_syn_o[c]) begin
        n_col++;
        col_idx = c[$clog2(N+1)-1:0];
      end

    single_o = (n_row == 1) && (n_col == 1);
    multi_o  = ((n_row != 0) || (n_col != 0)) && !single_o;
    pos_o    = single_o ? PW'(row_idx * (N + 1) + col_idx) : '0;

    // Correct a localized data bit; parity faults need no data correction.
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++)
        data_o[r*N+c] = code_i[r*(N+1)+c] ^
                        (single_o && (row_idx == r[$clog2(M+1)-1:0]) &&
                         (col_idx == c[$clog2(N+1)-1:0]));
  end

endmodule
