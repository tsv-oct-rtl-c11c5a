// isol_check - isolate-and-check controller: confirms or clears suspicious TSVs.
//
// A test runs in rounds. Each round starts a statistical detection period with the TSVs
// already known faulty isolated. The suspicious TSVs it returns (minus the known faulty ones)
// are all isolated at once: they keep carrying data, but the code ignores them, so the faults
// they hid no longer mask other faults. Then each suspicious TSV in turn is re-enabled for a
// check window of T cycles while the others stay isolated. If, in some flit of the window,
// the code localizes it (its row check and its column check fail and no other check does),
// the TSV is faulty and goes back into isolation for good; if the window passes without that
// it was a false positive and stays enabled. Requiring the lone localization keeps a fault
// elsewhere that fails the same row or column in the same flit from condemning a healthy
// TSV. A round that finds no new suspicious TSV ends the test, as does the last of
// MAX_ROUNDS rounds.
//
// Parity TSVs: only data TSVs are ever isolated. Isolating a row, column or all-bit parity
// TSV would switch off the check it belongs to, and with two such checks off the faults of
// other TSVs can no longer be told apart from the candidate's. Suspicious parity TSVs are
// therefore checked in place (they are always enabled) and, when confirmed, reported in
// faulty_o without being isolated. A limit that remains: three faulty parity TSVs at three
// corners of a rectangle (row parity r, column parity c, all-bit parity) failing together
// look exactly like a fault of data TSV (r, c).
//
// Interface: start_i (one cycle) begins a test; the map of confirmed faulty TSVs (faulty_o) is
// kept across tests and cleared only by reset. sd_start_o / sd_done_i / sd_susp_i drive the
// statistical detection unit; iso_o is the isolation mask for the encoder, the decoder and the
// detection unit. done_o is high once the test has ended, until the next start. confirm_ev_o
// and clear_ev_o pulse when a check ends faulty or healthy; round_o counts the rounds.
// Timing: a round takes T + 2 cycles of detection (the start and done hand-over included),
// then per suspicious TSV one cycle to select it and up to T cycles of checking (a check ends
// at the first localization). With no suspicious TSV the test ends T + 2 cycles after start.
// Isolating the suspicious TSVs and re-enabling them one by one to re-check them follows the
// scheme; the rounds, the lone-localization rule, the early end of a check, keeping parity
// TSVs enabled and MAX_ROUNDS are this design's choices.
module isol_check #(
  parameter int unsigned M          = octt_pkg::PPC_M,
  parameter int unsigned N          = octt_pkg::PPC_N,
  parameter int unsigned T          = octt_pkg::SD_PERIOD,
  parameter int unsigned MAX_ROUNDS = 4,
  localparam int unsigned K  = (M + 1) * (N + 1),
  localparam int unsigned PW = $clog2(K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic         valid_i,
  input  logic [M:0]   row_syn_i,
  input  logic [N:0]   col_syn_i,
  input  logic [M:0]   row_en_i,
  input  logic [N:0]   col_en_i,
  output logic         sd_start_o,
  input  logic         sd_done_i,
  input  logic [K-1:0] sd_susp_i,
  output logic [K-1:0] iso_o,
  output logic [K-1:0] faulty_o,
  output logic         busy_o,
  output logic         done_o,
  output logic         confirm_ev_o,
  output logic         clear_ev_o,
  output logic [$clog2(MAX_ROUNDS+1)-1:0] round_o
);
  import octt_pkg::*;

  localparam int unsigned CW = $clog2(T + 1);
  localparam int unsigned RW = $clog2(MAX_ROUNDS + 1);

  // Only data TSVs are ever isolated (see the header).
  function automatic logic [K-1:0] data_positions();
    logic [K-1:0] m = '0;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++)
        m[r*(N+1)+c] = 1'b1;
    return m;
  endfunction
  localparam logic [K-1:0] DATA_POS = data_positions();

  ic_state_e     state_q;
  logic [K-1:0]  faulty_q, cand_q, iso_q;
  logic [PW-1:0] cur_q;
  logic [CW-1:0] cnt_q;
  logic [RW-1:0] round_q;
  logic          sd_start_q, confirm_q, clear_q;

  // Lowest remaining candidate.
  logic          have_next;
  logic [PW-1:0] next_idx;
  always_comb begin
    have_next = 1'b0;
    next_idx  = '0;
    for (int i = K - 1; i >= 0; i--)
      if (cand_q[i]) begin
        have_next = 1'b1;
        next_idx  = PW'(i);
      end
  end

  // Does the TSV under check show as faulty in this flit?
  logic [$clog2(M+1)-1:0] cur_row;
  logic [$clog2(N+1)-1:0] cur_col;
  logic row_f, col_f, others, hit;
  always_comb begin
    cur_row = $bits(cur_row)'(cur_q / PW'(N + 1));
    cur_col = $bits(cur_col)'(cur_q % PW'(N + 1));
    row_f   = row_en_i[cur_row] ? row_syn_i[cur_row] : 1'b1;
    col_f   = col_en_i[cur_col] ? col_syn_i[cur_col] : 1'b1;
    others  = 1'b0;
    for (int r = 0; r <= M; r++)
      if (r != int'(cur_row)) others |= row_syn_i[r];
    for (int c = 0; c <= N; c++)
      if (c != int'(cur_col)) others |= col_syn_i[c];
    hit     = valid_i & row_f & col_f & ~others & (row_en_i[cur_row] | col_en_i[cur_col]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state_q    <= IC_IDLE;
      faulty_q   <= '0;
      cand_q     <= '0;
      iso_q      <= '0;
      cur_q      <= '0;
      cnt_q      <= '0;
      round_q    <= '0;
      sd_start_q <= 1'b0;
      confirm_q  <= 1'b0;
      clear_q    <= 1'b0;
    end else begin
      sd_start_q <= 1'b0;
      confirm_q  <= 1'b0;
      clear_q    <= 1'b0;
      unique case (state_q)
        IC_IDLE, IC_DONE: begin
          if (start_i) begin
            round_q    <= '0;
            iso_q      <= faulty_q & DATA_POS;
            sd_start_q <= 1'b1;
            state_q    <= IC_DETECT;
          end
        end
        IC_DETECT: begin
          if (sd_done_i) begin
            if ((sd_susp_i & ~faulty_q) == '0) begin
              state_q <= IC_DONE;
            end else begin
              cand_q  <= sd_susp_i & ~faulty_q;
              iso_q   <= (faulty_q | sd_susp_i) & DATA_POS;
              state_q <= IC_ISOLATE;
            end
          end
        end
        IC_ISOLATE: begin
          if (have_next) begin
            cur_q            <= next_idx;
            cand_q[next_idx] <= 1'b0;
            iso_q[next_idx]  <= 1'b0;   // re-enable it for the check
            cnt_q            <= '0;
            state_q          <= IC_CHECK;
          end else if (round_q == RW'(MAX_ROUNDS - 1)) begin
            round_q <= round_q + 1'b1;
            state_q <= IC_DONE;
          end else begin
            round_q    <= round_q + 1'b1;
            iso_q      <= faulty_q & DATA_POS;
            sd_start_q <= 1'b1;
            state_q    <= IC_DETECT;
          end
        end
        IC_CHECK: begin
          if (hit) begin
            faulty_q[cur_q] <= 1'b1;
            iso_q[cur_q]    <= DATA_POS[cur_q];
            confirm_q       <= 1'b1;
            state_q         <= IC_ISOLATE;
          end else if (cnt_q == CW'(T - 1)) begin
            clear_q <= 1'b1;
            state_q <= IC_ISOLATE;
          end
          cnt_q <= cnt_q + 1'b1;
        end
        default: state_q <= IC_IDLE;
      endcase
    end

  // A confirmed faulty TSV stays faulty; an isolated TSV is faulty or still a candidate
  // (outside the check windows), and only data TSVs are isolated.
  a_faulty_kept: assert property (@(posedge clk) disable iff (!rst_n)
                                  (faulty_q & ~$past(faulty_q)) == (faulty_q ^ $past(faulty_q)));
  a_iso_known: assert property (@(posedge clk) disable iff (!rst_n)
                                (state_q != IC_CHECK) |-> (iso_q & ~(faulty_q | cand_q)) == '0);
  a_iso_data: assert property (@(posedge clk) disable iff (!rst_n) (iso_q & ~DATA_POS) == '0);

  assign sd_start_o   = sd_start_q;
  assign iso_o        = iso_q;
  assign faulty_o     = faulty_q;
  assign busy_o       = (state_q != IC_IDLE) && (state_q != IC_DONE);
  assign done_o       = (state_q == IC_DONE);
  assign confirm_ev_o = confirm_q;
  assign clear_ev_o   = clear_q;
  assign round_o      = round_q;

endmodule
