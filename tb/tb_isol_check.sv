// tb_isol_check - self-checking test of the isolate-and-check controller.
//
// The controller is run with a statistical detection unit (T = 16) against an abstract link
// built here: a set of faulty data TSVs, each of which corrupts its bit in a random half of
// the flits (a hidden defect). Each cycle the testbench forms the row and column checks the
// parity product code would report: the parity of the corrupted, non-isolated TSVs of each
// row and column, with a check disabled when its parity TSV is isolated. For many random
// fault sets of 1 to 6 TSVs the final faulty map must equal the injected set, and the
// isolation mask must equal the faulty map. The testbench also counts that suspicious TSVs
// were cleared as false positives, confirmed as faulty, isolated several at once, and that
// tests needing more than one detection round occurred.
module tb_isol_check;
  localparam int M = 4, N = 8, K = (M + 1) * (N + 1), T = 16, R = 4;

  logic clk = 0, rst_n = 0, start = 0, valid = 1;
  logic [M:0] rsyn, ren;
  logic [N:0] csyn, cen;
  logic sd_start, sd_done, sd_busy, sev, mev;
  logic [K-1:0] susp, iso, faulty, fset, fire;
  logic busy, done, conf_ev, clr_ev;
  logic [$clog2(R+1)-1:0] round;
  int checks = 0, failures = 0;
  int n_conf = 0, n_clr = 0, n_multi_iso = 0, n_multi_round = 0;

  stat_det #(.M(M), .N(N), .T(T)) u_sd (
    .clk, .rst_n, .start_i(sd_start), .valid_i(valid), .row_syn_i(rsyn), .col_syn_i(csyn),
    .excl_i(iso), .busy_o(sd_busy), .done_o(sd_done), .susp_o(susp),
    .single_ev_o(sev), .multi_ev_o(mev));

  isol_check #(.M(M), .N(N), .T(T), .MAX_ROUNDS(R)) dut (
    .clk, .rst_n, .start_i(start), .valid_i(valid), .row_syn_i(rsyn), .col_syn_i(csyn),
    .row_en_i(ren), .col_en_i(cen), .sd_start_o(sd_start), .sd_done_i(sd_done),
    .sd_susp_i(susp), .iso_o(iso), .faulty_o(faulty), .busy_o(busy), .done_o(done),
    .confirm_ev_o(conf_ev), .clear_ev_o(clr_ev), .round_o(round));

  always #5 clk = ~clk;

  // Abstract link: checks from the corrupted, non-isolated TSVs.
  always_comb begin
    for (int r = 0; r <= M; r++) ren[r] = !iso[r*(N+1)+N];
    for (int c = 0; c < N; c++)  cen[c] = !iso[M*(N+1)+c];
    ren[M] = !iso[K-1];
    cen[N] = !iso[K-1];
    rsyn = '0;
    csyn = '0;
    for (int r = 0; r <= M; r++)
      for (int c = 0; c <= N; c++)
        if (fire[r*(N+1)+c] && !iso[r*(N+1)+c]) begin
          rsyn[r] ^= 1'b1;
          csyn[c] ^= 1'b1;
        end
    rsyn &= ren;
    csyn &= cen;
  end

  always @(negedge clk) begin
    fire = fset & {$urandom, $urandom};
    if (busy && $countones(iso & ~faulty) > 1) n_multi_iso++;
  end
  always @(posedge clk) begin
    if (conf_ev) n_conf++;
    if (clr_ev)  n_clr++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nf, p;
    fset = '0;
    fire = '0;
    for (int test = 0; test < 200; test++) begin
      rst_n = 0;
      fset  = '0;
      nf = 1 + test % 6;
      while ($countones(fset) < nf) begin
        p = $urandom_range(M - 1) * (N + 1) + $urandom_range(N - 1);
        fset[p] = 1'b1;
      end
      repeat (2) @(posedge clk);
      @(negedge clk);
      rst_n = 1;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      if (round > 0) n_multi_round++;
      checks++;
      if (faulty !== fset) begin
        failures++;
        $display("FAIL test %0d: faulty=%h injected=%h rounds=%0d", test, faulty, fset, round);
      end
      checks++;
      if (iso !== faulty) begin
        failures++;
        $display("FAIL test %0d: iso=%h faulty=%h", test, iso, faulty);
      end
    end
    checks++;
    if (n_conf == 0 || n_clr == 0 || n_multi_iso == 0 || n_multi_round == 0) begin
      failures++;
      $display("FAIL mechanism not seen: confirm=%0d clear=%0d multi_iso=%0d multi_round=%0d",
               n_conf, n_clr, n_multi_iso, n_multi_round);
    end
    $display("confirmed=%0d cleared=%0d multi-round tests=%0d", n_conf, n_clr, n_multi_round);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
