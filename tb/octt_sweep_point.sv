// octt_sweep_point - runs one point of the localization-rate sweep on its own OCTT link.
//
// For defect counts 1 to MAXD, TESTS random fault sets are injected (each defect a short or an
// open, on any TSV of the (M+1)(N+1)), random traffic is sent every cycle and one test is run.
// A fault set counts as localized when the faulty map equals the injected set exactly. The
// rate per defect count and the shortest and longest test times are printed. For one defect
// the rate must be at least 95 % and the shortest test time at most 2T + 7 cycles; failures
// are counted on the failures output. done rises when the point has finished.
module octt_sweep_point #(
  parameter int unsigned M     = 4,
  parameter int unsigned N     = 8,
  parameter int unsigned T     = 128,
  parameter int unsigned MAXD  = 9,
  parameter int unsigned TESTS = 100
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   rate_pct [1:MAXD]
);
  localparam int unsigned K  = (M + 1) * (N + 1);
  localparam int unsigned DW = M * N;

  logic rst_n = 0, start = 0;
  logic [M*N-1:0] data, dout;
  logic [K-1:0] sh, op, iso, faulty;
  logic valid_o, corr, multi, busy, tdone, sdb, sev, mev, cev, clev;
  logic [$clog2(K)-1:0] cpos;
  logic [2:0] round;

  octt_link #(.M(M), .N(N), .T(T)) dut (
    .clk, .rst_n, .data_i(data), .valid_i(1'b1), .short_i(sh), .open_i(op),
    .data_o(dout), .valid_o, .corr_o(corr), .multi_o(multi), .corr_pos_o(cpos),
    .test_start_i(start), .test_busy_o(busy), .test_done_o(tdone), .iso_o(iso),
    .faulty_o(faulty), .test_round_o(round), .sd_busy_o(sdb), .sd_single_ev_o(sev),
    .sd_multi_ev_o(mev), .confirm_ev_o(cev), .clear_ev_o(clev));

  always @(negedge clk) data <= DW'({$urandom, $urandom});

  initial begin
    int ok, cyc, tmin, tmax, p;
    done = 0; checks = 0; failures = 0; sh = '0; op = '0;
    for (int d = 1; d <= int'(MAXD); d++) begin
      ok = 0; tmin = 1 << 30; tmax = 0;
      for (int t = 0; t < int'(TESTS); t++) begin
        @(negedge clk);
        rst_n = 0;
        sh = '0; op = '0;
        while ($countones(sh | op) < d) begin
          p = $urandom_range(K - 1);
          if ($urandom % 2) sh[p] = 1'b1; else op[p] = 1'b1;
          if (sh[p] && op[p]) op[p] = 1'b0;
        end
        repeat (2) @(negedge clk);
        rst_n = 1;
        @(negedge clk);
        start = 1;
        @(negedge clk);
        start = 0;
        cyc = 1;
        while (!tdone) begin
          @(negedge clk);
          cyc++;
        end
        cyc = cyc - 1;   // cycles from the edge that samples start to the edge that ends the test
        if (cyc < tmin) tmin = cyc;
        if (cyc > tmax) tmax = cyc;
        if (faulty === (sh | op)) ok++;
      end
      rate_pct[d] = ok * 100 / int'(TESTS);
      $display("%0dx%0d T=%0d defects=%0d localized=%0d/%0d test time %0d..%0d cycles",
               M, N, T, d, ok, TESTS, tmin, tmax);
      if (d == 1) begin
        // one defect: detection (T + 2), selection (1), a check that ends at the first
        // localization, then a second detection round that finds nothing new (T + 2) and
        // the hand-over; the best case is therefore 2T + 7 cycles
        checks += 2;
        if (ok * 100 < int'(TESTS) * 95) begin
          failures++; $display("FAIL %0dx%0d T=%0d: single defect localized %0d times", M, N, T, ok);
        end
        if (tmin > 2 * int'(T) + 7) begin
          failures++; $display("FAIL %0dx%0d T=%0d: best-case time %0d", M, N, T, tmin);
        end
      end
    end
    done = 1;
  end
endmodule
