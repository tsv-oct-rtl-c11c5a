// tb_octt_link - end-to-end test of the OCTT link at its default size (4 x 8 code, T = 128).
//
// Random 32-bit traffic is sent every cycle through the encoder, the TSV model and the
// decoder while defects are injected into the TSV model, and a test is started on the live
// traffic. Scenarios:
//   - no defect: data arrives intact, the test ends after the best-case time (T cycles of
//     detection plus two cycles of hand-over) with an empty faulty map;
//   - one defect (short or open, on any of the 45 TSVs): every flit is delivered correct
//     (single-fault correction) and the test localizes exactly that TSV;
//   - two to six defects of mixed kinds anywhere in the bundle: the testbench reports the share
//     of fault sets localized exactly and requires at least 95 % for two or three defects and
//     85 % for four to six, with at most 5 % of the sets ending with a healthy TSV confirmed
//     faulty (three faulty parity TSVs at three corners of a rectangle give exactly the
//     signature of the fourth corner, which no check can tell apart); the isolation mask must
//     always equal the faulty data TSVs.
// Each mechanism of the design is counted and must have happened at least once: single-fault
// correction, multi-fault detection, cautious and greedy marking, simultaneous isolation of
// several suspicious TSVs, a false positive cleared, a defect confirmed, a test needing more
// than one round, and localization of both short and open defects.
module tb_octt_link;
  localparam int M = 4, N = 8, K = (M + 1) * (N + 1), T = 128;

  logic clk = 0, rst_n = 0;
  logic [M*N-1:0] data_i, data_o;
  logic valid_i = 1'b1, valid_o, corr, multi;
  logic [K-1:0] short_m, open_m, iso, faulty;
  logic [$clog2(K)-1:0] corr_pos;
  logic test_start = 0, test_busy, test_done, sd_busy;
  logic [2:0] round;
  logic sev, mev, conf_ev, clr_ev;
  int checks = 0, failures = 0;
  int n_corr = 0, n_multi = 0, n_sev = 0, n_mev = 0, n_conf = 0, n_clr = 0;
  int n_multi_iso = 0, n_multi_round = 0, n_short_loc = 0, n_open_loc = 0;
  int big_tests = 0, big_ok = 0, small_tests = 0, small_ok = 0, n_false_conf = 0;
  bit check_data = 0;

  octt_link dut (
    .clk, .rst_n, .data_i, .valid_i, .short_i(short_m), .open_i(open_m),
    .data_o, .valid_o, .corr_o(corr), .multi_o(multi), .corr_pos_o(corr_pos),
    .test_start_i(test_start), .test_busy_o(test_busy), .test_done_o(test_done),
    .iso_o(iso), .faulty_o(faulty), .test_round_o(round), .sd_busy_o(sd_busy),
    .sd_single_ev_o(sev), .sd_multi_ev_o(mev), .confirm_ev_o(conf_ev), .clear_ev_o(clr_ev));

  always #5 clk = ~clk;

  // traffic: a new random flit after every rising edge
  always @(negedge clk) data_i <= $urandom;

  always @(posedge clk) if (rst_n) begin
    if (corr)    n_corr++;
    if (multi)   n_multi++;
    if (sev)     n_sev++;
    if (mev)     n_mev++;
    if (conf_ev) n_conf++;
    if (clr_ev)  n_clr++;
    if (test_busy && !sd_busy && $countones(iso & ~faulty) > 1) n_multi_iso++;
    if (check_data) begin
      checks++;
      // isolated data TSVs are delivered raw, so only the others are compared
      if (((data_o ^ data_i) & ~iso_data(iso)) != '0 || valid_o !== valid_i) begin
        failures++;
        $display("FAIL data: sent %h received %h", data_i, data_o);
      end
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data bits whose TSV is isolated
  function automatic logic [M*N-1:0] iso_data(logic [K-1:0] m);
    logic [M*N-1:0] d;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++)
        d[r*N+c] = m[r*(N+1)+c];
    return d;
  endfunction

  function automatic logic [K-1:0] data_pos();
    logic [K-1:0] d = '0;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++)
        d[r*(N+1)+c] = 1'b1;
    return d;
  endfunction

  // cycles counts falling edges from the one after start is raised to the one after done
  // rises: start is sampled on edge 0 and done rises after edge T + 2 (best case).
  task automatic run_test(output int cycles);
    @(negedge clk);
    test_start = 1;
    @(negedge clk);
    test_start = 0;
    cycles = 1;
    while (!test_done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic reset_link(logic [K-1:0] sh, logic [K-1:0] op);
    rst_n   = 0;
    short_m = sh;
    open_m  = op;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int cycles, nf, p;
    logic [K-1:0] sh, op;
    short_m = '0; open_m = '0; data_i = '0;

    // 1. clean link: best-case time, empty map
    reset_link('0, '0);
    check_data = 1;
    run_test(cycles);
    check_data = 0;
    checks++;
    if (cycles != T + 3) begin
      failures++; $display("FAIL best-case time %0d cycles, expected %0d", cycles, T + 3);
    end
    checks++;
    if (faulty !== '0) begin failures++; $display("FAIL clean link faulty=%h", faulty); end

    // 2. single defect on every TSV, alternating kinds
    for (p = 0; p < K; p++) begin
      sh = '0; op = '0;
      if (p % 2) sh[p] = 1'b1; else op[p] = 1'b1;
      reset_link(sh, op);
      check_data = 1;
      run_test(cycles);
      check_data = 0;
      checks++;
      if (faulty !== (sh | op)) begin
        failures++; $display("FAIL single defect at %0d: faulty=%h", p, faulty);
      end else if (p % 2) n_short_loc++;
      else n_open_loc++;
    end

    // 3. two to six defects of mixed kinds
    for (int test = 0; test < 150; test++) begin
      nf = 2 + test % 5;
      sh = '0; op = '0;
      while ($countones(sh | op) < nf) begin
        p = $urandom_range(K - 1);
        if ($urandom % 2) sh[p] = 1'b1; else op[p] = 1'b1;
        if (sh[p] && op[p]) op[p] = 1'b0;
      end
      reset_link(sh, op);
      run_test(cycles);
      if (round > 0) n_multi_round++;
      if (nf <= 3) begin
        small_tests++;
        if (faulty === (sh | op)) small_ok++;
      end else begin
        big_tests++;
        if (faulty === (sh | op)) big_ok++;
      end
      if ((faulty & ~(sh | op)) != '0) n_false_conf++;
      checks++;
      if (iso !== (faulty & data_pos())) begin
        failures++;
        $display("FAIL isolation mask %h does not match faulty data TSVs %h", iso, faulty);
      end
    end
    $display("2-3 defects: %0d of %0d fault sets fully localized", small_ok, small_tests);
    $display("4-6 defects: %0d of %0d fault sets fully localized", big_ok, big_tests);
    $display("fault sets with a healthy TSV confirmed faulty: %0d", n_false_conf);
    checks++;
    if (small_ok * 100 < small_tests * 95) begin
      failures++; $display("FAIL 2-3 defect localization rate below 95%%");
    end
    checks++;
    if (big_ok * 100 < big_tests * 85) begin
      failures++; $display("FAIL 4-6 defect localization rate below 85%%");
    end
    checks++;
    if (n_false_conf * 100 > 150 * 5) begin
      failures++; $display("FAIL too many healthy TSVs confirmed faulty");
    end

    $display("events: corrected=%0d multi=%0d single-marks=%0d greedy-marks=%0d confirmed=%0d cleared=%0d multi-isolation=%0d multi-round-tests=%0d",
             n_corr, n_multi, n_sev, n_mev, n_conf, n_clr, n_multi_iso, n_multi_round);
    checks++;
    if (n_corr == 0 || n_multi == 0 || n_sev == 0 || n_mev == 0 || n_conf == 0 ||
        n_clr == 0 || n_multi_iso == 0 || n_multi_round == 0 || n_short_loc == 0 ||
        n_open_loc == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
