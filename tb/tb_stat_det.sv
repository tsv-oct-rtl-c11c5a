// tb_stat_det - self-checking test of statistical detection.
//
// Two instances with a short period (T = 16): the greedy one (default) and a cautious one.
// Random sparse row/column check failures, random flit valid and a random exclusion mask are
// driven for several periods. A reference map built here (OR over observed flits of every
// failing-row x failing-column crossing, or only single crossings for the cautious unit) is
// compared with susp_o when done_o pulses. The period length (T cycles from start to done)
// and that nothing is marked after the period has ended are checked too.
module tb_stat_det;
  localparam int M = 4, N = 8, K = (M + 1) * (N + 1), T = 16;

  logic clk = 0, rst_n = 0, start = 0, valid = 0;
  logic [M:0] rsyn = '0;
  logic [N:0] csyn = '0;
  logic [K-1:0] excl = '0, susp_g, susp_c, ref_g, ref_c;
  logic busy_g, done_g, sev_g, mev_g, busy_c, done_c, sev_c, mev_c;
  int checks = 0, failures = 0, n_single = 0, n_multi = 0;

  stat_det #(.M(M), .N(N), .T(T)) dut_g (
    .clk, .rst_n, .start_i(start), .valid_i(valid), .row_syn_i(rsyn), .col_syn_i(csyn),
    .excl_i(excl), .busy_o(busy_g), .done_o(done_g), .susp_o(susp_g),
    .single_ev_o(sev_g), .multi_ev_o(mev_g));
  stat_det #(.M(M), .N(N), .T(T), .GREEDY(1'b0)) dut_c (
    .clk, .rst_n, .start_i(start), .valid_i(valid), .row_syn_i(rsyn), .col_syn_i(csyn),
    .excl_i(excl), .busy_o(busy_c), .done_o(done_c), .susp_o(susp_c),
    .single_ev_o(sev_c), .multi_ev_o(mev_c));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic int ones(logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) n += int'(v[i]);
    return n;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [K-1:0] x;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int period = 0; period < 60; period++) begin
      @(negedge clk);
      excl  = (period % 2) ? ({$urandom, $urandom} & {$urandom, $urandom}) : '0;
      start = 1;
      @(posedge clk);
      @(negedge clk);
      start = 0;
      ref_g = '0; ref_c = '0;
      cyc = 0;
      while (!done_g) begin
        expect_eq("busy", busy_g, 1);
        valid = ($urandom % 4) != 0;
        rsyn  = '0; csyn = '0;
        if ($urandom % 3 == 0) begin
          rsyn[$urandom_range(M)] = 1'b1;
          csyn[$urandom_range(N)] = 1'b1;
          if ($urandom % 2) rsyn[$urandom_range(M)] = 1'b1;
          if ($urandom % 2) csyn[$urandom_range(N)] = 1'b1;
        end
        x = '0;
        for (int r = 0; r <= M; r++)
          for (int c = 0; c <= N; c++)
            x[r*(N+1)+c] = rsyn[r] & csyn[c] & ~excl[r*(N+1)+c];
        if (valid) begin
          ref_g |= x;
          if (ones(16'(rsyn)) == 1 && ones(16'(csyn)) == 1) ref_c |= x;
          if (sev_g) n_single++;
          if (mev_g) n_multi++;
        end
        @(posedge clk);
        cyc++;
        @(negedge clk);
      end
      expect_eq("period length", cyc, T);
      expect_eq("cautious done with greedy", done_c, 1);
      expect_eq("greedy map", susp_g, ref_g);
      expect_eq("cautious map", susp_c, ref_c);
      // after the period nothing more is marked
      valid = 1; rsyn = '1; csyn = '1;
      repeat (3) @(posedge clk);
      @(negedge clk);
      expect_eq("map frozen", susp_g, ref_g);
      expect_eq("idle", busy_g, 0);
      valid = 0; rsyn = '0; csyn = '0;
    end
    checks++;
    if (n_single == 0 || n_multi == 0) begin
      failures++;
      $display("FAIL events not seen: single=%0d multi=%0d", n_single, n_multi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
