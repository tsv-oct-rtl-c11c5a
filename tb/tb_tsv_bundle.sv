// tb_tsv_bundle - self-checking test of the TSV defect model.
//
// Sends random words through 45 TSVs with random short and open defect masks that change over
// time, and compares every received bit with the expected behaviour: a healthy TSV passes the
// current value, a shorted one reads 0, an open one the value sent one cycle earlier. Also
// counts that short-caused and open-caused errors both actually happened.
module tb_tsv_bundle;
  localparam int K = 45;

  logic clk = 0, rst_n = 0;
  logic [K-1:0] tx, sh, op, rx, prev, expct;
  int checks = 0, failures = 0, n_short_err = 0, n_open_err = 0;

  tsv_bundle #(.K(K)) dut (.clk, .rst_n, .tx_i(tx), .short_i(sh), .open_i(op), .rx_o(rx));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx = '0; sh = '0; op = '0; prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (t % 50 == 0) begin
        sh = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        op = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      end
      tx = {$urandom, $urandom};
      #1;
      for (int i = 0; i < K; i++) begin
        expct[i] = sh[i] ? 1'b0 : op[i] ? prev[i] : tx[i];
        if (sh[i] && tx[i]) n_short_err++;
        if (!sh[i] && op[i] && prev[i] != tx[i]) n_open_err++;
      end
      checks++;
      if (rx !== expct) begin
        failures++;
        $display("FAIL t=%0d rx=%h expected=%h", t, rx, expct);
      end
      @(posedge clk);
      prev = tx;
    end
    checks++;
    if (n_short_err == 0 || n_open_err == 0) begin
      failures++;
      $display("FAIL defect kinds not exercised: short=%0d open=%0d", n_short_err, n_open_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
