// tb_octt_sweep - localization rate of the OCTT link across the evaluated configurations.
//
// Runs, in parallel, the 32-bit 4 x 8 link with detection periods of 8, 16, 32, 64 and 128
// cycles, and the 8-bit 2 x 4, 16-bit 4 x 4 and 64-bit 8 x 8 links with a period of 128,
// each for 1 to 9 defects (1 to 6 for 2 x 4) with 100 random fault sets per defect count
// (far fewer than a full Monte-Carlo run, to keep the simulation short). Each point prints its
// localization rate per defect count. Checked: one defect is localized in at least 95 % of
// the sets and the best case takes at most 2T + 7 cycles; for 4 x 8 at T = 128, at least 90 % of the fault sets with up to
// six defects are localized; and a longer period never localizes markedly less (more than
// 10 points) than a shorter one at the same defect count.
module tb_octt_sweep;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NP = 8;
  logic done [NP];
  int   ck [NP], fl [NP];
  int   r8 [1:9], r16 [1:9], r32 [1:9], r64 [1:9], r128 [1:9], r24 [1:6], r44 [1:9], r88 [1:9];

  octt_sweep_point #(.M(4), .N(8), .T(8))   p0 (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]), .rate_pct(r8));
  octt_sweep_point #(.M(4), .N(8), .T(16))  p1 (.clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]), .rate_pct(r16));
  octt_sweep_point #(.M(4), .N(8), .T(32))  p2 (.clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]), .rate_pct(r32));
  octt_sweep_point #(.M(4), .N(8), .T(64))  p3 (.clk, .done(done[3]), .checks(ck[3]), .failures(fl[3]), .rate_pct(r64));
  octt_sweep_point #(.M(4), .N(8), .T(128)) p4 (.clk, .done(done[4]), .checks(ck[4]), .failures(fl[4]), .rate_pct(r128));
  octt_sweep_point #(.M(2), .N(4), .T(128), .MAXD(6)) p5 (.clk, .done(done[5]), .checks(ck[5]), .failures(fl[5]), .rate_pct(r24));
  octt_sweep_point #(.M(4), .N(4), .T(128)) p6 (.clk, .done(done[6]), .checks(ck[6]), .failures(fl[6]), .rate_pct(r44));
  octt_sweep_point #(.M(8), .N(8), .T(128)) p7 (.clk, .done(done[7]), .checks(ck[7]), .failures(fl[7]), .rate_pct(r88));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NP; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < NP; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    for (int d = 1; d <= 6; d++) begin
      checks++;
      if (r128[d] < 90) begin
        failures++; $display("FAIL 4x8 T=128: %0d defects localized in %0d %%", d, r128[d]);
      end
    end
    for (int d = 1; d <= 9; d++) begin
      checks++;
      if (r16[d] + 10 < r8[d] || r32[d] + 10 < r16[d] || r64[d] + 10 < r32[d] ||
          r128[d] + 10 < r64[d]) begin
        failures++; $display("FAIL rate falls with a longer period at %0d defects", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
