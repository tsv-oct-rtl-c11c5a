// tb_ppc_decoder - self-checking test of the parity product code decoder.
//
// Code words are built here with a reference encoder. The test checks that:
//   - a clean word gives no failing check and the data back;
//   - one flipped TSV anywhere in the 45 gives exactly its row and column as failing checks,
//     single_o with its position, and the original data (corrected);
//   - two flipped TSVs give multi_o;
//   - isolated TSVs are ignored: flipping them changes no check, and a check whose parity TSV
//     is isolated is reported disabled;
//   - with data TSVs isolated, a single fault elsewhere is still localized.
module tb_ppc_decoder;
  localparam int M = 4, N = 8, K = (M + 1) * (N + 1), PW = $clog2(K);

  logic [M*N-1:0] data, dout;
  logic [K-1:0]   code, iso;
  logic [M:0]     rsyn, ren;
  logic [N:0]     csyn, cen;
  logic           single, multi;
  logic [PW-1:0]  pos;
  int checks = 0, failures = 0;

  ppc_decoder #(.M(M), .N(N)) dut (
    .code_i(code), .iso_i(iso), .row_syn_o(rsyn), .col_syn_o(csyn), .row_en_o(ren),
    .col_en_o(cen), .data_o(dout), .single_o(single), .multi_o(multi), .pos_o(pos));

  // Reference encoder: isolated data bits count as 0 in every parity.
  function automatic logic [K-1:0] enc(logic [M*N-1:0] d, logic [K-1:0] m);
    logic [K-1:0] w = '0;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++) begin
        w[r*(N+1)+c] = d[r*N+c];
        if (!m[r*(N+1)+c]) begin
          w[r*(N+1)+N] ^= d[r*N+c];
          w[M*(N+1)+c] ^= d[r*N+c];
          w[K-1]       ^= d[r*N+c];
        end
      end
    return w;
  endfunction

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (code=%h iso=%h)", what, got, exp, code, iso);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, q, r, c;
    logic [K-1:0] dmask;
    // data-position mask
    dmask = '0;
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) dmask[i*(N+1)+j] = 1'b1;

    for (int t = 0; t < 300; t++) begin
      data = $urandom; iso = '0;
      // clean
      code = enc(data, iso); #1;
      expect_eq("clean rows", 64'(rsyn), 0);
      expect_eq("clean cols", 64'(csyn), 0);
      expect_eq("clean data", 64'(dout), 64'(data));
      expect_eq("clean flags", {single, multi}, 0);
      // every single fault position
      for (p = 0; p < K; p++) begin
        r = p / (N + 1); c = p % (N + 1);
        code = enc(data, iso); code[p] = ~code[p]; #1;
        expect_eq("single rows", 64'(rsyn), 64'(1) << r);
        expect_eq("single cols", 64'(csyn), 64'(1) << c);
        expect_eq("single flag", {single, multi}, 2'b10);
        expect_eq("single pos", 64'(pos), 64'(p));
        expect_eq("corrected data", 64'(dout), 64'(data));
      end
      // two faults
      p = $urandom_range(K - 1);
      do q = $urandom_range(K - 1); while (q == p);
      code = enc(data, iso); code[p] = ~code[p]; code[q] = ~code[q]; #1;
      expect_eq("double flag", {single, multi}, 2'b01);
      // isolation of random TSVs, parity ones included: flipping them must change nothing
      iso = {$urandom, $urandom} & {$urandom, $urandom};
      code = enc(data, iso) ^ (iso & {$urandom, $urandom}); #1;
      expect_eq("iso rows", 64'(rsyn), 0);
      expect_eq("iso cols", 64'(csyn), 0);
      for (int i = 0; i < M; i++) expect_eq("row en", 64'(ren[i]), 64'(!iso[i*(N+1)+N]));
      for (int j = 0; j < N; j++) expect_eq("col en", 64'(cen[j]), 64'(!iso[M*(N+1)+j]));
      expect_eq("corner en", {ren[M], cen[N]}, {2{!iso[K-1]}});
      // data TSVs isolated, one fault on a non-isolated TSV: still localized
      iso = {$urandom, $urandom} & {$urandom, $urandom} & dmask;
      do p = $urandom_range(K - 1); while (iso[p]);
      code = enc(data, iso) ^ (iso & {$urandom, $urandom}); code[p] = ~code[p]; #1;
      expect_eq("iso single flag", {single, multi}, 2'b10);
      expect_eq("iso single pos", 64'(pos), 64'(p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
