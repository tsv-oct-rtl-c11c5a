// tb_ppc_encoder - self-checking test of the parity product code encoder.
//
// Drives random data with random isolation masks (and some directed ones) into a 4 x 8
// encoder and compares every code bit with a reference built here bit by bit: data bits pass
// through, each row/column parity is the XOR of the non-isolated data of its row/column, the
// corner is the XOR of all non-isolated data. Also checks that, with nothing isolated, every
// row and column of the code word has even parity.
module tb_ppc_encoder;
  localparam int M = 4, N = 8, K = (M + 1) * (N + 1);

  logic [M*N-1:0] data;
  logic [K-1:0]   iso, code, expct;
  int checks = 0, failures = 0;

  ppc_encoder #(.M(M), .N(N)) dut (.data_i(data), .iso_i(iso), .code_o(code));

  function automatic logic [K-1:0] ref_code(logic [M*N-1:0] d, logic [K-1:0] m);
    logic [K-1:0] w = '0;
    logic b;
    for (int r = 0; r < M; r++) for (int c = 0; c < N; c++) w[r*(N+1)+c] = d[r*N+c];
    for (int r = 0; r < M; r++) begin
      b = 0;
      for (int c = 0; c < N; c++) if (!m[r*(N+1)+c]) b ^= d[r*N+c];
      w[r*(N+1)+N] = b;
    end
    for (int c = 0; c < N; c++) begin
      b = 0;
      for (int r = 0; r < M; r++) if (!m[r*(N+1)+c]) b ^= d[r*N+c];
      w[M*(N+1)+c] = b;
    end
    b = 0;
    for (int i = 0; i < M*N; i++) if (!m[(i/N)*(N+1)+(i%N)]) b ^= d[i];
    w[K-1] = b;
    return w;
  endfunction

  task automatic check(string what);
    #1;
    expct = ref_code(data, iso);
    checks++;
    if (code !== expct) begin
      failures++;
      $display("FAIL %s: data=%h iso=%h code=%h expected=%h", what, data, iso, code, expct);
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
    logic par;
    data = '0; iso = '0; check("zero");
    data = '1; iso = '0; check("ones");
    for (int i = 0; i < M*N; i++) begin
      data = 1 << i; iso = '0; check("walking one");
    end
    // isolate a single data TSV holding a 1: parities must ignore it
    data = 32'h0000_0001; iso = '0; iso[0] = 1'b1; check("isolated one");
    checks++;
    if (code[N] !== 1'b0 || code[M*(N+1)] !== 1'b0) begin
      failures++; $display("FAIL isolated bit still in parity");
    end
    for (int t = 0; t < 2000; t++) begin
      data = $urandom;
      iso  = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      if (t % 3 == 0) iso = '0;
      check("random");
      if (iso == '0) begin
        for (int r = 0; r <= M; r++) begin
          par = 0;
          for (int c = 0; c <= N; c++) par ^= code[r*(N+1)+c];
          checks++; if (par) begin failures++; $display("FAIL row %0d odd", r); end
        end
        for (int c = 0; c <= N; c++) begin
          par = 0;
          for (int r = 0; r <= M; r++) par ^= code[r*(N+1)+c];
          checks++; if (par) begin failures++; $display("FAIL col %0d odd", c); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
