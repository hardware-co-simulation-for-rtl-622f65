// Self-checking test of papr_calc at N = 256.
// Symbols: constant envelope (0 dB), one spike among zeros (ratio N,
// 24.08 dB), random Gaussian-like samples, random samples with a large
// peak, and a symbol abandoned half-way by a new start. The expected PAPR,
// 10*log10(max|x|^2 / mean|x|^2), is computed here in floating point from
// the Fix_20_15 samples and must match papr_db (UQ8.8) within TOL_DB. The
// result must appear within MAX_LAT cycles of the last sample.
module tb_papr_calc;
  import sbi_pkg::*;
  localparam int N = 256;
  localparam real TOL_DB = 0.03;
  localparam int MAX_LAT = 80;

  logic clk = 0, rst_n = 0;
  logic start, in_valid, done;
  xcplx_t in_s;
  logic [DBW-1:0] papr_db;
  int checks = 0, failures = 0;

  papr_calc #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sr [N], si [N];

  function automatic int gauss(int scale);
    int acc = 0;
    for (int i = 0; i < 4; i++) acc += int'($urandom_range(0, 2 * scale)) - scale;
    return acc;
  endfunction

  task automatic run(int kind);
    real pmax, psum, p, exp_db, got_db;
    int lat;
    for (int n = 0; n < N; n++) begin
      case (kind)
        0: begin sr[n] = (n % 2) ? 3000 : -3000; si[n] = 3000; end
        1: begin sr[n] = (n == 77) ? 20000 : 0; si[n] = (n == 77) ? -5000 : 0; end
        2: begin sr[n] = gauss(1500); si[n] = gauss(1500); end
        default: begin sr[n] = gauss(1000); si[n] = gauss(1000); if (n == 200) sr[n] = 200000; end
      endcase
    end
    pmax = 0.0; psum = 0.0;
    for (int n = 0; n < N; n++) begin
      p = (real'(sr[n]) / 32768.0) ** 2 + (real'(si[n]) / 32768.0) ** 2;
      psum += p;
      if (p > pmax) pmax = p;
    end
    exp_db = 10.0 * $log10(pmax / (psum / N));
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int n = 0; n < N; n++) begin
      in_valid = 1; in_s.re = xsample_t'(sr[n]); in_s.im = xsample_t'(si[n]);
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 4) == 0) @(negedge clk);   // gaps
    end
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    got_db = real'(papr_db) / 256.0;
    checks++;
    if (got_db - exp_db > TOL_DB || exp_db - got_db > TOL_DB) begin
      failures++;
      $display("kind %0d: got %f dB expected %f dB", kind, got_db, exp_db);
    end
    checks++;
    if (lat > MAX_LAT) begin
      failures++;
      $display("kind %0d: latency %0d cycles", kind, lat);
    end
  endtask

  initial begin
    start = 0; in_valid = 0; in_s = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0);
    run(1);
    // half a symbol, then a restart: the partial data must be discarded
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int n = 0; n < N / 2; n++) begin
      in_valid = 1; in_s.re = 20'sh3ffff; in_s.im = 0;
      @(negedge clk);
    end
    in_valid = 0;
    for (int i = 0; i < 10; i++) run(2);
    for (int i = 0; i < 5; i++) run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
