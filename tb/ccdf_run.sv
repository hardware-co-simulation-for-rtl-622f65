// Workload driver for tb_workload_ccdf: runs SYMBOLS random symbols of
// size N, oversampled by L, through one sbi_pts_top and gathers PAPR
// statistics.
//
// Modulation MOD = 4 (QPSK, +-0.7071 per part) or 16 (16-QAM, levels
// +-1/+-3 scaled so the corner point has magnitude 0.9). For every symbol
// it computes, in floating point, the PAPR of plain OFDM (one L*N-point
// IDFT of the whole symbol followed by (L-1)*N zeros, no partition) and the PAPR of the design's output
// samples. Checked per symbol: the output PAPR is not above the PAPR of the
// first candidate (w = 0...0) by more than TOL_DB, and it matches the
// lowest candidate PAPR the design reported within TOL_DB. At the end it
// prints the fraction of symbols whose PAPR exceeds 5..11 dB for both, i.e.
// points of the complementary cumulative distribution (CCDF).
module ccdf_run
  import sbi_pkg::*;
#(
  parameter int N = 256,
  parameter int MOD = 4,
  parameter int SYMBOLS = 50,
  parameter int L = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int Q = 4;
  localparam real TOL_DB = 0.1;
  localparam real PI = 3.14159265358979323846;

  logic in_valid, in_ready, out_valid, out_last, papr_valid, flip_kept;
  logic signed [DW-1:0] in_re, in_im;
  logic signed [XW-1:0] out_re, out_im;
  logic [Q-1:0] index;
  logic [DBW-1:0] papr_db;

  sbi_pts_top #(.N(N), .L(L)) dut (.*);

  int  xr [SYMBOLS][N], xi [SYMBOLS][N];
  real orig_papr [SYMBOLS];
  real sbi_papr [SYMBOLS];

  function automatic int level();
    int l;
    if (MOD == 4) return $urandom_range(0, 1) ? 23170 : -23170;
    l = 2 * int'($urandom_range(0, 3)) - 3;          // -3, -1, 1, 3
    return l * 6950;                                 // 3*6950*sqrt(2) = 0.9
  endfunction

  task automatic make_symbol(int s);
    real pmax, psum;
    for (int k = 0; k < N; k++) begin
      xr[s][k] = level();
      xi[s][k] = level();
    end
    pmax = 0.0; psum = 0.0;
    for (int n = 0; n < L * N; n++) begin
      real re, im, p;
      re = 0.0; im = 0.0;
      for (int k = 0; k < N; k++) begin
        real c, sn;
        c = $cos(2.0 * PI * k * n / (L * N)); sn = $sin(2.0 * PI * k * n / (L * N));
        re += xr[s][k] * c - xi[s][k] * sn;
        im += xr[s][k] * sn + xi[s][k] * c;
      end
      p = re * re + im * im;
      psum += p;
      if (p > pmax) pmax = p;
    end
    orig_papr[s] = 10.0 * $log10(pmax / (psum / (L * N)));
  endtask

  initial begin
    finished = 0;
    in_valid = 0; in_re = '0; in_im = '0;
    for (int s = 0; s < SYMBOLS; s++) make_symbol(s);
    @(posedge rst_n);
    for (int s = 0; s < SYMBOLS; s++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        in_valid = 1; in_re = sample_t'(xr[s][k]); in_im = sample_t'(xi[s][k]);
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  end

  int  sym = 0, nout = 0, nrep = 0;
  real first_papr, min_papr, pmax, psum;
  initial begin checks = 0; failures = 0; end
  always @(negedge clk) begin
    if (rst_n && !finished && papr_valid) begin
      real got;
      got = real'(papr_db) / 256.0;
      if (nrep == 0) begin first_papr = got; min_papr = got; end
      else if (got < min_papr) min_papr = got;
      nrep++;
    end
    if (rst_n && !finished && out_valid) begin
      real p;
      if (nout == 0) begin pmax = 0.0; psum = 0.0; end
      p = real'(out_re) * real'(out_re) + real'(out_im) * real'(out_im);
      psum += p;
      if (p > pmax) pmax = p;
      nout++;
      if (out_last) begin
        sbi_papr[sym] = 10.0 * $log10(pmax / (psum / (L * N)));
        checks += 3;
        if (nout != L * N) failures++;
        if (sbi_papr[sym] > first_papr + TOL_DB) begin
          failures++;
          $display("N=%0d symbol %0d: output PAPR %f above the first candidate's %f", N, sym, sbi_papr[sym], first_papr);
        end
        if (sbi_papr[sym] - min_papr > TOL_DB || min_papr - sbi_papr[sym] > TOL_DB) begin
          failures++;
          $display("N=%0d symbol %0d: output PAPR %f, lowest reported %f", N, sym, sbi_papr[sym], min_papr);
        end
        nout = 0; nrep = 0;
        sym++;
        if (sym == SYMBOLS) begin
          real mo, ms;
          mo = 0.0; ms = 0.0;
          for (int s = 0; s < SYMBOLS; s++) begin mo += orig_papr[s]; ms += sbi_papr[s]; end
          $display("N=%0d L=%0d %0d-point constellation, %0d symbols: mean PAPR original %.2f dB, SBI-PTS %.2f dB",
                   N, L, MOD, SYMBOLS, mo / SYMBOLS, ms / SYMBOLS);
          for (int th = 5; th <= 11; th++) begin
            int co, cs;
            co = 0; cs = 0;
            for (int s = 0; s < SYMBOLS; s++) begin
              if (orig_papr[s] > th) co++;
              if (sbi_papr[s] > th) cs++;
            end
            $display("  CCDF(PAPR > %0d dB): original %.3f, SBI-PTS %.3f", th,
                     real'(co) / SYMBOLS, real'(cs) / SYMBOLS);
          end
          finished = 1;
        end
      end
    end
  end
endmodule
