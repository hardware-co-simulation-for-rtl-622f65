// End-to-end test of sbi_pts_top at its default size (N = 256, Q = 4, B = 8).
//
// Random QPSK symbols (+-0.7071 per part) are sent back to back. The
// testbench computes its own reference in floating point: partition into
// four blocks of 64 subcarriers, an N-point IDFT scaled by 1/N per
// subblock, the subblock interleaving built step by step (column-wise write
// into a (QB) x (N/B) matrix, transpose, column-wise read), the PAPR of
// every candidate phase sequence and the greedy choice among them.
// Checked per symbol: the Q + 1 candidate PAPRs (within TOL_DB), the chosen
// index (unless a decision is closer than TOL_DB), and all N output samples
// against the reference for the chosen index (within TOL_LSB).
// Mechanisms that must occur at least once: the input stalled by in_ready,
// a phase flip kept, a phase flip rejected, a symbol leaving the design.
module tb_sbi_pts_top;
  import sbi_pkg::*;
  localparam int N = 256, Q = 4, B = 8;
  localparam int SYMBOLS = 4;
  localparam real TOL_DB = 0.08;
  localparam int TOL_LSB = 48;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_last, papr_valid, flip_kept;
  logic signed [DW-1:0] in_re, in_im;
  logic signed [XW-1:0] out_re, out_im;
  logic [Q-1:0] index;
  logic [DBW-1:0] papr_db;
  int checks = 0, failures = 0;
  int n_stall = 0, n_kept = 0, n_rejected = 0, n_symbols_out = 0, n_ambiguous = 0;

  sbi_pts_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (SYMBOLS * 4000 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  xr [SYMBOLS][N], xi [SYMBOLS][N];     // frequency-domain input
  real yr [SYMBOLS][Q][N], yi [SYMBOLS][Q][N]; // interleaved rows
  real exp_papr [SYMBOLS][Q+1];
  logic [Q-1:0] exp_w [SYMBOLS];
  bit  amb [SYMBOLS];
  int  src_q [Q][N], src_k [Q][N];

  task automatic build_interleave_map();
    int R, C, idx;
    int mq [][], mk [][];
    R = Q * B; C = N / B;
    mq = new[R]; mk = new[R];
    foreach (mq[r]) begin mq[r] = new[C]; mk[r] = new[C]; end
    idx = 0;
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++) begin mq[r][c] = idx % Q; mk[r][c] = idx / Q; idx++; end
    idx = 0;
    for (int r = 0; r < R; r++)        // transposed matrix read column-wise
      for (int c = 0; c < C; c++) begin
        src_q[idx % Q][idx / Q] = mq[r][c];
        src_k[idx % Q][idx / Q] = mk[r][c];
        idx++;
      end
  endtask

  function automatic real papr_of(int s, logic [Q-1:0] w);
    real pmax, psum;
    pmax = 0.0; psum = 0.0;
    for (int n = 0; n < N; n++) begin
      real re, im, p;
      re = 0.0; im = 0.0;
      for (int q = 0; q < Q; q++) begin
        re += (w[q] ? -1.0 : 1.0) * yr[s][q][n];
        im += (w[q] ? -1.0 : 1.0) * yi[s][q][n];
      end
      p = re * re + im * im;
      psum += p;
      if (p > pmax) pmax = p;
    end
    return 10.0 * $log10(pmax / (psum / N));
  endfunction

  task automatic make_symbol(int s);
    real fr [Q][N], fi [Q][N];
    logic [Q-1:0] best, w;
    real bp, p;
    for (int k = 0; k < N; k++) begin
      xr[s][k] = $urandom_range(0, 1) ? 23170 : -23170;
      xi[s][k] = $urandom_range(0, 1) ? 23170 : -23170;
    end
    for (int q = 0; q < Q; q++)
      for (int n = 0; n < N; n++) begin
        fr[q][n] = 0.0; fi[q][n] = 0.0;
        for (int k = q * N / Q; k < (q + 1) * N / Q; k++) begin
          real c, sn;
          c = $cos(2.0 * PI * k * n / N); sn = $sin(2.0 * PI * k * n / N);
          fr[q][n] += xr[s][k] * c - xi[s][k] * sn;
          fi[q][n] += xr[s][k] * sn + xi[s][k] * c;
        end
        fr[q][n] /= N; fi[q][n] /= N;
      end
    for (int m = 0; m < Q; m++)
      for (int j = 0; j < N; j++) begin
        yr[s][m][j] = fr[src_q[m][j]][src_k[m][j]];
        yi[s][m][j] = fi[src_q[m][j]][src_k[m][j]];
      end
    best = '0;
    bp = papr_of(s, best);
    exp_papr[s][0] = bp;
    amb[s] = 0;
    for (int c = 1; c <= Q; c++) begin
      w = best ^ (Q'(1) << (c - 1));
      p = papr_of(s, w);
      exp_papr[s][c] = p;
      if (p - bp < TOL_DB && bp - p < TOL_DB) amb[s] = 1;
      if (p < bp) begin best = w; bp = p; end
    end
    exp_w[s] = best;
  endtask

  // ------------------------------------------------------------ stimulus
  initial begin
    in_valid = 0; in_re = '0; in_im = '0;
    build_interleave_map();
    for (int s = 0; s < SYMBOLS; s++) make_symbol(s);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < SYMBOLS; s++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        in_valid = 1; in_re = sample_t'(xr[s][k]); in_im = sample_t'(xi[s][k]);
        while (!in_ready) begin n_stall++; @(negedge clk); end
        @(posedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  end

  // ------------------------------------------------------------ monitor
  int sym_out = 0, nrep = 0, nout = 0, kept_sym = 0;
  always @(negedge clk) begin
    if (rst_n && flip_kept) begin n_kept++; kept_sym++; end
    if (rst_n && papr_valid && sym_out < SYMBOLS) begin
      real got;
      got = real'(papr_db) / 256.0;
      checks++;
      if (got - exp_papr[sym_out][nrep] > TOL_DB || exp_papr[sym_out][nrep] - got > TOL_DB) begin
        failures++;
        $display("symbol %0d candidate %0d: PAPR %f dB, expected %f dB", sym_out, nrep, got, exp_papr[sym_out][nrep]);
      end
      nrep++;
    end
    if (rst_n && out_valid && sym_out < SYMBOLS) begin
      if (nout == 0) begin
        checks++;
        if (!amb[sym_out] && index !== exp_w[sym_out]) begin
          failures++;
          $display("symbol %0d: index %b, expected %b", sym_out, index, exp_w[sym_out]);
        end
        if (amb[sym_out]) n_ambiguous++;
      end
      begin
        real er, ei;
        int dr, di;
        er = 0.0; ei = 0.0;
        for (int q = 0; q < Q; q++) begin
          er += (index[q] ? -1.0 : 1.0) * yr[sym_out][q][nout];
          ei += (index[q] ? -1.0 : 1.0) * yi[sym_out][q][nout];
        end
        dr = int'(out_re) - $rtoi(er);
        di = int'(out_im) - $rtoi(ei);
        checks++;
        if (dr > TOL_LSB || -dr > TOL_LSB || di > TOL_LSB || -di > TOL_LSB) begin
          failures++;
          if (failures < 10) $display("symbol %0d sample %0d: %0d %0d, expected %f %f", sym_out, nout, out_re, out_im, er, ei);
        end
      end
      checks++;
      if (out_last !== (nout == N - 1)) failures++;
      nout++;
      if (nout == N) begin
        checks++;
        if (nrep != Q + 1) begin
          failures++;
          $display("symbol %0d: %0d PAPR reports", sym_out, nrep);
        end
        n_rejected += Q - kept_sym;
        kept_sym = 0;
        nrep = 0;
        nout = 0;
        sym_out++;
        n_symbols_out++;
        if (sym_out == SYMBOLS) begin
          $display("input stall cycles %0d, flips kept %0d, flips rejected %0d, symbols out %0d, ambiguous %0d",
                   n_stall, n_kept, n_rejected, n_symbols_out, n_ambiguous);
          checks += 4;
          if (n_stall == 0)   begin failures++; $display("input never stalled"); end
          if (n_kept == 0)    begin failures++; $display("no flip kept"); end
          if (n_rejected == 0) begin failures++; $display("no flip rejected"); end
          if (n_symbols_out != SYMBOLS) failures++;
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
