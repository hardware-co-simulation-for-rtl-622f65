// Self-checking test of phase_optimizer at N = 256, Q = 4.
// The testbench plays the subblock interleaver: it holds Q rows of random
// Fix_16_15 samples, answers each read position one cycle later, raises
// full and drops it on release. For each symbol the greedy search is
// repeated here in floating point (PAPR of w = 0000, then of the best
// sequence with w_1, w_2, ... flipped, a flip kept only if it lowers the
// PAPR). Checked: every reported candidate PAPR (within TOL_DB), the chosen
// index (skipped when a decision is closer than the tolerance), each output
// sample against sum_q (-1)^w_q x_q for the chosen w, out_last, Q + 1 PAPR
// reports per symbol, and that both kept and rejected flips happen.
module tb_phase_optimizer;
  import sbi_pkg::*;
  localparam int N = 256, Q = 4;
  localparam real TOL_DB = 0.03;
  localparam int SYMBOLS = 8;

  logic clk = 0, rst_n = 0;
  logic full, release_o, rd_en, out_valid, out_last, papr_valid, flip_kept;
  logic [$clog2(N)-1:0] rd_addr;
  cplx_t rd_s [Q];
  xcplx_t out_s;
  logic [Q-1:0] index;
  logic [DBW-1:0] papr_db;
  int checks = 0, failures = 0;
  int kept = 0, rejected = 0, ambiguous = 0;

  phase_optimizer #(.N(N), .Q(Q)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (SYMBOLS * 2500 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [Q][N], xi [Q][N];

  // interleaver model: registered read
  always_ff @(posedge clk)
    for (int m = 0; m < Q; m++)
      rd_s[m] <= rd_en ? '{re: sample_t'(xr[m][rd_addr]), im: sample_t'(xi[m][rd_addr])} : '{default: '0};

  function automatic real papr_of(logic [Q-1:0] w);
    real pmax, psum;
    pmax = 0.0; psum = 0.0;
    for (int n = 0; n < N; n++) begin
      real re, im, p;
      re = 0.0; im = 0.0;
      for (int q = 0; q < Q; q++) begin
        re += (w[q] ? -1.0 : 1.0) * xr[q][n];
        im += (w[q] ? -1.0 : 1.0) * xi[q][n];
      end
      p = re * re + im * im;
      psum += p;
      if (p > pmax) pmax = p;
    end
    return 10.0 * $log10(pmax / (psum / N));
  endfunction

  real exp_papr [Q+1];
  logic [Q-1:0] exp_w;
  bit amb;

  task automatic reference();
    logic [Q-1:0] best, w;
    real bp, p;
    best = '0;
    amb = 0;
    bp = papr_of(best);
    exp_papr[0] = bp;
    for (int c = 1; c <= Q; c++) begin
      w = best ^ (Q'(1) << (c - 1));
      p = papr_of(w);
      exp_papr[c] = p;
      if (p - bp < TOL_DB && bp - p < TOL_DB) amb = 1;
      if (p < bp) begin best = w; bp = p; end
    end
    exp_w = best;
  endtask

  int nreports;
  always @(posedge clk) begin
    if (rst_n && flip_kept) kept++;
  end

  initial begin
    full = 0;
    for (int q = 0; q < Q; q++) for (int n = 0; n < N; n++) begin xr[q][n] = 0; xi[q][n] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int sym = 0; sym < SYMBOLS; sym++) begin
      int nout, amp, kept_before;
      kept_before = kept;
      amp = 2000 + 500 * sym;
      for (int q = 0; q < Q; q++)
        for (int n = 0; n < N; n++) begin
          xr[q][n] = int'($urandom_range(0, 2 * amp)) - amp;
          xi[q][n] = int'($urandom_range(0, 2 * amp)) - amp;
          if (n == 17 * sym + q) xr[q][n] = 4 * amp;   // a peak per row
        end
      reference();
      if (amb) ambiguous++;
      @(negedge clk);
      full = 1;
      nreports = 0;
      nout = 0;
      while (!release_o) begin
        @(negedge clk);
        if (papr_valid) begin
          real got;
          got = real'(papr_db) / 256.0;
          checks++;
          if (got - exp_papr[nreports] > TOL_DB || exp_papr[nreports] - got > TOL_DB) begin
            failures++;
            $display("symbol %0d candidate %0d: PAPR %f expected %f", sym, nreports, got, exp_papr[nreports]);
          end
          nreports++;
        end
        if (out_valid) begin
          int er, ei;
          er = 0; ei = 0;
          for (int q = 0; q < Q; q++) begin
            er += (index[q] ? -1 : 1) * xr[q][nout];
            ei += (index[q] ? -1 : 1) * xi[q][nout];
          end
          checks++;
          if (int'(out_s.re) != er || int'(out_s.im) != ei) begin
            failures++;
            if (failures < 10) $display("symbol %0d sample %0d wrong", sym, nout);
          end
          checks++;
          if (out_last !== (nout == N - 1)) failures++;
          nout++;
        end
      end
      full = 0;
      checks += 3;
      if (nreports != Q + 1) failures++;
      if (nout != N) failures++;
      if (!amb && index !== exp_w) begin
        failures++;
        $display("symbol %0d: index %b expected %b", sym, index, exp_w);
      end
      rejected += Q - (kept - kept_before);
      repeat (3) @(negedge clk);
    end
    $display("kept flips %0d, rejected flips %0d, ambiguous symbols %0d", kept, rejected, ambiguous);
    checks += 2;
    if (kept == 0) failures++;
    if (rejected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
