// Self-checking test of ifft at N = 256 with the scaling schedule 107.
// Three symbols: random full-scale subcarriers, a single tone and a
// zero-padded subblock (only 64 nonzero subcarriers, as after partition).
// Each output is compared with x[n] = (1/N) sum_k X[k] e^(+j 2 pi k n / N)
// computed here in floating point; the error must stay within TOL LSBs.
// Output back-pressure is random. The cycle count from the last input beat
// to the first output beat must be the N/2 * log2(N) compute cycles.
module tb_ifft;
  import sbi_pkg::*;
  localparam int N = 256;
  localparam int TOL = 12;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready, m_last;
  cplx_t s_s, m_s;
  int checks = 0, failures = 0;

  ifft #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [N], xi [N];
  int max_err = 0;

  task automatic run_symbol(int kind);
    longint t_last_in, t_first_out, cyc;
    int n;
    for (int k = 0; k < N; k++) begin
      case (kind)
        0: begin xr[k] = int'($signed(16'($urandom))); xi[k] = int'($signed(16'($urandom))); end
        1: begin xr[k] = (k == 5) ? 32767 : 0; xi[k] = 0; end
        default: begin
          xr[k] = (k >= 64 && k < 128) ? (($urandom_range(0,1) ? 23170 : -23170)) : 0;
          xi[k] = (k >= 64 && k < 128) ? (($urandom_range(0,1) ? 23170 : -23170)) : 0;
        end
      endcase
    end
    // load
    cyc = 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      s_valid = 1; s_s.re = sample_t'(xr[k]); s_s.im = sample_t'(xi[k]);
      while (!s_ready) @(negedge clk);
      @(posedge clk);
    end
    t_last_in = $time;
    @(negedge clk); s_valid = 0;
    // unload
    n = 0;
    t_first_out = -1;
    while (n < N) begin
      @(negedge clk);
      m_ready = ($urandom_range(0, 3) != 0);
      if (m_valid && t_first_out < 0) t_first_out = $time;
      if (m_valid && m_ready) begin
        real er, ei;
        int dr, di;
        er = 0.0; ei = 0.0;
        for (int k = 0; k < N; k++) begin
          er += xr[k] * $cos(2.0*PI*k*n/N) - xi[k] * $sin(2.0*PI*k*n/N);
          ei += xr[k] * $sin(2.0*PI*k*n/N) + xi[k] * $cos(2.0*PI*k*n/N);
        end
        er = er / N; ei = ei / N;
        dr = int'(m_s.re) - $rtoi(er);
        di = int'(m_s.im) - $rtoi(ei);
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > max_err) max_err = dr;
        if (di > max_err) max_err = di;
        checks++;
        if (dr > TOL || di > TOL) begin
          failures++;
          if (failures < 10) $display("kind %0d n %0d: got %0d %0d expected %f %f", kind, n, m_s.re, m_s.im, er, ei);
        end
        checks++;
        if (m_last !== (n == N - 1)) failures++;
        n++;
      end
      @(posedge clk);
    end
    @(negedge clk);
    m_ready = 0;
    // compute time: (t_first_out - t_last_in)/10 cycles, minus the negedge offset
    cyc = (t_first_out - t_last_in - 5) / 10;
    checks++;
    if (cyc != (N / 2) * $clog2(N)) begin
      failures++;
      $display("compute latency %0d cycles, expected %0d", cyc, (N / 2) * $clog2(N));
    end
  endtask

  initial begin
    s_valid = 0; m_ready = 0; s_s = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_symbol(0);
    run_symbol(1);
    run_symbol(2);
    $display("largest error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
