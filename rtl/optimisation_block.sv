// Optimisation block: applies the +-1 phase weights to the Q interleaved
// subblock samples and sums them, x~ = sum_q (-1)^w_q * x_q.
//
// The real and imaginary parts of each sample (Fix_16_15) are multiplied by
// the Fix_2_0 weight, giving Fix_18_15 products. A two-level adder tree adds
// them pairwise (Fix_19_15) and then adds the two pair sums (Fix_20_15), one
// tree for the real part and one for the imaginary part. These formats and
// the two-level tree are the published design's. The tree is written for Q = 4, the
// published subblock count; other values of Q are rejected at elaboration.
// Purely combinational.
module optimisation_block
  import sbi_pkg::*;
#(
  parameter int Q = 4
) (
  input  cplx_t   x_s   [Q],
  input  weight_t phase [Q],
  output xcplx_t  y
);
  typedef logic signed [DW+1:0] prod_t;   // Fix_18_15
  typedef logic signed [DW+2:0] sum1_t;   // Fix_19_15

  prod_t p_re [Q];
  prod_t p_im [Q];
  sum1_t s_re [2];
  sum1_t s_im [2];

  if (Q != 4) begin : g_bad_q
    $error("optimisation_block: the adder tree is built for Q = 4");
  end

  always_comb begin
    for (int q = 0; q < Q; q++) begin
      p_re[q] = prod_t'(x_s[q].re * phase[q]);
      p_im[q] = prod_t'(x_s[q].im * phase[q]);
    end
    s_re[0] = sum1_t'(p_re[0]) + sum1_t'(p_re[1]);
    s_re[1] = sum1_t'(p_re[2]) + sum1_t'(p_re[3]);
    s_im[0] = sum1_t'(p_im[0]) + sum1_t'(p_im[1]);
    s_im[1] = sum1_t'(p_im[2]) + sum1_t'(p_im[3]);
    y.re    = xsample_t'(s_re[0]) + xsample_t'(s_re[1]);
    y.im    = xsample_t'(s_im[0]) + xsample_t'(s_im[1]);
  end

endmodule
