// Self-checking test of optimisation_block: random Fix_16_15 samples
// (including the extreme values) and random +-1 weights; the Fix_20_15
// outputs must equal sum_q w_q * x_q computed with integers.
module tb_optimisation_block;
  import sbi_pkg::*;
  localparam int Q = 4;
  cplx_t   x_s [Q];
  weight_t phase [Q];
  xcplx_t  y;
  int checks = 0, failures = 0;

  optimisation_block #(.Q(Q)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int er, ei;
      er = 0; ei = 0;
      for (int q = 0; q < Q; q++) begin
        int w;
        w = $urandom_range(0, 1) ? -1 : 1;
        phase[q] = weight_t'(w);
        if (n < 4) begin
          x_s[q].re = (n[0]) ? 16'sh8000 : 16'sh7fff;
          x_s[q].im = (n[1]) ? 16'sh8000 : 16'sh7fff;
        end else begin
          x_s[q].re = sample_t'($urandom);
          x_s[q].im = sample_t'($urandom);
        end
        er += w * int'(x_s[q].re);
        ei += w * int'(x_s[q].im);
      end
      #1;
      checks += 2;
      if (int'(y.re) != er) failures++;
      if (int'(y.im) != ei) failures++;
      if (int'(y.re) != er || int'(y.im) != ei)
        $display("vector %0d: got %0d %0d expected %0d %0d", n, y.re, y.im, er, ei);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
