// N-point inverse FFT of one subblock, scaled by 1/N.
//
// The published design uses one streaming IFFT core per subblock, configured for the
// inverse direction with the scaling schedule 107 (binary 01 10 10 11): four
// radix-4 stages whose right shifts, first stage in the low bits, are
// 3, 2, 2 and 1, eight bits in all, so the output is (1/N) * sum_k X_k
// e^(+j 2 pi k n / N). The core itself is not described, so this module is
// this design's own implementation of that function: an in-place radix-2
// decimation-in-time IFFT on a register array.
//
//   LOAD    accepts N samples (s_valid/s_ready) and stores sample k at the
//           bit-reversed address of k.
//   COMPUTE runs log2(N) stages of N/2 butterflies, one butterfly per cycle.
//           Radix-2 stages 2i and 2i+1 together shift right by field i of
//           SCALE_SCH (the even stage takes the larger half), so the scaling
//           matches the radix-4 schedule of the published design.
//   UNLOAD  presents the N results in natural order (m_valid/m_ready) with
//           m_last on the last one, saturated to Fix_16_15.
//
// Timing: N cycles to load, (N/2)*log2(N) cycles to compute, N cycles to
// unload; s_ready is low outside LOAD. Twiddles are cos/sin of 2*pi*k/N in
// TWW-bit signed format with TWW-2 fraction bits, computed at elaboration.
// Internal samples are IW bits wide with DF fraction bits; shifts truncate.
// N must be a power of two.
module ifft
  import sbi_pkg::*;
#(
  parameter int          N         = 256,
  parameter logic [15:0] SCALE_SCH = 16'd107,
  parameter int          IW        = 18,
  parameter int          TWW       = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  output logic  s_ready,
  input  cplx_t s_s,
  output logic  m_valid,
  input  logic  m_ready,
  output cplx_t m_s,
  output logic  m_last
);
  localparam int AW  = $clog2(N);
  localparam int BW  = (AW > 1) ? AW - 1 : 1;   // butterfly index width
  localparam int SW  = (AW > 1) ? $clog2(AW) : 1;  // stage index width
  localparam int TWF = TWW - 2;

  typedef logic signed [IW-1:0]  ival_t;
  typedef logic signed [TWW-1:0] tw_t;
  typedef struct packed { ival_t re; ival_t im; } icplx_t;
  typedef logic signed [IW+TWW:0] prod_t;
  typedef logic signed [IW+1:0]   bsum_t;

  // ---------------------------------------------------------------- twiddles
  function automatic tw_t tw_round(real v);
    real s;
    s = v * (2.0 ** TWF);
    return tw_t'($rtoi(s + ((s >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic tw_t [N/2-1:0] tw_table(bit want_sin);
    tw_t [N/2-1:0] t;
    for (int k = 0; k < N / 2; k++) begin
      real ang;
      ang = 2.0 * 3.14159265358979323846 * k / N;
      t[k] = want_sin ? tw_round($sin(ang)) : tw_round($cos(ang));
    end
    return t;
  endfunction

  localparam tw_t [N/2-1:0] TW_COS = tw_table(1'b0);
  localparam tw_t [N/2-1:0] TW_SIN = tw_table(1'b1);

  // Right shift applied by radix-2 stage s.
  function automatic int stage_shift(int s);
    int f;
    f = (int'(SCALE_SCH) >> (2 * (s / 2))) & 3;
    if ((s % 2) == 0 && s == AW - 1) return f;       // lone last stage
    return ((s % 2) == 0) ? (f + 1) / 2 : f / 2;
  endfunction

  function automatic logic [AW-1:0] bitrev(logic [AW-1:0] a);
    for (int i = 0; i < AW; i++) bitrev[i] = a[AW-1-i];
  endfunction

  function automatic sample_t sat16(ival_t v);
    if (v > ival_t'(2 ** (DW - 1) - 1)) return sample_t'(2 ** (DW - 1) - 1);
    if (v < -ival_t'(2 ** (DW - 1)))    return sample_t'(-(2 ** (DW - 1)));
    return sample_t'(v);
  endfunction

  // ------------------------------------------------------------------- state
  typedef enum logic [1:0] {LOAD, COMPUTE, UNLOAD} state_t;
  state_t        state;
  logic [AW-1:0] cnt;
  logic [BW-1:0] bfly;
  logic [SW-1:0] stage;
  icplx_t        mem [N];

  // Butterfly addressing of the current stage.
  logic [AW-1:0] i0, i1, half_mask;
  logic [BW-1:0] tw_idx;
  always_comb begin
    half_mask = AW'((1 << stage) - 1);
    i0 = ((AW'(bfly) & ~half_mask) << 1) | (AW'(bfly) & half_mask);
    i1 = i0 | AW'(1 << stage);
    tw_idx = BW'((AW'(bfly) & half_mask) << (AW - 1 - int'(stage)));
  end

  // Butterfly datapath: y0 = (a + W b) >> sh, y1 = (a - W b) >> sh.
  icplx_t a, b, y0, y1;
  always_comb begin
    prod_t pr, pi;
    bsum_t s0r, s0i, s1r, s1i;
    tw_t   wr, wi;
    int    sh;
    a  = mem[i0];
    b  = mem[i1];
    wr = TW_COS[tw_idx];
    wi = TW_SIN[tw_idx];
    pr = (prod_t'(b.re) * prod_t'(wr) - prod_t'(b.im) * prod_t'(wi)) >>> TWF;
    pi = (prod_t'(b.re) * prod_t'(wi) + prod_t'(b.im) * prod_t'(wr)) >>> TWF;
    s0r = bsum_t'(a.re) + bsum_t'(pr);
    s0i = bsum_t'(a.im) + bsum_t'(pi);
    s1r = bsum_t'(a.re) - bsum_t'(pr);
    s1i = bsum_t'(a.im) - bsum_t'(pi);
    sh  = stage_shift(int'(stage));
    y0.re = ival_t'(s0r >>> sh);
    y0.im = ival_t'(s0i >>> sh);
    y1.re = ival_t'(s1r >>> sh);
    y1.im = ival_t'(s1i >>> sh);
  end

  assign s_ready = (state == LOAD);
  assign m_valid = (state == UNLOAD);
  assign m_last  = (state == UNLOAD) && (cnt == AW'(N - 1));
  assign m_s.re  = sat16(mem[cnt].re);
  assign m_s.im  = sat16(mem[cnt].im);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= LOAD;
      cnt   <= '0;
      bfly  <= '0;
      stage <= '0;
    end else begin
      unique case (state)
        LOAD: if (s_valid) begin
          mem[bitrev(cnt)] <= '{re: ival_t'(s_s.re), im: ival_t'(s_s.im)};
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            state <= COMPUTE;
            bfly  <= '0;
            stage <= '0;
          end
        end
        COMPUTE: begin
          mem[i0] <= y0;
          mem[i1] <= y1;
          bfly    <= bfly + 1'b1;
          if (bfly == BW'(N / 2 - 1)) begin
            stage <= stage + 1'b1;
            if (stage == SW'(AW - 1)) begin
              state <= UNLOAD;
              cnt   <= '0;
            end
          end
        end
        UNLOAD: if (m_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) state <= LOAD;
        end
        default: state <= LOAD;
      endcase
    end
  end

endmodule
