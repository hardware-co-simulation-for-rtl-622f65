// PAPR calculation over one N-sample symbol: PAPR_dB = 10*log10(max|x|^2 /
// mean|x|^2).
//
// Following the published design, each Fix_20_15 input sample is squared part by part
// and the two squares are added to give the instantaneous power, kept with
// 20 fraction bits (the published design prints Fix_22_20; the integer part is widened
// here so that no sum of four subblocks can overflow it). An accumulator sums
// the N powers and a right shift by log2(N) turns the sum into the mean. A
// greater-than comparison and a multiplexer hold the running maximum. The
// start input clears both, as the published design's reset input clears the
// accumulator and forces the maximum path to zero.
//
// The published design then divides, takes the natural logarithm, divides by ln(10)
// and multiplies by 10, in floating point. This implementation computes the
// same value in fixed point, which is its own choice:
//   DIV  a restoring divider forms ratio = max / mean with RF = 16 fraction
//        bits, one quotient bit per cycle;
//   NORM a leading-one search gives the integer part of log2(ratio) and a
//        mantissa in [1, 2);
//   LOG  LF = 12 fraction bits of log2 are found by repeated squaring of the
//        mantissa, one bit per cycle;
//   the result is log2(ratio) * 10*log10(2), rounded to UQ8.8 dB.
// A ratio below one gives 0 dB; a zero mean, or a ratio too large for the
// quotient, gives the largest value log2 can hold.
//
// Interface: start (one cycle) arms the block for a new symbol; in_valid
// marks each of the N samples; done pulses for one cycle when papr_db is
// valid, about PW + RF + LF + 4 cycles after the last sample. papr_db holds
// its value until the next result.
module papr_calc
  import sbi_pkg::*;
#(
  parameter int N = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               in_valid,
  input  xcplx_t             in_s,
  output logic               done,
  output logic [DBW-1:0]     papr_db
);
  localparam int AW  = $clog2(N);
  localparam int PF  = 20;                   // fraction bits of the power
  localparam int DROP = 2 * DF - PF;       // product fraction 30 -> 20
  localparam int PW  = 2 * XW - DROP + 1;    // unsigned power width
  localparam int RF  = 16;                   // fraction bits of the ratio
  localparam int DVW = PW + RF;              // dividend width
  localparam int QW  = AW + 2 + RF;          // kept quotient width
  localparam int LF  = 12;                   // fraction bits of log2
  localparam int LIW = $clog2(AW + 2) + 1;   // integer bits of log2
  localparam int KF  = 16;
  localparam logic [17:0] K_DB = 18'd197283; // 10*log10(2) * 2^16

  typedef logic [PW-1:0] pow_t;

  typedef enum logic [2:0] {ACC, DIV, NORM, LOG, FINISH, IDLE} state_t;
  state_t state;

  logic [AW:0]      cnt;
  logic [PW+AW-1:0] acc;
  pow_t             pmax, avg;
  pow_t             pow_in;
  logic [DVW-1:0]   dividend;
  logic [PW:0]      rem;
  logic [$clog2(DVW+1)-1:0] dbit;
  logic [QW-1:0]    quo;
  logic             qovf;                    // quotient exceeded QW bits
  logic [RF+1:0]    mant;                    // UQ2.RF, normalised to [1,2)
  logic [LIW-1:0]   lint;
  logic [LF-1:0]    lfrac;
  logic [$clog2(LF+1)-1:0] lbit;

  // Instantaneous power |x|^2 with PF fraction bits.
  always_comb begin
    logic signed [2*XW-1:0] sr, si;
    sr = in_s.re * in_s.re;
    si = in_s.im * in_s.im;
    pow_in = pow_t'(sr >> DROP) + pow_t'(si >> DROP);
  end

  // Position of the leading one of the quotient.
  logic [$clog2(QW)-1:0] lead;
  always_comb begin
    lead = '0;
    for (int i = 0; i < QW; i++)
      if (quo[i]) lead = ($clog2(QW))'(i);
  end

  // One restoring-division step.
  logic [PW:0] rem_sh;
  assign rem_sh = {rem[PW-1:0], dividend[DVW-1]};

  // One squaring step of the mantissa.
  logic [2*(RF+2)-1:0] msq;
  assign msq = mant * mant;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      done    <= 1'b0;
      papr_db <= '0;
      cnt     <= '0;
      acc     <= '0;
      pmax    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state <= ACC;
        cnt   <= '0;
        acc   <= '0;
        pmax  <= '0;
      end else begin
        unique case (state)
          IDLE: ;
          ACC: if (in_valid) begin
            acc <= acc + (PW+AW)'(pow_in);
            if (pow_in > pmax) pmax <= pow_in;
            cnt <= cnt + 1'b1;
            if (cnt == (AW+1)'(N - 1)) begin
              state <= DIV;
              // mean = (sum + this sample) >> log2(N)
              avg      <= pow_t'((acc + (PW+AW)'(pow_in)) >> AW);
              dividend <= DVW'((pow_in > pmax) ? pow_in : pmax) << RF;
              rem      <= '0;
              quo      <= '0;
              dbit     <= '0;
              qovf     <= 1'b0;
            end
          end
          DIV: begin
            if (rem_sh >= {1'b0, avg}) begin
              rem <= rem_sh - {1'b0, avg};
              quo <= {quo[QW-2:0], 1'b1};
            end else begin
              rem <= rem_sh;
              quo <= {quo[QW-2:0], 1'b0};
            end
            if (quo[QW-1]) qovf <= 1'b1;
            dividend <= dividend << 1;
            dbit     <= dbit + 1'b1;
            if (dbit == ($clog2(DVW+1))'(DVW - 1)) state <= NORM;
          end
          NORM: begin
            lfrac <= '0;
            lbit  <= '0;
            if (avg == '0 || qovf) begin
              // ratio beyond the quotient range: report the largest value
              lint  <= '1;
              lfrac <= '1;
              mant  <= (RF+2)'(1) << RF;
              state <= FINISH;
            end else if (int'(lead) < RF) begin
              // zero mean or ratio below one: report 0 dB
              lint  <= '0;
              mant  <= (RF+2)'(1) << RF;
              state <= FINISH;
            end else begin
              lint  <= LIW'(int'(lead) - RF);
              mant  <= (RF+2)'(quo >> (int'(lead) - RF));
              state <= LOG;
            end
          end
          LOG: begin
            if (msq[2*RF+1]) begin                // square >= 2
              mant  <= (RF+2)'(msq >> (RF + 1));
              lfrac <= {lfrac[LF-2:0], 1'b1};
            end else begin
              mant  <= (RF+2)'(msq >> RF);
              lfrac <= {lfrac[LF-2:0], 1'b0};
            end
            lbit <= lbit + 1'b1;
            if (lbit == ($clog2(LF+1))'(LF - 1)) state <= FINISH;
          end
          FINISH: begin
            logic [LIW+LF+18-1:0] prod;
            prod    = {lint, lfrac} * K_DB;
            papr_db <= DBW'((prod + (1 << (LF + KF - DBF - 1))) >> (LF + KF - DBF));
            done    <= 1'b1;
            state   <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

endmodule
