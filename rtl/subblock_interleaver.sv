// Subblock interleaver, applied in the time domain between the IFFTs and
// the phase optimisation.
//
// Function (follows the published design): take the Q x N matrix whose row q
// is subblock q, read it column by column (sample 0 of every subblock, then
// sample 1, ...), write that sequence column by column into a matrix of
// R = Q*B rows and C = N/B columns, transpose it, read the transposed matrix
// column by column and fill a new Q x N matrix column by column. Row m of
// the new matrix is interleaved output m. Sample k of subblock q lands in
// row m = floor(k/B) mod Q at position
//   j = ((k mod B)*Q + q) * (C/Q) + floor(k/B)/Q        (needs C mod Q = 0).
// With N = 256, Q = 4 and B = 8, row 1 draws on samples 0-7, 32-39, ... of
// all four subblocks, row 2 on samples 8-15, 40-47, ... B = 8 is taken from
// those groups of eight.
//
// Structure (follows the published block diagram): subblock q is delayed by
// B*q beats (0, 8, 16, 24 at the defaults), so that in every write step the
// Q delayed streams belong to Q different rows. Q multiplexers, one per row
// m, pick subblock (floor(tau/B) - m) mod Q in step tau; a counter-driven
// address computation places the picked sample at position j of memory bank
// m. Each bank therefore takes one write per step. After N + B*(Q-1) steps
// (the last B*(Q-1) of them flush the delay lines without input) the symbol
// is complete: full rises and writes are refused until release (which is
// ignored while full is low). Each bank is
// then read in natural order: rd_s[m] is row m, position rd_addr, one cycle
// after the address, and zero when rd_en was low (the output multiplexer
// against the constant 0).
//
// This design's own choices: the ready/valid write handshake, the
// full/release protocol that lets the reader walk the stored symbol several
// times, and carrying real and imaginary parts together.
//
// N, Q and B must be powers of two with (N/B) mod Q = 0.
module subblock_interleaver
  import sbi_pkg::*;
#(
  parameter int N = 256,
  parameter int Q = 4,
  parameter int B = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_valid,
  output logic                 s_ready,
  input  cplx_t                s_s [Q],
  output logic                 full,
  input  logic                 release_i,
  input  logic                 rd_en,
  input  logic [$clog2(N)-1:0] rd_addr,
  output cplx_t                rd_s [Q]
);
  localparam int AW    = $clog2(N);
  localparam int QW    = (Q > 1) ? $clog2(Q) : 1;
  localparam int BL    = $clog2(B);
  localparam int C     = N / B;
  localparam int CQL   = $clog2(C / Q);            // log2(C/Q)
  localparam int DMAX  = B * (Q - 1);              // longest delay
  localparam int STEPS = N + DMAX;
  localparam int TAUW  = $clog2(STEPS + 1);

  if ((C % Q) != 0 || (1 << AW) != N || (1 << BL) != B) begin : g_bad_size
    $error("subblock_interleaver: N, B must be powers of two and (N/B) mod Q = 0");
  end

  cplx_t           bank [Q][N];
  cplx_t           hist [DMAX + 1][Q];            // hist[d][q]: beat delayed by d
  logic [TAUW-1:0] tau;
  logic            tick, filling;

  assign filling = (tau < TAUW'(N));
  assign s_ready = !full && filling;
  assign tick    = !full && (filling ? s_valid : (tau < TAUW'(STEPS)));

  // Delayed stream of subblock q in the current step.
  function automatic cplx_t delayed(int q);
    return (q == 0) ? s_s[0] : hist[B * q][q];
  endfunction

  // Position of sample k of subblock q within its row.
  function automatic logic [AW-1:0] position(logic [AW-1:0] k, int q);
    logic [AW-1:0] lo, hi;
    lo = (k & AW'(B - 1));                          // k mod B
    hi = (k >> BL) >> QW;                           // floor(k/B)/Q
    return ((((lo << QW) | AW'(q)) << CQL) | hi);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tau  <= '0;
      full <= 1'b0;
    end else begin
      if (tick) begin
        // delay lines
        hist[1] <= s_s;
        for (int d = 2; d <= DMAX; d++) hist[d] <= hist[d - 1];
        // first-round multiplexers and bank writes
        for (int m = 0; m < Q; m++) begin
          int              qs;
          logic [TAUW-1:0] grp, kk;
          grp = (tau >> BL) - TAUW'(m);
          qs  = int'(grp) & (Q - 1);
          kk = tau - TAUW'(B * qs);
          if (tau >= TAUW'(B * qs) && kk < TAUW'(N))
            bank[m][position(AW'(kk), qs)] <= delayed(qs);
        end
        tau <= tau + 1'b1;
        if (tau == TAUW'(STEPS - 1)) full <= 1'b1;
      end
      if (release_i && full) begin
        full <= 1'b0;
        tau  <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < Q; m++)
      rd_s[m] <= rd_en ? bank[m][rd_addr] : '0;
  end

endmodule
