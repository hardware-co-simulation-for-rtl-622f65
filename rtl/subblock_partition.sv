// Subblock partition of an N-point frequency-domain OFDM symbol into Q
// contiguous subblocks, each zero-padded to length L*N.
//
// A sample counter runs over the L*N output beats of a symbol. For every
// subblock q a pair of range comparisons (count >= q*N/Q and count <
// (q+1)*N/Q) yields an enable bit, and the input sample is gated by that bit
// onto output q; every other output carries zero in that beat. With the
// default N = 256 and Q = 4 the ranges are 0-63, 64-127, 128-191 and 192-255,
// so at count 83 the sample goes to the second subblock. For an oversampling
// factor L > 1 the counter continues past N for (L-1)*N more beats that take
// no input and put zero on every output, so the IFFTs behind see L*N
// points: the symbol's N points followed by zeros.
//
// The range compare and gating structure, the sizes and the zero padding to
// L*N follow the published design (whose hardware uses L = 1, the default
// here). Placing the padding zeros after the N points, the ready/valid
// handshake and the last-beat flag are this design's own choices.
//
// Interface: in_valid/in_ready carry one complex Fix_16_15 sample per beat;
// out_valid/out_ready carry Q samples per beat; out_last marks beat L*N-1.
// The block is combinational from input to output (zero latency). While the
// N input points are taken in_ready = out_ready; during the padding beats
// in_ready is low and out_valid is high.
module subblock_partition
  import sbi_pkg::*;
#(
  parameter int N = 256,
  parameter int Q = 4,
  parameter int L = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_s,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_s [Q],
  output logic  out_last
);
  localparam int NF = L * N;
  localparam int AW = $clog2(NF);
  localparam int P  = N / Q;

  logic [AW-1:0] cnt;
  logic          padding;

  assign padding   = ({1'b0, cnt} >= (AW+1)'(N));
  assign in_ready  = out_ready && !padding;
  assign out_valid = in_valid || padding;
  assign out_last  = (cnt == AW'(NF - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)                       cnt <= '0;
    else if (out_valid && out_ready)  cnt <= cnt + 1'b1;   // wraps at L*N
  end

  always_comb begin
    for (int q = 0; q < Q; q++) begin
      logic en;
      en = ({1'b0, cnt} >= (AW+1)'(q * P)) && ({1'b0, cnt} < (AW+1)'((q + 1) * P));
      out_s[q] = en ? in_s : '0;
    end
  end

endmodule
