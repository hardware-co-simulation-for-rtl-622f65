// SBI-PTS peak-to-average power ratio (PAPR) reducer for OFDM.
//
// A frequency-domain OFDM symbol of N subcarriers enters one complex sample
// per beat. The subblock partition splits it into Q contiguous subblocks,
// each zero-padded to L*N points (L is the oversampling factor). Q inverse
// FFTs take every subblock to the time domain. The subblock interleaver
// mixes the Q time-domain subblocks into Q interleaved rows. The phase optimiser then tries Q + 1 phase sequences
// w in {0,1}^Q greedily. For each one it weights row q by (-1)^w_q, adds the
// rows and measures the PAPR of the sum. Finally it streams out the sum
// with the lowest PAPR together with the chosen w (index).
//
// The chain of blocks, their sizes (N = 256, Q = 4, L = 1 in hardware) and
// the sample formats follow the published design; the handshakes, the
// one-symbol-at-a-time sequencing, B = 8 and the placing of the padding
// zeros are this design's own choices (see each block). The IFFT scaling
// schedule stays 1/256 for every size, so with L > 1 output sample L*n
// equals sample n of the L = 1 output.
//
// Ports: in_valid/in_ready/in_re/in_im carry the Fix_16_15 input; the
// output stream out_valid/out_re/out_im/out_last is Fix_20_15 and cannot be
// stalled; index holds the chosen sequence (bit q = w_(q+1)); papr_valid/
// papr_db report every candidate's PAPR in UQ8.8 dB; flip_kept pulses when a
// flipped phase bit was kept. in_ready is low while the IFFTs compute or
// while the interleaver still holds the previous symbol. With L > 1 every
// stage after the partition works on L*N points, and L*N output samples
// leave per symbol.
module sbi_pts_top
  import sbi_pkg::*;
#(
  parameter int N = 256,
  parameter int Q = 4,
  parameter int B = 8,
  parameter int L = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [XW-1:0] out_re,
  output logic signed [XW-1:0] out_im,
  output logic                 out_last,
  output logic [Q-1:0]         index,
  output logic                 papr_valid,
  output logic [DBW-1:0]       papr_db,
  output logic                 flip_kept
);
  localparam int NF = L * N;            // points per subblock after padding
  localparam int AW = $clog2(NF);

  cplx_t  part_s [Q];
  logic   part_valid, part_ready, part_last;
  logic [Q-1:0] ifft_s_ready, ifft_m_valid, ifft_m_last;
  cplx_t  ifft_s [Q];
  logic   il_ready, il_full, il_release;
  cplx_t  il_rd_s [Q];
  logic [AW-1:0] il_rd_addr;
  logic          il_rd_en;
  xcplx_t opt_s;

  subblock_partition #(.N(N), .Q(Q), .L(L)) u_partition (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_s     ('{re: in_re, im: in_im}),
    .out_valid(part_valid),
    .out_ready(part_ready),
    .out_s    (part_s),
    .out_last (part_last)
  );

  // The Q IFFTs see the same handshakes and therefore run in lockstep.
  assign part_ready = &ifft_s_ready;

  for (genvar q = 0; q < Q; q++) begin : g_ifft
    ifft #(.N(NF)) u_ifft (
      .clk    (clk),
      .rst_n  (rst_n),
      .s_valid(part_valid && part_ready),
      .s_ready(ifft_s_ready[q]),
      .s_s    (part_s[q]),
      .m_valid(ifft_m_valid[q]),
      .m_ready(il_ready && (&ifft_m_valid)),
      .m_s    (ifft_s[q]),
      .m_last (ifft_m_last[q])
    );
  end

  subblock_interleaver #(.N(NF), .Q(Q), .B(B)) u_interleaver (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_valid  (&ifft_m_valid),
    .s_ready  (il_ready),
    .s_s      (ifft_s),
    .full     (il_full),
    .release_i(il_release),
    .rd_en    (il_rd_en),
    .rd_addr  (il_rd_addr),
    .rd_s     (il_rd_s)
  );

  phase_optimizer #(.N(NF), .Q(Q)) u_optimizer (
    .clk       (clk),
    .rst_n     (rst_n),
    .full      (il_full),
    .release_o (il_release),
    .rd_en     (il_rd_en),
    .rd_addr   (il_rd_addr),
    .rd_s      (il_rd_s),
    .out_valid (out_valid),
    .out_s     (opt_s),
    .out_last  (out_last),
    .index     (index),
    .papr_valid(papr_valid),
    .papr_db   (papr_db),
    .flip_kept (flip_kept)
  );

  assign out_re = opt_s.re;
  assign out_im = opt_s.im;

  // The Q IFFTs must stay in step.
  a_ifft_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (ifft_m_valid == '0) || (ifft_m_valid == '1));

endmodule
