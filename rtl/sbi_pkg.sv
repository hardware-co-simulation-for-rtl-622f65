// Shared types and constants of the SBI-PTS PAPR reducer.
//
// Samples travel as complex fixed-point pairs. The frequency-domain input,
// the IFFT outputs and the interleaved subblocks are Fix_16_15 (16-bit two's
// complement, 15 fraction bits). The combined signal after the +-1 phase
// weighting is Fix_20_15, which leaves room for the sum of four subblocks.
// The phase weights are Fix_2_0 (+1 or -1). These formats are the ones
// printed on the block diagrams of the published design; the PAPR result format
// (unsigned, 8 integer and 8 fraction bits, in dB) is this design's own.
package sbi_pkg;

  localparam int DW  = 16;   // Fix_16_15 sample width
  localparam int DF  = 15;   // fraction bits of the samples
  localparam int XW  = 20;   // Fix_20_15 combined sample width
  localparam int PHW = 2;    // Fix_2_0 phase weight width
  localparam int DBW = 16;   // PAPR in dB, UQ8.8
  localparam int DBF = 8;    // fraction bits of the dB result

  typedef logic signed [DW-1:0]  sample_t;
  typedef logic signed [XW-1:0]  xsample_t;
  typedef logic signed [PHW-1:0] weight_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    xsample_t re;
    xsample_t im;
  } xcplx_t;

endpackage
