// Phase sequence generation: maps Q phase selector bits to Q weights.
//
// Each of the Q two-input multiplexers selects the constant +1 when its
// selector w_q is 0 and the constant -1 when it is 1, so the selector pattern
// 0000 gives the weights (+1, +1, +1, +1). The weights are Fix_2_0 signed
// values, as in the published design. Purely combinational.
//
// Interface: phase_in[q] is w_(q+1); phase_out[q] is the matching weight.
module phase_sequence_gen
  import sbi_pkg::*;
#(
  parameter int Q = 4
) (
  input  logic [Q-1:0] phase_in,
  output weight_t      phase_out [Q]
);
  localparam weight_t PLUS_ONE  = 2'sd1;
  localparam weight_t MINUS_ONE = -2'sd1;

  always_comb begin
    for (int q = 0; q < Q; q++)
      phase_out[q] = phase_in[q] ? MINUS_ONE : PLUS_ONE;
  end

endmodule
