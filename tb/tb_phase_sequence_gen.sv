// Self-checking test of phase_sequence_gen: every selector pattern of Q = 4
// bits must give +1 for a 0 bit and -1 for a 1 bit (pattern 0000 -> 1111).
module tb_phase_sequence_gen;
  import sbi_pkg::*;
  localparam int Q = 4;
  logic [Q-1:0] phase_in;
  weight_t phase_out [Q];
  int checks = 0, failures = 0;

  phase_sequence_gen #(.Q(Q)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < (1 << Q); p++) begin
      phase_in = Q'(p);
      #1;
      for (int q = 0; q < Q; q++) begin
        int exp_w;
        exp_w = ((p >> q) & 1) ? -1 : 1;
        checks++;
        if (int'(phase_out[q]) != exp_w) begin
          failures++;
          $display("pattern %b bit %0d: got %0d", phase_in, q, phase_out[q]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
