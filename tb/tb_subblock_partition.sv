// Self-checking test of subblock_partition, at N = 256, Q = 4 (no
// oversampling) and at N = 64, Q = 4 with oversampling L = 2.
// Sends two symbols of random samples with random gaps and random
// back-pressure to each and checks, for every output beat b of a symbol,
// that for b < N subblock b*Q/N carries the accepted input sample and all
// other subblocks carry zero, that for b >= N no input is taken and every
// subblock carries zero, and that out_last marks beat L*N-1. Ranges at
// N = 256: 0-63, 64-127, 128-191, 192-255.
module tb_subblock_partition;
  import sbi_pkg::*;
  localparam int Q = 4;
  localparam int NS [2] = '{256, 64};
  localparam int LS [2] = '{1, 2};

  logic clk = 0, rst_n = 0;
  logic in_valid [2], in_ready [2], out_valid [2], out_ready [2], out_last [2];
  cplx_t in_s [2];
  cplx_t out0 [Q], out1 [Q];
  int checks = 0, failures = 0;

  subblock_partition #(.N(256), .Q(Q)) dut (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_s(in_s[0]),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_s(out0), .out_last(out_last[0]));
  subblock_partition #(.N(64), .Q(Q), .L(2)) dut_os (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]), .in_s(in_s[1]),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_s(out1), .out_last(out_last[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t out_of(int u, int q);
    return (u == 0) ? out0[q] : out1[q];
  endfunction

  task automatic run(int u);
    int n, nf, b, taken;
    int seen [Q];
    n = NS[u]; nf = LS[u] * n;
    b = 0; taken = 0;
    seen = '{default: 0};
    while (b < 2 * nf) begin
      int bb;
      bb = b % nf;
      @(negedge clk);
      in_valid[u]  = ($urandom_range(0, 3) != 0);
      out_ready[u] = ($urandom_range(0, 4) != 0);
      in_s[u].re   = sample_t'($urandom);
      in_s[u].im   = sample_t'($urandom);
      if (in_s[u].re == 0) in_s[u].re = 1;
      #1;
      checks++;
      if (bb < n) begin
        if (in_ready[u] !== out_ready[u] || out_valid[u] !== in_valid[u]) failures++;
      end else if (in_ready[u] !== 1'b0 || out_valid[u] !== 1'b1) failures++;
      if (out_valid[u] && out_ready[u]) begin
        int exp_q;
        exp_q = (bb < n) ? bb / (n / Q) : -1;
        for (int q = 0; q < Q; q++) begin
          checks++;
          if (q == exp_q) begin
            if (out_of(u, q) !== in_s[u]) begin
              failures++;
              $display("N=%0d beat %0d: subblock %0d lost the sample", n, b, q);
            end else seen[q]++;
          end else if (out_of(u, q) !== '0) begin
            failures++;
            $display("N=%0d beat %0d: subblock %0d not zero", n, b, q);
          end
        end
        checks++;
        if (out_last[u] !== (bb == nf - 1)) failures++;
        if (in_ready[u]) taken++;
        b++;
      end
    end
    @(negedge clk);
    in_valid[u] = 0; out_ready[u] = 0;
    checks++;
    if (taken != 2 * n) failures++;
    for (int q = 0; q < Q; q++) begin
      checks++;
      if (seen[q] != 2 * n / Q) failures++;
    end
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      in_valid[u] = 0; out_ready[u] = 0; in_s[u] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
