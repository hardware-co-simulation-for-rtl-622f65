// Self-checking test of subblock_interleaver.
//
// The reference order is built here step by step: read the Q x N matrix
// column by column, write the sequence column by column into a (QB) x (N/B)
// matrix, transpose, read column by column into Q rows. The builder is
// first checked against the worked example N = 8, Q = 4, B = 4, whose rows
// must be
//   AF11 AF31 AF12 AF32 AF13 AF33 AF14 AF34
//   AF15 AF35 AF16 AF36 AF17 AF37 AF18 AF38
//   AF21 AF41 AF22 AF42 AF23 AF43 AF24 AF44
//   AF25 AF45 AF26 AF46 AF27 AF47 AF28 AF48
// Then two interleavers are compared with it: a small one (N = 32, Q = 4,
// B = 2) and the default one (N = 256, Q = 4, B = 8). For the default one,
// row m must also hold exactly the samples k with floor(k/8) mod 4 = m of
// every subblock (the grouping of the first round). Symbols are written with
// random gaps; s_ready must be low while a symbol is held, the write must
// take N + B*(Q-1) steps, release must be ignored while not full, read data must arrive one cycle after the address
// and be zero with rd_en low, and release must free the block.
module tb_subblock_interleaver;
  import sbi_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef int imat_t [][];

  // Reference: source subblock (rq) and sample (rk) of row m, position j.
  task automatic build_reference(int n, int nq, int b, ref imat_t rq, ref imat_t rk);
    int R, C, idx;
    imat_t mq, mk;
    R = nq * b; C = n / b;
    mq = new[R]; mk = new[R];
    foreach (mq[r]) begin mq[r] = new[C]; mk[r] = new[C]; end
    idx = 0;
    for (int c = 0; c < C; c++)            // column-wise write of the
      for (int r = 0; r < R; r++) begin    // column-wise read sequence
        mq[r][c] = idx % nq; mk[r][c] = idx / nq; idx++;
      end
    rq = new[nq]; rk = new[nq];
    foreach (rq[m]) begin rq[m] = new[n]; rk[m] = new[n]; end
    idx = 0;
    for (int r = 0; r < R; r++)            // transposed, read column-wise
      for (int c = 0; c < C; c++) begin
        rq[idx % nq][idx / nq] = mq[r][c];
        rk[idx % nq][idx / nq] = mk[r][c];
        idx++;
      end
  endtask

  // Sample value that identifies subblock q (0-based), sample k, symbol sym.
  function automatic cplx_t tag(int q, int k, int sym);
    tag.re = sample_t'(q * 1024 + k + sym * 4096);
    tag.im = sample_t'(~(q * 1024 + k));
  endfunction

  // ---------------------------------------------------- DUTs
  localparam int NS = 32, BS = 2;
  localparam int N = 256, Q = 4, B = 8;
  logic s_valid [2], s_ready [2], full [2], rel [2], rd_en [2];
  cplx_t s_s0 [Q], s_s1 [Q], rd_s0 [Q], rd_s1 [Q];
  logic [$clog2(NS)-1:0] rd_addr0;
  logic [$clog2(N)-1:0]  rd_addr1;

  subblock_interleaver #(.N(NS), .Q(Q), .B(BS)) dut_small (
    .clk(clk), .rst_n(rst_n), .s_valid(s_valid[0]), .s_ready(s_ready[0]), .s_s(s_s0),
    .full(full[0]), .release_i(rel[0]), .rd_en(rd_en[0]), .rd_addr(rd_addr0), .rd_s(rd_s0));
  subblock_interleaver dut (
    .clk(clk), .rst_n(rst_n), .s_valid(s_valid[1]), .s_ready(s_ready[1]), .s_s(s_s1),
    .full(full[1]), .release_i(rel[1]), .rd_en(rd_en[1]), .rd_addr(rd_addr1), .rd_s(rd_s1));

  function automatic cplx_t rd_of(int u, int m);
    return (u == 0) ? rd_s0[m] : rd_s1[m];
  endfunction

  task automatic drive_in(int u, int q, cplx_t v);
    if (u == 0) s_s0[q] = v; else s_s1[q] = v;
  endtask

  task automatic set_addr(int u, int j);
    if (u == 0) rd_addr0 = ($clog2(NS))'(j); else rd_addr1 = ($clog2(N))'(j);
  endtask

  task automatic run_symbol(int u, int n, int b, int sym, ref imat_t rq, ref imat_t rk);
    int steps;
    int count [Q][Q];
    // write, with gaps
    steps = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      s_valid[u] = 0;
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      s_valid[u] = 1;
      rel[u] = (k < 2);                    // release while not full: ignored
      for (int q = 0; q < Q; q++) drive_in(u, q, tag(q, k, sym));
      while (!s_ready[u]) @(negedge clk);
      @(posedge clk);
    end
    rel[u] = 0;
    @(negedge clk);
    s_valid[u] = 0;
    // flush: B*(Q-1) more steps, without input
    while (!full[u]) begin @(negedge clk); steps++; end
    checks++;
    if (steps != b * (Q - 1)) begin
      failures++;
      $display("size %0d: flush took %0d steps, expected %0d", n, steps, b * (Q - 1));
    end
    checks++;
    if (s_ready[u]) failures++;
    // a write while full must be ignored
    s_valid[u] = 1;
    for (int q = 0; q < Q; q++) drive_in(u, q, '{re: 16'sh7777, im: 16'sh7777});
    @(negedge clk);
    s_valid[u] = 0;
    // read twice
    for (int pass = 0; pass < 2; pass++) begin
      count = '{default: 0};
      for (int j = 0; j < n; j++) begin
        set_addr(u, j);
        rd_en[u] = 1;
        @(negedge clk);
        rd_en[u] = 0;
        for (int m = 0; m < Q; m++) begin
          cplx_t e, g;
          e = tag(rq[m][j], rk[m][j], sym);
          g = rd_of(u, m);
          checks++;
          if (g !== e) begin
            failures++;
            if (failures < 10) $display("size %0d row %0d pos %0d: got %h expected %h", n, m, j, g, e);
          end
          if (n == N) begin
            checks++;
            if (((int'(g.re) % 1024) / 8) % 4 != m) failures++;
            count[m][(int'(g.re) % 4096) / 1024]++;
          end
        end
      end
      if (n == N)
        for (int m = 0; m < Q; m++)
          for (int q = 0; q < Q; q++) begin
            checks++;
            if (count[m][q] != N / Q) failures++;
          end
    end
    // read with rd_en low gives zero
    @(negedge clk);
    for (int m = 0; m < Q; m++) begin
      checks++;
      if (rd_of(u, m) !== '0) failures++;
    end
    rel[u] = 1;
    @(negedge clk);
    rel[u] = 0;
    checks++;
    if (full[u] || !s_ready[u]) failures++;
  endtask

  int ex_rows [4][8] = '{
    '{11, 31, 12, 32, 13, 33, 14, 34},
    '{15, 35, 16, 36, 17, 37, 18, 38},
    '{21, 41, 22, 42, 23, 43, 24, 44},
    '{25, 45, 26, 46, 27, 47, 28, 48}};

  initial begin
    imat_t eq, ek, sq, sk, dq, dk;
    for (int u = 0; u < 2; u++) begin s_valid[u] = 0; rel[u] = 0; rd_en[u] = 0; end
    rd_addr0 = '0; rd_addr1 = '0;
    for (int q = 0; q < Q; q++) begin s_s0[q] = '0; s_s1[q] = '0; end

    // the reference builder against the worked example
    build_reference(8, 4, 4, eq, ek);
    for (int m = 0; m < 4; m++)
      for (int j = 0; j < 8; j++) begin
        checks++;
        if ((eq[m][j] + 1) * 10 + ek[m][j] + 1 != ex_rows[m][j]) begin
          failures++;
          $display("example row %0d col %0d: AF%0d%0d", m + 1, j + 1, eq[m][j] + 1, ek[m][j] + 1);
        end
      end

    build_reference(NS, Q, BS, sq, sk);
    build_reference(N, Q, B, dq, dk);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_symbol(0, NS, BS, 0, sq, sk);
    run_symbol(0, NS, BS, 1, sq, sk);
    run_symbol(1, N, B, 0, dq, dk);
    run_symbol(1, N, B, 1, dq, dk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
