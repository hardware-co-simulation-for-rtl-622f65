// PAPR workloads: random symbols through the full design, with PAPR
// statistics against plain OFDM.
//   * N = 256, QPSK, 200 symbols: the configuration built for hardware.
//   * 16-QAM, Q = 4, 40 symbols each: N = 128 and 256 with oversampling
//     L = 4 (IFFTs of 512 and 1024 points), and N = 512 and 1024 without
//     oversampling (L = 4 would need IFFTs of 2048 and 4096 points, too slow
//     to build and simulate here).
// Each run checks every symbol (see ccdf_run); the testbench passes when all
// runs finish with no failure. The symbol counts are far below what a
// smooth CCDF needs; the printed CCDF points are indicative only.
module tb_workload_ccdf;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int RUNS = 5;
  logic fin [RUNS];
  int   chk [RUNS], fail [RUNS];

  ccdf_run #(.N(256),  .MOD(4),  .SYMBOLS(200)) r_qpsk (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  ccdf_run #(.N(128),  .MOD(16), .SYMBOLS(40), .L(4)) r_128 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  ccdf_run #(.N(256),  .MOD(16), .SYMBOLS(40), .L(4)) r_256 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  ccdf_run #(.N(512),  .MOD(16), .SYMBOLS(40))  r_512  (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]));
  ccdf_run #(.N(1024), .MOD(16), .SYMBOLS(40))  r_1024 (.clk, .rst_n, .finished(fin[4]), .checks(chk[4]), .failures(fail[4]));

  task automatic report(int extra_fail);
    int c, f;
    c = 0; f = extra_fail;
    for (int i = 0; i < RUNS; i++) begin c += chk[i]; f += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endtask

  initial begin : watchdog
    repeat (1_200_000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    report(0);
    $finish;
  end
endmodule
