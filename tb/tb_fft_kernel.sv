// tb_fft_kernel: runs fft_kernel_run for N = 4, 8 (the default), 16 and 32
// side by side, plus N = 4 and N = 8 on a kernel built for 32 words (run-time
// size below the maximum), and adds up their checks.  Each run loads random samples,
// computes the FFT, checks addresses, clock count and every output word,
// then reorders into natural order and checks that too.
module tb_fft_kernel;
  logic clk = 0;
  always #5 clk = ~clk;
  int c[6], f[6], ex[6], sr[6];
  logic fin[6];

  fft_kernel_run #(.LOG2N(2)) r4  (.clk, .checks(c[0]), .failures(f[0]), .n_exchanges(ex[0]), .n_self_rev(sr[0]), .finished(fin[0]));
  fft_kernel_run #(.LOG2N(3)) r8  (.clk, .checks(c[1]), .failures(f[1]), .n_exchanges(ex[1]), .n_self_rev(sr[1]), .finished(fin[1]));
  fft_kernel_run #(.LOG2N(4)) r16 (.clk, .checks(c[2]), .failures(f[2]), .n_exchanges(ex[2]), .n_self_rev(sr[2]), .finished(fin[2]));
  fft_kernel_run #(.LOG2N(5)) r32 (.clk, .checks(c[3]), .failures(f[3]), .n_exchanges(ex[3]), .n_self_rev(sr[3]), .finished(fin[3]));
  fft_kernel_run #(.LOG2N(2), .MEM_LOG2N(5)) r4m (.clk, .checks(c[4]), .failures(f[4]), .n_exchanges(ex[4]), .n_self_rev(sr[4]), .finished(fin[4]));
  fft_kernel_run #(.LOG2N(3), .MEM_LOG2N(5)) r8m (.clk, .checks(c[5]), .failures(f[5]), .n_exchanges(ex[5]), .n_self_rev(sr[5]), .finished(fin[5]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end
endmodule
