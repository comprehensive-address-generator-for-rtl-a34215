// fft_kernel_run: test harness for one N = 2**LOG2N point transform on an
// fft_kernel whose memories hold 2**MEM_LOG2N words, used by tb_fft_kernel.
// With MEM_LOG2N > LOG2N the run-time size input is below the maximum, so
// the address mask of the generators is in use and the words above N must
// never be read or written.  It loads random complex samples and the Q4 twiddle table
// W_N^k = round(16 cos(2 pi k/N)) - j round(16 sin(2 pi k/N)), runs the
// transform and checks:
//   - the read-address sequence (butterfly order, bit-reversed per stage);
//   - the clock count N*log2(N) + 4 from start to the last write;
//   - every output word against a fixed-point DIF model written with plain
//     nested loops (same 8-bit wrap and >> 4 truncation);
//   - the outputs against a floating-point DFT within a small tolerance;
//   - after the reordering pass, natural order, its clock count
//     1 + N + 3P (P = pairs i < bitrev(i)) and the number of exchanges.
module fft_kernel_run #(
  parameter int LOG2N     = 3,
  parameter int MEM_LOG2N = LOG2N
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_exchanges,
  output int   n_self_rev,
  output logic finished
);
  localparam int N = 1 << LOG2N;
  localparam real PI = 3.14159265358979;

  logic rst, start, rev_start, busy, done, ld_we, tw_we, data_we, exchange, self_reversed;
  logic [MEM_LOG2N-1:0] ld_addr, ext_raddr, data_rd_addr, data_wr_addr, twiddle_addr;
  logic [MEM_LOG2N-2:0] tw_addr;
  logic [$clog2(MEM_LOG2N+1)-1:0] log2n;
  assign log2n = ($clog2(MEM_LOG2N+1))'(LOG2N);
  logic [15:0] ld_data, ext_rdata, tw_data;

  fft_kernel #(.LOG2N(MEM_LOG2N)) dut (
    .clk, .rst, .log2n, .start, .rev_start, .busy, .done,
    .ld_we, .ld_addr, .ld_data, .ext_raddr, .ext_rdata,
    .tw_we, .tw_addr, .tw_data,
    .data_rd_addr, .data_wr_addr, .data_we, .twiddle_addr, .exchange, .self_reversed
  );

  // clocks of one operation: the start clock plus every busy clock
  int op_clocks = 0;
  always @(posedge clk) begin
    if ((start || rev_start) && !busy) op_clocks <= 1;
    else if (busy)                     op_clocks <= op_clocks + 1;
  end
  always @(posedge clk) begin
    if (exchange && dut.state == dut.S_REV_WR2) n_exchanges++;
    if (self_reversed) n_self_rev++;
    if (busy && data_we && int'(data_wr_addr) >= N) begin
      checks++; failures++;
      $display("FAIL N=%0d write outside the transform: %0d", N, data_wr_addr);
    end
  end

  function automatic int revk(input int v, input int k);
    int r = 0;
    for (int i = 0; i < k; i++) if (v & (1 << i)) r |= 1 << (k - 1 - i);
    return r;
  endfunction

  function automatic int wrap8(input int v);
    return int'($signed(8'(v)));
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL N=%0d %s: got %0d expected %0d", N, what, got, exp);
    end
  endtask

  int xr[N], xi[N], mr[N], mi[N], wr[N/2], wi[N/2];

  task automatic read_mem(output int r[N], output int im[N]);
    for (int i = 0; i < N; i++) begin
      ext_raddr = MEM_LOG2N'(i);
      @(posedge clk); #1;
      r[i]  = int'($signed(ext_rdata[15:8]));
      im[i] = int'($signed(ext_rdata[7:0]));
    end
  endtask

  initial begin
    int amp, pairs, idx;
    int hr[N], hi[N], or_[N], oi[N];
    checks = 0; failures = 0; finished = 0; n_exchanges = 0; n_self_rev = 0;
    rst = 1; start = 0; rev_start = 0; ld_we = 0; tw_we = 0;
    ld_addr = '0; ld_data = '0; tw_addr = '0; tw_data = '0; ext_raddr = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // twiddle table
    for (int k = 0; k < N / 2; k++) begin
      wr[k] = $rtoi($floor(16.0 * $cos(2.0 * PI * k / N) + 0.5));
      wi[k] = $rtoi($floor(-16.0 * $sin(2.0 * PI * k / N) + 0.5));
      tw_we = 1; tw_addr = (MEM_LOG2N-1)'(k); tw_data = {8'(wr[k]), 8'(wi[k])};
      @(posedge clk); #1;
    end
    tw_we = 0;
    // input samples
    amp = (80 / N > 1) ? 80 / N : 1;
    for (int i = 0; i < N; i++) begin
      xr[i] = $urandom_range(0, 2 * amp) - amp;
      xi[i] = $urandom_range(0, 2 * amp) - amp;
      ld_we = 1; ld_addr = MEM_LOG2N'(i); ld_data = {8'(xr[i]), 8'(xi[i])};
      @(posedge clk); #1;
    end
    ld_we = 0;
    // fixed-point DIF model
    for (int i = 0; i < N; i++) begin mr[i] = xr[i]; mi[i] = xi[i]; end
    for (int s = 1; s <= LOG2N; s++) begin
      int h;
      h = N >> s;
      for (int g = 0; g < N; g += 2 * h)
        for (int j = 0; j < h; j++) begin
          int ar, ai, br, bi, dr, di, tr, ti, k;
          ar = mr[g + j]; ai = mi[g + j]; br = mr[g + j + h]; bi = mi[g + j + h];
          k = j << (s - 1);
          dr = ar - br; di = ai - bi;
          mr[g + j] = wrap8(ar + br); mi[g + j] = wrap8(ai + bi);
          tr = dr * wr[k] - di * wi[k];
          ti = dr * wi[k] + di * wr[k];
          mr[g + j + h] = wrap8(tr >>> 4); mi[g + j + h] = wrap8(ti >>> 4);
        end
    end
    // run the transform
    start = 1;
    @(posedge clk);
    #1 start = 0;
    check(busy, 1, "busy after start");
    idx = 0;
    for (int s = 1; s <= LOG2N; s++) begin
      int bsz;
      bsz = N >> (s - 1);
      for (int blk = 0; blk < N / bsz; blk++)
        for (int j = 0; j < bsz; j++) begin
          check(data_rd_addr, revk(blk, s - 1) * bsz + revk(j, $clog2(bsz)),
                $sformatf("read address %0d", idx));
          @(posedge clk); #1;
          idx++;
        end
    end
    while (busy) @(posedge clk);
    #1;
    check(op_clocks, N * LOG2N + 4, "FFT clock count");
    check(busy, 0, "idle after done");
    read_mem(hr, hi);
    for (int i = 0; i < N; i++) begin
      real er, ei;
      int  kk;
      check(hr[i], mr[i], $sformatf("word %0d re", i));
      check(hi[i], mi[i], $sformatf("word %0d im", i));
      // word i holds X(bitrev(i))
      kk = revk(i, LOG2N);
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        er += xr[n] * $cos(2.0 * PI * kk * n / N) + xi[n] * $sin(2.0 * PI * kk * n / N);
        ei += xi[n] * $cos(2.0 * PI * kk * n / N) - xr[n] * $sin(2.0 * PI * kk * n / N);
      end
      checks++;
      if ((hr[i] - er > 2.0 * LOG2N + 0.05 * N * amp) || (er - hr[i] > 2.0 * LOG2N + 0.05 * N * amp) ||
          (hi[i] - ei > 2.0 * LOG2N + 0.05 * N * amp) || (ei - hi[i] > 2.0 * LOG2N + 0.05 * N * amp)) begin
        failures++;
        $display("FAIL N=%0d DFT bin %0d: got (%0d, %0d) expected (%f, %f)", N, kk, hr[i], hi[i], er, ei);
      end
    end
    // reordering pass
    pairs = 0;
    for (int i = 0; i < N; i++) if (i < revk(i, LOG2N)) pairs++;
    rev_start = 1;
    @(posedge clk);
    #1 rev_start = 0;
    while (busy) @(posedge clk);
    #1;
    check(op_clocks, 1 + N + 3 * pairs, "reordering clock count");
    check(n_exchanges, pairs, "number of exchanges");
    check(n_self_rev, N - 2 * pairs, "number of self-reversed addresses");
    read_mem(or_, oi);
    for (int i = 0; i < N; i++) begin
      check(or_[i], mr[revk(i, LOG2N)], $sformatf("natural order %0d re", i));
      check(oi[i], mi[revk(i, LOG2N)], $sformatf("natural order %0d im", i));
    end
    finished = 1;
  end
endmodule
