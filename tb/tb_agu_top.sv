// tb_agu_top: end-to-end test of agu_top at its default parameters.
//
//   1. 8-point FFT: loads the Q4 twiddle table and random samples, checks
//      the read, write and twiddle address streams against the butterfly
//      order (0 4 2 6 1 5 3 7 | 0 2 1 3 4 6 5 7 | 0 1 4 5 2 3 6 7 and
//      0 2 1 3 0 2 0 2 0 0 0 0), the clock count of 28, and the results
//      against a fixed-point DIF model; then the reordering pass and the
//      natural-order result.
//   1b. 4-point FFT on the same kernel (run-time size below the maximum):
//      address streams 0 2 1 3 | 0 1 2 3, 12 clocks, results, and words
//      4..7 left untouched.
//   2. Convolution of 5 samples with 4 taps: address streams, 35 clocks,
//      every output against a direct sum.
//   3. Zig-zag scans of 4 x 4 and 8 x 8 blocks against a reference scan.
//   4. Linear addressing up and down.
// Every mechanism is counted (correction with N/2, stage change, twiddle
// group restart, masked reduced-size run, exchange, self-reversed skip, window step-back, each of
// the four zig-zag moves, linear add and subtract); one that never happens
// is a failure.
module tb_agu_top;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  // clocks of one kernel operation: the start clock plus every busy clock
  int fft_clocks = 0, conv_clocks = 0;
  always @(posedge clk) begin
    if ((fft_start || fft_rev_start) && !fft_busy) fft_clocks <= 1;
    else if (fft_busy)                             fft_clocks <= fft_clocks + 1;
    if (conv_start && !conv_busy) conv_clocks <= 1;
    else if (conv_busy)           conv_clocks <= conv_clocks + 1;
  end

  logic fft_start, fft_rev_start, fft_busy, fft_done, fft_ld_we, fft_tw_we;
  logic [2:0] fft_ld_addr, fft_ext_raddr, fft_data_rd_addr, fft_data_wr_addr, fft_twiddle_addr;
  logic [1:0] fft_tw_addr;
  logic [1:0] fft_log2n;
  logic [15:0] fft_ld_data, fft_ext_rdata, fft_tw_data;
  logic fft_data_we, fft_exchange, fft_self_reversed;
  logic conv_start, conv_busy, conv_done, conv_x_we, conv_h_we, conv_result_we, conv_data_wrap;
  logic [7:0] conv_n_len, conv_m, conv_x_addr, conv_h_addr, conv_y_raddr;
  logic [7:0] conv_data_addr, conv_coeff_addr, conv_result_addr;
  logic signed [7:0] conv_x_data, conv_h_data;
  logic signed [19:0] conv_y_rdata;
  logic zz_clr, zz_en, zz_move_right, zz_move_down, zz_move_up, zz_done;
  logic [4:0] zz_n;
  logic [7:0] zz_addr;
  logic lin_load, lin_sub, lin_en;
  logic [7:0] lin_start_addr, lin_modifier, lin_addr;

  agu_top dut (.*);

  int checks = 0, failures = 0;
  int n_masked = 0, n_corr = 0, n_stage = 0, n_twreset = 0, n_exch = 0, n_selfrev = 0;
  int n_wrap = 0, n_right = 0, n_down = 0, n_up = 0, n_dl = 0, n_add = 0, n_sub = 0;

  // mechanism counters
  always @(posedge clk) begin
    if (dut.u_fft.u_rd_agu.en && !dut.u_fft.u_rd_agu.done) begin
      if (dut.u_fft.u_rd_agu.corr_n2 && !dut.u_fft.u_rd_agu.last_in_stage) n_corr++;
      if (dut.u_fft.u_rd_agu.last_in_stage && dut.u_fft.state == dut.u_fft.S_FFT) n_stage++;
    end
    if (dut.u_fft.u_tw_agu.en && !dut.u_fft.u_tw_agu.done && dut.u_fft.u_tw_agu.group_end) n_twreset++;
    if (fft_self_reversed) n_selfrev++;
    if (dut.u_fft.state == dut.u_fft.S_FFT && dut.u_fft.n_mask != 0) n_masked++;
    if (dut.u_fft.state == dut.u_fft.S_REV_WR2) n_exch++;
    if (conv_data_wrap && conv_busy && dut.u_conv.issue) n_wrap++;
    if (zz_en && !zz_done) begin
      if (zz_move_right) n_right++;
      else if (zz_move_down) n_down++;
      else if (zz_move_up) n_up++;
      else n_dl++;
    end
    if (lin_en) begin
      if (lin_sub) n_sub++; else n_add++;
    end
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic happened(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-34s %0d", what, n);
  endtask

  function automatic int wrap8(input int v);
    return int'($signed(8'(v)));
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rd_seq[24] = '{0,4,2,6,1,5,3,7, 0,2,1,3,4,6,5,7, 0,1,4,5,2,3,6,7};
  int tw_seq[12] = '{0,2,1,3, 0,2,0,2, 0,0,0,0};
  int brev3[8]   = '{0,4,2,6,1,5,3,7};

  initial begin
    int xr[8], xi[8], mr[8], mi[8], wr[4], wi[4];
    int wr_idx;
    rst = 1;
    fft_log2n = 2'd3; fft_start = 0; fft_rev_start = 0; fft_ld_we = 0; fft_tw_we = 0;
    fft_ld_addr = '0; fft_ld_data = '0; fft_tw_addr = '0; fft_tw_data = '0; fft_ext_raddr = '0;
    conv_start = 0; conv_x_we = 0; conv_h_we = 0; conv_n_len = '0; conv_m = '0;
    conv_x_addr = '0; conv_h_addr = '0; conv_x_data = '0; conv_h_data = '0; conv_y_raddr = '0;
    zz_clr = 0; zz_en = 0; zz_n = '0;
    lin_load = 0; lin_sub = 0; lin_en = 0; lin_start_addr = '0; lin_modifier = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // ---------------------------------------------------------------- FFT
    for (int k = 0; k < 4; k++) begin
      wr[k] = $rtoi($floor(16.0 * $cos(2.0 * PI * k / 8) + 0.5));
      wi[k] = $rtoi($floor(-16.0 * $sin(2.0 * PI * k / 8) + 0.5));
      fft_tw_we = 1; fft_tw_addr = 2'(k); fft_tw_data = {8'(wr[k]), 8'(wi[k])};
      @(posedge clk); #1;
    end
    fft_tw_we = 0;
    check(fft_tw_data, 16'hF5F5, "W^3 in Q4 (-11 - 11j)");
    for (int i = 0; i < 8; i++) begin
      xr[i] = $urandom_range(0, 20) - 10; xi[i] = $urandom_range(0, 20) - 10;
      mr[i] = xr[i]; mi[i] = xi[i];
      fft_ld_we = 1; fft_ld_addr = 3'(i); fft_ld_data = {8'(xr[i]), 8'(xi[i])};
      @(posedge clk); #1;
    end
    fft_ld_we = 0;
    for (int s = 1; s <= 3; s++) begin
      int h;
      h = 8 >> s;
      for (int g = 0; g < 8; g += 2 * h)
        for (int j = 0; j < h; j++) begin
          int ar, ai, br, bi, dr, di, k;
          ar = mr[g+j]; ai = mi[g+j]; br = mr[g+j+h]; bi = mi[g+j+h];
          k = j << (s - 1); dr = ar - br; di = ai - bi;
          mr[g+j] = wrap8(ar + br); mi[g+j] = wrap8(ai + bi);
          mr[g+j+h] = wrap8((dr * wr[k] - di * wi[k]) >>> 4);
          mi[g+j+h] = wrap8((dr * wi[k] + di * wr[k]) >>> 4);
        end
    end
    fft_start = 1;
    @(posedge clk); #1 fft_start = 0;
    wr_idx = 0;
    for (int c = 0; c < 40 && !(fft_done); c++) begin
      if (c < 24) begin
        check(fft_data_rd_addr, rd_seq[c], $sformatf("FFT read address %0d", c));
        check(fft_twiddle_addr, tw_seq[c / 2], $sformatf("FFT twiddle address %0d", c));
      end
      if (fft_data_we) begin
        check(fft_data_wr_addr, rd_seq[wr_idx], $sformatf("FFT write address %0d", wr_idx));
        check(c, wr_idx + 3, "write three clocks after the read");
        wr_idx++;
      end
      @(posedge clk); #1;
      if (fft_done) begin
        check(fft_data_wr_addr, rd_seq[wr_idx], "last write address");
        check(fft_data_we, 1, "last write with done");
        wr_idx++;
      end
    end
    @(posedge clk); #1;
    check(fft_clocks, 28, "8-point FFT clock count (N log2 N + 4)");
    check(wr_idx, 24, "number of writes");
    for (int i = 0; i < 8; i++) begin
      fft_ext_raddr = 3'(i); @(posedge clk); #1;
      check(int'($signed(fft_ext_rdata[15:8])), mr[i], $sformatf("FFT word %0d re", i));
      check(int'($signed(fft_ext_rdata[7:0])),  mi[i], $sformatf("FFT word %0d im", i));
    end
    fft_rev_start = 1;
    @(posedge clk); #1 fft_rev_start = 0;
    while (fft_busy) @(posedge clk);
    #1;
    check(fft_clocks, 15, "reordering clock count (1 + 8 + 3*2)");
    for (int i = 0; i < 8; i++) begin
      fft_ext_raddr = 3'(i); @(posedge clk); #1;
      check(int'($signed(fft_ext_rdata[15:8])), mr[brev3[i]], $sformatf("X(%0d) re", i));
      check(int'($signed(fft_ext_rdata[7:0])),  mi[brev3[i]], $sformatf("X(%0d) im", i));
    end

    // ---------------------------------------------- 4-point FFT, same kernel
    begin
      int yr[4], yi[4], rd4[8];
      rd4 = '{0,2,1,3, 0,1,2,3};
      fft_log2n = 2'd2;
      // W_4^0 = 16, W_4^1 = -16j
      wr[0] = 16; wi[0] = 0; wr[1] = 0; wi[1] = -16;
      for (int k = 0; k < 2; k++) begin
        fft_tw_we = 1; fft_tw_addr = 2'(k); fft_tw_data = {8'(wr[k]), 8'(wi[k])};
        @(posedge clk); #1;
      end
      fft_tw_we = 0;
      for (int i = 0; i < 4; i++) begin
        yr[i] = $urandom_range(0, 40) - 20; yi[i] = $urandom_range(0, 40) - 20;
        fft_ld_we = 1; fft_ld_addr = 3'(i); fft_ld_data = {8'(yr[i]), 8'(yi[i])};
        @(posedge clk); #1;
      end
      fft_ld_we = 0;
      for (int s = 1; s <= 2; s++) begin
        int h;
        h = 4 >> s;
        for (int g = 0; g < 4; g += 2 * h)
          for (int j = 0; j < h; j++) begin
            int ar, ai, br, bi, dr, di, k;
            ar = yr[g+j]; ai = yi[g+j]; br = yr[g+j+h]; bi = yi[g+j+h];
            k = j << (s - 1); dr = ar - br; di = ai - bi;
            yr[g+j] = wrap8(ar + br); yi[g+j] = wrap8(ai + bi);
            yr[g+j+h] = wrap8((dr * wr[k] - di * wi[k]) >>> 4);
            yi[g+j+h] = wrap8((dr * wi[k] + di * wr[k]) >>> 4);
          end
      end
      fft_start = 1;
      @(posedge clk); #1 fft_start = 0;
      wr_idx = 0;
      for (int c = 0; c < 20 && !(fft_done); c++) begin
        if (c < 8) begin
          check(fft_data_rd_addr, rd4[c], $sformatf("4-point read address %0d", c));
          check(fft_twiddle_addr, (c < 4) ? c / 2 : 0, $sformatf("4-point twiddle address %0d", c));
        end
        if (fft_data_we) begin
          check(fft_data_wr_addr, rd4[wr_idx], $sformatf("4-point write address %0d", wr_idx));
          wr_idx++;
        end
        @(posedge clk); #1;
        if (fft_done) begin
          check(fft_data_wr_addr, rd4[wr_idx], "4-point last write address");
          wr_idx++;
        end
      end
      @(posedge clk); #1;
      check(fft_clocks, 12, "4-point FFT clock count (N log2 N + 4)");
      check(wr_idx, 8, "4-point number of writes");
      for (int i = 0; i < 8; i++) begin
        fft_ext_raddr = 3'(i); @(posedge clk); #1;
        check(int'($signed(fft_ext_rdata[15:8])), (i < 4) ? yr[i] : mr[brev3[i]],
              $sformatf("after 4-point FFT, word %0d re", i));
        check(int'($signed(fft_ext_rdata[7:0])),  (i < 4) ? yi[i] : mi[brev3[i]],
              $sformatf("after 4-point FFT, word %0d im", i));
      end
      fft_log2n = 2'd3;
    end

    // -------------------------------------------------------- convolution
    begin
      int x[5], h[4], e;
      for (int i = 0; i < 5; i++) x[i] = $urandom_range(0, 255) - 128;
      for (int i = 0; i < 4; i++) h[i] = $urandom_range(0, 255) - 128;
      for (int a = 0; a < 11; a++) begin
        conv_x_we = 1; conv_x_addr = 8'(a);
        conv_x_data = (a >= 3 && a < 8) ? 8'(x[a - 3]) : '0;
        @(posedge clk); #1;
      end
      conv_x_we = 0;
      for (int j = 0; j < 4; j++) begin
        conv_h_we = 1; conv_h_addr = 8'(j); conv_h_data = 8'(h[3 - j]);
        @(posedge clk); #1;
      end
      conv_h_we = 0;
      conv_n_len = 8'd5; conv_m = 8'd4;
      conv_start = 1;
      @(posedge clk); #1 conv_start = 0;
      for (int k = 0; k < 8; k++)
        for (int j = 0; j < 4; j++) begin
          check(conv_data_addr, k + j, "convolution data address");
          check(conv_coeff_addr, j, "convolution coefficient address");
          @(posedge clk); #1;
        end
      while (conv_busy) @(posedge clk);
      #1;
      check(conv_clocks, 35, "convolution clock count ((N+M-1)*M + 3)");
      for (int k = 0; k < 8; k++) begin
        e = 0;
        for (int i = 0; i < 4; i++) if (k - i >= 0 && k - i < 5) e += x[k - i] * h[i];
        conv_y_raddr = 8'(k); @(posedge clk); #1;
        check(conv_y_rdata, e, $sformatf("y(%0d)", k));
      end
    end

    // ------------------------------------------------------------ zig-zag
    foreach (brev3[q]) if (q < 2) begin
      int nn, seq[$];
      nn = (q == 0) ? 4 : 8;
      seq.delete();
      for (int d = 0; d <= 2 * nn - 2; d++) begin
        int lo, hi;
        lo = (d - nn + 1 > 0) ? d - nn + 1 : 0;
        hi = (d < nn - 1) ? d : nn - 1;
        if (d % 2 == 0) for (int r = hi; r >= lo; r--) seq.push_back(r * nn + (d - r));
        else            for (int r = lo; r <= hi; r++) seq.push_back(r * nn + (d - r));
      end
      zz_n = 5'(nn); zz_clr = 1; @(posedge clk); #1; zz_clr = 0;
      for (int i = 0; i < nn * nn; i++) begin
        check(zz_addr, seq[i], $sformatf("zig-zag %0dx%0d index %0d", nn, nn, i));
        check(zz_done, i == nn * nn - 1, "zig-zag done");
        zz_en = 1; @(posedge clk); #1; zz_en = 0;
      end
    end

    // ------------------------------------------------------------- linear
    lin_start_addr = 8'd10; lin_modifier = 8'd3; lin_load = 1;
    @(posedge clk); #1 lin_load = 0;
    for (int i = 0; i < 6; i++) begin
      check(lin_addr, 10 + 3 * i, "linear address up");
      lin_en = 1; @(posedge clk); #1;
    end
    lin_sub = 1;
    for (int i = 0; i < 6; i++) begin
      check(lin_addr, 28 - 3 * i, "linear address down");
      @(posedge clk); #1;
    end
    lin_en = 0; lin_sub = 0;

    $display("mechanisms:");
    happened(n_masked,  "reduced-size FFT with address mask");
    happened(n_corr,    "bit-reversed correction with N/2");
    happened(n_stage,   "FFT stage change (SRA/SRL shift)");
    happened(n_twreset, "twiddle group restart");
    happened(n_exch,    "reordering exchange");
    happened(n_selfrev, "self-reversed address skipped");
    happened(n_wrap,    "convolution window step-back");
    happened(n_right,   "zig-zag move right");
    happened(n_down,    "zig-zag move down");
    happened(n_up,      "zig-zag move up-right");
    happened(n_dl,      "zig-zag move down-left");
    happened(n_add,     "linear add");
    happened(n_sub,     "linear subtract");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
