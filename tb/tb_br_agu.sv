// tb_br_agu: runs the bit-reversed generator for N = 4 .. 256 on an 8-bit
// address and compares every address with the butterfly order of an
// in-place radix-2 FFT: in stage s (1-based) the array falls into blocks of
// B = N / 2**(s-1) words, visited in bit-reversed block order, and inside a
// block the words come in bit-reversed order, so consecutive pairs are B/2
// apart.  Also checks the 8-point sequence printed in the FFT example, the
// end-of-stage flag, that done rises after exactly N*log2(N) addresses, and
// that random pauses of en hold the address.
module tb_br_agu;
  localparam int AW = 8;
  logic clk = 0, rst, init, en;
  logic [AW-1:0] mask, n_half, addr;
  logic last_in_stage, corr_n2, done;
  int checks = 0, failures = 0, corr_seen = 0;

  br_agu #(.ADDR_W(AW)) dut (.clk, .rst, .init, .en, .mask, .n_half, .addr,
                             .last_in_stage, .corr_n2, .done);
  always #5 clk = ~clk;

  function automatic int revk(input int v, input int k);
    int r = 0;
    for (int i = 0; i < k; i++) if (v & (1 << i)) r |= 1 << (k - 1 - i);
    return r;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (en && corr_n2 && !last_in_stage && !done) corr_seen++;

  int fig_seq[24] = '{0,4,2,6,1,5,3,7, 0,2,1,3,4,6,5,7, 0,1,4,5,2,3,6,7};

  initial begin
    rst = 1; init = 0; en = 0; mask = '0; n_half = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 2; k <= AW; k++) begin
      int n, idx;
      n = 1 << k;
      idx = 0;
      mask   = AW'(~(n - 1));
      n_half = AW'(n / 2);
      init   = 1;
      @(posedge clk); #1;
      init = 0;
      for (int s = 1; s <= k; s++) begin
        int bsz;
        bsz = n >> (s - 1);
        for (int blk = 0; blk < n / bsz; blk++)
          for (int j = 0; j < bsz; j++) begin
            int e;
            e = revk(blk, s - 1) * bsz + revk(j, $clog2(bsz));
            check(addr, e, $sformatf("N=%0d stage %0d index %0d", n, s, idx));
            if (n == 8) check(addr, fig_seq[idx], "8-point example sequence");
            check(last_in_stage, (blk == n / bsz - 1) && (j == bsz - 1),
                  $sformatf("N=%0d last_in_stage at %0d", n, idx));
            check(done, 0, "done early");
            // random pause
            while ($urandom_range(0, 3) == 0) begin
              en = 0; @(posedge clk); #1;
              check(addr, e, "hold while en low");
            end
            en = 1; @(posedge clk); #1; en = 0;
            idx++;
          end
      end
      check(done, 1, $sformatf("N=%0d done after N*log2N addresses", n));
      check(idx, n * k, "address count");
    end
    checks++;
    if (corr_seen == 0) begin failures++; $display("FAIL correction with N/2 never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
