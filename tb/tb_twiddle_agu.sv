// tb_twiddle_agu: runs the twiddle generator for N = 4 .. 256 and compares
// each address with the DIF twiddle index of the butterfly issued by the
// data generator: in stage s the groups have NN = N / 2**s butterflies, and
// butterfly b uses twiddle bitrev_{log2(N/2)}(b mod NN).  For N = 8 this is
// 0 2 1 3 0 2 0 2 0 0 0 0.  Also checks done after N/2*log2(N) steps.
module tb_twiddle_agu;
  localparam int AW = 8;
  logic clk = 0, rst, init, en;
  logic [AW-1:0] n_half, n_quarter, addr;
  logic group_end, done;
  int checks = 0, failures = 0;

  twiddle_agu #(.ADDR_W(AW)) dut (.clk, .rst, .init, .en, .n_half, .n_quarter,
                                  .addr, .group_end, .done);
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

  int fig_seq[12] = '{0,2,1,3,0,2,0,2,0,0,0,0};

  initial begin
    rst = 1; init = 0; en = 0; n_half = '0; n_quarter = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 2; k <= AW; k++) begin
      int n, idx;
      n = 1 << k;
      idx = 0;
      n_half = AW'(n / 2); n_quarter = AW'(n / 4);
      init = 1; @(posedge clk); #1; init = 0;
      for (int s = 1; s <= k; s++) begin
        int nn;
        nn = n >> s;
        for (int b = 0; b < n / 2; b++) begin
          check(addr, revk(b % nn, k - 1), $sformatf("N=%0d stage %0d butterfly %0d", n, s, b));
          if (n == 8) check(addr, fig_seq[idx], "8-point example sequence");
          check(done, 0, "done early");
          while ($urandom_range(0, 3) == 0) begin
            en = 0; @(posedge clk); #1;
          end
          en = 1; @(posedge clk); #1; en = 0;
          idx++;
        end
      end
      check(done, 1, $sformatf("N=%0d done", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
