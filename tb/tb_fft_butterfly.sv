// tb_fft_butterfly: random complex operands and twiddles against an integer
// model of x = a + b, y = ((a - b) * w) >> 4 with 8-bit wrap-around per part,
// plus the trivial twiddles 1 and -j (16 and -16 in Q4).
module tb_fft_butterfly;
  localparam int DW = 8;
  localparam int F  = 4;
  logic [2*DW-1:0] a, b, w, x, y;
  int checks = 0, failures = 0;

  fft_butterfly #(.DATA_W(DW), .TW_FRAC(F)) dut (.a, .b, .w, .x, .y);

  function automatic int sx(input logic [DW-1:0] v);
    return int'($signed(v));
  endfunction

  task automatic check(input logic [DW-1:0] got, input int exp, input string what);
    checks++;
    if (got !== DW'(exp)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, $signed(got), DW'(exp));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int ar, ai, br, bi, wr, wi, dr, di, pr, pi;
      a = 16'($urandom); b = 16'($urandom);
      case (i % 4)
        0: w = {8'sd16, 8'sd0};
        1: w = {8'sd0, -8'sd16};
        default: w = 16'($urandom);
      endcase
      #1;
      ar = sx(a[15:8]); ai = sx(a[7:0]); br = sx(b[15:8]); bi = sx(b[7:0]);
      wr = sx(w[15:8]); wi = sx(w[7:0]);
      dr = ar - br; di = ai - bi;
      pr = dr * wr - di * wi;
      pi = dr * wi + di * wr;
      check(x[15:8], ar + br, "x.re");
      check(x[7:0],  ai + bi, "x.im");
      check(y[15:8], pr >>> F, "y.re");
      check(y[7:0],  pi >>> F, "y.im");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
