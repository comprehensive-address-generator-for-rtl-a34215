// tb_conv_kernel: loads padded input samples and reversed coefficients,
// runs the convolution and checks every output against a direct sum
// y(k) = sum_i x(k-i) h(i), the clock count (N+M-1)*M + 3 from start to the
// last write, the address streams of the three generators and the number
// of window step-backs.  Cases: N = 5, M = 4 (the document's example,
// 35 clocks), then random N and M.
module tb_conv_kernel;
  localparam int AW = 8, DW = 8, ACCW = 20;
  logic clk = 0, rst, start, busy, done, x_we, h_we, result_we, data_wrap;
  logic [AW-1:0] n_len, m, x_addr, h_addr, y_raddr, data_addr, coeff_addr, result_addr;
  logic signed [DW-1:0] x_data, h_data;
  logic signed [ACCW-1:0] y_rdata;
  int checks = 0, failures = 0, cyc = 0, wraps = 0;

  conv_kernel #(.ADDR_W(AW), .DATA_W(DW), .ACC_W(ACCW)) dut (
    .clk, .rst, .start, .n_len, .m, .busy, .done,
    .x_we, .x_addr, .x_data, .h_we, .h_addr, .h_data, .y_raddr, .y_rdata,
    .data_addr, .coeff_addr, .result_addr, .result_we, .data_wrap
  );
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  // clocks of one run: the start clock plus every busy clock
  int op_clocks = 0;
  always @(posedge clk) begin
    if (start && !busy) op_clocks <= 1;
    else if (busy)      op_clocks <= op_clocks + 1;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nn, input int mm);
    int x[], h[], issue_idx;
    x = new[nn]; h = new[mm];
    for (int i = 0; i < nn; i++) x[i] = $urandom_range(0, 255) - 128;
    for (int i = 0; i < mm; i++) h[i] = $urandom_range(0, 255) - 128;
    // padded data: x(i) at address mm-1+i, zeros around
    for (int a = 0; a < nn + 2 * (mm - 1); a++) begin
      x_we = 1; x_addr = AW'(a);
      x_data = (a >= mm - 1 && a < mm - 1 + nn) ? DW'(x[a - mm + 1]) : '0;
      @(posedge clk); #1;
    end
    x_we = 0;
    for (int j = 0; j < mm; j++) begin
      h_we = 1; h_addr = AW'(j); h_data = DW'(h[mm - 1 - j]);
      @(posedge clk); #1;
    end
    h_we = 0;
    n_len = AW'(nn); m = AW'(mm);
    wraps = 0;
    start = 1;
    @(posedge clk); #1 start = 0;
    issue_idx = 0;
    for (int k = 0; k < nn + mm - 1; k++)
      for (int j = 0; j < mm; j++) begin
        check(data_addr, k + j, $sformatf("N=%0d M=%0d data address k=%0d j=%0d", nn, mm, k, j));
        check(coeff_addr, j, "coefficient address");
        if (data_wrap) wraps++;
        @(posedge clk); #1;
      end
    while (!done) begin
      if (result_we) check(result_addr, -1, "no write after the last output expected here");
      @(posedge clk);
    end
    @(posedge clk); #1;
    check(op_clocks, (nn + mm - 1) * mm + 3, $sformatf("N=%0d M=%0d clock count", nn, mm));
    check(wraps, nn + mm - 1, "window step-backs");
    check(busy, 0, "idle after done");
    for (int k = 0; k < nn + mm - 1; k++) begin
      int e;
      e = 0;
      for (int i = 0; i < mm; i++) if (k - i >= 0 && k - i < nn) e += x[k - i] * h[i];
      y_raddr = AW'(k);
      @(posedge clk); #1;
      check(y_rdata, e, $sformatf("N=%0d M=%0d y(%0d)", nn, mm, k));
    end
  endtask

  initial begin
    rst = 1; start = 0; x_we = 0; h_we = 0; x_addr = '0; h_addr = '0;
    x_data = '0; h_data = '0; y_raddr = '0; n_len = '0; m = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run(5, 4);
    run(3, 2);
    for (int t = 0; t < 8; t++) run($urandom_range(1, 40), $urandom_range(2, 12));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
