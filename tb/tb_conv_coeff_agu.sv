// tb_conv_coeff_agu: checks the modulo-M coefficient generator: 0 1 .. M-1
// repeated.
// M runs from 2 to 7; en is paused at random and the address must hold.
module tb_conv_coeff_agu;
  localparam int AW = 8;
  logic clk = 0, rst, clr, en, wrap;
  logic [AW-1:0] m, addr;
  int checks = 0, failures = 0;

  conv_coeff_agu #(.ADDR_W(AW)) dut (.clk, .rst, .clr, .en, .m, .addr, .wrap);
  always #5 clk = ~clk;

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

  initial begin
    rst = 1; clr = 0; en = 0; m = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int mm = 2; mm <= 7; mm++) begin
      m = AW'(mm);
      clr = 1; @(posedge clk); #1; clr = 0;
      for (int i = 0; i < 12 * mm; i++) begin
        int k, j, e;
        k = i / mm;
        j = i % mm;
        e = j;
        check(addr, e, $sformatf("M=%0d step %0d", mm, i));
        check(wrap, j == mm - 1, $sformatf("M=%0d wrap at step %0d", mm, i));
        while ($urandom_range(0, 3) == 0) begin
          en = 0; @(posedge clk); #1;
          check(addr, e, "hold while en low");
        end
        en = 1; @(posedge clk); #1; en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
