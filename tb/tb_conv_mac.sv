// tb_conv_mac: random signed products accumulated in groups of random
// length, clearing with the first product of each group, against an
// integer model; en low must hold the accumulator.
module tb_conv_mac;
  localparam int DW = 8, AW = 20;
  logic clk = 0, rst, en, clr_acc;
  logic signed [DW-1:0] x, h;
  logic signed [AW-1:0] acc;
  int checks = 0, failures = 0;
  longint model;

  conv_mac #(.DATA_W(DW), .ACC_W(AW)) dut (.clk, .rst, .en, .clr_acc, .x, .h, .acc);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; clr_acc = 0; x = 0; h = 0; model = 0;
    @(posedge clk); #1 rst = 0;
    checks++; if (acc !== 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 3000; i++) begin
      en = $urandom_range(0, 4) != 0;
      clr_acc = $urandom_range(0, 5) == 0;
      x = DW'($urandom); h = DW'($urandom);
      @(posedge clk); #1;
      if (en) model = (clr_acc ? 0 : model) + longint'(x) * longint'(h);
      checks++;
      if (acc !== AW'(model)) begin
        failures++; $display("FAIL step %0d: %0d vs %0d", i, acc, AW'(model));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
