// tb_offset_addr_reg: random reset / clear / load / hold sequence against a
// model of the register (reset and clear win over load).
module tb_offset_addr_reg;
  localparam int W = 8;
  logic clk = 0, rst, clr, ld;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  offset_addr_reg #(.W(W)) dut (.clk, .rst, .clr, .ld, .d, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; ld = 0; d = '0; model = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      rst = ($urandom_range(0, 30) == 0);
      clr = ($urandom_range(0, 10) == 0);
      ld  = $urandom_range(0, 1);
      d   = W'($urandom);
      @(posedge clk);
      if (rst || clr) model = '0;
      else if (ld)    model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d: q=%0d expected %0d", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
