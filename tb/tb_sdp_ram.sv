// tb_sdp_ram: random writes and reads against an array model, including
// reads of the word written in the same clock (new data expected).
module tb_sdp_ram;
  localparam int W = 16, D = 8;
  logic clk = 0, we;
  logic [2:0] waddr, raddr;
  logic [W-1:0] wdata, rdata, exp_q;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0, bypass = 0;

  sdp_ram #(.W(W), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int i = 0; i < D; i++) begin
      waddr = 3'(i); wdata = W'($urandom); raddr = '0; model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 2000; i++) begin
      we = $urandom_range(0, 1); waddr = 3'($urandom); wdata = W'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 3'($urandom);
      exp_q = (we && waddr == raddr) ? wdata : model[raddr];
      if (we && waddr == raddr) bypass++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++; $display("FAIL step %0d: %0h vs %0h", i, rdata, exp_q);
      end
    end
    checks++; if (bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
