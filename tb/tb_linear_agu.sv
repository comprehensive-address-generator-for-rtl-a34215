// tb_linear_agu: loads random start addresses and modifiers and checks the
// address sequence start +/- k*modifier (mod 2**8), with random pauses.
module tb_linear_agu;
  import agu_pkg::*;
  localparam int AW = 8;
  logic clk = 0, rst, load, en;
  logic [AW-1:0] start_addr, modifier, addr, model;
  addsub_op_e op;
  int checks = 0, failures = 0;

  linear_agu #(.ADDR_W(AW)) dut (.clk, .rst, .load, .start_addr, .modifier, .op, .en, .addr);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; en = 0; start_addr = '0; modifier = '0; op = OP_ADD;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 40; t++) begin
      logic [AW-1:0] m_q;
      start_addr = AW'($urandom); modifier = AW'($urandom_range(0, 9));
      m_q = modifier;
      load = 1; @(posedge clk); #1; load = 0;
      model = start_addr;
      modifier = AW'($urandom);   // must not matter after the load
      for (int i = 0; i < 20; i++) begin
        checks++;
        if (addr !== model) begin
          failures++; $display("FAIL test %0d step %0d: %0d vs %0d", t, i, addr, model);
        end
        op = addsub_op_e'($urandom_range(0, 1));
        en = $urandom_range(0, 3) != 0;
        @(posedge clk); #1;
        if (en) model = (op == OP_SUB) ? model - m_q : model + m_q;
        en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
