// tb_bf_br_add_sub: checks the address adder/subtractor in both carry
// directions against an integer model.  Forward: (a +/- b) mod 2**W.
// Bit-reversed: the same on the bit-reversed operands, bit-reversed back.
// Also checks steps of the 8-point FFT sequence (0 +br 4 = 4, 4 +br 4 = 2,
// 3 +br 6 = 4 for W = 3).
module tb_bf_br_add_sub;
  import agu_pkg::*;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  carry_dir_e dir;
  addsub_op_e op;
  int checks = 0, failures = 0;

  logic [2:0] a3, b3, y3;
  bf_br_add_sub #(.W(W)) dut (.a, .b, .dir, .op, .y);
  bf_br_add_sub #(.W(3)) dut3 (.a(a3), .b(b3), .dir(CARRY_BITREV), .op(OP_ADD), .y(y3));

  function automatic logic [W-1:0] rev(input logic [W-1:0] v);
    for (int i = 0; i < W; i++) rev[i] = v[W-1-i];
  endfunction

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e;
    for (int i = 0; i < 2000; i++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      dir = carry_dir_e'($urandom_range(0, 1));
      op  = addsub_op_e'($urandom_range(0, 1));
      #1;
      if (dir == CARRY_FORWARD) e = (op == OP_ADD) ? a + b : a - b;
      else                      e = rev((op == OP_ADD) ? rev(a) + rev(b) : rev(a) - rev(b));
      check(y, e, $sformatf("a=%0d b=%0d dir=%0d op=%0d", a, b, dir, op));
    end
    // examples from the 8-point FFT sequence
    a3 = 3'd0; b3 = 3'd4; #1; checks++; if (y3 != 3'd4) begin failures++; $display("FAIL 0+br4"); end
    a3 = 3'd4; b3 = 3'd4; #1; checks++; if (y3 != 3'd2) begin failures++; $display("FAIL 4+br4"); end
    a3 = 3'd3; b3 = 3'd6; #1; checks++; if (y3 != 3'd4) begin failures++; $display("FAIL 3+br6"); end
    a3 = 3'd5; b3 = 3'd5; #1; checks++; if (y3 != 3'd2) begin failures++; $display("FAIL 5+br5"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
