// tb_zigzag_agu: compares the zig-zag generator with a reference scan for
// N = 2, 4, 6, 8, 10, 16.  The reference walks anti-diagonal d = row + col
// from 0 to 2N-2, upwards (row falling) on even d and downwards on odd d.
// Also checks the 4 x 4 sequence printed in the document's figure, that
// done rises exactly at the last element, the move flags, and that pauses
// of en hold the address.
module tb_zigzag_agu;
  localparam int AW = 8;
  localparam int RC = AW / 2;
  logic clk = 0, rst, clr, en;
  logic [RC:0] n;
  logic [AW-1:0] addr;
  logic [RC-1:0] row, col;
  logic move_right, move_down, move_up, done;
  int checks = 0, failures = 0;
  int n_right = 0, n_down = 0, n_up = 0, n_dl = 0;

  zigzag_agu #(.ADDR_W(AW)) dut (.clk, .rst, .clr, .en, .n, .addr, .row, .col,
                                 .move_right, .move_down, .move_up, .done);
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

  int fig7[16] = '{0,1,4,8,5,2,3,6,9,12,13,10,7,11,14,15};
  int sizes[6] = '{4, 2, 6, 8, 10, 16};

  initial begin
    rst = 1; clr = 0; en = 0; n = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    foreach (sizes[si]) begin
      int nn, idx;
      int seq[$];
      nn = sizes[si];
      seq.delete();
      for (int d = 0; d <= 2 * nn - 2; d++) begin
        int lo, hi;
        lo = (d - nn + 1 > 0) ? d - nn + 1 : 0;
        hi = (d < nn - 1) ? d : nn - 1;
        if (d % 2 == 0) for (int r = hi; r >= lo; r--) seq.push_back(r * nn + (d - r));
        else            for (int r = lo; r <= hi; r++) seq.push_back(r * nn + (d - r));
      end
      n = (RC+1)'(nn);
      clr = 1; @(posedge clk); #1; clr = 0;
      for (idx = 0; idx < nn * nn; idx++) begin
        check(addr, seq[idx], $sformatf("N=%0d index %0d", nn, idx));
        if (nn == 4) check(addr, fig7[idx], "4x4 figure sequence");
        check(row * nn + col, seq[idx], "row/column counters");
        check(done, idx == nn * nn - 1, $sformatf("N=%0d done at %0d", nn, idx));
        if (idx < nn * nn - 1) begin
          int r0, c0, r1, c1;
          r0 = seq[idx] / nn; c0 = seq[idx] % nn;
          r1 = seq[idx + 1] / nn; c1 = seq[idx + 1] % nn;
          check(move_right, r1 == r0 && c1 == c0 + 1, "move_right flag");
          check(move_down, r1 == r0 + 1 && c1 == c0, "move_down flag");
          check(move_up, r1 == r0 - 1, "move_up flag");
          if (r1 == r0) n_right++;
          else if (c1 == c0) n_down++;
          else if (r1 < r0) n_up++;
          else n_dl++;
        end
        while ($urandom_range(0, 4) == 0) begin
          en = 0; @(posedge clk); #1;
          check(addr, seq[idx], "hold while en low");
        end
        en = 1; @(posedge clk); #1; en = 0;
      end
      // en is ignored once done
      check(addr, seq[nn * nn - 1], "stays at the last element");
    end
    checks++;
    if (n_right == 0 || n_down == 0 || n_up == 0 || n_dl == 0) begin
      failures++; $display("FAIL a move type never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
