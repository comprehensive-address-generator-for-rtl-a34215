// bf_br_add_sub: address adder/subtractor with selectable carry direction.
//
// y = a + b or y = a - b, computed as a + (b ^ {W{sub}}) + sub by a ripple
// chain.  With dir = CARRY_FORWARD the carry ripples from bit 0 upwards, as
// in any binary adder.  With dir = CARRY_BITREV the carry enters at bit W-1
// and ripples down towards bit 0; the carry out of bit 0 is lost.  Adding N/2
// to an address this way steps through the addresses in bit-reversed order,
// which is what the FFT address generators rely on.  Subtracting with the
// reversed carry is the same trick: a - a gives zero in either direction.
//
// Purely combinational.  The name and the two control inputs (Bf_Br_bar,
// Add_bar_Sub) follow the schematics; the ripple structure is this design's
// choice.
module bf_br_add_sub
  import agu_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  carry_dir_e   dir,   // Bf_Br_bar: 1 forward, 0 bit-reversed
  input  addsub_op_e   op,    // Add_bar_Sub: 0 add, 1 subtract
  output logic [W-1:0] y
);

  logic [W-1:0] b_eff;
  logic         cin;

  assign cin   = (op == OP_SUB);
  assign b_eff = b ^ {W{cin}};

  always_comb begin
    logic c;
    c = cin;
    y = '0;
    if (dir == CARRY_FORWARD) begin
      for (int i = 0; i < W; i++) begin
        y[i] = a[i] ^ b_eff[i] ^ c;
        c    = (a[i] & b_eff[i]) | (c & (a[i] ^ b_eff[i]));
      end
    end else begin
      for (int i = W - 1; i >= 0; i--) begin
        y[i] = a[i] ^ b_eff[i] ^ c;
        c    = (a[i] & b_eff[i]) | (c & (a[i] ^ b_eff[i]));
      end
    end
  end

endmodule
