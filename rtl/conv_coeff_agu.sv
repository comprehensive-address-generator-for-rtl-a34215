// conv_coeff_agu: coefficient-fetch address generator of the convolution
// kernel (modulo-M / circular addressing).
//
// The impulse response is stored in reverse order at addresses 0..M-1 and
// is read once per output: 0 1 .. M-1 0 1 .. M-1 ...  Same structure as
// conv_data_agu: a counter runs 0..M-1; at M-1 the correction is M-1 and the
// adder subtracts (back to the base), otherwise it adds 1.  The document
// describes this generator as the data-fetch one with a different end
// correction; the schematic-level details are this design's reading of that.
// addr is registered and starts at 0 after rst or clr.
module conv_coeff_agu
  import agu_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clr,   // synchronous restart: counter and address to 0
  input  logic              en,    // Addr_Gen_En
  input  logic [ADDR_W-1:0] m,     // number of taps M (M >= 2)
  output logic [ADDR_W-1:0] addr,
  output logic              wrap   // counter is at M-1: this step applies the end correction
);

  logic [ADDR_W-1:0] cnt;
  logic [ADDR_W-1:0] correction, next_addr;

  // Comparator against M-1; its output also selects the correction and the
  // adder's operation.
  assign wrap       = (cnt == m - 1'b1);
  assign correction = wrap ? m - ADDR_W'(1) : ADDR_W'(1);

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a   (addr),
    .b   (correction),
    .dir (CARRY_FORWARD),
    .op  (wrap ? OP_SUB : OP_ADD),
    .y   (next_addr)
  );

  // Up counter, loaded with 0 when it reaches M-1.
  always_ff @(posedge clk) begin
    if (rst || clr)   cnt <= '0;
    else if (en)      cnt <= wrap ? '0 : cnt + 1'b1;
  end

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk (clk),
    .rst (rst),
    .clr (clr),
    .ld  (en),
    .d   (next_addr),
    .q   (addr)
  );

endmodule
