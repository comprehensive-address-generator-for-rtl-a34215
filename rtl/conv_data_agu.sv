// conv_data_agu: data-fetch address generator of the convolution kernel.
//
// The input samples are stored with M-1 zeros padded at both ends, and
// output y(k) needs the M samples at addresses k .. k+M-1.  The generator
// walks such a window one address per enabled clock and then steps back
// by M-2 to start the next window one place further on: for M = 4,
// 0 1 2 3 1 2 3 4 2 3 4 5 ...  A counter runs 0..M-1; when it reaches M-1
// the correction becomes M-2 and the adder subtracts, otherwise it adds 1.
// This follows the document's algorithm and schematic.  en (Addr_Gen_En) is
// the offset register's load enable and also advances the counter.
// addr is registered and starts at 0 after rst or clr.
module conv_data_agu
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
  assign correction = wrap ? m - ADDR_W'(2) : ADDR_W'(1);

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
