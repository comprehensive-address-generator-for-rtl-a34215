// offset_addr_reg: the offset address register at the end of every address
// generator.
//
// It holds the effective address put on the memory bus.  A synchronous reset
// (rst) or clear request (clr) sets it to zero; otherwise it loads d on every
// clock edge where ld (Addr_Gen_En) is high and holds its value when ld is
// low.  clr has priority over ld; the bit-reversed generator uses it to
// return to address 0 at the end of an FFT stage.  Addr_Gen_En drives
// the register's load input, as in the schematics; the clock runs freely.
module offset_addr_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst || clr) q <= '0;
    else if (ld)    q <= d;
  end

endmodule
