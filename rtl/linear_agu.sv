// linear_agu: the basic modifier address generator (linear and sequential
// with offset addressing).
//
// Every enabled clock the offset register is replaced by itself plus or
// minus the modifier register: start, start+d, start+2d, ...  load (one
// clock) stores the start address in the offset register and the step in
// the modifier register; op selects add or subtract; the carry runs forward.
// The modifier, adder/subtractor and offset register are the general scheme
// the document starts from; the load interface is this design's choice.
// addr is registered.
module linear_agu
  import agu_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [ADDR_W-1:0] start_addr,
  input  logic [ADDR_W-1:0] modifier,
  input  addsub_op_e        op,
  input  logic              en,
  output logic [ADDR_W-1:0] addr
);

  logic [ADDR_W-1:0] mod_q, next_addr;

  always_ff @(posedge clk) begin
    if (rst)       mod_q <= '0;
    else if (load) mod_q <= modifier;
  end

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a   (addr),
    .b   (mod_q),
    .dir (CARRY_FORWARD),
    .op  (op),
    .y   (next_addr)
  );

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk (clk),
    .rst (rst),
    .clr (1'b0),
    .ld  (load || en),
    .d   (load ? start_addr : next_addr),
    .q   (addr)
  );

endmodule
