// br_agu: bit-reversed butterfly address generator for a radix-2 FFT.
//
// One address per enabled clock, covering all log2(N) stages of an in-place
// N-point FFT.  Within a stage the two operands of a butterfly come out on
// consecutive clocks (for N = 8: 0 4 2 6 1 5 3 7 | 0 2 1 3 4 6 5 7 |
// 0 1 4 5 2 3 6 7).  The next address is the current one plus a correction,
// added with the carry running from MSB to LSB (bf_br_add_sub):
//
//   correction = ((SRA | addr) == all ones) ? (N/2 | SRL) : SRL
//   if ((mask | addr) == all ones)   end of stage: shift SRA and SRL right,
//                                     next address = 0
//   else                              next address = addr +br correction
//
// SRL starts at N/2 and is shifted right logically after each stage, so it
// holds the butterfly distance of the current stage and reaches zero after
// the last stage (done).  SRA starts at the mask and is shifted right
// arithmetically, so it gains one leading one per stage; it tells when the
// reverse carry of the plain SRL step has run out of the sub-partition and
// the N/2 bit has to be added back in.  mask has ones in the address bits
// at and above log2(N) (zero when N = 2**ADDR_W).
//
// The algorithm and its two shift registers are those of the document.  This
// design adds a guard bit above SRA, loaded with 1, so that the arithmetic
// shift brings in ones even when the mask is all zeros; it is not part of
// the compared value.  Interface: init (one clock) loads SRA = {1, mask},
// SRL = n_half and clears the address; en (Addr_Gen_En) advances it.  addr
// is registered.  last_in_stage flags the final address of a stage,
// corr_n2 flags a step where the N/2 bit is added to the correction, and
// done is high once SRL is zero (en is then ignored).  Supports N >= 4.
module br_agu
  import agu_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] mask,
  input  logic [ADDR_W-1:0] n_half,
  output logic [ADDR_W-1:0] addr,
  output logic              last_in_stage,
  output logic              corr_n2,
  output logic              done
);

  logic [ADDR_W:0]   sra;     // guard bit + shift-right-arithmetic register
  logic [ADDR_W-1:0] srl;     // shift-right-logical register
  logic [ADDR_W-1:0] correction;
  logic [ADDR_W-1:0] next_addr;
  logic              step;

  assign done          = (srl == '0);
  assign step          = en && !done;
  assign last_in_stage = ((mask | addr) == '1);
  assign corr_n2       = ((sra[ADDR_W-1:0] | addr) == '1);
  assign correction    = corr_n2 ? (n_half | srl) : srl;

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a   (addr),
    .b   (correction),
    .dir (CARRY_BITREV),
    .op  (OP_ADD),
    .y   (next_addr)
  );

  // Shift control logic
  always_ff @(posedge clk) begin
    if (rst) begin
      sra <= '0;
      srl <= '0;
    end else if (init) begin
      sra <= {1'b1, mask};
      srl <= n_half;
    end else if (step && last_in_stage) begin
      sra <= {sra[ADDR_W], sra[ADDR_W:1]};
      srl <= srl >> 1;
    end
  end

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk (clk),
    .rst (rst),
    .clr (init || (step && last_in_stage)),
    .ld  (step),
    .d   (next_addr),
    .q   (addr)
  );

endmodule
