// twiddle_agu: twiddle-factor address generator for an N-point DIF FFT.
//
// One address per enabled clock, one clock per butterfly, in step with the
// butterfly order of br_agu.  For N = 8 the sequence is 0 2 1 3 | 0 2 0 2 |
// 0 0 0 0: within a stage the twiddle index counts in bit-reversed order by
// adding N/4 with a reverse carry, and goes back to 0 after NN butterflies,
// where NN (the SRL register) is N/2 in the first stage and halves every
// stage.  Two 1-based counters follow the position: the NN counter inside a
// group of equal stride, the N/2 counter inside the stage.
//
//   correction_select = (NNcnt == NN) | NN[0] | (NN[1] & (N2cnt == N/2) & (NNcnt == NN))
//   correction_select ? addr - addr (i.e. 0) : addr +br N/4
//   (NNcnt == NN) & (N2cnt == N/2): shift SRL right (next stage)
//
// The algorithm, the counters and correction_select are the document's; the
// last two terms of correction_select are already covered by the first and
// are kept as given.  Interface: init (one clock) loads both counters with 1,
// SRL with n_half and clears the address; en advances one butterfly; done is
// high once SRL is zero.  n_quarter must be n_half / 2.  addr is registered.
module twiddle_agu
  import agu_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] n_half,
  input  logic [ADDR_W-1:0] n_quarter,
  output logic [ADDR_W-1:0] addr,
  output logic              group_end,
  output logic              done
);

  logic [ADDR_W-1:0] srl;       // NN
  logic [ADDR_W-1:0] nby2_cnt;  // position inside the stage, 1..N/2
  logic [ADDR_W-1:0] nn_cnt;    // position inside the group, 1..NN
  logic              nn_end, stage_end, corr_sel, step;
  logic [ADDR_W-1:0] correction, next_addr;

  assign done      = (srl == '0);
  assign step      = en && !done;
  assign nn_end    = (nn_cnt == srl);
  assign stage_end = (nby2_cnt == n_half);
  assign corr_sel  = nn_end || srl[0] || (srl[1] && stage_end && nn_end);
  assign group_end = corr_sel;
  assign correction = corr_sel ? addr : n_quarter;

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a   (addr),
    .b   (correction),
    .dir (CARRY_BITREV),
    .op  (corr_sel ? OP_SUB : OP_ADD),
    .y   (next_addr)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      srl      <= '0;
      nby2_cnt <= ADDR_W'(1);
      nn_cnt   <= ADDR_W'(1);
    end else if (init) begin
      srl      <= n_half;
      nby2_cnt <= ADDR_W'(1);
      nn_cnt   <= ADDR_W'(1);
    end else if (step) begin
      if (nn_end && stage_end) srl <= srl >> 1;
      nn_cnt   <= nn_end    ? ADDR_W'(1) : nn_cnt + 1'b1;
      nby2_cnt <= stage_end ? ADDR_W'(1) : nby2_cnt + 1'b1;
    end
  end

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk (clk),
    .rst (rst),
    .clr (init),
    .ld  (step),
    .d   (next_addr),
    .q   (addr)
  );

endmodule
