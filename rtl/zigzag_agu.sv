// zigzag_agu: zig-zag scan address generator for an N x N array, N even.
//
// Produces the JPEG-style scan of a row-major N x N block, one address per
// enabled clock: for N = 4, 0 1 4 8 5 2 3 6 9 12 13 10 7 11 14 15.  A row
// counter and a column counter (both up/down) track the position; the
// address itself is kept by the usual adder and offset register, adding or
// subtracting a correction of 1, N or N-1:
//
//   move       correction  adder     counters
//   right      1 (cond1)   add       column up
//   down       N (cond2)   add       row up
//   down-left  N-1         add       row up, column down
//   up-right   N-1         subtract  row down, column up   (cond3)
//
// The scan runs up-right on even anti-diagonals (row + column even) and
// down-left on odd ones.  Up-right turns right on the top row and down on
// the last column; down-left turns down on the first column and right on
// the bottom row.  The counters, the correction rule and cond1..cond7 as
// names are the document's; what each condition tests is this design's,
// chosen to reproduce the published scan.  Interface: clr restarts at
// (0,0), en advances, n is the array size (even, 2 .. 2**(ADDR_W/2)), done
// is high at the last element (en is then ignored).  addr, row and col are
// registered.
module zigzag_agu
  import agu_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  localparam int unsigned RC_W  = ADDR_W / 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clr,
  input  logic              en,
  input  logic [RC_W:0]     n,
  output logic [ADDR_W-1:0] addr,
  output logic [RC_W-1:0]   row,
  output logic [RC_W-1:0]   col,
  output logic              move_right,  // cond1
  output logic              move_down,   // cond2 and not cond1
  output logic              move_up,     // cond3
  output logic              done
);

  logic [RC_W-1:0]   last;       // N-1
  logic              up_dir;     // on an even anti-diagonal: scanning up-right
  logic              at_top, at_bot, at_left, at_right;
  logic              cond1, cond2, cond3, cond4, cond5, cond6, cond7;
  logic              step;
  logic [ADDR_W-1:0] n_w, correction, next_addr;

  assign last     = RC_W'(n - 1'b1);
  assign n_w      = ADDR_W'(n);
  assign up_dir   = ~(row[0] ^ col[0]);
  assign at_top   = (row == '0);
  assign at_bot   = (row == last);
  assign at_left  = (col == '0);
  assign at_right = (col == last);
  assign done     = at_bot && at_right;
  assign step     = en && !done;

  // Control logic: boundary conditions
  assign cond1 = up_dir ? (at_top && !at_right) : at_bot;          // move right
  assign cond2 = up_dir ? at_right : (at_left && !at_bot);         // move down
  assign cond3 = up_dir && !at_top && !at_right;                    // up-right diagonal
  assign cond4 = cond1 || cond3;                                     // column up
  assign cond5 = !cond1 && !cond2 && !cond3;                         // column down
  assign cond6 = cond2 || cond5;                                     // row up
  assign cond7 = cond3;                                              // row down

  assign move_right = cond1;
  assign move_down  = cond2 && !cond1;
  assign move_up    = cond3;

  // Correction generate logic
  always_comb begin
    if (cond1)      correction = ADDR_W'(1);
    else if (cond2) correction = n_w;
    else            correction = n_w - 1'b1;
  end

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a   (addr),
    .b   (correction),
    .dir (CARRY_FORWARD),
    .op  (cond3 ? OP_SUB : OP_ADD),
    .y   (next_addr)
  );

  // Column and row up/down counters
  always_ff @(posedge clk) begin
    if (rst || clr) begin
      row <= '0;
      col <= '0;
    end else if (step) begin
      if (cond4)      col <= col + 1'b1;
      else if (cond5) col <= col - 1'b1;
      if (cond6)      row <= row + 1'b1;
      else if (cond7) row <= row - 1'b1;
    end
  end

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk (clk),
    .rst (rst),
    .clr (clr),
    .ld  (step),
    .d   (next_addr),
    .q   (addr)
  );

endmodule
