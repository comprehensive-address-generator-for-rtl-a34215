// sdp_ram: memory with one write port and one synchronous read port.
//
// Used for the data, twiddle-factor, coefficient and result memories of the
// two kernels.  A write happens at the clock edge where we is high.  rdata
// is the word at raddr one clock after raddr is presented; if the same word
// is written in that clock, rdata returns the new value (write-first
// bypass), which lets an FFT stage read a result written in the same clock.
// The memory contents are not reset.  The document names the memories; the
// port arrangement and the bypass are this design's choices.
module sdp_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (we && (waddr == raddr)) rdata <= wdata;
    else                        rdata <= mem[raddr];
  end

endmodule
