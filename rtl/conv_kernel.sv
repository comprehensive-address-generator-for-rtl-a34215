// conv_kernel: linear convolution y = x * h driven by three address
// generators.
//
// N input samples are convolved with an M-tap impulse response into N+M-1
// outputs, one multiply-accumulate per clock.  The data memory holds x
// padded with M-1 zeros at both ends (x(0) at address M-1); the coefficient
// memory holds h in reverse order (h(M-1) at address 0).  Output y(k) is
// then the dot product of data words k .. k+M-1 with coefficient words
// 0 .. M-1.  conv_data_agu walks the data window, conv_coeff_agu the
// coefficients (modulo M) and conv_result_agu the output address
// (divide-by-M); the outputs go to a separate result memory.  Pipeline:
//
//   c    data and coefficient addresses issued
//   c+1  words arrive, multiply-accumulate (accumulator cleared with the
//        first tap of each output)
//   c+2  after the last tap, the output is written at the result address
//
// The result generator is enabled two clocks after the other two, so that
// it points at output k while output k is written.  One run takes
// (N+M-1)*M + 3 clocks from the start clock to the last write inclusive
// (35 for N = 5, M = 4): one clock to clear the generators,
// (N+M-1)*M issue clocks and two to drain.  The memory layout, the three
// address sequences and the clock count follow the document; the separate
// result memory, the handshake and the widths are this design's choices.
//
// Interface: while idle (busy low) the data memory is loaded through
// x_we/x_addr/x_data, the coefficient memory through h_we/h_addr/h_data, and
// the results are read through y_raddr/y_rdata (one clock latency).  n_len
// and m must be held from start to done; M >= 2, and the padded data
// (N + 2M - 2 words) must fit in the 2**ADDR_W-word data memory.  start is
// one clock; done pulses with the last write.
module conv_kernel
  import agu_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 20,
  localparam int unsigned DEPTH = 1 << ADDR_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [ADDR_W-1:0]        n_len,
  input  logic [ADDR_W-1:0]        m,
  output logic                     busy,
  output logic                     done,
  input  logic                     x_we,
  input  logic [ADDR_W-1:0]        x_addr,
  input  logic signed [DATA_W-1:0] x_data,
  input  logic                     h_we,
  input  logic [ADDR_W-1:0]        h_addr,
  input  logic signed [DATA_W-1:0] h_data,
  input  logic [ADDR_W-1:0]        y_raddr,
  output logic signed [ACC_W-1:0]  y_rdata,
  // address buses, for observation
  output logic [ADDR_W-1:0]        data_addr,
  output logic [ADDR_W-1:0]        coeff_addr,
  output logic [ADDR_W-1:0]        result_addr,
  output logic                     result_we,
  output logic                     data_wrap     // data generator stepped back by M-2
);

  logic              run, issue, clr;
  logic [ADDR_W-1:0] outs_left;          // outputs still to be issued
  logic [2:1]        v;                  // issue valid delayed by 1..2 clocks
  logic              first_d1, last_d1, last_d2;
  logic              coeff_wrap, res_en;
  logic signed [DATA_W-1:0] x_rd, h_rd;
  logic signed [ACC_W-1:0]  acc;

  assign clr   = start && !busy;
  assign issue = run;

  conv_data_agu #(.ADDR_W(ADDR_W)) u_data_agu (
    .clk, .rst, .clr, .en(issue), .m, .addr(data_addr), .wrap(data_wrap)
  );

  conv_coeff_agu #(.ADDR_W(ADDR_W)) u_coeff_agu (
    .clk, .rst, .clr, .en(issue), .m, .addr(coeff_addr), .wrap(coeff_wrap)
  );

  assign res_en = v[2];

  conv_result_agu #(.ADDR_W(ADDR_W)) u_res_agu (
    .clk, .rst, .clr, .en(res_en), .m, .addr(result_addr), .wrap()
  );

  // Sequencing: outs_left counts the outputs whose taps are still to be issued.
  always_ff @(posedge clk) begin
    if (rst) begin
      run       <= 1'b0;
      outs_left <= '0;
      busy      <= 1'b0;
      v         <= '0;
      first_d1  <= 1'b0;
      last_d1   <= 1'b0;
      last_d2   <= 1'b0;
    end else begin
      v        <= {v[1], issue};
      first_d1 <= issue && (coeff_addr == '0);
      last_d1  <= issue && coeff_wrap;
      last_d2  <= last_d1;
      if (clr) begin
        run       <= 1'b1;
        busy      <= 1'b1;
        outs_left <= n_len + m - 1'b1;
      end else begin
        if (issue && coeff_wrap) begin
          outs_left <= outs_left - 1'b1;
          if (outs_left == ADDR_W'(1)) run <= 1'b0;
        end
        if (done) busy <= 1'b0;
      end
    end
  end

  sdp_ram #(.W(DATA_W), .DEPTH(DEPTH)) u_x_mem (
    .clk, .we(x_we && !busy), .waddr(x_addr), .wdata(x_data),
    .raddr(data_addr), .rdata(x_rd)
  );

  sdp_ram #(.W(DATA_W), .DEPTH(DEPTH)) u_h_mem (
    .clk, .we(h_we && !busy), .waddr(h_addr), .wdata(h_data),
    .raddr(coeff_addr), .rdata(h_rd)
  );

  conv_mac #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst, .en(v[1]), .clr_acc(first_d1), .x(x_rd), .h(h_rd), .acc
  );

  assign result_we = last_d2;
  assign done      = last_d2 && !run && !v[1];

  sdp_ram #(.W(ACC_W), .DEPTH(DEPTH)) u_y_mem (
    .clk, .we(result_we), .waddr(result_addr), .wdata(acc),
    .raddr(y_raddr), .rdata(y_rdata)
  );

endmodule
