// agu_top: the address generation units and the two DSP kernels they drive.
//
// Four independent parts share only the clock and reset:
//   - fft_kernel:  N-point in-place DIF FFT (bit-reversed and twiddle address
//                  generators, butterfly datapath, optional bit-reverse
//                  reordering pass), N = 2**fft_log2n up to the memory
//                  size 2**FFT_LOG2N, N*log2(N) + 4 clocks;
//   - conv_kernel: convolution of up to 2**ADDR_W padded samples with an
//                  M-tap filter (sliding-window, modulo-M and divide-by-M
//                  address generators plus a MAC), (N+M-1)*M + 3 clocks;
//   - zigzag_agu:  zig-zag scan addresses for an N x N block;
//   - linear_agu:  linear / sequential-with-offset addresses.
// Each part's ports are brought out unchanged under a prefix (fft_, conv_,
// zz_, lin_); see the modules for their timing.  The split into these parts
// and their sizes follow the document's examples (8-point FFT, 8 + 8-bit
// complex samples); the address width of 8 bits is this design's choice.
module agu_top
  import agu_pkg::*;
#(
  parameter int unsigned ADDR_W    = 8,
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned FFT_LOG2N = 3,
  parameter int unsigned TW_FRAC   = 4,
  parameter int unsigned ACC_W     = 20,
  localparam int unsigned RC_W     = ADDR_W / 2
) (
  input  logic                     clk,
  input  logic                     rst,
  // FFT kernel
  input  logic [$clog2(FFT_LOG2N+1)-1:0] fft_log2n,
  input  logic                     fft_start,
  input  logic                     fft_rev_start,
  output logic                     fft_busy,
  output logic                     fft_done,
  input  logic                     fft_ld_we,
  input  logic [FFT_LOG2N-1:0]     fft_ld_addr,
  input  logic [2*DATA_W-1:0]      fft_ld_data,
  input  logic [FFT_LOG2N-1:0]     fft_ext_raddr,
  output logic [2*DATA_W-1:0]      fft_ext_rdata,
  input  logic                     fft_tw_we,
  input  logic [FFT_LOG2N-2:0]     fft_tw_addr,
  input  logic [2*DATA_W-1:0]      fft_tw_data,
  output logic [FFT_LOG2N-1:0]     fft_data_rd_addr,
  output logic [FFT_LOG2N-1:0]     fft_data_wr_addr,
  output logic                     fft_data_we,
  output logic [FFT_LOG2N-1:0]     fft_twiddle_addr,
  output logic                     fft_exchange,
  output logic                     fft_self_reversed,
  // convolution kernel
  input  logic                     conv_start,
  input  logic [ADDR_W-1:0]        conv_n_len,
  input  logic [ADDR_W-1:0]        conv_m,
  output logic                     conv_busy,
  output logic                     conv_done,
  input  logic                     conv_x_we,
  input  logic [ADDR_W-1:0]        conv_x_addr,
  input  logic signed [DATA_W-1:0] conv_x_data,
  input  logic                     conv_h_we,
  input  logic [ADDR_W-1:0]        conv_h_addr,
  input  logic signed [DATA_W-1:0] conv_h_data,
  input  logic [ADDR_W-1:0]        conv_y_raddr,
  output logic signed [ACC_W-1:0]  conv_y_rdata,
  output logic [ADDR_W-1:0]        conv_data_addr,
  output logic [ADDR_W-1:0]        conv_coeff_addr,
  output logic [ADDR_W-1:0]        conv_result_addr,
  output logic                     conv_result_we,
  output logic                     conv_data_wrap,
  // zig-zag address generator
  input  logic                     zz_clr,
  input  logic                     zz_en,
  input  logic [RC_W:0]            zz_n,
  output logic [ADDR_W-1:0]        zz_addr,
  output logic                     zz_move_right,
  output logic                     zz_move_down,
  output logic                     zz_move_up,
  output logic                     zz_done,
  // linear address generator
  input  logic                     lin_load,
  input  logic [ADDR_W-1:0]        lin_start_addr,
  input  logic [ADDR_W-1:0]        lin_modifier,
  input  logic                     lin_sub,
  input  logic                     lin_en,
  output logic [ADDR_W-1:0]        lin_addr
);

  fft_kernel #(.LOG2N(FFT_LOG2N), .DATA_W(DATA_W), .TW_FRAC(TW_FRAC)) u_fft (
    .clk, .rst,
    .log2n(fft_log2n), .start(fft_start), .rev_start(fft_rev_start), .busy(fft_busy), .done(fft_done),
    .ld_we(fft_ld_we), .ld_addr(fft_ld_addr), .ld_data(fft_ld_data),
    .ext_raddr(fft_ext_raddr), .ext_rdata(fft_ext_rdata),
    .tw_we(fft_tw_we), .tw_addr(fft_tw_addr), .tw_data(fft_tw_data),
    .data_rd_addr(fft_data_rd_addr), .data_wr_addr(fft_data_wr_addr),
    .data_we(fft_data_we), .twiddle_addr(fft_twiddle_addr),
    .exchange(fft_exchange), .self_reversed(fft_self_reversed)
  );

  conv_kernel #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_conv (
    .clk, .rst,
    .start(conv_start), .n_len(conv_n_len), .m(conv_m),
    .busy(conv_busy), .done(conv_done),
    .x_we(conv_x_we), .x_addr(conv_x_addr), .x_data(conv_x_data),
    .h_we(conv_h_we), .h_addr(conv_h_addr), .h_data(conv_h_data),
    .y_raddr(conv_y_raddr), .y_rdata(conv_y_rdata),
    .data_addr(conv_data_addr), .coeff_addr(conv_coeff_addr),
    .result_addr(conv_result_addr), .result_we(conv_result_we),
    .data_wrap(conv_data_wrap)
  );

  zigzag_agu #(.ADDR_W(ADDR_W)) u_zz (
    .clk, .rst, .clr(zz_clr), .en(zz_en), .n(zz_n),
    .addr(zz_addr), .row(), .col(),
    .move_right(zz_move_right), .move_down(zz_move_down), .move_up(zz_move_up),
    .done(zz_done)
  );

  linear_agu #(.ADDR_W(ADDR_W)) u_lin (
    .clk, .rst, .load(lin_load), .start_addr(lin_start_addr),
    .modifier(lin_modifier), .op(lin_sub ? OP_SUB : OP_ADD), .en(lin_en),
    .addr(lin_addr)
  );

endmodule
