// fft_kernel: in-place N-point radix-2 DIF FFT driven by the address
// generators.
//
// Data memory (N complex words), twiddle memory (N/2 words, precomputed and
// loaded from outside) and one butterfly datapath.  A read br_agu issues
// one data address per clock, so the two operands of a butterfly are read on
// consecutive clocks and one butterfly completes every two clocks.  A
// twiddle_agu steps once per butterfly.  A second br_agu, started three
// clocks later, produces the same address sequence for the write-back of
// the two results.  Pipeline per butterfly (c0 = clock of the first read):
//
//   c0  read address of a        c1  read address of b, twiddle address,
//                                    a arrives and is held
//   c2  b and w arrive, butterfly computed, results registered
//   c3  write a + b              c4  write (a - b) * w
//
// A whole transform therefore takes N*log2(N) + 4 clocks from the start
// clock to the last write inclusive (28 for N = 8): one clock to initialise
// the generators, N*log2(N) read clocks and three to drain the pipeline.
// The result is left in bit-reversed order, as is normal for DIF; rev_start
// then runs the reordering pass (see below).  The document gives the three
// address generators, the two-clock butterfly rate and the clock count; the
// pipeline, the memory ports and the handshake are this design's.
//
// Reordering: rev_start steps a linear counter i and a br_agu held in its
// first stage, which yields bitrev(i).  If the two are equal (a self-reversed
// address) nothing is done; the pair is also skipped when i > bitrev(i),
// since it was exchanged already.  Otherwise both words are read and written
// back exchanged (four clocks per exchanged pair, one per skipped address).
//
// Size: the memories hold 2**LOG2N words; each transform has its own size
// N = 2**log2n (4 <= N <= 2**LOG2N), which is loaded into the generators at
// start as N/2 and as the mask of unused address bits, so one kernel runs any
// power-of-two size up to its memory size (loading mask and N/2 at
// initialisation follows the document; the log2n input is this design's).
// log2n must be held from start
// to done, and the twiddle memory must hold W_N^k for that N.
//
// Interface: while the kernel is idle (busy low) the data memory is loaded
// through ld_we/ld_addr/ld_data and read through ext_raddr/ext_rdata (one
// clock latency); the twiddle memory is loaded through tw_we/tw_addr/tw_data
// (word k = W_N^k in Q(TW_FRAC)).  start or rev_start (one clock) begin an
// operation; done pulses in its final clock.  Samples are {re, im}.
module fft_kernel
  import agu_pkg::*;
#(
  parameter int unsigned LOG2N   = 3,
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned TW_FRAC = 4,
  localparam int unsigned N      = 1 << LOG2N,
  localparam int unsigned SW     = 2 * DATA_W,
  localparam int unsigned LW     = $clog2(LOG2N + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [LW-1:0]    log2n,   // size of this transform: 2 <= log2n <= LOG2N
  input  logic             start,
  input  logic             rev_start,
  output logic             busy,
  output logic             done,
  // data memory load and readout (when idle)
  input  logic             ld_we,
  input  logic [LOG2N-1:0] ld_addr,
  input  logic [SW-1:0]    ld_data,
  input  logic [LOG2N-1:0] ext_raddr,
  output logic [SW-1:0]    ext_rdata,
  // twiddle memory load
  input  logic             tw_we,
  input  logic [LOG2N-2:0] tw_addr,
  input  logic [SW-1:0]    tw_data,
  // address buses, for observation
  output logic [LOG2N-1:0] data_rd_addr,
  output logic [LOG2N-1:0] data_wr_addr,
  output logic             data_we,
  output logic [LOG2N-1:0] twiddle_addr,
  output logic             exchange,     // a reordering exchange is in progress
  output logic             self_reversed // reordering skipped a self-reversed address
);

  // Run-time size: N/2 and N/4 for the shift registers, and the mask with
  // ones in the address bits that this transform does not use.
  logic [LOG2N:0]   n_cur;
  logic [LOG2N-1:0] n_half, n_quarter, n_mask;

  assign n_cur     = (LOG2N+1)'(1) << log2n;
  assign n_half    = LOG2N'(n_cur >> 1);
  assign n_quarter = LOG2N'(n_cur >> 2);
  assign n_mask    = ~LOG2N'(n_cur - 1'b1);

  typedef enum logic [2:0] {
    S_IDLE, S_FFT, S_REV_CMP, S_REV_RD2, S_REV_WR1, S_REV_WR2
  } state_e;

  state_e           state;
  logic             rev_start_ok, rev_step;
  logic [LOG2N-1:0] lin_cnt, rev_addr, r_q;
  logic [SW-1:0]    rev_a;
  logic             lin_last;

  // ---------------------------------------------------------------- FFT part
  logic             rd_init, rd_en, rd_done;
  logic [LOG2N-1:0] rd_addr;
  logic             wr_init, wr_en;
  logic [LOG2N-1:0] wr_addr;
  logic             tw_en;
  logic [SW-1:0]    rdata, tw_rdata, a_q, x_d, y_d, x_q, y_q;
  logic [3:1]       v;          // issue valid delayed by 1..3 clocks
  logic [3:0]       ph;         // operand phase (0 = a, 1 = b) delayed by 0..3 clocks
  logic [2:0]       init_d;     // start delayed by 1..3 clocks
  logic             issue;
  logic             fft_last;   // clock of the last write-back

  assign fft_last = (state == S_FFT) && v[3] && !v[2] && !issue;

  assign rd_init = start && (state == S_IDLE);
  assign issue   = (state == S_FFT) && !rd_done;
  assign rd_en   = issue;
  assign tw_en   = issue && ph[0];
  assign wr_init = init_d[2];
  assign wr_en   = v[3];

  br_agu #(.ADDR_W(LOG2N)) u_rd_agu (
    .clk, .rst, .init(rd_init || rev_start_ok), .en(rd_en || rev_step),
    .mask(n_mask), .n_half(n_half),
    .addr(rd_addr), .last_in_stage(), .corr_n2(), .done(rd_done)
  );

  twiddle_agu #(.ADDR_W(LOG2N)) u_tw_agu (
    .clk, .rst, .init(rd_init), .en(tw_en),
    .n_half(n_half), .n_quarter(n_quarter),
    .addr(twiddle_addr), .group_end(), .done()
  );

  br_agu #(.ADDR_W(LOG2N)) u_wr_agu (
    .clk, .rst, .init(wr_init), .en(wr_en),
    .mask(n_mask), .n_half(n_half),
    .addr(wr_addr), .last_in_stage(), .corr_n2(), .done()
  );

  fft_butterfly #(.DATA_W(DATA_W), .TW_FRAC(TW_FRAC)) u_bfly (
    .a(a_q), .b(rdata), .w(tw_rdata), .x(x_d), .y(y_d)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      v      <= '0;
      ph     <= '0;
      init_d <= '0;
    end else begin
      v      <= {v[2:1], issue};
      init_d <= {init_d[1:0], rd_init};
      ph[3:1] <= ph[2:0];
      if (rd_init)    ph[0] <= 1'b0;
      else if (issue) ph[0] <= ~ph[0];
    end
  end

  always_ff @(posedge clk) begin
    if (v[1] && !ph[1]) a_q <= rdata;             // hold operand a
    if (v[1] &&  ph[1]) begin                     // b and w have arrived
      x_q <= x_d;
      y_q <= y_d;
    end
  end

  // --------------------------------------------------------- reordering part

  assign rev_start_ok = rev_start && (state == S_IDLE) && !start;
  assign rev_addr     = rd_addr;   // the read AGU, held in its first stage
  assign lin_last     = (lin_cnt == LOG2N'(n_cur - 1'b1));
  assign rev_step     = (state == S_REV_CMP);
  assign exchange      = (state != S_IDLE) && (state != S_FFT) && (state != S_REV_CMP);
  assign self_reversed = (state == S_REV_CMP) && (lin_cnt == rev_addr);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      lin_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (rd_init)           state <= S_FFT;
          else if (rev_start_ok) begin
            state   <= S_REV_CMP;
            lin_cnt <= '0;
          end
        end
        S_FFT:      if (fft_last) state <= S_IDLE;
        S_REV_CMP: begin
          if (lin_cnt < rev_addr) state <= S_REV_RD2;
          else if (lin_last)      state <= S_IDLE;
          else                    lin_cnt <= lin_cnt + 1'b1;
        end
        S_REV_RD2:  state <= S_REV_WR1;
        S_REV_WR1:  state <= S_REV_WR2;
        S_REV_WR2: begin
          if (lin_last) state <= S_IDLE;
          else begin
            state   <= S_REV_CMP;
            lin_cnt <= lin_cnt + 1'b1;
          end
        end
        default:    state <= S_IDLE;
      endcase
    end
  end

  // Exchange pipeline: the pair is (lin_cnt, r_q) where r_q is bitrev(lin_cnt)
  // captured in S_REV_CMP.  Reads: lin_cnt in S_REV_CMP, r_q in S_REV_RD2;
  // writes: lin_cnt in S_REV_WR1 (word of r_q, arriving), r_q in S_REV_WR2.
  always_ff @(posedge clk) begin
    if (state == S_REV_CMP) r_q   <= rev_addr;
    if (state == S_REV_RD2) rev_a <= rdata;      // word at lin_cnt
  end

  // ------------------------------------------------------------- memories
  logic [LOG2N-1:0] mem_raddr, mem_waddr;
  logic [SW-1:0]    mem_wdata;
  logic             mem_we;

  always_comb begin
    mem_raddr = ext_raddr;
    mem_we    = ld_we && (state == S_IDLE);
    mem_waddr = ld_addr;
    mem_wdata = ld_data;
    unique case (state)
      S_FFT: begin
        mem_raddr = rd_addr;
        mem_we    = v[3];
        mem_waddr = wr_addr;
        mem_wdata = ph[3] ? y_q : x_q;
      end
      S_REV_CMP:  mem_raddr = lin_cnt;
      S_REV_RD2:  mem_raddr = r_q;
      S_REV_WR1: begin
        mem_we = 1'b1; mem_waddr = lin_cnt; mem_wdata = rdata;
      end
      S_REV_WR2: begin
        mem_we = 1'b1; mem_waddr = r_q;     mem_wdata = rev_a;
      end
      default: ;
    endcase
  end

  sdp_ram #(.W(SW), .DEPTH(N)) u_data_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(rdata)
  );

  sdp_ram #(.W(SW), .DEPTH(N / 2)) u_tw_mem (
    .clk, .we(tw_we), .waddr(tw_addr), .wdata(tw_data),
    .raddr(twiddle_addr[LOG2N-2:0]), .rdata(tw_rdata)
  );

  assign ext_rdata    = rdata;
  assign data_rd_addr = mem_raddr;
  assign data_wr_addr = mem_waddr;
  assign data_we      = mem_we;
  assign busy         = (state != S_IDLE);
  assign done         = fft_last ||
                        (state == S_REV_WR2 && lin_last) ||
                        (state == S_REV_CMP && lin_last && !(lin_cnt < rev_addr));

endmodule
