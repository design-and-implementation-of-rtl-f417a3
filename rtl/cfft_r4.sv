// cfft_r4: memory-based radix-4 decimation-in-frequency FFT processor for
// complex data.
//
// One data memory (fft_mem) holds the whole transform and is updated in
// place.  fft_ctrl sequences loading, the radix-4 stages, an optional radix-2
// combine stage and unloading; one r4_butterfly (or, in the combine stage, one
// r2_combine) does one butterfly per clock cycle, with twiddles from three
// copies of twiddle_rom.
//
// Sizes: N must be a power of two, at least 16.  When log2(N) is even the
// transform is pure radix-4.  When it is odd (for instance the 32- and
// 128-point complex transforms used by the Formula approach) the even- and
// odd-indexed samples are transformed as two N/2-point radix-4 FFTs and then
// joined by a radix-2 stage.
//
// Word lengths: inputs are IN_W bits (the design uses 8 or 16).  No scaling
// is done between stages; instead the internal and output width is
// W = IN_W + log2(N) + 2 bits, enough for the full growth of the transform
// (|X[k]| <= N * max|x|), so no result can overflow.  Twiddle products are
// rounded to nearest.  The unscaled datapath is this design's own choice.
//
// Interface and timing:
//   in_valid/in_ready  - one sample per cycle while in_ready is high; N
//                        samples x[0..N-1] in order make one transform.
//                        Gaps in in_valid are allowed.
//   out_valid          - high for OUT_BINS consecutive cycles carrying
//                        X[out_idx], out_idx = 0, 1, ...; out_last marks the
//                        final one.  There is no back-pressure.
//   latency            - the first result appears
//                        (N/4)*log4(M) + (log2 N odd ? N/2 : 0) + 1 cycles
//                        after the last sample is accepted (M = N, or N/2
//                        when log2 N is odd).
// REAL_INPUT = 1 configures the processor for real data: the imaginary input
// is ignored and stored as zero, butterflies whose operands are all real skip
// the imaginary arithmetic, and (log2 N even) the sub-transforms whose results
// are conjugates of others are not computed at all (see fft_ctrl); the
// radix-4 phase then takes 39 instead of 48 cycles for N = 64 and 199 instead
// of 256 for N = 256.  Bins that lie in a skipped part are unloaded as the
// conjugate of bin N-k.  OUT_BINS lets a real-data transform unload only bins
// 0..N/2, the other half being complex conjugates of these.  The real_bfly
// output shows when the real-operand mode is in use; with REAL_INPUT = 0 it
// stays low.
module cfft_r4
  import fft_pkg::*;
#(
  parameter int N          = 256,
  parameter int IN_W       = 16,
  parameter bit REAL_INPUT = 1'b0,
  parameter int OUT_BINS   = N,
  localparam int AW        = $clog2(N),
  localparam int W         = IN_W + AW + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                   out_valid,
  output logic signed [W-1:0]    out_re,
  output logic signed [W-1:0]    out_im,
  output logic [AW-1:0]          out_idx,
  output logic                   out_last,
  output fft_state_e             state,
  output logic                   real_bfly
);

  logic [2:0]    stage;
  logic          ld_we;
  logic [AW-1:0] ld_addr;
  logic [AW-1:0] bf_addr [4];
  logic [AW-1:0] tw_idx [1:3];
  logic          ud_valid, ud_last, ud_conj;
  logic [AW-1:0] ud_addr, ud_idx;

  fft_ctrl #(
    .N          (N),
    .REAL_INPUT (REAL_INPUT),
    .OUT_BINS   (OUT_BINS)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .state     (state),
    .stage     (stage),
    .ld_we     (ld_we),
    .ld_addr   (ld_addr),
    .bf_addr   (bf_addr),
    .tw_idx    (tw_idx),
    .real_bfly (real_bfly),
    .ud_valid  (ud_valid),
    .ud_addr   (ud_addr),
    .ud_idx    (ud_idx),
    .ud_last   (ud_last),
    .ud_conj   (ud_conj)
  );

  // twiddle factors
  logic signed [TW_W-1:0] tw_c [1:3];
  logic signed [TW_W-1:0] tw_s [1:3];

  for (genvar m = 1; m < 4; m++) begin : g_rom
    twiddle_rom #(.N(N)) u_rom (
      .addr  (tw_idx[m]),
      .cos_o (tw_c[m]),
      .sin_o (tw_s[m])
    );
  end

  // data memory
  logic [AW-1:0]       raddr [4];
  logic signed [W-1:0] rd_re [4];
  logic signed [W-1:0] rd_im [4];
  logic [3:0]          we;
  logic [AW-1:0]       waddr [4];
  logic signed [W-1:0] wd_re [4];
  logic signed [W-1:0] wd_im [4];

  fft_mem #(.DEPTH(N), .W(W)) u_mem (
    .clk      (clk),
    .raddr    (raddr),
    .rdata_re (rd_re),
    .rdata_im (rd_im),
    .we       (we),
    .waddr    (waddr),
    .wdata_re (wd_re),
    .wdata_im (wd_im)
  );

  // arithmetic
  logic signed [W-1:0] y_re [4];
  logic signed [W-1:0] y_im [4];
  logic signed [W-1:0] lo_re, lo_im, hi_re, hi_im;

  r4_butterfly #(.W(W)) u_bf4 (
    .real_only (real_bfly),
    .x_re      (rd_re),
    .x_im      (rd_im),
    .tw_c      (tw_c),
    .tw_s      (tw_s),
    .y_re      (y_re),
    .y_im      (y_im)
  );

  r2_combine #(.W(W)) u_bf2 (
    .e_re  (rd_re[0]),
    .e_im  (rd_im[0]),
    .o_re  (rd_re[1]),
    .o_im  (rd_im[1]),
    .tw_c  (tw_c[1]),
    .tw_s  (tw_s[1]),
    .lo_re (lo_re),
    .lo_im (lo_im),
    .hi_re (hi_re),
    .hi_im (hi_im)
  );

  // memory port steering
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      raddr[p] = bf_addr[p];
      waddr[p] = bf_addr[p];
      wd_re[p] = y_re[p];
      wd_im[p] = y_im[p];
    end
    we = 4'b0000;
    unique case (state)
      S_IDLE, S_LOAD: begin
        we[0]    = ld_we;
        waddr[0] = ld_addr;
        wd_re[0] = W'(in_re);
        wd_im[0] = REAL_INPUT ? '0 : W'(in_im);
      end
      S_R4: we = 4'b1111;
      S_R2: begin
        we       = 4'b0011;
        wd_re[0] = lo_re;
        wd_im[0] = lo_im;
        wd_re[1] = hi_re;
        wd_im[1] = hi_im;
      end
      S_UNLOAD: raddr[0] = ud_addr;
      default: ;
    endcase
  end

  // registered result port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= ud_valid;
      out_last  <= ud_last;
      out_idx   <= ud_idx;
      out_re    <= rd_re[0];
      out_im    <= ud_conj ? -rd_im[0] : rd_im[0];
    end
  end

  // stage is only used for visibility in simulation
  logic unused_stage;
  assign unused_stage = ^stage;

endmodule
