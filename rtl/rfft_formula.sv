// rfft_formula: real-data FFT by the Formula approach.
//
// An N-point real transform is computed with an N/2-point complex FFT and a
// few extra operations.  Consecutive real samples are paired into one complex
// sample z[n] = x[2n] + j*x[2n+1]; a cfft_r4 of N/2 points transforms them
// (for N = 64 and N = 256, N/2 is not a power of four, so the complex FFT
// joins two N/4-point radix-4 transforms with a radix-2 stage); rfft_post then
// forms X[0] .. X[N/2].
//
// Interface and timing: one real sample per cycle while in_ready is high
// (gaps allowed); N samples make one transform.  The even sample of each pair
// is held in a register and the pair enters the complex FFT with the odd
// sample.  Results X[out_idx], out_idx = 0 .. N/2, leave on N/2 + 1
// consecutive cycles; out_last marks X[N/2].  The upper half of the spectrum
// is the complex conjugate of the lower half and is not produced.  Output
// width is IN_W + log2(N) + 1 bits, enough for the full growth of the
// transform.  The pairing register and the streaming interface are this
// design's choices.
module rfft_formula
  import fft_pkg::*;
#(
  parameter int N    = 256,
  parameter int IN_W = 16,
  localparam int M   = N / 2,
  localparam int W   = IN_W + $clog2(M) + 2,
  localparam int KW  = $clog2(M + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_x,
  output logic                   out_valid,
  output logic signed [W-1:0]    out_re,
  output logic signed [W-1:0]    out_im,
  output logic [KW-1:0]          out_idx,
  output logic                   out_last,
  output fft_state_e             fft_state,
  output logic                   post_busy
);

  logic                   odd;        // next sample is x[2n+1]
  logic signed [IN_W-1:0] even_q;
  logic                   c_ready, c_valid;
  logic                   z_valid, z_last, rb_unused;
  logic signed [W-1:0]    z_re, z_im;
  logic [$clog2(M)-1:0]   z_idx;

  assign in_ready = c_ready;
  assign c_valid  = in_valid && odd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd    <= 1'b0;
      even_q <= '0;
    end else if (in_valid && in_ready) begin
      odd <= ~odd;
      if (!odd) even_q <= in_x;
    end
  end

  cfft_r4 #(
    .N    (M),
    .IN_W (IN_W)
  ) u_cfft (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (c_valid),
    .in_ready  (c_ready),
    .in_re     (even_q),
    .in_im     (in_x),
    .out_valid (z_valid),
    .out_re    (z_re),
    .out_im    (z_im),
    .out_idx   (z_idx),
    .out_last  (z_last),
    .state     (fft_state),
    .real_bfly (rb_unused)
  );

  rfft_post #(
    .N (N),
    .W (W)
  ) u_post (
    .clk       (clk),
    .rst_n     (rst_n),
    .z_valid   (z_valid),
    .z_re      (z_re),
    .z_im      (z_im),
    .z_last    (z_last),
    .out_valid (out_valid),
    .out_re    (out_re),
    .out_im    (out_im),
    .out_idx   (out_idx),
    .out_last  (out_last),
    .busy      (post_busy)
  );

  // The bin index and the real-butterfly flag of the complex FFT are not
  // needed here: Z arrives in natural order.
  logic unused_ok;
  assign unused_ok = ^{z_idx, rb_unused};

endmodule
