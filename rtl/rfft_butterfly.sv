// rfft_butterfly: real-data FFT by the Butterfly approach.
//
// The full N-point radix-4 processor is kept, but operations that real input
// makes unnecessary are cancelled:
//  - the imaginary part of the input is neither taken nor stored (it is zero);
//  - butterflies whose four operands are all real (the first group of every
//    DIF stage) skip their imaginary arithmetic;
//  - whole sub-transforms whose outputs are the complex conjugates of other
//    outputs (branch 3 under a real butterfly, recursively) are not computed,
//    and the bins that would come from them are read as conjugates;
//  - only bins 0 .. N/2 are produced, the other half being the complex
//    conjugates of these.
// It is cfft_r4 configured with REAL_INPUT = 1 and OUT_BINS = N/2 + 1, behind
// a real-sample interface.  The skipping needs N to be a power of four (64
// and 256 are); for other N only the first, second and fourth savings apply.
//
// Interface and timing: one real sample per cycle while in_ready is high
// (gaps allowed); N samples make one transform.  The radix-4 phase takes 39
// cycles for N = 64 and 199 for N = 256 (48 and 256 for a complex transform);
// X[0] is valid one cycle after it ends and X[0] .. X[N/2] follow on
// consecutive cycles.  Output width is
// IN_W + log2(N) + 2 bits.  Which operations are cancelled, and how, is this
// design's reading of the approach.
module rfft_butterfly
  import fft_pkg::*;
#(
  parameter int N    = 256,
  parameter int IN_W = 16,
  localparam int AW  = $clog2(N),
  localparam int W   = IN_W + AW + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_x,
  output logic                   out_valid,
  output logic signed [W-1:0]    out_re,
  output logic signed [W-1:0]    out_im,
  output logic [AW-1:0]          out_idx,
  output logic                   out_last,
  output fft_state_e             fft_state,
  output logic                   real_bfly
);

  cfft_r4 #(
    .N          (N),
    .IN_W       (IN_W),
    .REAL_INPUT (1'b1),
    .OUT_BINS   (N / 2 + 1)
  ) u_cfft (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_re     (in_x),
    .in_im     ('0),
    .out_valid (out_valid),
    .out_re    (out_re),
    .out_im    (out_im),
    .out_idx   (out_idx),
    .out_last  (out_last),
    .state     (fft_state),
    .real_bfly (real_bfly)
  );

endmodule
