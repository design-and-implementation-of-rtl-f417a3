// rfft_system: the two real-data FFT processors side by side.
//
// The Butterfly-approach processor (rfft_butterfly: full-size radix-4 FFT with
// the operations made unnecessary by real input cancelled) and the
// Formula-approach processor (rfft_formula: half-size complex FFT followed by
// a post-processing step) are the two ways of computing a real FFT that the
// design builds and compares.  Each keeps its own ports so that either can be
// used, or both fed the same samples for comparison.  Both take N real
// samples of IN_W bits, one per cycle, and return bins 0 .. N/2 of the
// spectrum in natural order.  Defaults: N = 256 points, IN_W = 16-bit input,
// 16-bit twiddles; the design is also evaluated at N = 64 and IN_W = 8.
module rfft_system
  import fft_pkg::*;
#(
  parameter int N    = 256,
  parameter int IN_W = 16,
  localparam int AW  = $clog2(N),
  localparam int BW  = IN_W + AW + 2,          // Butterfly-approach output width
  localparam int FW  = IN_W + AW + 1,          // Formula-approach output width
  localparam int KW  = $clog2(N / 2 + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Butterfly approach
  input  logic                   bf_in_valid,
  output logic                   bf_in_ready,
  input  logic signed [IN_W-1:0] bf_in_x,
  output logic                   bf_out_valid,
  output logic signed [BW-1:0]   bf_out_re,
  output logic signed [BW-1:0]   bf_out_im,
  output logic [AW-1:0]          bf_out_idx,
  output logic                   bf_out_last,
  output fft_state_e             bf_state,
  output logic                   bf_real_bfly,
  // Formula approach
  input  logic                   fm_in_valid,
  output logic                   fm_in_ready,
  input  logic signed [IN_W-1:0] fm_in_x,
  output logic                   fm_out_valid,
  output logic signed [FW-1:0]   fm_out_re,
  output logic signed [FW-1:0]   fm_out_im,
  output logic [KW-1:0]          fm_out_idx,
  output logic                   fm_out_last,
  output fft_state_e             fm_state,
  output logic                   fm_post_busy
);

  rfft_butterfly #(
    .N    (N),
    .IN_W (IN_W)
  ) u_butterfly (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (bf_in_valid),
    .in_ready  (bf_in_ready),
    .in_x      (bf_in_x),
    .out_valid (bf_out_valid),
    .out_re    (bf_out_re),
    .out_im    (bf_out_im),
    .out_idx   (bf_out_idx),
    .out_last  (bf_out_last),
    .fft_state (bf_state),
    .real_bfly (bf_real_bfly)
  );

  rfft_formula #(
    .N    (N),
    .IN_W (IN_W)
  ) u_formula (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (fm_in_valid),
    .in_ready  (fm_in_ready),
    .in_x      (fm_in_x),
    .out_valid (fm_out_valid),
    .out_re    (fm_out_re),
    .out_im    (fm_out_im),
    .out_idx   (fm_out_idx),
    .out_last  (fm_out_last),
    .fft_state (fm_state),
    .post_busy (fm_post_busy)
  );

endmodule
