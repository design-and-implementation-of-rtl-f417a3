// twiddle_rom: table of twiddle factors W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N)
// for k = 0 .. N-1.
//
// The table is computed when the design is elaborated, so no data file is
// needed: COS[k] = round(cos(2*pi*k/N) * 2^14) and SIN[k] =
// round(sin(2*pi*k/N) * 2^14).  Both are 16-bit signed Q2.14 words.  The 16-bit
// twiddle width follows the design; the Q2.14 format and the rounding are this
// design's own choices.  The ROM is asynchronous: cos_o and sin_o follow addr
// in the same cycle.  Note that sin_o is the positive sine: the caller
// multiplies by (cos - j*sin).
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int N = 256
) (
  input  logic [$clog2(N)-1:0]   addr,
  output logic signed [TW_W-1:0] cos_o,
  output logic signed [TW_W-1:0] sin_o
);

  localparam real PI = 3.14159265358979323846;
  typedef logic signed [TW_W-1:0] tab_t [N];

  function automatic tab_t gen_tab(bit want_sin);
    tab_t t;
    real  v;
    for (int k = 0; k < N; k++) begin
      v = want_sin ? $sin(2.0 * PI * k / N) : $cos(2.0 * PI * k / N);
      v = v * real'(1 << TW_FRAC);
      t[k] = TW_W'(v >= 0.0 ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5)));
    end
    return t;
  endfunction

  localparam tab_t COS_T = gen_tab(1'b0);
  localparam tab_t SIN_T = gen_tab(1'b1);

  assign cos_o = COS_T[addr];
  assign sin_o = SIN_T[addr];

endmodule
