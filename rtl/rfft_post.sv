// rfft_post: the extra operations of the Formula approach to the real FFT.
//
// An N-point real sequence x[n] is packed as M = N/2 complex samples
// z[n] = x[2n] + j*x[2n+1] and transformed by an M-point complex FFT into Z[k].
// This unit turns Z into the spectrum of x:
//   A = Z[k mod M],  B = conj(Z[(M-k) mod M])
//   X[k] = (A + B)/2 - j * W_N^k * (A - B)/2,   k = 0 .. N/2
// The remaining bins N/2+1 .. N-1 are the complex conjugates of X[N-k] and are
// not produced.
//
// It first stores the M values Z[k] as they arrive (in natural order, one per
// z_valid), then produces X[0] .. X[N/2] on consecutive cycles, reading Z[k]
// and Z[M-k] together from its two-port buffer; one complex multiplier by
// W_N^k (twiddle_rom) and adders form each bin; the halving is an arithmetic
// shift with rounding.  X[0] is valid in the cycle after the one in which the last Z
// is taken, and X[N/2] N/2 cycles later.  The output width equals the input
// width W, which already covers the growth of an N-point real transform.
//
// The formula and the N/2 + 1 outputs are the standard split of a real
// transform into a half-size complex one, as the design describes; the
// buffer, the order of operations and the timing are this design's choices.
module rfft_post
  import fft_pkg::*;
#(
  parameter int N  = 256,
  parameter int W  = 25,
  localparam int M = N / 2,
  localparam int MW = $clog2(M),
  localparam int KW = $clog2(M + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                z_valid,
  input  logic signed [W-1:0] z_re,
  input  logic signed [W-1:0] z_im,
  input  logic                z_last,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic [KW-1:0]       out_idx,
  output logic                out_last,
  output logic                busy
);

  localparam int XW = W + 2;

  logic signed [W-1:0] buf_re [M];
  logic signed [W-1:0] buf_im [M];
  logic [MW-1:0]       wr_ptr;
  logic                run;
  logic [KW-1:0]       k;

  // collect Z
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
    end else if (z_valid) begin
      wr_ptr <= z_last ? '0 : wr_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (z_valid) begin
      buf_re[wr_ptr] <= z_re;
      buf_im[wr_ptr] <= z_im;
    end
  end

  // sequence k = 0 .. M
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      k   <= '0;
    end else if (run) begin
      if (int'(k) == M) begin
        run <= 1'b0;
        k   <= '0;
      end else begin
        k <= k + 1'b1;
      end
    end else if (z_valid && z_last) begin
      run <= 1'b1;
      k   <= '0;
    end
  end

  assign busy = run;

  // arithmetic
  logic [MW-1:0]          ia, ib;
  logic signed [XW-1:0]   a_re, a_im, b_re, b_im;
  logic signed [XW-1:0]   f_re, f_im, g_re, g_im, h_re, h_im, s_re, s_im;
  logic signed [TW_W-1:0] tw_c, tw_s;
  logic [$clog2(N)-1:0]   tw_a;

  assign tw_a = $clog2(N)'(k);

  twiddle_rom #(.N(N)) u_rom (
    .addr  (tw_a),
    .cos_o (tw_c),
    .sin_o (tw_s)
  );

  always_comb begin
    ia   = MW'(k);                  // k mod M
    ib   = MW'(M - int'(k));        // (M - k) mod M
    a_re = XW'(buf_re[ia]);
    a_im = XW'(buf_im[ia]);
    b_re = XW'(buf_re[ib]);
    b_im = -XW'(buf_im[ib]);        // conjugate
    f_re = a_re + b_re;
    f_im = a_im + b_im;
    g_re = a_re - b_re;
    g_im = a_im - b_im;
  end

  logic signed [XW-1:0] p_re, p_im;

  cmult #(.W(XW)) u_mul (
    .a_re (g_re),
    .a_im (g_im),
    .c    (tw_c),
    .s    (tw_s),
    .p_re (p_re),
    .p_im (p_im)
  );

  always_comb begin
    // -j * P = P.im - j*P.re
    h_re = p_im;
    h_im = -p_re;
    s_re = (f_re + h_re + XW'(1)) >>> 1;
    s_im = (f_im + h_im + XW'(1)) >>> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= run;
      out_last  <= run && (int'(k) == M);
      out_idx   <= k;
      out_re    <= W'(s_re);
      out_im    <= W'(s_im);
    end
  end

  // A new frame must not arrive while the previous one is still being read.
  a_no_overrun: assert property (@(posedge clk) !(run && z_valid))
    else $error("rfft_post: Z arrived while results were being produced");

endmodule
