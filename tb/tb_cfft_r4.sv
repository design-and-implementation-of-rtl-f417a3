// tb_cfft_r4: self-checking testbench of the memory-based radix-4 complex FFT.
//
// Runs four processors: 64 points with 16-bit input (pure radix-4), 32 points
// with 8-bit input (two 16-point radix-4 halves plus the radix-2 combine
// stage), 16 points, and a 64-point real-input configuration (REAL_INPUT,
// bins 0..32, redundant sub-transforms skipped; its imaginary input is driven
// with garbage that must be ignored).  Each gets several random and special (impulse,
// constant, full-scale) frames; every output bin is compared with a
// double-precision DFT within a small tolerance, and the cycle count from the
// last input sample to the first result is checked against the schedule
// (N/4)*log4(M) + (N/2 if log2 N odd) + 1, or 16+12+11+1 for the real-input
// configuration.  Finally the 64-point processor is checked for linearity:
// the transforms of two random frames a and b must add up to the transform of
// a + b, bin by bin, within the rounding of the twiddle products.
module tb_cfft_r4;
  import tb_fft_ref_pkg::*;
  import fft_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DUT generator
  `define CFFT_DUT(NAME, NN, IW, RI, OB)                                              \
    logic NAME``_iv, NAME``_ir, NAME``_ov, NAME``_ol, NAME``_rb;               \
    logic signed [IW-1:0] NAME``_xr, NAME``_xi;                               \
    logic signed [IW+$clog2(NN)+1:0] NAME``_yr, NAME``_yi;                    \
    logic [$clog2(NN)-1:0] NAME``_oi;                                         \
    fft_state_e NAME``_st;                                                    \
    cfft_r4 #(.N(NN), .IN_W(IW), .REAL_INPUT(RI), .OUT_BINS(OB)) NAME (                                       \
      .clk(clk), .rst_n(rst_n), .in_valid(NAME``_iv), .in_ready(NAME``_ir),   \
      .in_re(NAME``_xr), .in_im(NAME``_xi), .out_valid(NAME``_ov),            \
      .out_re(NAME``_yr), .out_im(NAME``_yi), .out_idx(NAME``_oi),            \
      .out_last(NAME``_ol), .state(NAME``_st), .real_bfly(NAME``_rb));

  `CFFT_DUT(d64, 64, 16, 1'b0, 64)
  `CFFT_DUT(d32, 32, 8, 1'b0, 32)
  `CFFT_DUT(d16, 16, 12, 1'b0, 16)
  `CFFT_DUT(r64, 64, 12, 1'b1, 33)

  // Run one frame through a DUT: drive inputs, collect outputs, compare.
  `define CFFT_RUN(NAME, NN, IW, KIND, RI, OB, R4C)                                        \
    begin                                                                     \
      vec_t xr, xi, rr, ri;                                                   \
      real  tol, err;                                                         \
      int   t_last, lat, exp_lat, got;                                        \
      xr = new[NN]; xi = new[NN];                                             \
      for (int i = 0; i < NN; i++) begin                                      \
        case (KIND)                                                           \
          0: begin xr[i] = (i == 0) ? real'((1 << (IW-1)) - 1) : 0.0; xi[i] = 0.0; end \
          1: begin xr[i] = real'((1 << (IW-1)) - 1); xi[i] = -real'(1 << (IW-1)); end \
          default: begin                                                      \
            xr[i] = real'($signed(IW'($urandom)));                            \
            xi[i] = real'($signed(IW'($urandom)));                            \
          end                                                                 \
        endcase                                                               \
        if (RI) xi[i] = 0.0;                                                  \
      end                                                                     \
      dft(xr, xi, rr, ri);                                                    \
      for (int i = 0; i < NN; i++) begin                                      \
        @(negedge clk);                                                       \
        if (!NAME``_ir) begin failures++; $display("%s: not ready", `"NAME`"); end \
        NAME``_iv = 1'b1;                                                     \
        NAME``_xr = IW'(int'(xr[i]));                                         \
        NAME``_xi = RI ? IW'($urandom) : IW'(int'(xi[i]));                    \
      end                                                                     \
      @(posedge clk); #1; t_last = cyc;                                           \
      @(negedge clk); NAME``_iv = 1'b0;                                       \
      exp_lat = R4C + (($clog2(NN) % 2) ? NN / 2 : 0) + 1;                    \
      tol = 4.0 + $sqrt(real'(NN)) + 2.0e-5 * real'(NN) * real'(1 << (IW-1));                    \
      got = 0;                                                                \
      while (got < OB) begin                                                  \
        @(posedge clk); #1;                                                   \
        if (NAME``_ov) begin                                                  \
          if (got == 0) begin                                                 \
            lat = cyc - t_last;                                               \
            checks++;                                                         \
            if (lat != exp_lat) begin failures++;                            \
              $display("%s: latency %0d expected %0d", `"NAME`", lat, exp_lat); end \
          end                                                                 \
          checks++;                                                           \
          err = absr(real'(NAME``_yr) - rr[NAME``_oi]) + absr(real'(NAME``_yi) - ri[NAME``_oi]); \
          if (int'(NAME``_oi) != got || err > tol || (NAME``_ol != (got == OB-1))) begin \
            failures++;                                                       \
            $display("%s: bin %0d (idx %0d) got %0d,%0d exp %f,%f", `"NAME`", got, NAME``_oi, \
                     NAME``_yr, NAME``_yi, rr[got], ri[got]);                 \
          end                                                                 \
          if (err > maxerr) maxerr = err;                                     \
          got++;                                                              \
        end                                                                   \
      end                                                                     \
    end

  // Linearity check on d64: frames a, b and a + b; outputs kept per frame.
  int lin_in_r [3][64], lin_in_i [3][64];
  int lin_re [3][64], lin_im [3][64];

  task automatic run_lin(input int sel);
    int got;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      d64_iv = 1'b1;
      d64_xr = 16'(lin_in_r[sel][i]);
      d64_xi = 16'(lin_in_i[sel][i]);
    end
    @(negedge clk);
    d64_iv = 1'b0;
    got = 0;
    while (got < 64) begin
      @(posedge clk); #1;
      if (d64_ov) begin
        lin_re[sel][d64_oi] = int'(d64_yr);
        lin_im[sel][d64_oi] = int'(d64_yi);
        got++;
      end
    end
  endtask

  int  cyc = 0;
  real maxerr = 0.0;
  real linerr = 0.0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    d64_iv = 0; d32_iv = 0; d16_iv = 0; r64_iv = 0; r64_xr = 0; r64_xi = 0;
    d64_xr = 0; d64_xi = 0; d32_xr = 0; d32_xi = 0; d16_xr = 0; d16_xi = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 5; f++) begin
      `CFFT_RUN(d64, 64, 16, f, 0, 64, 16 * 3)
      `CFFT_RUN(d32, 32, 8, f, 0, 32, 8 * 2)
      `CFFT_RUN(d16, 16, 12, f, 0, 16, 4 * 2)
      `CFFT_RUN(r64, 64, 12, f, 1, 33, 16 + 12 + 11)
    end
    for (int i = 0; i < 64; i++) begin
      lin_in_r[0][i] = $signed(15'($urandom));
      lin_in_i[0][i] = $signed(15'($urandom));
      lin_in_r[1][i] = $signed(15'($urandom));
      lin_in_i[1][i] = $signed(15'($urandom));
      lin_in_r[2][i] = lin_in_r[0][i] + lin_in_r[1][i];
      lin_in_i[2][i] = lin_in_i[0][i] + lin_in_i[1][i];
    end
    for (int f = 0; f < 3; f++) run_lin(f);
    for (int k = 0; k < 64; k++) begin
      int dr, di;
      dr = lin_re[2][k] - lin_re[0][k] - lin_re[1][k];
      di = lin_im[2][k] - lin_im[0][k] - lin_im[1][k];
      checks++;
      if (dr > 24 || dr < -24 || di > 24 || di < -24) begin
        failures++;
        $display("linearity: bin %0d off by %0d,%0d", k, dr, di);
      end
      if (absr(real'(dr)) + absr(real'(di)) > linerr) linerr = absr(real'(dr)) + absr(real'(di));
    end
    $display("largest linearity deviation %f", linerr);
    $display("largest error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
