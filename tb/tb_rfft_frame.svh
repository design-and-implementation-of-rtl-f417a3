// tb_rfft_frame.svh: macros shared by the real-FFT testbenches.
//
// RFFT_GEN(xr, NN, IW, KIND) fills xr with one frame of NN real samples:
//   KIND 0 impulse, 1 full-scale constant, 2 alternating +/- full scale
//   (all energy in bin N/2), 3 cosine at bin 5, otherwise uniform random.
// RFFT_RUN(P, NN, IW, KIND, EXP_LAT, GAP) drives one frame into the processor whose
// signals are P_iv, P_ir, P_x, collects bins 0..NN/2 from P_ov, P_re, P_im,
// P_oi, P_ol, compares each with a double-precision DFT, and checks the number
// of cycles from the last sample to the first bin against EXP_LAT.  With GAP
// set, in_valid drops for a cycle before about a third of the samples.  It
// expects int checks, failures, cyc, gaps and real maxerr in the enclosing
// module.
`define RFFT_GEN(xr, NN, IW, KIND)                                            \
  for (int i = 0; i < NN; i++) begin                                          \
    case (KIND)                                                               \
      0: xr[i] = (i == 0) ? real'((1 << (IW-1)) - 1) : 0.0;                   \
      1: xr[i] = real'((1 << (IW-1)) - 1);                                    \
      2: xr[i] = (i % 2) ? -real'(1 << (IW-1)) : real'((1 << (IW-1)) - 1);    \
      3: xr[i] = real'(int'(0.9 * real'(1 << (IW-1)) * $cos(2.0 * PI * 5.0 * real'(i) / real'(NN)))); \
      default: xr[i] = real'($signed(IW'($urandom)));                         \
    endcase                                                                   \
  end

`define RFFT_RUN(P, NN, IW, KIND, EXP_LAT, GAP)                                    \
  begin                                                                       \
    vec_t xr, xi, rr, ri;                                                     \
    real  tol, err;                                                           \
    int   t_last, lat, got;                                                   \
    xr = new[NN]; xi = new[NN];                                               \
    `RFFT_GEN(xr, NN, IW, KIND)                                               \
    for (int i = 0; i < NN; i++) xi[i] = 0.0;                                 \
    dft(xr, xi, rr, ri);                                                      \
    for (int i = 0; i < NN; i++) begin                                        \
      @(negedge clk);                                                         \
      if ((GAP) && ($urandom % 3 == 0)) begin                                 \
        P``_iv = 1'b0; gaps++; @(negedge clk);                                \
      end                                                                     \
      while (!P``_ir) @(negedge clk);                                         \
      P``_iv = 1'b1;                                                          \
      P``_x  = IW'(int'(xr[i]));                                              \
    end                                                                       \
    @(posedge clk); #1; t_last = cyc;                                         \
    @(negedge clk); P``_iv = 1'b0;                                            \
    tol = 4.0 + $sqrt(real'(NN)) + 2.0e-5 * real'(NN) * real'(1 << (IW-1));                      \
    got = 0;                                                                  \
    while (got <= NN / 2) begin                                               \
      @(posedge clk); #1;                                                     \
      if (P``_ov) begin                                                       \
        if (got == 0) begin                                                   \
          lat = cyc - t_last;                                                 \
          checks++;                                                           \
          if (lat != (EXP_LAT)) begin                                         \
            failures++;                                                       \
            $display("%s: latency %0d expected %0d", `"P`", lat, (EXP_LAT));  \
          end                                                                 \
        end                                                                   \
        checks++;                                                             \
        err = absr(real'(P``_re) - rr[got]) + absr(real'(P``_im) - ri[got]);  \
        if (err > maxerr) maxerr = err;                                       \
        if (int'(P``_oi) != got || err > tol || (P``_ol != (got == NN / 2))) begin \
          failures++;                                                         \
          $display("%s kind %0d: bin %0d (idx %0d) got %0d,%0d exp %f,%f", `"P`", KIND, got, \
                   P``_oi, P``_re, P``_im, rr[got], ri[got]);                 \
        end                                                                   \
        got++;                                                                \
      end                                                                     \
    end                                                                       \
    @(posedge clk); #1;                                                       \
    checks++;                                                                 \
    if (P``_ov) begin failures++; $display("%s: extra bin after N/2", `"P`"); end \
  end
