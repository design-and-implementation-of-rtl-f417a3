// tb_fft_ctrl: runs the controller alone for a 64-point real-input
// configuration (pure radix-4, 33 output bins) and a 32-point complex one
// (two 16-point halves and a radix-2 stage).  Against expectations worked
// out here it checks: the load address of every sample; that every radix-4
// stage touches each address exactly once with operands a quarter
// sub-transform apart and the right twiddle exponents; the real-operand flag;
// the radix-2 operand pairs and twiddles; the digit-reversed unload addresses;
// and the number of cycles spent in each state.
module tb_fft_ctrl;
  import fft_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // base-4 digit reversal by repeated division, for a power-of-four size m
  function automatic int rev4(int v, int m);
    int r = 0;
    for (int s = m; s > 1; s /= 4) begin
      r = r * 4 + v % 4;
      v /= 4;
    end
    return r;
  endfunction

  // first non-zero base-4 digit of g, most significant first, over nd digits
  function automatic int first_digit(int g, int nd);
    int d [8];
    for (int i = 0; i < nd; i++) begin d[nd - 1 - i] = g % 4; g /= 4; end
    for (int i = 0; i < nd; i++) if (d[i] != 0) return d[i];
    return 0;
  endfunction

  // lowest non-zero base-4 digit of v
  function automatic int last_digit(int v);
    while (v != 0 && v % 4 == 0) v /= 4;
    return v % 4;
  endfunction

  // how often a stage should touch address a: 0 if it lies in a skipped
  // sub-transform (first non-zero group digit 3), else 1
  function automatic int exp_seen(int a, int s, int nn, int mm, bit skip);
    int ls;
    ls = mm / (4 ** s);
    if (!skip) return 1;
    return (first_digit((a % mm) / ls, s) == 3) ? 0 : 1;
  endfunction

  // radix-4 cycles: every butterfly, less those of skipped groups
  function automatic int exp_r4(int nn, int mm, int nst, bit skip);
    int c = 0;
    for (int s = 0; s < nst; s++)
      for (int g = 0; g < 4 ** s; g++)
        if (!skip || first_digit(g, s) != 3) c += (nn / mm) * (mm / (4 ** s) / 4);
    return c;
  endfunction

  `define CTRL_DUT(P, NN, RI, OB)                                             \
    logic P``_iv, P``_ir, P``_ldwe, P``_rb, P``_uv, P``_ul, P``_uc;           \
    fft_state_e P``_st;                                                       \
    logic [2:0] P``_stg;                                                      \
    logic [$clog2(NN)-1:0] P``_lda, P``_ua, P``_ui;                           \
    logic [$clog2(NN)-1:0] P``_ba [4];                                        \
    logic [$clog2(NN)-1:0] P``_tw [1:3];                                      \
    fft_ctrl #(.N(NN), .REAL_INPUT(RI), .OUT_BINS(OB)) P (                    \
      .clk(clk), .rst_n(rst_n), .in_valid(P``_iv), .in_ready(P``_ir),         \
      .state(P``_st), .stage(P``_stg), .ld_we(P``_ldwe), .ld_addr(P``_lda),   \
      .bf_addr(P``_ba), .tw_idx(P``_tw), .real_bfly(P``_rb),                  \
      .ud_valid(P``_uv), .ud_addr(P``_ua), .ud_idx(P``_ui), .ud_last(P``_ul), \
      .ud_conj(P``_uc));

  `CTRL_DUT(c64, 64, 1'b1, 33)
  `CTRL_DUT(c32, 32, 1'b0, 32)

  `define CTRL_RUN(P, NN, RI, OB)                                             \
    begin                                                                     \
      int odd, mm, nst, n_ld, n_r4, n_r2, n_ud, stg_prev, r2k;                \
      int seen [NN];                                                          \
      odd = ($clog2(NN) % 2);                                                 \
      mm  = odd ? NN / 2 : NN;                                                \
      nst = ($clog2(mm)) / 2;                                                 \
      n_ld = 0; n_r4 = 0; n_r2 = 0; n_ud = 0; stg_prev = -1; r2k = 0;         \
      @(negedge clk); P``_iv = 1'b1; #1;                                      \
      while (1) begin                                                         \
        if (P``_st == S_IDLE && n_ud > 0) break;                              \
        if (P``_ldwe) begin                                                   \
          checks++;                                                           \
          if (int'(P``_lda) != (odd ? (n_ld % 2) * mm + n_ld / 2 : n_ld)) begin \
            failures++; $display("%s load %0d addr %0d", `"P`", n_ld, P``_lda); end \
          n_ld++;                                                             \
        end                                                                   \
        if (P``_st == S_R4) begin                                             \
          int q, j;                                                           \
          if (int'(P``_stg) != stg_prev) begin                                \
            if (stg_prev >= 0) begin                                          \
              checks++;                                                       \
              foreach (seen[a]) if (seen[a] != exp_seen(a, stg_prev, NN, mm, RI && !odd)) begin failures++; \
                $display("%s stage %0d addr %0d used %0d times", `"P`", stg_prev, a, seen[a]); end \
            end                                                               \
            foreach (seen[a]) seen[a] = 0;                                    \
            stg_prev = int'(P``_stg);                                         \
          end                                                                 \
          q = mm / (4 ** (stg_prev + 1));                                     \
          j = int'(P``_ba[0]) % q;                                            \
          for (int m = 0; m < 4; m++) seen[P``_ba[m]]++;                      \
          checks++;                                                           \
          for (int m = 1; m < 4; m++) begin                                   \
            if (int'(P``_ba[m]) != int'(P``_ba[0]) + m * q ||                 \
                int'(P``_tw[m]) != m * j * (NN / (4 * q))) begin              \
              failures++; $display("%s r4 bad operand %0d", `"P`", m); end    \
          end                                                                 \
          checks++;                                                           \
          if (P``_rb != (RI && (int'(P``_ba[0]) % mm) < 4 * q)) begin         \
            failures++; $display("%s real flag wrong at %0d", `"P`", P``_ba[0]); end \
          n_r4++;                                                             \
        end                                                                   \
        if (P``_st == S_R2) begin                                             \
          checks++;                                                           \
          if (int'(P``_ba[0]) != rev4(r2k, mm) || int'(P``_ba[1]) != mm + rev4(r2k, mm) || \
              int'(P``_tw[1]) != r2k || P``_rb) begin                          \
            failures++; $display("%s r2 %0d wrong", `"P`", r2k); end          \
          r2k++; n_r2++;                                                      \
        end                                                                   \
        if (P``_st == S_UNLOAD) begin                                         \
          int k;                                                              \
          k = int'(P``_ui);                                                   \
          checks++;                                                           \
          if (P``_uc != (RI && !odd && last_digit(k) == 3)) begin failures++;  \
            $display("%s unload %0d conj flag wrong", `"P`", k); end          \
          if (P``_uc) k = NN - k;                                             \
          checks++;                                                           \
          if (!P``_uv || int'(P``_ui) != n_ud ||                                         \
              int'(P``_ua) != (odd ? (k >= mm ? mm : 0) + rev4(k % mm, mm) : rev4(k, mm)) || \
              P``_ul != (n_ud == OB - 1)) begin                                  \
            failures++; $display("%s unload %0d wrong", `"P`", k); end        \
          n_ud++;                                                             \
        end                                                                   \
        @(negedge clk);                                                       \
        if (n_ld == NN) P``_iv = 1'b0;                                        \
        #1;                                                                   \
      end                                                                     \
      checks++;                                                               \
      foreach (seen[a]) if (seen[a] != exp_seen(a, nst - 1, NN, mm, RI && !odd)) failures++; \
      checks++;                                                               \
      if (n_ld != NN || n_r4 != exp_r4(NN, mm, nst, RI && !odd) || n_r2 != (odd ? NN / 2 : 0) || n_ud != OB) begin \
        failures++;                                                           \
        $display("%s cycles: load %0d r4 %0d r2 %0d unload %0d", `"P`", n_ld, n_r4, n_r2, n_ud); \
      end                                                                     \
    end

  initial begin
    c64_iv = 0; c32_iv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      `CTRL_RUN(c64, 64, 1, 33)
      `CTRL_RUN(c32, 32, 0, 32)
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
