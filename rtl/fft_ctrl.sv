// fft_ctrl: finite-state machine and address generator of the memory-based
// radix-4 FFT processor.
//
// States (fft_pkg::fft_state_e):
//   S_IDLE   - waiting; the first valid input sample starts a transform.
//   S_LOAD   - one sample per valid cycle is written to the data memory.
//   S_R4     - radix-4 DIF stages, one butterfly per clock cycle, N/4
//              butterflies per stage, log4(M) stages.
//   S_R2     - only when log2(N) is odd: the samples were loaded as two
//              interleaved halves (even-indexed in the low half, odd-indexed in
//              the high half), each transformed by the radix-4 stages, and this
//              stage joins them with N/2 radix-2 butterflies.
//   S_UNLOAD - OUT_BINS results leave in natural order, one per cycle; the
//              memory address is the base-4 digit reversal of the bin index.
// Then back to S_IDLE.  A transform of N points therefore takes N load
// cycles, (N/4)*log4(M) radix-4 cycles (fewer with REAL_INPUT, see below),
// N/2 radix-2 cycles if log2(N) is odd, and OUT_BINS unload cycles.
//
// In stage s of a half of size M the sub-transforms have length M/4^s and the
// butterfly operands are a quarter of that apart; branch m of butterfly j in
// its group is multiplied by W_N^(m*j*4^s*N/M).
//
// REAL_INPUT: marks butterflies whose four operands are known to be real.  A
// real input stays real in the first group of every DIF stage, because the
// first output of a radix-4 DIF butterfly takes no twiddle; real_bfly is set
// for those.  When, in addition, log2(N) is even, sub-transforms whose results
// are redundant are skipped.  Branch 3 of a butterfly with real operands
// feeds the bins 4k+3 of its transform, which are the complex conjugates of
// the bins fed by branch 1.  Group g of stage s is therefore skipped when the
// first non-zero base-4 digit of g is 3, i.e. the groups [3*4^i, 4^(i+1)).
// The counter jumps over them, so the stage is shorter: 64 points take
// 16+12+11 radix-4 cycles instead of 48, 256 points 64+48+44+43 instead of
// 256.  At unload, a bin k whose lowest non-zero base-4 digit is 3 lies in a
// skipped part and is read as the conjugate of bin N-k (ud_conj).  With
// REAL_INPUT = 0, real_bfly and ud_conj stay low.
//
// The state names, the transitions and the order of the steps are this
// design's own choice.
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int N          = 256,
  parameter bit REAL_INPUT = 1'b0,
  parameter int OUT_BINS   = N,
  localparam int AW        = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output fft_state_e    state,
  output logic [2:0]    stage,
  // load
  output logic          ld_we,
  output logic [AW-1:0] ld_addr,
  // radix-4 / radix-2 butterfly operand addresses
  output logic [AW-1:0] bf_addr [4],
  output logic [AW-1:0] tw_idx [1:3],
  output logic          real_bfly,
  // unload
  output logic          ud_valid,
  output logic [AW-1:0] ud_addr,
  output logic [AW-1:0] ud_idx,
  output logic          ud_last,
  output logic          ud_conj
);

  localparam int  L   = AW;
  localparam bit  ODD = (L % 2) == 1;
  localparam int  M   = ODD ? N / 2 : N;   // size of one radix-4 half
  localparam int  LM  = ODD ? L - 1 : L;
  localparam int  NS  = LM / 2;            // radix-4 stages
  localparam int  NB4 = N / 4;             // radix-4 butterflies per stage
  localparam int  NB2 = N / 2;             // radix-2 butterflies
  // Skip redundant sub-transforms (real input, pure radix-4 only).
  localparam bit  SKIP = REAL_INPUT && !ODD;

  fft_state_e    st;
  logic [AW-1:0] cnt;
  logic [2:0]    stg;

  // address-generation intermediates (combinational)
  int unsigned n, b, h, bb, qlog, j, g, base, k, ng, r4_next, kk;

  assign state    = st;
  assign stage    = stg;
  assign in_ready = (st == S_IDLE) || (st == S_LOAD);
  assign ld_we    = in_ready && in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      cnt <= '0;
      stg <= '0;
    end else begin
      unique case (st)
        S_IDLE, S_LOAD: if (in_valid) begin
          if (int'(cnt) == N - 1) begin
            st  <= S_R4;
            cnt <= '0;
            stg <= '0;
          end else begin
            st  <= S_LOAD;
            cnt <= cnt + 1'b1;
          end
        end
        S_R4: begin
          if (r4_next >= NB4) begin
            cnt <= '0;
            if (int'(stg) == NS - 1) st <= ODD ? S_R2 : S_UNLOAD;
            else                     stg <= stg + 1'b1;
          end else begin
            cnt <= AW'(r4_next);
          end
        end
        S_R2: begin
          if (int'(cnt) == NB2 - 1) begin
            cnt <= '0;
            st  <= S_UNLOAD;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_UNLOAD: begin
          if (int'(cnt) == OUT_BINS - 1) begin
            cnt <= '0;
            st  <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Address generation.

  always_comb begin
    n    = int'(cnt);
    // load: even samples to the low half, odd samples to the high half
    ld_addr = ODD ? AW'(((n & 1) * M) + (n >> 1)) : AW'(n);

    // radix-4 butterfly
    b    = n;
    h    = b / (M / 4);
    bb   = b % (M / 4);
    qlog = LM - 2 - 2 * int'(stg);
    j    = bb & ((1 << qlog) - 1);
    g    = bb >> qlog;
    base = h * M + (g << (qlog + 2)) + j;
    real_bfly = REAL_INPUT && (g == 0);

    // next radix-4 butterfly; with SKIP, groups [3*4^i, 4^(i+1)) are jumped
    ng      = g + 1;
    r4_next = b + 1;
    if (SKIP && j == (1 << qlog) - 1) begin
      for (int i = 0; i < NS; i++) begin
        if (ng == (3 << (2 * i))) ng = 1 << (2 * i + 2);
      end
      r4_next = ng << qlog;
    end
    for (int m = 0; m < 4; m++) bf_addr[m] = AW'(base + (m << qlog));
    for (int m = 1; m < 4; m++) tw_idx[m] = AW'((m * j) << (2 * int'(stg) + (ODD ? 1 : 0)));

    // radix-2 combine: even half result at rev(k), odd half at M + rev(k)
    k = n;
    if (st == S_R2) begin
      bf_addr[0] = AW'(digit_rev4(k % M, LM));
      bf_addr[1] = AW'(M + digit_rev4(k % M, LM));
      tw_idx[1]  = AW'(k);
      real_bfly  = 1'b0;
    end

    // unload; with SKIP a bin in a skipped sub-transform is read as the
    // conjugate of bin N-k
    ud_valid = (st == S_UNLOAD);
    ud_idx   = cnt;
    ud_last  = (st == S_UNLOAD) && (int'(cnt) == OUT_BINS - 1);
    ud_conj  = SKIP && (low_digit4(k, LM) == 3);
    kk       = ud_conj ? (N - k) % N : k;
    if (ODD) ud_addr = AW'((kk >= M ? M : 0) + digit_rev4(kk % M, LM));
    else     ud_addr = AW'(digit_rev4(kk, LM));
  end

endmodule
