// tb_rfft_butterfly: self-checking testbench of the Butterfly-approach real
// FFT.
//
// Four processors, 64 and 256 points, each with 8- and 16-bit input
// (the sizes and widths the design is evaluated at), each run impulse,
// constant, Nyquist, cosine and random frames.  Bins 0..N/2 are compared with
// a double-precision DFT.  The latency from the last sample to X[0] is checked:
// the radix-4 cycles with the redundant sub-transforms skipped
// (16+12+11 for 64 points, 64+48+44+43 for 256) plus one.  The absence of bins
// beyond N/2 is checked too.  The test also
// checks that the real-operand butterflies were used.
module tb_rfft_butterfly;
  import tb_fft_ref_pkg::*;
  import fft_pkg::*;
  `include "tb_rfft_frame.svh"

  logic clk = 1'b0;
  logic rst_n;
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;

  int  checks = 0;
  int  failures = 0;
  int  cyc = 0;
  int  gaps = 0;
  real maxerr = 0.0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a_iv, a_ir, a_ov, a_ol, a_rb;
  logic signed [7:0]  a_x;
  logic signed [15:0] a_re, a_im;
  logic [5:0] a_oi;
  fft_state_e a_st;

  rfft_butterfly #(.N(64), .IN_W(8)) u_a (
    .clk(clk), .rst_n(rst_n), .in_valid(a_iv), .in_ready(a_ir), .in_x(a_x),
    .out_valid(a_ov), .out_re(a_re), .out_im(a_im), .out_idx(a_oi),
    .out_last(a_ol), .fft_state(a_st), .real_bfly(a_rb));

  logic b_iv, b_ir, b_ov, b_ol, b_rb;
  logic signed [15:0] b_x;
  logic signed [25:0] b_re, b_im;
  logic [7:0] b_oi;
  fft_state_e b_st;

  rfft_butterfly #(.N(256), .IN_W(16)) u_b (
    .clk(clk), .rst_n(rst_n), .in_valid(b_iv), .in_ready(b_ir), .in_x(b_x),
    .out_valid(b_ov), .out_re(b_re), .out_im(b_im), .out_idx(b_oi),
    .out_last(b_ol), .fft_state(b_st), .real_bfly(b_rb));

  logic c_iv, c_ir, c_ov, c_ol, c_rb;
  logic signed [15:0] c_x;
  logic signed [23:0] c_re, c_im;
  logic [5:0] c_oi;
  fft_state_e c_st;

  rfft_butterfly #(.N(64), .IN_W(16)) u_c (
    .clk(clk), .rst_n(rst_n), .in_valid(c_iv), .in_ready(c_ir), .in_x(c_x),
    .out_valid(c_ov), .out_re(c_re), .out_im(c_im), .out_idx(c_oi),
    .out_last(c_ol), .fft_state(c_st), .real_bfly(c_rb));

  logic d_iv, d_ir, d_ov, d_ol, d_rb;
  logic signed [7:0] d_x;
  logic signed [17:0] d_re, d_im;
  logic [7:0] d_oi;
  fft_state_e d_st;

  rfft_butterfly #(.N(256), .IN_W(8)) u_d (
    .clk(clk), .rst_n(rst_n), .in_valid(d_iv), .in_ready(d_ir), .in_x(d_x),
    .out_valid(d_ov), .out_re(d_re), .out_im(d_im), .out_idx(d_oi),
    .out_last(d_ol), .fft_state(d_st), .real_bfly(d_rb));

  int rb_cycles = 0;
  always @(posedge clk) if (a_rb && a_st == S_R4) rb_cycles++;

  initial begin
    a_iv = 0; a_x = 0; b_iv = 0; b_x = 0; c_iv = 0; c_x = 0; d_iv = 0; d_x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 6; f++) begin
      `RFFT_RUN(a, 64, 8, f, 16 + 12 + 11 + 1, f == 5)
      `RFFT_RUN(b, 256, 16, f, 64 + 48 + 44 + 43 + 1, 0)
      `RFFT_RUN(c, 64, 16, f, 16 + 12 + 11 + 1, 0)
      `RFFT_RUN(d, 256, 8, f, 64 + 48 + 44 + 43 + 1, 0)
    end
    // first group of each stage: 16 + 4 + 1 butterflies per 64-point frame
    checks++;
    if (rb_cycles != 6 * 21) begin
      failures++;
      $display("real-operand butterflies %0d expected %0d", rb_cycles, 6 * 21);
    end
    $display("largest error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
