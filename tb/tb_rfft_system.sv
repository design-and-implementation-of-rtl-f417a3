// tb_rfft_system: end-to-end testbench of the two real-FFT processors at
// their default size (256 points, 16-bit input, 16-bit twiddles).
//
// The same frames (impulse, constant, Nyquist, cosine, random, and random
// with gaps in the input stream) are fed to the Butterfly-approach and the
// Formula-approach processor at once.  Every bin 0..N/2 of each is compared
// with a double-precision DFT, and the latency of each is checked.  The test
// counts how often each mechanism ran and fails if one never did: sample
// loading, radix-4 stages, radix-2 combine stage (Formula approach),
// real-operand butterflies (Butterfly approach), post-processing (Formula
// approach), half-spectrum unloading, gaps in the input stream, redundant
// butterflies skipped and bins read as conjugates (Butterfly approach).
module tb_rfft_system;
  import tb_fft_ref_pkg::*;
  import fft_pkg::*;
  `include "tb_rfft_frame.svh"

  localparam int N  = 256;
  localparam int IW = 16;

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

  logic bf_iv, bf_ir, bf_ov, bf_ol, bf_rb;
  logic signed [IW-1:0] bf_x;
  logic signed [IW+9:0] bf_re, bf_im;
  logic [7:0] bf_oi;
  fft_state_e bf_st;

  logic fm_iv, fm_ir, fm_ov, fm_ol, fm_pb;
  logic signed [IW-1:0] fm_x;
  logic signed [IW+8:0] fm_re, fm_im;
  logic [7:0] fm_oi;
  fft_state_e fm_st;

  rfft_system dut (
    .clk          (clk),
    .rst_n        (rst_n),
    .bf_in_valid  (bf_iv),
    .bf_in_ready  (bf_ir),
    .bf_in_x      (bf_x),
    .bf_out_valid (bf_ov),
    .bf_out_re    (bf_re),
    .bf_out_im    (bf_im),
    .bf_out_idx   (bf_oi),
    .bf_out_last  (bf_ol),
    .bf_state     (bf_st),
    .bf_real_bfly (bf_rb),
    .fm_in_valid  (fm_iv),
    .fm_in_ready  (fm_ir),
    .fm_in_x      (fm_x),
    .fm_out_valid (fm_ov),
    .fm_out_re    (fm_re),
    .fm_out_im    (fm_im),
    .fm_out_idx   (fm_oi),
    .fm_out_last  (fm_ol),
    .fm_state     (fm_st),
    .fm_post_busy (fm_pb)
  );

  // mechanism counters
  int n_load = 0, n_r4 = 0, n_r2 = 0, n_realbf = 0, n_post = 0, n_unload = 0;
  int n_bf_r4 = 0, n_conj = 0, n_frames = 0;
  always @(posedge clk) begin
    if (bf_st == S_LOAD || fm_st == S_LOAD)  n_load++;
    if (bf_st == S_R4 || fm_st == S_R4)      n_r4++;
    if (fm_st == S_R2)                       n_r2++;
    if (bf_st == S_R4 && bf_rb)              n_realbf++;
    if (fm_pb)                               n_post++;
    if (bf_st == S_UNLOAD || fm_st == S_UNLOAD) n_unload++;
    if (bf_st == S_R4)                       n_bf_r4++;
    if (dut.u_butterfly.u_cfft.ud_valid && dut.u_butterfly.u_cfft.ud_conj) n_conj++;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end else begin
      $display("%-28s %0d cycles", what, n);
    end
  endtask

  initial begin
    bf_iv = 0; bf_x = 0; fm_iv = 0; fm_x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 6; f++) begin
      n_frames++;
      fork
        `RFFT_RUN(bf, 256, 16, f, 64 + 48 + 44 + 43 + 1, f == 5)
        `RFFT_RUN(fm, 256, 16, f, (32 * 3 + 64 + 1) + 128 + 1, f == 5)
      join
    end
    need("sample loading", n_load);
    need("radix-4 stages", n_r4);
    need("radix-2 combine stage", n_r2);
    need("real-operand butterflies", n_realbf);
    need("formula post-processing", n_post);
    need("half-spectrum unloading", n_unload);
    need("input gaps", gaps);
    need("skipped redundant butterflies", n_frames * 256 - n_bf_r4);
    need("bins read as conjugates", n_conj);
    $display("largest error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
