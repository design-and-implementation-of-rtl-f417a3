// tb_rfft_post: checks the Formula-approach post-processing on its own.
//
// For random 64-point real frames x (8-bit), the testbench packs
// z[n] = x[2n] + j*x[2n+1], computes Z = DFT(z) in double precision, rounds it
// to integers and feeds it in natural order.  The unit's X[0..32] must match
// the double-precision DFT of x within 3 LSB, come in order with out_last on
// X[32], and be valid in the cycle after the one in which the last Z is taken.
module tb_rfft_post;
  import tb_fft_ref_pkg::*;

  localparam int N = 64;
  localparam int M = N / 2;
  localparam int W = 15;

  logic clk = 1'b0;
  logic rst_n;
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;

  logic zv, zl, ov, ol, busy;
  logic signed [W-1:0] zr, zi, yr, yi;
  logic [5:0] oi;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  rfft_post #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .z_valid(zv),
    .z_re(zr), .z_im(zi), .z_last(zl), .out_valid(ov), .out_re(yr), .out_im(yi),
    .out_idx(oi), .out_last(ol), .busy(busy));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t xr, xi, pr, pi, zr_r, zi_r, rr, ri;
    int t_last, got;
    real err;
    zv = 0; zl = 0; zr = 0; zi = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 8; f++) begin
      xr = new[N]; xi = new[N]; pr = new[M]; pi = new[M];
      for (int i = 0; i < N; i++) begin
        xr[i] = (f == 0) ? ((i == 0) ? 127.0 : 0.0) : real'($signed(8'($urandom)));
        xi[i] = 0.0;
      end
      for (int i = 0; i < M; i++) begin pr[i] = xr[2*i]; pi[i] = xr[2*i+1]; end
      dft(xr, xi, rr, ri);
      dft(pr, pi, zr_r, zi_r);
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        zv = 1'b1; zl = (k == M - 1);
        zr = W'(int'($floor(zr_r[k] + 0.5)));
        zi = W'(int'($floor(zi_r[k] + 0.5)));
      end
      @(posedge clk); #1; t_last = cyc;
      @(negedge clk); zv = 1'b0; zl = 1'b0;
      got = 0;
      while (got <= M) begin
        @(posedge clk); #1;
        if (ov) begin
          if (got == 0) begin
            checks++;
            if (cyc - t_last != 1) begin failures++; $display("latency %0d", cyc - t_last); end
          end
          err = absr(real'(yr) - rr[got]) + absr(real'(yi) - ri[got]);
          checks++;
          if (int'(oi) != got || err > 3.0 || ol != (got == M)) begin
            failures++;
            $display("frame %0d bin %0d got %0d,%0d exp %f,%f", f, got, yr, yi, rr[got], ri[got]);
          end
          got++;
        end
      end
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
