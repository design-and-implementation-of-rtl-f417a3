// tb_r4_butterfly: random operands and twiddles.  The expected outputs are
// the four-point DFT of the inputs, computed here as sums of x[n]*(-j)^(n*m),
// each multiplied by its twiddle, in double precision; results must match
// within one LSB.  With real_only set the imaginary inputs carry garbage and
// the expected outputs are computed with them taken as zero.
module tb_r4_butterfly;
  import fft_pkg::*;
  localparam int W = 20;
  localparam real PI = 3.14159265358979323846;

  logic real_only;
  logic signed [W-1:0] xr [4], xi [4], yr [4], yi [4];
  logic signed [15:0]  tc [1:3], ts [1:3];
  int checks = 0, failures = 0;

  r4_butterfly #(.W(W)) dut (.real_only(real_only), .x_re(xr), .x_im(xi),
                             .tw_c(tc), .tw_s(ts), .y_re(yr), .y_im(yi));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    real vr [4], vi [4], sr, si, cr, ci, er, ei, ang;
    for (int t = 0; t < 1000; t++) begin
      real_only = (t % 4 == 3);
      for (int i = 0; i < 4; i++) begin
        xr[i] = W'($signed($urandom) >>> (32 - W + 3));
        xi[i] = W'($signed($urandom) >>> (32 - W + 3));
        vr[i] = real'(xr[i]);
        vi[i] = real_only ? 0.0 : real'(xi[i]);
      end
      for (int m = 1; m < 4; m++) begin
        ang   = 2.0 * PI * real'($urandom % 1024) / 1024.0;
        tc[m] = 16'(int'($floor(16384.0 * $cos(ang) + 0.5)));
        ts[m] = 16'(int'($floor(16384.0 * $sin(ang) + 0.5)));
      end
      #1;
      for (int m = 0; m < 4; m++) begin
        sr = 0.0; si = 0.0;
        for (int n = 0; n < 4; n++) begin
          // (-j)^(n*m)
          case ((n * m) % 4)
            0: begin sr += vr[n]; si += vi[n]; end
            1: begin sr += vi[n]; si -= vr[n]; end
            2: begin sr -= vr[n]; si -= vi[n]; end
            default: begin sr -= vi[n]; si += vr[n]; end
          endcase
        end
        if (m == 0) begin er = sr; ei = si; end
        else begin
          cr = real'(tc[m]) / 16384.0;
          ci = real'(ts[m]) / 16384.0;
          er = sr * cr + si * ci;
          ei = si * cr - sr * ci;
        end
        checks++;
        if (absr(real'(yr[m]) - er) > 0.5 || absr(real'(yi[m]) - ei) > 0.5) begin
          failures++;
          $display("t %0d out %0d got %0d,%0d exp %f,%f", t, m, yr[m], yi[m], er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
