// tb_r2_combine: random E, O and twiddle W = c - j*s; expects E + W*O and
// E - W*O, computed here in double precision, within one LSB.
module tb_r2_combine;
  import fft_pkg::*;
  localparam int W = 20;
  localparam real PI = 3.14159265358979323846;

  logic signed [W-1:0] er, ei, orr, oi, lr, li, hr, hi;
  logic signed [15:0]  c, s;
  int checks = 0, failures = 0;

  r2_combine #(.W(W)) dut (.e_re(er), .e_im(ei), .o_re(orr), .o_im(oi),
                           .tw_c(c), .tw_s(s), .lo_re(lr), .lo_im(li),
                           .hi_re(hr), .hi_im(hi));

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
    real tr, ti, ang;
    for (int t = 0; t < 1000; t++) begin
      er  = W'($signed($urandom) >>> (32 - W + 2));
      ei  = W'($signed($urandom) >>> (32 - W + 2));
      orr = W'($signed($urandom) >>> (32 - W + 2));
      oi  = W'($signed($urandom) >>> (32 - W + 2));
      ang = 2.0 * PI * real'($urandom % 512) / 512.0;
      c   = 16'(int'($floor(16384.0 * $cos(ang) + 0.5)));
      s   = 16'(int'($floor(16384.0 * $sin(ang) + 0.5)));
      #1;
      tr = (real'(orr) * real'(c) + real'(oi) * real'(s)) / 16384.0;
      ti = (real'(oi) * real'(c) - real'(orr) * real'(s)) / 16384.0;
      checks++;
      if (absr(real'(lr) - (real'(er) + tr)) > 0.5 || absr(real'(li) - (real'(ei) + ti)) > 0.5 ||
          absr(real'(hr) - (real'(er) - tr)) > 0.5 || absr(real'(hi) - (real'(ei) - ti)) > 0.5) begin
        failures++;
        $display("t %0d got %0d,%0d %0d,%0d", t, lr, li, hr, hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
