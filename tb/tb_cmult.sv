// tb_cmult: random complex operands and twiddles; the product
// (a_re + j*a_im)(c - j*s) / 2^14 is computed here in double precision and
// the unit's result must be within half an LSB (round to nearest).
module tb_cmult;
  import fft_pkg::*;
  localparam int W = 20;

  logic signed [W-1:0] ar, ai, pr, pi;
  logic signed [15:0]  c, s;
  int checks = 0, failures = 0;

  cmult #(.W(W)) dut (.a_re(ar), .a_im(ai), .c(c), .s(s), .p_re(pr), .p_im(pi));

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
    real er, ei;
    for (int t = 0; t < 2000; t++) begin
      ar = W'($signed($urandom) >>> (32 - W + 1));
      ai = W'($signed($urandom) >>> (32 - W + 1));
      c  = 16'($signed(16'($urandom)) >>> 1);
      s  = 16'($signed(16'($urandom)) >>> 1);
      if (t == 0) begin c = 16384; s = 0; end
      if (t == 1) begin c = 0; s = -16384; end
      #1;
      er = (real'(ar) * real'(c) + real'(ai) * real'(s)) / 16384.0;
      ei = (real'(ai) * real'(c) - real'(ar) * real'(s)) / 16384.0;
      checks++;
      if (absr(real'(pr) - er) > 0.5 || absr(real'(pi) - ei) > 0.5) begin
        failures++;
        $display("a=%0d,%0d w=%0d,%0d got %0d,%0d exp %f,%f", ar, ai, c, s, pr, pi, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
