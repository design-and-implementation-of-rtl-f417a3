// tb_twiddle_rom: checks every entry of a 64-entry twiddle table against
// cos/sin computed here in double precision (within one LSB of Q2.14), and
// the exact values at 0, pi/2, pi and 3*pi/2.
module tb_twiddle_rom;
  import fft_pkg::*;
  localparam int N = 64;
  localparam real PI = 3.14159265358979323846;

  logic [5:0] addr;
  logic signed [15:0] c, s;
  int checks = 0, failures = 0;

  twiddle_rom #(.N(N)) dut (.addr(addr), .cos_o(c), .sin_o(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    for (int k = 0; k < N; k++) begin
      addr = 6'(k);
      #1;
      checks++;
      if (absr(real'(c) - 16384.0 * $cos(2.0 * PI * k / N)) > 0.5001 ||
          absr(real'(s) - 16384.0 * $sin(2.0 * PI * k / N)) > 0.5001) begin
        failures++;
        $display("entry %0d: %0d %0d", k, c, s);
      end
    end
    addr = 0;  #1; checks++; if (c != 16384 || s != 0)     failures++;
    addr = 16; #1; checks++; if (c != 0 || s != 16384)     failures++;
    addr = 32; #1; checks++; if (c != -16384 || s != 0)    failures++;
    addr = 48; #1; checks++; if (c != 0 || s != -16384)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
