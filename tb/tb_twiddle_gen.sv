// Self-checking test of twiddle_gen: every one of the 2048 exponents is
// compared with cos(2*pi*e/2048) - j*sin(2*pi*e/2048) scaled by 2**TW_FRAC,
// allowing one LSB of rounding difference.
module tb_twiddle_gen;
  import fft_pkg::*;
  logic [NMAX_LOG-1:0]    e;
  logic signed [TW_W-1:0] w_re, w_im;
  int checks = 0, failures = 0;

  twiddle_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(NMAX); i++) begin
      real er, ei, sc;
      e = NMAX_LOG'(i);
      #1;
      sc = 1.0 * (1 << TW_FRAC);
      er = $cos(2.0 * 3.14159265358979323846 * i / NMAX) * sc;
      ei = -$sin(2.0 * 3.14159265358979323846 * i / NMAX) * sc;
      checks++;
      if ((real'(w_re) - er) > 1.0 || (er - real'(w_re)) > 1.0 || (real'(w_im) - ei) > 1.0 || (ei - real'(w_im)) > 1.0) begin
        failures++;
        if (failures < 10) $display("FAIL e=%0d: (%0d,%0d) expected (%.2f,%.2f)", i, w_re, w_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
