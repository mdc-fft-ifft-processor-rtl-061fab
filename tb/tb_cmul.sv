// Self-checking test of cmul: random data and coefficients; the reference
// product is computed in floating point and rounded half up, then clipped.
module tb_cmul;
  localparam int IN_W = 10, TW_W = 12, TW_FRAC = 10, OUT_W = 10;
  logic signed [IN_W-1:0]  x_re, x_im;
  logic signed [TW_W-1:0]  w_re, w_im;
  logic signed [OUT_W-1:0] p_re, p_im;
  int checks = 0, failures = 0;

  cmul #(.IN_W(IN_W), .TW_W(TW_W), .TW_FRAC(TW_FRAC), .OUT_W(OUT_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rq(real v);
    int r = $rtoi($floor(v + 0.5));
    if (r > (1 << (OUT_W - 1)) - 1) r = (1 << (OUT_W - 1)) - 1;
    if (r < -(1 << (OUT_W - 1))) r = -(1 << (OUT_W - 1));
    return r;
  endfunction

  initial begin
    for (int it = 0; it < 5000; it++) begin
      real a, b, c, d, sc;
      x_re = IN_W'($urandom);
      x_im = IN_W'($urandom);
      w_re = TW_W'($signed($urandom_range(2048)) - 1024);
      w_im = TW_W'($signed($urandom_range(2048)) - 1024);
      #1;
      sc = 1.0 * (1 << TW_FRAC);
      a = x_re; b = x_im; c = w_re / sc; d = w_im / sc;
      checks++;
      if (p_re != rq(a * c - b * d) || p_im != rq(a * d + b * c)) begin
        failures++;
        if (failures < 10) $display("FAIL: (%0d,%0d)*(%0d,%0d) = (%0d,%0d) expected (%0d,%0d)",
                                    x_re, x_im, w_re, w_im, p_re, p_im,
                                    rq(a * c - b * d), rq(a * d + b * c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
