// Self-checking test of r8_stage. Radix-8 mode (length 2048): groups of
// eight random samples enter in two cycles, lane l carrying x[i + 2l] in cycle
// i; three cycles later lane q must carry X[q] and one cycle after that
// X[q + 4], X being the unscaled 8-point DFT computed here in floating point.
// Radix-4 mode (length 1024): every cycle's four lanes are one 4-point DFT,
// expected on the lanes three cycles later. Tolerance: 2 LSB.
module tb_r8_stage;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0;
  len_e len;
  logic signed [DATA_W-1:0] in_re [4], in_im [4];
  logic signed [OUT_W-1:0]  out_re [4], out_im [4];
  tag_t in_tag, out_tag;
  int checks = 0, failures = 0;
  int n_r8 = 0, n_r4 = 0;

  r8_stage dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NG = 40;
  int xr [NG][8], xi [NG][8];

  initial begin
    len_e lens [2] = '{LEN_2048, LEN_1024};
    in_tag = '0;
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    len = LEN_2048;
    #12 rst_n = 1;
    foreach (lens[i]) begin
      bit r8;
      int np, ncyc;
      r8 = (lens[i] != LEN_1024);
      np = r8 ? 8 : 4;           // points per group
      ncyc = r8 ? 2 : 1;         // cycles per group
      for (int g = 0; g < NG; g++)
        for (int k = 0; k < 8; k++) begin
          xr[g][k] = $signed($urandom_range(1000)) - 500;
          xi[g][k] = $signed($urandom_range(1000)) - 500;
        end
      @(negedge clk);
      len = lens[i];
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int c = 0; c < NG * ncyc + 3; c++) begin
        int g, ii;
        g = c / ncyc;
        ii = c % ncyc;
        in_tag.valid = (g < NG);
        in_tag.first = (c == 0);
        in_tag.stream = '0;
        for (int l = 0; l < 4; l++) begin
          in_re[l] = (g < NG) ? DATA_W'(xr[g][r8 ? ii + 2 * l : l]) : '0;
          in_im[l] = (g < NG) ? DATA_W'(xi[g][r8 ? ii + 2 * l : l]) : '0;
        end
        #1;
        if (c >= 3) begin
          int co, og, oi;
          co = c - 3;
          og = co / ncyc;
          oi = co % ncyc;
          checks++;
          if (out_tag.valid !== (og < NG) || out_tag.first !== (co == 0)) begin
            failures++;
            $display("FAIL tag at output time %0d", co);
          end
          if (og < NG) for (int q = 0; q < 4; q++) begin
            real er, ei, dr, di;
            int kk;
            kk = 4 * oi + q;
            er = 0.0; ei = 0.0;
            for (int m = 0; m < np; m++) begin
              real a;
              a = 2.0 * 3.14159265358979323846 * m * kk / np;
              er += xr[og][m] * $cos(a) + xi[og][m] * $sin(a);
              ei += xi[og][m] * $cos(a) - xr[og][m] * $sin(a);
            end
            if (er > 2047.0) er = 2047.0;
            if (er < -2048.0) er = -2048.0;
            if (ei > 2047.0) ei = 2047.0;
            if (ei < -2048.0) ei = -2048.0;
            dr = real'(out_re[q]) - er;
            di = real'(out_im[q]) - ei;
            checks++;
            if (dr > 2.0 || dr < -2.0 || di > 2.0 || di < -2.0) begin
              failures++;
              if (failures < 10) $display("FAIL radix-%0d group %0d X[%0d]: (%0d,%0d) expected (%.1f,%.1f)",
                                          np, og, kk, out_re[q], out_im[q], er, ei);
            end
            if (r8) n_r8++; else n_r4++;
          end
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_r8 == 0 || n_r4 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
