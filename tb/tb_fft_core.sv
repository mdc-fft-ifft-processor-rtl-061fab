// Self-checking test of fft_core for all four lengths. Four stream blocks of
// random samples enter in serial-block format (lane l carries x[l*N/4 + t]).
// Every output bin is compared with a floating-point DFT scaled by 2**-R
// (R = number of radix-4 stages used), at the position the core's digit
// order puts it: cycle t and lane give k = sum_i k_i 4^(i-1) + k_last 4^R,
// with k_i the i-th radix-4 digit of t from the top and k_last = lane
// (+4 when the least significant cycle bit is set, radix-8 lengths).
// Also checked: the core latency (sum of 3D+3 over active stages, plus 3).
module tb_fft_core;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0;
  len_e len;
  logic signed [DATA_W-1:0] in_re [4], in_im [4];
  logic signed [OUT_W-1:0]  out_re [4], out_im [4];
  tag_t in_tag, out_tag;
  int checks = 0, failures = 0;

  fft_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [4][2048], xi [4][2048];
  real er [4][2048], ei [4][2048], rms [4];

  initial begin
    len_e lens [4] = '{LEN_128, LEN_1024, LEN_512, LEN_2048};
    in_tag = '0;
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    len = LEN_128;
    #12 rst_n = 1;
    foreach (lens[i]) begin
      int n, ll, nr, lat;
      bit r8;
      real sc;
      n = 1 << len_log2(lens[i]);
      ll = n / 4;
      r8 = (lens[i] != LEN_1024);
      nr = r8 ? (len_log2(lens[i]) - 3) / 2 : 4;
      sc = 1.0 / (1 << nr);
      lat = 3;
      for (int s = 1; s <= 4; s++)
        if (stage_active(lens[i], s)) lat += 3 * (1 << stage_dlog(lens[i], s)) + 3;
      for (int b = 0; b < 4; b++) begin
        real p;
        p = 0.0;
        for (int k = 0; k < n; k++) begin
          xr[b][k] = $signed($urandom_range(300)) - 150;
          xi[b][k] = $signed($urandom_range(300)) - 150;
        end
        for (int k = 0; k < n; k++) begin
          real ar, ai;
          ar = 0.0; ai = 0.0;
          for (int m = 0; m < n; m++) begin
            real a;
            a = 2.0 * 3.14159265358979323846 * ((m * k) % n) / n;
            ar += xr[b][m] * $cos(a) + xi[b][m] * $sin(a);
            ai += xi[b][m] * $cos(a) - xr[b][m] * $sin(a);
          end
          er[b][k] = ar * sc;
          ei[b][k] = ai * sc;
          p += er[b][k] * er[b][k] + ei[b][k] * ei[b][k];
        end
        rms[b] = $sqrt(p / n);
      end
      @(negedge clk);
      len = lens[i];
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int c = 0; c < 4 * ll + lat; c++) begin
        int b, t;
        b = c / ll;
        t = c % ll;
        in_tag.valid  = (b < 4);
        in_tag.first  = (b < 4) && (t == 0);
        in_tag.stream = 2'(b);
        for (int l = 0; l < 4; l++) begin
          in_re[l] = (b < 4) ? DATA_W'(xr[b][l * ll + t]) : '0;
          in_im[l] = (b < 4) ? DATA_W'(xi[b][l * ll + t]) : '0;
        end
        #1;
        if (c >= lat) begin
          int co, ob, ot, kb, w;
          co = c - lat;
          ob = co / ll;
          ot = co % ll;
          checks++;
          if (out_tag.valid !== (ob < 4) || out_tag.first !== (ot == 0) ||
              (ob < 4 && out_tag.stream !== 2'(ob))) begin
            failures++;
            $display("FAIL N=%0d tag at output time %0d", n, co);
          end
          if (ob < 4) begin
            // digits of the cycle count
            kb = 0;
            w = ll;
            for (int d = 0; d < nr; d++) begin
              w = w / 4;
              kb += ((ot / w) % 4) << (2 * d);
            end
            for (int ln = 0; ln < 4; ln++) begin
              int k;
              real dr, di;
              k = kb + ((ln + (r8 ? 4 * (ot % 2) : 0)) << (2 * nr));
              dr = real'(out_re[ln]) - er[ob][k];
              di = real'(out_im[ln]) - ei[ob][k];
              checks++;
              if ($sqrt(dr * dr + di * di) > 0.4 * rms[ob]) begin
                failures++;
                if (failures < 10) $display("FAIL N=%0d block %0d time %0d lane %0d (k=%0d): (%0d,%0d) expected (%.1f,%.1f)",
                                            n, ob, ot, ln, k, out_re[ln], out_im[ln], er[ob][k], ei[ob][k]);
              end
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
