// Self-checking test of r4_stage. A stage-3 instance (D = 8 for 2048, D = 4
// for 1024) receives consecutive sub-transforms of 16*D points, lane l
// carrying x[t + 4*D*l]. The expected output of each sub-transform is
// computed here in floating point: y_b[t] = (sum_l x[t+4Dl] (-j)^(l b)) / 2,
// times exp(-j 2 pi t b / (16 D)), delivered during block b on lane j with
// t = r + j*D, 3*D + 3 cycles after the input. A stage-2 instance at length
// 128 must pass data and tags through unchanged (stage bypass).
module tb_r4_stage;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0;
  len_e len;
  logic signed [DATA_W-1:0] in_re [4], in_im [4], out_re [4], out_im [4];
  logic signed [DATA_W-1:0] b_re [4], b_im [4];
  tag_t in_tag, out_tag, b_tag;
  int checks = 0, failures = 0;

  r4_stage #(.STAGE(3)) dut (.*);
  r4_stage #(.STAGE(2)) dut_bypass (.clk, .rst_n, .clr, .len(LEN_128), .in_re, .in_im,
    .in_tag, .out_re(b_re), .out_im(b_im), .out_tag(b_tag));
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NP = 6;
  int xr [NP][128], xi [NP][128];

  initial begin
    len_e lens [2] = '{LEN_2048, LEN_1024};
    in_tag = '0;
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    len = LEN_2048;
    #12 rst_n = 1;
    foreach (lens[i]) begin
      int d, ll, m, lat;
      d = (lens[i] == LEN_2048) ? 8 : 4;
      ll = 4 * d;
      m = 16 * d;
      lat = 3 * d + 3;
      for (int p = 0; p < NP; p++)
        for (int k = 0; k < m; k++) begin
          xr[p][k] = $signed($urandom_range(400)) - 200;
          xi[p][k] = $signed($urandom_range(400)) - 200;
        end
      @(negedge clk);
      len = lens[i];
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int c = 0; c < NP * ll + lat; c++) begin
        int p, t;
        p = c / ll;
        t = c % ll;
        in_tag.valid  = (p < NP);
        in_tag.first  = (p < NP) && (t == 0);
        in_tag.stream = 2'(p);
        for (int l = 0; l < 4; l++) begin
          in_re[l] = (p < NP) ? DATA_W'(xr[p][t + ll * l]) : '0;
          in_im[l] = (p < NP) ? DATA_W'(xi[p][t + ll * l]) : '0;
        end
        #1;
        // bypass instance
        checks++;
        if (b_re != in_re || b_im != in_im || b_tag != in_tag) begin
          failures++;
          $display("FAIL bypass at cycle %0d", c);
        end
        if (c >= lat) begin
          int co, op, ob, r;
          co = c - lat;
          op = co / ll;
          ob = (co % ll) / d;
          r = co % d;
          checks++;
          if (out_tag.valid !== (op < NP) || out_tag.first !== ((co % ll) == 0)) begin
            failures++;
            $display("FAIL tag at output time %0d", co);
          end
          if (op < NP) for (int j = 0; j < 4; j++) begin
            real yr, yi, ang, er, ei, dr, di;
            int tt;
            tt = r + j * d;
            yr = 0.0; yi = 0.0;
            for (int l = 0; l < 4; l++) begin
              case ((l * ob) % 4)
                0: begin yr += xr[op][tt + ll*l]; yi += xi[op][tt + ll*l]; end
                1: begin yr += xi[op][tt + ll*l]; yi -= xr[op][tt + ll*l]; end
                2: begin yr -= xr[op][tt + ll*l]; yi -= xi[op][tt + ll*l]; end
                default: begin yr -= xi[op][tt + ll*l]; yi += xr[op][tt + ll*l]; end
              endcase
            end
            yr = yr / 2.0; yi = yi / 2.0;
            ang = 2.0 * 3.14159265358979323846 * tt * ob / m;
            er = yr * $cos(ang) + yi * $sin(ang);
            ei = yi * $cos(ang) - yr * $sin(ang);
            dr = real'(out_re[j]) - er;
            di = real'(out_im[j]) - ei;
            checks++;
            if (dr > 2.0 || dr < -2.0 || di > 2.0 || di < -2.0) begin
              failures++;
              if (failures < 10) $display("FAIL D=%0d time %0d lane %0d: (%0d,%0d) expected (%.1f,%.1f)",
                                          d, co, j, out_re[j], out_im[j], er, ei);
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
