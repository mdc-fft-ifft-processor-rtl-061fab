// Self-checking test of input_buffer. Four streams of random 8-bit samples
// enter without gaps for four symbols, first at length 128, then after a new
// start at length 512. From 3N/4 + 1 cycles after start the output must show
// stream A of symbol 0, then B, C and D of symbol 0, then A of symbol 1 and
// so on, each as N/4 cycles with lane l = x[l*N/4 + t]. Symbols 1 and 3 are
// stored with the transposed b/c/d grouping, so both groupings are checked.
module tb_input_buffer;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  len_e len;
  logic signed [IN_W-1:0]   in_re [4], in_im [4];
  logic signed [DATA_W-1:0] out_re [4], out_im [4];
  tag_t out_tag;
  int checks = 0, failures = 0, n_odd = 0;

  input_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NSYM = 4;
  int xr [NSYM][4][512], xi [NSYM][4][512];

  initial begin
    len_e lens [2] = '{LEN_128, LEN_512};
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    len = LEN_128;
    #12 rst_n = 1;
    foreach (lens[i]) begin
      int n, q;
      n = 1 << len_log2(lens[i]);
      q = n / 4;
      for (int j = 0; j < NSYM; j++)
        for (int s = 0; s < 4; s++)
          for (int k = 0; k < n; k++) begin
            xr[j][s][k] = $signed($urandom_range(255)) - 128;
            xi[j][s][k] = $signed($urandom_range(255)) - 128;
          end
      @(negedge clk);
      len = lens[i];
      for (int c = 0; c < NSYM * n; c++) begin
        int j, k;
        j = c / n;
        k = c % n;
        start = (c == 0);
        for (int s = 0; s < 4; s++) begin
          in_re[s] = IN_W'(xr[j][s][k]);
          in_im[s] = IN_W'(xi[j][s][k]);
        end
        #1;
        // output in cycle c belongs to stream block number (c - 3N/4 - 1) / (N/4);
        // in cycle 0 the output still shows the access of the previous cycle
        checks++;
        if (c == 0) begin
        end else if (c < 3 * q + 1) begin
          if (out_tag.valid) begin
            failures++;
            $display("FAIL N=%0d: valid too early at cycle %0d", n, c);
          end
        end else begin
          int co, blk, oj, os, t;
          co = c - (3 * q + 1);
          blk = co / q;
          t = co % q;
          oj = blk / 4;
          os = blk % 4;
          if (!out_tag.valid || out_tag.first !== (t == 0) || out_tag.stream !== 2'(os)) begin
            failures++;
            $display("FAIL N=%0d: tag at cycle %0d", n, c);
          end
          if (oj < NSYM) begin
            if (oj % 2 == 1 && t == 0) n_odd++;
            for (int l = 0; l < 4; l++) begin
              checks++;
              if (out_re[l] !== DATA_W'(xr[oj][os][l * q + t]) ||
                  out_im[l] !== DATA_W'(xi[oj][os][l * q + t])) begin
                failures++;
                if (failures < 10) $display("FAIL N=%0d sym %0d stream %0d lane %0d t %0d: (%0d,%0d) expected (%0d,%0d)",
                                            n, oj, os, l, t, out_re[l], out_im[l],
                                            xr[oj][os][l * q + t], xi[oj][os][l * q + t]);
              end
            end
          end
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_odd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
