// Self-checking test of output_sorter for all four lengths. Six blocks enter
// in the core's output order; each word carries its own bin index k in the
// real part and the block number in the imaginary part. The position of bin
// k in the core order is: cycle t whose radix-4 digits from the top are
// k_1..k_R, lane = k_last mod 4, plus the least significant cycle bit =
// k_last div 4 for the radix-8 lengths. After its latency (506, 250, 134 or 30
// cycles for 2048, 1024, 512, 128) the sorter must deliver every block in natural order, lane l of cycle t
// carrying bin 4t + l, with the stream tags of the block.
module tb_output_sorter;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0;
  len_e len;
  logic signed [OUT_W-1:0] in_re [4], in_im [4], out_re [4], out_im [4];
  tag_t in_tag, out_tag;
  int checks = 0, failures = 0;

  output_sorter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 6;

  // latency worked out from the stage sizes: half split N/8 (not for 1024),
  // commutator 3D+1, digit exchange 12F+8 (not for 128), output register
  function automatic int sorter_latency(len_e l);
    case (l)
      LEN_2048: return 256 + 3 * 64 + 1 + 12 * 4 + 8 + 1;
      LEN_1024: return 0 + 3 * 64 + 1 + 12 * 4 + 8 + 1;
      LEN_512:  return 64 + 3 * 16 + 1 + 12 * 1 + 8 + 1;
      default:  return 16 + 3 * 4 + 1 + 0 + 1;
    endcase
  endfunction

  initial begin
    len_e lens [4] = '{LEN_2048, LEN_128, LEN_1024, LEN_512};
    in_tag = '0;
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    len = LEN_2048;
    #12 rst_n = 1;
    foreach (lens[i]) begin
      int n, ll, nr, lat;
      bit r8;
      n = 1 << len_log2(lens[i]);
      ll = n / 4;
      r8 = (lens[i] != LEN_1024);
      nr = r8 ? (len_log2(lens[i]) - 3) / 2 : 4;
      lat = sorter_latency(lens[i]);
      @(negedge clk);
      len = lens[i];
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int c = 0; c < NB * ll + lat; c++) begin
        int b, t, kb, w;
        b = c / ll;
        t = c % ll;
        in_tag.valid  = (b < NB);
        in_tag.first  = (b < NB) && (t == 0);
        in_tag.stream = 2'(b);
        kb = 0;
        w = ll;
        for (int d = 0; d < nr; d++) begin
          w = w / 4;
          kb += ((t / w) % 4) << (2 * d);
        end
        for (int ln = 0; ln < 4; ln++) begin
          in_re[ln] = OUT_W'(kb + ((ln + (r8 ? 4 * (t % 2) : 0)) << (2 * nr)));
          in_im[ln] = OUT_W'(b);
        end
        #1;
        if (c >= lat) begin
          int co, ob, ot;
          co = c - lat;
          ob = co / ll;
          ot = co % ll;
          checks++;
          if (out_tag.valid !== (ob < NB) || (ob < NB && (out_tag.first !== (ot == 0) ||
                                                           out_tag.stream !== 2'(ob)))) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d tag at output time %0d", n, co);
          end
          if (ob < NB) for (int ln = 0; ln < 4; ln++) begin
            checks++;
            if (out_re[ln] !== OUT_W'(4 * ot + ln) || out_im[ln] !== OUT_W'(ob)) begin
              failures++;
              if (failures < 10) $display("FAIL N=%0d block %0d time %0d lane %0d: bin %0d of block %0d",
                                          n, ob, ot, ln, out_re[ln], out_im[ln]);
            end
          end
        end else if (c > 0) begin
          checks++;
          if (out_tag.valid) begin
            failures++;
            $display("FAIL N=%0d valid too early at %0d", n, c);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
