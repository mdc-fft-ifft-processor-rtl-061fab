// End-to-end test of the four-stream FFT/IFFT processor.
// Runs a sequence of configurations, each started with a start pulse (so the
// test also switches length and direction on the fly): 128 FFT, 512 IFFT,
// 1024 FFT, 2048 FFT, 128 IFFT. Each run feeds NSYM symbols of random
// samples on all four streams without gaps and checks every output bin of the
// first NSYM-1 symbols of every stream against a direct DFT computed here in
// floating point and multiplied by the processor's scale factor. Checks per
// run: stream order of the output blocks, block spacing of exactly N/4 cycles
// (four N-point symbols every N cycles), the start-to-first-output latency,
// the error of each bin against a tolerance and the SNR of each block.
// Mechanisms counted: radix-8 and radix-4 last stage, stage bypass (512 and
// 128), IFFT, mode switch, and transposed input-bank grouping (odd symbols).
module tb_mimo_fft_top;
  import fft_pkg::*;

  localparam int NSYM = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  len_e len_sel = LEN_128;
  logic ifft = 1'b0;
  logic signed [IN_W-1:0]  in_re [4], in_im [4];
  logic signed [OUT_W-1:0] out_re [4], out_im [4];
  logic out_valid, out_first;
  logic [1:0] out_stream;

  mimo_fft_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_radix8 = 0, n_radix4 = 0, n_bypass = 0, n_ifft = 0, n_switch = 0, n_odd = 0;
  longint cycle = 0;
  longint start_cycle = 0;
  always @(posedge clk) begin
    if (start) start_cycle <= cycle;
    cycle <= cycle + 1;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  int xr [NSYM][4][2048];
  int xi [NSYM][4][2048];
  real cs [2048], sn [2048];

  initial for (int i = 0; i < 2048; i++) begin
    cs[i] = $cos(2.0 * 3.14159265358979323846 * i / 2048.0);
    sn[i] = $sin(2.0 * 3.14159265358979323846 * i / 2048.0);
  end

  function automatic int log2i(int n);
    int r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  function automatic real scale_of(len_e l);
    case (l)
      LEN_2048, LEN_1024: return 1.0 / 16.0;
      LEN_512:            return 1.0 / 8.0;
      default:            return 1.0 / 4.0;
    endcase
  endfunction

  // expected latency from start to the first out_valid
  function automatic int latency_of(len_e l);
    int n = 1 << len_log2(l);
    int lat = 1 + 3 * n / 4 + 1;              // input register, buffer
    for (int s = 1; s <= 4; s++)
      if (stage_active(l, s)) lat += 3 * (1 << stage_dlog(l, s)) + 3;
    lat += 3;                                  // stage 5
    // sorter: half split N/8 (radix-8 lengths), commutator 3D+1 with
    // D = 64, 64, 16, 4, digit exchange 12F+8 with F = 4, 4, 1 (none for
    // 128), output register
    case (l)
      LEN_2048: lat += 256 + 193 + 56 + 1;
      LEN_1024: lat += 0 + 193 + 56 + 1;
      LEN_512:  lat += 64 + 49 + 20 + 1;
      default:  lat += 16 + 13 + 0 + 1;
    endcase
    lat += 1;                                  // output register
    return lat;
  endfunction

  task automatic run(input len_e l, input bit inv);
    int n, nb, blk, t_in;
    longint t_start, t_first, t_blk;
    real er [4][2048], ei [4][2048];   // expected block of the current stream
    real sig_p, err_p, tol, maxerr;
    int got_blocks;
    n = 1 << len_log2(l);
    for (int j = 0; j < NSYM; j++)
      for (int s = 0; s < 4; s++)
        for (int k = 0; k < n; k++) begin
          xr[j][s][k] = $signed($urandom_range(200)) - 100;
          xi[j][s][k] = $signed($urandom_range(200)) - 100;
        end
    // drive inputs in a parallel process
    fork
      begin
        for (int j = 0; j < NSYM + 1; j++)
          for (int k = 0; k < n; k++) begin
            @(negedge clk);
            start   = (j == 0 && k == 0);
            len_sel = l;
            ifft    = inv;
            for (int s = 0; s < 4; s++) begin
              in_re[s] = (j < NSYM) ? IN_W'(xr[j][s][k]) : '0;
              in_im[s] = (j < NSYM) ? IN_W'(xi[j][s][k]) : '0;
            end
          end
      end
    join_none
    @(posedge clk);
    while (!start) @(posedge clk);
    #1;
    t_start = start_cycle;
    got_blocks = 0;
    t_blk = 0;
    maxerr = 0.0;
    // collect (NSYM-1) symbols x 4 streams
    while (got_blocks < 4 * (NSYM - 1)) begin
      @(posedge clk);
      #1;
      if (out_valid && out_first) begin
        int j, s;
        j = got_blocks / 4;
        s = got_blocks % 4;
        if (got_blocks == 0) begin
          t_first = cycle;
          check(int'(t_first - t_start) == latency_of(l),
                $sformatf("latency %0d expected %0d", t_first - t_start, latency_of(l)));
        end else begin
          check(int'(cycle - t_blk) == n / 4,
                $sformatf("block spacing %0d expected %0d", cycle - t_blk, n / 4));
        end
        t_blk = cycle;
        check(int'(out_stream) == s, $sformatf("stream %0d expected %0d", out_stream, s));
        // reference DFT (or IFFT via conjugation) of this block
        for (int k = 0; k < n; k++) begin
          real ar = 0.0, ai = 0.0;
          for (int m = 0; m < n; m++) begin
            int e;
            real c, sv, xrr, xii;
            e = ((m * k) % n) * (2048 / n);
            c = cs[e];
            sv = inv ? -sn[e] : sn[e];
            xrr = xr[j][s][m];
            xii = xi[j][s][m];
            // x * (cos - j sin)
            ar += xrr * c + xii * sv;
            ai += xii * c - xrr * sv;
          end
          er[0][k] = ar * scale_of(l);
          ei[0][k] = ai * scale_of(l);
        end
        // per-bin tolerance: 0.4 of the block's RMS bin magnitude; a bin
        // taken from the wrong index or stream is off by about 1.4 RMS
        sig_p = 0.0;
        for (int k = 0; k < n; k++) sig_p += er[0][k] * er[0][k] + ei[0][k] * ei[0][k];
        tol = 0.4 * $sqrt(sig_p / n);
        sig_p = 0.0;
        err_p = 0.0;
        for (int t = 0; t < n / 4; t++) begin
          if (t > 0) begin
            @(posedge clk);
            #1;
          end
          check(out_valid, "out_valid dropped inside a block");
          for (int ln = 0; ln < 4; ln++) begin
            real dr, di, d;
            dr = real'(out_re[ln]) - er[0][4 * t + ln];
            di = real'(out_im[ln]) - ei[0][4 * t + ln];
            d = $sqrt(dr * dr + di * di);
            if (d > maxerr) maxerr = d;
            sig_p += er[0][4*t+ln] * er[0][4*t+ln] + ei[0][4*t+ln] * ei[0][4*t+ln];
            err_p += dr * dr + di * di;
            check(d <= tol, $sformatf("N=%0d ifft=%0d sym %0d stream %0d bin %0d: got (%0d,%0d) expected (%.1f,%.1f)",
                              n, inv, j, s, 4 * t + ln, out_re[ln], out_im[ln],
                              er[0][4*t+ln], ei[0][4*t+ln]));
          end
        end
        check(10.0 * $log10(sig_p / (err_p + 1e-9)) > 30.0,
              $sformatf("SNR %.1f dB too low", 10.0 * $log10(sig_p / (err_p + 1e-9))));
        if (j % 2 == 1) n_odd++;
        got_blocks++;
      end
    end
    $display("N=%0d ifft=%0d: max |err| %.2f (tolerance %.1f), last SNR %.1f dB", n, inv, maxerr, tol,
             10.0 * $log10(sig_p / (err_p + 1e-9)));
    if (l == LEN_1024) n_radix4++; else n_radix8++;
    if (l == LEN_512 || l == LEN_128) n_bypass++;
    if (inv) n_ifft++;
    wait fork;
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      in_re[s] = '0;
      in_im[s] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run(LEN_128, 1'b0);
    run(LEN_512, 1'b1);  n_switch++;
    run(LEN_1024, 1'b0); n_switch++;
    run(LEN_2048, 1'b0); n_switch++;
    run(LEN_128, 1'b1);  n_switch++;
    check(n_radix8 > 0, "radix-8 last stage never used");
    check(n_radix4 > 0, "radix-4 last stage never used");
    check(n_bypass > 0, "stage bypass never used");
    check(n_ifft > 0, "IFFT never used");
    check(n_switch > 0, "mode switch never used");
    check(n_odd > 0, "odd (transposed) symbol never checked");
    $display("mechanisms: radix8=%0d radix4=%0d bypass=%0d ifft=%0d switch=%0d odd_symbols=%0d",
             n_radix8, n_radix4, n_bypass, n_ifft, n_switch, n_odd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
