// Self-checking test of radix4_bf: random lanes, reference 4-point DFT
// computed with explicit complex powers of -j, then rounded and saturated
// the same way (round half up, divide by 2**SHIFT, clip to OUT_W bits).
module tb_radix4_bf;
  localparam int IN_W = 10, OUT_W = 10, SHIFT = 1;
  logic signed [IN_W-1:0]  x_re [4], x_im [4];
  logic signed [OUT_W-1:0] y_re [4], y_im [4];
  int checks = 0, failures = 0;

  radix4_bf #(.IN_W(IN_W), .OUT_W(OUT_W), .SHIFT(SHIFT)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rs(int v);
    int r = (v + (1 << (SHIFT - 1))) >>> SHIFT;
    if (r > (1 << (OUT_W - 1)) - 1) r = (1 << (OUT_W - 1)) - 1;
    if (r < -(1 << (OUT_W - 1))) r = -(1 << (OUT_W - 1));
    return r;
  endfunction

  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int l = 0; l < 4; l++) begin
        if (it < 4) begin   // corner cases: all maximum / all minimum
          x_re[l] = (it[0]) ? -(1 << (IN_W - 1)) : (1 << (IN_W - 1)) - 1;
          x_im[l] = (it[1]) ? -(1 << (IN_W - 1)) : (1 << (IN_W - 1)) - 1;
        end else begin
          x_re[l] = IN_W'($urandom);
          x_im[l] = IN_W'($urandom);
        end
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        int ar, ai;
        ar = 0;
        ai = 0;
        for (int l = 0; l < 4; l++) begin
          // (-j)^(l*k): 0 -> 1, 1 -> -j, 2 -> -1, 3 -> +j
          case ((l * k) % 4)
            0: begin ar += x_re[l]; ai += x_im[l]; end
            1: begin ar += x_im[l]; ai -= x_re[l]; end
            2: begin ar -= x_re[l]; ai -= x_im[l]; end
            default: begin ar -= x_im[l]; ai += x_re[l]; end
          endcase
        end
        checks++;
        if (y_re[k] != rs(ar) || y_im[k] != rs(ai)) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d k %0d: got %0d,%0d expected %0d,%0d",
                                      it, k, y_re[k], y_im[k], rs(ar), rs(ai));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
