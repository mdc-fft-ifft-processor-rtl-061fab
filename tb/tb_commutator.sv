// Self-checking test of commutator at DMAX = 8, run with D = 8 and D = 2.
// Input lane b carries the sequence y_b[t] (t = 0..4D-1) of consecutive
// periods; each word encodes (period, lane, t). After the latency of 3D + 1
// cycles the output during block b, cycle r of a period must carry
// y_b[r + j*D] of the same period on lane j.
module tb_commutator;
  localparam int W = 16, DMAX = 8;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [2:0] dlog;
  logic first;
  logic [W-1:0] din [4], dout [4];
  int checks = 0, failures = 0;

  commutator #(.W(W), .DMAX(DMAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] code(int per, int lane, int t);
    return W'((per << 8) | (lane << 6) | t);
  endfunction

  initial begin
    int dl [2] = '{3, 1};
    first = 0;
    for (int l = 0; l < 4; l++) din[l] = '0;
    dlog = 3;
    #12 rst_n = 1;
    foreach (dl[i]) begin
      int d, lat, ncyc;
      d = 1 << dl[i];
      lat = 3 * d + 1;
      @(negedge clk);
      dlog = 3'(dl[i]);
      clr = 1;
      @(negedge clk);
      clr = 0;
      ncyc = 6 * 4 * d;
      for (int c = 0; c < ncyc + lat; c++) begin
        int per, t;
        per = c / (4 * d);
        t = c % (4 * d);
        first = (c == 0);
        for (int l = 0; l < 4; l++) din[l] = code(per, l, t);
        #1;
        if (c >= lat) begin
          int co, op, ob, r;
          co = c - lat;          // output time relative to the first period
          op = co / (4 * d);
          ob = (co % (4 * d)) / d;
          r  = co % d;
          if (op < 6) for (int j = 0; j < 4; j++) begin
            checks++;
            if (dout[j] !== code(op, ob, r + j * d)) begin
              failures++;
              if (failures < 10) $display("FAIL D=%0d out time %0d lane %0d: %h expected %h",
                                          d, co, j, dout[j], code(op, ob, r + j * d));
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
