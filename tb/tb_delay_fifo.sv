// Self-checking test of delay_fifo: for several run-time lengths (including
// 0 and the maximum) the output must equal the input of len cycles earlier,
// and zero while the FIFO has not yet been filled after clr.
module tb_delay_fifo;
  localparam int W = 16, DMAX = 12;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [15:0] len;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  delay_fifo #(.W(W), .DMAX(DMAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [5] = '{0, 1, 5, 12, 3};
    len = 0;
    din = 0;
    #12 rst_n = 1;
    foreach (lens[i]) begin
      @(negedge clk);
      len = 16'(lens[i]);
      clr = 1;
      @(negedge clk);
      clr = 0;
      hist.delete();
      for (int c = 0; c < 60; c++) begin
        din = W'($urandom);
        hist.push_back(din);
        #1;
        checks++;
        if (c < lens[i]) begin
          if (dout !== '0) begin
            failures++;
            $display("FAIL len %0d cycle %0d: %h before fill", lens[i], c, dout);
          end
        end else if (dout !== hist[c - lens[i]]) begin
          failures++;
          $display("FAIL len %0d cycle %0d: %h expected %h", lens[i], c, dout, hist[c - lens[i]]);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
