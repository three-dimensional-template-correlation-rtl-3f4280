// Testbench for sum_delay_line: for several lengths (including 0 and the
// maximum) feeds a random stream with random gaps in the enable and checks
// that each output equals the input 'len' enabled clocks earlier.
module sum_delay_line_tb;
  localparam int W = 10, MAXLEN = 13, LW = $clog2(MAXLEN + 1);
  logic clk = 0, en = 0, clear = 0;
  logic [LW-1:0] len = '0;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0;

  sum_delay_line #(.W(W), .MAXLEN(MAXLEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist [$];
  initial begin
    int lens [5] = '{0, 1, 5, 12, 13};
    foreach (lens[t]) begin
      @(negedge clk);
      len = LW'(lens[t]); clear = 1; en = 0;
      @(negedge clk);
      clear = 0;
      hist.delete();
      for (int n = 0; n < 200; n++) begin
        en = ($urandom_range(3) != 0);
        din = W'($urandom);
        #1;
        if (en) begin
          hist.push_back(din);
          if (hist.size() > lens[t]) begin
            checks++;
            if (dout != hist[hist.size() - 1 - lens[t]]) begin
              failures++;
              if (failures < 10) $display("FAIL len %0d n %0d", lens[t], n);
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
