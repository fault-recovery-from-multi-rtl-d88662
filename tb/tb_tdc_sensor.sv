// tb_tdc_sensor: checks the sensor model's thermometer word: the number of
// ones is 60 plus the droop, clipped to 128, it is captured one clock after
// the droop is applied, and the ones fill the low stages.
module tb_tdc_sensor;
  logic         clk = 1'b0;
  logic [7:0]   droop;
  logic [127:0] tdc_q;
  int checks = 0, failures = 0;

  tdc_sensor dut (.clk, .droop, .tdc_q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    droop = 8'd0;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      int d, ones, expect_w;
      logic [127:0] prev_word;
      d = (t < 256) ? t : int'($urandom_range(0, 255));
      @(negedge clk);
      prev_word = tdc_q;
      droop = 8'(d);
      #1;
      checks++;
      if (tdc_q !== prev_word) begin failures++; $display("FAIL word changed prev_word the clock"); end
      @(posedge clk); #1;
      expect_w = (60 + d > 128) ? 128 : 60 + d;
      ones = 0;
      for (int i = 0; i < 128; i++) ones += int'(tdc_q[i]);
      checks++;
      if (ones != expect_w || (expect_w < 128 && tdc_q[expect_w] != 1'b0) || tdc_q[expect_w-1] != 1'b1) begin
        failures++;
        $display("FAIL droop=%0d ones=%0d expected=%0d", d, ones, expect_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
