// tb_pw_enable_gen: checks that every activation lasts exactly 5 cycles,
// that rate 0 never activates, that the activation frequency matches the
// rate (6%, 3.5% and 50% within a statistical margin), and that
// activations are separated by at least one off cycle.
module tb_pw_enable_gen;
  logic        clk = 1'b0, rst_n, pw_enable;
  logic [15:0] rate;
  int checks = 0, failures = 0;

  pw_enable_gen dut (.clk, .rst_n, .rate, .pw_enable);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int r, input int ncyc);
    int on_run = 0, starts = 0, off_cycles = 0;
    bit prev = 0;
    real p, expect_p;
    @(negedge clk) rate = 16'(r);
    // let an activation started at the old rate finish
    repeat (8) @(negedge clk);
    prev = pw_enable;
    on_run = pw_enable ? 1 : 0;
    for (int t = 0; t < ncyc; t++) begin
      @(negedge clk);
      if (!prev) off_cycles++;
      if (pw_enable) begin
        if (!prev) begin starts++; on_run = 0; end
        on_run++;
      end else if (prev) begin
        checks++;
        if (on_run != 5 && starts > 0) begin failures++; $display("FAIL activation lasted %0d cycles", on_run); end
      end
      prev = pw_enable;
    end
    p = (off_cycles > 0) ? real'(starts) / off_cycles : 0.0;
    expect_p = real'(r) / 65536.0;
    $display("rate %0d/65536: %0d activations, %.4f per off cycle (expected %.4f)", r, starts, p, expect_p);
    checks++;
    if (r == 0 && starts != 0) begin failures++; $display("FAIL activations at rate 0"); end
    if (r != 0 && (p < expect_p * 0.85 || p > expect_p * 1.15)) begin
      failures++; $display("FAIL activation frequency off");
    end
  endtask

  initial begin
    rst_n = 1'b0; rate = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    measure(0, 5000);
    measure(3932, 100000);   // 6%
    measure(2294, 100000);   // 3.5%
    measure(32768, 20000);   // 50%
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
