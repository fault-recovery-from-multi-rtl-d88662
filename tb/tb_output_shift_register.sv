// tb_output_shift_register: checks that an entry appears at the output
// exactly K shifts after it was written, and that the register holds while
// `shift` is low.
module tb_output_shift_register;
  localparam int unsigned K = 5, W = 24;
  logic         clk = 1'b0, rst_n, shift;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  output_shift_register #(.K(K), .W(W)) dut (.clk, .rst_n, .shift, .din, .dout);

  always #50 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; shift = 1'b0; din = '0;
    for (int i = 0; i < K; i++) hist.push_front('0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      shift = (t < 20) ? 1'b1 : ($urandom_range(0, 2) != 0);
      din   = W'($urandom);
      @(posedge clk);
      if (shift) hist.push_front(din);
      @(negedge clk);
      checks++;
      if (dout !== hist[K-1]) begin
        failures++;
        $display("FAIL t=%0d out %h expected %h", t, dout, hist[K-1]);
      end
      while (hist.size() > K) void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
