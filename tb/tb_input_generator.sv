// tb_input_generator: checks each generated vector: a carry path of a length
// from the set 80, 120, ..., 440 (a has L low ones and a 0 at bit L, b = 1),
// that a vector is held while not taken, that every length occurs, and
// that nothing is offered while disabled.
module tb_input_generator;
  localparam int unsigned W = 512;
  logic         clk = 1'b0, rst_n, enable, out_valid, out_ready;
  logic [W-1:0] a, b;
  logic [8:0]   path_len;
  int checks = 0, failures = 0;
  int seen [10];

  input_generator #(.W(W)) dut (.clk, .rst_n, .enable, .out_valid, .out_ready, .a, .b, .path_len);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] held_a;
    bit held;
    rst_n = 1'b0; enable = 1'b0; out_ready = 1'b0;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid while disabled"); end
    enable = 1'b1;
    held = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 2) != 0);
      if (out_valid) begin
        int l, carry_len;
        l = int'(path_len);
        // the carry of a + b ripples from bit 0 until the first 0 of a
        carry_len = 0;
        while (carry_len < W && a[carry_len]) carry_len++;
        checks++;
        if (b != W'(1) || carry_len != l || l < 80 || l > 440 || (l - 80) % 40 != 0) begin
          failures++;
          $display("FAIL len=%0d carry=%0d b=%h", l, carry_len, b[31:0]);
        end else seen[(l - 80) / 40]++;
        if (held) begin
          checks++;
          if (a !== held_a) begin failures++; $display("FAIL vector changed while not taken"); end
        end
        held = !out_ready;
        held_a = a;
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL length %0d never generated", 80 + 40 * i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
