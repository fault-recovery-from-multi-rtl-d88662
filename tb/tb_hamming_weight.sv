// tb_hamming_weight: checks the population count of the 128-bit TDC word
// against a bit-by-bit count, for edge cases and random words.
module tb_hamming_weight;
  localparam int unsigned N = 128;
  logic [N-1:0] bits;
  logic [7:0]   weight;
  int checks = 0, failures = 0;

  hamming_weight #(.N(N)) dut (.bits, .weight);

  task automatic check(input logic [N-1:0] v);
    int expect_w = 0;
    bits = v;
    #1;
    for (int i = 0; i < N; i++) if (v[i]) expect_w++;
    checks++;
    if (int'(weight) != expect_w) begin
      failures++;
      $display("FAIL bits=%h weight=%0d expected=%0d", v, weight, expect_w);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    for (int k = 0; k <= N; k++) check((k == N) ? '1 : ((N'(1) << k) - 1'b1));
    for (int t = 0; t < 500; t++) check({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
