// tb_victim_adder: checks the 512-bit adder against a bit-serial ripple
// model, including full-length carry chains and the carry in and out.
module tb_victim_adder;
  localparam int unsigned W = 512;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  victim_adder #(.W(W)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W-1:0] s;
    logic         c;
    a = x; b = y; cin = ci;
    #1;
    c = ci;
    for (int i = 0; i < W; i++) begin
      s[i] = x[i] ^ y[i] ^ c;
      c    = (x[i] & y[i]) | (c & (x[i] ^ y[i]));
    end
    checks++;
    if (sum !== s || cout !== c) begin
      failures++;
      $display("FAIL cin=%0d cout=%0d expected %0d", ci, cout, c);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, W'(1), 1'b0);
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    for (int l = 80; l <= 440; l += 40) check((W'(1) << l) - 1'b1, W'(1), 1'b0);
    for (int t = 0; t < 300; t++) check(rnd(), rnd(), 1'($urandom));
    for (int t = 0; t < 50; t++) begin
      logic [W-1:0] x = rnd();
      check(x, ~x, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
