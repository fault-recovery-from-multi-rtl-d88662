// tb_modmul: checks (a*b) mod m and, in reduce mode, a mod m for a 2W-bit a,
// on a 16-bit modmul driven through a random-latency adder model; the
// expected values come from 64-bit integer arithmetic.
module tb_modmul;
  localparam int unsigned W = 16;
  logic          clk = 1'b0, rst_n, start, reduce, busy, done;
  logic [2*W-1:0] a;
  logic [5:0]    nbits;
  logic [W-1:0]  b, m, r;
  logic          add_valid, add_ready, add_cin, rsp_valid, rsp_cout;
  logic [W-1:0]  add_a, add_b, rsp_sum;
  int checks = 0, failures = 0;

  modmul #(.W(W)) dut (
    .clk, .rst_n, .start, .a, .nbits, .b, .m, .reduce, .busy, .done, .r,
    .add_valid, .add_ready, .add_a, .add_b, .add_cin,
    .add_rsp_valid(rsp_valid), .add_rsp_sum(rsp_sum), .add_rsp_cout(rsp_cout));

  tb_adder_model #(.W(W)) u_add (
    .clk, .rst_n, .add_valid, .add_ready, .add_a, .add_b, .add_cin,
    .rsp_valid, .rsp_sum, .rsp_cout);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint unsigned x, input int nb, input longint unsigned y,
                     input longint unsigned md, input bit red);
    longint unsigned expect_r;
    @(negedge clk);
    a = (2*W)'(x); nbits = 6'(nb); b = W'(y); m = W'(md); reduce = red; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    if (red) expect_r = (x & ((64'd1 << nb) - 1)) % md;
    else     expect_r = ((x & ((64'd1 << nb) - 1)) * y) % md;
    checks++;
    if (longint'(r) != expect_r) begin
      failures++;
      $display("FAIL a=%0d b=%0d m=%0d reduce=%0d: %0d expected %0d", x, y, md, red, r, expect_r);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; a = '0; nbits = '0; b = '0; m = '0; reduce = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(7, 16, 5, 11, 0);
    run(65535, 16, 65520, 65521, 0);
    run(64'hFFFF_FFFF, 32, 0, 65521, 1);
    run(61, 16, 53, 61, 0);
    for (int t = 0; t < 150; t++) begin
      longint unsigned md, x, y;
      md = longint'($urandom_range(2, 65535));
      x  = longint'($urandom_range(0, 65535));
      y  = longint'($urandom) % md;
      run(x, 16, y, md, 0);
      run(longint'($urandom), 32, 0, md, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
