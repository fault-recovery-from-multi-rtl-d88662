// tb_rsa_crt: runs the CRT exponentiation at W = 16 through a random-latency
// adder model. First a textbook key (p = 61, q = 53, d = 2753, e = 17):
// decrypting c = m^17 mod 3233 must give m back. Then random odd moduli and
// exponents, checked against the CRT formula evaluated with 64-bit integers
// (square-and-multiply, Garner recombination).
module tb_rsa_crt;
  localparam int unsigned W = 16;
  logic           clk = 1'b0, rst_n, start, busy, done;
  logic [2*W-1:0] c, msg;
  logic [W-1:0]   p, q, dp, dq, qinv;
  logic           add_valid, add_ready, add_cin, rsp_valid, rsp_cout;
  logic [W-1:0]   add_a, add_b, rsp_sum;
  int checks = 0, failures = 0, n_neg = 0;

  rsa_crt #(.W(W)) dut (
    .clk, .rst_n, .start, .c, .p, .q, .dp, .dq, .qinv, .busy, .done, .msg,
    .add_valid, .add_ready, .add_a, .add_b, .add_cin,
    .add_rsp_valid(rsp_valid), .add_rsp_sum(rsp_sum), .add_rsp_cout(rsp_cout));

  tb_adder_model #(.W(W)) u_add (
    .clk, .rst_n, .add_valid, .add_ready, .add_a, .add_b, .add_cin,
    .rsp_valid, .rsp_sum, .rsp_cout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned powmod(longint unsigned x, longint unsigned e, longint unsigned md);
    longint unsigned r = 1 % md;
    x = x % md;
    while (e != 0) begin
      if (e[0]) r = (r * x) % md;
      x = (x * x) % md;
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic longint unsigned crt_ref(longint unsigned cc, longint unsigned pp, longint unsigned qq,
                                             longint unsigned ddp, longint unsigned ddq, longint unsigned qi);
    longint unsigned mp, mq, h;
    mp = powmod(cc, ddp, pp);
    mq = powmod(cc, ddq, qq);
    h  = (qi * ((mp + pp - (mq % pp)) % pp)) % pp;
    return mq + h * qq;
  endfunction

  task automatic run(input longint unsigned cc, input longint unsigned pp, input longint unsigned qq,
                     input longint unsigned ddp, input longint unsigned ddq, input longint unsigned qi,
                     input longint unsigned expect_m);
    @(negedge clk);
    c = (2*W)'(cc); p = W'(pp); q = W'(qq); dp = W'(ddp); dq = W'(ddq); qinv = W'(qi);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (longint'(msg) != expect_m) begin
      failures++;
      $display("FAIL c=%0d p=%0d q=%0d: %0d expected %0d", cc, pp, qq, msg, expect_m);
    end
    if (powmod(cc, ddp, pp) < powmod(cc, ddq, qq) % pp) n_neg++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; c = '0; p = '0; q = '0; dp = '0; dq = '0; qinv = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // textbook key: n = 3233, d = 2753, dp = 53, dq = 49, qinv = 38
    for (int mm = 0; mm < 3233; mm += 397) run(powmod(mm, 17, 3233), 61, 53, 53, 49, 38, mm);
    for (int t = 0; t < 8; t++) begin
      longint unsigned pp, qq, ddp, ddq, qi, cc;
      pp  = longint'($urandom_range(32768, 65535)) | 1;
      qq  = longint'($urandom_range(32768, 65535)) | 1;
      ddp = longint'($urandom_range(1, 65535));
      ddq = longint'($urandom_range(1, 65535));
      qi  = longint'($urandom) % pp;
      cc  = longint'($urandom) % (pp * qq);
      run(cc, pp, qq, ddp, ddq, qi, crt_ref(cc, pp, qq, ddp, ddq, qi));
    end
    checks++;
    if (n_neg == 0) begin failures++; $display("FAIL the negative-difference path never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
