// tb_fault_recovery_unit: the recovery unit (K = 5, threshold 70, as for the
// stand-alone adder) around a 16-bit victim_adder, under a modelled attack.
//
// Attack model: each cycle the power wasters switch on with a set
// probability and stay on for 5 cycles. While they are on, the TDC word read
// at the next clock has weight 95 instead of 60, and every sum the victim
// produces is corrupted (a timing fault). The testbench checks that every
// request gets exactly one result, in order, equal to the true sum, that a
// result is never offered while unsafe, that the attack-free latency is K
// cycles, and that attacks, recoveries, interrupted recoveries, injected
// faults and backpressure all happened.
module tb_fault_recovery_unit;
  localparam int unsigned K = 5, W = 16, DW = 2 * W + 1, RW = W + 1;
  logic            clk = 1'b0, rst_n;
  logic [127:0]    tdc_q;
  logic            thr_we;
  logic [7:0]      thr_wdata, threshold, weight;
  logic            in_valid, in_ready, out_valid;
  logic [DW-1:0]   in_data, victim_in;
  logic [RW-1:0]   out_data, victim_out, true_out;
  logic            unsafe, recovery_mode, replay;
  logic            pw_on;
  int              pw_left = 0;
  int checks = 0, failures = 0;
  int n_attacks = 0, n_faults = 0, n_recoveries = 0, n_interrupted = 0, n_backpressure = 0;
  int cycle = 0, rec_events = 0;
  bit took = 0;   // the offered request was taken at the last clock edge

  fault_recovery_unit #(.K(K), .DW(DW), .RW(RW), .THRESHOLD_RESET(70)) dut (
    .clk, .rst_n, .tdc_q, .thr_we, .thr_wdata, .threshold,
    .in_valid, .in_ready, .in_data, .out_valid, .out_data,
    .victim_in, .victim_out, .weight, .unsafe, .recovery_mode, .replay);

  victim_adder #(.W(W)) u_victim (
    .a(victim_in[DW-1:W+1]), .b(victim_in[W:1]), .cin(victim_in[0]),
    .sum(true_out[W-1:0]), .cout(true_out[W]));

  // timing fault: while the wasters are on, the captured sum is wrong
  assign victim_out = pw_on ? (true_out ^ RW'(17'h0A5A5)) : true_out;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results: {sum, accept cycle, recovery count at accept}
  logic [RW-1:0] exp_q [$];
  int            acc_cycle_q [$];
  int            acc_rec_q [$];
  int            pw_rate = 6;   // percent

  always @(posedge clk) begin
    cycle <= cycle + 1;
    // sensor: sampled at the clock edge
    for (int i = 0; i < 128; i++) tdc_q[i] <= (i < (pw_on ? 95 : 60));
    took <= in_valid && in_ready;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        logic [W-1:0] x, y;
        logic ci;
        {x, y, ci} = in_data;
        exp_q.push_back(RW'({1'b0, x} + {1'b0, y} + {{W{1'b0}}, ci}));
        acc_cycle_q.push_back(cycle);
        acc_rec_q.push_back(rec_events);
      end
      if (in_valid && !in_ready) n_backpressure++;
      if (pw_on && victim_out != true_out) n_faults++;
      if (unsafe && !recovery_mode) begin failures++; $display("FAIL unsafe without recovery mode"); end
      if (out_valid) begin
        checks++;
        if (unsafe) begin failures++; $display("FAIL result offered while unsafe"); end
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL result %h without a request", out_data);
        end else begin
          logic [RW-1:0] e;
          int ac, ar;
          e  = exp_q.pop_front();
          ac = acc_cycle_q.pop_front();
          ar = acc_rec_q.pop_front();
          if (out_data !== e) begin
            failures++;
            $display("FAIL cycle %0d: result %h expected %h", cycle, out_data, e);
          end
          if (ar == rec_events) begin
            checks++;
            if (cycle - ac != K) begin
              failures++;
              $display("FAIL latency %0d expected %0d", cycle - ac, K);
            end
          end
        end
      end
      if ($rose(unsafe) && replay == 1'b0 && $past(replay)) n_interrupted++;
      if ($rose(recovery_mode)) rec_events++;
      if ($fell(recovery_mode)) n_recoveries++;
    end
  end

  // attack source, changed between clock edges
  always @(negedge clk) begin
    if (pw_left > 0) pw_left--;
    else if (rst_n && $urandom_range(0, 999) < pw_rate * 10) begin
      pw_left = 5;
      n_attacks++;
    end
    pw_on = (pw_left > 0);
  end

  initial begin
    rst_n = 1'b0; thr_we = 1'b0; thr_wdata = '0; in_valid = 1'b0; in_data = '0; pw_on = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (threshold != 8'd70) begin failures++; $display("FAIL reset threshold %0d", threshold); end
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      // hold an offered request until taken
      if (!in_valid || took) begin
        in_valid = ($urandom_range(0, 9) < 8);
        in_data  = {W'($urandom), W'($urandom), 1'($urandom)};
      end
      thr_we = (t == 3000);
      thr_wdata = 8'd72;
      pw_rate = (t < 3000) ? 6 : 3;
    end
    @(negedge clk);
    thr_we = 1'b0;
    while (in_valid && !took) @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (threshold != 8'd72) begin failures++; $display("FAIL threshold write %0d", threshold); end
    pw_rate = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    checks++;
    if (n_attacks == 0 || n_faults == 0 || n_recoveries == 0 || n_interrupted == 0 || n_backpressure == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("attacks=%0d faulty sums=%0d recoveries=%0d interrupted=%0d backpressure cycles=%0d",
             n_attacks, n_faults, n_recoveries, n_interrupted, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
