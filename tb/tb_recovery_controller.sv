// tb_recovery_controller: drives Hamming weights around the threshold and
// checks the controller cycle by cycle against an event model: Unsafe one
// cycle after a reading above the threshold, Recovery Mode for exactly K
// cycles after Unsafe falls, the replay index stepping from K-1 to 0,
// OutValid as the inverse of Recovery Mode, and run-time threshold writes.
module tb_recovery_controller;
  localparam int unsigned K = 5, WW = 8, THR = 70;
  logic          clk = 1'b0, rst_n, thr_we;
  logic [WW-1:0] weight, thr_wdata, threshold;
  logic          unsafe, recovery_mode, out_valid, replay;
  logic [2:0]    replay_idx;
  int checks = 0, failures = 0;
  int n_unsafe = 0, n_full_replay = 0, n_interrupted = 0;

  recovery_controller #(.K(K), .WEIGHT_W(WW), .THRESHOLD_RESET(THR)) dut (
    .clk, .rst_n, .weight, .thr_we, .thr_wdata, .threshold, .unsafe,
    .recovery_mode, .out_valid, .replay, .replay_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int m_thr = THR;
  bit m_unsafe = 0;
  int m_left = 0;   // replay cycles still to come after Unsafe fell (K when pending)

  task automatic expect_eq(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s = %0d expected %0d at %0t", what, got, exp_v, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; thr_we = 1'b0; thr_wdata = '0; weight = 8'd60;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      bit pw;
      // inputs for this cycle
      pw = (t % 200 < 100) ? ($urandom_range(0, 99) < 6) : ($urandom_range(0, 99) < 20);
      weight = pw ? 8'(m_thr + 1 + $urandom_range(0, 30)) : 8'(m_thr - $urandom_range(0, 10));
      thr_we = (t == 1500);
      thr_wdata = 8'd72;
      #1;
      // outputs of this cycle
      expect_eq("threshold", int'(threshold), m_thr);
      expect_eq("unsafe", int'(unsafe), int'(m_unsafe));
      expect_eq("recovery_mode", int'(recovery_mode), int'(m_unsafe || m_left > 0));
      expect_eq("out_valid", int'(out_valid), int'(!(m_unsafe || m_left > 0)));
      expect_eq("replay", int'(replay), int'(!m_unsafe && m_left > 0));
      if (!m_unsafe && m_left > 0) expect_eq("replay_idx", int'(replay_idx), m_left - 1);
      @(posedge clk);
      // model update at the clock edge
      if (m_unsafe) begin
        if (m_left > 0 && m_left < K) n_interrupted++;
        m_left = K;
      end else if (m_left > 0) begin
        m_left--;
        if (m_left == 0) n_full_replay++;
      end
      if (!m_unsafe && int'(weight) > m_thr) n_unsafe++;
      m_unsafe = (int'(weight) > m_thr);
      if (thr_we) m_thr = int'(thr_wdata);
      @(negedge clk);
    end
    checks++;
    if (n_unsafe == 0 || n_full_replay == 0 || n_interrupted == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: unsafe=%0d replays=%0d interrupted=%0d",
               n_unsafe, n_full_replay, n_interrupted);
    end
    $display("attacks=%0d completed recoveries=%0d interrupted recoveries=%0d",
             n_unsafe, n_full_replay, n_interrupted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
