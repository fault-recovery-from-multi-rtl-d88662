// tb_fr_rsa_top: end-to-end test of fr_rsa_top at a reduced width (W = 32, a 64-bit RSA).
//
// RSA side: 4 CRT exponentiation(s) with random odd moduli and exponents,
// checked against the CRT formula computed here with wide integers
// (square-and-multiply, Garner recombination). Meanwhile the power wasters
// of an attacker are switched by the design's pw_enable_gen: each cycle they
// switch on with probability 6% and stay on for 5 cycles; while on, the
// testbench's supply model makes the TDC read a weight of 100 and forces every
// sum the victim adder produces wrong. The RSA result must still be exact. Rig side: the input generator
// feeds the K = 5 unit under its own attack model; every released sum is
// compared with the true sum of the vector that was accepted.
// Also checked: Unsafe rises exactly 2 cycles after the wasters switch on,
// an attack-free addition takes K cycles, and each mechanism (attack,
// injected fault, recovery, interrupted recovery, backpressure, run-time
// threshold write, negative CRT difference, rig recovery) happens.
module tb_fr_rsa_top;
  localparam int unsigned W = 32;
  localparam int unsigned K = 2, K_RIG = 5;
  logic           clk = 1'b0, clk_rig = 1'b0, rst_n, rst_rig_n;
  logic [7:0]     droop, rig_droop;
  logic           thr_we, rig_thr_we, start, busy, done, unsafe, recovery_mode, out_valid_window, replay;
  logic [7:0]     thr_wdata, rig_thr_wdata, weight, threshold, rig_weight, rig_threshold;
  logic [2*W-1:0] c, msg;
  logic [W-1:0]   p, q, dp, dq, qinv, rig_sum;
  logic [15:0]    pw_rate, rig_pw_rate;
  logic           pw_enable, rig_pw_enable;
  logic           rig_enable, rig_out_valid, rig_cout, rig_unsafe, rig_recovery_mode, rig_replay;
  int checks = 0, failures = 0;

  fr_rsa_top #(.W(W)) dut (
    .clk, .rst_n, .droop, .pw_rate, .pw_enable, .thr_we, .thr_wdata, .start, .c, .p, .q, .dp, .dq, .qinv,
    .busy, .done, .msg, .unsafe, .recovery_mode, .out_valid_window, .replay, .weight, .threshold,
    .clk_rig, .rst_rig_n, .rig_droop, .rig_pw_rate, .rig_pw_enable, .rig_thr_we, .rig_thr_wdata, .rig_enable,
    .rig_out_valid, .rig_sum, .rig_cout, .rig_unsafe, .rig_recovery_mode, .rig_replay,
    .rig_weight, .rig_threshold);

  always #5 clk = ~clk;       // RSA clock
  always #3 clk_rig = ~clk_rig; // faster rig clock

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- attack models ----------------
  // The design's own enable generators decide when the wasters are on; the
  // testbench supplies the droop and the timing faults they would cause.
  bit  pw_on = 0, rig_pw_on = 0, prev_rig_pw = 0;
  int  n_attacks = 0, n_faults = 0, n_rig_attacks = 0, n_rig_faults = 0;

  assign pw_rate     = 16'(6 * 65536 / 100);
  assign rig_pw_rate = 16'(6 * 65536 / 100);
  assign droop       = pw_enable ? 8'd40 : 8'd0;
  assign rig_droop   = rig_pw_enable ? 8'd40 : 8'd0;

  always @(negedge clk) begin
    pw_on = pw_enable;
    if (pw_on) force dut.u_adder.sum = dut.u_adder.a ^ dut.u_adder.b ^ W'(1);
    else       release dut.u_adder.sum;
  end

  always @(negedge clk_rig) begin
    rig_pw_on = rig_pw_enable;
    if (rig_pw_on) force dut.u_rig_adder.sum = dut.u_rig_adder.a ^ dut.u_rig_adder.b;
    else           release dut.u_rig_adder.sum;
  end

  // ---------------- RSA-side monitors ----------------
  int cyc = 0, rec_events = 0, n_recoveries = 0, n_interrupted = 0, n_backpressure = 0;
  int n_adds = 0, n_lat_checked = 0, pw_start_cyc = -100, n_detect_checked = 0;
  int issue_cyc = 0, issue_rec = 0;
  bit prev_pw = 0, prev_replay = 0, prev_unsafe = 0, prev_rec = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (pw_on && !prev_pw) begin pw_start_cyc = cyc; n_attacks++; end
      if (unsafe && !prev_unsafe && !prev_rec) begin
        checks++; n_detect_checked++;
        if (cyc - pw_start_cyc != 2) begin
          failures++;
          $display("FAIL Unsafe %0d cycles after the wasters switched on, expected 2", cyc - pw_start_cyc);
        end
      end
      if (pw_on && dut.v_out[W-1:0] != W'(dut.v_in[2*W:W+1] + dut.v_in[W:1] + W'(dut.v_in[0]))) n_faults++;
      if (unsafe && !prev_unsafe && prev_replay) n_interrupted++;
      if (recovery_mode && !prev_rec) rec_events++;
      if (!recovery_mode && prev_rec) n_recoveries++;
      if (dut.add_valid && !dut.add_ready) n_backpressure++;
      if (dut.add_valid && dut.add_ready) begin issue_cyc = cyc; issue_rec = rec_events; n_adds++; end
      if (dut.rsp_valid && issue_rec == rec_events && !recovery_mode) begin
        n_lat_checked++;
        if (cyc - issue_cyc != K) begin
          checks++; failures++;
          $display("FAIL addition latency %0d expected %0d", cyc - issue_cyc, K);
        end
      end
      if (dut.rsp_valid && unsafe) begin checks++; failures++; $display("FAIL sum released while unsafe"); end
      prev_pw = pw_on; prev_replay = replay; prev_unsafe = unsafe; prev_rec = recovery_mode;
    end
  end

  // ---------------- rig scoreboard ----------------
  logic [W:0] rig_exp [$];
  int n_rig_results = 0, n_rig_recoveries = 0;
  bit prev_rig_rec = 0;
  always @(posedge clk_rig) begin
    if (rst_rig_n) begin
      if (dut.gen_valid && dut.gen_ready) rig_exp.push_back({1'b0, dut.gen_a} + {1'b0, dut.gen_b});
      if (rig_pw_on && dut.rig_v_out[W-1:0] != W'(dut.rig_v_in[2*W:W+1] + dut.rig_v_in[W:1])) n_rig_faults++;
      if (!rig_recovery_mode && prev_rig_rec) n_rig_recoveries++;
      if (rig_pw_on && !prev_rig_pw) n_rig_attacks++;
      prev_rig_pw = rig_pw_on;
      prev_rig_rec = rig_recovery_mode;
      if (rig_out_valid) begin
        logic [W:0] e;
        checks++;
        n_rig_results++;
        if (rig_exp.size() == 0) begin failures++; $display("FAIL rig result without a vector"); end
        else begin
          e = rig_exp.pop_front();
          if ({rig_cout, rig_sum} !== e) begin failures++; $display("FAIL rig sum wrong"); end
        end
      end
    end
  end

  // ---------------- reference ----------------
  function automatic logic [W-1:0] mulmod(logic [W-1:0] x, logic [W-1:0] y, logic [W-1:0] md);
    logic [2*W-1:0] pr;
    pr = {{W{1'b0}}, x} * {{W{1'b0}}, y};
    return W'(pr % {{W{1'b0}}, md});
  endfunction

  function automatic logic [W-1:0] powmod(logic [2*W-1:0] cc, logic [W-1:0] e, logic [W-1:0] md);
    logic [W-1:0] r, x;
    x = W'(cc % {{W{1'b0}}, md});
    r = W'(1);
    for (int i = W - 1; i >= 0; i--) begin
      r = mulmod(r, r, md);
      if (e[i]) r = mulmod(r, x, md);
    end
    return r;
  endfunction

  function automatic logic [W-1:0] rnd_w();
    logic [W-1:0] v;
    for (int i = 0; i < (W + 31) / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  int n_neg = 0;

  initial begin
    rst_n = 1'b0; rst_rig_n = 1'b0; thr_we = 1'b0; rig_thr_we = 1'b0; thr_wdata = '0; rig_thr_wdata = '0;
    start = 1'b0; c = '0; p = '0; q = '0; dp = '0; dq = '0; qinv = '0; rig_enable = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) begin rst_n = 1'b1; rst_rig_n = 1'b1; end
    checks++;
    if (threshold != 8'd68 || rig_threshold != 8'd70) begin failures++; $display("FAIL reset thresholds"); end
    rig_enable = 1'b1;
    for (int op = 0; op < 4; op++) begin
      logic [W-1:0] mp, mq, mqp, d, h;
      logic [2*W-1:0] expect_m;
      p    = rnd_w() | {1'b1, {(W-1){1'b0}}} | W'(1);
      q    = rnd_w() | {1'b1, {(W-1){1'b0}}} | W'(1);
      dp   = rnd_w();
      dq   = rnd_w();
      qinv = W'({{W{1'b0}}, rnd_w()} % {{W{1'b0}}, p});
      c    = {rnd_w(), rnd_w()} % ({{W{1'b0}}, p} * {{W{1'b0}}, q});
      mp   = powmod(c, dp, p);
      mq   = powmod(c, dq, q);
      mqp  = W'({{W{1'b0}}, mq} % {{W{1'b0}}, p});
      d    = (mp >= mqp) ? (mp - mqp) : W'({1'b0, mp} + {1'b0, p} - {1'b0, mqp});
      if (mp < mqp) n_neg++;
      h    = mulmod(qinv, d, p);
      expect_m = {{W{1'b0}}, h} * {{W{1'b0}}, q} + {{W{1'b0}}, mq};
      @(negedge clk);
      start = 1'b1;
      thr_we = (op == 1);
      thr_wdata = 8'd67;
      @(negedge clk);
      start = 1'b0;
      thr_we = 1'b0;
      while (!done) @(negedge clk);
      checks++;
      if (msg !== expect_m) begin
        failures++;
        $display("FAIL RSA result %h expected %h", msg, expect_m);
      end
    end
    checks++;
    if (4 > 1 && threshold != 8'd67) begin failures++; $display("FAIL threshold write"); end
    checks++;
    if (n_attacks == 0 || n_faults == 0 || n_recoveries == 0 || n_interrupted == 0 || n_backpressure == 0 ||
        n_detect_checked == 0 || n_lat_checked == 0 || (4 > 2 && n_neg == 0) ||
        n_rig_attacks == 0 || n_rig_faults == 0 || n_rig_recoveries == 0 || n_rig_results == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("RSA: ops=%0d additions=%0d cycles=%0d attacks=%0d faulty sums=%0d recoveries=%0d interrupted=%0d backpressure=%0d negative-difference=%0d",
             4, n_adds, cyc, n_attacks, n_faults, n_recoveries, n_interrupted, n_backpressure, n_neg);
    $display("RSA: detection latency checked %0d times, addition latency checked %0d times",
             n_detect_checked, n_lat_checked);
    $display("rig: results=%0d attacks=%0d faulty sums=%0d recoveries=%0d",
             n_rig_results, n_rig_attacks, n_rig_faults, n_rig_recoveries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
