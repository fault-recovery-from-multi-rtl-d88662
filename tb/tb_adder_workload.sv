// tb_adder_workload: the stand-alone 512-bit adder experiments, on five
// protected adders side by side with shift register depths K = 1 to 5,
// each fed by its own input_generator (random carry paths of 80 to 440
// stages) and all watched by one TDC model on a shared supply.
//
// For each power-waster activation rate 0%, 1%, ..., 6% (wasters on for 5
// cycles per activation; while on, the TDC reads weight 95 and every sum
// whose carry ripples through 380 stages or more is corrupted) it runs a
// fixed number of cycles and counts, per
// depth, the results released and the wrong results that escaped. It
// prints throughput against rate (results per cycle, as in the throughput
// experiment) and escaped errors against depth (as in the depth
// experiment). Checked: with no attack every depth delivers one result per
// cycle; depths of at least 2 never release a wrong sum; depth 1, shorter
// than the 2-cycle detection delay, does; throughput falls as the rate rises.
// A second phase sweeps the TDC threshold at 6% with droops of random depth,
// where the adder only fails for droops that give a weight of 73 or more:
// thresholds up to 72 release no wrong sum, relaxed ones gain throughput
// and let wrong sums through (as in the threshold experiment).
// A third phase, at 3.5% and threshold 70, sorts results by carry path
// length and sets the K = 5 unit beside an unprotected adder fed by its own
// generator: unprotected, only the long paths fail; protected, no result is
// wrong, but fewer complete in the same time (as in the path-length
// experiments). The 380-stage failure point is this testbench's model.
// Under this attack model faults begin the cycle the wasters switch on;
// on real silicon they can start later or earlier, which moves the depth at
// which errors stop.
module tb_adder_workload;
  localparam int unsigned W = 512, NCYC = 20000, NRATES = 7, NPATH = 100000, CRIT = 380;
  logic         clk = 1'b0, rst_n;
  logic [7:0]   droop;
  logic [127:0] tdc_q;
  bit           pw_on = 0, fault_on = 0, random_droop = 0;
  int           pw_left = 0, pw_permille = 0, pw_droop = 35;
  logic         thr_we = 1'b0;
  logic [7:0]   thr_wdata = 8'd70;
  bit           counting = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC * (NRATES + 8) + NPATH + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tdc_sensor u_tdc (.clk, .droop, .tdc_q);

  always @(negedge clk) begin
    if (pw_left > 0) pw_left--;
    else if (rst_n && $urandom_range(0, 999) < pw_permille) begin
      pw_left  = 5;
      pw_droop = random_droop ? int'($urandom_range(5, 40)) : 35;
    end
    pw_on    = (pw_left > 0);
    droop    = pw_on ? 8'(pw_droop) : 8'd0;
    // the adder only fails when the droop is deep enough (TDC weight >= 73),
    // and then only on carry paths of at least CRIT stages
    fault_on = pw_on && (60 + pw_droop >= 73);
  end

  // longest run of stages through which a carry ripples in a + b + cin
  function automatic int carry_run(input logic [W-1:0] a, input logic [W-1:0] b, input logic cin);
    int run = 0, best = 0;
    logic c = cin;
    for (int i = 0; i < W; i++) begin
      c = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
      if (c) begin run++; if (run > best) best = run; end
      else run = 0;
    end
    return best;
  endfunction

  function automatic int bucket(input logic [8:0] len);
    return (int'(len) - 80) / 40;
  endfunction

  // unprotected reference: the same adder and inputs with no recovery
  logic          u0_valid;
  logic [W-1:0]  u0_a, u0_b, u0_sum;
  logic [8:0]    u0_len;
  logic          u0_cout;
  int            u0_res [10], u0_err [10], p_res [10], p_err [10];
  bit            counting_path = 0;

  input_generator #(.W(W), .SEED(32'h0BAD_F00D)) u_gen0 (
    .clk, .rst_n, .enable(1'b1), .out_valid(u0_valid), .out_ready(1'b1),
    .a(u0_a), .b(u0_b), .path_len(u0_len));

  victim_adder #(.W(W)) u_add0 (.a(u0_a), .b(u0_b), .cin(1'b0), .sum(u0_sum), .cout(u0_cout));

  always @(posedge clk) begin
    if (rst_n && counting_path && u0_valid) begin
      u0_res[bucket(u0_len)]++;
      if (fault_on && carry_run(u0_a, u0_b, 1'b0) >= CRIT) u0_err[bucket(u0_len)]++;
    end
  end

  for (genvar k = 1; k <= 5; k++) begin : g
    logic          gen_valid, gen_ready, out_valid;
    logic [W-1:0]  gen_a, gen_b;
    logic [8:0]    gen_len;
    logic [2*W:0]  v_in;
    logic [W:0]    v_true, v_out, out_data;
    logic [7:0]    threshold, weight;
    logic          unsafe, recovery_mode, replay;
    logic [W:0]    exp_q [$];
    logic [8:0]    len_q [$];
    int            res = 0, err = 0;

    input_generator #(.W(W), .SEED(32'h1234_5678 + k)) u_gen (
      .clk, .rst_n, .enable(1'b1), .out_valid(gen_valid), .out_ready(gen_ready),
      .a(gen_a), .b(gen_b), .path_len(gen_len));

    fault_recovery_unit #(.K(k), .THRESHOLD_RESET(70)) u_fru (
      .clk, .rst_n, .tdc_q, .thr_we, .thr_wdata, .threshold,
      .in_valid(gen_valid), .in_ready(gen_ready), .in_data({gen_a, gen_b, 1'b0}),
      .out_valid, .out_data, .victim_in(v_in), .victim_out(v_out),
      .weight, .unsafe, .recovery_mode, .replay);

    victim_adder #(.W(W)) u_add (
      .a(v_in[2*W:W+1]), .b(v_in[W:1]), .cin(v_in[0]), .sum(v_true[W-1:0]), .cout(v_true[W]));

    assign v_out = (fault_on && carry_run(v_in[2*W:W+1], v_in[W:1], v_in[0]) >= CRIT)
                   ? (v_true ^ {1'b0, {(W/2){2'b01}}}) : v_true;

    always @(posedge clk) begin
      if (rst_n) begin
        if (gen_valid && gen_ready) begin
          exp_q.push_back({1'b0, gen_a} + {1'b0, gen_b});
          len_q.push_back(gen_len);
        end
        if (out_valid) begin
          logic [W:0] e;
          logic [8:0] l;
          e = exp_q.pop_front();
          l = len_q.pop_front();
          if (counting) begin
            res++;
            if (out_data !== e) err++;
          end
          if (counting_path && k == 5) begin
            p_res[bucket(l)]++;
            if (out_data !== e) p_err[bucket(l)]++;
          end
        end
      end
    end
  end

  int res_tab [1:5][NRATES];
  int thr_list [8] = '{66, 68, 70, 72, 74, 76, 80, 90};
  int thr_res [8];
  int thr_err [8];
  int err_tab [1:5][NRATES];

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (20) @(negedge clk);
    for (int r = 0; r < NRATES; r++) begin
      pw_permille = 10 * r;
      repeat (50) @(negedge clk);
      g[1].res = 0; g[2].res = 0; g[3].res = 0; g[4].res = 0; g[5].res = 0;
      g[1].err = 0; g[2].err = 0; g[3].err = 0; g[4].err = 0; g[5].err = 0;
      counting = 1;
      repeat (NCYC) @(negedge clk);
      counting = 0;
      res_tab[1][r] = g[1].res; res_tab[2][r] = g[2].res; res_tab[3][r] = g[3].res;
      res_tab[4][r] = g[4].res; res_tab[5][r] = g[5].res;
      err_tab[1][r] = g[1].err; err_tab[2][r] = g[2].err; err_tab[3][r] = g[3].err;
      err_tab[4][r] = g[4].err; err_tab[5][r] = g[5].err;
    end
    $display("rate%%  throughput (results/cycle) for K=1..5          escaped errors for K=1..5");
    for (int r = 0; r < NRATES; r++)
      $display("%0d      %.3f %.3f %.3f %.3f %.3f      %0d %0d %0d %0d %0d", r,
               real'(res_tab[1][r]) / NCYC, real'(res_tab[2][r]) / NCYC, real'(res_tab[3][r]) / NCYC,
               real'(res_tab[4][r]) / NCYC, real'(res_tab[5][r]) / NCYC,
               err_tab[1][r], err_tab[2][r], err_tab[3][r], err_tab[4][r], err_tab[5][r]);
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (res_tab[k][0] < NCYC - 1 || err_tab[k][0] != 0) begin
        failures++; $display("FAIL K=%0d without attack: %0d results, %0d errors", k, res_tab[k][0], err_tab[k][0]);
      end
      for (int r = 1; r < NRATES; r++) begin
        checks++;
        if (k >= 2 && err_tab[k][r] != 0) begin
          failures++; $display("FAIL K=%0d rate %0d%%: %0d wrong sums released", k, r, err_tab[k][r]);
        end
      end
    end
    checks++;
    if (err_tab[1][NRATES-1] == 0) begin failures++; $display("FAIL depth 1 should let errors escape"); end
    checks++;
    if (!(res_tab[5][NRATES-1] < res_tab[5][3] && res_tab[5][3] < res_tab[5][0])) begin
      failures++; $display("FAIL throughput does not fall with the activation rate");
    end
    // threshold sweep at 6%: droops of random depth, K = 5
    random_droop = 1;
    pw_permille = 60;
    $display("threshold  throughput(K=5)  escaped errors(K=5)");
    foreach (thr_list[i]) begin
      @(negedge clk);
      thr_wdata = 8'(thr_list[i]);
      thr_we = 1'b1;
      @(negedge clk);
      thr_we = 1'b0;
      repeat (50) @(negedge clk);
      g[5].res = 0; g[5].err = 0;
      counting = 1;
      repeat (NCYC) @(negedge clk);
      counting = 0;
      thr_res[i] = g[5].res;
      thr_err[i] = g[5].err;
      $display("%0d         %.3f            %0d", thr_list[i], real'(thr_res[i]) / NCYC, thr_err[i]);
      checks++;
      if (thr_list[i] <= 72 && thr_err[i] != 0) begin
        failures++; $display("FAIL threshold %0d released wrong sums", thr_list[i]);
      end
    end
    checks++;
    if (thr_err[7] == 0 || thr_res[7] <= thr_res[2]) begin
      failures++; $display("FAIL a relaxed threshold should raise both throughput and errors");
    end
    // path-length experiment at 3.5%, threshold 70, K = 5, fixed droop
    random_droop = 0;
    pw_permille = 35;
    @(negedge clk);
    thr_wdata = 8'd70;
    thr_we = 1'b1;
    @(negedge clk);
    thr_we = 1'b0;
    repeat (50) @(negedge clk);
    counting_path = 1;
    repeat (NPATH) @(negedge clk);
    counting_path = 0;
    $display("path  unprotected: results faulty   protected K=5: results faulty");
    for (int i = 0; i < 10; i++) begin
      $display("%0d   %0d %0d      %0d %0d", 80 + 40 * i, u0_res[i], u0_err[i], p_res[i], p_err[i]);
      checks++;
      if (p_err[i] != 0) begin failures++; $display("FAIL protected adder released wrong sums, path %0d", 80 + 40 * i); end
      checks++;
      if (80 + 40 * i < CRIT && u0_err[i] != 0) begin failures++; $display("FAIL short path %0d faulted", 80 + 40 * i); end
      checks++;
      if (80 + 40 * i >= CRIT && u0_err[i] == 0) begin failures++; $display("FAIL long path %0d never faulted unprotected", 80 + 40 * i); end
      checks++;
      if (p_res[i] >= u0_res[i]) begin failures++; $display("FAIL protected adder should complete fewer operations, path %0d", 80 + 40 * i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
