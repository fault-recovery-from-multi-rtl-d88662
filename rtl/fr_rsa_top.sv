// fr_rsa_top: voltage-attack fault detection and recovery, applied to the
// 512-bit adder of a 1,024-bit RSA-CRT core, with the stand-alone adder
// test rig beside it.
//
// RSA system (clk): rsa_crt issues every addition to the fault_recovery_unit,
// which passes it to the victim_adder and holds inputs and results in depth-K
// shift registers (K = 2, threshold 68). A tdc_sensor watches the supply of
// this clock domain; when its Hamming weight exceeds the threshold the unit
// stalls, withholds the K unconfirmed sums and recomputes them once the
// droop is over. The RSA core simply waits for its sums, so an attack only
// costs time. Stand-alone rig (clk_rig): an input_generator feeds random
// long-carry vectors through a second unit around a second adder (K = 5,
// threshold 70), the configuration used to characterise the method.
//
// Each side also has the attacker's enable generator (pw_enable_gen): it
// switches power wasters on with probability pw_rate/65536 per cycle for 5
// cycles. The wasters are ring oscillators outside this design, so
// pw_enable is brought out, and the droop they cause comes back in through
// the droop inputs. Those are not chip pins: they stand for the supply seen
// by the behavioural TDC models, so a simulation can apply an attack. Threshold
// registers are writable at run time. Start/done handshake on the RSA core,
// result valid strobe on the rig. Defaults are the sizes of the source;
// the rig and RSA sharing one top, and the ports chosen, are this design's.
module fr_rsa_top #(
  parameter int unsigned W             = fr_pkg::ADD_W,
  parameter int unsigned K             = fr_pkg::K_RSA,
  parameter int unsigned THRESHOLD     = fr_pkg::THR_RSA,
  parameter int unsigned K_RIG         = fr_pkg::K_ADDER,
  parameter int unsigned THRESHOLD_RIG = fr_pkg::THR_ADDER,
  parameter int unsigned TDC_STAGES    = fr_pkg::TDC_STAGES,
  localparam int unsigned WEIGHT_W     = $clog2(TDC_STAGES + 1),
  localparam int unsigned LW           = $clog2(W)
) (
  // RSA system
  input  logic                clk,
  input  logic                rst_n,
  input  logic [7:0]          droop,
  input  logic [15:0]         pw_rate,
  output logic                pw_enable,
  input  logic                thr_we,
  input  logic [WEIGHT_W-1:0] thr_wdata,
  input  logic                start,
  input  logic [2*W-1:0]      c,
  input  logic [W-1:0]        p,
  input  logic [W-1:0]        q,
  input  logic [W-1:0]        dp,
  input  logic [W-1:0]        dq,
  input  logic [W-1:0]        qinv,
  output logic                busy,
  output logic                done,
  output logic [2*W-1:0]      msg,
  output logic                unsafe,
  output logic                recovery_mode,
  output logic                out_valid_window,
  output logic                replay,
  output logic [WEIGHT_W-1:0] weight,
  output logic [WEIGHT_W-1:0] threshold,
  // stand-alone adder rig
  input  logic                clk_rig,
  input  logic                rst_rig_n,
  input  logic [7:0]          rig_droop,
  input  logic [15:0]         rig_pw_rate,
  output logic                rig_pw_enable,
  input  logic                rig_thr_we,
  input  logic [WEIGHT_W-1:0] rig_thr_wdata,
  input  logic                rig_enable,
  output logic                rig_out_valid,
  output logic [W-1:0]        rig_sum,
  output logic                rig_cout,
  output logic                rig_unsafe,
  output logic                rig_recovery_mode,
  output logic                rig_replay,
  output logic [WEIGHT_W-1:0] rig_weight,
  output logic [WEIGHT_W-1:0] rig_threshold
);
  // ---------------- RSA system ----------------
  logic [TDC_STAGES-1:0] tdc_q;
  logic                  add_valid, add_ready, add_cin, rsp_valid;
  logic [W-1:0]          add_a, add_b;
  logic [W:0]            rsp;          // {cout, sum}
  logic [2*W:0]          v_in;         // {a, b, cin}
  logic [W:0]            v_out;

  tdc_sensor #(.STAGES(TDC_STAGES)) u_tdc (.clk, .droop, .tdc_q);

  // attacker's enable pattern; the ring oscillators themselves are off-design
  pw_enable_gen #(.SEED(32'h5EED_0001)) u_pw (.clk, .rst_n, .rate(pw_rate), .pw_enable);

  rsa_crt #(.W(W)) u_rsa (
    .clk, .rst_n, .start, .c, .p, .q, .dp, .dq, .qinv, .busy, .done, .msg,
    .add_valid, .add_ready, .add_a, .add_b, .add_cin,
    .add_rsp_valid(rsp_valid), .add_rsp_sum(rsp[W-1:0]), .add_rsp_cout(rsp[W])
  );

  fault_recovery_unit #(
    .K(K), .DW(2 * W + 1), .RW(W + 1), .TDC_STAGES(TDC_STAGES),
    .THRESHOLD_RESET(THRESHOLD)
  ) u_fru (
    .clk, .rst_n, .tdc_q, .thr_we, .thr_wdata, .threshold,
    .in_valid(add_valid), .in_ready(add_ready), .in_data({add_a, add_b, add_cin}),
    .out_valid(rsp_valid), .out_data(rsp),
    .victim_in(v_in), .victim_out(v_out),
    .weight, .unsafe, .recovery_mode, .replay
  );

  victim_adder #(.W(W)) u_adder (
    .a(v_in[2*W:W+1]), .b(v_in[W:1]), .cin(v_in[0]),
    .sum(v_out[W-1:0]), .cout(v_out[W])
  );

  assign out_valid_window = ~recovery_mode;

  // ---------------- stand-alone adder rig ----------------
  logic [TDC_STAGES-1:0] rig_tdc_q;
  logic                  gen_valid, gen_ready;
  logic [W-1:0]          gen_a, gen_b;
  logic [LW-1:0]         gen_len;
  logic [2*W:0]          rig_v_in;
  logic [W:0]            rig_v_out, rig_rsp;

  tdc_sensor #(.STAGES(TDC_STAGES)) u_rig_tdc (.clk(clk_rig), .droop(rig_droop), .tdc_q(rig_tdc_q));

  pw_enable_gen #(.SEED(32'h5EED_0002)) u_rig_pw (
    .clk(clk_rig), .rst_n(rst_rig_n), .rate(rig_pw_rate), .pw_enable(rig_pw_enable));

  input_generator #(.W(W)) u_gen (
    .clk(clk_rig), .rst_n(rst_rig_n), .enable(rig_enable),
    .out_valid(gen_valid), .out_ready(gen_ready), .a(gen_a), .b(gen_b), .path_len(gen_len)
  );

  fault_recovery_unit #(
    .K(K_RIG), .DW(2 * W + 1), .RW(W + 1), .TDC_STAGES(TDC_STAGES),
    .THRESHOLD_RESET(THRESHOLD_RIG)
  ) u_rig_fru (
    .clk(clk_rig), .rst_n(rst_rig_n), .tdc_q(rig_tdc_q),
    .thr_we(rig_thr_we), .thr_wdata(rig_thr_wdata), .threshold(rig_threshold),
    .in_valid(gen_valid), .in_ready(gen_ready), .in_data({gen_a, gen_b, 1'b0}),
    .out_valid(rig_out_valid), .out_data(rig_rsp),
    .victim_in(rig_v_in), .victim_out(rig_v_out),
    .weight(rig_weight), .unsafe(rig_unsafe), .recovery_mode(rig_recovery_mode),
    .replay(rig_replay)
  );

  victim_adder #(.W(W)) u_rig_adder (
    .a(rig_v_in[2*W:W+1]), .b(rig_v_in[W:1]), .cin(rig_v_in[0]),
    .sum(rig_v_out[W-1:0]), .cout(rig_v_out[W])
  );

  assign rig_sum  = rig_rsp[W-1:0];
  assign rig_cout = rig_rsp[W];
endmodule
