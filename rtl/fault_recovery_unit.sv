// fault_recovery_unit: fault detection and recovery around one feed-forward
// victim circuit (the arrangement of the source's Fig. 2).
//
// Data path: every accepted request (and every idle cycle, as a bubble) is
// written into a depth-K input shift register and, through the input mux,
// given to the victim. The victim's result is captured in stage 0 of a
// depth-K output shift register and leaves it K cycles later, so a result is
// only released once K cycles have passed without the sensor reporting a
// droop. Control: the TDC word's Hamming weight goes to the
// recovery_controller. When it exceeds the threshold, Unsafe stalls the
// victim and both shift registers and Recovery Mode withdraws OutValid, so
// the K results still in the output register are never released. When the
// droop ends, Recovery Mode switches the input mux to the saved inputs,
// which are recomputed oldest first; after K cycles the output register
// again holds only results computed on a safe supply and OutValid returns.
//
// Interface: requests in_valid/in_ready/in_data (in_ready is OutValid, the
// backpressure signal); results out_valid/out_data, one per accepted request,
// in order; victim_in/victim_out connect the victim (combinational from
// victim_in to victim_out). Latency from an accepted request to its result
// is K cycles without an attack. Each shift register entry carries a valid
// bit, so idle cycles are replayed as bubbles and produce no result.
// The structure follows the source; the valid bits, the request handshake
// and the indexed replay read are this design's choices.
module fault_recovery_unit #(
  parameter  int unsigned K               = fr_pkg::K_RSA,
  parameter  int unsigned DW              = 2 * fr_pkg::ADD_W + 1, // victim input width
  parameter  int unsigned RW              = fr_pkg::ADD_W + 1,     // victim result width
  parameter  int unsigned TDC_STAGES      = fr_pkg::TDC_STAGES,
  parameter  int unsigned THRESHOLD_RESET = fr_pkg::THR_RSA,
  localparam int unsigned WEIGHT_W        = $clog2(TDC_STAGES + 1),
  localparam int unsigned IW              = (K > 1) ? $clog2(K) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // sensor and threshold register
  input  logic [TDC_STAGES-1:0] tdc_q,
  input  logic                  thr_we,
  input  logic [WEIGHT_W-1:0]   thr_wdata,
  output logic [WEIGHT_W-1:0]   threshold,
  // request side
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [DW-1:0]         in_data,
  // result side
  output logic                  out_valid,
  output logic [RW-1:0]         out_data,
  // victim circuit
  output logic [DW-1:0]         victim_in,
  input  logic [RW-1:0]         victim_out,
  // status
  output logic [WEIGHT_W-1:0]   weight,
  output logic                  unsafe,
  output logic                  recovery_mode,
  output logic                  replay
);
  logic          window_valid;  // OutValid of the source
  logic [IW-1:0] replay_idx;
  logic [DW:0]   isr_din, isr_dout;   // {valid, data}
  logic [RW:0]   osr_din, osr_dout;   // {valid, result}
  logic          victim_tag;

  hamming_weight #(.N(TDC_STAGES)) u_hw (.bits(tdc_q), .weight(weight));

  recovery_controller #(
    .K(K), .WEIGHT_W(WEIGHT_W), .THRESHOLD_RESET(THRESHOLD_RESET)
  ) u_ctrl (
    .clk, .rst_n, .weight, .thr_we, .thr_wdata, .threshold, .unsafe,
    .recovery_mode, .out_valid(window_valid), .replay, .replay_idx
  );

  // New inputs are accepted only outside Recovery Mode.
  assign in_ready = window_valid;
  assign isr_din  = {in_valid, in_data};

  input_shift_register #(.K(K), .W(DW + 1)) u_isr (
    .clk, .rst_n, .shift(window_valid), .din(isr_din),
    .rd_idx(replay_idx), .dout(isr_dout)
  );

  // Input mux: Recovery Mode selects the saved inputs.
  always_comb begin
    if (recovery_mode) {victim_tag, victim_in} = isr_dout;
    else               {victim_tag, victim_in} = {in_valid, in_data};
  end

  assign osr_din = {victim_tag, victim_out};

  // The victim's results move on in normal operation and during replay,
  // and are stalled while Unsafe.
  output_shift_register #(.K(K), .W(RW + 1)) u_osr (
    .clk, .rst_n, .shift(~unsafe), .din(osr_din), .dout(osr_dout)
  );

  assign out_valid = window_valid & osr_dout[RW];
  assign out_data  = osr_dout[RW-1:0];

  // The requester must hold a request until it is taken.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> (in_valid && $stable(in_data)));
endmodule
