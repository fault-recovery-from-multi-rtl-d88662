// recovery_controller: decides when the protected circuit's results are unsafe
// and sequences their recomputation.
//
// Every cycle the Hamming weight of the TDC word is compared with a threshold
// register. A weight above the threshold sets `unsafe` (registered, one cycle
// after the reading). While `unsafe` is high the victim and both shift
// registers are stalled and `recovery_mode` is high. When `unsafe` falls, the
// controller spends exactly K cycles in `replay`, stepping `replay_idx` from
// K-1 (oldest saved input) down to 0 so that the K saved inputs are
// recomputed in their original order; `recovery_mode` falls after those K
// cycles. A new reading above the threshold during replay stops it and the
// replay starts again from the oldest input once the reading is safe.
// `out_valid` (OutValid) is the inverse of `recovery_mode` and serves both as
// the result-valid window and as backpressure to the requester.
//
// The threshold register is loaded at reset with THRESHOLD_RESET and can be
// rewritten at run time through thr_we/thr_wdata without rebuilding the
// design. All of the above follows the source except: the reset value
// mechanism, the comparison being registered, and the replay index, which
// are this design's own choices.
module recovery_controller #(
  parameter  int unsigned K               = fr_pkg::K_RSA,
  parameter  int unsigned WEIGHT_W        = fr_pkg::WEIGHT_W,
  parameter  int unsigned THRESHOLD_RESET = fr_pkg::THR_RSA,
  localparam int unsigned IW              = (K > 1) ? $clog2(K) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [WEIGHT_W-1:0] weight,
  input  logic                thr_we,
  input  logic [WEIGHT_W-1:0] thr_wdata,
  output logic [WEIGHT_W-1:0] threshold,
  output logic                unsafe,
  output logic                recovery_mode,
  output logic                out_valid,
  output logic                replay,
  output logic [IW-1:0]       replay_idx
);
  logic [WEIGHT_W-1:0] thr_q;
  logic                unsafe_q;
  logic                hold_q;   // recovery pending or replaying after Unsafe
  logic [IW-1:0]       cnt_q;    // replay cycles done

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr_q    <= WEIGHT_W'(THRESHOLD_RESET);
      unsafe_q <= 1'b0;
      hold_q   <= 1'b0;
      cnt_q    <= '0;
    end else begin
      if (thr_we) thr_q <= thr_wdata;
      unsafe_q <= (weight > thr_q);
      if (unsafe_q) begin
        hold_q <= 1'b1;
        cnt_q  <= '0;
      end else if (hold_q) begin
        if (cnt_q == IW'(K - 1)) begin
          hold_q <= 1'b0;
          cnt_q  <= '0;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

  assign threshold     = thr_q;
  assign unsafe        = unsafe_q;
  assign recovery_mode = unsafe_q | hold_q;
  assign out_valid     = ~recovery_mode;
  assign replay        = hold_q & ~unsafe_q;
  assign replay_idx    = IW'(K - 1) - cnt_q;

  // Results are never offered while Unsafe, and replay never overlaps Unsafe.
  a_no_valid_when_unsafe: assert property (@(posedge clk) disable iff (!rst_n)
    unsafe |-> !out_valid);
  // Recovery Mode only ends at the end of a replay.
  a_recovery_ends_in_replay: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(recovery_mode) |-> $past(replay));
endmodule
