// output_shift_register: holds victim results until they can be trusted.
//
// Stage 0 is the victim's synchronous output register; the result leaves at
// stage K-1, K shifts later. A result is only trusted once it has travelled
// the whole register without an attack being detected, because detection
// takes a few cycles. While the sensor reports Unsafe the controller holds
// `shift` low; during recovery the recomputed results are shifted in.
// Interface: one write port, the oldest stage as output. Reset clears every
// stage. Depth K follows the source; the reset is this design's choice.
module output_shift_register #(
  parameter int unsigned K = fr_pkg::K_RSA,
  parameter int unsigned W = fr_pkg::ADD_W + 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] sr_q [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) sr_q[i] <= '0;
    end else if (shift) begin
      sr_q[0] <= din;
      for (int i = 1; i < K; i++) sr_q[i] <= sr_q[i-1];
    end
  end

  assign dout = sr_q[K-1];
endmodule
