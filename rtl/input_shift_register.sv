// input_shift_register: keeps the last K inputs given to the victim circuit.
//
// Each cycle in which `shift` is high the new entry enters stage 0 and the
// others move one stage on, so stage i holds the input of i+1 accepted cycles
// ago. While an attack is handled the controller holds `shift` low, freezing
// the saved inputs, and reads them back through `rd_idx` (K-1 is the oldest)
// to feed the victim again. Reset clears every stage, so a replay right
// after reset recomputes only empty (invalid) entries.
// Interface: one write port, one combinational read port. The depth K
// follows the source (2 for the RSA, 5 for the stand-alone adder); the
// indexed read is this design's choice.
module input_shift_register #(
  parameter  int unsigned K  = fr_pkg::K_RSA,
  parameter  int unsigned W  = 2 * fr_pkg::ADD_W + 2,
  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic [W-1:0]  din,
  input  logic [IW-1:0] rd_idx,
  output logic [W-1:0]  dout
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

  assign dout = sr_q[rd_idx];
endmodule
