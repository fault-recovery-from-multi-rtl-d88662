// pw_enable_gen: the attacker's enable pattern for an array of power wasters.
//
// In every cycle in which the wasters are off, a 32-bit Galois LFSR
// (x^32 + x^22 + x^2 + x + 1, advanced 16 steps per clock) draws a
// 16-bit number; if it is below `rate` the wasters are switched on for
// ACTIVE_CYCLES cycles. The activation probability per cycle is therefore
// rate/65536 (6% is about 3932). Activations cannot overlap, and at least
// one off cycle separates two of them.
//
// Interface: `rate` may change at any time; `pw_enable` is registered and
// would drive the enable of the ring-oscillator array, which is not part of
// this design (it has no logic function; its effect is a supply droop).
// The probabilistic activation held for five cycles follows the source;
// the LFSR and the 16-bit rate encoding are this design's own choices.
module pw_enable_gen #(
  parameter int unsigned ACTIVE_CYCLES = 5,
  parameter logic [31:0] SEED          = 32'h5EED_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] rate,
  output logic        pw_enable
);
  localparam int unsigned CW = $clog2(ACTIVE_CYCLES + 1);

  logic [31:0]   lfsr_q, lfsr_d;
  logic [CW-1:0] left_q;

  // 16 LFSR steps per clock, so each cycle draws 16 fresh bits
  always_comb begin
    lfsr_d = lfsr_q;
    for (int i = 0; i < 16; i++)
      lfsr_d = {1'b0, lfsr_d[31:1]} ^ (lfsr_d[0] ? 32'h8020_0003 : 32'h0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= SEED;
      left_q <= '0;
    end else begin
      lfsr_q <= lfsr_d;
      if (left_q != '0)              left_q <= left_q - 1'b1;
      else if (lfsr_q[15:0] < rate)  left_q <= CW'(ACTIVE_CYCLES);
    end
  end

  assign pw_enable = (left_q != '0);
endmodule
