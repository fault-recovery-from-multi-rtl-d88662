// input_generator: stimulus source for characterising the stand-alone adder.
//
// Each new vector is picked at random (32-bit Galois LFSR) from a fixed set
// of N_LEN carry-path lengths MIN_LEN, MIN_LEN+STEP, ... (80 to 440 stages
// by default). For a chosen length L it outputs a = (L ones in bits L-1..0,
// a 0 in bit L, random bits above) and b = 1, so the carry of a + b ripples
// through exactly L stages. Lengths are clipped to W-1 for narrow adders.
//
// Interface: valid/ready source. While `enable` is high a vector is always
// offered; it is held until taken and the next one follows in the next
// cycle. `path_len` reports the chosen length with the vector. The length
// set (80 to 440) and random selection follow the source; the vector
// construction, the LFSR and the step of 40 are this design's own choices.
module input_generator #(
  parameter  int unsigned W       = fr_pkg::ADD_W,
  parameter  int unsigned MIN_LEN = 80,
  parameter  int unsigned STEP    = 40,
  parameter  int unsigned N_LEN   = 10,
  parameter  logic [31:0] SEED    = 32'h1ACE_B00C,
  localparam int unsigned LW      = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [W-1:0]  a,
  output logic [W-1:0]  b,
  output logic [LW-1:0] path_len
);
  logic [31:0]   lfsr_q, lfsr_d;
  logic [LW-1:0] len_d;
  logic [W-1:0]  a_d;
  int unsigned   sel, len;

  always_comb begin
    // Galois LFSR, polynomial x^32 + x^22 + x^2 + x + 1
    lfsr_d = {1'b0, lfsr_q[31:1]} ^ (lfsr_q[0] ? 32'h8020_0003 : 32'h0);
    sel    = int'(lfsr_d[15:0]) % N_LEN;
    len    = MIN_LEN + STEP * sel;
    if (len > W - 1) len = W - 1;
    len_d  = LW'(len);
    for (int i = 0; i < W; i++) begin
      if (i < len)       a_d[i] = 1'b1;
      else if (i == len) a_d[i] = 1'b0;
      else               a_d[i] = lfsr_q[i % 32] ^ lfsr_d[(i / 32) % 32];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q    <= SEED;
      out_valid <= 1'b0;
      a         <= '0;
      b         <= '0;
      path_len  <= '0;
    end else if (!out_valid || out_ready) begin
      out_valid <= enable;
      if (enable) begin
        lfsr_q   <= lfsr_d;
        a        <= a_d;
        b        <= W'(1);
        path_len <= len_d;
      end
    end
  end
endmodule
