// modmul: modular multiplier that does all of its arithmetic on one shared,
// externally protected W-bit adder.
//
// Computes r = (a * b) mod m by interleaved (left-to-right, shift-and-add)
// modular multiplication over the low `nbits` bits of a:
//     R = 0;  for i = nbits-1 .. 0:  R = 2R mod m;  if a[i]: R = (R + b) mod m
// Each modular addition takes two adder operations: the sum x + y (carry out
// c1), then the trial subtraction sum + ~m + 1 (carry out c2); the difference
// is kept when c1 | c2, i.e. when x + y >= m. With `reduce` set the multiply
// by b is replaced by the carry in of the doubling, R = (2R + a[i]) mod m,
// which gives a mod m (b is then ignored): this is how the RSA core reduces
// a 2W-bit number modulo a W-bit prime.
// Requirements: m odd or even but > 1, b < m; a may be any value.
//
// Interface: start (one cycle, operands sampled) ... done (one cycle, r
// valid from then until the next start). Adder port: add_valid/add_ready
// request with operands, one request outstanding at a time; the result
// comes back on add_rsp_valid. Cost: 2 adder operations per bit plus 2 per
// set bit of a (reduce: 2 per bit). That the RSA's modular multiplier uses
// a single 512-bit adder follows the source; the algorithm is this design's
// own choice, since the source does not describe one.
module modmul #(
  parameter  int unsigned W  = fr_pkg::ADD_W,
  localparam int unsigned NW = $clog2(2 * W + 1),
  localparam int unsigned XW = $clog2(2 * W)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*W-1:0] a,
  input  logic [NW-1:0]  nbits,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   m,
  input  logic           reduce,
  output logic           busy,
  output logic           done,
  output logic [W-1:0]   r,
  // shared adder
  output logic           add_valid,
  input  logic           add_ready,
  output logic [W-1:0]   add_a,
  output logic [W-1:0]   add_b,
  output logic           add_cin,
  input  logic           add_rsp_valid,
  input  logic [W-1:0]   add_rsp_sum,
  input  logic           add_rsp_cout
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  typedef enum logic [1:0] {P_DBL, P_DSUB, P_ADD, P_ASUB} phase_e;

  state_e         state_q;
  phase_e         phase_q;
  logic [2*W-1:0] a_q;
  logic [W-1:0]   b_q, m_q, r_q, s_q;
  logic           c_q, red_q, done_q;
  logic [XW-1:0]  idx_q;
  logic           bit_i;

  assign bit_i = a_q[idx_q];

  always_comb begin
    add_a   = r_q;
    add_b   = r_q;
    add_cin = 1'b0;
    unique case (phase_q)
      P_DBL:          begin add_a = r_q; add_b = r_q; add_cin = red_q & bit_i; end
      P_ADD:          begin add_a = r_q; add_b = b_q; add_cin = 1'b0; end
      P_DSUB, P_ASUB: begin add_a = s_q; add_b = ~m_q; add_cin = 1'b1; end
      default: ;
    endcase
  end

  assign add_valid = (state_q == S_ISSUE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      phase_q <= P_DBL;
      a_q     <= '0;
      b_q     <= '0;
      m_q     <= '0;
      r_q     <= '0;
      s_q     <= '0;
      c_q     <= 1'b0;
      red_q   <= 1'b0;
      idx_q   <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          a_q     <= a;
          b_q     <= b;
          m_q     <= m;
          red_q   <= reduce;
          r_q     <= '0;
          idx_q   <= XW'(nbits - 1'b1);
          phase_q <= P_DBL;
          state_q <= S_ISSUE;
        end
        S_ISSUE: if (add_ready) state_q <= S_WAIT;
        S_WAIT: if (add_rsp_valid) begin
          unique case (phase_q)
            P_DBL, P_ADD: begin
              s_q     <= add_rsp_sum;
              c_q     <= add_rsp_cout;
              phase_q <= (phase_q == P_DBL) ? P_DSUB : P_ASUB;
              state_q <= S_ISSUE;
            end
            default: begin  // P_DSUB, P_ASUB: keep the difference if x+y >= m
              r_q <= (c_q | add_rsp_cout) ? add_rsp_sum : s_q;
              if (phase_q == P_DSUB && !red_q && bit_i) begin
                phase_q <= P_ADD;
                state_q <= S_ISSUE;
              end else if (idx_q == '0) begin
                state_q <= S_IDLE;
                done_q  <= 1'b1;
              end else begin
                idx_q   <= idx_q - 1'b1;
                phase_q <= P_DBL;
                state_q <= S_ISSUE;
              end
            end
          endcase
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);
  assign done = done_q;
  assign r    = r_q;
endmodule
