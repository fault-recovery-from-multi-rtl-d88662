// rsa_crt: 2W-bit RSA private-key exponentiation with the Chinese Remainder
// Theorem, every addition done on one shared W-bit adder.
//
// Given the key parts p, q (W-bit), dp = d mod (p-1), dq = d mod (q-1) and
// qinv = q^-1 mod p, and a 2W-bit input c, it computes
//     mp = (c mod p)^dp mod p,   mq = (c mod q)^dq mod q,
//     h  = qinv * ((mp - mq) mod p) mod p,   msg = mq + h * q,
// which equals c^d mod pq. Splitting the exponentiation into two W-bit
// halves is what makes CRT about four times faster than one 2W-bit
// exponentiation.
//
// Sequence: reduce c modulo p (a modmul in reduce mode), left-to-right
// square-and-multiply over all W bits of dp, the same for q, reduce mq
// modulo p, subtract (one adder operation, plus one more to add p back if
// the difference is negative), multiply by qinv modulo p, and finally form
// h*q + mq by shift-and-add on a 2W-bit accumulator in two W-bit halves.
// Only one unit drives the adder at a time: the single modmul instance or
// this controller's own subtract and accumulate steps.
//
// Interface: start (one cycle, operands sampled) ... done (one cycle, msg
// valid until the next start); busy in between. The adder port is the same
// one-request-at-a-time valid/ready handshake as modmul's. Run time is
// dominated by ~3*W modmuls of ~3*W adder operations each.
// The use of CRT, W = 512 (a 1,024-bit RSA) and one shared 512-bit adder
// in the modular multiplier follow the source; the algorithms and the
// sequencing are this design's own choices.
module rsa_crt #(
  parameter  int unsigned W  = fr_pkg::ADD_W,
  localparam int unsigned NW = $clog2(2 * W + 1),
  localparam int unsigned XW = $clog2(W)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*W-1:0] c,
  input  logic [W-1:0]   p,
  input  logic [W-1:0]   q,
  input  logic [W-1:0]   dp,
  input  logic [W-1:0]   dq,
  input  logic [W-1:0]   qinv,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] msg,
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
  typedef enum logic [3:0] {
    S_IDLE, S_RED, S_SQ, S_MUL, S_RED_MQ, S_SUB, S_SUBFIX, S_H,
    S_PSHIFT, S_PADD_LO, S_PADD_HI, S_PNEXT, S_DONE
  } state_e;

  state_e         state_q;
  logic [2*W-1:0] c_q, prod_q, msg_q;
  logic [W-1:0]   p_q, q_q, dp_q, dq_q, qinv_q;
  logic [W-1:0]   base_q, acc_q, mp_q, mq_q, diff_q, h_q, addend_q;
  logic [XW-1:0]  idx_q;
  logic           half_q;   // 0: working modulo p, 1: modulo q
  logic           final_q;  // accumulating mq (last step)
  logic           mm_run_q, add_pend_q, done_q;

  logic [W-1:0]   mod_w, exp_w;
  logic           own_add, own_valid;
  logic [W-1:0]   own_a, own_b;
  logic           own_cin;

  // modular multiplier and its command
  logic           mm_start, mm_reduce, mm_busy, mm_done;
  logic [2*W-1:0] mm_a;
  logic [NW-1:0]  mm_nbits;
  logic [W-1:0]   mm_b, mm_m, mm_r;
  logic           mm_add_valid, mm_add_cin;
  logic [W-1:0]   mm_add_a, mm_add_b;

  assign mod_w = half_q ? q_q : p_q;
  assign exp_w = half_q ? dq_q : dp_q;

  always_comb begin
    mm_a      = {{W{1'b0}}, acc_q};
    mm_nbits  = NW'(W);
    mm_b      = acc_q;
    mm_m      = mod_w;
    mm_reduce = 1'b0;
    unique case (state_q)
      S_RED:    begin mm_a = c_q; mm_nbits = NW'(2 * W); mm_reduce = 1'b1; end
      S_MUL:    mm_b = base_q;
      S_RED_MQ: begin mm_a = {{W{1'b0}}, mq_q}; mm_m = p_q; mm_reduce = 1'b1; end
      S_H:      begin mm_a = {{W{1'b0}}, qinv_q}; mm_b = diff_q; mm_m = p_q; end
      default: ;
    endcase
  end

  assign mm_start = !mm_run_q && (state_q inside {S_RED, S_SQ, S_MUL, S_RED_MQ, S_H});

  modmul #(.W(W)) u_modmul (
    .clk, .rst_n, .start(mm_start), .a(mm_a), .nbits(mm_nbits), .b(mm_b),
    .m(mm_m), .reduce(mm_reduce), .busy(mm_busy), .done(mm_done), .r(mm_r),
    .add_valid(mm_add_valid), .add_ready(add_ready && !own_add),
    .add_a(mm_add_a), .add_b(mm_add_b), .add_cin(mm_add_cin),
    .add_rsp_valid, .add_rsp_sum, .add_rsp_cout
  );

  // this controller's own adder operations
  always_comb begin
    own_add = state_q inside {S_SUB, S_SUBFIX, S_PADD_LO, S_PADD_HI};
    own_a   = mp_q;
    own_b   = ~diff_q;
    own_cin = 1'b1;
    unique case (state_q)
      S_SUBFIX:  begin own_a = diff_q; own_b = p_q; own_cin = 1'b0; end
      S_PADD_LO: begin own_a = prod_q[W-1:0]; own_b = addend_q; own_cin = 1'b0; end
      S_PADD_HI: begin own_a = prod_q[2*W-1:W]; own_b = '0; own_cin = 1'b1; end
      default: ;
    endcase
    own_valid = own_add && !add_pend_q;
  end

  assign add_valid = own_add ? own_valid : mm_add_valid;
  assign add_a     = own_add ? own_a     : mm_add_a;
  assign add_b     = own_add ? own_b     : mm_add_b;
  assign add_cin   = own_add ? own_cin   : mm_add_cin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      c_q        <= '0;
      prod_q     <= '0;
      msg_q      <= '0;
      p_q        <= '0;
      q_q        <= '0;
      dp_q       <= '0;
      dq_q       <= '0;
      qinv_q     <= '0;
      base_q     <= '0;
      acc_q      <= '0;
      mp_q       <= '0;
      mq_q       <= '0;
      diff_q     <= '0;
      h_q        <= '0;
      addend_q   <= '0;
      idx_q      <= '0;
      half_q     <= 1'b0;
      final_q    <= 1'b0;
      mm_run_q   <= 1'b0;
      add_pend_q <= 1'b0;
      done_q     <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (mm_start) mm_run_q <= 1'b1;
      if (mm_done)  mm_run_q <= 1'b0;
      if (own_valid && add_ready)  add_pend_q <= 1'b1;
      if (own_add && add_pend_q && add_rsp_valid) add_pend_q <= 1'b0;

      unique case (state_q)
        S_IDLE: if (start) begin
          c_q     <= c;
          p_q     <= p;
          q_q     <= q;
          dp_q    <= dp;
          dq_q    <= dq;
          qinv_q  <= qinv;
          half_q  <= 1'b0;
          state_q <= S_RED;
        end
        S_RED: if (mm_done) begin
          base_q  <= mm_r;
          acc_q   <= W'(1);
          idx_q   <= XW'(W - 1);
          state_q <= S_SQ;
        end
        S_SQ, S_MUL: if (mm_done) begin
          acc_q <= mm_r;
          if (state_q == S_SQ && exp_w[idx_q]) begin
            state_q <= S_MUL;
          end else if (idx_q != '0) begin
            idx_q   <= idx_q - 1'b1;
            state_q <= S_SQ;
          end else if (!half_q) begin
            mp_q    <= mm_r;
            half_q  <= 1'b1;
            state_q <= S_RED;
          end else begin
            mq_q    <= mm_r;
            state_q <= S_RED_MQ;
          end
        end
        S_RED_MQ: if (mm_done) begin
          diff_q  <= mm_r;          // mq mod p
          state_q <= S_SUB;
        end
        S_SUB: if (add_pend_q && add_rsp_valid) begin
          diff_q  <= add_rsp_sum;   // mp - (mq mod p), wraps if negative
          state_q <= add_rsp_cout ? S_H : S_SUBFIX;
        end
        S_SUBFIX: if (add_pend_q && add_rsp_valid) begin
          diff_q  <= add_rsp_sum;   // add p back
          state_q <= S_H;
        end
        S_H: if (mm_done) begin
          h_q     <= mm_r;
          prod_q  <= '0;
          final_q <= 1'b0;
          idx_q   <= XW'(W - 1);
          state_q <= S_PSHIFT;
        end
        S_PSHIFT: begin
          prod_q   <= prod_q << 1;
          addend_q <= q_q;
          state_q  <= h_q[idx_q] ? S_PADD_LO : S_PNEXT;
        end
        S_PADD_LO: if (add_pend_q && add_rsp_valid) begin
          prod_q[W-1:0] <= add_rsp_sum;
          state_q       <= add_rsp_cout ? S_PADD_HI : S_PNEXT;
        end
        S_PADD_HI: if (add_pend_q && add_rsp_valid) begin
          prod_q[2*W-1:W] <= add_rsp_sum;
          state_q         <= S_PNEXT;
        end
        S_PNEXT: begin
          if (final_q) begin
            msg_q   <= prod_q;
            done_q  <= 1'b1;
            state_q <= S_IDLE;
          end else if (idx_q == '0) begin
            addend_q <= mq_q;
            final_q  <= 1'b1;
            state_q  <= S_PADD_LO;
          end else begin
            idx_q   <= idx_q - 1'b1;
            state_q <= S_PSHIFT;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);
  assign done = done_q;
  assign msg  = msg_q;

  // modmul is only started when idle, and the adder has one driver at a time.
  a_mm_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    mm_start |-> !mm_busy);
  a_one_adder_user: assert property (@(posedge clk) disable iff (!rst_n)
    own_add |-> !mm_add_valid);
endmodule
