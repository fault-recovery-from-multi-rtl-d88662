// tb_adder_model: testbench stand-in for a protected adder. Accepts one
// request at a time (ready is random), answers it with {cout, sum} after a
// random delay of 1 to MAX_LAT cycles, like a recovery unit that is
// sometimes busy replaying.
module tb_adder_model #(
  parameter int unsigned W       = 16,
  parameter int unsigned MAX_LAT = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         add_valid,
  output logic         add_ready,
  input  logic [W-1:0] add_a,
  input  logic [W-1:0] add_b,
  input  logic         add_cin,
  output logic         rsp_valid,
  output logic [W-1:0] rsp_sum,
  output logic         rsp_cout
);
  logic         busy_q;
  int           wait_q;
  logic [W:0]   res_q;
  logic         rdy_q;

  assign add_ready = rdy_q && !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      wait_q    <= 0;
      res_q     <= '0;
      rdy_q     <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_sum   <= '0;
      rsp_cout  <= 1'b0;
    end else begin
      rdy_q     <= ($urandom_range(0, 3) != 0);
      rsp_valid <= 1'b0;
      if (add_valid && add_ready) begin
        busy_q <= 1'b1;
        wait_q <= int'($urandom_range(0, MAX_LAT - 1));
        res_q  <= {1'b0, add_a} + {1'b0, add_b} + {{W{1'b0}}, add_cin};
      end else if (busy_q) begin
        if (wait_q == 0) begin
          busy_q    <= 1'b0;
          rsp_valid <= 1'b1;
          {rsp_cout, rsp_sum} <= res_q;
        end else wait_q <= wait_q - 1;
      end
    end
  end
endmodule
