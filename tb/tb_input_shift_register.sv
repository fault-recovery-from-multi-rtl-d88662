// tb_input_shift_register: shifts random entries through a depth-5 register
// with random shift enables and checks every read index against a queue
// model; also checks the reset contents.
module tb_input_shift_register;
  localparam int unsigned K = 5, W = 40;
  logic         clk = 1'b0, rst_n, shift;
  logic [W-1:0] din, dout;
  logic [2:0]   rd_idx;
  logic [W-1:0] model [K];
  int checks = 0, failures = 0;

  input_shift_register #(.K(K), .W(W)) dut (.clk, .rst_n, .shift, .din, .rd_idx, .dout);

  always #50 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < K; i++) begin
      rd_idx = 3'(i);
      #1;
      checks++;
      if (dout !== model[i]) begin
        failures++;
        $display("FAIL idx %0d: %h expected %h", i, dout, model[i]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; shift = 1'b0; din = '0; rd_idx = '0;
    for (int i = 0; i < K; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check_all();
    for (int t = 0; t < 400; t++) begin
      shift = ($urandom_range(0, 3) != 0);
      din   = {8'($urandom), $urandom};
      @(posedge clk);
      if (shift) begin
        for (int i = K - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end
      @(negedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
