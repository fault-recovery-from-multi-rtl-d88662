// victim_adder: the protected circuit, a W-bit adder with carry in and out.
//
// Its long carry chain is the critical path that a voltage attack slows
// down, so it is the block whose inputs and results the recovery unit
// buffers. It is combinational; the first stage of the output shift register
// in fault_recovery_unit is its synchronous output register. The carry in
// and carry out let a requester chain it into wider additions and
// subtractions (a + ~b + 1). The 512-bit width follows the source; carry in
// and out are this design's choice.
module victim_adder #(
  parameter int unsigned W = fr_pkg::ADD_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  assign {cout, sum} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
endmodule
