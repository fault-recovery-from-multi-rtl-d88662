// hamming_weight: counts the ones in the TDC word.
//
// The recovery controller does not look at the raw carry-chain word but at
// its Hamming weight, which grows with the supply droop. This is a purely
// combinational population count (the tools build an adder tree from the
// loop). Interface: N-bit word in, $clog2(N+1)-bit count out; no clock.
// Reading the word as a Hamming weight follows the source; the adder-tree
// form is this design's choice.
module hamming_weight #(
  parameter  int unsigned N  = fr_pkg::TDC_STAGES,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits,
  output logic [CW-1:0] weight
);
  always_comb begin
    weight = '0;
    for (int i = 0; i < N; i++) weight += CW'(bits[i]);
  end
endmodule
