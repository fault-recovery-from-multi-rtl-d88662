// tdc_sensor: BEHAVIOURAL MODEL of a carry-chain time-to-digital converter.
//
// On silicon a clock edge is launched into a chain of STAGES carry elements
// and a bank of flops clocked by a phase-shifted copy of the clock samples
// how far it got. A drooping supply slows the chain and changes the captured
// word; the count of ones (its Hamming weight) rises with the droop. That
// delay behaviour is analog and placement dependent, so it is modelled here:
// the captured word holds NOMINAL_WEIGHT + WEIGHT_PER_DROOP*droop ones,
// clipped to STAGES, as a thermometer code. `droop` is not a pin of the real
// sensor; it stands for the supply the sensor observes.
//
// Timing: the word is captured on every rising clk edge, so a droop applied
// in one cycle is visible in tdc_q in the next. The 750 ps capture phase is
// not modelled. The 128-stage length follows the source; the nominal
// weight and gain are this model's own choices.
module tdc_sensor #(
  parameter int unsigned STAGES           = fr_pkg::TDC_STAGES,
  parameter int unsigned NOMINAL_WEIGHT   = fr_pkg::TDC_NOMINAL,
  parameter int unsigned WEIGHT_PER_DROOP = 1
) (
  input  logic              clk,
  input  logic [7:0]        droop,
  output logic [STAGES-1:0] tdc_q
);
  int unsigned reach;

  always_comb begin
    reach = NOMINAL_WEIGHT + WEIGHT_PER_DROOP * int'(droop);
    if (reach > STAGES) reach = STAGES;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < STAGES; i++) tdc_q[i] <= (i < reach);
  end
endmodule
