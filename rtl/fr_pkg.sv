// fr_pkg: constants shared by the voltage-attack fault recovery design.
//
// The sizes are those of the two protected circuits: a 512-bit adder inside
// a 1,024-bit RSA-CRT core (shift registers of depth 2, TDC threshold 68) and
// the same adder on its own (depth 5, threshold 70). The TDC has 128 stages.
// The nominal sensor weight is this design's own choice for the sensor model.
package fr_pkg;
  localparam int unsigned ADD_W          = 512; // protected adder width
  localparam int unsigned TDC_STAGES     = 128; // carry-chain TDC length
  localparam int unsigned K_RSA          = 2;   // shift register depth, RSA at 130 MHz
  localparam int unsigned K_ADDER        = 5;   // shift register depth, adder at 200 MHz
  localparam int unsigned THR_RSA        = 68;  // calibrated TDC threshold, RSA
  localparam int unsigned THR_ADDER      = 70;  // calibrated TDC threshold, adder
  localparam int unsigned WEIGHT_W       = $clog2(TDC_STAGES + 1); // 8 bits
  localparam int unsigned TDC_NOMINAL    = 60;  // idle-supply weight of the sensor model
endpackage
