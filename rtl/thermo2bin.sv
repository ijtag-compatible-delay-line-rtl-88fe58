// Thermometer-code to binary converter.
//
// Turns the TDC_BITS-wide thermometer code from the TDC (ones from bit 0
// upward) into the binary result of the instrument, 0..TDC_BITS; with 25
// bits the result is the 5-bit code in 10 mV steps above 0.95 V. The
// converter counts ones rather than locating the top one, so a single
// bubble in the code (a 0 below a 1) moves the result by at most one LSB;
// that choice is this design's own. EN (from the controller) low forces the
// result to zero. Purely combinational.
`timescale 1ns/1ps
module thermo2bin #(
  parameter int unsigned TDC_BITS = 25,
  localparam int unsigned BIN_BITS = $clog2(TDC_BITS + 1)
) (
  input  logic                en,
  input  logic [TDC_BITS-1:0] therm,
  output logic [BIN_BITS-1:0] bin
);

  always_comb begin
    bin = '0;
    if (en)
      for (int i = 0; i < TDC_BITS; i++) bin = bin + BIN_BITS'(therm[i]);
  end

endmodule
