// IEEE 1687 test data register (TDR) with capture, shift and update stages.
//
// All actions happen on the rising TCK edge while sel is high:
//   ce: the shift register loads cap_in (capture),
//   se: it shifts one place toward so, taking si at the far end (shift),
//   ue: the update register loads the shift register (update).
// so is bit 0 of the shift register, so the first bit shifted in ends in
// bit W-1 only if W bits are shifted. rst (active high, asynchronous) puts
// RESET_VAL in the update register and clears the shift register. Acting on
// the rising edge for update as well is this design's simplification.
`timescale 1ns/1ps
module ijtag_tdr #(
  parameter int unsigned   W         = 8,
  parameter logic [W-1:0]  RESET_VAL = '0
) (
  input  logic         tck,
  input  logic         rst,
  input  logic         si,
  input  logic         ce,
  input  logic         se,
  input  logic         ue,
  input  logic         sel,
  input  logic [W-1:0] cap_in,
  output logic         so,
  output logic [W-1:0] upd
);

  logic [W-1:0] sr;

  always_ff @(posedge tck or posedge rst) begin
    if (rst) begin
      sr  <= '0;
      upd <= RESET_VAL;
    end else if (sel) begin
      if (ce)      sr  <= cap_in;
      else if (se) sr  <= (W > 1) ? {si, sr[W-1:1]} : W'(si);
      if (ue)      upd <= sr;
    end
  end

  assign so = sr[0];

endmodule
