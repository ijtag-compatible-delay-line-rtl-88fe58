// IEEE 1687 segment insertion bit (SIB).
//
// A one-bit scan cell in front of a hidden segment. Its shift flip-flop is
// fed by a 2:1 mux: input 0 is the SIB's own scan input (segment bypassed),
// input 1 is the segment's scan output (segment included). The update
// flip-flop, loaded from the shift flip-flop on update, decides which; it
// also forms the segment's select (sel and open). Capture loads the update
// value back into the shift flip-flop so software can read the SIB state.
// Both flip-flops reset to 0 (segment closed). Capture, shift and update act
// on the rising TCK edge while sel is high.
`timescale 1ns/1ps
module ijtag_sib (
  input  logic tck,
  input  logic rst,
  input  logic si,
  input  logic ce,
  input  logic se,
  input  logic ue,
  input  logic sel,
  input  logic seg_so,    // scan output of the hidden segment
  output logic seg_sel,   // select of the hidden segment
  output logic so
);

  logic sr_q, open_q;

  always_ff @(posedge tck or posedge rst) begin
    if (rst) begin
      sr_q   <= 1'b0;
      open_q <= 1'b0;
    end else if (sel) begin
      if (ce)      sr_q   <= open_q;
      else if (se) sr_q   <= open_q ? seg_so : si;
      if (ue)      open_q <= sr_q;
    end
  end

  assign seg_sel = sel & open_q;
  assign so      = sr_q;

endmodule
