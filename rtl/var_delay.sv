// VarDelay: behavioural model of the variable delay line (not synthesizable;
// in silicon it is a chain of standard-cell buffers on the VDD_ACT supply).
//
// Structure (as in the instrument's delay-line drawing): a 2:1 mux selects
// either CLK (MODE_CAL = 0, monitoring) or the output of a NAND of RESET and
// DEL_CLK (MODE_CAL = 1, calibration). The mux drives N_FIXED fixed delay
// elements followed by 2**DEL_SEL_BITS selectable elements; DEL_SEL picks the
// tap after selectable element DEL_SEL, so the line has N_FIXED + DEL_SEL + 1
// elements. In calibration mode the NAND closes the line into a ring
// oscillator whose period is twice the line delay plus the NAND; RESET low
// forces the NAND output high and stops the ring.
//
// Timing model: every edge entering the line is delivered to DEL_CLK after
// the line delay computed from vdd_act_mv and temp_c at the moment the edge
// enters (elem_delay_ps of vei_model_pkg, the shape of the inverter delay
// equation). The delay is rounded to 1 ps and realised as a sum of constant
// power-of-two waits, so supply changes act edge by edge.
//
// The element count N_FIXED = 35 and the element delay model are this
// model's choices: with them the typical corner is tuned to 5 ns at 0.95 V
// with DEL_SEL = 14, the slow corner near 4 and the fast corner near 29.
`timescale 1ns/1ps
module var_delay
  import vei_model_pkg::*;
#(
  parameter int unsigned DEL_SEL_BITS = 5,
  parameter int unsigned N_FIXED      = 35,
  parameter int          CORNER       = 0,
  parameter real         NAND_ELEMS   = 0.2    // NAND delay in element delays
) (
  input  logic                    clk,
  input  logic                    mode_cal,
  input  logic                    ring_reset_n,
  input  logic [DEL_SEL_BITS-1:0] del_sel,
  input  logic [11:0]             vdd_act_mv,
  input  logic signed [7:0]       temp_c,
  output logic                    del_clk
);

  logic del_q;
  logic nand_out;
  logic line_in;

  assign nand_out = ~(ring_reset_n & del_q);
  assign line_in  = mode_cal ? nand_out : clk;
  assign del_clk  = del_q;

  initial del_q = 1'b0;

  // Line delay in ps for the present supply, temperature and tap.
  function automatic logic [13:0] launch_delay_ps();
    real e, n;
    e = elem_delay_ps(real'(vdd_act_mv) / 1000.0, real'(temp_c), CORNER);
    n = real'(N_FIXED) + real'(del_sel) + 1.0 + (mode_cal ? NAND_ELEMS : 0.0);
    return 14'($rtoi(e * n + 0.5));
  endfunction

  // Wait k ps using constant delays only.
  task automatic wait_ps(input logic [13:0] k);
    if (k[0])  #1ps;
    if (k[1])  #2ps;
    if (k[2])  #4ps;
    if (k[3])  #8ps;
    if (k[4])  #16ps;
    if (k[5])  #32ps;
    if (k[6])  #64ps;
    if (k[7])  #128ps;
    if (k[8])  #256ps;
    if (k[9])  #512ps;
    if (k[10]) #1024ps;
    if (k[11]) #2048ps;
    if (k[12]) #4096ps;
    if (k[13]) #8192ps;
  endtask

  // Each edge entering the line travels independently (transport delay).
  always @(line_in) begin
    automatic logic        v = line_in;
    automatic logic [13:0] d = launch_delay_ps();
    fork
      begin
        wait_ps(d);
        del_q = v;
      end
    join_none
  end

endmodule
