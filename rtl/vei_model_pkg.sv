// Delay models shared by the behavioural models of the two delay lines.
//
// Not synthesizable: real arithmetic describing analog behaviour.
//
// The delay of one VarDelay element follows the shape of the simple CMOS
// inverter model  t = K * V / (V - Vth * (1 - alpha * (T - 25))),
// with V the VDD_ACT supply and T the temperature in degC. K, Vth and alpha
// are this model's own numbers. Vth per corner is fitted so that a line
// tuned to 5 ns at 0.95 V / 25 degC shortens at 1.20 V to about 3.05 ns
// (typical), 2.6 ns (slow) and 3.5 ns (fast); K sets the element delay of
// the slow and fast corners at 0.95 V to about 125 ps and 78 ps.
// An element is 100 ps at 0.95 V, 25 degC, typical.
//
// The TDC stages are on the fixed 1.1 V VDD_REF supply; stage i is sized so
// that TDC bit i turns on when VDD_ACT crosses 0.96 + 0.01*i V for a typical
// line tuned to one clock period. Process corners scale those stages by 1.20
// (slow) and 0.75 (fast). The slow scale is kept low enough that the whole
// TDC line stays shorter than half a clock period (2.5 ns); a longer line
// would let its last taps see the previous DEL_CLK pulse.
`timescale 1ns/1ps
package vei_model_pkg;

  localparam real V_NOMINAL_LOW  = 0.95;    // bottom of the measuring range, V
  localparam real V_STEP         = 0.01;    // one LSB of the result, V
  localparam real T_ELEM_NOM_PS  = 100.0;   // element delay at 0.95 V, 25 degC, typical
  localparam real ALPHA_PER_DEGC = 0.0003;  // temperature coefficient of Vth
  localparam real VTH_TYP        = 0.724;   // effective threshold, typical corner

  // Corner: 0 typical, 1 slow, 2 fast.
  function automatic real corner_vth(input int corner);
    case (corner)
      1:       return 0.775;
      2:       return 0.639;
      default: return VTH_TYP;
    endcase
  endfunction

  function automatic real corner_k(input int corner);
    case (corner)
      1:       return 0.97;
      2:       return 1.08;
      default: return 1.00;
    endcase
  endfunction

  function automatic real tdc_corner_scale(input int corner);
    case (corner)
      1:       return 1.20;
      2:       return 0.75;
      default: return 1.00;
    endcase
  endfunction

  // Delay of one VarDelay element in ps.
  function automatic real elem_delay_ps(input real vdd, input real temp_c, input int corner);
    real k0, vt;
    k0 = T_ELEM_NOM_PS * (V_NOMINAL_LOW - VTH_TYP) / V_NOMINAL_LOW;
    vt = corner_vth(corner) * (1.0 - ALPHA_PER_DEGC * (temp_c - 25.0));
    return corner_k(corner) * k0 * vdd / (vdd - vt);
  endfunction

  // Delay of a typical line tuned to clk_period_ps at 0.95 V, 25 degC.
  function automatic real tuned_line_typ_ps(input real vdd, input real clk_period_ps);
    return clk_period_ps * elem_delay_ps(vdd, 25.0, 0) / elem_delay_ps(V_NOMINAL_LOW, 25.0, 0);
  endfunction

  // Cumulative delay from DEL_CLK to the input of TDC flip-flop i, in ps.
  function automatic real tdc_tap_delay_ps(input int i, input real clk_period_ps, input int corner);
    real v_i;
    v_i = V_NOMINAL_LOW + V_STEP * real'(i + 1);
    return tdc_corner_scale(corner) *
           (clk_period_ps - tuned_line_typ_ps(v_i, clk_period_ps));
  endfunction

endpackage
