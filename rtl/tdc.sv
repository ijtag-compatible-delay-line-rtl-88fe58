// TDC: behavioural model of the time-to-digital converter (not
// synthesizable; in silicon a chain of minimum-size buffers on the fixed
// 1.1 V VDD_REF supply, tapped by flip-flops).
//
// DEL_CLK (Start) runs down a non-linear delay line; flip-flop i samples the
// line after stage i on the rising edge of CLK (Stop). If DEL_CLK rose dt
// before the CLK edge, the flip-flops whose cumulative tap delay is at most
// dt read 1, giving a thermometer code from code[0] (first stage) upward. The
// stages get shorter along the line so that, for a typical VarDelay tuned to
// one clock period, each 10 mV rise of VDD_ACT above 0.95 V turns on one more
// bit: all zeros at 0.95 V, all ones at 1.20 V with TDC_BITS = 25.
//
// Model: the line is not simulated stage by stage. The model records the
// last edges of DEL_CLK; at a CLK edge at time t, tap i is DEL_CLK's level at
// t - D_i, where D_i is the cumulative tap delay (vei_model_pkg). The
// flip-flops are ordinary registers: reset clears them, and en low
// (Cal_CTRL, off and calibration modes) holds them at zero.
//
// Timing: the code for the cycle that ends at a CLK edge is on code right
// after that edge, i.e. one clock cycle of conversion time.
`timescale 1ns/1ps
module tdc
  import vei_model_pkg::*;
#(
  parameter int unsigned TDC_BITS     = 25,
  parameter int unsigned CLK_PERIOD_PS = 5000,
  parameter int          CORNER       = 0
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                en,
  input  logic                del_clk,
  output logic [TDC_BITS-1:0] code
);

  localparam int unsigned HIST = 4;

  realtime t_edge [HIST];
  logic    v_edge [HIST];
  real     tap_ps [TDC_BITS];

  initial begin
    for (int i = 0; i < TDC_BITS; i++) tap_ps[i] = tdc_tap_delay_ps(i, real'(CLK_PERIOD_PS), CORNER);
    for (int j = 0; j < HIST; j++) begin
      t_edge[j] = 0.0;
      v_edge[j] = 1'b0;
    end
  end

  // Edge history of DEL_CLK, newest first.
  always @(del_clk) begin
    for (int j = HIST - 1; j > 0; j--) begin
      t_edge[j] = t_edge[j-1];
      v_edge[j] = v_edge[j-1];
    end
    t_edge[0] = $realtime;
    v_edge[0] = del_clk;
  end

  // Level of DEL_CLK at an earlier time t (ns).
  function automatic logic level_at(input realtime t);
    for (int j = 0; j < HIST; j++)
      if (t_edge[j] <= t) return v_edge[j];
    return 1'b0;
  endfunction

  function automatic logic [TDC_BITS-1:0] sample_taps();
    logic [TDC_BITS-1:0] s;
    for (int i = 0; i < TDC_BITS; i++) s[i] = level_at($realtime - tap_ps[i] / 1000.0);
    return s;
  endfunction

  always_ff @(posedge clk or posedge reset) begin
    if (reset)    code <= '0;
    else if (!en) code <= '0;
    else          code <= sample_taps();
  end

endmodule
