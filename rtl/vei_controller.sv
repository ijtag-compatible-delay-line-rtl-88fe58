// Controller of the voltage embedded instrument (CLK domain).
//
// Mode control: the mode and DEL_CTRL fields written over IJTAG (TCK domain)
// pass through two-flop synchronisers. Off mode (pwr_en low) keeps the TDC
// cleared; monitoring mode runs the TDC every cycle; calibration mode turns
// the delay line into a ring oscillator and counts its edges.
//
// Monitoring: the TDC registers its thermometer code at every CLK edge. When
// the timing-slack monitor raises lock_req at a CLK edge, the current TDC
// code is copied into the hold register therm_code, which stays stable for
// reading over IJTAG. DEL_SEL is frozen on entry to monitoring mode and
// stays frozen until the mode changes, so the tuned delay cannot move while
// measuring.
//
// Calibration: DEL_SEL follows the IJTAG value. On entry to calibration mode,
// and whenever DEL_SEL changes there, the 12-bit counter is cleared for
// SETTLE_CYCLES cycles: in the first half the NAND's RESET input
// (ring_reset_n) is held low so the line empties of clock edges still in
// flight (otherwise several pulses would circulate and multiply the count),
// in the second half the ring runs; then EN_CAL is high for exactly CAL_CYCLES
// (255) CLK cycles, during which every rising DEL_CLK edge is counted. The
// count then stays on cal_count until the next measurement. A line tuned to
// one clock period oscillates at half the clock, giving a count near 127;
// software compares the count with that reference and adjusts DEL_CTRL.
//
// The 255-cycle window, the 12-bit counter and the three modes follow the
// instrument's description; the synchronisers, the settle time, freezing
// DEL_SEL on entry to monitoring, the saturating counter and the mode
// encoding are this design's choices. reset is active high and asynchronous.
//
// The edge counter is clocked by DEL_CLK (the ring output), a clock of its
// own; its clear comes from a CLK-domain register and its enable EN_CAL only
// changes while the counter is not sampling it in a way that matters to the
// result (a count is off by at most one edge at either end of the window).
`timescale 1ns/1ps
module vei_controller
  import vei_pkg::*;
#(
  parameter int unsigned TDC_BITS      = 25,
  parameter int unsigned CAL_CYCLES    = 255,
  parameter int unsigned CNT_BITS      = 12,
  parameter int unsigned DEL_SEL_BITS  = 5,
  parameter int unsigned SETTLE_CYCLES = 8
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic [1:0]              cfg_mode,
  input  logic [DEL_SEL_BITS-1:0] cfg_del_ctrl,
  input  logic                    lock_req,
  input  logic                    del_clk,
  input  logic [TDC_BITS-1:0]     tdc_value,
  output logic [DEL_SEL_BITS-1:0] del_sel,
  output logic                    mode_cal,
  output logic                    ring_reset_n,
  output logic                    tdc_en,
  output logic [TDC_BITS-1:0]     therm_code,
  output logic                    conv_en,
  output logic                    en_cal,
  output logic [CNT_BITS-1:0]     cal_count,
  output vei_mode_e               mode,
  output logic                    pwr_en
);

  localparam int unsigned TIMER_BITS = $clog2(CAL_CYCLES + SETTLE_CYCLES + 1);

  logic [1:0]              mode_s1, mode_s2;
  logic [DEL_SEL_BITS-1:0] del_s1, del_s2;
  vei_mode_e               mode_q;
  logic [DEL_SEL_BITS-1:0] del_sel_q;
  cal_state_e              cal_state;
  logic [TIMER_BITS-1:0]   timer;
  logic                    cnt_clr;
  logic                    ring_run;
  vei_mode_e               mode_next;

  // Synchronisers for the IJTAG fields.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      mode_s1 <= '0;
      mode_s2 <= '0;
      del_s1  <= '0;
      del_s2  <= '0;
    end else begin
      mode_s1 <= cfg_mode;
      mode_s2 <= mode_s1;
      del_s1  <= cfg_del_ctrl;
      del_s2  <= del_s1;
    end
  end

  assign mode_next = decode_mode(mode_s2);

  // Mode register and DEL_SEL; DEL_SEL is frozen while in monitoring mode.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      mode_q    <= MODE_OFF;
      del_sel_q <= '0;
    end else begin
      mode_q <= mode_next;
      if (mode_q != MODE_MON) del_sel_q <= del_s2;
    end
  end

  // Calibration sequencer: SETTLE (counter cleared), COUNT (EN_CAL), DONE.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      cal_state <= CAL_IDLE;
      timer     <= '0;
      en_cal    <= 1'b0;
      cnt_clr   <= 1'b1;
      ring_run  <= 1'b0;
    end else if (mode_q != MODE_CAL) begin
      cal_state <= CAL_IDLE;
      timer     <= '0;
      en_cal    <= 1'b0;
      ring_run  <= 1'b0;
    end else if (cal_state == CAL_IDLE || (del_s2 != del_sel_q && mode_next == MODE_CAL)) begin
      cal_state <= CAL_SETTLE;
      timer     <= '0;
      en_cal    <= 1'b0;
      cnt_clr   <= 1'b1;
      ring_run  <= 1'b0;
    end else begin
      case (cal_state)
        CAL_SETTLE: begin
          // First half: ring held, line flushes; second half: ring runs.
          if (timer == TIMER_BITS'(SETTLE_CYCLES / 2 - 1)) ring_run <= 1'b1;
          if (timer == TIMER_BITS'(SETTLE_CYCLES - 1)) begin
            cal_state <= CAL_COUNT;
            timer     <= '0;
            en_cal    <= 1'b1;
            cnt_clr   <= 1'b0;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        CAL_COUNT: begin
          if (timer == TIMER_BITS'(CAL_CYCLES - 1)) begin
            cal_state <= CAL_DONE;
            en_cal    <= 1'b0;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  // Edge counter on DEL_CLK (Count_En = DEL_CLK while EN_CAL), saturating.
  always_ff @(posedge del_clk or posedge cnt_clr) begin
    if (cnt_clr)
      cal_count <= '0;
    else if (en_cal && cal_count != {CNT_BITS{1'b1}})
      cal_count <= cal_count + 1'b1;
  end

  // Lock stage for the TDC code.
  always_ff @(posedge clk or posedge reset) begin
    if (reset)
      therm_code <= '0;
    else if (mode_q == MODE_MON && lock_req)
      therm_code <= tdc_value;
  end

  assign del_sel      = del_sel_q;
  assign mode         = mode_q;
  assign mode_cal     = (mode_q == MODE_CAL);
  assign ring_reset_n = ring_run;
  assign tdc_en       = (mode_q == MODE_MON);
  assign conv_en      = (mode_q == MODE_MON);
  assign pwr_en       = (mode_q != MODE_OFF);

  // EN_CAL is high exactly while the sequencer is in its counting state.
  a_en_cal_window : assert property (@(posedge clk) en_cal == (cal_state == CAL_COUNT));

endmodule
