// Voltage embedded instrument with one-clock-cycle conversion, wrapped for
// IJTAG access (top level).
//
// CLK, taken from the end of a monitored critical path, enters VarDelay, a
// delay line on the monitored supply VDD_ACT tuned so that its delay equals
// one clock period at 0.95 V. When VDD_ACT is higher the delayed clock
// DEL_CLK arrives early; the TDC, on the steady VDD_REF supply, measures by
// how much at the next CLK edge and returns a thermometer code, one bit per
// 10 mV above 0.95 V. The controller locks that code when the timing-slack
// monitor asks for it (lock_req), the converter turns it into a 5-bit
// number, and a mode-selected mux places either that number (zero-extended)
// or the 12-bit calibration count in the IJTAG read register.
//
// Calibration (once per chip): software writes mode = calibration and a
// DEL_CTRL value; the line becomes a ring oscillator and the controller
// counts its rising edges during 255 clock cycles. Software reads the count
// and moves DEL_CTRL until the count is closest to 127. In use it writes the
// stored DEL_CTRL with mode = monitoring.
//
// vdd_act_mv and temp_c stand for the physical supply level and die
// temperature and only feed the behavioural models of the two delay lines;
// CORNER picks the process corner of those models. pwr_en would drive the
// VDD_REF switch of the off mode. reset is the active-high monitor reset,
// rst the IJTAG reset.
`timescale 1ns/1ps
module voltage_ei
  import vei_pkg::*;
#(
  parameter int unsigned TDC_BITS      = 25,
  parameter int unsigned CAL_CYCLES    = 255,
  parameter int unsigned CNT_BITS      = 12,
  parameter int unsigned DEL_SEL_BITS  = 5,
  parameter int unsigned N_FIXED       = 35,
  parameter int          CORNER        = 0,
  parameter int unsigned CLK_PERIOD_PS = 5000,
  localparam int unsigned BIN_BITS     = $clog2(TDC_BITS + 1)
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [11:0]       vdd_act_mv,
  input  logic signed [7:0] temp_c,
  input  logic              lock_req,
  input  logic              tck,
  input  logic              rst,
  input  logic              si,
  input  logic              ce,
  input  logic              se,
  input  logic              ue,
  input  logic              sel,
  output logic              so,
  output logic              pwr_en
);

  logic [DEL_SEL_BITS-1:0] del_sel, cfg_del_ctrl;
  logic [1:0]              cfg_mode;
  logic                    mode_cal, ring_reset_n, tdc_en, conv_en, en_cal;
  logic                    del_clk;
  logic [TDC_BITS-1:0]     tdc_value, therm_code;
  logic [CNT_BITS-1:0]     cal_count;
  logic [BIN_BITS-1:0]     bin;
  vei_mode_e               mode;
  logic [CNT_BITS-1:0]     read_data;

  var_delay #(
    .DEL_SEL_BITS(DEL_SEL_BITS),
    .N_FIXED     (N_FIXED),
    .CORNER      (CORNER)
  ) u_var_delay (
    .clk, .mode_cal, .ring_reset_n, .del_sel, .vdd_act_mv, .temp_c, .del_clk
  );

  tdc #(
    .TDC_BITS     (TDC_BITS),
    .CLK_PERIOD_PS(CLK_PERIOD_PS),
    .CORNER       (CORNER)
  ) u_tdc (
    .clk, .reset, .en(tdc_en), .del_clk, .code(tdc_value)
  );

  vei_controller #(
    .TDC_BITS    (TDC_BITS),
    .CAL_CYCLES  (CAL_CYCLES),
    .CNT_BITS    (CNT_BITS),
    .DEL_SEL_BITS(DEL_SEL_BITS)
  ) u_ctrl (
    .clk, .reset, .cfg_mode, .cfg_del_ctrl, .lock_req, .del_clk, .tdc_value,
    .del_sel, .mode_cal, .ring_reset_n, .tdc_en, .therm_code, .conv_en,
    .en_cal, .cal_count, .mode, .pwr_en
  );

  thermo2bin #(.TDC_BITS(TDC_BITS)) u_t2b (
    .en(conv_en), .therm(therm_code), .bin
  );

  // Output mux: calibration count in calibration mode, else the result.
  always_comb begin
    if (mode == MODE_CAL) read_data = cal_count;
    else                  read_data = CNT_BITS'(bin);
  end

  vei_ijtag #(
    .DATA_BITS   (CNT_BITS),
    .DEL_SEL_BITS(DEL_SEL_BITS)
  ) u_ijtag (
    .tck, .rst, .si, .ce, .se, .ue, .sel, .so,
    .data_in(read_data), .cfg_mode, .cfg_del_ctrl
  );

endmodule
