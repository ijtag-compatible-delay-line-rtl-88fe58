// Self-checking testbench of vei_controller.
//
// Drives CLK at 5 ns and a stand-in DEL_CLK of chosen period, and checks:
// mode outputs in off, monitoring and calibration; EN_CAL high for exactly
// 255 CLK cycles after a 4-cycle settle; the 12-bit count equal to the
// DEL_CLK rising edges the testbench itself saw inside the window; restart
// of a measurement when DEL_CTRL changes; count saturation; locking of the
// TDC code on lock_req; DEL_SEL frozen in monitoring mode.
`timescale 1ns/1ps
module tb_vei_controller;
  import vei_pkg::*;

  logic        clk = 1'b0, reset, lock_req, del_clk = 1'b0;
  logic [1:0]  cfg_mode;
  logic [4:0]  cfg_del_ctrl, del_sel;
  logic [24:0] tdc_value, therm_code;
  logic        mode_cal, ring_reset_n, tdc_en, conv_en, en_cal, pwr_en;
  logic [11:0] cal_count;
  vei_mode_e   mode;
  int checks = 0, failures = 0;
  realtime del_half = 5.0;
  int edges_in_window = 0;

  vei_controller dut (
    .clk, .reset, .cfg_mode, .cfg_del_ctrl, .lock_req, .del_clk, .tdc_value,
    .del_sel, .mode_cal, .ring_reset_n, .tdc_en, .therm_code, .conv_en,
    .en_cal, .cal_count, .mode, .pwr_en
  );

  always #2.5 clk = ~clk;

  // DEL_CLK stand-in with a settable half period (a multiple of 0.5 ns).
  initial forever begin
    #0.5;
    if ($realtime - $floor($realtime / del_half) * del_half < 0.25) del_clk = ~del_clk;
  end

  // Reference count: rising DEL_CLK edges seen while EN_CAL is high.
  always @(posedge del_clk) if (en_cal) edges_in_window++;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d at %t", what, got, exp, $realtime);
    end
  endtask

  // Wait for a full calibration window and return its length in cycles.
  task automatic run_window(output int len);
    len = 0;
    edges_in_window = 0;
    while (!en_cal) @(posedge clk);
    while (en_cal) begin
      @(posedge clk);
      len++;
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, settle;
    reset = 1'b0; #0.1 reset = 1'b1; lock_req = 0; cfg_mode = 2'd0; cfg_del_ctrl = 5'd9; tdc_value = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    check(mode, MODE_OFF, "off mode");
    check({pwr_en, tdc_en, mode_cal, ring_reset_n, conv_en}, 5'b00000, "off outputs");
    check(del_sel, 9, "del_sel follows in off");

    // Calibration: ring period 10 ns -> about 127 edges in 255 cycles.
    del_half = 5.0;
    cfg_mode = 2'd2;
    settle = 0;
    while (mode != MODE_CAL) @(posedge clk);
    #1;
    check({pwr_en, tdc_en, mode_cal, ring_reset_n, conv_en}, 5'b10100, "cal outputs, ring held");
    while (!en_cal) begin
      @(posedge clk);
      #1 settle++;
    end
    check(settle, 8, "settle cycles before EN_CAL");
    edges_in_window = 0;
    len = 0;
    while (en_cal) begin
      @(posedge clk);
      #1 len++;
    end
    check(len, 255, "EN_CAL window length");
    repeat (3) @(posedge clk);
    check(cal_count, edges_in_window, "count = DEL_CLK edges in window");
    checks++;
    if (cal_count < 126 || cal_count > 129) begin
      failures++;
      $display("FAIL count %0d not near 127", cal_count);
    end
    // Count holds after the window.
    repeat (50) @(posedge clk);
    check(cal_count, edges_in_window, "count holds");

    // DEL_CTRL change restarts; faster ring -> more counts.
    del_half = 3.5;
    cfg_del_ctrl = 5'd3;
    run_window(len);
    check(len, 255, "second window length");
    check(cal_count, edges_in_window, "second count");
    check(del_sel, 3, "del_sel follows in cal");

    // Saturation with a fast ring (1 ns period, 1275 edges): no wrap at 12 bits
    // is needed here, so check the count and that it stays below the limit.
    del_half = 0.5;
    cfg_del_ctrl = 5'd4;
    run_window(len);
    check(cal_count, edges_in_window, "fast ring count");

    // Monitoring: DEL_SEL frozen, TDC enabled, code locked on lock_req.
    cfg_del_ctrl = 5'd14;
    repeat (5) @(posedge clk);
    cfg_mode = 2'd1;
    while (mode != MODE_MON) @(posedge clk);
    #1;
    check({pwr_en, tdc_en, mode_cal, ring_reset_n, conv_en}, 5'b11001, "mon outputs");
    check(del_sel, 14, "del_sel at entry to monitoring");
    cfg_del_ctrl = 5'd20;
    repeat (6) @(posedge clk);
    #1 check(del_sel, 14, "del_sel frozen in monitoring");
    for (int n = 0; n < 40; n++) begin
      logic [24:0] v;
      logic        lk;
      logic [24:0] prev_code;
      v = 25'($urandom);
      lk = ($urandom % 3) == 0;
      prev_code = therm_code;
      tdc_value = v;
      lock_req = lk;
      @(posedge clk);
      #1;
      check(therm_code, lk ? v : prev_code, "lock stage");
    end
    lock_req = 1'b0;
    // Leaving monitoring releases DEL_SEL; lock is ignored outside monitoring.
    cfg_mode = 2'd0;
    repeat (5) @(posedge clk);
    #1 check(del_sel, 20, "del_sel released");
    begin
      logic [24:0] held;
      held = therm_code;
      tdc_value = ~held;
      lock_req = 1'b1;
      repeat (2) @(posedge clk);
      #1 check(therm_code, held, "no lock in off mode");
      lock_req = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
