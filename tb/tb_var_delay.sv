// Self-checking testbench of the VarDelay model.
//
// Monitoring mode: measures CLK-rise to DEL_CLK-rise for several supplies,
// temperatures and taps against the element-delay formula written out here
// (K * V / (V - Vth * (1 - alpha * (T - 25))), N_FIXED + DEL_SEL + 1
// elements), and checks the tuned point (5 ns at 0.95 V, tap 14, typical)
// and the 1.2 V end (about 3 ns). Calibration mode: measures the ring
// period (twice the line plus the NAND), and checks that RESET low stops it.
`timescale 1ns/1ps
module tb_var_delay;
  logic        clk = 1'b0, mode_cal, ring_reset_n, del_clk;
  logic [4:0]  del_sel;
  logic [11:0] vdd_act_mv;
  logic signed [7:0] temp_c;
  int checks = 0, failures = 0;
  realtime t_clk_rise, t_del_rise, t_del_prev;
  int del_edges = 0;

  var_delay dut (.clk, .mode_cal, .ring_reset_n, .del_sel, .vdd_act_mv, .temp_c, .del_clk);

  always @(posedge clk) t_clk_rise = $realtime;
  always @(posedge del_clk) begin
    t_del_prev = t_del_rise;
    t_del_rise = $realtime;
    del_edges++;
  end

  function automatic real model_ps(input int mv, input int t, input int sel, input real extra);
    real v, k0, e;
    v  = real'(mv) / 1000.0;
    k0 = 100.0 * (0.95 - 0.724) / 0.95;
    e  = k0 * v / (v - 0.724 * (1.0 - 0.0003 * (real'(t) - 25.0)));
    return e * (35.0 + real'(sel) + 1.0 + extra);
  endfunction

  task automatic check_near(input real got_ps, input real exp_ps, input real tol_ps, input string what);
    checks++;
    if (got_ps > exp_ps + tol_ps || got_ps < exp_ps - tol_ps) begin
      failures++;
      $display("FAIL %s: got %0.1f ps exp %0.1f ps", what, got_ps, exp_ps);
    end
  endtask

  // One slow CLK pulse (40 ns period) and the measured line delay in ps.
  task automatic measure(output real d_ps);
    #20 clk = 1'b1;
    #20 clk = 1'b0;
    #1;
    d_ps = (t_del_rise - t_clk_rise) * 1000.0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real d;
    int mvs[4] = '{950, 1000, 1100, 1200};
    int sels[3] = '{0, 14, 31};
    int temps[2] = '{25, 125};
    mode_cal = 1'b0; ring_reset_n = 1'b0; del_sel = 5'd14; vdd_act_mv = 12'd950; temp_c = 8'sd25;
    #50;
    measure(d);
    check_near(d, 5000.0, 1.0, "tuned point 5 ns at 0.95 V");
    vdd_act_mv = 12'd1200;
    measure(d);
    checks++;
    if (d < 2900.0 || d > 3200.0) begin
      failures++;
      $display("FAIL 1.2 V delay %0.1f ps not near 3 ns", d);
    end
    foreach (mvs[i]) foreach (sels[j]) foreach (temps[k]) begin
      vdd_act_mv = 12'(mvs[i]);
      del_sel    = 5'(sels[j]);
      temp_c     = 8'(temps[k]);
      measure(d);
      check_near(d, model_ps(mvs[i], temps[k], sels[j], 0.0), 1.0, "line delay");
    end
    // Monotonic in the tap: one more element per step.
    vdd_act_mv = 12'd1050; temp_c = 8'sd25;
    for (int s = 0; s < 31; s++) begin
      real d0, d1;
      del_sel = 5'(s);
      measure(d0);
      del_sel = 5'(s + 1);
      measure(d1);
      check_near(d1 - d0, model_ps(1050, 25, 1, 0.0) - model_ps(1050, 25, 0, 0.0), 1.5, "one element per tap");
    end
    // Calibration: ring oscillator.
    vdd_act_mv = 12'd950; temp_c = 8'sd25; del_sel = 5'd14;
    mode_cal = 1'b1;
    #20 ring_reset_n = 1'b1;
    #100;
    del_edges = 0;
    #200;
    check_near((t_del_rise - t_del_prev) * 1000.0, 2.0 * model_ps(950, 25, 14, 0.2), 2.0, "ring period");
    checks++;
    if (del_edges < 18 || del_edges > 22) begin
      failures++;
      $display("FAIL ring edges in 200 ns: %0d", del_edges);
    end
    vdd_act_mv = 12'd1150;
    #100;
    check_near((t_del_rise - t_del_prev) * 1000.0, 2.0 * model_ps(1150, 25, 14, 0.2), 2.0, "ring period 1.15 V");
    ring_reset_n = 1'b0;
    #50;
    del_edges = 0;
    #200;
    check_near(real'(del_edges), 0.0, 0.0, "ring stopped");
    check_near(real'(del_clk), 1.0, 0.0, "stopped ring rests high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
