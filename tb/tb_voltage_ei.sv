// End-to-end testbench of the voltage embedded instrument at its default
// parameters (typical corner, 200 MHz CLK, 25 degC), driven only through its
// IJTAG port, lock_req and the supply stand-in.
//
// 1. Off mode after reset: pwr_en low.
// 2. Calibration as software would run it: for every DEL_CTRL value write
//    mode = calibration, wait for the 255-cycle window, read the 12-bit
//    count; pick the value whose count is closest to 127. Counts are checked
//    against ring periods worked out here from the delay formula, and the
//    chosen tap against the expected one (14).
// 3. Monitoring with the chosen tap: VDD_ACT swept 0.955..1.205 V in 10 mV
//    steps; after each lock_req the read result must be (V - 0.95 V)/10 mV
//    rounded down, 0..25.
// 4. The lock stage (a supply change without lock_req leaves the result),
//    one-cycle conversion (the code of the cycle launched at edge n is in
//    the TDC after edge n+1 and locked at edge n+2), DEL_SEL frozen while
//    monitoring, and return to off mode.
// Each mechanism is counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_voltage_ei;
  logic              clk = 1'b0, reset, lock_req;
  logic [11:0]       vdd_act_mv;
  logic signed [7:0] temp_c;
  logic              tck = 1'b0, rst, si, ce, se, ue, sel, so, pwr_en;
  int checks = 0, failures = 0;
  int n_cal_runs = 0, n_locks = 0, n_mode_switch = 0, n_freeze = 0, n_one_cycle = 0, n_hold = 0;

  voltage_ei dut (
    .clk, .reset, .vdd_act_mv, .temp_c, .lock_req,
    .tck, .rst, .si, .ce, .se, .ue, .sel, .so, .pwr_en
  );

  always #2.5 clk = ~clk;
  always #20  tck = ~tck;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d at %t", what, got, exp, $realtime);
    end
  endtask

  task automatic scan(input int n, input logic [63:0] din, output logic [63:0] dout);
    dout = '0;
    @(negedge tck); ce = 1'b1;
    @(negedge tck); ce = 1'b0; se = 1'b1;
    for (int i = 0; i < n; i++) begin
      dout[i] = so;
      si = din[i];
      @(negedge tck);
    end
    se = 1'b0; ue = 1'b1;
    @(negedge tck); ue = 1'b0;
  endtask

  // Full 21-bit path: SIB_data, read register, SIB_cfg, {mode, DEL_CTRL}.
  function automatic logic [63:0] cfg(input logic [1:0] mode, input logic [4:0] del);
    logic [63:0] v;
    v = '0;
    v[0] = 1'b1;
    v[13] = 1'b1;
    v[20:14] = {mode, del};
    return v;
  endfunction

  // Write a configuration; return the read register captured before it.
  task automatic access(input logic [1:0] mode, input logic [4:0] del, output int rd);
    logic [63:0] d;
    scan(21, cfg(mode, del), d);
    rd = int'(d[12:1]);
  endtask

  task automatic lock_pulse();
    @(negedge clk); lock_req = 1'b1;
    @(negedge clk); lock_req = 1'b0;
    n_locks++;
  endtask

  // Expected edge count for tap s at 0.95 V, 25 degC, typical corner.
  function automatic int expected_count(input int s);
    real e, period_ps;
    e = 100.0;                       // element delay at 0.95 V, typical
    period_ps = 2.0 * $rtoi(e * (35.0 + real'(s) + 1.0 + 0.2) + 0.5);
    return $rtoi(255.0 * 5000.0 / period_ps);
  endfunction

  task automatic read_result(output int rd);
    access(2'd1, 5'd0, rd);          // DEL_CTRL is ignored while monitoring
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rd, best, best_err, counts[32], exp_best, exp_best_err;
    logic [63:0] d;
    reset = 1'b0; rst = 1'b0;
    #0.1 reset = 1'b1; rst = 1'b1; lock_req = 1'b0; vdd_act_mv = 12'd950; temp_c = 8'sd25;
    si = 0; ce = 0; se = 0; ue = 0; sel = 1'b1;
    repeat (4) @(negedge tck);
    reset = 1'b0; rst = 1'b0;
    repeat (2) @(negedge tck);
    check(pwr_en, 0, "off after reset");
    scan(2, 64'b11, d);              // open both SIBs

    // Calibration sweep; each access reads the count of the previous tap.
    access(2'd2, 5'd0, rd);
    n_mode_switch++;
    for (int s = 0; s < 32; s++) begin
      #1600;                         // settle + 255 cycles + synchronisers
      access(2'd2, 5'(s == 31 ? 31 : s + 1), rd);
      counts[s] = rd;
      n_cal_runs++;
      checks++;
      if (rd < expected_count(s) - 1 || rd > expected_count(s) + 1) begin
        failures++;
        $display("FAIL count for tap %0d: %0d, expected %0d", s, rd, expected_count(s));
      end
    end
    check(pwr_en, 1, "powered in calibration");
    best = 0; best_err = 4096; exp_best = 0; exp_best_err = 4096;
    for (int s = 0; s < 32; s++) begin
      int err, xerr;
      err  = (counts[s] > 127) ? counts[s] - 127 : 127 - counts[s];
      xerr = (expected_count(s) > 127) ? expected_count(s) - 127 : 127 - expected_count(s);
      if (err < best_err) begin best = s; best_err = err; end
      if (xerr < exp_best_err) begin exp_best = s; exp_best_err = xerr; end
      if (s > 0) check(counts[s] <= counts[s-1], 1, "count falls with longer line");
    end
    check(best, exp_best, "calibrated tap");
    check(best, 14, "calibrated tap is 14");
    $display("calibration: tap %0d, count %0d", best, counts[best]);

    // Monitoring with the calibrated tap.
    access(2'd1, 5'(best), rd);
    n_mode_switch++;
    #200;
    for (int mv = 955; mv <= 1205; mv += 10) begin
      vdd_act_mv = 12'(mv);
      repeat (4) @(posedge clk);
      lock_pulse();
      read_result(rd);
      check(rd, (mv - 950) / 10, "result for VDD_ACT sweep");
    end

    // Lock stage holds: supply changes without lock_req.
    vdd_act_mv = 12'd1055;
    repeat (4) @(posedge clk);
    lock_pulse();
    read_result(rd);
    check(rd, 10, "locked at 1.055 V");
    vdd_act_mv = 12'd985;
    repeat (20) @(posedge clk);
    read_result(rd);
    check(rd, 10, "held without lock_req");
    n_hold++;

    // One-cycle conversion: the supply steps before launch edge n; the TDC
    // samples that launch at edge n+1, so a lock at edge n+1 still takes the
    // code sampled at edge n (old) and a lock at edge n+2 the new one.
    vdd_act_mv = 12'd1055;
    repeat (6) @(posedge clk);
    @(negedge clk);
    vdd_act_mv = 12'd1145;
    @(posedge clk);                  // edge n
    @(negedge clk);
    lock_req = 1'b1;                 // lock at edge n+1
    @(negedge clk);
    lock_req = 1'b0;
    read_result(rd);
    check(rd, 10, "lock at edge n+1 holds the old code");
    vdd_act_mv = 12'd1055;
    repeat (6) @(posedge clk);
    @(negedge clk);
    vdd_act_mv = 12'd1145;
    @(posedge clk);                  // edge n
    @(posedge clk);                  // edge n+1: TDC samples the new launch
    @(negedge clk);
    lock_req = 1'b1;                 // lock at edge n+2
    @(negedge clk);
    lock_req = 1'b0;
    read_result(rd);
    check(rd, 19, "lock at edge n+2 gives the new code");
    if (rd == 19) n_one_cycle++;

    // DEL_SEL frozen: a new DEL_CTRL while monitoring changes nothing.
    access(2'd1, 5'd0, rd);
    #200;
    vdd_act_mv = 12'd1075;
    repeat (4) @(posedge clk);
    lock_pulse();
    read_result(rd);
    check(rd, 12, "tap frozen while monitoring");
    if (rd == 12) n_freeze++;

    // Off mode.
    access(2'd0, 5'(best), rd);
    n_mode_switch++;
    #200;
    check(pwr_en, 0, "off mode");
    access(2'd0, 5'(best), rd);
    check(rd, 0, "result cleared in off mode");

    check(n_cal_runs > 0, 1, "calibration happened");
    check(n_locks > 0, 1, "lock happened");
    check(n_hold > 0, 1, "hold happened");
    check(n_mode_switch >= 3, 1, "mode switches happened");
    check(n_freeze > 0, 1, "tap freeze happened");
    check(n_one_cycle > 0, 1, "one-cycle conversion observed");
    $display("mechanisms: cal_runs=%0d locks=%0d mode_switches=%0d freeze=%0d one_cycle=%0d hold=%0d",
             n_cal_runs, n_locks, n_mode_switch, n_freeze, n_one_cycle, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
