// Workload testbench: the uncompensated response of the instrument over the
// evaluation grid, VDD_ACT 0.955..1.205 V in 10 mV steps at 25, 75 and
// 125 degC, for the typical, slow and fast process corners (three
// instruments side by side, sharing CLK and the IJTAG control lines, each
// with its own scan-in and scan-out).
//
// Every instrument is calibrated at 0.95 V / 25 degC through IJTAG as
// software would (all 32 taps, count closest to 127), then switched to
// monitoring with its own tap. Checks: each calibrated count within 3 of
// 127; the typical corner at 25 degC exact ((V - 0.95 V)/10 mV); every
// response non-decreasing in VDD_ACT and within 0..25; the 0.955 V reading
// at 25 degC at most 1 at every corner. The table of readings and the
// largest deviation from the ideal line per corner and temperature are
// printed; those deviations are model results, not checks.
`timescale 1ns/1ps
module tb_vei_corner_sweep;
  localparam int NC = 3;

  logic              clk = 1'b0, reset, lock_req;
  logic [11:0]       vdd_act_mv;
  logic signed [7:0] temp_c;
  logic              tck = 1'b0, rst, ce, se, ue, sel;
  logic [NC-1:0]     si, so, pwr_en;
  int checks = 0, failures = 0;

  voltage_ei #(.CORNER(0)) dut_tt (.clk, .reset, .vdd_act_mv, .temp_c, .lock_req, .tck, .rst,
                                   .si(si[0]), .ce, .se, .ue, .sel, .so(so[0]), .pwr_en(pwr_en[0]));
  voltage_ei #(.CORNER(1)) dut_ss (.clk, .reset, .vdd_act_mv, .temp_c, .lock_req, .tck, .rst,
                                   .si(si[1]), .ce, .se, .ue, .sel, .so(so[1]), .pwr_en(pwr_en[1]));
  voltage_ei #(.CORNER(2)) dut_ff (.clk, .reset, .vdd_act_mv, .temp_c, .lock_req, .tck, .rst,
                                   .si(si[2]), .ce, .se, .ue, .sel, .so(so[2]), .pwr_en(pwr_en[2]));

  always #2.5 clk = ~clk;
  always #20  tck = ~tck;

  typedef logic [63:0] vec_t [NC];

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic scan(input int n, input vec_t din, output vec_t dout);
    foreach (dout[c]) dout[c] = '0;
    @(negedge tck); ce = 1'b1;
    @(negedge tck); ce = 1'b0; se = 1'b1;
    for (int i = 0; i < n; i++) begin
      for (int c = 0; c < NC; c++) begin
        dout[c][i] = so[c];
        si[c] = din[c][i];
      end
      @(negedge tck);
    end
    se = 1'b0; ue = 1'b1;
    @(negedge tck); ue = 1'b0;
  endtask

  function automatic logic [63:0] cfg(input logic [1:0] mode, input logic [4:0] del);
    logic [63:0] v;
    v = '0;
    v[0] = 1'b1;
    v[13] = 1'b1;
    v[20:14] = {mode, del};
    return v;
  endfunction

  // Write per-instrument configurations, return the captured read values.
  task automatic access(input logic [1:0] mode, input int del [NC], output int rd [NC]);
    vec_t din, dout;
    for (int c = 0; c < NC; c++) din[c] = cfg(mode, 5'(del[c]));
    scan(21, din, dout);
    for (int c = 0; c < NC; c++) rd[c] = int'(dout[c][12:1]);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rd [NC], del [NC], best [NC], best_err [NC], bestcnt [NC];
    int res [NC][3][26];
    int temps [3] = '{25, 75, 125};
    string names [NC] = '{"typical", "slow", "fast"};
    vec_t din, dout;
    reset = 1'b0; rst = 1'b0;
    #0.1 reset = 1'b1; rst = 1'b1;
    lock_req = 1'b0; vdd_act_mv = 12'd950; temp_c = 8'sd25;
    ce = 0; se = 0; ue = 0; sel = 1'b1; si = '0;
    repeat (4) @(negedge tck);
    reset = 1'b0; rst = 1'b0;
    repeat (2) @(negedge tck);
    for (int c = 0; c < NC; c++) din[c] = 64'b11;
    scan(2, din, dout);

    // Calibration at 0.95 V, 25 degC.
    for (int c = 0; c < NC; c++) begin del[c] = 0; best_err[c] = 4096; end
    access(2'd2, del, rd);
    for (int s = 0; s < 32; s++) begin
      #1600;
      for (int c = 0; c < NC; c++) del[c] = (s == 31) ? 31 : s + 1;
      access(2'd2, del, rd);
      for (int c = 0; c < NC; c++) begin
        int e;
        e = (rd[c] > 127) ? rd[c] - 127 : 127 - rd[c];
        if (e < best_err[c]) begin best_err[c] = e; best[c] = s; bestcnt[c] = rd[c]; end
      end
    end
    for (int c = 0; c < NC; c++) begin
      $display("%-8s corner: calibrated tap %0d, count %0d", names[c], best[c], bestcnt[c]);
      checks++;
      if (best_err[c] > 3) begin failures++; $display("FAIL calibration of %s", names[c]); end
    end

    // Monitoring sweep.
    access(2'd1, best, rd);
    #200;
    for (int t = 0; t < 3; t++) begin
      temp_c = 8'(temps[t]);
      for (int k = 0; k < 26; k++) begin
        vdd_act_mv = 12'(955 + 10 * k);
        repeat (4) @(posedge clk);
        @(negedge clk); lock_req = 1'b1;
        @(negedge clk); lock_req = 1'b0;
        access(2'd1, best, rd);
        for (int c = 0; c < NC; c++) res[c][t][k] = rd[c];
      end
    end

    for (int c = 0; c < NC; c++)
      for (int t = 0; t < 3; t++) begin
        int maxdev;
        string line;
        maxdev = 0;
        line = "";
        for (int k = 0; k < 26; k++) begin
          int dev;
          line = {line, $sformatf("%3d", res[c][t][k])};
          dev = (res[c][t][k] > k) ? res[c][t][k] - k : k - res[c][t][k];
          if (dev > maxdev) maxdev = dev;
          checks++;
          if (res[c][t][k] < 0 || res[c][t][k] > 25) begin failures++; $display("FAIL range"); end
          if (k > 0) check(res[c][t][k] >= res[c][t][k-1], 1, "monotonic response");
          if (c == 0 && t == 0) check(res[c][t][k], k, "typical 25 degC exact");
        end
        check(t != 0 || res[c][t][0] <= 1, 1, "reading at 0.955 V, 25 degC");
        $display("%-8s %3d degC:%s  max deviation %0d LSB", names[c], temps[t], line, maxdev);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
