// Self-checking testbench of the TDC model.
//
// The testbench makes DEL_CLK itself: CLK delayed by (5000 - dt) ps, so its
// rising edge leads the next CLK edge by dt. For dt halfway between
// consecutive tap delays the thermometer code must hold exactly the taps
// whose cumulative delay is at most dt. Tap delays are written out here from
// the design rule: tap i turns on when a typical line tuned to 5 ns at
// 0.95 V reaches 0.96 + 0.01*i V, t(V) proportional to V / (V - 0.724);
// a second instance at the slow corner has them scaled by 1.20. Also
// checked: the code of the cycle launched at edge n appears after edge n+1
// (one-cycle conversion), and en low clears the flip-flops.
`timescale 1ns/1ps
module tb_tdc;
  localparam int unsigned N = 25;

  logic clk = 1'b0, reset, en, del_clk = 1'b0;
  logic [N-1:0] code_tt, code_ss;
  int checks = 0, failures = 0;
  int unsigned dly_ps = 5000;
  real d_tt [N];

  tdc #(.CORNER(0)) dut_tt (.clk, .reset, .en, .del_clk, .code(code_tt));
  tdc #(.CORNER(1)) dut_ss (.clk, .reset, .en, .del_clk, .code(code_ss));

  always #2.5 clk = ~clk;

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

  always @(clk) begin
    automatic logic v = clk;
    automatic logic [13:0] d = 14'(dly_ps);
    fork
      begin
        wait_ps(d);
        del_clk = v;
      end
    join_none
  end

  function automatic real g(input real v);
    return v / (v - 0.724);
  endfunction

  function automatic int expect_ones(input real dt_ps, input real scale);
    int n = 0;
    for (int i = 0; i < N; i++) if (scale * d_tt[i] <= dt_ps) n++;
    return n;
  endfunction

  function automatic logic [N-1:0] therm(input int k);
    return (k >= N) ? '1 : N'((N'(1) << k) - 1);
  endfunction

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++)
      d_tt[i] = 5000.0 - 5000.0 * g(0.96 + 0.01 * real'(i)) / g(0.95);
    reset = 1'b0; en = 1'b1;
    #0.1 reset = 1'b1;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    // Sweep dt across all 26 codes.
    for (int k = 0; k <= int'(N); k++) begin
      real dt;
      if (k == 0)           dt = d_tt[0] / 2.0;
      else if (k == int'(N)) dt = d_tt[N-1] + 60.0;
      else                  dt = (d_tt[k-1] + d_tt[k]) / 2.0;
      @(negedge clk);
      dly_ps = 5000 - $rtoi(dt);
      repeat (3) @(posedge clk);
      #0.1;
      check(code_tt, therm(k), "typical code");
      check(code_ss, therm(expect_ones(dt, 1.20)), "slow-corner code");
    end
    // One-cycle conversion: launch at edge n with a new delay, code after n+1.
    @(negedge clk);
    dly_ps = 5000;                      // dt = 0 -> code 0
    repeat (3) @(posedge clk);
    @(negedge clk);
    dly_ps = 5000 - 1200;               // takes effect at launch edge n
    @(posedge clk);                     // edge n: samples the old launch
    #0.1 check(code_tt, therm(0), "code before conversion");
    @(posedge clk);                     // edge n+1
    #0.1 check(code_tt, therm(expect_ones(1200.0, 1.0)), "code one cycle after launch");
    // en low clears.
    en = 1'b0;
    @(posedge clk);
    #0.1 check(code_tt, '0, "disabled");
    en = 1'b1;
    @(posedge clk);
    #0.1 check(code_tt, therm(expect_ones(1200.0, 1.0)), "re-enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
