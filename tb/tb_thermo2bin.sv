// Self-checking testbench of thermo2bin: every clean thermometer code
// 0..TDC_BITS, random codes with bubbles, and the EN gate. The expected
// value is the number of ones, computed with $countones.
`timescale 1ns/1ps
module tb_thermo2bin;
  localparam int unsigned TDC_BITS = 25;
  localparam int unsigned BIN_BITS = $clog2(TDC_BITS + 1);

  logic                en;
  logic [TDC_BITS-1:0] therm;
  logic [BIN_BITS-1:0] bin;
  int checks = 0, failures = 0;

  thermo2bin #(.TDC_BITS(TDC_BITS)) dut (.en, .therm, .bin);

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(bin) != exp) begin
      failures++;
      $display("FAIL %s: therm=%b en=%0b bin=%0d exp=%0d", what, therm, en, bin, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1;
    for (int k = 0; k <= int'(TDC_BITS); k++) begin
      therm = (TDC_BITS'(1) << k) - 1'b1;
      if (k == int'(TDC_BITS)) therm = '1;
      #1 check(k, "clean code");
    end
    for (int n = 0; n < 200; n++) begin
      therm = TDC_BITS'($urandom);
      #1 check($countones(therm), "random code");
    end
    en = 1'b0;
    therm = '1;
    #1 check(0, "disabled");
    therm = 25'h0000FFF;
    #1 check(0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
