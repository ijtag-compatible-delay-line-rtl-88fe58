// Self-checking testbench of the IJTAG network: reset path length, opening
// the two segment-insertion bits, writing and reading back the
// configuration register, capturing the read register, closing the SIBs.
// A host task performs capture, shift and update; expected values come from
// the documented bit order.
`timescale 1ns/1ps
module tb_vei_ijtag;
  logic        tck = 1'b0, rst, si, ce, se, ue, sel, so;
  logic [11:0] data_in;
  logic [1:0]  cfg_mode;
  logic [4:0]  cfg_del_ctrl;
  int checks = 0, failures = 0;

  vei_ijtag dut (.tck, .rst, .si, .ce, .se, .ue, .sel, .so, .data_in, .cfg_mode, .cfg_del_ctrl);

  always #20 tck = ~tck;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Capture, shift n bits (din[0] first), update; dout[k] is the captured
  // value of the cell k places from so.
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

  function automatic logic [63:0] full(input logic [1:0] mode, input logic [4:0] del);
    logic [63:0] v;
    v = '0;
    v[0]     = 1'b1;           // SIB_data stays open
    v[13]    = 1'b1;           // SIB_cfg stays open
    v[20:14] = {mode, del};
    return v;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    rst = 1'b0; #1 rst = 1'b1; si = 0; ce = 0; se = 0; ue = 0; sel = 1'b1; data_in = 12'hA5C;
    repeat (3) @(negedge tck);
    rst = 1'b0;
    check({cfg_mode, cfg_del_ctrl}, 7'd0, "reset value");
    // Closed network: 2 bits, both SIBs read 0.
    scan(2, 64'b11, d);
    check(d[1:0], 2'b00, "closed SIB capture");
    // Open network: SIBs capture 1, read register holds data_in.
    scan(21, full(2'd2, 5'd19), d);
    check(d[0], 1'b1, "SIB_data open");
    check(d[12:1], 12'hA5C, "read register capture");
    check(d[13], 1'b1, "SIB_cfg open");
    check({cfg_mode, cfg_del_ctrl}, {2'd2, 5'd19}, "config update");
    data_in = 12'h3F1;
    scan(21, full(2'd1, 5'd7), d);
    check(d[12:1], 12'h3F1, "read register capture 2");
    check(d[20:14], {2'd2, 5'd19}, "config read-back");
    check({cfg_mode, cfg_del_ctrl}, {2'd1, 5'd7}, "config update 2");
    // sel low: nothing moves.
    sel = 1'b0;
    scan(21, full(2'd3, 5'd31), d);
    check({cfg_mode, cfg_del_ctrl}, {2'd1, 5'd7}, "deselected");
    sel = 1'b1;
    // Close the config SIB only; path becomes 1 + 12 + 1 = 14 bits.
    begin
      logic [63:0] v;
      v = full(2'd1, 5'd7);
      v[13] = 1'b0;
      scan(21, v, d);
    end
    data_in = 12'h0C3;
    scan(14, 64'h1, d);
    check(d[12:1], 12'h0C3, "data segment alone");
    check(d[13], 1'b0, "SIB_cfg closed");
    check({cfg_mode, cfg_del_ctrl}, {2'd1, 5'd7}, "config kept when closed");
    // Random write/read-back.
    scan(14, 64'h1 | (64'h1 << 13), d);  // reopen SIB_cfg
    for (int n = 0; n < 20; n++) begin
      logic [6:0] c;
      logic [11:0] dv;
      c = 7'($urandom);
      dv = 12'($urandom);
      data_in = dv;
      scan(21, full(c[6:5], c[4:0]), d);
      check(d[12:1], dv, "random capture");
      check({cfg_mode, cfg_del_ctrl}, c, "random update");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
