// IJTAG (IEEE 1687) network of the voltage embedded instrument.
//
// Scan path: si -> SIB_cfg -> SIB_data -> so. Behind SIB_cfg sits the
// 7-bit configuration register (bits [4:0] DEL_CTRL, bits [6:5] mode); it
// captures its own update value so software can read back what it wrote.
// Behind SIB_data sits the 12-bit read register, which captures data_in
// (the 5-bit result or the 12-bit calibration count, chosen by mode
// outside this module). Both segment-insertion bits reset closed, so after
// rst the path is two bits long; with both open it is 21 bits, ordered from
// so: SIB_data, read register bits 0..11, SIB_cfg, configuration bits 0..6.
//
// The two-SIB arrangement follows the instrument's block diagram; register
// widths other than the 12-bit read register, the field order and the reset
// values are this design's choices. Everything acts on the rising TCK edge;
// an assertion checks that the host never raises two of ce, se and ue at
// once while sel is high.
`timescale 1ns/1ps
module vei_ijtag #(
  parameter int unsigned DATA_BITS    = 12,
  parameter int unsigned DEL_SEL_BITS = 5,
  localparam int unsigned CFG_BITS    = DEL_SEL_BITS + 2
) (
  input  logic                    tck,
  input  logic                    rst,
  input  logic                    si,
  input  logic                    ce,
  input  logic                    se,
  input  logic                    ue,
  input  logic                    sel,
  output logic                    so,
  input  logic [DATA_BITS-1:0]    data_in,
  output logic [1:0]              cfg_mode,
  output logic [DEL_SEL_BITS-1:0] cfg_del_ctrl
);

  logic                cfg_sel, cfg_so, sib_cfg_so;
  logic                data_sel, data_so;
  logic [CFG_BITS-1:0] cfg_upd;

  ijtag_sib u_sib_cfg (
    .tck, .rst, .si, .ce, .se, .ue, .sel,
    .seg_so (cfg_so),
    .seg_sel(cfg_sel),
    .so     (sib_cfg_so)
  );

  ijtag_tdr #(.W(CFG_BITS)) u_cfg_tdr (
    .tck, .rst, .si, .ce, .se, .ue,
    .sel   (cfg_sel),
    .cap_in(cfg_upd),
    .so    (cfg_so),
    .upd   (cfg_upd)
  );

  ijtag_sib u_sib_data (
    .tck, .rst, .ce, .se, .ue, .sel,
    .si     (sib_cfg_so),
    .seg_so (data_so),
    .seg_sel(data_sel),
    .so
  );

  logic [DATA_BITS-1:0] data_upd_unused;

  ijtag_tdr #(.W(DATA_BITS)) u_data_tdr (
    .tck, .rst, .ce, .se, .ue,
    .si    (sib_cfg_so),
    .sel   (data_sel),
    .cap_in(data_in),
    .so    (data_so),
    .upd   (data_upd_unused)
  );

  // Access rule: at most one of capture, shift and update per TCK edge.
  a_one_operation : assert property (@(posedge tck) disable iff (rst) sel |-> $onehot0({ce, se, ue}));

  assign cfg_del_ctrl = cfg_upd[DEL_SEL_BITS-1:0];
  assign cfg_mode     = cfg_upd[CFG_BITS-1:DEL_SEL_BITS];

endmodule
