// ddl_readout_chain: the detector read-out chain of two DDL channels: one
// read-out receiver card (RORC) with two channels, a destination interface
// unit (DIU) on each channel and, at the far end of each link, a source
// interface unit (SIU) on the front-end electronics.
//
//   host bus <-> RORC ch.A <-> DIU A <-> [fibre pair] <-> SIU A <-> FEE A bus, JTAG A
//            <-> RORC ch.B <-> DIU B <-> [fibre pair] <-> SIU B <-> FEE B bus, JTAG B
//
// The media interfaces (serialiser/deserialiser, optical transceivers) and the
// fibres are not logic; their 10-bit character streams are brought out as
// ports: connect diu_tx_char[c] to siu_rx_char[c] and siu_tx_char[c] to
// diu_rx_char[c] through a model of the line. Index c selects channel A (0) or
// B (1). Everything runs on one clock, the character clock (106.25 MHz for a
// 1.0625 Gbaud line), so one 32-bit word crosses the link in 4 clocks.
// Single-clock operation is this design's simplification; the prototype
// hardware uses several clocks.
module ddl_readout_chain
  import ddl_pkg::*;
#(
  parameter int unsigned IN_DEPTH        = 3 * 1024 * 1024,
  parameter int unsigned OUT_DEPTH       = 512 * 1024,
  parameter int unsigned ST_DEPTH        = 64,
  parameter int unsigned MAX_FRAME_WORDS = 512,
  parameter int unsigned FEE_TIMEOUT     = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  // host interface of the RORC
  input  logic [7:0]        base_addr,
  input  logic              hb_valid,
  input  logic              hb_write,
  input  logic [31:0]       hb_addr,
  input  logic [31:0]       hb_wdata,
  output logic [31:0]       hb_rdata,
  output logic              hb_ack,
  output logic              irq,
  // fibre character streams
  output logic [1:0][9:0]   diu_tx_char,
  input  logic [1:0][9:0]   diu_rx_char,
  output logic [1:0][9:0]   siu_tx_char,
  input  logic [1:0][9:0]   siu_rx_char,
  // front-end buses
  input  logic [1:0][31:0]  fbd_i,
  input  logic [1:0]        fbten_i,
  input  logic [1:0]        fbctrl_i,
  output logic [1:0][31:0]  fbd_o,
  output logic [1:0]        fbten_o,
  output logic [1:0]        fbctrl_o,
  output logic [1:0]        fbd_oe,
  output logic [1:0]        fidir,
  output logic [1:0]        filf,
  // JTAG ports
  output logic [1:0]        tck,
  output logic [1:0]        tms,
  output logic [1:0]        tdi,
  output logic [1:0]        trst_n,
  input  logic [1:0]        tdo
);

  logic [1:0]       ob_valid, ob_ctrl, ob_ready, ib_valid, ib_ctrl, ib_xoff;
  logic [1:0][31:0] ob_d, ib_d;

  rorc #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .ST_DEPTH(ST_DEPTH)) u_rorc (
    .clk, .rst_n, .base_addr, .hb_valid, .hb_write, .hb_addr, .hb_wdata, .hb_rdata, .hb_ack,
    .irq, .ob_valid, .ob_ctrl, .ob_d, .ob_ready, .ib_valid, .ib_ctrl, .ib_d, .ib_xoff);

  for (genvar c = 0; c < 2; c++) begin : g_link
    diu #(.MAX_FRAME_WORDS(MAX_FRAME_WORDS)) u_diu (
      .clk, .rst_n, .tx_char(diu_tx_char[c]), .rx_char(diu_rx_char[c]),
      .ob_valid(ob_valid[c]), .ob_ctrl(ob_ctrl[c]), .ob_d(ob_d[c]), .ob_ready(ob_ready[c]),
      .ib_valid(ib_valid[c]), .ib_ctrl(ib_ctrl[c]), .ib_d(ib_d[c]), .ib_xoff(ib_xoff[c]));

    siu #(.MAX_FRAME_WORDS(MAX_FRAME_WORDS), .FEE_TIMEOUT(FEE_TIMEOUT)) u_siu (
      .clk, .rst_n, .tx_char(siu_tx_char[c]), .rx_char(siu_rx_char[c]),
      .fbd_i(fbd_i[c]), .fbten_i(fbten_i[c]), .fbctrl_i(fbctrl_i[c]),
      .fbd_o(fbd_o[c]), .fbten_o(fbten_o[c]), .fbctrl_o(fbctrl_o[c]), .fbd_oe(fbd_oe[c]),
      .fidir(fidir[c]), .filf(filf[c]),
      .tck(tck[c]), .tms(tms[c]), .tdi(tdi[c]), .trst_n(trst_n[c]), .tdo(tdo[c]));
  end

endmodule
