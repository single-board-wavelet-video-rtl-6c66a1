// Digital logic of a single-board wavelet video compression/decompression
// unit.
//
// Two independent video paths run in opposite directions.  Compression: PAL
// video, digitised by an ADV7185 decoder, passes the video buffers into an
// ADV601 wavelet codec in compression mode; the IJS FPGA's DMA controller
// moves the bursty compressed stream into the TXF FIFO (256k x 16 SRAM) in
// the TR FPGA, which sends it at the fixed rate of the line.  Decompression:
// received words fill RXF, the DMA controller feeds them to a second ADV601
// in expansion mode, whose video goes through the buffers to an ADV7194
// encoder.  A DSP programs both codecs and the DMA controller over its bus
// (XLX SMALL decodes its addresses) and keeps the compressed rate constant by
// rewriting the codec's bin widths every field.
//
// This module holds the programmable logic of the board: xlx_small,
// ijs_fpga, tr_fpga and video_bus_switch, wired as on the board block
// diagram.  The DSP, the codecs, the video decoder/encoder and the two SRAMs
// are chips outside this logic; their buses are this module's ports, with
// each bidirectional bus split into an output, an input and an output enable.
// Clock: the 27 MHz codec clock for everything.  Reset: synchronous, active
// high.  DSP accesses to anything but the IJS page complete without wait.
module wavelet_board_top
  import wvc_pkg::*;
#(
  parameter int unsigned FIFO_AW = 18,  // TXF/RXF SRAM: 2**18 = 256k words
  parameter int unsigned VW      = 10   // video word width
) (
  input  logic               clk,
  input  logic               rst,
  // DSP bus
  input  logic [13:0]        dsp_addr,
  input  logic               dsp_ioms,
  input  logic               dsp_rd,
  input  logic               dsp_wr,
  input  logic [DW-1:0]      dsp_wdata,
  output logic [DW-1:0]      dsp_rdata,
  output logic               dsp_ack,
  output logic               dsp_irq,
  // ADV601 compressor and expander host ports
  output codec_req_t         cmpr_req,
  input  codec_rsp_t         cmpr_rsp,
  output codec_req_t         xpnd_req,
  input  codec_rsp_t         xpnd_rsp,
  // line (Telecombus)
  input  logic               tx_slot,
  output logic [DW-1:0]      tx_data,
  output logic               tx_valid,
  input  logic               rx_slot,
  input  logic [DW-1:0]      rx_data,
  // TXF SRAM
  output logic [FIFO_AW-1:0] t_addr,
  output logic               t_cs, t_oe, t_we, t_ub, t_lb,
  output logic [DW-1:0]      t_dq_out,
  output logic               t_dq_oe,
  input  logic [DW-1:0]      t_dq_in,
  // RXF SRAM
  output logic [FIFO_AW-1:0] r_addr,
  output logic               r_cs, r_oe, r_we, r_ub, r_lb,
  output logic [DW-1:0]      r_dq_out,
  output logic               r_dq_oe,
  input  logic [DW-1:0]      r_dq_in,
  // video buses
  input  logic [VW-1:0]      dec_video,
  input  logic [VW-1:0]      pc_in,
  input  logic [VW-1:0]      xpnd_video,
  output logic [VW-1:0]      cmpr_video,
  output logic [VW-1:0]      enc_video,
  // activity, for monitoring
  output logic               tx_burst,
  output logic               rx_burst
);

  logic          xlx_cs, xlx_rsel, vin_oe, vlb_oe;
  logic [DW-1:0] xlx_rdata, ijs_rdata;
  logic          ijs_ack;
  logic          txf_wr, txf_ack, rxf_rd, rxf_ack;
  logic [DW-1:0] txf_vd, rxf_vd;
  fifo_flags_t   txf_flags, rxf_flags;
  logic          fifo_rst, loopback, tx_under_evt, rx_over_evt;

  xlx_small u_xlx (
    .clk, .rst, .dsp_addr, .dsp_ioms, .dsp_rd, .dsp_wr, .dsp_wdata,
    .xlx_cs, .rdata(xlx_rdata), .rsel(xlx_rsel), .vin_oe, .vlb_oe
  );

  ijs_fpga u_ijs (
    .clk, .rst,
    .dsp_cs(xlx_cs), .dsp_rd, .dsp_wr, .dsp_addr(dsp_addr[DSP_AW-1:0]),
    .dsp_wdata, .dsp_rdata(ijs_rdata), .dsp_ack(ijs_ack), .dsp_irq,
    .cmpr_req, .cmpr_rsp, .xpnd_req, .xpnd_rsp,
    .txf_wr, .txf_vd, .txf_ack, .txf_flags,
    .rxf_rd, .rxf_vd, .rxf_ack, .rxf_flags,
    .fifo_rst, .loopback, .tx_under_evt, .rx_over_evt,
    .tx_burst, .rx_burst
  );

  tr_fpga #(.AW(FIFO_AW)) u_tr (
    .clk, .rst, .fifo_rst, .loopback,
    .txf_wr, .txf_vd, .txf_ack, .txf_flags,
    .rxf_rd, .rxf_vd, .rxf_ack, .rxf_flags,
    .tx_under_evt, .rx_over_evt,
    .tx_slot, .tx_data, .tx_valid, .rx_slot, .rx_data,
    .t_addr, .t_cs, .t_oe, .t_we, .t_ub, .t_lb, .t_dq_out, .t_dq_oe, .t_dq_in,
    .r_addr, .r_cs, .r_oe, .r_we, .r_ub, .r_lb, .r_dq_out, .r_dq_oe, .r_dq_in
  );

  video_bus_switch #(.VW(VW)) u_vid (
    .clk, .rst, .vin_oe, .vlb_oe,
    .dec_video, .pc_in, .xpnd_video, .cmpr_video, .enc_video
  );

  assign dsp_rdata = xlx_rsel ? xlx_rdata : ijs_rdata;
  assign dsp_ack   = xlx_cs ? ijs_ack : (dsp_rd | dsp_wr);

endmodule
