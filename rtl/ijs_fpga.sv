// IJS FPGA: DMA controller of both video paths and the DSP register port.
//
// The compression path (tx_dma_fsm) moves compressed words from the ADV601
// compressor to the TXF FIFO in the TR FPGA; the decompression path
// (rx_dma_fsm) moves words from the RXF FIFO to the ADV601 expander.  Both
// codec host ports are shared with the DSP, whose accesses are decoded by
// dma_regs and served by the state machine of the codec concerned between
// bursts.  dma_regs also holds the DMA control register (enables, loop-back,
// FIFO reset, interrupt enable) and the exception status.  One clock, the
// 27 MHz codec clock, runs everything; TXF_CLK and RXF_CLK of the board are
// this clock.  The split into three sub-blocks is this design's own.
module ijs_fpga
  import wvc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // DSP bus
  input  logic              dsp_cs,      // XLX_CS from the address decoder
  input  logic              dsp_rd,
  input  logic              dsp_wr,
  input  logic [DSP_AW-1:0] dsp_addr,    // A0-7
  input  logic [DW-1:0]     dsp_wdata,
  output logic [DW-1:0]     dsp_rdata,
  output logic              dsp_ack,
  output logic              dsp_irq,
  // compressor (CMPR) and expander (XPND) host ports
  output codec_req_t        cmpr_req,
  input  codec_rsp_t        cmpr_rsp,
  output codec_req_t        xpnd_req,
  input  codec_rsp_t        xpnd_rsp,
  // TXF write side (TXF_VD0-15, TXF_WR, TXF_ACK, TXF_F,H,E)
  output logic              txf_wr,
  output logic [DW-1:0]     txf_vd,
  input  logic              txf_ack,
  input  fifo_flags_t       txf_flags,
  // RXF read side (RXF_VD0-15, RXF_RD, RXF_ACK, RXF_F,H,E)
  output logic              rxf_rd,
  input  logic [DW-1:0]     rxf_vd,
  input  logic              rxf_ack,
  input  fifo_flags_t       rxf_flags,
  output logic              fifo_rst,    // (RESET) towards the TR FPGA
  output logic              loopback,
  input  logic              tx_under_evt,
  input  logic              rx_over_evt,
  output logic              tx_burst,
  output logic              rx_burst
);

  logic                tx_en, rx_en;
  logic                cmpr_rd_tmp, cmpr_wr_tmp, cmpr_done;
  logic                xpnd_rd_tmp, xpnd_wr_tmp, xpnd_done;
  logic [DW-1:0]       cmpr_rdata, xpnd_rdata, codec_wdata;
  logic [CODEC_AW-1:0] codec_addr;

  dma_regs u_regs (
    .clk, .rst,
    .dsp_cs, .dsp_rd, .dsp_wr, .dsp_addr, .dsp_wdata, .dsp_rdata, .dsp_ack,
    .irq(dsp_irq),
    .tx_en, .rx_en, .loopback, .fifo_rst,
    .txf_flags, .rxf_flags, .tx_under_evt, .rx_over_evt,
    .cmpr_rd_tmp, .cmpr_wr_tmp, .cmpr_done, .cmpr_rdata,
    .xpnd_rd_tmp, .xpnd_wr_tmp, .xpnd_done, .xpnd_rdata,
    .codec_addr, .codec_wdata
  );

  tx_dma_fsm u_tx (
    .clk, .rst, .dma_en(tx_en),
    .codec_req(cmpr_req), .codec_rsp(cmpr_rsp),
    .txf_wr, .txf_vd, .txf_ack, .txf_flags,
    .dsp_rd_tmp(cmpr_rd_tmp), .dsp_wr_tmp(cmpr_wr_tmp),
    .dsp_addr(codec_addr), .dsp_wdata(codec_wdata),
    .dsp_rdata(cmpr_rdata), .dsp_done(cmpr_done), .burst_active(tx_burst)
  );

  rx_dma_fsm u_rx (
    .clk, .rst, .dma_en(rx_en),
    .codec_req(xpnd_req), .codec_rsp(xpnd_rsp),
    .rxf_rd, .rxf_vd, .rxf_ack, .rxf_flags,
    .dsp_rd_tmp(xpnd_rd_tmp), .dsp_wr_tmp(xpnd_wr_tmp),
    .dsp_addr(codec_addr), .dsp_wdata(codec_wdata),
    .dsp_rdata(xpnd_rdata), .dsp_done(xpnd_done), .burst_active(rx_burst)
  );

endmodule
