// DSP register interface of the IJS FPGA.
//
// The DSP reaches the DMA controller and both ADV601 host ports through an
// 8-bit address bus and a 16-bit data bus.  This block decodes those
// accesses.  Accesses to the two local registers (CTRL, STATUS; map in
// wvc_pkg) complete at once.  An access to a codec register cannot, because
// the codec's host port may be busy with a DMA burst: it is latched into a
// request flag (CMPR_RD_TMP, CMPR_WR_TMP, XPND_RD_TMP, XPND_WR_TMP) that the
// DMA state machine serves when its burst ends.  A flag is set at the start
// of the DSP strobe and cleared once the state machine reports the access
// done (dsp_done) and the DSP has released its strobe.  dsp_ack tells the DSP
// bus that the access has completed and, for a read, that dsp_rdata is valid;
// the DSP holds its strobe until then (wait-state extension).
//
// STATUS shows the live TXF and RXF flags and three sticky exception bits
// (TXF underflow on the line, RXF overflow, TXF full), cleared by writing 1.
// irq requests DSP service while any sticky bit is set and CTRL.IRQ_EN is 1.
// The flags, the exception set and the handshake are this design's own
// choice; only the bus widths and the existence of DSP-visible DMA control
// registers and FIFO exceptions come from the board description.
module dma_regs
  import wvc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // DSP bus (A0-7, D, RD, WR, chip select from the address decoder)
  input  logic                dsp_cs,
  input  logic                dsp_rd,
  input  logic                dsp_wr,
  input  logic [DSP_AW-1:0]   dsp_addr,
  input  logic [DW-1:0]       dsp_wdata,
  output logic [DW-1:0]       dsp_rdata,
  output logic                dsp_ack,
  output logic                irq,
  // control outputs
  output logic                tx_en,
  output logic                rx_en,
  output logic                loopback,
  output logic                fifo_rst,
  // status inputs
  input  fifo_flags_t         txf_flags,
  input  fifo_flags_t         rxf_flags,
  input  logic                tx_under_evt,
  input  logic                rx_over_evt,
  // compressor register requests towards tx_dma_fsm
  output logic                cmpr_rd_tmp,
  output logic                cmpr_wr_tmp,
  input  logic                cmpr_done,
  input  logic [DW-1:0]       cmpr_rdata,
  // expander register requests towards rx_dma_fsm
  output logic                xpnd_rd_tmp,
  output logic                xpnd_wr_tmp,
  input  logic                xpnd_done,
  input  logic [DW-1:0]       xpnd_rdata,
  // latched address and data of the pending codec access
  output logic [CODEC_AW-1:0] codec_addr,
  output logic [DW-1:0]       codec_wdata
);

  logic                 acc, acc_q, start;
  logic                 sel_cmpr, sel_xpnd, sel_ctrl, sel_status;
  logic [CTRL_BITS-1:0] ctrl;
  logic [2:0]           sticky;   // {TX_FULL, RX_OVER, TX_UNDER}

  assign acc        = dsp_cs & (dsp_rd | dsp_wr);
  assign start      = acc & ~acc_q;
  assign sel_cmpr   = (dsp_addr[DSP_AW-1:2] == 6'h00);
  assign sel_xpnd   = (dsp_addr[DSP_AW-1:2] == 6'h01);
  assign sel_ctrl   = (dsp_addr == REG_CTRL);
  assign sel_status = (dsp_addr == REG_STATUS);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q       <= 1'b0;
      ctrl        <= '0;
      sticky      <= '0;
      cmpr_rd_tmp <= 1'b0;
      cmpr_wr_tmp <= 1'b0;
      xpnd_rd_tmp <= 1'b0;
      xpnd_wr_tmp <= 1'b0;
      codec_addr  <= '0;
      codec_wdata <= '0;
    end else begin
      acc_q <= acc;

      // sticky exceptions (set wins over clear)
      if (start && dsp_wr && sel_status) sticky <= sticky & ~dsp_wdata[ST_TX_FULL:ST_TX_UNDER];
      if (tx_under_evt)   sticky[0] <= 1'b1;
      if (rx_over_evt)    sticky[1] <= 1'b1;
      if (txf_flags.full) sticky[2] <= 1'b1;

      if (start && dsp_wr && sel_ctrl) ctrl <= dsp_wdata[CTRL_BITS-1:0];

      if (start && (sel_cmpr || sel_xpnd)) begin
        codec_addr  <= dsp_addr[CODEC_AW-1:0];
        codec_wdata <= dsp_wdata;
      end
      if (start && sel_cmpr &&  dsp_rd) cmpr_rd_tmp <= 1'b1;
      if (start && sel_cmpr && !dsp_rd) cmpr_wr_tmp <= 1'b1;
      if (start && sel_xpnd &&  dsp_rd) xpnd_rd_tmp <= 1'b1;
      if (start && sel_xpnd && !dsp_rd) xpnd_wr_tmp <= 1'b1;
      if (cmpr_done && !acc) begin cmpr_rd_tmp <= 1'b0; cmpr_wr_tmp <= 1'b0; end
      if (xpnd_done && !acc) begin xpnd_rd_tmp <= 1'b0; xpnd_wr_tmp <= 1'b0; end
    end
  end

  always_comb begin
    dsp_rdata = '0;
    if (sel_cmpr)        dsp_rdata = cmpr_rdata;
    else if (sel_xpnd)   dsp_rdata = xpnd_rdata;
    else if (sel_ctrl)   dsp_rdata[CTRL_BITS-1:0] = ctrl;
    else if (sel_status) begin
      dsp_rdata[2:0]                     = {txf_flags.full, txf_flags.half, txf_flags.empty};
      dsp_rdata[5:3]                     = {rxf_flags.full, rxf_flags.half, rxf_flags.empty};
      dsp_rdata[ST_TX_FULL:ST_TX_UNDER]  = sticky;
    end
  end

  // Local registers answer at once; codec registers when the DMA state
  // machine has finished the access (never in the first cycle of a strobe,
  // so the tail of a previous access cannot acknowledge a new one).
  always_comb begin
    dsp_ack = 1'b0;
    if (acc) begin
      if (sel_cmpr)      dsp_ack = cmpr_done & acc_q;
      else if (sel_xpnd) dsp_ack = xpnd_done & acc_q;
      else               dsp_ack = 1'b1;
    end
  end

  assign tx_en    = ctrl[CTRL_TX_EN];
  assign rx_en    = ctrl[CTRL_RX_EN];
  assign loopback = ctrl[CTRL_LOOPBACK];
  assign fifo_rst = ctrl[CTRL_FIFO_RST];
  assign irq      = ctrl[CTRL_IRQ_EN] & (|sticky);

endmodule
