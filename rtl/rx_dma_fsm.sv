// Decompression-path DMA controller.
//
// Moves received compressed words from the RXF transmission FIFO into the
// ADV601 expander host port, and shares that port with the DSP.  It is the
// mirror image of the compression-path controller (tx_dma_fsm): an idle state
// RXS0, a DSP register read loop RXR0-RXR2, a DSP register write loop
// RXW0-RXW2, and a burst loop RXS1-RXS5 in which each word costs three
// states.  The exact states are this design's own, built to the same rules:
//   RXS0  -> RXS1 on RX_DMA_Q; -> RXR0 on !RX_DMA_Q & XPND_RD_TMP;
//            -> RXW0 on !RX_DMA_Q & XPND_WR_TMP; else stay
//   RXS1  select the compressed-data register          -> RXS2
//   RXS2  ask RXF for a word (RXF_RD)                   -> RXS3
//   RXS3  repeat the request until RX_ACK_Q             -> RXS4
//   RXS4  write the word to the expander; -> RXS2 while RX_DMA_Q, else RXS5
//   RXS5  end of burst                                  -> RXS0
//   RXR/RXW loops as in the compression path, on XPND_ACK_Q.
// RX_DMA_Q is the registered AND of the DMA enable, the expander's request
// (HIRQ, read here as "ready for compressed data") and "RXF not empty".
// A word is taken from RXF in the cycle RXF_RD meets RXF_ACK.
module rx_dma_fsm
  import wvc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                dma_en,       // CTRL.RX_EN
  // expander host port
  output codec_req_t          codec_req,
  input  codec_rsp_t          codec_rsp,
  // RXF read side
  output logic                rxf_rd,
  input  logic [DW-1:0]       rxf_vd,
  input  logic                rxf_ack,
  input  fifo_flags_t         rxf_flags,
  // DSP access to expander registers
  input  logic                dsp_rd_tmp,   // XPND_RD_TMP
  input  logic                dsp_wr_tmp,   // XPND_WR_TMP
  input  logic [CODEC_AW-1:0] dsp_addr,
  input  logic [DW-1:0]       dsp_wdata,
  output logic [DW-1:0]       dsp_rdata,
  output logic                dsp_done,
  output logic                burst_active
);

  typedef enum logic [3:0] {
    RXS0, RXS1, RXS2, RXS3, RXS4, RXS5,
    RXR0, RXR1, RXR2,
    RXW0, RXW1, RXW2
  } rx_state_e;

  rx_state_e state, state_nx;

  logic          rx_dma_q, rx_ack_q, xpnd_ack_q;
  logic [DW-1:0] word_q;
  logic [DW-1:0] xpnd_rdata_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_dma_q   <= 1'b0;
      rx_ack_q   <= 1'b0;
      xpnd_ack_q <= 1'b0;
    end else begin
      rx_dma_q   <= dma_en & codec_rsp.hirq & ~rxf_flags.empty;
      rx_ack_q   <= rxf_rd & rxf_ack;
      xpnd_ack_q <= codec_rsp.ack;
    end
  end

  always_comb begin
    state_nx = state;
    unique case (state)
      RXS0: begin
        if (rx_dma_q)        state_nx = RXS1;
        else if (dsp_rd_tmp) state_nx = RXR0;
        else if (dsp_wr_tmp) state_nx = RXW0;
      end
      RXS1: state_nx = RXS2;
      RXS2: state_nx = RXS3;
      RXS3: if (rx_ack_q) state_nx = RXS4;
      RXS4: state_nx = rx_dma_q ? RXS2 : RXS5;
      RXS5: state_nx = RXS0;
      RXR0: state_nx = RXR1;
      RXR1: if (xpnd_ack_q) state_nx = RXR2;
      RXR2: if (!dsp_rd_tmp) state_nx = RXS0;
      RXW0: state_nx = RXW1;
      RXW1: if (xpnd_ack_q) state_nx = RXW2;
      RXW2: if (!dsp_wr_tmp) state_nx = RXS0;
      default: state_nx = RXS0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= RXS0;
    else     state <= state_nx;
  end

  assign rxf_rd = (state == RXS2) || (state == RXS3 && !rx_ack_q);

  always_ff @(posedge clk) begin
    xpnd_rdata_q <= codec_rsp.rdata;
    if (rxf_rd && rxf_ack) word_q <= rxf_vd;
    if (rst) dsp_rdata <= '0;
    else if (state == RXR1 && xpnd_ack_q) dsp_rdata <= xpnd_rdata_q;
  end

  always_comb begin
    codec_req       = '0;
    codec_req.be    = CODEC_BE16;
    codec_req.addr  = CODEC_CDATA_ADDR;
    codec_req.wdata = word_q;
    unique case (state)
      RXS1, RXS2, RXS3, RXS5: codec_req.cs = 1'b1;
      RXS4: begin codec_req.cs = 1'b1; codec_req.wr = 1'b1; end
      RXR0, RXR2: begin
        codec_req.cs   = 1'b1;
        codec_req.addr = dsp_addr;
      end
      RXR1: begin
        codec_req.cs   = 1'b1;
        codec_req.rd   = 1'b1;
        codec_req.addr = dsp_addr;
      end
      RXW0, RXW2: begin
        codec_req.cs    = 1'b1;
        codec_req.addr  = dsp_addr;
        codec_req.wdata = dsp_wdata;
      end
      RXW1: begin
        codec_req.cs    = 1'b1;
        codec_req.wr    = 1'b1;
        codec_req.addr  = dsp_addr;
        codec_req.wdata = dsp_wdata;
      end
      default: ;
    endcase
  end

  assign dsp_done     = (state == RXR2) || (state == RXW2);
  assign burst_active = (state inside {RXS1, RXS2, RXS3, RXS4, RXS5});

  // RXF handshake: a read that was not answered is repeated.
  a_rxf_retry: assert property (@(posedge clk) disable iff (rst)
                                rxf_rd && !rxf_ack |=> rxf_rd)
    else $error("rx_dma_fsm: unanswered RXF read not repeated");

  always_ff @(posedge clk)
    if (!rst) assert (!(codec_req.rd && codec_req.wr))
      else $error("rx_dma_fsm: codec read and write strobes together");

endmodule
