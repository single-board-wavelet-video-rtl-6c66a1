// Compression-path DMA controller.
//
// Moves compressed words from the ADV601 compressor host port into the TXF
// transmission FIFO, and shares that host port with the DSP, whose register
// reads and writes are served between bursts.  The state machine follows the
// board's state diagram state for state: an idle/waiting state TXS0 and three
// loops leaving it, a compressor register read (TXR0-TXR2), a compressor
// register write (TXW0-TXW2) and the FIFO write burst (TXS1-TXS5).
//
//   TXS0  -> TXS1 on TX_DMA_Q; -> TXR0 on !TX_DMA_Q & CMPR_RD_TMP;
//            -> TXW0 on !TX_DMA_Q & CMPR_WR_TMP; else stay
//   TXR0 -> TXR1; TXR1 waits for CMPR_ACK_Q; TXR2 holds while CMPR_RD_TMP
//   TXW0 -> TXW1; TXW1 waits for CMPR_ACK_Q; TXW2 holds while CMPR_WR_TMP
//   TXS1 -> TXS2 -> TXS3 -> TXS4; TXS4 waits for TX_ACK_Q, then returns to
//            TXS2 while TX_DMA_Q holds, else TXS5 -> TXS0
//
// A burst word costs the three states TXS2-TXS4, one 16-bit word per three
// 27 MHz clocks (144 Mbit/s).  The longest loop, a single-word burst, lasts
// the six states TXS0-TXS5.  What each state drives is this design's own
// reading of the diagram:
//   TXS1 selects the compressed-data register; TXS2 pulses the codec read
//   strobe and captures the word; TXS3 offers it to the FIFO (TXF_WR);
//   TXS4 repeats the offer until the FIFO accepted it; TXS5 ends the burst.
//   TXR0/TXW0 present the DSP's address (and data); TXR1/TXW1 hold the read
//   or write strobe until the codec acknowledges; TXR2/TXW2 hold the result
//   until the DSP ends its access.
// The *_Q inputs are registered here, as their names in the diagram suggest.
// If a DSP read and write are pending together, the read goes first (the
// diagram leaves that case open).
//
// Interface: codec_req/codec_rsp is the compressor host port; txf_* is the
// TXF write handshake (txf_ack is the FIFO's same-cycle acceptance of a word
// offered on txf_wr); dsp_* comes from the DSP register block (dma_regs).
module tx_dma_fsm
  import wvc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                dma_en,       // CTRL.TX_EN
  // compressor host port
  output codec_req_t          codec_req,
  input  codec_rsp_t          codec_rsp,
  // TXF write side
  output logic                txf_wr,
  output logic [DW-1:0]       txf_vd,
  input  logic                txf_ack,
  input  fifo_flags_t         txf_flags,
  // DSP access to compressor registers
  input  logic                dsp_rd_tmp,   // CMPR_RD_TMP
  input  logic                dsp_wr_tmp,   // CMPR_WR_TMP
  input  logic [CODEC_AW-1:0] dsp_addr,
  input  logic [DW-1:0]       dsp_wdata,
  output logic [DW-1:0]       dsp_rdata,
  output logic                dsp_done,     // in TXR2/TXW2: access finished
  output logic                burst_active  // in TXS1-TXS5
);

  typedef enum logic [3:0] {
    TXS0, TXS1, TXS2, TXS3, TXS4, TXS5,
    TXR0, TXR1, TXR2,
    TXW0, TXW1, TXW2
  } tx_state_e;

  tx_state_e state, state_nx;

  logic          tx_dma_q, tx_ack_q, cmpr_ack_q;
  logic [DW-1:0] word_q;      // word in flight from compressor to TXF
  logic [DW-1:0] cmpr_rdata_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_dma_q   <= 1'b0;
      tx_ack_q   <= 1'b0;
      cmpr_ack_q <= 1'b0;
    end else begin
      tx_dma_q   <= dma_en & codec_rsp.hirq & ~txf_flags.full;
      tx_ack_q   <= txf_ack;
      cmpr_ack_q <= codec_rsp.ack;
    end
  end

  always_comb begin
    state_nx = state;
    unique case (state)
      TXS0: begin
        if (tx_dma_q)        state_nx = TXS1;
        else if (dsp_rd_tmp) state_nx = TXR0;
        else if (dsp_wr_tmp) state_nx = TXW0;
      end
      TXS1: state_nx = TXS2;
      TXS2: state_nx = TXS3;
      TXS3: state_nx = TXS4;
      TXS4: if (tx_ack_q) state_nx = tx_dma_q ? TXS2 : TXS5;
      TXS5: state_nx = TXS0;
      TXR0: state_nx = TXR1;
      TXR1: if (cmpr_ack_q) state_nx = TXR2;
      TXR2: if (!dsp_rd_tmp) state_nx = TXS0;
      TXW0: state_nx = TXW1;
      TXW1: if (cmpr_ack_q) state_nx = TXW2;
      TXW2: if (!dsp_wr_tmp) state_nx = TXS0;
      default: state_nx = TXS0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= TXS0;
    else     state <= state_nx;
  end

  // Data registers: burst word captured at the end of the TXS2 read strobe,
  // DSP read data captured when the registered acknowledge is seen.
  always_ff @(posedge clk) begin
    cmpr_rdata_q <= codec_rsp.rdata;
    if (state == TXS2) word_q <= codec_rsp.rdata;
    if (rst) dsp_rdata <= '0;
    else if (state == TXR1 && cmpr_ack_q) dsp_rdata <= cmpr_rdata_q;
  end

  // Host port drive (Moore outputs)
  always_comb begin
    codec_req       = '0;
    codec_req.be    = CODEC_BE16;
    codec_req.addr  = CODEC_CDATA_ADDR;
    codec_req.wdata = dsp_wdata;
    unique case (state)
      TXS1, TXS3, TXS4, TXS5: codec_req.cs = 1'b1;
      TXS2: begin codec_req.cs = 1'b1; codec_req.rd = 1'b1; end
      TXR0, TXR2, TXW0, TXW2: begin
        codec_req.cs   = 1'b1;
        codec_req.addr = dsp_addr;
      end
      TXR1: begin
        codec_req.cs   = 1'b1;
        codec_req.rd   = 1'b1;
        codec_req.addr = dsp_addr;
      end
      TXW1: begin
        codec_req.cs   = 1'b1;
        codec_req.wr   = 1'b1;
        codec_req.addr = dsp_addr;
      end
      default: ;
    endcase
  end

  assign txf_wr       = (state == TXS3) || (state == TXS4 && !tx_ack_q);
  assign txf_vd       = word_q;
  assign dsp_done     = (state == TXR2) || (state == TXW2);
  assign burst_active = (state inside {TXS1, TXS2, TXS3, TXS4, TXS5});

  // TXF handshake: a word that was not taken is offered again, unchanged.
  a_txf_retry: assert property (@(posedge clk) disable iff (rst)
                                txf_wr && !txf_ack |=> txf_wr && $stable(txf_vd))
    else $error("tx_dma_fsm: refused TXF word not offered again");

  // The host port is never read and written at once.
  always_ff @(posedge clk)
    if (!rst) assert (!(codec_req.rd && codec_req.wr))
      else $error("tx_dma_fsm: codec read and write strobes together");

endmodule
