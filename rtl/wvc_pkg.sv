// Shared types and constants of the wavelet video board logic.
//
// The board moves the compressed stream of an ADV601 wavelet codec between
// the codec's 16-bit host port and a large transmission FIFO, and lets the
// board DSP reach the same host port to program the codec.  Everything runs
// from the 27 MHz codec clock.  The 16-bit data width, the 8-bit DSP register
// address, the 2-bit codec register address and the 4 byte enables are the
// widths printed on the board block diagram; the register map below and the
// active-high signal polarity are this design's own choice.
package wvc_pkg;

  localparam int unsigned DW       = 16;  // DSP, codec host and FIFO data width
  localparam int unsigned DSP_AW   = 8;   // DSP address bits seen by the IJS FPGA
  localparam int unsigned CODEC_AW = 2;   // ADV601 host register address A0-1

  // Request side of an ADV601 host port (driven by the IJS FPGA).
  typedef struct packed {
    logic                cs;     // chip select
    logic                rd;     // read strobe
    logic                wr;     // write strobe
    logic [CODEC_AW-1:0] addr;   // host register address
    logic [3:0]          be;     // byte enables BE0-3
    logic [DW-1:0]       wdata;  // write data
  } codec_req_t;

  // Response side of an ADV601 host port (driven by the codec).
  typedef struct packed {
    logic [DW-1:0] rdata;  // read data
    logic          ack;    // access acknowledge (register accesses)
    logic          hirq;   // host request: compressed-data FIFO needs service
  } codec_rsp_t;

  // Status flags of a transmission FIFO (TXF_F,H,E / RXF_F,H,E).
  typedef struct packed {
    logic full;
    logic half;
    logic empty;
  } fifo_flags_t;

  // ADV601 host register used for compressed data in DMA bursts.
  localparam logic [CODEC_AW-1:0] CODEC_CDATA_ADDR = 2'd2;
  // Byte enables for a 16-bit access on the 32-bit capable host port.
  localparam logic [3:0]          CODEC_BE16       = 4'b0011;

  // IJS FPGA register map (DSP address A0-7).
  //   0x00-0x03  compressor host registers (A0-1 = DSP A0-1)
  //   0x04-0x07  expander host registers   (A0-1 = DSP A0-1)
  //   0x10       CTRL   (read/write)
  //   0x11       STATUS (read; write 1 to clear the sticky bits)
  localparam logic [DSP_AW-1:0] REG_CTRL   = 8'h10;
  localparam logic [DSP_AW-1:0] REG_STATUS = 8'h11;

  // CTRL bits
  localparam int unsigned CTRL_TX_EN    = 0;  // compression-path DMA enable
  localparam int unsigned CTRL_RX_EN    = 1;  // decompression-path DMA enable
  localparam int unsigned CTRL_LOOPBACK = 2;  // line loop-back TXF -> RXF
  localparam int unsigned CTRL_FIFO_RST = 3;  // hold both FIFOs in reset
  localparam int unsigned CTRL_IRQ_EN   = 4;  // exception interrupt enable
  localparam int unsigned CTRL_BITS     = 5;

  // STATUS bits: [2:0] TXF {F,H,E}, [5:3] RXF {F,H,E}, sticky exceptions:
  localparam int unsigned ST_TX_UNDER = 8;   // line slot found TXF empty
  localparam int unsigned ST_RX_OVER  = 9;   // received word lost, RXF full
  localparam int unsigned ST_TX_FULL  = 10;  // TXF reached full

endpackage
