// XLX SMALL: DSP address decoder and video buffer control.
//
// A small glue FPGA between the DSP and the rest of the board.  It watches
// the DSP's I/O address (ADD), read and write strobes and
//   * drives XLX_CS, the chip select of the IJS FPGA, for the I/O page
//     IJS_PAGE (the IJS FPGA itself sees only A0-7);
//   * holds a video control register at I/O address VID_ADDR whose bits
//     drive the video bus buffer enables: bit 0 VIN_OE (PAL decoder drives
//     the compressor input bus), bit 1 VLB_OE (video loop-back from the input
//     bus to the encoder bus).  After reset VIN_OE=1 and VLB_OE=0.
// A read of VID_ADDR returns the register on rdata with rsel=1.  Writes take
// effect at the clock edge after the strobe starts.  The address map and the
// control register are this design's own; the board description names only
// the block, its ADD/RD/WR inputs and its XLX_CS output, and shows the
// buffer enables running towards it.
module xlx_small
  import wvc_pkg::*;
#(
  parameter int unsigned        DSP_IO_AW = 14,
  parameter logic [DSP_IO_AW-1:0] IJS_BASE  = 14'h0000,  // 256-word IJS page
  parameter logic [DSP_IO_AW-1:0] VID_ADDR  = 14'h0100
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [DSP_IO_AW-1:0] dsp_addr,
  input  logic                 dsp_ioms,   // DSP I/O space access
  input  logic                 dsp_rd,
  input  logic                 dsp_wr,
  input  logic [DW-1:0]        dsp_wdata,
  output logic                 xlx_cs,
  output logic [DW-1:0]        rdata,
  output logic                 rsel,
  output logic                 vin_oe,
  output logic                 vlb_oe
);

  logic sel_vid, wr_q;

  assign xlx_cs  = dsp_ioms && (dsp_addr[DSP_IO_AW-1:8] == IJS_BASE[DSP_IO_AW-1:8]);
  assign sel_vid = dsp_ioms && (dsp_addr == VID_ADDR);
  assign rsel    = sel_vid && dsp_rd;
  assign rdata   = {{(DW-2){1'b0}}, vlb_oe, vin_oe};

  always_ff @(posedge clk) begin
    if (rst) begin
      vin_oe <= 1'b1;
      vlb_oe <= 1'b0;
      wr_q   <= 1'b0;
    end else begin
      wr_q <= sel_vid && dsp_wr;
      if (sel_vid && dsp_wr && !wr_q) {vlb_oe, vin_oe} <= dsp_wdata[1:0];
    end
  end

endmodule
