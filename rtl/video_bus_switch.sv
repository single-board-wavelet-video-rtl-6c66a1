// Video bus buffers around the two ADV601 codecs.
//
// The board's uncompressed 4:2:2 video buses pass through registered bus
// drivers ("D" on the block diagram) with output enables, which select who
// drives each bus:
//   compressor input bus: the PAL decoder when vin_oe=1, otherwise the input
//                         parallel connector;
//   encoder output bus:   the video input bus (loop-back, no compression)
//                         when vlb_oe=1, otherwise the expander's output.
// The encoder bus is also the output parallel connector.  Each driver is one
// register stage on the video clock, so both outputs follow their source by
// one clock.  Reading "D" as a registered driver, the mux form of the
// tri-state buffers and the 10-bit width (10-bit CCIR656 video) are this
// design's interpretation.
module video_bus_switch #(
  parameter int unsigned VW = 10   // video word width (10-bit CCIR656)
) (
  input  logic          clk,       // VIN_CLK / VOUT_CLK (27 MHz)
  input  logic          rst,
  input  logic          vin_oe,
  input  logic          vlb_oe,
  input  logic [VW-1:0] dec_video, // from the PAL decoder ADV7185
  input  logic [VW-1:0] pc_in,     // from the input parallel connector
  input  logic [VW-1:0] xpnd_video,// from the expander ADV601
  output logic [VW-1:0] cmpr_video,// to the compressor ADV601
  output logic [VW-1:0] enc_video  // to the PAL encoder ADV7194 / connector
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cmpr_video <= '0;
      enc_video  <= '0;
    end else begin
      cmpr_video <= vin_oe ? dec_video : pc_in;
      enc_video  <= vlb_oe ? (vin_oe ? dec_video : pc_in) : xpnd_video;
    end
  end

endmodule
