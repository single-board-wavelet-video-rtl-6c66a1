// Fixed-rate line side of the transmission FIFOs, with loop-back.
//
// The compressed stream leaves the board on a fixed-rate channel (a G.703
// tributary carried on the Telecombus).  The channel's rate is imposed from
// outside: tx_slot pulses once per 16-bit word the channel can carry, and
// rx_slot marks each received word on rx_data.  On the transmit side a
// one-word prefetch register is kept full from TXF; each tx_slot sends it
// (tx_valid=1 with tx_data on the next cycle) or, if TXF has run dry, sends
// nothing and pulses tx_under_evt (FIFO underflow).  On the receive side each
// word is held in a one-word register until RXF accepts it; a word arriving
// while that register is still occupied is lost and pulses rx_over_evt
// (FIFO overflow).  With loopback=1 each transmitted word goes straight to
// the receive side instead of the line, so TXF feeds RXF on the board.
// Slot strobes as the rate interface, the valid flag instead of fill words
// and the loop-back point are this design's own choices.
module telecombus_if
  import wvc_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          loopback,
  // line
  input  logic          tx_slot,
  output logic [DW-1:0] tx_data,
  output logic          tx_valid,
  input  logic          rx_slot,
  input  logic [DW-1:0] rx_data,
  // TXF read side
  output logic          txf_rd,
  input  logic [DW-1:0] txf_rdata,
  input  logic          txf_ack,
  // RXF write side
  output logic          rxf_wr,
  output logic [DW-1:0] rxf_wdata,
  input  logic          rxf_ack,
  // exceptions
  output logic          tx_under_evt,
  output logic          rx_over_evt
);

  logic          pf_v, hold_v;
  logic [DW-1:0] pf_d, hold_d;
  logic          in_v;
  logic [DW-1:0] in_d;

  assign txf_rd = !pf_v;

  // word arriving on the receive side
  assign in_v = loopback ? (tx_slot && pf_v) : rx_slot;
  assign in_d = loopback ? pf_d : rx_data;

  assign rxf_wr       = hold_v;
  assign rxf_wdata    = hold_d;
  assign tx_under_evt = tx_slot && !pf_v;
  assign rx_over_evt  = in_v && hold_v && !rxf_ack;

  always_ff @(posedge clk) begin
    if (rst) begin
      pf_v     <= 1'b0;
      pf_d     <= '0;
      hold_v   <= 1'b0;
      hold_d   <= '0;
      tx_valid <= 1'b0;
      tx_data  <= '0;
    end else begin
      // transmit
      tx_valid <= tx_slot && pf_v && !loopback;
      if (tx_slot && pf_v) tx_data <= pf_d;
      if (txf_rd && txf_ack) begin
        pf_v <= 1'b1;
        pf_d <= txf_rdata;
      end else if (tx_slot) begin
        pf_v <= 1'b0;
      end
      // receive
      if (in_v && (!hold_v || rxf_ack)) begin
        hold_v <= 1'b1;
        hold_d <= in_d;
      end else if (rxf_ack) begin
        hold_v <= 1'b0;
      end
    end
  end

endmodule
