// TR FPGA: the two transmission FIFOs and the line interface.
//
// TXF buffers the compressed stream between the compression-path DMA and the
// fixed-rate line; RXF buffers the received stream for the decompression-path
// DMA.  Each FIFO lives in its own external 256k x 16 SRAM (sram_fifo); the
// line side is telecombus_if, which also provides the TXF-to-RXF loop-back.
// fifo_rst (the RESET line from the IJS FPGA) empties both FIFOs.  One clock
// (TXF_CLK = RXF_CLK, the 27 MHz board clock) runs the block.
module tr_fpga
  import wvc_pkg::*;
#(
  parameter int unsigned AW = 18   // FIFO SRAM address bits (256k words)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          fifo_rst,
  input  logic          loopback,
  // TXF write side from the IJS FPGA
  input  logic          txf_wr,
  input  logic [DW-1:0] txf_vd,
  output logic          txf_ack,
  output fifo_flags_t   txf_flags,
  // RXF read side to the IJS FPGA
  input  logic          rxf_rd,
  output logic [DW-1:0] rxf_vd,
  output logic          rxf_ack,
  output fifo_flags_t   rxf_flags,
  output logic          tx_under_evt,
  output logic          rx_over_evt,
  // line (Telecombus)
  input  logic          tx_slot,
  output logic [DW-1:0] tx_data,
  output logic          tx_valid,
  input  logic          rx_slot,
  input  logic [DW-1:0] rx_data,
  // TXF SRAM (T_*)
  output logic [AW-1:0] t_addr,
  output logic          t_cs, t_oe, t_we, t_ub, t_lb,
  output logic [DW-1:0] t_dq_out,
  output logic          t_dq_oe,
  input  logic [DW-1:0] t_dq_in,
  // RXF SRAM (R_*)
  output logic [AW-1:0] r_addr,
  output logic          r_cs, r_oe, r_we, r_ub, r_lb,
  output logic [DW-1:0] r_dq_out,
  output logic          r_dq_oe,
  input  logic [DW-1:0] r_dq_in
);

  logic          frst;
  logic          l_txf_rd, l_txf_ack, l_rxf_wr, l_rxf_ack;
  logic [DW-1:0] l_txf_rdata, l_rxf_wdata;

  assign frst = rst || fifo_rst;

  sram_fifo #(.AW(AW)) u_txf (
    .clk, .rst(frst),
    .wr(txf_wr), .wdata(txf_vd), .wr_ack(txf_ack),
    .rd(l_txf_rd), .rdata(l_txf_rdata), .rd_ack(l_txf_ack),
    .flags(txf_flags),
    .sram_addr(t_addr), .sram_cs(t_cs), .sram_oe(t_oe), .sram_we(t_we),
    .sram_ub(t_ub), .sram_lb(t_lb), .sram_dq_out(t_dq_out),
    .sram_dq_oe(t_dq_oe), .sram_dq_in(t_dq_in)
  );

  sram_fifo #(.AW(AW)) u_rxf (
    .clk, .rst(frst),
    .wr(l_rxf_wr), .wdata(l_rxf_wdata), .wr_ack(l_rxf_ack),
    .rd(rxf_rd), .rdata(rxf_vd), .rd_ack(rxf_ack),
    .flags(rxf_flags),
    .sram_addr(r_addr), .sram_cs(r_cs), .sram_oe(r_oe), .sram_we(r_we),
    .sram_ub(r_ub), .sram_lb(r_lb), .sram_dq_out(r_dq_out),
    .sram_dq_oe(r_dq_oe), .sram_dq_in(r_dq_in)
  );

  telecombus_if u_line (
    .clk, .rst(frst), .loopback,
    .tx_slot, .tx_data, .tx_valid, .rx_slot, .rx_data,
    .txf_rd(l_txf_rd), .txf_rdata(l_txf_rdata), .txf_ack(l_txf_ack),
    .rxf_wr(l_rxf_wr), .rxf_wdata(l_rxf_wdata), .rxf_ack(l_rxf_ack),
    .tx_under_evt, .rx_over_evt
  );

endmodule
