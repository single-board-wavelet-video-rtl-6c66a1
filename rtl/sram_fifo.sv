// Transmission FIFO kept in an external 256k x 16 asynchronous SRAM.
//
// The TR FPGA holds one of these for TXF and one for RXF.  The SRAM has a
// single port, so the controller does at most one SRAM access per clock and
// decouples both FIFO sides with a one-word register each:
//   * write side: a word offered on wr is taken (wr_ack=1 in the same cycle)
//     when the write register is free or is being written to the SRAM in
//     that cycle;
//   * read side: the output register is refilled from the SRAM whenever it
//     is empty; rd is acknowledged (rd_ack=1, rdata valid) in the same cycle
//     when it holds a word.
// When both a refill and a write-back want the SRAM, they alternate.  A
// read is a one-cycle access (address, CS and OE for one clock, data
// sampled at the next edge), and so is a write (address, CS, WE and data for
// one clock).  UB and LB are asserted on every access (whole 16-bit words).
// Flags: full = SRAM holds 2**AW words; half = the FIFO holds at least half
// that; empty = nothing anywhere in the FIFO.  All pins are active high.
// The 256k x 16 size (AW=18) is the board's memory chip; the handshake, the
// registers and the arbitration are this design's own.
module sram_fifo
  import wvc_pkg::*;
#(
  parameter int unsigned AW = 18   // SRAM address bits: 2**AW words
) (
  input  logic          clk,
  input  logic          rst,       // synchronous reset, empties the FIFO
  // write side
  input  logic          wr,
  input  logic [DW-1:0] wdata,
  output logic          wr_ack,
  // read side
  input  logic          rd,
  output logic [DW-1:0] rdata,
  output logic          rd_ack,
  output fifo_flags_t   flags,
  // external SRAM (x_A0-17, x_D0-15, x_CS, x_OE, x_WE, x_UB, x_LB)
  output logic [AW-1:0] sram_addr,
  output logic          sram_cs,
  output logic          sram_oe,
  output logic          sram_we,
  output logic          sram_ub,
  output logic          sram_lb,
  output logic [DW-1:0] sram_dq_out,
  output logic          sram_dq_oe,
  input  logic [DW-1:0] sram_dq_in
);

  localparam logic [AW:0] DEPTH = (AW+1)'(1) << AW;

  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   cnt;            // words held in the SRAM
  logic          wbuf_v, out_v, last_read;
  logic [DW-1:0] wbuf_d, out_d;
  logic          want_wr, want_rd, do_wr, do_rd;
  logic [AW+1:0] occ;

  assign want_wr = wbuf_v && (cnt != DEPTH);
  assign want_rd = !out_v && (cnt != '0);
  assign do_rd   = want_rd && (!want_wr || !last_read);
  assign do_wr   = want_wr && !do_rd;

  assign wr_ack  = wr && (!wbuf_v || do_wr);
  assign rd_ack  = rd && out_v;
  assign rdata   = out_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr      <= '0;
      rptr      <= '0;
      cnt       <= '0;
      wbuf_v    <= 1'b0;
      out_v     <= 1'b0;
      last_read <= 1'b0;
      wbuf_d    <= '0;
      out_d     <= '0;
    end else begin
      if (do_rd || do_wr) last_read <= do_rd;
      if (do_wr) begin
        wptr <= wptr + 1'b1;
        cnt  <= cnt + 1'b1;
      end else if (do_rd) begin
        rptr <= rptr + 1'b1;
        cnt  <= cnt - 1'b1;
      end
      // write register
      if (wr_ack) begin
        wbuf_v <= 1'b1;
        wbuf_d <= wdata;
      end else if (do_wr) begin
        wbuf_v <= 1'b0;
      end
      // output register
      if (do_rd) begin
        out_v <= 1'b1;
        out_d <= sram_dq_in;
      end else if (rd_ack) begin
        out_v <= 1'b0;
      end
    end
  end

  assign sram_addr   = do_rd ? rptr : wptr;
  assign sram_cs     = do_rd || do_wr;
  assign sram_oe     = do_rd;
  assign sram_we     = do_wr;
  assign sram_ub     = sram_cs;
  assign sram_lb     = sram_cs;
  assign sram_dq_out = wbuf_d;
  assign sram_dq_oe  = do_wr;

  assign occ         = (AW+2)'(cnt) + (AW+2)'(wbuf_v) + (AW+2)'(out_v);
  assign flags.full  = (cnt == DEPTH);
  assign flags.half  = (occ >= (AW+2)'(DEPTH >> 1));
  assign flags.empty = (occ == '0);

  a_wr_ack: assert property (@(posedge clk) disable iff (rst) wr_ack |-> wr)
    else $error("sram_fifo: write acknowledged without a request");
  a_rd_ack: assert property (@(posedge clk) disable iff (rst) rd_ack |-> !flags.empty)
    else $error("sram_fifo: read acknowledged while empty");

  always_ff @(posedge clk)
    if (!rst) assert (!(do_rd && do_wr)) else $error("sram_fifo: two SRAM accesses in one cycle");

endmodule
