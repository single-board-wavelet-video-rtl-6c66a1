// Testbench of the TR FPGA (tr_fpga) with 32-word FIFOs and SRAM models.
//
// The testbench plays the IJS FPGA's DMA (writes to TXF with the same
// handshake as the compression DMA, reads from RXF) and the line.  Checked:
// words written to TXF leave on the line in order, one per slot; words from
// the line come out of RXF in order; the TXF flags follow the fill level
// (empty, half, full) and a full TXF refuses words (32 words in the SRAM,
// one in each FIFO register and one in the line prefetch register); loop-back carries TXF
// into RXF; the FIFO reset empties both.
module tb_tr_fpga;
  import wvc_pkg::*;
  localparam int unsigned AW = 5;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic          fifo_rst, loopback, txf_wr, txf_ack, rxf_rd, rxf_ack;
  logic [DW-1:0] txf_vd, rxf_vd, tx_data, rx_data;
  fifo_flags_t   txf_flags, rxf_flags;
  logic          tx_under_evt, rx_over_evt, tx_slot, tx_valid, rx_slot;
  logic [AW-1:0] t_addr, r_addr;
  logic          t_cs, t_oe, t_we, t_ub, t_lb, t_dq_oe, r_cs, r_oe, r_we, r_ub, r_lb, r_dq_oe;
  logic [DW-1:0] t_dq_out, t_dq_in, r_dq_out, r_dq_in;

  tr_fpga #(.AW(AW)) dut (.*);
  sram_model #(.AW(AW)) u_tmem (.clk, .addr(t_addr), .cs(t_cs), .oe(t_oe), .we(t_we),
    .ub(t_ub), .lb(t_lb), .dq_out(t_dq_out), .dq_oe(t_dq_oe), .dq_in(t_dq_in));
  sram_model #(.AW(AW)) u_rmem (.clk, .addr(r_addr), .cs(r_cs), .oe(r_oe), .we(r_we),
    .ub(r_ub), .lb(r_lb), .dq_out(r_dq_out), .dq_oe(r_dq_oe), .dq_in(r_dq_in));

  logic [DW-1:0] line_q[$], rx_out[$];
  int unsigned   n_wr = 0;
  always @(posedge clk) if (!rst) begin
    if (tx_valid) line_q.push_back(tx_data);
    if (rxf_rd && rxf_ack) rx_out.push_back(rxf_vd);
    if (txf_wr && txf_ack) n_wr++;
  end

  // write one word to TXF, offering it until accepted (at most 'tries' clocks)
  task automatic txf_put(logic [DW-1:0] w, int tries, output bit ok);
    @(negedge clk); txf_vd = w; txf_wr = 1; ok = 0;
    for (int i = 0; i < tries; i++) begin
      #1; if (txf_ack) begin ok = 1; @(negedge clk); break; end
      @(negedge clk);
    end
    txf_wr = 0;
  endtask

  task automatic slots(int n, int period);
    repeat (n) begin
      repeat (period - 1) @(negedge clk);
      tx_slot = 1; @(negedge clk); tx_slot = 0;
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ok;
  int unsigned nacc;
  logic [DW-1:0] expect_q[$];
  initial begin
    fifo_rst = 0; loopback = 0; txf_wr = 0; txf_vd = 0; rxf_rd = 0;
    tx_slot = 0; rx_slot = 0; rx_data = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(txf_flags.empty && rxf_flags.empty, "empty after reset");
    // fill TXF until refused
    nacc = 0;
    for (int i = 0; i < 40; i++) begin
      txf_put(16'(16'hA000 + i), 4, ok);
      if (!ok) break;
      expect_q.push_back(16'(16'hA000 + i));
      nacc++;
      if (nacc == 10) check(!txf_flags.half, "no half flag at 10 words");
      if (nacc == 20) check(txf_flags.half, "half flag at 20 words");
    end
    check(nacc == 35, $sformatf("TXF takes 32 + 2 words, line prefetch 1 (%0d)", nacc));
    check(txf_flags.full, "TXF full flag");
    slots(40, 6);
    repeat (4) @(negedge clk);
    check(line_q == expect_q, "line carries the TXF words in order");
    check(txf_flags.empty, "TXF empty again");
    // receive from the line
    for (int i = 0; i < 20; i++) begin
      rx_data = 16'(16'hB000 + i); rx_slot = 1; @(negedge clk); rx_slot = 0; @(negedge clk);
    end
    rxf_rd = 1;
    repeat (60) @(negedge clk);
    rxf_rd = 0;
    check(rx_out.size() == 20, $sformatf("RXF returns 20 words (%0d)", rx_out.size()));
    for (int i = 0; i < 20 && i < rx_out.size(); i++)
      check(rx_out[i] == 16'(16'hB000 + i), $sformatf("RXF word %0d", i));
    // loop-back
    loopback = 1;
    rx_out.delete();
    for (int i = 0; i < 10; i++) txf_put(16'(16'hC000 + i), 4, ok);
    slots(10, 4);
    rxf_rd = 1;
    repeat (40) @(negedge clk);
    rxf_rd = 0;
    check(rx_out.size() == 10 && rx_out[0] == 16'hC000 && rx_out[9] == 16'hC009, "loop-back TXF -> RXF");
    // FIFO reset
    for (int i = 0; i < 5; i++) txf_put(16'(i), 4, ok);
    check(!txf_flags.empty, "TXF holds words");
    fifo_rst = 1; @(negedge clk); fifo_rst = 0; @(negedge clk);
    check(txf_flags.empty && rxf_flags.empty, "FIFO reset empties both");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
