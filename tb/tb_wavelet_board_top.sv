// End-to-end testbench of the board logic (wavelet_board_top), with 64-word
// FIFOs so that the FIFO limits are reached quickly.
//
// Around the design: two ADV601 host-port models (compressor and expander),
// two SRAM models for TXF and RXF, a DSP bus driver and the line (a transmit
// slot every SLOT clocks, 9 clocks = 48 Mbit/s).  Phases:
//   1. loop-back: compressed words go compressor -> TXF -> line loop-back ->
//      RXF -> expander; TXF fills (the line is slower than the DMA), DSP
//      codec accesses are issued during bursts, the line runs dry at the end;
//   2. line mode: TXF drains onto the line, words received from the line
//      reach the expander; with the expander DMA off RXF overflows;
//   3. FIFO reset, video loop-back through the buffers.
// Every word is checked against what was sent.  Each mechanism is counted
// and must happen at least once: DMA bursts in both paths, DSP accesses
// deferred by a burst, TXF full, line underflow, RXF overflow (these three
// seen in the STATUS register), exception interrupt, loop-back, line transmit/receive, FIFO reset, video loop-back.
module tb_wavelet_board_top;
  import wvc_pkg::*;

  localparam int unsigned FIFO_AW = 6;
  localparam int unsigned SLOT    = 9;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [13:0]        dsp_addr;
  logic               dsp_ioms, dsp_rd, dsp_wr, dsp_ack, dsp_irq;
  logic [DW-1:0]      dsp_wdata, dsp_rdata;
  codec_req_t         cmpr_req, xpnd_req;
  codec_rsp_t         cmpr_rsp, xpnd_rsp;
  logic               tx_slot, tx_valid, rx_slot;
  logic [DW-1:0]      tx_data, rx_data;
  logic [FIFO_AW-1:0] t_addr, r_addr;
  logic               t_cs, t_oe, t_we, t_ub, t_lb, t_dq_oe;
  logic               r_cs, r_oe, r_we, r_ub, r_lb, r_dq_oe;
  logic [DW-1:0]      t_dq_out, t_dq_in, r_dq_out, r_dq_in;
  logic [9:0]         dec_video, pc_in, xpnd_video, cmpr_video, enc_video;
  logic               tx_burst, rx_burst;
  logic               xpnd_ready;

  wavelet_board_top #(.FIFO_AW(FIFO_AW)) dut (.*);

  adv601_model #(.EXPAND(0)) u_cmpr (.clk, .rst, .ready(1'b0), .req(cmpr_req), .rsp(cmpr_rsp));
  adv601_model #(.EXPAND(1)) u_xpnd (.clk, .rst, .ready(xpnd_ready), .req(xpnd_req), .rsp(xpnd_rsp));
  sram_model #(.AW(FIFO_AW)) u_tmem (.clk, .addr(t_addr), .cs(t_cs), .oe(t_oe), .we(t_we),
    .ub(t_ub), .lb(t_lb), .dq_out(t_dq_out), .dq_oe(t_dq_oe), .dq_in(t_dq_in));
  sram_model #(.AW(FIFO_AW)) u_rmem (.clk, .addr(r_addr), .cs(r_cs), .oe(r_oe), .we(r_we),
    .ub(r_ub), .lb(r_lb), .dq_out(r_dq_out), .dq_oe(r_dq_oe), .dq_in(r_dq_in));

  // ---------------------------------------------------------------- line
  logic slot_on = 1'b0;
  int unsigned slot_cnt = 0;
  always @(posedge clk) begin
    if (slot_on) slot_cnt <= (slot_cnt == SLOT - 1) ? 0 : slot_cnt + 1;
  end
  assign tx_slot = slot_on && slot_cnt == SLOT - 1;

  // ---------------------------------------------------------------- counters
  int unsigned n_tx_burst = 0, n_rx_burst = 0, n_deferred = 0, n_txf_full = 0;
  int unsigned n_under = 0, n_over = 0, n_irq = 0, n_loop = 0, n_line_tx = 0;
  int unsigned n_line_rx = 0, n_fifo_rst = 0, n_vid_loop = 0;
  logic tx_burst_q = 0, rx_burst_q = 0, irq_q = 0;
  logic [DW-1:0] line_out[$];
  always @(posedge clk) if (!rst) begin
    tx_burst_q <= tx_burst;
    rx_burst_q <= rx_burst;
    irq_q      <= dsp_irq;
    if (tx_burst && !tx_burst_q) n_tx_burst++;
    if (rx_burst && !rx_burst_q) n_rx_burst++;
    if (dsp_irq && !irq_q) n_irq++;
    if (tx_valid) begin line_out.push_back(tx_data); n_line_tx++; end
    if ((dsp_rd || dsp_wr) && dsp_ioms && dsp_addr[13:3] == 0 && (tx_burst || rx_burst)) n_deferred++;
  end

  // ---------------------------------------------------------------- DSP bus
  task automatic dsp_access(bit is_rd, logic [13:0] a, logic [DW-1:0] d, output logic [DW-1:0] r);
    @(negedge clk);
    dsp_addr = a; dsp_ioms = 1; dsp_wdata = d; dsp_rd = is_rd; dsp_wr = !is_rd;
    #1;
    while (!dsp_ack) begin @(negedge clk); #1; end
    r = dsp_rdata;
    @(negedge clk);
    dsp_ioms = 0; dsp_rd = 0; dsp_wr = 0;
  endtask
  task automatic dsp_write(logic [13:0] a, logic [DW-1:0] d);
    logic [DW-1:0] r;
    dsp_access(0, a, d, r);
  endtask

  localparam logic [DW-1:0] C_TX = 16'(1 << CTRL_TX_EN), C_RX = 16'(1 << CTRL_RX_EN);
  localparam logic [DW-1:0] C_LB = 16'(1 << CTRL_LOOPBACK), C_RST = 16'(1 << CTRL_FIFO_RST);
  localparam logic [DW-1:0] C_IRQ = 16'(1 << CTRL_IRQ_EN);

  logic [DW-1:0] sent[$];
  task automatic compress(int n);
    for (int i = 0; i < n; i++) begin
      logic [DW-1:0] w;
      w = 16'($urandom);
      u_cmpr.push_word(w);
      sent.push_back(w);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] r;
  int unsigned   base;
  initial begin
    dsp_addr = 0; dsp_ioms = 0; dsp_rd = 0; dsp_wr = 0; dsp_wdata = 0;
    rx_slot = 0; rx_data = 0; xpnd_ready = 1;
    dec_video = 0; pc_in = 0; xpnd_video = 0;
    repeat (4) @(negedge clk);
    rst = 0;

    // ---- 1. loop-back
    dsp_access(1, 14'h0011, 0, r);
    check(r[2:0] == 3'b001 && r[5:3] == 3'b001, $sformatf("both FIFOs empty after reset (%h)", r));
    dsp_write(14'h0010, C_TX | C_RX | C_LB | C_IRQ);
    slot_on = 1;
    compress(300);
    wait (tx_burst);
    repeat (2) @(negedge clk);
    dsp_access(1, 14'h0001, 0, r);
    check(r == 16'h1001, $sformatf("compressor register read during traffic (%h)", r));
    dsp_write(14'h0007, 16'hBEEF);
    check(u_xpnd.regs[3] == 16'hBEEF, "expander register write during traffic");
    while (u_xpnd.got.size() < 300) @(negedge clk);
    repeat (4 * SLOT) @(negedge clk);
    check(u_xpnd.got.size() == 300, "300 words through the loop-back");
    check(line_out.size() == 0, "line idle during loop-back");
    n_loop = u_xpnd.got.size();
    for (int i = 0; i < 300; i++)
      if (u_xpnd.got[i] != sent[i]) begin check(0, $sformatf("loop-back word %0d", i)); break; end
    check(1, "loop-back data compared");
    dsp_access(1, 14'h0011, 0, r);
    check(r[ST_TX_FULL] && r[ST_TX_UNDER] && !r[ST_RX_OVER], $sformatf("sticky TXF full and underflow (%h)", r));
    if (r[ST_TX_FULL]) n_txf_full++;
    if (r[ST_TX_UNDER]) n_under++;
    check(dsp_irq, "exception interrupt raised");
    dsp_write(14'h0011, 16'hFFFF);
    dsp_access(1, 14'h0011, 0, r);
    check(r[10:8] == 0, "sticky bits cleared");

    // ---- 2. line mode
    slot_on = 0;
    dsp_write(14'h0010, C_TX | C_RX | C_IRQ);
    base = sent.size();
    compress(100);
    slot_on = 1;
    while (line_out.size() < 100) @(negedge clk);
    for (int i = 0; i < 100; i++)
      if (line_out[i] != sent[base + i]) begin check(0, $sformatf("line word %0d", i)); break; end
    check(1, "line data compared");
    // receive 50 words from the line
    base = u_xpnd.got.size();
    for (int i = 0; i < 50; i++) begin
      repeat (SLOT - 1) @(negedge clk);
      rx_data = 16'(16'h4000 + i); rx_slot = 1; @(negedge clk); rx_slot = 0;
      n_line_rx++;
    end
    repeat (40) @(negedge clk);
    check(u_xpnd.got.size() == base + 50, "50 received words reach the expander");
    for (int i = 0; i < 50; i++)
      if (u_xpnd.got[base + i] != 16'(16'h4000 + i)) begin check(0, $sformatf("rx word %0d", i)); break; end
    // RXF overflow with the expander DMA off
    dsp_write(14'h0010, C_TX | C_IRQ);
    for (int i = 0; i < 80; i++) begin
      rx_data = 16'(16'h5000 + i); rx_slot = 1; @(negedge clk); rx_slot = 0; @(negedge clk);
    end
    dsp_access(1, 14'h0011, 0, r);
    check(r[ST_RX_OVER] && r[5], $sformatf("RXF full and overflow flagged (%h)", r));
    if (r[ST_RX_OVER]) n_over++;

    // ---- 3. FIFO reset, video loop-back
    dsp_write(14'h0010, C_RST);
    n_fifo_rst++;
    dsp_write(14'h0010, 16'h0);
    dsp_access(1, 14'h0011, 0, r);
    check(r[2:0] == 3'b001 && r[5:3] == 3'b001, $sformatf("FIFO reset empties both FIFOs (%h)", r));
    dsp_write(14'h0100, 16'h0003);
    repeat (3) @(negedge clk);
    dec_video = 10'h2A5; xpnd_video = 10'h111;
    repeat (2) @(negedge clk);
    check(enc_video == 10'h2A5 && cmpr_video == 10'h2A5, "video loop-back to the encoder");
    if (enc_video == 10'h2A5) n_vid_loop++;
    dsp_write(14'h0100, 16'h0001);
    repeat (2) @(negedge clk);
    check(enc_video == 10'h111, "expander video to the encoder");

    $display("mechanisms: tx_bursts=%0d rx_bursts=%0d dsp_deferred=%0d txf_full=%0d under=%0d over=%0d irq=%0d loopback=%0d line_tx=%0d line_rx=%0d fifo_reset=%0d video_loop=%0d",
             n_tx_burst, n_rx_burst, n_deferred, n_txf_full, n_under, n_over, n_irq,
             n_loop, n_line_tx, n_line_rx, n_fifo_rst, n_vid_loop);
    check(n_tx_burst > 0, "compression DMA burst happened");
    check(n_rx_burst > 0, "decompression DMA burst happened");
    check(n_deferred > 0, "DSP access deferred by a burst happened");
    check(n_txf_full > 0, "TXF full happened");
    check(n_under > 0, "line underflow happened");
    check(n_over > 0, "RXF overflow happened");
    check(n_irq > 0, "interrupt happened");
    check(n_loop > 0, "loop-back happened");
    check(n_line_tx > 0 && n_line_rx > 0, "line transmit and receive happened");
    check(n_fifo_rst > 0 && n_vid_loop > 0, "FIFO reset and video loop-back happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
