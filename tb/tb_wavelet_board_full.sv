// Full-size run of the board logic: wavelet_board_top with its default
// parameters (256k x 16 FIFO SRAMs).
//
// One complete operation: the compressor model delivers one field of
// compressed video sized for a 48 Mbit/s channel (48e6 / 50 fields/s / 16
// bits = 60000 words) in bursts, as a codec does, while the line runs in
// loop-back with a slot every 9 clocks (27 MHz / 9 * 16 bits = 48 Mbit/s).
// Checked: every word reaches the expander model in order; the TXF flags
// show the field being buffered (half full is never reached: a field is far
// below the 256k-word capacity); no TXF full, no overflow; the line
// underflows only after the field has been sent; the DMA keeps its three
// clocks per word inside a burst.
module tb_wavelet_board_full;
  import wvc_pkg::*;

  localparam int unsigned SLOT  = 9;
  localparam int unsigned FIELD = 60000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [13:0]   dsp_addr;
  logic          dsp_ioms, dsp_rd, dsp_wr, dsp_ack, dsp_irq;
  logic [DW-1:0] dsp_wdata, dsp_rdata;
  codec_req_t    cmpr_req, xpnd_req;
  codec_rsp_t    cmpr_rsp, xpnd_rsp;
  logic          tx_slot, tx_valid, rx_slot;
  logic [DW-1:0] tx_data, rx_data;
  logic [17:0]   t_addr, r_addr;
  logic          t_cs, t_oe, t_we, t_ub, t_lb, t_dq_oe;
  logic          r_cs, r_oe, r_we, r_ub, r_lb, r_dq_oe;
  logic [DW-1:0] t_dq_out, t_dq_in, r_dq_out, r_dq_in;
  logic [9:0]    dec_video, pc_in, xpnd_video, cmpr_video, enc_video;
  logic          tx_burst, rx_burst;

  wavelet_board_top dut (.*);

  adv601_model #(.EXPAND(0)) u_cmpr (.clk, .rst, .ready(1'b0), .req(cmpr_req), .rsp(cmpr_rsp));
  adv601_model #(.EXPAND(1)) u_xpnd (.clk, .rst, .ready(1'b1), .req(xpnd_req), .rsp(xpnd_rsp));
  sram_model #(.AW(18)) u_tmem (.clk, .addr(t_addr), .cs(t_cs), .oe(t_oe), .we(t_we),
    .ub(t_ub), .lb(t_lb), .dq_out(t_dq_out), .dq_oe(t_dq_oe), .dq_in(t_dq_in));
  sram_model #(.AW(18)) u_rmem (.clk, .addr(r_addr), .cs(r_cs), .oe(r_oe), .we(r_we),
    .ub(r_ub), .lb(r_lb), .dq_out(r_dq_out), .dq_oe(r_dq_oe), .dq_in(r_dq_in));

  int unsigned slot_cnt = 0;
  logic        slot_on = 1'b0;
  always @(posedge clk) if (slot_on) slot_cnt <= (slot_cnt == SLOT - 1) ? 0 : slot_cnt + 1;
  assign tx_slot = slot_on && slot_cnt == SLOT - 1;

  // cycles between compressed-data reads of the codec inside a burst
  int unsigned cyc = 0, last_we = 0, gaps3 = 0, gaps_long = 0, tx_bursts = 0;
  logic        tx_burst_q = 1'b0, in_burst_words = 1'b0;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    tx_burst_q <= tx_burst;
    if (tx_burst && !tx_burst_q) begin tx_bursts++; in_burst_words <= 1'b0; end
    if (cmpr_req.cs && cmpr_req.rd && cmpr_req.addr == CODEC_CDATA_ADDR) begin
      if (in_burst_words && tx_burst) begin
        if (cyc - last_we == 3) gaps3++; else gaps_long++;
      end
      in_burst_words <= 1'b1;
      last_we <= cyc;
    end
  end

  task automatic dsp_access(bit is_rd, logic [13:0] a, logic [DW-1:0] d, output logic [DW-1:0] r);
    @(negedge clk);
    dsp_addr = a; dsp_ioms = 1; dsp_wdata = d; dsp_rd = is_rd; dsp_wr = !is_rd;
    #1;
    while (!dsp_ack) begin @(negedge clk); #1; end
    r = dsp_rdata;
    @(negedge clk);
    dsp_ioms = 0; dsp_rd = 0; dsp_wr = 0;
  endtask

  initial begin : watchdog
    repeat (FIELD * SLOT + 200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] sent[$];
  logic [DW-1:0] r;
  int unsigned   produced;
  initial begin
    dsp_addr = 0; dsp_ioms = 0; dsp_rd = 0; dsp_wr = 0; dsp_wdata = 0;
    rx_slot = 0; rx_data = 0; dec_video = 0; pc_in = 0; xpnd_video = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    dsp_access(0, 14'h0010, 16'(1 << CTRL_TX_EN | 1 << CTRL_RX_EN | 1 << CTRL_LOOPBACK), r);
    slot_on = 1;
    // the codec delivers the field in bursts of 256 words, faster than the line
    produced = 0;
    while (produced < FIELD) begin
      for (int i = 0; i < 256 && produced < FIELD; i++) begin
        logic [DW-1:0] w;
        w = 16'($urandom);
        u_cmpr.push_word(w);
        sent.push_back(w);
        produced++;
      end
      repeat (1200) @(negedge clk);
    end
    while (u_xpnd.got.size() < FIELD) @(negedge clk);
    repeat (50) @(negedge clk);
    check(u_xpnd.got.size() == FIELD, $sformatf("%0d words of the field delivered", u_xpnd.got.size()));
    for (int i = 0; i < FIELD; i++)
      if (u_xpnd.got[i] != sent[i]) begin check(0, $sformatf("word %0d differs", i)); break; end
    check(1, "field data compared");
    dsp_access(1, 14'h0011, 0, r);
    $display("STATUS %h, bursts %0d, in-burst word gaps: %0d of 3 clocks, %0d longer",
             r, tx_bursts, gaps3, gaps_long);
    check(!r[ST_TX_FULL] && !r[ST_RX_OVER], "no TXF full, no RXF overflow");
    check(r[ST_TX_UNDER], "line underflows once the field is sent");
    check(gaps3 > 1000, "bursts move one word per three clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
