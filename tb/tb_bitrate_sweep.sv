// Channel-rate sweep of the board logic at its default sizes, full duplex.
//
// For each line rate R of 8, 16, 34, 48 and 50 Mbit/s the line gets a slot
// whenever a phase accumulator, advanced by R every clock, passes 432
// (27 MHz x 16 bits / 1 Mbit/s), which gives exactly R Mbit/s of 16-bit
// words.  Per rate, one field's worth of words (R / 50 fields/s / 16 bits =
// 1250 R words) is compressed in bursts and sent on the line while the same
// number of words arrives from the line for the expander.  Checked per rate:
// the line carries every compressed word in order; every received word
// reaches the expander in order; TXF never fills and RXF never overflows;
// the line carries a word in every slot until the field is sent, so the
// channel runs at its full rate.
module tb_bitrate_sweep;
  import wvc_pkg::*;

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

  // line slots at R Mbit/s
  int unsigned rate = 0, acc = 0;
  logic        slot_on = 1'b0;
  always @(posedge clk) begin
    if (!slot_on) acc <= 0;
    else acc <= (acc + rate >= 432) ? acc + rate - 432 : acc + rate;
  end
  assign tx_slot = slot_on && (acc + rate >= 432);

  // received words: one per slot while the tb has words to send
  logic [DW-1:0] rx_words[$];
  int unsigned   rx_sent = 0;
  assign rx_slot = tx_slot && rx_sent < rx_words.size();
  assign rx_data = rx_sent < rx_words.size() ? rx_words[rx_sent] : 16'h0;

  logic [DW-1:0] line_out[$];
  int unsigned   n_slots = 0, n_valid = 0;
  logic          slot_q = 1'b0;
  always @(posedge clk) if (!rst) begin
    slot_q <= tx_slot;
    if (tx_slot) n_slots++;
    if (rx_slot) rx_sent <= rx_sent + 1;
    if (tx_valid) begin line_out.push_back(tx_data); n_valid++; end
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
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned   rates[5] = '{8, 16, 34, 48, 50};
  logic [DW-1:0] sent[$];
  logic [DW-1:0] r;
  int unsigned   field, produced, slots_at_end, xbase;
  bit            same;
  initial begin
    dsp_addr = 0; dsp_ioms = 0; dsp_rd = 0; dsp_wr = 0; dsp_wdata = 0;
    dec_video = 0; pc_in = 0; xpnd_video = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    dsp_access(0, 14'h0010, 16'(1 << CTRL_TX_EN | 1 << CTRL_RX_EN), r);
    foreach (rates[k]) begin
      rate  = rates[k];
      field = 1250 * rate;
      sent.delete(); line_out.delete(); rx_words.delete();
      rx_sent = 0; n_slots = 0; n_valid = 0;
      xbase = u_xpnd.got.size();
      for (int i = 0; i < field; i++) rx_words.push_back(16'($urandom));
      // first burst before the line starts, so the line never waits
      produced = 0;
      for (int i = 0; i < 512; i++) begin
        logic [DW-1:0] w; w = 16'($urandom);
        u_cmpr.push_word(w); sent.push_back(w); produced++;
      end
      repeat (2000) @(negedge clk);
      slot_on = 1;
      while (produced < field) begin
        // the codec emits 512-word bursts a little faster than the line drains
        for (int i = 0; i < 512 && produced < field; i++) begin
          logic [DW-1:0] w; w = 16'($urandom);
          u_cmpr.push_word(w); sent.push_back(w); produced++;
        end
        repeat (512 * 432 / rate * 9 / 10) @(negedge clk);
      end
      while (line_out.size() < field) @(negedge clk);
      slots_at_end = n_slots;
      repeat (600) @(negedge clk);
      slot_on = 0;
      repeat (50) @(negedge clk);
      same = (line_out.size() == field);
      for (int i = 0; same && i < field; i++) same = (line_out[i] == sent[i]);
      check(same, $sformatf("%0d Mbit/s: %0d compressed words on the line in order", rate, field));
      check(n_valid == field && slots_at_end == field,
            $sformatf("%0d Mbit/s: every slot carried a word until the field was sent (%0d slots)", rate, slots_at_end));
      same = (u_xpnd.got.size() == xbase + field);
      for (int i = 0; same && i < field; i++) same = (u_xpnd.got[xbase + i] == rx_words[i]);
      check(same, $sformatf("%0d Mbit/s: %0d received words reach the expander", rate, field));
      dsp_access(1, 14'h0011, 0, r);
      check(!r[ST_TX_FULL] && !r[ST_RX_OVER], $sformatf("%0d Mbit/s: no TXF full, no RXF overflow (%h)", rate, r));
      dsp_access(0, 14'h0011, 16'hFFFF, r);
      $display("%0d Mbit/s: field of %0d words, %0d slots", rate, field, slots_at_end);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
