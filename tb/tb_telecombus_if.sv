// Testbench of the fixed-rate line interface (telecombus_if).
//
// The testbench plays TXF (a queue), RXF (a queue that can refuse words) and
// the line (slot strobes every SLOT clocks).  Checked: transmitted words
// leave in order, one per tx_slot, the clock after the slot; a slot that
// finds TXF empty sends nothing and signals underflow; received words reach
// RXF in order; a word arriving while the previous one still waits is lost
// and signals overflow; in loop-back the transmitted words reach RXF and the
// line stays idle.
module tb_telecombus_if;
  import wvc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic          loopback, tx_slot, tx_valid, rx_slot;
  logic [DW-1:0] tx_data, rx_data;
  logic          txf_rd, txf_ack, rxf_wr, rxf_ack, under, over;
  logic [DW-1:0] txf_rdata, rxf_wdata;
  logic          rxf_accept;

  telecombus_if dut (
    .clk, .rst, .loopback, .tx_slot, .tx_data, .tx_valid, .rx_slot, .rx_data,
    .txf_rd, .txf_rdata, .txf_ack, .rxf_wr, .rxf_wdata, .rxf_ack,
    .tx_under_evt(under), .rx_over_evt(over)
  );

  logic [DW-1:0] txq[$], sentq[$], rxq[$], lineq[$];
  assign txf_ack   = txf_rd && txq.size() != 0;
  assign txf_rdata = txq.size() != 0 ? txq[0] : 16'h0;
  assign rxf_ack   = rxf_wr && rxf_accept;

  int unsigned n_under = 0, n_over = 0, n_tx = 0, n_rx = 0;
  logic        pop_pend = 1'b0, slot_q = 1'b0;
  always @(negedge clk) if (pop_pend) void'(txq.pop_front());
  always @(posedge clk) if (!rst) begin
    pop_pend <= txf_ack;
    slot_q   <= tx_slot;
    if (txf_ack) sentq.push_back(txf_rdata);
    if (under) n_under++;
    if (over)  n_over++;
    if (tx_valid) begin
      check(slot_q && !loopback, "tx_valid only the clock after a slot, not in loop-back");
      check(lineq.size() != 0 && tx_data == lineq[0], $sformatf("line word %h", tx_data));
      if (lineq.size() != 0) void'(lineq.pop_front());
      n_tx++;
    end
    if (rxf_ack) begin
      check(rxq.size() != 0 && rxf_wdata == rxq[0], $sformatf("RXF word %h", rxf_wdata));
      if (rxq.size() != 0) void'(rxq.pop_front());
      n_rx++;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    loopback = 0; tx_slot = 0; rx_slot = 0; rx_data = 0; rxf_accept = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    // transmit 20 words at one slot per 5 clocks
    for (int i = 0; i < 20; i++) begin txq.push_back(16'(16'h300 + i)); lineq.push_back(16'(16'h300 + i)); end
    repeat (21) begin
      repeat (4) @(negedge clk);
      tx_slot = 1; @(negedge clk); tx_slot = 0;
    end
    repeat (3) @(negedge clk);
    check(n_tx == 20 && lineq.size() == 0, $sformatf("20 words on the line (%0d)", n_tx));
    check(n_under == 1, $sformatf("one underflow on the 21st slot (%0d)", n_under));
    // receive 10 words
    for (int i = 0; i < 10; i++) begin
      rxq.push_back(16'(16'h500 + i));
      rx_data = 16'(16'h500 + i); rx_slot = 1; @(negedge clk); rx_slot = 0;
      repeat (3) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(n_rx == 10 && n_over == 0, "10 words into RXF, no overflow");
    // overflow: RXF refuses, three words arrive, only the first is kept
    rxf_accept = 0;
    rxq.push_back(16'h600);
    rx_data = 16'h600; rx_slot = 1; @(negedge clk);
    rx_data = 16'h601; @(negedge clk);
    rx_data = 16'h602; @(negedge clk);
    rx_slot = 0;
    repeat (2) @(negedge clk);
    check(n_over == 2, $sformatf("two overflows (%0d)", n_over));
    rxf_accept = 1;
    repeat (3) @(negedge clk);
    check(n_rx == 11 && rxq.size() == 0, "held word delivered after the stall");
    // loop-back
    loopback = 1;
    for (int i = 0; i < 8; i++) begin txq.push_back(16'(16'h700 + i)); rxq.push_back(16'(16'h700 + i)); end
    repeat (8) begin
      repeat (3) @(negedge clk);
      tx_slot = 1; @(negedge clk); tx_slot = 0;
    end
    repeat (4) @(negedge clk);
    check(n_rx == 19 && rxq.size() == 0, $sformatf("loop-back delivered 8 words to RXF (%0d)", n_rx - 11));
    check(n_tx == 20, "line idle in loop-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
