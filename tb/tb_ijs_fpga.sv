// Testbench of the IJS FPGA (ijs_fpga): both DMA paths and the DSP port.
//
// Compressor and expander models sit on the host ports; the testbench plays
// the TXF and RXF FIFOs of the TR FPGA (queues; TXF accepts every word, RXF
// answers every read while it holds words) and the DSP.  Checked: the DSP
// enables the DMA through CTRL; compressed words reach TXF in order at one
// word per three clocks; RXF words reach the expander in order; DSP reads
// and writes of both codecs' registers return and store the right values;
// the TXF full flag stops the compression path and shows in STATUS.
module tb_ijs_fpga;
  import wvc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic              dsp_cs, dsp_rd, dsp_wr, dsp_ack, dsp_irq;
  logic [DSP_AW-1:0] dsp_addr;
  logic [DW-1:0]     dsp_wdata, dsp_rdata;
  codec_req_t        cmpr_req, xpnd_req;
  codec_rsp_t        cmpr_rsp, xpnd_rsp;
  logic              txf_wr, txf_ack, rxf_rd, rxf_ack;
  logic [DW-1:0]     txf_vd, rxf_vd;
  fifo_flags_t       txf_flags, rxf_flags;
  logic              fifo_rst, loopback, tx_burst, rx_burst;
  logic              txf_full;

  ijs_fpga dut (.*, .tx_under_evt(1'b0), .rx_over_evt(1'b0));
  adv601_model #(.EXPAND(0)) u_cmpr (.clk, .rst, .ready(1'b0), .req(cmpr_req), .rsp(cmpr_rsp));
  adv601_model #(.EXPAND(1)) u_xpnd (.clk, .rst, .ready(1'b1), .req(xpnd_req), .rsp(xpnd_rsp));

  logic [DW-1:0] txq[$], rxq[$], sent_tx[$], sent_rx[$];
  logic          pop_pend = 1'b0;
  int unsigned   cyc = 0, first_acc = 0, last_acc = 0, n_acc = 0;
  assign txf_ack         = txf_wr;
  assign txf_flags.full  = txf_full;
  assign txf_flags.half  = 1'b0;
  assign txf_flags.empty = 1'b0;
  assign rxf_ack         = rxf_rd && rxq.size() != 0;
  assign rxf_vd          = rxq.size() != 0 ? rxq[0] : 16'h0;
  assign rxf_flags.empty = rxq.size() == 0;
  assign rxf_flags.half  = 1'b0;
  assign rxf_flags.full  = 1'b0;
  always @(negedge clk) if (pop_pend) void'(rxq.pop_front());
  always @(posedge clk) begin
    cyc <= cyc + 1;
    pop_pend <= rxf_ack;
    if (txf_ack) begin
      txq.push_back(txf_vd);
      if (n_acc == 0) first_acc <= cyc;
      last_acc <= cyc;
      n_acc <= n_acc + 1;
    end
  end

  task automatic dsp_access(bit is_rd, logic [7:0] a, logic [DW-1:0] d, output logic [DW-1:0] r);
    @(negedge clk);
    dsp_cs = 1; dsp_addr = a; dsp_wdata = d; dsp_rd = is_rd; dsp_wr = !is_rd;
    #1;
    while (!dsp_ack) begin @(negedge clk); #1; end
    r = dsp_rdata;
    @(negedge clk);
    dsp_cs = 0; dsp_rd = 0; dsp_wr = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] r;
  initial begin
    dsp_cs = 0; dsp_rd = 0; dsp_wr = 0; dsp_addr = 0; dsp_wdata = 0; txf_full = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 50; i++) begin
      u_cmpr.push_word(16'(16'h1100 + i)); sent_tx.push_back(16'(16'h1100 + i));
      rxq.push_back(16'(16'h2200 + i));    sent_rx.push_back(16'(16'h2200 + i));
    end
    repeat (20) @(negedge clk);
    check(n_acc == 0 && u_xpnd.got.size() == 0, "no transfer before CTRL enables the DMA");
    dsp_access(0, REG_CTRL, 16'h0003, r);
    dsp_access(1, 8'h01, 0, r);
    check(r == 16'h1001, $sformatf("compressor register 1 reads %h", r));
    dsp_access(0, 8'h04, 16'h7777, r);
    check(u_xpnd.regs[0] == 16'h7777, "expander register 0 written");
    while (n_acc < 50 || u_xpnd.got.size() < 50) @(negedge clk);
    check(txq == sent_tx, "compressed words reach TXF in order");
    check(u_xpnd.got == sent_rx, "RXF words reach the expander in order");
    $display("TXF: 50 words in %0d clocks", last_acc - first_acc);
    check(last_acc - first_acc <= 49 * 3 + 12, "compression DMA near one word per three clocks");
    // full TXF
    txf_full = 1;
    u_cmpr.push_word(16'h3333);
    repeat (30) @(negedge clk);
    check(n_acc == 50, "full TXF stops the compression DMA");
    dsp_access(1, REG_STATUS, 0, r);
    check(r[2] && r[ST_TX_FULL], $sformatf("STATUS shows TXF full (%h)", r));
    txf_full = 0;
    repeat (20) @(negedge clk);
    check(n_acc == 51 && txq[50] == 16'h3333, "transfer resumes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
