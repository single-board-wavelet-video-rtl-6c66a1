// Testbench of the DSP register interface (dma_regs).
//
// The testbench is the DSP (strobes held until dsp_ack) and plays both DMA
// state machines: a pending codec request is answered with done after a few
// clocks, held until the request flag drops.  Checked: CTRL write and read
// back and its control outputs; STATUS shows the live FIFO flags; sticky
// exception bits set by events, clear on a write of 1, and raise irq only
// when enabled; codec reads and writes raise the right request flag with the
// DSP's address and data, return the codec data, and the flag drops when
// the DSP ends its strobe; local accesses complete without wait.
module tb_dma_regs;
  import wvc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic                dsp_cs, dsp_rd, dsp_wr, dsp_ack, irq;
  logic [DSP_AW-1:0]   dsp_addr;
  logic [DW-1:0]       dsp_wdata, dsp_rdata, codec_wdata;
  logic                tx_en, rx_en, loopback, fifo_rst;
  fifo_flags_t         txf_flags, rxf_flags;
  logic                tx_under_evt, rx_over_evt;
  logic                cmpr_rd_tmp, cmpr_wr_tmp, cmpr_done;
  logic                xpnd_rd_tmp, xpnd_wr_tmp, xpnd_done;
  logic [CODEC_AW-1:0] codec_addr;
  int unsigned         cmpr_cnt = 0, xpnd_cnt = 0;

  dma_regs dut (.*, .cmpr_rdata(16'hC000 | 16'(codec_addr)), .xpnd_rdata(16'hE000 | 16'(codec_addr)));

  // DMA state machine stand-ins: done three clocks after a request
  always @(posedge clk) begin
    if (rst) begin cmpr_cnt <= 0; xpnd_cnt <= 0; end
    else begin
      cmpr_cnt <= (cmpr_rd_tmp || cmpr_wr_tmp) ? cmpr_cnt + 1 : 0;
      xpnd_cnt <= (xpnd_rd_tmp || xpnd_wr_tmp) ? xpnd_cnt + 1 : 0;
    end
  end
  assign cmpr_done = cmpr_cnt >= 3;
  assign xpnd_done = xpnd_cnt >= 3;

  int unsigned waits;
  task automatic access(bit is_rd, logic [7:0] a, logic [DW-1:0] d, output logic [DW-1:0] r);
    @(negedge clk);
    dsp_cs = 1; dsp_addr = a; dsp_wdata = d; dsp_rd = is_rd; dsp_wr = !is_rd;
    #1;
    waits = 0;
    while (!dsp_ack) begin @(negedge clk); waits++; end
    r = dsp_rdata;
    @(negedge clk);
    dsp_cs = 0; dsp_rd = 0; dsp_wr = 0;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] r;
  initial begin
    dsp_cs = 0; dsp_rd = 0; dsp_wr = 0; dsp_addr = 0; dsp_wdata = 0;
    txf_flags = '0; rxf_flags = '0; tx_under_evt = 0; rx_over_evt = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    access(1, REG_CTRL, 0, r);
    check(r == 0 && !tx_en && !rx_en && !irq, "CTRL clear after reset");
    check(waits == 0, "local register needs no wait");
    access(0, REG_CTRL, 16'h0017, r);
    access(1, REG_CTRL, 0, r);
    check(r == 16'h0017, $sformatf("CTRL reads back %h", r));
    check(tx_en && rx_en && loopback && !fifo_rst, "CTRL outputs");
    txf_flags = '{full: 1'b0, half: 1'b1, empty: 1'b0};
    rxf_flags = '{full: 1'b0, half: 1'b0, empty: 1'b1};
    access(1, REG_STATUS, 0, r);
    check(r == 16'h000A, $sformatf("STATUS flags %h", r));
    check(!irq, "no irq without exceptions");
    @(negedge clk); tx_under_evt = 1; @(negedge clk); tx_under_evt = 0;
    @(negedge clk); rx_over_evt = 1; @(negedge clk); rx_over_evt = 0;
    access(1, REG_STATUS, 0, r);
    check(r[ST_TX_UNDER] && r[ST_RX_OVER] && !r[ST_TX_FULL], $sformatf("sticky bits %h", r));
    check(irq, "irq on exception when enabled");
    access(0, REG_STATUS, 16'(1 << ST_TX_UNDER), r);
    access(1, REG_STATUS, 0, r);
    check(!r[ST_TX_UNDER] && r[ST_RX_OVER], "write 1 clears one sticky bit");
    access(0, REG_CTRL, 16'h0007, r);
    check(!irq, "irq masked");
    access(0, REG_STATUS, 16'hFFFF, r);
    // codec accesses
    access(1, 8'h02, 0, r);
    check(r == 16'hC002, $sformatf("compressor register 2 read %h", r));
    check(waits >= 3, "codec read waits for the DMA state machine");
    check(!cmpr_rd_tmp && !cmpr_wr_tmp, "request flag drops after the strobe");
    access(0, 8'h05, 16'h1234, r);
    check(codec_wdata == 16'h1234 && codec_addr == 2'd1, "expander write address and data");
    check(!xpnd_wr_tmp, "expander write flag drops");
    access(1, 8'h07, 0, r);
    check(r == 16'hE003, $sformatf("expander register 3 read %h", r));
    fork
      begin
        @(negedge clk);
        dsp_cs = 1; dsp_addr = 8'h01; dsp_rd = 1;
        @(negedge clk);
        check(cmpr_rd_tmp && !cmpr_wr_tmp && !xpnd_rd_tmp, "compressor read raises CMPR_RD_TMP only");
        while (!dsp_ack) @(negedge clk);
        dsp_cs = 0; dsp_rd = 0;
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
