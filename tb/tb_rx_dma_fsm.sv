// Testbench of the decompression-path DMA controller (rx_dma_fsm).
//
// The testbench plays the RXF FIFO (a queue answering RXF_RD in the same
// cycle unless told to stall) and an expander model that stores every word
// written to its compressed-data register.  Checked: words arrive in order
// and once; a long burst moves one word per three clocks; the expander's
// not-ready and an empty FIFO stop the transfer; DSP register reads and
// writes of the expander work and wait for a running burst.
module tb_rx_dma_fsm;
  import wvc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  codec_req_t    req;
  codec_rsp_t    rsp;
  logic          rxf_rd, rxf_ack, dma_en, dsp_rd_tmp, dsp_wr_tmp, dsp_done, burst;
  logic [DW-1:0] rxf_vd, dsp_wdata, dsp_rdata;
  logic [1:0]    dsp_addr;
  fifo_flags_t   flags;
  logic          avail, ready;
  logic [DW-1:0] fq[$];
  int unsigned   sent = 0;

  rx_dma_fsm dut (
    .clk, .rst, .dma_en, .codec_req(req), .codec_rsp(rsp),
    .rxf_rd, .rxf_vd, .rxf_ack, .rxf_flags(flags),
    .dsp_rd_tmp, .dsp_wr_tmp, .dsp_addr, .dsp_wdata, .dsp_rdata,
    .dsp_done, .burst_active(burst)
  );
  adv601_model #(.EXPAND(1)) u_xpnd (.clk, .rst, .ready, .req, .rsp);

  assign rxf_ack     = rxf_rd && avail && fq.size() != 0;
  assign rxf_vd      = fq.size() != 0 ? fq[0] : 16'h0;
  assign flags.empty = fq.size() == 0;
  assign flags.full  = 1'b0;
  assign flags.half  = 1'b0;

  int unsigned cyc = 0, n_wr = 0, first_wr = 0, last_wr = 0;
  logic        reg_in_burst = 1'b0;
  logic        pop_pend = 1'b0;
  always @(negedge clk) if (pop_pend) void'(fq.pop_front());
  always @(posedge clk) begin
    cyc <= cyc + 1;
    pop_pend <= rxf_ack;
    if (req.cs && req.wr && req.addr == CODEC_CDATA_ADDR) begin
      if (n_wr == 0) first_wr <= cyc;
      last_wr <= cyc;
      n_wr <= n_wr + 1;
    end
    if (burst && req.cs && req.addr != CODEC_CDATA_ADDR) reg_in_burst <= 1'b1;
  end

  task automatic push(int n, int base);
    for (int i = 0; i < n; i++) fq.push_back(16'(base + i));
    sent += n;
  endtask

  task automatic dsp_access(bit is_rd, logic [1:0] a, logic [DW-1:0] d, output logic [DW-1:0] r);
    @(negedge clk);
    dsp_addr = a; dsp_wdata = d;
    if (is_rd) dsp_rd_tmp = 1'b1; else dsp_wr_tmp = 1'b1;
    while (!dsp_done) @(negedge clk);
    r = dsp_rdata;
    dsp_rd_tmp = 1'b0; dsp_wr_tmp = 1'b0;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] r;
  int unsigned   hold;
  initial begin
    dma_en = 1'b0; dsp_rd_tmp = 1'b0; dsp_wr_tmp = 1'b0; dsp_addr = '0;
    dsp_wdata = '0; avail = 1'b1; ready = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    push(30, 16'h700);
    repeat (20) @(negedge clk);
    check(n_wr == 0, "disabled DMA moves nothing");
    dma_en = 1'b1;
    while (n_wr < 30) @(negedge clk);
    $display("30 words, first to last write %0d clocks", last_wr - first_wr);
    check(last_wr - first_wr == 29 * 3, "burst rate of one word per three clocks");

    // expander not ready
    ready = 1'b0;
    repeat (5) @(negedge clk);
    hold = n_wr;
    push(10, 16'h800);
    repeat (40) @(negedge clk);
    check(n_wr == hold, "expander not ready stops the DMA");
    ready = 1'b1;
    while (n_wr < 40) @(negedge clk);

    // FIFO stalls
    push(20, 16'h900);
    repeat (30) begin @(negedge clk); avail = ($urandom_range(0, 2) != 0); end
    avail = 1'b1;
    while (n_wr < 60) @(negedge clk);

    // DSP register accesses
    dsp_access(1'b1, 2'd1, 16'h0, r);
    check(r == 16'h1001, $sformatf("DSP read of expander register 1 gives %h", r));
    dsp_access(1'b0, 2'd0, 16'h5A5A, r);
    check(u_xpnd.regs[0] == 16'h5A5A, "DSP write of expander register 0");
    push(30, 16'hA00);
    wait (burst);
    repeat (3) @(negedge clk);
    dsp_access(1'b1, 2'd0, 16'h0, r);
    check(r == 16'h5A5A, "DSP read after burst");
    check(!reg_in_burst, "no register access inside a burst");
    while (n_wr < 90) @(negedge clk);
    repeat (10) @(negedge clk);

    check(u_xpnd.got.size() == 90, $sformatf("expander got %0d words", u_xpnd.got.size()));
    for (int i = 0; i < 90 && i < u_xpnd.got.size(); i++) begin
      logic [DW-1:0] e;
      e = i < 30 ? 16'(16'h700 + i) : i < 40 ? 16'(16'h800 + i - 30) :
          i < 60 ? 16'(16'h900 + i - 40) : 16'(16'hA00 + i - 60);
      check(u_xpnd.got[i] == e, $sformatf("word %0d is %h, expected %h", i, u_xpnd.got[i], e));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
