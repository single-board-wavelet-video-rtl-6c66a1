// Testbench of the compression-path DMA controller (tx_dma_fsm).
//
// A compressor model supplies numbered words; the testbench plays the TXF
// FIFO, accepting offered words except when it is told to stall.  Checked:
// every word reaches the FIFO once and in order; a long burst moves one word
// per three clocks (144 Mbit/s at 27 MHz); a one-word burst keeps the burst
// states busy for five clocks (six states with TXS0); a full FIFO starts no
// burst; FIFO stalls hold the word; DSP reads and writes of compressor
// registers return and store the right values and wait for a running burst.
module tb_tx_dma_fsm;
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
  logic          txf_wr, txf_ack, dma_en, dsp_rd_tmp, dsp_wr_tmp, dsp_done, burst;
  logic [DW-1:0] txf_vd, dsp_wdata, dsp_rdata;
  logic [1:0]    dsp_addr;
  fifo_flags_t   flags;
  logic          accept;

  tx_dma_fsm dut (
    .clk, .rst, .dma_en, .codec_req(req), .codec_rsp(rsp),
    .txf_wr, .txf_vd, .txf_ack, .txf_flags(flags),
    .dsp_rd_tmp, .dsp_wr_tmp, .dsp_addr, .dsp_wdata, .dsp_rdata,
    .dsp_done, .burst_active(burst)
  );
  adv601_model #(.EXPAND(0)) u_cmpr (.clk, .rst, .ready(1'b0), .req, .rsp);

  assign txf_ack = txf_wr && accept;

  // FIFO side scoreboard
  logic [DW-1:0] exp_q[$];
  int unsigned   got = 0, cyc = 0, last_acc = 0, first_acc = 0, burst_cyc = 0;
  logic          rd_during_burst = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && txf_ack) begin
      check(exp_q.size() != 0 && txf_vd == exp_q[0], $sformatf("word %0d value %h", got, txf_vd));
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      got <= got + 1;
      last_acc <= cyc;
      if (got == 0) first_acc <= cyc;
    end
    if (burst) burst_cyc <= burst_cyc + 1;
    if (burst && req.cs && req.addr != CODEC_CDATA_ADDR) rd_during_burst <= 1'b1;
  end

  task automatic push(int n, int base);
    for (int i = 0; i < n; i++) begin
      u_cmpr.push_word(16'(base + i));
      exp_q.push_back(16'(base + i));
    end
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

  int unsigned t0, t1, bcycles;
  logic [DW-1:0] r;
  initial begin
    dma_en = 1'b0; dsp_rd_tmp = 1'b0; dsp_wr_tmp = 1'b0; dsp_addr = '0;
    dsp_wdata = '0; flags = '0; accept = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    dma_en = 1'b1;

    // long burst: rate
    push(40, 16'h100);
    while (got < 40) @(negedge clk);
    t0 = first_acc;
    t1 = last_acc;
    $display("40 words, first to last accept %0d clocks", t1 - t0);
    check((t1 - t0) == 39 * 3, "burst rate of one word per three clocks");
    repeat (10) @(negedge clk);
    check(!burst, "burst ends when the compressor is empty");

    // single word: burst states last five clocks
    push(1, 16'h200);
    t0 = burst_cyc;
    while (got < 41) @(negedge clk);
    repeat (6) @(negedge clk);
    bcycles = burst_cyc - t0;
    check(bcycles == 5, $sformatf("single-word burst TXS1-TXS5 lasts %0d clocks", bcycles));

    // FIFO full: no burst
    flags.full = 1'b1;
    push(5, 16'h300);
    repeat (30) @(negedge clk);
    check(!burst && got == 41, "full TXF blocks the DMA");
    flags.full = 1'b0;
    while (got < 46) @(negedge clk);
    check(1, "transfer resumes after full clears");

    // stalls in TXS4
    push(20, 16'h400);
    fork
      begin
        repeat (20) begin
          @(negedge clk); accept = ($urandom_range(0, 2) != 0);
        end
        accept = 1'b1;
      end
    join
    while (got < 66) @(negedge clk);

    // DSP register read and write when idle
    dsp_access(1'b1, 2'd1, 16'h0, r);
    check(r == 16'h1001, $sformatf("DSP read of register 1 gives %h", r));
    dsp_access(1'b0, 2'd3, 16'hA5C3, r);
    check(u_cmpr.regs[3] == 16'hA5C3, "DSP write of register 3");
    dsp_access(1'b1, 2'd3, 16'h0, r);
    check(r == 16'hA5C3, "read back register 3");

    // DSP read requested during a burst waits for its end
    push(30, 16'h500);
    wait (burst);
    repeat (4) @(negedge clk);
    dsp_access(1'b1, 2'd0, 16'h0, r);
    check(r == 16'h1000, "DSP read after a burst");
    check(!rd_during_burst, "no register access inside a burst");
    while (got < 96) @(negedge clk);
    check(exp_q.size() == 0, "all words delivered");
    check(u_cmpr.reg_reads == 3 && u_cmpr.reg_writes == 1, "one codec access per DSP access");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
