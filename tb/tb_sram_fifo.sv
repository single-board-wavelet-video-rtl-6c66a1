// Testbench of the SRAM-backed transmission FIFO (sram_fifo), at 16 words.
//
// Drives random writes and reads against a queue model and an SRAM model.
// Checked: data order, empty/half/full flags against the model's count,
// writes refused exactly when the SRAM holds 16 words and the write register
// is occupied, streaming at one write per clock into an empty FIFO, and that
// reset empties it.
module tb_sram_fifo;
  import wvc_pkg::*;
  localparam int unsigned AW = 4;
  localparam int unsigned DEPTH = 1 << AW;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic          wr, wr_ack, rd, rd_ack;
  logic [DW-1:0] wdata, rdata;
  fifo_flags_t   flags;
  logic [AW-1:0] a;
  logic          cs, oe, we, ub, lb, dq_oe;
  logic [DW-1:0] dq_out, dq_in;

  sram_fifo #(.AW(AW)) dut (
    .clk, .rst, .wr, .wdata, .wr_ack, .rd, .rdata, .rd_ack, .flags,
    .sram_addr(a), .sram_cs(cs), .sram_oe(oe), .sram_we(we), .sram_ub(ub),
    .sram_lb(lb), .sram_dq_out(dq_out), .sram_dq_oe(dq_oe), .sram_dq_in(dq_in)
  );
  sram_model #(.AW(AW)) u_mem (
    .clk, .addr(a), .cs, .oe, .we, .ub, .lb, .dq_out, .dq_oe, .dq_in
  );

  logic [DW-1:0] model[$];
  int unsigned   n_in = 0, n_out = 0, n_full = 0, n_refused = 0;
  logic [DW-1:0] next_w = 16'h0;

  // scoreboard at every clock edge
  always @(posedge clk) begin
    if (!rst) begin
      if (rd_ack) begin
        check(model.size() != 0 && rdata == model[0], $sformatf("read %h", rdata));
        if (model.size() != 0) void'(model.pop_front());
        n_out++;
      end
      if (wr_ack) begin
        model.push_back(wdata);
        n_in++;
      end
      if (flags.full) n_full++;
      if (wr && !wr_ack && flags.full) n_refused++;
    end
  end

  // flag checks just before each edge, against the words not yet read
  always @(negedge clk) if (!rst) begin
    check(flags.empty == (model.size() == 0), $sformatf("empty flag, %0d held", model.size()));
    check(flags.half == (model.size() >= DEPTH / 2), $sformatf("half flag, %0d held", model.size()));
    check(!flags.full || model.size() >= DEPTH, "full only when 16 words in SRAM");
    check(model.size() <= DEPTH + 2, "never more than 16 + 2 words");
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned t0;
  initial begin
    wr = 0; rd = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // fill to full with writes every clock
    wr = 1;
    t0 = 0;
    repeat (40) begin
      @(negedge clk);
      if (n_in != t0) begin wdata = wdata + 1; t0 = n_in; end
    end
    wr = 0;
    check(n_in == DEPTH + 2, $sformatf("fills to %0d words (16 in SRAM + 2 registers)", n_in));
    check(flags.full && n_refused > 0, "full flag and refused writes");
    // drain completely
    rd = 1;
    repeat (60) @(negedge clk);
    rd = 0;
    check(n_out == DEPTH + 2 && flags.empty, "drains to empty");
    // random traffic
    repeat (3000) begin
      @(negedge clk);
      if (wr && n_in != t0) begin wdata = wdata + 1; end
      t0 = n_in;
      wr = ($urandom_range(0, 3) != 0);
      rd = ($urandom_range(0, 2) != 0);
    end
    wr = 0;
    rd = 1;
    repeat (80) @(negedge clk);
    check(model.size() == 0 && flags.empty, "random traffic drains");
    check(n_in > 1000, $sformatf("random traffic moved %0d words", n_in));
    // reset empties
    rd = 0; wr = 1;
    repeat (10) @(negedge clk);
    wr = 0;
    rst = 1; @(negedge clk); rst = 0;
    model.delete();
    @(negedge clk);
    check(flags.empty, "reset empties the FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
