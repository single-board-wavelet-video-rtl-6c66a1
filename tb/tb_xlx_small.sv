// Testbench of the DSP address decoder and video control register
// (xlx_small).  Checked: XLX_CS for every address of the IJS page in I/O
// space and for none outside it or in memory space; reset values of the
// buffer enables; writes to the video register set them and reads return
// them; a write elsewhere changes nothing.
module tb_xlx_small;
  import wvc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [13:0]   addr;
  logic          ioms, rd, wr, xlx_cs, rsel, vin_oe, vlb_oe;
  logic [DW-1:0] wdata, rdata;

  xlx_small dut (
    .clk, .rst, .dsp_addr(addr), .dsp_ioms(ioms), .dsp_rd(rd), .dsp_wr(wr),
    .dsp_wdata(wdata), .xlx_cs, .rdata, .rsel, .vin_oe, .vlb_oe
  );

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(logic [13:0] a, logic [DW-1:0] d);
    @(negedge clk); addr = a; ioms = 1; wr = 1; wdata = d;
    @(negedge clk); @(negedge clk); wr = 0; ioms = 0;
  endtask

  int bad;
  initial begin
    addr = 0; ioms = 0; rd = 0; wr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(vin_oe && !vlb_oe, "reset: decoder drives, no loop-back");
    bad = 0;
    for (int a = 0; a < 16384; a += 7) begin
      addr = 14'(a); ioms = 1; #1;
      if (xlx_cs != (a < 256)) bad++;
      ioms = 0; #1;
      if (xlx_cs) bad++;
    end
    check(bad == 0, $sformatf("IJS chip select decode (%0d errors)", bad));
    addr = 14'h00FF; ioms = 1; #1; check(xlx_cs, "last IJS address");
    addr = 14'h0100; #1; check(!xlx_cs, "video register is outside the IJS page");
    ioms = 0;
    write(14'h0100, 16'h0002);
    check(!vin_oe && vlb_oe, "write sets VLB_OE, clears VIN_OE");
    @(negedge clk); addr = 14'h0100; ioms = 1; rd = 1; #1;
    check(rsel && rdata == 16'h0002, "read back video register");
    @(negedge clk); rd = 0; ioms = 0; #1;
    check(!rsel, "no read select without a read");
    write(14'h0101, 16'h0001);
    check(!vin_oe && vlb_oe, "write to another address ignored");
    write(14'h0100, 16'h0001);
    check(vin_oe && !vlb_oe, "write restores VIN_OE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
