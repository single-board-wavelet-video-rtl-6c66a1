// Testbench of the video bus buffers (video_bus_switch).  Random video words
// on the three sources; for every combination of VIN_OE and VLB_OE the
// compressor and encoder buses must show, one clock later, the source the
// enables select.
module tb_video_bus_switch;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       vin_oe, vlb_oe;
  logic [9:0] dec, pc, xp, cm, enc;
  logic [9:0] exp_cm, exp_enc;

  video_bus_switch dut (
    .clk, .rst, .vin_oe, .vlb_oe, .dec_video(dec), .pc_in(pc),
    .xpnd_video(xp), .cmpr_video(cm), .enc_video(enc)
  );

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin_oe = 1; vlb_oe = 0; dec = 0; pc = 0; xp = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (400) begin
      @(negedge clk);
      vin_oe = 1'($urandom); vlb_oe = 1'($urandom);
      dec = 10'($urandom); pc = 10'($urandom); xp = 10'($urandom);
      exp_cm  = vin_oe ? dec : pc;
      exp_enc = vlb_oe ? exp_cm : xp;
      @(negedge clk);
      check(cm == exp_cm, $sformatf("compressor bus vin_oe=%0b", vin_oe));
      check(enc == exp_enc, $sformatf("encoder bus vlb_oe=%0b", vlb_oe));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
