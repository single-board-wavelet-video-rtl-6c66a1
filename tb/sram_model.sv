// Behavioural model of an asynchronous 16-bit SRAM, for testbenches.
//
// Not synthesizable logic: stands in for a 2**AW x 16 memory chip.  Reads
// are combinational (dq_in = mem[addr] while cs and oe, no write); a write
// (cs, we, dq_oe) is stored at the clock edge, both bytes when ub and lb.
// The contents start cleared.
module sram_model
  import wvc_pkg::*;
#(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          cs, oe, we, ub, lb,
  input  logic [DW-1:0] dq_out,
  input  logic          dq_oe,
  output logic [DW-1:0] dq_in
);
  logic [DW-1:0] mem [2**AW];
  int unsigned   writes, reads;

  initial begin
    writes = 0; reads = 0;
    foreach (mem[i]) mem[i] = '0;
  end

  assign dq_in = (cs && oe && !we) ? mem[addr] : 16'h0000;

  always @(posedge clk) begin
    if (cs && we && dq_oe) begin
      if (ub) mem[addr][15:8] <= dq_out[15:8];
      if (lb) mem[addr][7:0]  <= dq_out[7:0];
      writes <= writes + 1;
    end
    if (cs && oe && !we) reads <= reads + 1;
  end
endmodule
