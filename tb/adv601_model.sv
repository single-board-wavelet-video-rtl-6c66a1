// Behavioural model of an ADV601 wavelet codec host port, for testbenches.
//
// Not synthesizable logic: a cycle-based stand-in for the codec chip with
// the port bundle used by the DMA controller.  Host registers 0, 1 and 3 are
// plain 16-bit registers reached with a handshake: while cs and rd or wr are
// held, ack rises after ACK_LAT clocks (read data valid with it; a write is
// stored when ack rises).  Register 2 is the compressed-data register:
//   EXPAND=0 (compressor): words queued by the testbench (push_word) are
//     read one per clock strobe (rdata valid in the rd cycle, word removed after
//     the clock edge); hirq=1 while words are queued.
//   EXPAND=1 (expander): each clock with cs and wr on register 2 stores
//     wdata; hirq follows the testbench's 'ready' input.
module adv601_model
  import wvc_pkg::*;
#(
  parameter int unsigned EXPAND  = 0,
  parameter int unsigned ACK_LAT = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ready,
  input  codec_req_t req,
  output codec_rsp_t rsp
);
  logic [DW-1:0] q[$];       // compressed words waiting to be read
  logic [DW-1:0] got[$];     // compressed words written (expander)
  logic [DW-1:0] regs[4];
  int unsigned   acc_cnt;
  int unsigned   reg_reads, reg_writes;
  logic          reg_acc;
  logic          pop_pend = 1'b0;

  // The word read at a clock edge leaves the queue half a clock later, so
  // the design under test samples it free of races.
  always @(negedge clk) if (pop_pend) void'(q.pop_front());

  function automatic void push_word(logic [DW-1:0] w);
    q.push_back(w);
  endfunction

  assign reg_acc = req.cs && (req.rd || req.wr) && (req.addr != CODEC_CDATA_ADDR);

  always_comb begin
    rsp.ack   = reg_acc && (acc_cnt >= ACK_LAT);
    rsp.hirq  = EXPAND != 0 ? ready : (q.size() != 0);
    rsp.rdata = 16'hDEAD;
    if (req.cs && req.rd) begin
      if (req.addr == CODEC_CDATA_ADDR) rsp.rdata = (q.size() != 0) ? q[0] : 16'hBAD0;
      else                              rsp.rdata = regs[req.addr];
    end
  end

  initial begin
    acc_cnt = 0; reg_reads = 0; reg_writes = 0;
    foreach (regs[i]) regs[i] = 16'h1000 + 16'(i);
  end

  always @(posedge clk) begin
    if (rst) begin
      acc_cnt <= 0;
    end else begin
      if (reg_acc) acc_cnt <= acc_cnt + 1;
      else         acc_cnt <= 0;
      if (reg_acc && acc_cnt == ACK_LAT) begin
        if (req.wr) begin regs[req.addr] <= req.wdata; reg_writes <= reg_writes + 1; end
        else reg_reads <= reg_reads + 1;
      end
      pop_pend <= req.cs && req.rd && req.addr == CODEC_CDATA_ADDR && EXPAND == 0 && q.size() != 0;
      if (req.cs && req.wr && req.addr == CODEC_CDATA_ADDR && EXPAND != 0)
        got.push_back(req.wdata);
    end
  end
endmodule
