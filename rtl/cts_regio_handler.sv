// cts_regio_handler: address multiplexer of the CTS slow-control bus.
//
// The CTS address space is split in two: 0xa000-0xa0ff belongs to the
// network logic (fixed registers), 0xa100-0xa1ff to the trigger logic
// (enumerable register blocks). The handler forwards the read and write
// strobes only to the port whose range holds the address and merges the two
// answers back into one. Any other address is answered by the handler
// itself with 'unknown'. The split of the address space follows the design;
// the bus handshake is this implementation's (see cts_pkg).
//
// Timing: purely combinational on the request path; the own 'unknown'
// answer is registered so that every answer arrives one cycle after the
// strobe.
module cts_regio_handler
  import cts_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  regio_req_t req,
  output regio_rsp_t rsp,
  output regio_req_t net_req,
  input  regio_rsp_t net_rsp,
  output regio_req_t trg_req,
  input  regio_rsp_t trg_rsp
);

  logic sel_net, sel_trg;
  logic miss_q;

  assign sel_net = (req.addr[15:8] == ADDR_NET_BASE[15:8]);
  assign sel_trg = (req.addr[15:8] == ADDR_TRG_BASE[15:8]);

  always_comb begin
    net_req       = req;
    net_req.read  = req.read  && sel_net;
    net_req.write = req.write && sel_net;
    trg_req       = req;
    trg_req.read  = req.read  && sel_trg;
    trg_req.write = req.write && sel_trg;
  end

  always_ff @(posedge clk) begin
    if (rst) miss_q <= 1'b0;
    else     miss_q <= (req.read || req.write) && !sel_net && !sel_trg;
  end

  always_comb begin
    rsp.rdata   = net_rsp.rdata | trg_rsp.rdata;
    rsp.ack     = net_rsp.ack | trg_rsp.ack;
    rsp.unknown = net_rsp.unknown | trg_rsp.unknown | miss_q;
  end

endmodule
