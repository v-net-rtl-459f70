// asb_arbiter: ASB bus arbiter with a fixed priority and one request/grant pair
// per master. Request line 0 is the PAI (highest priority), 1 the PCMCIA
// controller and 2 the ARM core (lowest), as the document orders them.
// The grant is a register: it is re-evaluated at every clock edge except while
// the bus holds a transfer that is still waiting (trans with bwait), so a
// master keeps the bus for the whole of its transfer. With no request the bus
// is parked on the lowest-priority master (the processor). The arbiter also
// drives the bus: the granted master's request is passed on, and a master
// without grant cannot start a transfer.
// Re-arbitration between transfers and parking are this design's choices.
module asb_arbiter
  import vnet_pkg::*;
#(
  parameter int unsigned NM = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NM-1:0] areq,
  output logic [NM-1:0] agnt,
  input  asb_req_t      mreq [NM],
  input  logic          bwait,
  output asb_req_t      bus_req
);
  logic [NM-1:0] next_gnt;

  always_comb begin
    next_gnt = '0;
    next_gnt[NM-1] = 1'b1;                 // park on the lowest priority master
    for (int i = NM-1; i >= 0; i--)
      if (areq[i]) next_gnt = NM'(1) << i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         agnt <= NM'(1) << (NM-1);
    else if (!(bus_req.trans && bwait)) agnt <= next_gnt;
  end

  always_comb begin
    bus_req = '0;
    for (int i = 0; i < NM; i++)
      if (agnt[i]) bus_req = mreq[i];
    if (!(|(agnt & areq))) bus_req.trans = 1'b0;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(agnt));
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (bus_req.trans && bwait) |=> $stable(agnt));
endmodule
