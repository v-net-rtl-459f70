// asb_decoder: ASB address decoder. From the bus address it raises one
// independent select line per slave and returns the selected slave's response
// to the masters:
//   dsel[0] external memory interface   0x0000_0000 - 0x0FFF_FFFF
//   dsel[1] APB bridge                  0x8000_0000 - 0x8FFF_FFFF
//   dsel[2] PAI registers               0x9000_0000 - 0x9FFF_FFFF
// A transfer to any other address is answered by the decoder itself with an
// error response and no wait states. Selects are combinational and valid in
// every cycle of a transfer. The map is this design's own.
module asb_decoder
  import vnet_pkg::*;
(
  input  asb_req_t             bus_req,
  output logic [NSLAVES-1:0]   dsel,
  input  asb_rsp_t             srsp [NSLAVES],
  output asb_rsp_t             bus_rsp
);
  always_comb begin
    dsel = '0;
    unique case (bus_req.addr[31:28])
      REGION_EMI:    dsel[S_EMI]    = 1'b1;
      REGION_BRIDGE: dsel[S_BRIDGE] = 1'b1;
      REGION_PAI:    dsel[S_PAI]    = 1'b1;
      default: ;
    endcase
  end

  always_comb begin
    bus_rsp        = '0;
    bus_rsp.berror = bus_req.trans;       // default slave: error
    for (int i = 0; i < NSLAVES; i++)
      if (dsel[i]) bus_rsp = srsp[i];
  end
endmodule
