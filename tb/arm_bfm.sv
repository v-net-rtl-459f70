// arm_bfm: bus-functional model of the processor's master port, used where a
// testbench plays firmware. A transfer raises breq, waits for the grant, drives
// one request and holds it until the response comes back with bwait low, then
// releases the bus. All signals change at the falling clock edge.
module arm_bfm
  import vnet_pkg::*;
(
  input  logic     clk,
  output logic     breq,
  input  logic     gnt,
  output asb_req_t req,
  input  asb_rsp_t rsp
);
  initial begin breq = 0; req = '0; end

  task automatic xfer(input logic wr, input logic [31:0] a, input bsize_e sz, input logic [31:0] wd,
                      output logic [31:0] rd, output logic err);
    @(negedge clk); breq = 1;
    while (!gnt) @(negedge clk);
    req = '{trans: 1'b1, addr: a, write: wr, size: sz, wdata: wd};
    #1;
    while (rsp.bwait) begin @(negedge clk); #1; end
    rd = rsp.rdata; err = rsp.berror;
    @(negedge clk); req = '0; breq = 0;
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] r; logic e;
    xfer(1, a, SZ_WORD, d, r, e);
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    logic e;
    xfer(0, a, SZ_WORD, 0, d, e);
  endtask
endmodule
