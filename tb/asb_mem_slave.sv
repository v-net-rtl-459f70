// asb_mem_slave: behavioural ASB slave memory for testbenches. It answers
// every transfer after a random number of wait states (0..MAXWAIT), honours
// byte lanes on writes and returns whole words on reads. The array is
// reachable hierarchically (mem) so a testbench can preload and inspect it.
module asb_mem_slave
  import vnet_pkg::*;
#(
  parameter int unsigned WORDS   = 1024,
  parameter int unsigned MAXWAIT = 2
) (
  input  logic     clk,
  input  logic     sel,
  input  asb_req_t req,
  output asb_rsp_t rsp
);
  logic [31:0] mem [WORDS];
  int          waits = 0;
  int          left  = -1;
  int          nwaited = 0;
  logic [$clog2(WORDS)-1:0] widx;

  assign widx = req.addr[$clog2(WORDS)+1:2];

  always_comb begin
    rsp.berror = 1'b0;
    rsp.rdata  = mem[widx];
    rsp.bwait  = sel && req.trans && (left != 0);
  end

  always_ff @(posedge clk) begin
    if (sel && req.trans) begin
      if (left < 0) begin
        left <= int'($urandom % (MAXWAIT + 1));
        if (MAXWAIT == 0 || ($urandom % (MAXWAIT + 1)) == 0) left <= 0;
      end
      if (left > 0) begin left <= left - 1; nwaited <= nwaited + 1; end
      if (left == 0) begin
        left <= -1;
        if (req.write) mem[widx] <= merge_lanes(mem[widx], req.wdata, lane_mask(req.addr[1:0], req.size));
      end
    end
  end
endmodule
