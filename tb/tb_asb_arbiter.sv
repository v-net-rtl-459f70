// tb_asb_arbiter: three masters raise random requests and, once granted,
// run transfers against a slave with random wait states. The testbench keeps
// its own model of the grant (priority 0 > 1 > 2, parked on 2, frozen while a
// transfer waits) and checks the grant, that the bus carries the granted
// master's request, that an ungranted master never reaches the bus, and that
// each master is served.
module tb_asb_arbiter;
  import vnet_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] areq = 0, agnt, exp_gnt;
  asb_req_t mreq [3];
  asb_req_t bus_req;
  logic bwait = 0;
  int checks = 0, failures = 0;
  int served [3] = '{0, 0, 0};
  int nhold = 0;

  asb_arbiter #(.NM(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // masters: master i puts its number in the address and drives trans when granted
  always_comb
    for (int i = 0; i < 3; i++) begin
      mreq[i] = '0;
      mreq[i].trans = areq[i] && agnt[i];
      mreq[i].addr  = 32'(i);
      mreq[i].wdata = 32'hA0 + 32'(i);
    end

  function automatic logic [2:0] pick(input logic [2:0] r);
    if (r[0]) return 3'b001;
    if (r[1]) return 3'b010;
    return 3'b100;
  endfunction

  int wleft = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      exp_gnt <= 3'b100;
    end else begin
      checks++;
      if (agnt !== exp_gnt) begin failures++; $display("grant %b exp %b", agnt, exp_gnt); end
      if (bus_req.trans) begin
        checks++;
        if (!agnt[bus_req.addr[1:0]] || bus_req.wdata != 32'hA0 + bus_req.addr) begin
          failures++; $display("bus carries master %0d without grant", bus_req.addr);
        end
        if (!bwait) served[bus_req.addr[1:0]]++;
        else nhold++;
      end
      if (!(bus_req.trans && bwait)) exp_gnt <= pick(areq);
      // a master keeps its request until its transfer ends
      for (int i = 0; i < 3; i++)
        if (!(areq[i] && agnt[i] && bwait))
          areq[i] <= ($urandom % 3 == 0);
      // slave: random waits
      if (bus_req.trans) begin
        if (bwait) begin
          if (wleft == 0) bwait <= 0; else wleft <= wleft - 1;
        end else begin
          wleft <= $urandom % 3;
          bwait <= ($urandom % 2 == 0);
        end
      end else bwait <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5000) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (served[i] == 0) begin failures++; $display("master %0d never served", i); end
    end
    checks++; if (nhold == 0) begin failures++; $display("no wait states seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
