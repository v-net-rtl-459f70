// tb_asb_decoder: random addresses; checks that exactly the right slave is
// selected for each region, that the selected slave's response is passed back,
// and that an unmapped address gets an error without wait states.
module tb_asb_decoder;
  import vnet_pkg::*;
  asb_req_t bus_req = '0;
  logic [2:0] dsel;
  asb_rsp_t srsp [3];
  asb_rsp_t bus_rsp;
  int checks = 0, failures = 0, nerr = 0;

  asb_decoder dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic logic [31:0] a = $urandom;
      automatic logic [2:0] exp;
      if (t % 4 == 0) a[31:28] = 4'h0;
      if (t % 4 == 1) a[31:28] = 4'h8;
      if (t % 4 == 2) a[31:28] = 4'h9;
      bus_req.trans = 1'b1;
      bus_req.addr = a;
      for (int i = 0; i < 3; i++) srsp[i] = '{bwait: 1'($urandom), berror: 1'b0, rdata: 32'h100 * 32'(i + 1) + 32'(t)};
      #1;
      exp = (a[31:28] == 4'h0) ? 3'b001 : (a[31:28] == 4'h8) ? 3'b010 : (a[31:28] == 4'h9) ? 3'b100 : 3'b000;
      checks++;
      if (dsel !== exp) begin failures++; $display("addr %h sel %b exp %b", a, dsel, exp); end
      checks++;
      if (exp == 0) begin
        nerr++;
        if (!bus_rsp.berror || bus_rsp.bwait) begin failures++; $display("unmapped %h: no error", a); end
      end else begin
        automatic int k = (exp == 3'b001) ? 0 : (exp == 3'b010) ? 1 : 2;
        if (bus_rsp !== srsp[k]) begin failures++; $display("addr %h: wrong response", a); end
      end
    end
    checks++; if (nerr == 0) begin failures++; $display("no unmapped address tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
