// host_bfm: model of a PC Card host socket. One access sets REG#, the address,
// write data and the card enables, then asserts OE# or WE#, waits while the
// card holds WAIT# low, samples the read data, and releases the strobe and the
// enables, one falling clock edge per step. The host signals are treated as
// synchronous to the card's clock.
module host_bfm (
  input  logic        clk,
  output logic [15:0] addr,
  output logic        ce1_n,
  output logic        ce2_n,
  output logic        oe_n,
  output logic        we_n,
  output logic        reg_n,
  output logic [15:0] din,
  input  logic [15:0] dout,
  input  logic        wait_n
);
  initial begin addr = 0; din = 0; ce1_n = 1; ce2_n = 1; oe_n = 1; we_n = 1; reg_n = 1; end

  // ce: bit 0 = CE1#, bit 1 = CE2# asserted
  task automatic access(input logic rg_n, input logic wr, input logic [1:0] ce, input logic [15:0] a,
                        input logic [15:0] d, output logic [15:0] q);
    @(negedge clk);
    reg_n = rg_n; addr = a; din = d; {ce2_n, ce1_n} = ~ce;
    @(negedge clk);
    if (wr) we_n = 0; else oe_n = 0;
    @(negedge clk);
    while (!wait_n) @(negedge clk);
    @(negedge clk);
    q = dout;
    we_n = 1; oe_n = 1;
    @(negedge clk);
    ce1_n = 1; ce2_n = 1; reg_n = 1;
  endtask
endmodule
