// tb_pcmcia_ctrl: a host model walks the card information structure in
// attribute memory, checks that common memory is closed before configuration,
// writes the configuration option register, and then does 16-bit and byte
// reads and writes of common memory, which must reach the ASB memory model at
// WIN_BASE + address with the right lanes, with WAIT# low while the bus
// transfer runs. A soft reset through the COR must close the window again.
module tb_pcmcia_ctrl;
  import vnet_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] host_addr = 0, host_din = 0, host_dout;
  logic host_ce1_n = 1, host_ce2_n = 1, host_oe_n = 1, host_we_n = 1, host_reg_n = 1;
  logic host_dout_en, host_wait_n, configured, breq, gnt = 0;
  asb_req_t req;
  asb_rsp_t rsp;
  int checks = 0, failures = 0, nwait = 0, nbus = 0;

  pcmcia_ctrl #(.HA_W(16), .WIN_BASE(32'h0000_0000), .CFG_BASE('h200)) dut (.*);
  asb_mem_slave #(.WORDS(1024), .MAXWAIT(3)) mem (.clk, .sel(1'b1), .req, .rsp);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    gnt <= breq && ($urandom % 2 == 0);
    if (!host_wait_n) nwait++;
    if (req.trans && !rsp.bwait) nbus++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_access(input logic reg_n, input logic wr, input logic [1:0] ce, input logic [15:0] a,
                             input logic [15:0] d, output logic [15:0] q);
    @(negedge clk);
    host_reg_n = reg_n; host_addr = a; host_din = d; {host_ce2_n, host_ce1_n} = ~ce;
    @(negedge clk);
    if (wr) host_we_n = 0; else host_oe_n = 0;
    @(negedge clk);
    while (!host_wait_n) @(negedge clk);
    @(negedge clk);
    q = host_dout;
    host_we_n = 1; host_oe_n = 1;
    @(negedge clk);
    host_ce1_n = 1; host_ce2_n = 1; host_reg_n = 1;
  endtask

  function automatic logic [7:0] mbyte(input int a);
    return mem.mem[a >> 2][8*(a % 4) +: 8];
  endfunction

  initial begin
    logic [15:0] q;
    logic [7:0] code, link;
    int p, ntuples;
    for (int i = 0; i < 1024; i++) mem.mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // walk the CIS: expect DEVICE, VERS_1, CONFIG, END
    p = 0; ntuples = 0;
    forever begin
      host_access(0, 0, 2'b01, 16'(2 * p), 0, q); code = q[7:0];
      if (code == 8'hFF) break;
      host_access(0, 0, 2'b01, 16'(2 * p + 2), 0, q); link = q[7:0];
      checks++;
      case (ntuples)
        0: if (code != 8'h01) begin failures++; $display("tuple 0 %h", code); end
        1: if (code != 8'h15) begin failures++; $display("tuple 1 %h", code); end
        2: begin
          if (code != 8'h1A) begin failures++; $display("tuple 2 %h", code); end
          // configuration registers base 0x0200
          host_access(0, 0, 2'b01, 16'(2 * p + 8), 0, q);
          checks++; if (q[7:0] != 8'h00) begin failures++; $display("config base low %h", q[7:0]); end
          host_access(0, 0, 2'b01, 16'(2 * p + 10), 0, q);
          checks++; if (q[7:0] != 8'h02) begin failures++; $display("config base high %h", q[7:0]); end
        end
        default: begin failures++; $display("extra tuple %h", code); end
      endcase
      ntuples++;
      p = p + 2 + int'(link);
      if (ntuples > 8) break;
    end
    checks++; if (ntuples != 3) begin failures++; $display("%0d tuples", ntuples); end
    // common memory closed before configuration
    nbus = 0;
    host_access(1, 0, 2'b11, 16'h0040, 0, q);
    checks++; if (q != 0 || nbus != 0 || configured) begin failures++; $display("window open before config"); end
    // configure
    host_access(0, 1, 2'b01, 16'h0200, 16'h0001, q);
    host_access(0, 0, 2'b01, 16'h0200, 0, q);
    checks++; if (q[5:0] != 1 || !configured) begin failures++; $display("COR %h", q); end
    // random common memory traffic
    nwait = 0;
    for (int t = 0; t < 200; t++) begin
      automatic logic [15:0] a = 16'($urandom % 4096);
      automatic logic [1:0] ce = 2'(1 + $urandom % 3);
      automatic logic wr = $urandom % 2;
      automatic logic [15:0] d = 16'($urandom);
      automatic logic [15:0] exp;
      if (ce == 2'b11) a[0] = 0;
      if (wr) begin
        host_access(1, 1, ce, a, d, q);
        checks++;
        if (ce == 2'b11 && {mbyte(a + 1), mbyte(a)} != d) begin failures++; $display("word write %h", a); end
        if (ce == 2'b01 && mbyte(a) != d[7:0]) begin failures++; $display("byte write %h", a); end
        if (ce == 2'b10 && mbyte(a | 1) != d[15:8]) begin failures++; $display("odd byte write %h", a); end
      end else begin
        exp = (ce == 2'b11) ? {mbyte(a + 1), mbyte(a)} : (ce == 2'b01) ? {8'h00, mbyte(a)} : {mbyte(a | 1), 8'h00};
        host_access(1, 0, ce, a, 0, q);
        checks++;
        if (q != exp) begin failures++; $display("read %h ce %b: %h exp %h", a, ce, q, exp); end
      end
    end
    checks++; if (nwait == 0) begin failures++; $display("WAIT# never asserted"); end
    // soft reset
    host_access(0, 1, 2'b01, 16'h0200, 16'h0080, q);
    checks++; if (configured) begin failures++; $display("soft reset ignored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
