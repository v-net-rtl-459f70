// tb_asb_apb_bridge: ASB reads and writes through the bridge to two APB
// register banks modelled in the testbench. Checks the data, the select line
// used, that pclk_en comes every third clock, that APB signals only change at
// pclk_en edges and run setup then enable, and that each transfer takes
// 2*DIV+1 to 3*DIV clocks.
module tb_asb_apb_bridge;
  import vnet_pkg::*;
  localparam int DIV = 3;
  logic clk = 0, rst_n = 0, sel = 0;
  asb_req_t req = '0;
  asb_rsp_t rsp;
  logic pclk_en;
  apb_req_t preq, preq_q;
  logic [1:0] psel, psel_q;
  logic [31:0] prdata [2];
  logic [31:0] regs [2][16];
  int checks = 0, failures = 0, since_en = 0, cyc = 0;

  asb_apb_bridge #(.DIV(DIV), .NPERIPH(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar p = 0; p < 2; p++) begin : g_p
    assign prdata[p] = regs[p][preq.paddr[5:2]];
    always @(posedge clk)
      if (psel[p] && preq.penable && preq.pwrite && pclk_en) regs[p][preq.paddr[5:2]] <= preq.pwdata;
  end

  // APB timing rules
  always @(posedge clk) if (rst_n) begin
    cyc++;
    since_en = pclk_en ? 0 : since_en + 1;
    if (since_en >= DIV) begin failures++; $display("pclk_en gap"); end
    psel_q <= psel; preq_q <= preq;
  end
  always @(negedge clk) if (rst_n && cyc > 2) begin
    // signals may only have changed at an edge where pclk_en was high
    if ((psel != psel_q || preq != preq_q) && !last_en) begin failures++; $display("APB changed off pclk_en"); end
  end
  logic last_en = 0;
  always @(posedge clk) last_en <= pclk_en;
  always @(posedge clk) if (rst_n && preq.penable && psel == 0) begin failures++; $display("penable without psel"); end

  task automatic xfer(input logic wr, input logic [15:0] a, input logic [31:0] wd, output logic [31:0] rd, output int ncyc);
    @(negedge clk);
    sel = 1; req = '{trans: 1'b1, addr: 32'h8000_0000 | 32'(a), write: wr, size: SZ_WORD, wdata: wd};
    ncyc = 1;
    #1;
    while (rsp.bwait) begin @(negedge clk); ncyc++; #1; end
    rd = rsp.rdata;
    @(negedge clk); sel = 0; req = '0;
  endtask

  initial begin
    logic [31:0] r;
    logic [31:0] model [2][16];
    int n;
    for (int p = 0; p < 2; p++) for (int i = 0; i < 16; i++) begin regs[p][i] = 0; model[p][i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int p = $urandom % 2;
      automatic int i = $urandom % 16;
      automatic logic w = $urandom % 2;
      automatic logic [31:0] d = $urandom;
      repeat ($urandom % 3) @(negedge clk);
      xfer(w, 16'(p * 16'h1000 + i * 4), d, r, n);
      checks++;
      if (n < 2 * DIV + 1 || n > 3 * DIV) begin failures++; $display("transfer took %0d clocks", n); end
      if (w) model[p][i] = d;
      else begin
        checks++;
        if (r !== model[p][i]) begin failures++; $display("read p%0d r%0d %h exp %h", p, i, r, model[p][i]); end
      end
    end
    for (int p = 0; p < 2; p++) for (int i = 0; i < 16; i++) begin
      checks++;
      if (regs[p][i] !== model[p][i]) begin failures++; $display("write p%0d r%0d lost", p, i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
