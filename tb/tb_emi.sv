// tb_emi: random byte, half-word and word reads and writes to both banks
// through the external memory interface into a memory model. Checks read data
// against a reference array updated lane by lane, the bank's chip select and
// strobe during the access, that no chip is selected when a request arrives or
// in its response clock, and that a transfer lasts FLASH_WS+3 or SRAM_WS+3
// clocks.
module tb_emi;
  import vnet_pkg::*;
  localparam int FWS = 3, SWS = 1, WORDS = 256;
  logic clk = 0, rst_n = 0, sel = 0;
  asb_req_t req = '0;
  asb_rsp_t rsp;
  logic [1:0] mem_cs_n;
  logic mem_oe_n, mem_we_n, mem_data_oe;
  logic [3:0] mem_be_n;
  logic [21:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [31:0] ref_mem [2][WORDS];
  int checks = 0, failures = 0, nsize [3] = '{0, 0, 0};

  emi #(.FLASH_WS(FWS), .SRAM_WS(SWS), .MEM_AW(22)) dut (.*);
  ext_mem_model #(.WORDS(WORDS)) ext (.clk, .cs_n(mem_cs_n), .oe_n(mem_oe_n), .we_n(mem_we_n),
    .be_n(mem_be_n), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) for (int i = 0; i < WORDS; i++) begin
      automatic logic [31:0] v = $urandom;
      ref_mem[b][i] = v;
      if (b == 0) ext.flash[i] = v; else ext.sram[i] = v;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      automatic int bank = $urandom % 2;
      automatic int w = $urandom % WORDS;
      automatic bsize_e sz = bsize_e'($urandom % 3);
      automatic logic [1:0] off = (sz == SZ_WORD) ? 2'd0 : (sz == SZ_HALF) ? {1'($urandom), 1'b0} : 2'($urandom);
      automatic logic wr = $urandom % 2;
      automatic logic [31:0] d = $urandom;
      automatic int n = 1;
      automatic logic [3:0] m = (sz == SZ_WORD) ? 4'hF : (sz == SZ_HALF) ? (off[1] ? 4'hC : 4'h3) : (4'h1 << off);
      nsize[sz]++;
      @(negedge clk);
      sel = 1;
      req = '{trans: 1'b1, addr: (bank ? 32'h0100_0000 : 32'h0) | 32'(w * 4 + off), write: wr, size: sz, wdata: d};
      #1;
      checks++;
      if (mem_cs_n != 2'b11) begin failures++; $display("chip selected before the access: %b", mem_cs_n); end
      while (rsp.bwait) begin
        @(negedge clk); n++; #1;
        if (rsp.bwait) begin
          checks++;
          if (mem_cs_n != (bank ? 2'b01 : 2'b10) || mem_we_n != !wr || mem_oe_n != wr || mem_be_n != ~m) begin
            failures++; $display("access clock %0d: cs %b we %b oe %b be %b", n, mem_cs_n, mem_we_n, mem_oe_n, mem_be_n);
          end
        end
      end
      checks++;
      if (mem_cs_n != 2'b11 || !mem_we_n || !mem_oe_n) begin failures++; $display("strobes still active in the response clock"); end
      if (!wr) begin
        checks++;
        for (int i = 0; i < 4; i++)
          if (m[i] && rsp.rdata[8*i +: 8] !== ref_mem[bank][w][8*i +: 8]) begin
            failures++; $display("read bank %0d word %0d lane %0d", bank, w, i);
          end
      end else begin
        for (int i = 0; i < 4; i++) if (m[i]) ref_mem[bank][w][8*i +: 8] = d[8*i +: 8];
      end
      checks++;
      if (n != (bank ? SWS : FWS) + 3) begin failures++; $display("access took %0d clocks", n); end
      @(negedge clk); sel = 0; req = '0;
    end
    for (int b = 0; b < 2; b++) for (int i = 0; i < WORDS; i++) begin
      checks++;
      if ((b ? ext.sram[i] : ext.flash[i]) !== ref_mem[b][i]) begin failures++; $display("bank %0d word %0d differs", b, i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
