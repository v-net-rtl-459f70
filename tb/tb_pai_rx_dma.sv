// tb_pai_rx_dma: feeds the receive DMA random frames through a FIFO at
// random rates, with random bus grants and slave wait states, and checks that
// memory holds the frame bytes in order, zero-padded to a word, followed by
// the status word, that nothing beyond is written, and that done comes once.
module tb_pai_rx_dma;
  import vnet_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, gnt = 1, frame_end = 0;
  logic [31:0] addr = 0, status_word = 0;
  logic fifo_empty, fifo_pop, done, err, busy, breq;
  logic [7:0] fifo_dout;
  asb_req_t req;
  asb_rsp_t rsp;
  logic [7:0] frame [$];
  int checks = 0, failures = 0, ndone = 0;

  pai_rx_dma dut (.*);
  asb_mem_slave #(.WORDS(512), .MAXWAIT(3)) mem (.clk, .sel(1'b1), .req, .rsp);
  always #5 clk = ~clk;

  logic       push = 0, ffull;
  logic [7:0] pdata = 0;
  logic [7:0] fcount;
  sync_fifo #(.WIDTH(8), .DEPTH(128)) fifo (
    .clk, .rst_n, .clear(1'b0), .push, .din(pdata), .pop(fifo_pop),
    .dout(fifo_dout), .full(ffull), .empty(fifo_empty), .count(fcount)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (done) ndone++;
    gnt <= ($urandom % 3 != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      automatic int n = 1 + $urandom % 100;
      automatic int base = 4 * ($urandom % 64);
      for (int i = 0; i < 512; i++) mem.mem[i] = 32'hDEAD_BEEF;
      frame.delete();
      ndone = 0;
      @(negedge clk);
      addr = 32'(base);
      start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < n; i++) begin
        automatic logic [7:0] b = 8'($urandom);
        frame.push_back(b);
        @(negedge clk); push = 1; pdata = b; @(negedge clk); push = 0;
        repeat ($urandom % 6) @(negedge clk);
      end
      repeat ($urandom % 4) @(negedge clk);
      status_word = {1'b0, 1'b0, 14'd0, 16'(n)} | ($urandom % 2 << 31);
      frame_end = 1; @(negedge clk); frame_end = 0;
      wait (done); @(negedge clk); @(negedge clk);
      // frame bytes
      for (int i = 0; i < ((n + 3) / 4) * 4; i++) begin
        automatic logic [7:0] exp = (i < n) ? frame[i] : 8'h00;
        automatic logic [7:0] got = mem.mem[(base + i) / 4][8*(i % 4) +: 8];
        checks++;
        if (got !== exp) begin failures++; $display("frame %0d byte %0d: %h exp %h", t, i, got, exp); end
      end
      checks++;
      if (mem.mem[(base + (n + 3) / 4 * 4) / 4] !== status_word) begin
        failures++; $display("frame %0d status word %h", t, mem.mem[(base + (n + 3) / 4 * 4) / 4]);
      end
      checks++;
      if (base + (n + 3) / 4 * 4 + 4 < 2048 && mem.mem[(base + (n + 3) / 4 * 4) / 4 + 1] !== 32'hDEAD_BEEF) begin
        failures++; $display("frame %0d wrote past the status word", t);
      end
      checks++;
      if (ndone != 1 || busy) begin failures++; $display("done count %0d", ndone); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
