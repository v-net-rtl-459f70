// tb_pai: end-to-end test of the Physical Attachment Interface with a memory
// model on its DMA port and a baseband model on its serial side. Firmware
// actions are register accesses on the slave port.
//  1. transmit a frame with timestamp insertion: the serial stream must be the
//     memory bytes, with the eight TS_OFFSET bytes replaced by a TSF value in
//     the right window, followed by a correct FCS; tx_irq must rise.
//  2. loop the captured bits back as a received frame while a second frame is
//     being transmitted (both DMA engines compete for the one master port):
//     memory must receive the frame, its FCS and a good status word.
//  3. loop back a corrupted copy: the status word and register report a CRC error.
module tb_pai;
  import vnet_pkg::*;
  `include "crc32_ref.svh"
  localparam int BITCLK = 8;
  logic clk = 0, rst_n = 0, sel = 0;
  asb_req_t sreq = '0, mreq;
  asb_rsp_t srsp, mrsp;
  logic breq, tx_pe, tx_rdy = 0, tx_bit_en = 0, txd, md_rdy = 0, rx_bit_en = 0, rxd = 0;
  logic tx_irq, rx_irq;
  int checks = 0, failures = 0, ncontend = 0, cyc = 0;
  logic bits [$];

  pai dut (.clk, .rst_n, .sel, .sreq, .srsp, .breq, .gnt(breq), .mreq, .mrsp,
           .tx_pe, .tx_rdy, .tx_bit_en, .txd, .md_rdy, .rx_bit_en, .rxd, .tx_irq, .rx_irq);
  asb_mem_slave #(.WORDS(1024), .MAXWAIT(40)) mem (.clk, .sel(1'b1), .req(mreq), .rsp(mrsp));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmit side of the baseband model
  int ph = 0, wr_cnt = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.txd_breq && dut.rxd_breq) ncontend++;
    if (!tx_pe) begin
      tx_rdy <= 0; wr_cnt <= 12; ph <= 0; tx_bit_en <= 0;
    end else if (!tx_rdy) begin
      if (wr_cnt == 0) tx_rdy <= 1; else wr_cnt <= wr_cnt - 1;
    end else begin
      ph <= (ph == BITCLK - 1) ? 0 : ph + 1;
      tx_bit_en <= (ph == BITCLK - 1);
      if (tx_bit_en) bits.push_back(txd);
    end
  end

  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk); sel = 1; sreq = '{trans: 1'b1, addr: 32'h9000_0000 | 32'(a), write: 1'b1, size: SZ_WORD, wdata: d};
    @(negedge clk); sel = 0; sreq = '0;
  endtask
  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk); sel = 1; sreq = '{trans: 1'b1, addr: 32'h9000_0000 | 32'(a), write: 1'b0, size: SZ_WORD, wdata: 0};
    #1 d = srsp.rdata;
    @(negedge clk); sel = 0; sreq = '0;
  endtask

  // receive side of the baseband model: replay a bit list
  task automatic replay(input logic b [$], input bit corrupt);
    @(negedge clk); md_rdy = 1;
    foreach (b[i]) begin
      repeat (BITCLK + 2) @(negedge clk);
      rxd = b[i] ^ (corrupt && i == 20); rx_bit_en = 1; @(negedge clk); rx_bit_en = 0;
    end
    repeat (4) @(negedge clk); md_rdy = 0;
  endtask

  function automatic logic [7:0] mbyte(input int a);
    return mem.mem[a >> 2][8*(a % 4) +: 8];
  endfunction

  logic [7:0]  sent [$];
  logic [31:0] d, exp_fcs, got_fcs;
  logic [63:0] ts, tsf_before, tsf_after;
  logic        loop_bits [$];
  int          n;

  initial begin
    for (int i = 0; i < 1024; i++) mem.mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- 1. transmit with timestamp ----
    n = 40;
    wr(6'h1C, 0);                 // TSF counts every clock
    wr(6'h20, 32'h0506_0708);
    wr(6'h24, 32'h0102_0304);
    wr(6'h08, 32'h100); wr(6'h0C, 32'(n));
    wr(6'h10, 32'h800); wr(6'h14, 32'd2346);
    wr(6'h00, 32'h3E);            // RX_EN, TSF_EN, TS_INSERT, interrupts
    rd(6'h20, d); tsf_before = {32'h0102_0304, d};
    bits.delete();
    wr(6'h00, 32'h3F);            // TX_GO
    wait (tx_irq);
    rd(6'h20, d); rd(6'h24, tsf_after[63:32]); tsf_after[31:0] = d;
    checks++;
    if (bits.size() != (n + 4) * 8) begin failures++; $display("tx bits %0d", bits.size()); end
    sent.delete();
    for (int i = 0; i < bits.size() / 8; i++) begin
      logic [7:0] b;
      for (int j = 0; j < 8; j++) b[j] = bits[8*i + j];
      sent.push_back(b);
    end
    for (int i = 0; i < n; i++) if (i < 24 || i >= 32) begin
      checks++;
      if (sent[i] !== mbyte(32'h100 + i)) begin failures++; $display("tx byte %0d %h exp %h", i, sent[i], mbyte(32'h100 + i)); end
    end
    for (int i = 0; i < 8; i++) ts[8*i +: 8] = sent[24 + i];
    checks++;
    if (ts < tsf_before || ts > tsf_after) begin failures++; $display("timestamp %h not in %h..%h", ts, tsf_before, tsf_after); end
    exp_fcs = crc32_ref(sent[0:n-1]);
    for (int i = 0; i < 4; i++) got_fcs[8*i +: 8] = sent[n + i];
    checks++; if (got_fcs !== exp_fcs) begin failures++; $display("fcs %h exp %h", got_fcs, exp_fcs); end
    wr(6'h04, 32'h01);
    checks++; if (tx_irq) begin failures++; $display("tx irq not cleared"); end

    // ---- 2. loop back while a second frame goes out ----
    loop_bits = bits;
    wr(6'h00, 32'h36);            // TS_INSERT off
    wr(6'h08, 32'h200); wr(6'h0C, 32'd200);
    wr(6'h00, 32'h37);            // TX_GO
    replay(loop_bits, 0);
    wait (rx_irq);
    for (int i = 0; i < n + 4; i++) begin
      checks++;
      if (mbyte(32'h800 + i) !== sent[i]) begin failures++; $display("rx byte %0d %h exp %h", i, mbyte(32'h800 + i), sent[i]); end
    end
    checks++;
    if (mem.mem[(32'h800 + (n + 4 + 3) / 4 * 4) / 4] !== 32'(n + 4)) begin
      failures++; $display("rx status word %h", mem.mem[(32'h800 + (n + 4 + 3) / 4 * 4) / 4]);
    end
    rd(6'h18, d); checks++; if (d != 32'(n + 4)) begin failures++; $display("RX_LEN %0d", d); end
    rd(6'h04, d); checks++; if (d[2] || !d[1]) begin failures++; $display("status %h", d); end
    wait (tx_irq);
    wr(6'h04, 32'h0F);

    // ---- 3. corrupted frame ----
    wr(6'h10, 32'hC00);
    replay(loop_bits, 1);
    wait (rx_irq);
    rd(6'h04, d); checks++; if (!d[2]) begin failures++; $display("crc error not reported %h", d); end
    checks++;
    if (mem.mem[(32'hC00 + (n + 4 + 3) / 4 * 4) / 4] !== (32'h8000_0000 | 32'(n + 4))) begin
      failures++; $display("bad frame status word %h", mem.mem[(32'hC00 + (n + 4 + 3) / 4 * 4) / 4]);
    end
    checks++; if (ncontend == 0) begin failures++; $display("DMA engines never competed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
