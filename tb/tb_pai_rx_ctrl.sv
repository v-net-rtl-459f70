// tb_pai_rx_ctrl: runs the receive control machine with the receive shift
// register, CRC engine and FIFO, a baseband model that sends frames with their
// FCS under md_rdy, and a stand-in for the DMA that empties the FIFO and
// answers frame_end with dma_done. Checks the bytes queued, the status word
// (length, CRC error for a corrupted frame), overflow at maxlen and at a full
// FIFO, that a frame is ignored with receive disabled, and done.
module tb_pai_rx_ctrl;
  `include "crc32_ref.svh"
  logic clk = 0, rst_n = 0, rx_en = 0, md_rdy = 0, bit_en = 0, rxd = 0, dma_done = 0;
  logic [15:0] maxlen = 16'd2346;
  logic byte_valid, fifo_full, fifo_push, crc_en, residue_ok, frame_start, frame_end;
  logic done, crc_err, overflow, busy, fempty, pop;
  logic [31:0] status_word, crc, fcs;
  logic [15:0] rx_len;
  logic [7:0] sdout, fdout;
  logic [4:0] fcount;
  logic [7:0] got [$];
  int checks = 0, failures = 0, nstart = 0, ndone = 0;
  logic draining = 1;

  pai_rx_ctrl dut (.*);
  pai_rx_shift sh (.clk, .rst_n, .clear(frame_start), .bit_en(bit_en && md_rdy), .sin(rxd),
                   .dout(sdout), .byte_valid);
  crc32_serial c (.clk, .rst_n, .init(frame_start), .bit_en(crc_en), .bit_in(rxd), .crc, .fcs, .residue_ok);
  sync_fifo #(.WIDTH(8), .DEPTH(16)) fifo (.clk, .rst_n, .clear(frame_start), .push(fifo_push),
    .din(sdout), .pop, .dout(fdout), .full(fifo_full), .empty(fempty), .count(fcount));
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DMA stand-in
  assign pop = draining && !fempty;
  always @(posedge clk) begin
    if (pop && rst_n) got.push_back(fdout);
    dma_done <= frame_end;
    if (frame_start) nstart++;
    if (done) ndone++;
  end

  task automatic send_frame(input logic [7:0] d [$], input bit corrupt);
    logic [31:0] f = crc32_ref(d);
    logic [7:0] all [$] = d;
    for (int i = 0; i < 4; i++) all.push_back(f[8*i +: 8]);
    if (corrupt) all[0] ^= 8'h10;
    @(negedge clk); md_rdy = 1;
    foreach (all[i]) for (int j = 0; j < 8; j++) begin
      repeat (3) @(negedge clk);
      rxd = all[i][j]; bit_en = 1; @(negedge clk); bit_en = 0;
    end
    repeat (3) @(negedge clk); md_rdy = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    logic [7:0] frame [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // disabled: nothing happens
    frame = '{8'h11, 8'h22};
    send_frame(frame, 0);
    checks++; if (nstart != 0 || got.size() != 0) begin failures++; $display("frame taken while disabled"); end
    rx_en = 1;
    for (int t = 0; t < 10; t++) begin
      automatic int n = 1 + $urandom % 50;
      automatic bit bad = (t % 3 == 2);
      frame.delete(); got.delete(); ndone = 0;
      for (int i = 0; i < n; i++) frame.push_back(8'($urandom));
      send_frame(frame, bad);
      checks++;
      if (ndone != 1 || rx_len != 16'(n + 4) || status_word[15:0] != 16'(n + 4) ||
          crc_err != bad || status_word[31] != bad || overflow) begin
        failures++; $display("frame %0d: done %0d len %0d crc_err %b ovf %b", t, ndone, rx_len, crc_err, overflow);
      end
      for (int i = 0; i < n; i++) begin
        checks++;
        if (got.size() <= i || got[i] !== (bad && i == 0 ? frame[i] ^ 8'h10 : frame[i])) begin
          failures++; $display("frame %0d byte %0d", t, i);
        end
      end
    end
    // buffer limit
    maxlen = 16'd10;
    frame.delete(); got.delete();
    for (int i = 0; i < 20; i++) frame.push_back(8'(i));
    send_frame(frame, 0);
    checks++;
    if (!overflow || rx_len != 16'd10 || got.size() != 10 || crc_err) begin
      failures++; $display("maxlen: ovf %b len %0d got %0d", overflow, rx_len, got.size());
    end
    // FIFO overflow: no draining
    maxlen = 16'd2346; draining = 0;
    frame.delete(); got.delete();
    for (int i = 0; i < 30; i++) frame.push_back(8'(i));
    send_frame(frame, 0);
    checks++;
    if (!overflow || rx_len != 16'd16) begin
      failures++; $display("fifo overflow: ovf %b len %0d", overflow, rx_len);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
