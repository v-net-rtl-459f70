// tb_pai_tx_ctrl: runs the transmit control machine with the transmit FIFO,
// shift register and CRC engine it drives, and a baseband model that raises
// tx_rdy some clocks after tx_pe and strobes one bit every BITCLK clocks.
// Checks: the serial stream is the frame bytes LSB first followed by the FCS
// of a reference CRC; tx_pe covers exactly those bits; done comes once; the
// PHY is not started before data_ready; the
// frame takes (len+4)*8 bit times after tx_rdy; an empty FIFO mid-frame
// gives an underrun.
module tb_pai_tx_ctrl;
  `include "crc32_ref.svh"
  localparam int BITCLK = 3;
  logic data_ready = 1;
  logic clk = 0, rst_n = 0, go = 0, tx_rdy = 0, bit_en = 0;
  logic [15:0] len = 0;
  logic tx_pe, fifo_empty, fifo_pop, sh_load, sh_busy, crc_init, crc_en, done, underrun, busy;
  logic [7:0] fifo_dout, sh_din;
  logic [31:0] fcs, crc;
  logic res_ok, txd, sh_last, ffull;
  logic [6:0] fcount;
  logic push = 0;
  logic [7:0] pdata = 0;
  int checks = 0, failures = 0, ndone = 0, nbits = 0, rdy_cycle = 0, end_cycle = 0, cyc = 0;
  logic bits [$];

  pai_tx_ctrl dut (.*);
  sync_fifo #(.WIDTH(8), .DEPTH(64)) fifo (.clk, .rst_n, .clear(1'b0), .push, .din(pdata),
    .pop(fifo_pop), .dout(fifo_dout), .full(ffull), .empty(fifo_empty), .count(fcount));
  pai_tx_shift sh (.clk, .rst_n, .load(sh_load), .din(sh_din), .bit_en, .sout(txd), .busy(sh_busy), .last(sh_last));
  crc32_serial c (.clk, .rst_n, .init(crc_init), .bit_en(crc_en), .bit_in(txd), .crc, .fcs, .residue_ok(res_ok));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // baseband model
  int ph = 0, wait_rdy = 0;
  always @(posedge clk) begin
    cyc++;
    if (done) ndone++;
    if (!tx_pe) begin
      tx_rdy <= 0; wait_rdy <= 10; ph <= 0; bit_en <= 0;
    end else if (!tx_rdy) begin
      if (wait_rdy == 0) begin tx_rdy <= 1; rdy_cycle <= cyc; end
      else wait_rdy <= wait_rdy - 1;
    end else begin
      ph <= (ph == BITCLK - 1) ? 0 : ph + 1;
      bit_en <= (ph == BITCLK - 1);
      if (bit_en) begin bits.push_back(txd); end_cycle <= cyc; end
    end
  end

  task automatic load_fifo(input logic [7:0] d [$]);
    foreach (d[i]) begin
      @(negedge clk); push = 1; pdata = d[i];
    end
    @(negedge clk); push = 0;
  endtask

  initial begin
    logic [7:0] frame [$];
    logic [31:0] exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      automatic int n = 1 + $urandom % 60;
      frame.delete();
      for (int i = 0; i < n; i++) frame.push_back(8'($urandom));
      exp = crc32_ref(frame);
      load_fifo(frame);
      bits.delete(); ndone = 0;
      if (t == 0) data_ready = 0;
      @(negedge clk); len = 16'(n); go = 1; @(negedge clk); go = 0;
      if (t == 0) begin
        repeat (20) @(negedge clk);
        checks++; if (tx_pe) begin failures++; $display("tx_pe before the FIFO was primed"); end
        data_ready = 1;
      end
      wait (ndone == 1); repeat (3) @(negedge clk);
      checks++;
      if (bits.size() != (n + 4) * 8 || underrun) begin
        failures++; $display("frame %0d: %0d bits for %0d bytes", t, bits.size(), n);
      end else begin
        for (int i = 0; i < n * 8; i++) begin
          checks++;
          if (bits[i] !== frame[i / 8][i % 8]) begin failures++; $display("frame %0d bit %0d", t, i); end
        end
        for (int i = 0; i < 32; i++) begin
          checks++;
          if (bits[n * 8 + i] !== exp[i]) begin failures++; $display("frame %0d fcs bit %0d", t, i); end
        end
      end
      // rate: one bit per BITCLK clocks from tx_rdy
      checks++;
      if (end_cycle - rdy_cycle > (n + 4) * 8 * BITCLK + BITCLK) begin
        failures++; $display("frame %0d too slow: %0d cycles", t, end_cycle - rdy_cycle);
      end
    end
    // underrun: ask for more bytes than the FIFO holds
    frame.delete();
    for (int i = 0; i < 5; i++) frame.push_back(8'(i));
    load_fifo(frame);
    ndone = 0;
    @(negedge clk); len = 16'd9; go = 1; @(negedge clk); go = 0;
    wait (ndone == 1); repeat (3) @(negedge clk);
    checks++;
    if (!underrun || tx_pe) begin failures++; $display("underrun not reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
