// tb_vnet_top: end-to-end test of the MAC controller at its default sizes.
// Around the top sit a memory model on the external bus, a bus-functional
// model of the processor on its master port (firmware as testbench tasks), a
// PC Card host model, and a baseband model that captures each transmitted
// frame and plays it back into the receiver. The run:
//  - processor: unmapped access (decoder error), FLASH and SRAM accesses of
//    all sizes; host: reads the CIS, is refused before configuring, configures;
//  - host writes a frame into SRAM through the card window while the
//    processor sets up the timers, interrupt controller and PAI;
//  - three frames are sent and looped back: a beacon-like frame with its
//    timestamp filled in, a corrupted copy (CRC error) and one received into a
//    buffer that is too small (overflow). The processor serves timer, PAI
//    transmit (IRQ) and PAI receive (FIQ) interrupts and reads memory meanwhile,
//    and the host reads memory too, so the three masters compete;
//  - checks: the serial stream (bytes, timestamp, FCS), the received frame in
//    memory, read by both the processor and the host, status words and registers.
// Each mechanism is counted, and one that never happened counts as a failure.
module tb_vnet_top;
  import vnet_pkg::*;
  `include "crc32_ref.svh"
  localparam int BITCLK = 8;
  localparam logic [31:0] SRAM = 32'h0100_0000, PAI = 32'h9000_0000, TIM = 32'h8000_0000, INTC = 32'h8000_1000;

  logic clk = 0, rst_n = 0;
  logic arm_breq = 0, arm_gnt, nfiq, nirq;
  asb_req_t arm_req = '0;
  asb_rsp_t arm_rsp;
  logic [1:0] mem_cs_n;
  logic mem_oe_n, mem_we_n, mem_data_oe;
  logic [3:0] mem_be_n;
  logic [21:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [15:0] host_addr = 0, host_din = 0, host_dout;
  logic host_ce1_n = 1, host_ce2_n = 1, host_oe_n = 1, host_we_n = 1, host_reg_n = 1;
  logic host_dout_en, host_wait_n;
  logic tx_pe, tx_rdy = 0, tx_bit_en = 0, txd, md_rdy = 0, rx_bit_en = 0, rxd = 0;

  vnet_top dut (.*);
  ext_mem_model #(.WORDS(16384)) ext (.clk, .cs_n(mem_cs_n), .oe_n(mem_oe_n), .we_n(mem_we_n),
    .be_n(mem_be_n), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_contend = 0, n_wait = 0, n_apb = 0, n_decerr = 0, n_fifo_full = 0, n_host_wait = 0;
  int n_timer = 0, n_irq_tx = 0, n_fiq_rx = 0, n_crcerr = 0, n_ovf = 0, n_tsins = 0, n_unconf = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.areq) > 1) n_contend++;
    if (dut.bus_req.trans && dut.bus_rsp.bwait && dut.dsel[S_EMI]) n_wait++;
    if (dut.psel != 0 && dut.preq.penable && dut.pclk_en) n_apb++;
    if (dut.u_pai.txd_breq === 1'b0 && dut.u_pai.u_tx_dma.state == 1 && dut.u_pai.txf_full) n_fifo_full++;
    if (!host_wait_n) n_host_wait++;
  end

  // ---------------- baseband model: capture, then loop back ----------------
  logic cap [$];
  logic last_frame [$];
  int   ph = 0, rdy_wait = 0;
  bit   corrupt_next = 0;
  event frame_sent;
  always @(posedge clk) begin
    if (!tx_pe) begin
      if (tx_rdy) begin last_frame = cap; cap.delete(); -> frame_sent; end
      tx_rdy <= 0; rdy_wait <= 15; ph <= 0; tx_bit_en <= 0;
    end else if (!tx_rdy) begin
      if (rdy_wait == 0) tx_rdy <= 1; else rdy_wait <= rdy_wait - 1;
    end else begin
      ph <= (ph == BITCLK - 1) ? 0 : ph + 1;
      tx_bit_en <= (ph == BITCLK - 1);
      if (tx_bit_en) cap.push_back(txd);
    end
  end
  initial begin
    forever begin
      @(frame_sent);
      repeat (40) @(negedge clk);
      md_rdy = 1;
      foreach (last_frame[i]) begin
        repeat (BITCLK + 1) @(negedge clk);
        rxd = last_frame[i] ^ (corrupt_next && i == 100); rx_bit_en = 1; @(negedge clk); rx_bit_en = 0;
      end
      repeat (5) @(negedge clk); md_rdy = 0;
    end
  end

  // ---------------- processor bus-functional model ----------------
  task automatic arm_xfer(input logic wr, input logic [31:0] a, input bsize_e sz, input logic [31:0] wd,
                          output logic [31:0] rd, output logic err);
    @(negedge clk); arm_breq = 1;
    while (!arm_gnt) @(negedge clk);
    arm_req = '{trans: 1'b1, addr: a, write: wr, size: sz, wdata: wd};
    #1;
    while (arm_rsp.bwait) begin @(negedge clk); #1; end
    rd = arm_rsp.rdata; err = arm_rsp.berror;
    @(negedge clk); arm_req = '0; arm_breq = 0;
  endtask
  task automatic arm_wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] r; logic e;
    arm_xfer(1, a, SZ_WORD, d, r, e);
  endtask
  task automatic arm_rd(input logic [31:0] a, output logic [31:0] d);
    logic e;
    arm_xfer(0, a, SZ_WORD, 0, d, e);
  endtask
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // interrupt service: returns when nothing is pending
  logic [31:0] rx_status;
  bit          rx_seen, tx_seen;
  task automatic service();
    logic [31:0] v, st;
    while (!nfiq || !nirq) begin
      if (!nfiq) begin
        arm_rd(INTC + 32'h18, v);
        if (v[31] && v[4:0] == IRQ_PAI_RX) begin
          arm_rd(PAI + 32'h04, st); rx_status = st; rx_seen = 1; n_fiq_rx++;
          if (st[2]) n_crcerr++;
          if (st[3]) n_ovf++;
          arm_wr(PAI + 32'h04, 32'h0E);
        end
      end else begin
        arm_rd(INTC + 32'h14, v);
        if (v[4:0] == IRQ_TIMER0) begin n_timer++; arm_wr(TIM + 32'h0C, 0); end
        else if (v[4:0] == IRQ_PAI_TX) begin n_irq_tx++; tx_seen = 1; arm_wr(PAI + 32'h04, 32'h01); end
        else begin failures++; $display("unexpected IRQ vector %h", v); arm_wr(INTC + 32'h04, 0); end
      end
    end
  endtask

  // ---------------- PC Card host model ----------------
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

  // ---------------- one frame: send, loop back, check ----------------
  logic [7:0] frame [$];
  logic [7:0] sent [$];
  task automatic run_frame(input int n, input bit ts, input bit bad, input int maxlen, input logic [31:0] rxbuf);
    logic [31:0] d, t0, t1;
    logic [63:0] stamp, tsf0, tsf1;
    logic [31:0] fcs;
    int nrx;
    arm_wr(PAI + 32'h08, SRAM + 32'h1000);
    arm_wr(PAI + 32'h0C, 32'(n));
    arm_wr(PAI + 32'h10, rxbuf);
    arm_wr(PAI + 32'h14, 32'(maxlen));
    arm_wr(PAI + 32'h00, ts ? 32'h3E : 32'h36);
    arm_rd(PAI + 32'h20, t0); arm_rd(PAI + 32'h24, d); tsf0 = {d, t0};
    corrupt_next = bad; rx_seen = 0; tx_seen = 0;
    arm_wr(PAI + 32'h00, ts ? 32'h3F : 32'h37);      // TX_GO
    // firmware keeps busy: serve interrupts and read memory until the frame is back
    while (!(rx_seen && tx_seen)) begin
      service();
      arm_rd(SRAM + 32'(4 * ($urandom % 64)), d);
    end
    // transmitted stream
    sent.delete();
    for (int i = 0; i < last_frame.size() / 8; i++) begin
      logic [7:0] b;
      for (int j = 0; j < 8; j++) b[j] = last_frame[8*i + j];
      sent.push_back(b);
    end
    check(sent.size() == n + 4, $sformatf("sent %0d bytes of %0d+4", sent.size(), n));
    for (int i = 0; i < n; i++)
      if (!(ts && i >= 24 && i < 32)) check(sent[i] == frame[i], $sformatf("tx byte %0d", i));
    if (ts) begin
      for (int i = 0; i < 8; i++) stamp[8*i +: 8] = sent[24 + i];
      arm_rd(PAI + 32'h20, t1); arm_rd(PAI + 32'h24, d); tsf1 = {d, t1};
      check(stamp >= tsf0 && stamp <= tsf1, $sformatf("timestamp %h outside %h..%h", stamp, tsf0, tsf1));
      n_tsins++;
    end
    for (int i = 0; i < 4; i++) fcs[8*i +: 8] = sent[n + i];
    check(fcs == crc32_ref(sent[0:n-1]), "FCS");
    // received copy in memory, read by the processor
    nrx = (n + 4 < maxlen) ? n + 4 : maxlen;
    check(rx_status[2] == bad, "CRC error flag");
    check(rx_status[3] == (n + 4 > maxlen), "overflow flag");
    arm_rd(PAI + 32'h18, d);
    check(d == 32'(nrx), $sformatf("RX_LEN %0d exp %0d", d, nrx));
    for (int w = 0; w < (nrx + 3) / 4; w++) begin
      arm_rd(rxbuf + 32'(4 * w), d);
      for (int k = 0; k < 4; k++) if (4 * w + k < nrx) begin
        logic [7:0] e = sent[4 * w + k];
        if (bad && 4 * w + k == 12) e ^= 8'h10;         // bit 100 was flipped on the air
        check(d[8*k +: 8] == e, $sformatf("rx byte %0d", 4 * w + k));
      end
    end
    arm_rd(rxbuf + 32'(4 * ((nrx + 3) / 4)), d);
    check(d == {bad, (n + 4 > maxlen), 14'd0, 16'(nrx)}, $sformatf("status word %h", d));
  endtask

  // ---------------- main ----------------
  logic [31:0] d;
  logic [15:0] q;
  logic e;
  bit host_done;
  initial begin
    for (int i = 0; i < 16384; i++) begin ext.flash[i] = 32'(i) * 32'h0101_0101; ext.sram[i] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;

    // processor: decoder error, FLASH and SRAM in all sizes
    arm_xfer(0, 32'h4000_0000, SZ_WORD, 0, d, e);
    check(e, "unmapped address gives an error"); if (e) n_decerr++;
    arm_rd(32'h0000_0040, d);
    check(d == 32'h1010_1010, "FLASH word read");
    arm_wr(SRAM + 32'h10, 32'h1122_3344);
    arm_xfer(1, SRAM + 32'h11, SZ_BYTE, 32'h0000_AA00, d, e);
    arm_xfer(1, SRAM + 32'h12, SZ_HALF, 32'hBBCC_0000, d, e);
    arm_rd(SRAM + 32'h10, d);
    check(d == 32'hBBCC_AA44, $sformatf("SRAM byte/half writes: %h", d));

    // host: CIS and configuration
    host_access(0, 0, 2'b01, 16'h0000, 0, q);
    check(q[7:0] == 8'h01, "first CIS tuple");
    host_access(1, 0, 2'b11, 16'h0010, 0, q);
    check(q == 0, "card closed before configuration"); n_unconf++;
    host_access(0, 1, 2'b01, 16'h0200, 16'h0001, q);

    // host writes the frame into SRAM while the processor sets up the peripherals
    frame.delete();
    for (int i = 0; i < 100; i++) frame.push_back(8'($urandom));
    host_done = 0;
    fork
      begin
        for (int i = 0; i < 100; i += 2) host_access(1, 1, 2'b11, 16'(16'h1000 + i), {frame[i + 1], frame[i]}, q);
        host_done = 1;
      end
      begin
        arm_wr(TIM + 32'h00, 32'd499);
        arm_wr(TIM + 32'h08, 32'h0000_0007);          // timer 0 periodic, interrupt on
        arm_wr(INTC + 32'h04, 32'h0F);                // all four sources
        arm_rd(INTC + 32'h08, d);
        check(d == 32'h1, "PAI receive routed to FIQ");
        arm_wr(PAI + 32'h1C, 32'd0);                  // TSF every clock
        arm_wr(PAI + 32'h24, 32'h0000_0001);
        arm_wr(PAI + 32'h20, 32'h0000_0000);
        while (!host_done) begin service(); arm_rd(SRAM + 32'h1000, d); end
      end
    join

    // frame 1: timestamp inserted, good CRC; the host keeps reading meanwhile
    fork
      run_frame(100, 1, 0, 2346, SRAM + 32'h2000);
      for (int i = 0; i < 40; i++) host_access(1, 0, 2'b11, 16'(16'h0100 + 2 * i), 0, q);
    join
    // the host reads the received frame through the card window
    for (int i = 0; i < 104; i += 2) begin
      host_access(1, 0, 2'b11, 16'(16'h2000 + i), 0, q);
      check(q == {sent[i + 1], sent[i]}, $sformatf("host read of rx byte %0d", i));
    end
    // frame 2: corrupted on the air
    run_frame(100, 0, 1, 2346, SRAM + 32'h3000);
    // frame 3: receive buffer too small
    run_frame(100, 0, 0, 40, SRAM + 32'h4000);

    $display("mechanisms: contention %0d, wait states %0d, apb %0d, decoder error %0d, tx fifo full %0d, host WAIT# %0d",
             n_contend, n_wait, n_apb, n_decerr, n_fifo_full, n_host_wait);
    $display("            timer irq %0d, tx irq %0d, rx fiq %0d, crc error %0d, overflow %0d, timestamp %0d, unconfigured %0d",
             n_timer, n_irq_tx, n_fiq_rx, n_crcerr, n_ovf, n_tsins, n_unconf);
    check(n_contend > 0, "bus contention"); check(n_wait > 0, "memory wait states");
    check(n_apb > 0, "APB transfers"); check(n_decerr > 0, "decoder error");
    check(n_fifo_full > 0, "transmit FIFO full stall"); check(n_host_wait > 0, "host WAIT#");
    check(n_timer > 0, "timer interrupt"); check(n_irq_tx == 3, "transmit interrupts");
    check(n_fiq_rx == 3, "receive FIQs"); check(n_crcerr == 1, "CRC error");
    check(n_ovf == 1, "receive overflow"); check(n_tsins == 1, "timestamp insertion");
    check(n_unconf == 1, "unconfigured access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
