// tb_vnet_link: wireless link between two complete adapters, each a MAC
// controller with its memory, processor model, host PC model and baseband
// model (link_station). Station A's host writes a data frame into A's SRAM
// through the PC Card window; A's firmware sends it; B receives it into its
// SRAM, takes the receive FIQ, checks the status and answers with a 10-byte
// 802.11 ACK frame (frame control D4 00, duration 0, receiver address), which A
// receives in turn. B's host then reads the frame back through its own card
// window and compares it with what A's host wrote, FCS included.
// The exchange runs at the two DSSS rates of 802.11, 1 Mbit/s and 2 Mbit/s
// (20 and 10 clocks per bit at a 20 MHz system clock), and once more with a
// frame of the largest 802.11 MPDU size, 2346 bytes including the FCS. Each
// run also checks the time on the air against the bit rate, and that the
// transmitter never ran dry (no underrun).
module tb_vnet_link;
  import vnet_pkg::*;
  `include "crc32_ref.svh"
  localparam logic [31:0] SRAM = 32'h0100_0000, PAI = 32'h9000_0000, INTC = 32'h8000_1000;

  logic clk = 0, rst_n = 0;
  logic a_on, a_en, a_bit, b_on, b_en, b_bit;

  link_station sta_a (.clk, .rst_n, .air_tx_on(a_on), .air_tx_bit_en(a_en), .air_tx_bit(a_bit),
                      .air_rx_on(b_on), .air_rx_bit_en(b_en), .air_rx_bit(b_bit));
  link_station sta_b (.clk, .rst_n, .air_tx_on(b_on), .air_tx_bit_en(b_en), .air_tx_bit(b_bit),
                      .air_rx_on(a_on), .air_rx_bit_en(a_en), .air_rx_bit(a_bit));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_frames = 0, n_acks = 0;

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // time on the air of each frame, per station
  longint cyc = 0, a_start, b_start, a_air, b_air;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (a_on && a_start < 0) a_start <= cyc;
    if (!a_on && a_start >= 0) begin a_air <= cyc - a_start; a_start <= -1; end
    if (b_on && b_start < 0) b_start <= cyc;
    if (!b_on && b_start >= 0) begin b_air <= cyc - b_start; b_start <= -1; end
  end
  initial begin a_start = -1; b_start = -1; end

  logic [7:0] frame [$];
  logic [7:0] ack [$];

  task automatic run(input int bitclk, input int n);
    logic [31:0] d, st;
    logic [15:0] q;
    logic [31:0] fcs;
    int nb;
    $display("run: %0d clocks per bit, %0d-byte frame", bitclk, n);
    sta_a.bitclk = bitclk; sta_b.bitclk = bitclk;
    sta_a.pre_bits = 192 * 20 / bitclk; sta_b.pre_bits = 192 * 20 / bitclk;
    frame.delete();
    for (int i = 0; i < n; i++) frame.push_back(8'($urandom));
    frame[0] = 8'h08; frame[1] = 8'h00;              // data frame
    // A's host puts the frame into A's SRAM through the card window
    for (int i = 0; i < n; i += 2)
      sta_a.host.access(1, 1, 2'b11, 16'(16'h1000 + i), {frame[i + 1], frame[i]}, q);
    // both stations set up receive; A starts the transmission
    sta_b.cpu.wr(PAI + 32'h10, SRAM + 32'h2000);
    sta_b.cpu.wr(PAI + 32'h14, 32'd2346);
    sta_b.cpu.wr(PAI + 32'h00, 32'h32);              // RX_EN, TX_IE, RX_IE
    sta_a.cpu.wr(PAI + 32'h10, SRAM + 32'h3000);
    sta_a.cpu.wr(PAI + 32'h14, 32'd2346);
    sta_a.cpu.wr(PAI + 32'h08, SRAM + 32'h1000);
    sta_a.cpu.wr(PAI + 32'h0C, 32'(n));
    sta_a.cpu.wr(PAI + 32'h00, 32'h32);
    sta_a.cpu.wr(PAI + 32'h00, 32'h33);              // TX_GO
    fork
      begin : station_a
        wait (!sta_a.nirq);
        sta_a.cpu.rd(INTC + 32'h14, d);
        check(d[31] && d[4:0] == IRQ_PAI_TX, "A: transmit interrupt");
        sta_a.cpu.rd(PAI + 32'h04, st);
        check(st[0] && !st[6], $sformatf("A: TX_DONE without underrun, status %h", st));
        sta_a.cpu.wr(PAI + 32'h04, 32'h41);
        check(a_air >= (n + 4) * 8 * bitclk && a_air <= (n + 4) * 8 * bitclk + bitclk,
              $sformatf("A: %0d clocks on the air for %0d bits", a_air, (n + 4) * 8));
        wait (!sta_a.nfiq);                            // the ACK arrives
        sta_a.cpu.rd(PAI + 32'h04, st);
        check(st[1] && !st[2] && !st[3], $sformatf("A: ACK received, status %h", st));
        sta_a.cpu.wr(PAI + 32'h04, 32'h0E);
        sta_a.cpu.rd(PAI + 32'h18, d);
        check(d == 14, $sformatf("A: ACK length %0d", d));
        for (int w = 0; w < 3; w++) begin
          sta_a.cpu.rd(SRAM + 32'h3000 + 32'(4 * w), d);
          for (int k = 0; k < 4; k++) if (4 * w + k < 10)
            check(d[8*k +: 8] == ack[4 * w + k], $sformatf("A: ACK byte %0d", 4 * w + k));
        end
        fcs = crc32_ref(ack);
        sta_a.cpu.rd(SRAM + 32'h3000 + 32'(4 * 2), d);
        check(d[31:16] == fcs[15:0], "A: ACK FCS, low half");
        sta_a.cpu.rd(SRAM + 32'h3000 + 32'(4 * 3), d);
        check(d == {16'h0, fcs[31:16]}, "A: ACK FCS, high half and padding");
        sta_a.cpu.rd(SRAM + 32'h3000 + 32'(4 * 4), d);
        check(d == 32'd14, $sformatf("A: ACK status word %h", d));
        n_acks++;
      end
      begin : station_b
        wait (!sta_b.nfiq);
        sta_b.cpu.rd(INTC + 32'h18, d);
        check(d[31] && d[4:0] == IRQ_PAI_RX, "B: receive FIQ");
        sta_b.cpu.rd(PAI + 32'h04, st);
        check(st[1] && !st[2] && !st[3], $sformatf("B: frame received, status %h", st));
        sta_b.cpu.wr(PAI + 32'h04, 32'h0E);
        sta_b.cpu.rd(PAI + 32'h18, d);
        check(d == 32'(n + 4), $sformatf("B: RX_LEN %0d", d));
        // answer with an ACK to A
        ack = '{8'hD4, 8'h00, 8'h00, 8'h00, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h0A};
        sta_b.cpu.wr(SRAM + 32'h1000, {ack[3], ack[2], ack[1], ack[0]});
        sta_b.cpu.wr(SRAM + 32'h1004, {ack[7], ack[6], ack[5], ack[4]});
        sta_b.cpu.wr(SRAM + 32'h1008, {16'h0, ack[9], ack[8]});
        sta_b.cpu.wr(PAI + 32'h08, SRAM + 32'h1000);
        sta_b.cpu.wr(PAI + 32'h0C, 32'd10);
        sta_b.cpu.wr(PAI + 32'h00, 32'h33);
        wait (!sta_b.nirq);
        sta_b.cpu.rd(PAI + 32'h04, st);
        check(st[0] && !st[6], $sformatf("B: ACK sent, status %h", st));
        sta_b.cpu.wr(PAI + 32'h04, 32'h41);
        check(b_air >= 14 * 8 * bitclk && b_air <= 14 * 8 * bitclk + bitclk,
              $sformatf("B: %0d clocks on the air for the ACK", b_air));
      end
    join
    // B's host reads the frame and its FCS through B's card window
    fcs = crc32_ref(frame);
    nb = 0;
    for (int i = 0; i < n + 4; i += 2) begin
      logic [15:0] e;
      sta_b.host.access(1, 0, 2'b11, 16'(16'h2000 + i), 0, q);
      e[7:0]  = (i < n)     ? frame[i]     : fcs[8*(i - n) +: 8];
      e[15:8] = (i + 1 < n) ? frame[i + 1] : fcs[8*(i + 1 - n) +: 8];
      if (q != e) nb++;
    end
    check(nb == 0, $sformatf("B's host: %0d of %0d half-words differ", nb, (n + 4) / 2));
    sta_b.cpu.rd(SRAM + 32'h2000 + 32'(4 * ((n + 4 + 3) / 4)), d);
    check(d == 32'(n + 4), $sformatf("B: status word %h", d));
    n_frames++;
  endtask

  logic [15:0] q;
  initial begin
    for (int i = 0; i < 4096; i++) begin
      sta_a.mem.flash[i] = 0; sta_a.mem.sram[i] = 0; sta_b.mem.flash[i] = 0; sta_b.mem.sram[i] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    // host PCs configure their cards; firmware enables the PAI interrupts
    sta_a.host.access(0, 1, 2'b01, 16'h0200, 16'h0001, q);
    sta_b.host.access(0, 1, 2'b01, 16'h0200, 16'h0001, q);
    sta_a.cpu.wr(INTC + 32'h04, 32'h3);
    sta_b.cpu.wr(INTC + 32'h04, 32'h3);

    run(20, 100);       // 1 Mbit/s
    run(10, 100);       // 2 Mbit/s
    run(10, 2342);      // 2 Mbit/s, largest MPDU
    check(n_frames == 3 && n_acks == 3, "three exchanges completed");
    $display("frames %0d, acks %0d", n_frames, n_acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
