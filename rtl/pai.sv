// pai: Physical Attachment Interface, the block that connects the MAC
// controller to the wireless PHY.
// Transmit: firmware writes TX_ADDR/TX_LEN and TX_GO; the transmit DMA reads the
// frame from memory into the transmit FIFO, the transmit control machine feeds
// the FIFO bytes through the shift register to the PHY's serial input, least
// significant bit first, and appends the CRC-32 FCS. A multiplexer in front of
// the FIFO can replace the eight bytes at TS_OFFSET with the TSF counter value
// (TS_INSERT), which is how a beacon's timestamp is filled in at send time; the
// value is taken when the first of those bytes enters the FIFO.
// Receive: the PHY's serial bits are assembled into bytes, checked by the
// receive CRC and queued in the receive FIFO; the receive DMA writes them to
// RX_ADDR followed by a status word (CRC error, overflow, length).
// Both DMA engines share the PAI's one ASB master port (breq/gnt); receive wins
// when both ask, since received bits cannot be held back. The choice is kept
// while a transfer waits.
// Block list, datapath and muxes follow the PAI drawing; FIFO depths, the PHY
// signal set and register map are this design's own choices.
module pai
  import vnet_pkg::*;
#(
  parameter int unsigned TX_FIFO_DEPTH = 16,
  parameter int unsigned RX_FIFO_DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  // ASB slave (registers)
  input  logic     sel,
  input  asb_req_t sreq,
  output asb_rsp_t srsp,
  // ASB master (DMA)
  output logic     breq,
  input  logic     gnt,
  output asb_req_t mreq,
  input  asb_rsp_t mrsp,
  // PHY transmit
  output logic     tx_pe,
  input  logic     tx_rdy,
  input  logic     tx_bit_en,
  output logic     txd,
  // PHY receive
  input  logic     md_rdy,
  input  logic     rx_bit_en,
  input  logic     rxd,
  // interrupts
  output logic     tx_irq,
  output logic     rx_irq
);
  // register outputs
  logic        tx_go, rx_en, tsf_en, ts_insert, tsf_load_lo, tsf_load_hi;
  logic [31:0] tx_addr, rx_addr, tsf_load_val;
  logic [15:0] tx_len, rx_maxlen, ts_offset, tsf_presc;
  logic [63:0] tsf;
  logic        tsf_tick;

  // transmit path
  logic        txd_push, txd_done, txd_err, txd_busy, txd_breq, txd_gnt;
  logic [7:0]  txd_byte, txf_din, txf_dout;
  logic [15:0] txd_idx;
  asb_req_t    txd_req;
  logic        txf_full, txf_empty, txf_pop;
  logic [$clog2(TX_FIFO_DEPTH):0] txf_count;
  logic        sh_load, sh_busy, sh_last;
  logic [7:0]  sh_din;
  logic        txc_init, txc_en, txc_res_ok;
  logic [31:0] txc_crc, txc_fcs;
  logic        tx_done, tx_underrun, tx_busy;
  logic [63:0] ts_snap;
  logic        tx_primed;
  logic [15:0] ts_rel;
  logic        ts_hit;

  // receive path
  logic        rsh_valid, rxf_push, rxf_full, rxf_empty, rxf_pop;
  logic [7:0]  rsh_byte, rxf_dout;
  logic [$clog2(RX_FIFO_DEPTH):0] rxf_count;
  logic        rxc_en, rxc_res_ok;
  logic [31:0] rxc_crc, rxc_fcs;
  logic        frame_start, frame_end, rx_done, rx_crc_err, rx_overflow, rx_busy;
  logic [31:0] status_word;
  logic [15:0] rx_len;
  logic        rxd_done, rxd_err, rxd_busy, rxd_breq, rxd_gnt;
  asb_req_t    rxd_req;

  pai_regs u_regs (
    .clk, .rst_n, .sel, .req(sreq), .rsp(srsp),
    .tx_go, .tx_addr, .tx_len, .rx_en, .rx_addr, .rx_maxlen, .tsf_en, .ts_insert,
    .ts_offset, .tsf_presc, .tsf_load_lo, .tsf_load_hi, .tsf_load_val,
    .tsf, .tx_done_set(tx_done), .tx_underrun_set(tx_done && tx_underrun), .tx_busy,
    .rx_done_set(rx_done), .rx_crc_err, .rx_overflow, .rx_len, .rx_busy,
    .dma_err_set((txd_done && txd_err) || (rxd_done && rxd_err)),
    .tx_irq, .rx_irq
  );

  pai_tsf #(.PRESC_W(16)) u_tsf (
    .clk, .rst_n, .enable(tsf_en), .presc(tsf_presc), .load_lo(tsf_load_lo),
    .load_hi(tsf_load_hi), .load_val(tsf_load_val), .tsf, .tick(tsf_tick)
  );

  // ---------------- transmit ----------------
  pai_tx_dma u_tx_dma (
    .clk, .rst_n, .start(tx_go), .addr(tx_addr), .len(tx_len),
    .space_ok(txf_count <= ($clog2(TX_FIFO_DEPTH)+1)'(TX_FIFO_DEPTH - 4)),
    .push(txd_push), .byte_out(txd_byte), .byte_idx(txd_idx),
    .done(txd_done), .err(txd_err), .busy(txd_busy),
    .breq(txd_breq), .gnt(txd_gnt), .req(txd_req), .rsp(mrsp)
  );

  // the PHY is started only once the FIFO is primed, so it cannot run dry at once
  assign tx_primed = !txd_busy ||
                     (txf_count >= ($clog2(TX_FIFO_DEPTH)+1)'(TX_FIFO_DEPTH - 3));

  // timestamp multiplexer in front of the transmit FIFO
  assign ts_rel = txd_idx - ts_offset;
  assign ts_hit = ts_insert && (txd_idx >= ts_offset) && (ts_rel < 16'd8);
  always_comb begin
    if (!ts_hit)            txf_din = txd_byte;
    else if (ts_rel == '0)  txf_din = tsf[7:0];
    else                    txf_din = ts_snap[8*ts_rel[2:0] +: 8];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               ts_snap <= '0;
    else if (txd_push && ts_hit && ts_rel == '0) ts_snap <= tsf;
  end

  sync_fifo #(.WIDTH(8), .DEPTH(TX_FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .clear(tx_go), .push(txd_push), .din(txf_din), .pop(txf_pop),
    .dout(txf_dout), .full(txf_full), .empty(txf_empty), .count(txf_count)
  );

  pai_tx_ctrl u_tx_ctrl (
    .clk, .rst_n, .go(tx_go), .len(tx_len), .data_ready(tx_primed),
    .tx_pe, .tx_rdy, .bit_en(tx_bit_en),
    .fifo_empty(txf_empty), .fifo_dout(txf_dout), .fifo_pop(txf_pop),
    .sh_load, .sh_din, .sh_busy,
    .crc_init(txc_init), .crc_en(txc_en), .fcs(txc_fcs),
    .done(tx_done), .underrun(tx_underrun), .busy(tx_busy)
  );

  pai_tx_shift u_tx_shift (
    .clk, .rst_n, .load(sh_load), .din(sh_din), .bit_en(tx_bit_en),
    .sout(txd), .busy(sh_busy), .last(sh_last)
  );

  crc32_serial u_tx_crc (
    .clk, .rst_n, .init(txc_init), .bit_en(txc_en), .bit_in(txd),
    .crc(txc_crc), .fcs(txc_fcs), .residue_ok(txc_res_ok)
  );

  // ---------------- receive ----------------
  pai_rx_shift u_rx_shift (
    .clk, .rst_n, .clear(frame_start), .bit_en(rx_bit_en && md_rdy), .sin(rxd),
    .dout(rsh_byte), .byte_valid(rsh_valid)
  );

  crc32_serial u_rx_crc (
    .clk, .rst_n, .init(frame_start), .bit_en(rxc_en), .bit_in(rxd),
    .crc(rxc_crc), .fcs(rxc_fcs), .residue_ok(rxc_res_ok)
  );

  pai_rx_ctrl u_rx_ctrl (
    .clk, .rst_n, .rx_en, .maxlen(rx_maxlen), .md_rdy, .bit_en(rx_bit_en),
    .byte_valid(rsh_valid), .fifo_full(rxf_full), .fifo_push(rxf_push),
    .crc_en(rxc_en), .residue_ok(rxc_res_ok),
    .frame_start, .frame_end, .status_word, .dma_done(rxd_done),
    .done(rx_done), .crc_err(rx_crc_err), .overflow(rx_overflow), .rx_len, .busy(rx_busy)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(RX_FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .clear(frame_start), .push(rxf_push), .din(rsh_byte), .pop(rxf_pop),
    .dout(rxf_dout), .full(rxf_full), .empty(rxf_empty), .count(rxf_count)
  );

  pai_rx_dma u_rx_dma (
    .clk, .rst_n, .start(frame_start), .addr(rx_addr),
    .fifo_empty(rxf_empty), .fifo_dout(rxf_dout), .fifo_pop(rxf_pop),
    .frame_end, .status_word, .done(rxd_done), .err(rxd_err), .busy(rxd_busy),
    .breq(rxd_breq), .gnt(rxd_gnt), .req(rxd_req), .rsp(mrsp)
  );

  // ---------------- shared master port ----------------
  logic sel_rx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        sel_rx <= 1'b0;
    else if (!(mreq.trans && mrsp.bwait)) sel_rx <= rxd_breq ? 1'b1 : (txd_breq ? 1'b0 : sel_rx);
  end
  assign breq    = txd_breq || rxd_breq;
  assign rxd_gnt = gnt && sel_rx;
  assign txd_gnt = gnt && !sel_rx;
  assign mreq    = sel_rx ? rxd_req : txd_req;
endmodule
