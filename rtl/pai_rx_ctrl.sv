// pai_rx_ctrl: receive control state machine of the PAI.
// With receive enabled, a rising edge of md_rdy (the PHY has found a frame and
// starts passing its MPDU bits) opens a frame: it pulses frame_start, which
// clears the shift register and FIFO, presets the receive CRC and starts the
// receive DMA. While md_rdy stays high every assembled byte is pushed into the
// receive FIFO and every bit goes through the CRC. A byte that finds the FIFO
// full, or that would exceed maxlen, is dropped and sets overflow. When md_rdy
// falls the machine pulses frame_end with the status word
//   bit 31 CRC error, bit 30 overflow, bits 15..0 bytes received (FCS included)
// and, when the DMA reports the frame stored, pulses done.
// The PHY side (md_rdy, a bit strobe, the data bit) is modelled on a serial
// baseband interface; the document names only "Rx control signals".
module pai_rx_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_en,
  input  logic [15:0] maxlen,
  // PHY
  input  logic        md_rdy,
  input  logic        bit_en,
  // shift register and FIFO
  input  logic        byte_valid,
  input  logic        fifo_full,
  output logic        fifo_push,
  // CRC engine
  output logic        crc_en,
  input  logic        residue_ok,
  // DMA
  output logic        frame_start,
  output logic        frame_end,
  output logic [31:0] status_word,
  input  logic        dma_done,
  // status
  output logic        done,
  output logic        crc_err,
  output logic        overflow,
  output logic [15:0] rx_len,
  output logic        busy
);
  typedef enum logic [1:0] {IDLE, RECV, WAIT_DMA} state_e;
  state_e state;
  logic   md_q;

  assign busy        = (state != IDLE);
  assign frame_start = (state == IDLE) && rx_en && md_rdy && !md_q;
  assign crc_en      = (state == RECV) && bit_en;
  assign fifo_push   = (state == RECV) && byte_valid && !fifo_full && (rx_len < maxlen);
  assign status_word = {crc_err, overflow, 14'd0, rx_len};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; md_q <= 1'b0; frame_end <= 1'b0; done <= 1'b0;
      crc_err <= 1'b0; overflow <= 1'b0; rx_len <= '0;
    end else begin
      md_q <= md_rdy;
      frame_end <= 1'b0;
      done <= 1'b0;
      unique case (state)
        IDLE: if (frame_start) begin
          rx_len <= '0; overflow <= 1'b0; crc_err <= 1'b0;
          state <= RECV;
        end
        RECV: begin
          if (byte_valid) begin
            if (fifo_push) rx_len <= rx_len + 1'b1;
            else           overflow <= 1'b1;
          end
          if (!md_rdy) begin
            crc_err   <= !residue_ok;
            frame_end <= 1'b1;
            state     <= WAIT_DMA;
          end
        end
        WAIT_DMA: if (dma_done) begin
          done <= 1'b1; state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
