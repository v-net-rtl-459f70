// pai_tx_ctrl: transmit control state machine of the PAI.
// go (from the registers) presets the transmit CRC; once data_ready says the
// transmit FIFO is primed (full enough, or the whole frame fetched) it raises
// tx_pe, the transmit enable to the PHY. Once the PHY signals tx_rdy (its preamble and
// header are out) and the transmit FIFO holds data, the machine loads one FIFO
// byte into the shift register each time the register has emptied, until len
// bytes are out; the CRC follows every data bit. It then loads the four bytes
// of the FCS from the CRC engine, lowest byte first, drops tx_pe after the last
// FCS bit and pulses done. If a bit strobe finds the shift register empty while
// data is still due, the FIFO has run dry: the frame is aborted with underrun.
// Timing: a byte is reloaded in the clocks between two strobes, so bit strobes
// must be at least three clocks apart.
// The PHY side (tx_pe, tx_rdy, a bit strobe per transmitted bit) is modelled on
// a serial baseband interface; the document names only "Tx control signals".
module pai_tx_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  input  logic [15:0] len,
  input  logic        data_ready,
  // PHY
  output logic        tx_pe,
  input  logic        tx_rdy,
  input  logic        bit_en,
  // transmit FIFO
  input  logic        fifo_empty,
  input  logic [7:0]  fifo_dout,
  output logic        fifo_pop,
  // shift register
  output logic        sh_load,
  output logic [7:0]  sh_din,
  input  logic        sh_busy,
  // CRC engine
  output logic        crc_init,
  output logic        crc_en,
  input  logic [31:0] fcs,
  // status
  output logic        done,
  output logic        underrun,
  output logic        busy
);
  typedef enum logic [2:0] {IDLE, PRIME, WAIT_RDY, DATA, FCS, LAST} state_e;
  state_e      state;
  logic [15:0] sent;
  logic [2:0]  k;
  logic        data_due;

  assign busy     = (state != IDLE);
  assign tx_pe    = (state != IDLE) && (state != PRIME);
  assign crc_init = (state == IDLE) && go;
  assign crc_en   = (state == DATA) && bit_en && sh_busy;
  assign data_due = (sent != len);

  always_comb begin
    sh_load  = 1'b0;
    sh_din   = fifo_dout;
    fifo_pop = 1'b0;
    if (state == DATA && !sh_busy && data_due && !fifo_empty) begin
      sh_load = 1'b1; fifo_pop = 1'b1;
    end else if (state == FCS && !sh_busy && k != 3'd4) begin
      sh_load = 1'b1; sh_din = fcs[8*k[1:0] +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; sent <= '0; k <= '0; done <= 1'b0; underrun <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (go) begin
          sent <= '0; k <= '0; underrun <= 1'b0;
          state <= PRIME;
        end
        PRIME: if (data_ready) state <= WAIT_RDY;
        WAIT_RDY: if (tx_rdy && (!fifo_empty || len == 0)) state <= DATA;
        DATA: begin
          if (sh_load) sent <= sent + 1'b1;
          if (!sh_busy && !data_due) begin
            state <= FCS;
          end else if (bit_en && !sh_busy && data_due) begin
            underrun <= 1'b1; done <= 1'b1; state <= IDLE;
          end
        end
        FCS: begin
          if (sh_load) k <= k + 1'b1;
          if (!sh_busy && k == 3'd4) state <= LAST;
        end
        LAST: begin
          done <= 1'b1; state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
