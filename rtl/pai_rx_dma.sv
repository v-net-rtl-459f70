// pai_rx_dma: receive DMA engine of the PAI, an ASB master.
// On start it takes the buffer address; it then pops bytes from the receive
// FIFO, packs them into 32-bit words (first byte in lane 0) and writes each
// full word to the next word of the buffer. When frame_end has been seen and
// the FIFO is empty it writes any partial word (unused lanes zero) and then,
// through its data source multiplexer, the status word from the receive control
// (CRC result, overflow, length) into the word after the frame. done pulses
// when that status word is written.
// Bus side as for the transmit engine: breq, and req held while gnt until
// rsp.bwait is low. A bus error is ignored apart from setting err.
// The multiplexer between FIFO data and CRC status follows the receive path
// drawing of the document; the status word layout is this design's own.
module pai_rx_dma
  import vnet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] addr,
  input  logic        fifo_empty,
  input  logic [7:0]  fifo_dout,
  output logic        fifo_pop,
  input  logic        frame_end,
  input  logic [31:0] status_word,
  output logic        done,
  output logic        err,
  output logic        busy,
  output logic        breq,
  input  logic        gnt,
  output asb_req_t    req,
  input  asb_rsp_t    rsp
);
  typedef enum logic [1:0] {IDLE, RUN, WRITE, STATUS} state_e;
  state_e      state;
  logic [31:0] waddr, word;
  logic [1:0]  nb;
  logic        ended, xfer_done;

  assign busy      = (state != IDLE);
  assign breq      = (state == WRITE) || (state == STATUS);
  assign xfer_done = breq && gnt && !rsp.bwait;
  assign fifo_pop  = (state == RUN) && !fifo_empty;

  always_comb begin
    req       = '0;
    req.trans = breq && gnt;
    req.addr  = waddr;
    req.write = 1'b1;
    req.size  = SZ_WORD;
    req.wdata = (state == STATUS) ? status_word : word;   // data source multiplexer
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; waddr <= '0; word <= '0; nb <= '0; ended <= 1'b0;
      done <= 1'b0; err <= 1'b0;
    end else begin
      done <= 1'b0;
      if (frame_end) ended <= 1'b1;
      unique case (state)
        IDLE: if (start) begin
          waddr <= {addr[31:2], 2'b00};
          word <= '0; nb <= '0; ended <= 1'b0; err <= 1'b0;
          state <= RUN;
        end
        RUN: begin
          if (!fifo_empty) begin
            word[8*nb +: 8] <= fifo_dout;
            nb <= nb + 1'b1;
            if (nb == 2'd3) state <= WRITE;
          end else if (ended || frame_end) begin
            state <= (nb != 0) ? WRITE : STATUS;
          end
        end
        WRITE: if (xfer_done) begin
          if (rsp.berror) err <= 1'b1;
          waddr <= waddr + 32'd4;
          word  <= '0;
          nb    <= '0;
          state <= RUN;
        end
        STATUS: if (xfer_done) begin
          if (rsp.berror) err <= 1'b1;
          done  <= 1'b1;
          ended <= 1'b0;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
