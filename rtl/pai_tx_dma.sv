// pai_tx_dma: transmit DMA engine of the PAI, an ASB master.
// On start it reads the frame of len bytes from memory at addr, one aligned
// 32-bit word per bus transfer, and pushes the bytes into the transmit FIFO in
// address order (byte lane 0 first), one byte per cycle, with the byte's index
// in the frame on byte_idx. A word is fetched only when the FIFO has room for
// four bytes (space_ok), so the FIFO never overflows; a started transfer is
// held to its end whatever space_ok does. done pulses when the last
// byte has been pushed.
// Bus side: breq is the request to the PAI's master port; when gnt is high the
// engine drives req with trans set and holds it until rsp.bwait is low.
// addr must be word aligned. A bus error ends the frame early and sets err.
// The document gives the function (memory to FIFO without the processor);
// word fetches and byte pushing are this design's choices.
module pai_tx_dma
  import vnet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] addr,
  input  logic [15:0] len,
  input  logic        space_ok,
  output logic        push,
  output logic [7:0]  byte_out,
  output logic [15:0] byte_idx,
  output logic        done,
  output logic        err,
  output logic        busy,
  output logic        breq,
  input  logic        gnt,
  output asb_req_t    req,
  input  asb_rsp_t    rsp
);
  typedef enum logic [1:0] {IDLE, SPACE, FETCH, PUSH} state_e;
  state_e      state;
  logic [31:0] waddr, word;
  logic [15:0] remaining;
  logic [1:0]  lane;
  logic        xfer_done;

  assign busy      = (state != IDLE);
  assign breq      = (state == FETCH);
  assign xfer_done = breq && gnt && !rsp.bwait;

  always_comb begin
    req       = '0;
    req.trans = breq && gnt;
    req.addr  = waddr;
    req.write = 1'b0;
    req.size  = SZ_WORD;
  end

  assign push     = (state == PUSH);
  assign byte_out = word[8*lane +: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; waddr <= '0; word <= '0; remaining <= '0; lane <= '0;
      byte_idx <= '0; done <= 1'b0; err <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          waddr <= {addr[31:2], 2'b00};
          remaining <= len;
          byte_idx <= '0;
          err <= 1'b0;
          if (len == 0) done <= 1'b1;
          else          state <= SPACE;
        end
        SPACE: if (space_ok) state <= FETCH;
        FETCH: if (xfer_done) begin
          if (rsp.berror) begin
            err <= 1'b1; done <= 1'b1; state <= IDLE;
          end else begin
            word  <= rsp.rdata;
            lane  <= '0;
            waddr <= waddr + 32'd4;
            state <= PUSH;
          end
        end
        PUSH: begin
          lane      <= lane + 1'b1;
          byte_idx  <= byte_idx + 1'b1;
          remaining <= remaining - 1'b1;
          if (remaining == 16'd1) begin
            done <= 1'b1; state <= IDLE;
          end else if (lane == 2'd3) begin
            state <= SPACE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
