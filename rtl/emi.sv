// emi: External Memory Interface, an ASB slave that runs the off-chip FLASH
// (bank 0, 0x0000_0000) and SRAM (bank 1, 0x0100_0000); address bit 24 picks
// the bank and the bank's chip select. The external bus is 32 bits wide with a
// byte enable per lane, so byte, half-word and word transfers of the processor
// all map onto one access: the enables come from the size and the low address
// bits, and reads return the whole word for the master to pick its lanes.
// Every pad output comes from a register, and read data is registered too.
// Timing of one transfer, in clocks of the held ASB request:
//   1          the request is decoded; chip select, address, byte enables,
//              write data and strobe are loaded into the pad registers
//   WS+1       the access: all of them held steady (WS = FLASH_WS or SRAM_WS)
//   1          the strobes are released, read data (taken from mem_rdata in the
//              last access clock) is returned with bwait low
// so a transfer takes WS+3 clocks, and back-to-back accesses leave one clock
// with no chip selected between them.
// The data bus is split into mem_wdata/mem_rdata plus mem_data_oe for the pad.
// Bank layout, registered pads and wait-state counts are this design's choices;
// the document gives the role and the three transfer sizes.
module emi
  import vnet_pkg::*;
#(
  parameter int unsigned FLASH_WS = 3,
  parameter int unsigned SRAM_WS  = 1,
  parameter int unsigned MEM_AW   = 22
) (
  input  logic              clk,
  input  logic              rst_n,
  // ASB slave
  input  logic              sel,
  input  asb_req_t          req,
  output asb_rsp_t          rsp,
  // external memory bus
  output logic [1:0]        mem_cs_n,
  output logic              mem_oe_n,
  output logic              mem_we_n,
  output logic [3:0]        mem_be_n,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  output logic              mem_data_oe,
  input  logic [31:0]       mem_rdata
);
  typedef enum logic [1:0] {IDLE, ACCESS, RESPOND} state_e;
  state_e      state;
  logic        active, bank, last;
  logic [3:0]  cnt, ws;
  logic [31:0] rdata_q;

  assign active = sel && req.trans;
  assign bank   = req.addr[24];
  assign ws     = bank ? 4'(SRAM_WS) : 4'(FLASH_WS);
  assign last   = (cnt == ws);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      cnt         <= '0;
      rdata_q     <= '0;
      mem_cs_n    <= 2'b11;
      mem_oe_n    <= 1'b1;
      mem_we_n    <= 1'b1;
      mem_be_n    <= 4'hF;
      mem_addr    <= '0;
      mem_wdata   <= '0;
      mem_data_oe <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (active) begin
          state       <= ACCESS;
          cnt         <= '0;
          mem_cs_n    <= bank ? 2'b01 : 2'b10;
          mem_oe_n    <= req.write;
          mem_we_n    <= !req.write;
          mem_be_n    <= ~lane_mask(req.addr[1:0], req.size);
          mem_addr    <= req.addr[MEM_AW+1:2];
          mem_wdata   <= req.wdata;
          mem_data_oe <= req.write;
        end
        ACCESS: if (last) begin
          state       <= RESPOND;
          rdata_q     <= mem_rdata;
          mem_cs_n    <= 2'b11;
          mem_oe_n    <= 1'b1;
          mem_we_n    <= 1'b1;
          mem_be_n    <= 4'hF;
          mem_data_oe <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
        end
        RESPOND: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign rsp.bwait  = active && (state != RESPOND);
  assign rsp.berror = 1'b0;
  assign rsp.rdata  = rdata_q;
endmodule
