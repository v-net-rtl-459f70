// vnet_pkg: types and constants shared by the V-Net MAC controller.
// The system bus is a simplified single-phase ASB: the granted master drives
// one request (trans, address, direction, size, write data) and holds it until
// the selected slave answers with bwait low; read data is valid in that cycle.
// Data uses little-endian byte lanes: byte address A sits on bits 8*(A%4)+7..8*(A%4).
// The APB side carries setup/enable phases advanced by a clock enable that the
// bridge raises every third system clock. The address map is this design's own
// choice; the document names the slaves but gives no addresses.
package vnet_pkg;

  typedef enum logic [1:0] {
    SZ_BYTE = 2'd0,
    SZ_HALF = 2'd1,
    SZ_WORD = 2'd2
  } bsize_e;

  typedef struct packed {
    logic        trans;   // a transfer is requested this cycle
    logic [31:0] addr;
    logic        write;
    bsize_e      size;
    logic [31:0] wdata;
  } asb_req_t;

  typedef struct packed {
    logic        bwait;   // 1: transfer not finished yet
    logic        berror;  // with bwait low: transfer failed
    logic [31:0] rdata;
  } asb_rsp_t;

  // APB request; the per-peripheral select lines travel beside it
  typedef struct packed {
    logic        penable;
    logic        pwrite;
    logic [15:0] paddr;
    logic [31:0] pwdata;
  } apb_req_t;

  // ASB masters, index = arbiter request line; lower index = higher priority
  localparam int unsigned M_PAI    = 0;
  localparam int unsigned M_PCMCIA = 1;
  localparam int unsigned M_ARM    = 2;
  localparam int unsigned NMASTERS = 3;

  // ASB slaves
  localparam int unsigned S_EMI    = 0;
  localparam int unsigned S_BRIDGE = 1;
  localparam int unsigned S_PAI    = 2;
  localparam int unsigned NSLAVES  = 3;

  // Address map (region = addr[31:28])
  localparam logic [3:0] REGION_EMI    = 4'h0;  // 0x0xxx_xxxx : FLASH (bank 0) and SRAM (bank 1)
  localparam logic [3:0] REGION_BRIDGE = 4'h8;  // 0x8000_xxxx : APB peripherals
  localparam logic [3:0] REGION_PAI    = 4'h9;  // 0x9000_0xxx : PAI registers

  // APB peripheral select = paddr[15:12]
  localparam int unsigned APB_TIMERS = 0;      // 0x8000_0xxx
  localparam int unsigned APB_INTC   = 1;      // 0x8000_1xxx

  // Interrupt source numbers (lower number = higher priority)
  localparam int unsigned IRQ_PAI_RX = 0;
  localparam int unsigned IRQ_PAI_TX = 1;
  localparam int unsigned IRQ_TIMER0 = 2;
  localparam int unsigned IRQ_TIMER1 = 3;

  // Byte-lane helpers
  function automatic logic [3:0] lane_mask(input logic [1:0] a, input bsize_e sz);
    unique case (sz)
      SZ_BYTE: lane_mask = 4'b0001 << a;
      SZ_HALF: lane_mask = a[1] ? 4'b1100 : 4'b0011;
      default: lane_mask = 4'b1111;
    endcase
  endfunction

  function automatic logic [31:0] merge_lanes(input logic [31:0] old, input logic [31:0] nw,
                                              input logic [3:0] m);
    for (int i = 0; i < 4; i++)
      merge_lanes[8*i +: 8] = m[i] ? nw[8*i +: 8] : old[8*i +: 8];
  endfunction

endpackage
