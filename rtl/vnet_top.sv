// vnet_top: the V-Net 802.11 MAC controller, everything around the processor.
// One ASB system bus connects three masters and three slaves:
//   masters (fixed priority, highest first): PAI DMA, PCMCIA host port, ARM core
//   slaves: external memory interface (FLASH, SRAM), APB bridge, PAI registers
// The APB bridge carries the two timers and the interrupt controller at one
// third of the bus rate. The interrupt controller drives the processor's
// nFIQ/nIRQ from the PAI (receive, transmit) and the two timers.
// The ARM7TDMI core with its AMBA veneer is not part of this RTL: its master
// port (arm_breq/arm_gnt/arm_req/arm_rsp) and interrupt lines are brought out,
// as are the external memory bus, the PC Card host signals and the serial
// interface to the radio's baseband processor.
// Bus protocol and address map are described in vnet_pkg; the block set and
// their connections follow the document's block diagram.
module vnet_top
  import vnet_pkg::*;
#(
  parameter int unsigned TX_FIFO_DEPTH = 16,
  parameter int unsigned RX_FIFO_DEPTH = 16,
  parameter int unsigned FLASH_WS      = 3,
  parameter int unsigned SRAM_WS       = 1,
  parameter int unsigned APB_DIV       = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // ARM core master port and interrupt lines
  input  logic        arm_breq,
  output logic        arm_gnt,
  input  asb_req_t    arm_req,
  output asb_rsp_t    arm_rsp,
  output logic        nfiq,
  output logic        nirq,
  // external memory bus
  output logic [1:0]  mem_cs_n,
  output logic        mem_oe_n,
  output logic        mem_we_n,
  output logic [3:0]  mem_be_n,
  output logic [21:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        mem_data_oe,
  input  logic [31:0] mem_rdata,
  // PC Card host
  input  logic [15:0] host_addr,
  input  logic        host_ce1_n,
  input  logic        host_ce2_n,
  input  logic        host_oe_n,
  input  logic        host_we_n,
  input  logic        host_reg_n,
  input  logic [15:0] host_din,
  output logic [15:0] host_dout,
  output logic        host_dout_en,
  output logic        host_wait_n,
  // baseband processor serial interface
  output logic        tx_pe,
  input  logic        tx_rdy,
  input  logic        tx_bit_en,
  output logic        txd,
  input  logic        md_rdy,
  input  logic        rx_bit_en,
  input  logic        rxd
);
  logic [NMASTERS-1:0] areq, agnt;
  asb_req_t            mreq [NMASTERS];
  asb_req_t            bus_req;
  asb_rsp_t            bus_rsp;
  logic [NSLAVES-1:0]  dsel;
  asb_rsp_t            srsp [NSLAVES];

  logic                pclk_en;
  apb_req_t            preq;
  logic [1:0]          psel;
  logic [31:0]         prdata [2];
  logic [1:0]          timer_irq;
  logic                pai_tx_irq, pai_rx_irq;
  logic [3:0]          irq_src;

  // ---------------- ASB ----------------
  asb_arbiter #(.NM(NMASTERS)) u_arbiter (
    .clk, .rst_n, .areq, .agnt, .mreq, .bwait(bus_rsp.bwait), .bus_req
  );

  asb_decoder u_decoder (.bus_req, .dsel, .srsp, .bus_rsp);

  assign areq[M_ARM] = arm_breq;
  assign mreq[M_ARM] = arm_req;
  assign arm_gnt     = agnt[M_ARM];
  assign arm_rsp     = bus_rsp;

  pai #(.TX_FIFO_DEPTH(TX_FIFO_DEPTH), .RX_FIFO_DEPTH(RX_FIFO_DEPTH)) u_pai (
    .clk, .rst_n,
    .sel(dsel[S_PAI]), .sreq(bus_req), .srsp(srsp[S_PAI]),
    .breq(areq[M_PAI]), .gnt(agnt[M_PAI]), .mreq(mreq[M_PAI]), .mrsp(bus_rsp),
    .tx_pe, .tx_rdy, .tx_bit_en, .txd, .md_rdy, .rx_bit_en, .rxd,
    .tx_irq(pai_tx_irq), .rx_irq(pai_rx_irq)
  );

  pcmcia_ctrl #(.HA_W(16)) u_pcmcia (
    .clk, .rst_n,
    .host_addr, .host_ce1_n, .host_ce2_n, .host_oe_n, .host_we_n, .host_reg_n,
    .host_din, .host_dout, .host_dout_en, .host_wait_n, .configured(),
    .breq(areq[M_PCMCIA]), .gnt(agnt[M_PCMCIA]), .req(mreq[M_PCMCIA]), .rsp(bus_rsp)
  );

  emi #(.FLASH_WS(FLASH_WS), .SRAM_WS(SRAM_WS), .MEM_AW(22)) u_emi (
    .clk, .rst_n, .sel(dsel[S_EMI]), .req(bus_req), .rsp(srsp[S_EMI]),
    .mem_cs_n, .mem_oe_n, .mem_we_n, .mem_be_n, .mem_addr, .mem_wdata, .mem_data_oe, .mem_rdata
  );

  asb_apb_bridge #(.DIV(APB_DIV), .NPERIPH(2)) u_bridge (
    .clk, .rst_n, .sel(dsel[S_BRIDGE]), .req(bus_req), .rsp(srsp[S_BRIDGE]),
    .pclk_en, .preq, .psel, .prdata
  );

  // ---------------- APB ----------------
  amba_timers #(.NTIMERS(2), .WIDTH(32)) u_timers (
    .clk, .rst_n, .pclk_en, .psel(psel[APB_TIMERS]), .preq, .prdata(prdata[APB_TIMERS]),
    .irq(timer_irq)
  );

  assign irq_src[IRQ_PAI_RX] = pai_rx_irq;
  assign irq_src[IRQ_PAI_TX] = pai_tx_irq;
  assign irq_src[IRQ_TIMER0] = timer_irq[0];
  assign irq_src[IRQ_TIMER1] = timer_irq[1];

  amba_intc #(.NSRC(4)) u_intc (
    .clk, .rst_n, .pclk_en, .psel(psel[APB_INTC]), .preq, .prdata(prdata[APB_INTC]),
    .src(irq_src), .nfiq, .nirq
  );
endmodule
