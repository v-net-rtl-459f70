// ext_mem_model: behavioural model of the off-chip FLASH (chip select 0) and
// SRAM (chip select 1) on a 32-bit bus with active-low byte enables. A write
// happens at a clock edge while the chip is selected with the write strobe low
// (repeating it is harmless); reads are combinational while output enable is
// low. FLASH is modelled as plain writable memory, without its command set.
module ext_mem_model #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic [1:0]  cs_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic [3:0]  be_n,
  input  logic [21:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  logic [31:0] flash [WORDS];
  logic [31:0] sram  [WORDS];
  logic [$clog2(WORDS)-1:0] a;
  assign a = addr[$clog2(WORDS)-1:0];

  always_comb begin
    rdata = 32'hFFFF_FFFF;
    if (!oe_n && !cs_n[0]) rdata = flash[a];
    if (!oe_n && !cs_n[1]) rdata = sram[a];
  end

  always @(posedge clk) begin
    if (!we_n) for (int i = 0; i < 4; i++) if (!be_n[i]) begin
      if (!cs_n[0]) flash[a][8*i +: 8] <= wdata[8*i +: 8];
      if (!cs_n[1]) sram[a][8*i +: 8]  <= wdata[8*i +: 8];
    end
  end
endmodule
