// tb_pai_regs: writes and reads back every PAI register through its ASB
// slave port, checks the TX_GO pulse, status bits set by events and cleared
// by writing ones, the interrupt outputs with their enables, the TSF load
// strobes and the latching of the TSF high half on a low-half read.
module tb_pai_regs;
  import vnet_pkg::*;
  logic clk = 0, rst_n = 0, sel = 0;
  asb_req_t req = '0;
  asb_rsp_t rsp;
  logic tx_go, rx_en, tsf_en, ts_insert, tsf_load_lo, tsf_load_hi, tx_irq, rx_irq;
  logic [31:0] tx_addr, rx_addr, tsf_load_val;
  logic [15:0] tx_len, rx_maxlen, ts_offset, tsf_presc;
  logic [63:0] tsf = 64'h1122_3344_5566_7788;
  logic tx_done_set = 0, tx_underrun_set = 0, tx_busy = 0, rx_done_set = 0, rx_crc_err = 0;
  logic rx_overflow = 0, rx_busy = 0, dma_err_set = 0;
  logic [15:0] rx_len = 16'd77;
  int checks = 0, failures = 0, ngo = 0, nlo = 0, nhi = 0;

  pai_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (tx_go) ngo++;
    if (tsf_load_lo) nlo++;
    if (tsf_load_hi) nhi++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk); sel = 1; req = '{trans: 1'b1, addr: 32'h9000_0000 | 32'(a), write: 1'b1, size: SZ_WORD, wdata: d};
    @(negedge clk); sel = 0; req = '0;
  endtask
  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk); sel = 1; req = '{trans: 1'b1, addr: 32'h9000_0000 | 32'(a), write: 1'b0, size: SZ_WORD, wdata: 0};
    #1 d = rsp.rdata;
    if (rsp.bwait) begin failures++; $display("wait state"); end
    @(negedge clk); sel = 0; req = '0;
  endtask
  task automatic expect_rd(input logic [5:0] a, input logic [31:0] e);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin failures++; $display("reg %h: %h exp %h", a, d, e); end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    expect_rd(6'h28, 32'd24);      // TS_OFFSET reset
    expect_rd(6'h1C, 32'd19);      // TSF_PRESC reset
    wr(6'h08, 32'h0000_1230); expect_rd(6'h08, 32'h0000_1230);
    wr(6'h0C, 32'd100);       expect_rd(6'h0C, 32'd100);
    wr(6'h10, 32'h0000_4560); expect_rd(6'h10, 32'h0000_4560);
    wr(6'h14, 32'd500);       expect_rd(6'h14, 32'd500);
    wr(6'h1C, 32'd9);         expect_rd(6'h1C, 32'd9);
    wr(6'h28, 32'd30);        expect_rd(6'h28, 32'd30);
    expect_rd(6'h18, 32'd77);
    checks++; if (tx_addr != 32'h1230 || tx_len != 100 || rx_addr != 32'h4560 || rx_maxlen != 500 ||
                  tsf_presc != 9 || ts_offset != 30) begin failures++; $display("outputs"); end
    // control: TX_GO is a pulse, the rest are levels
    wr(6'h00, 32'h3F);
    checks++; if (ngo != 1 || !rx_en || !tsf_en || !ts_insert) begin failures++; $display("ctrl %0d", ngo); end
    expect_rd(6'h00, 32'h3E);
    // status events and interrupts
    checks++; if (tx_irq || rx_irq) begin failures++; $display("irq without event"); end
    pulse(tx_done_set);
    checks++; if (!tx_irq) begin failures++; $display("no tx irq"); end
    rx_crc_err = 1; rx_overflow = 1; pulse(rx_done_set); rx_crc_err = 0; rx_overflow = 0;
    pulse(tx_underrun_set); pulse(dma_err_set);
    expect_rd(6'h04, 32'hCF);
    checks++; if (!rx_irq) begin failures++; $display("no rx irq"); end
    wr(6'h04, 32'h01);
    expect_rd(6'h04, 32'hCE);
    checks++; if (tx_irq || !rx_irq) begin failures++; $display("tx irq not cleared"); end
    wr(6'h04, 32'hCE);
    expect_rd(6'h04, 32'h00);
    wr(6'h00, 32'h00);               // interrupt enables off
    pulse(tx_done_set);
    checks++; if (tx_irq) begin failures++; $display("tx irq while disabled"); end
    // TSF read and load
    expect_rd(6'h20, 32'h5566_7788);
    tsf = 64'hAAAA_BBBB_CCCC_DDDD;
    expect_rd(6'h24, 32'h1122_3344);  // high half latched by the low read
    wr(6'h20, 32'h1);
    wr(6'h24, 32'h2);
    checks++; if (nlo != 1 || nhi != 1) begin failures++; $display("tsf loads %0d %0d", nlo, nhi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
