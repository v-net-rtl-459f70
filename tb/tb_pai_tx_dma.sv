// tb_pai_tx_dma: the transmit DMA reads frames of random length from a
// wait-stating memory model; the testbench checks every pushed byte and its
// index against memory, that it only fetches with space_ok, that done comes
// once after the last byte, and that each word costs one bus transfer.
module tb_pai_tx_dma;
  import vnet_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, space_ok = 1, gnt = 1;
  logic [31:0] addr = 0;
  logic [15:0] len = 0;
  logic push, done, err, busy, breq;
  logic [7:0] byte_out;
  logic [15:0] byte_idx;
  asb_req_t req;
  asb_rsp_t rsp;
  logic breq_q = 0, space_q = 0;
  int checks = 0, failures = 0, nbytes = 0, ndone = 0, nxfer = 0;

  pai_tx_dma dut (.*);
  asb_mem_slave #(.WORDS(256), .MAXWAIT(3)) mem (.clk, .sel(1'b1), .req, .rsp);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] mem_byte(input int a);
    return mem.mem[a >> 2][8*(a % 4) +: 8];
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (breq && !breq_q && !space_q) begin failures++; $display("fetch started without space"); end
    breq_q <= breq; space_q <= space_ok;
    if (req.trans && !rsp.bwait) nxfer++;
    if (push) begin
      checks++;
      if (byte_out !== mem_byte(int'(addr) + int'(byte_idx)) || byte_idx != 16'(nbytes)) begin
        failures++; $display("byte %0d: got %h idx %0d exp %h", nbytes, byte_out, byte_idx,
                             mem_byte(int'(addr) + nbytes));
      end
      nbytes++;
    end
    if (done) ndone++;
    gnt <= ($urandom % 4 != 0);
    space_ok <= ($urandom % 5 != 0);
  end

  initial begin
    for (int i = 0; i < 256; i++) mem.mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      addr = 32'(4 * ($urandom % 64));
      len  = 16'(1 + $urandom % 200);
      nbytes = 0; ndone = 0; nxfer = 0;
      start = 1; @(negedge clk); start = 0;
      wait (done); @(negedge clk); @(negedge clk);
      checks++;
      if (nbytes != int'(len) || ndone != 1 || busy) begin
        failures++; $display("frame %0d: %0d bytes of %0d, done %0d", t, nbytes, len, ndone);
      end
      checks++;
      if (nxfer != (int'(len) + 3) / 4) begin failures++; $display("%0d transfers for %0d bytes", nxfer, len); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
