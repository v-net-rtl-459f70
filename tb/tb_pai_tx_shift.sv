// tb_pai_tx_shift: loads random bytes and checks that they leave on sout
// least significant bit first, one bit per bit_en, with busy and last right.
module tb_pai_tx_shift;
  logic clk = 0, rst_n = 0, load = 0, bit_en = 0;
  logic [7:0] din = 0;
  logic sout, busy, last;
  int checks = 0, failures = 0;

  pai_tx_shift dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (busy) begin failures++; $display("busy after reset"); end
    for (int t = 0; t < 100; t++) begin
      automatic logic [7:0] b = 8'($urandom);
      din = b; load = 1; @(negedge clk); load = 0;
      for (int i = 0; i < 8; i++) begin
        repeat ($urandom % 3) @(negedge clk);
        checks++;
        if (sout !== b[i] || !busy || last != (i == 7)) begin
          failures++; $display("byte %h bit %0d: sout %b busy %b last %b", b, i, sout, busy, last);
        end
        bit_en = 1; @(negedge clk); bit_en = 0;
      end
      checks++; if (busy) begin failures++; $display("still busy after 8 bits"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
