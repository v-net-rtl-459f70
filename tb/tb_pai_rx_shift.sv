// tb_pai_rx_shift: shifts in random bytes least significant bit first and
// checks each assembled byte and the single-cycle byte_valid pulse; a clear in
// the middle of a byte must restart the bit count.
module tb_pai_rx_shift;
  logic clk = 0, rst_n = 0, clear = 0, bit_en = 0, sin = 0;
  logic [7:0] dout;
  logic byte_valid;
  int checks = 0, failures = 0, nvalid = 0;

  pai_rx_shift dut (.*);
  always #5 clk = ~clk;
  logic [7:0] at_valid;
  always @(posedge clk) if (byte_valid) begin nvalid++; at_valid = dout; end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic b);
    sin = b; bit_en = 1; @(negedge clk); bit_en = 0; sin = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 100; t++) begin
      automatic logic [7:0] b = 8'($urandom);
      if (t % 10 == 5) begin       // partial byte then clear
        send(1); send(0); send(1);
        clear = 1; @(negedge clk); clear = 0;
      end
      nvalid = 0;
      for (int i = 0; i < 8; i++) send(b[i]);
      @(negedge clk);
      checks++;
      if (nvalid != 1 || at_valid !== b) begin
        failures++; $display("byte %h got %h, %0d valid pulses", b, dout, nvalid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
