// tb_pai_tsf: checks the TSF counter's rate for several prescaler values
// (one count every presc+1 clocks), that it holds when disabled, that loads
// of either half take effect, and the carry from the low to the high half.
module tb_pai_tsf;
  logic clk = 0, rst_n = 0, enable = 0, load_lo = 0, load_hi = 0;
  logic [15:0] presc = 0;
  logic [31:0] load_val = 0;
  logic [63:0] tsf, t0;
  logic tick;
  int checks = 0, failures = 0;

  pai_tsf #(.PRESC_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
  end
  int presc_list [4] = '{0, 1, 4, 19};
  initial begin
    #1;
    wait (rst_n); @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      presc = 16'(presc_list[k]);
      load_val = 0; load_lo = 1; load_hi = 1; @(negedge clk); load_lo = 0; load_hi = 0;
      enable = 1;
      repeat (1000) @(negedge clk);
      enable = 0;
      checks++;
      if (tsf != 64'(1000 / (presc_list[k] + 1))) begin
        failures++; $display("presc %0d: %0d counts in 1000 clocks", presc_list[k], tsf);
      end
      t0 = tsf;
      repeat (50) @(negedge clk);
      checks++; if (tsf != t0) begin failures++; $display("counted while disabled"); end
    end
    // carry into the high half
    presc = 0;
    load_val = 32'hFFFF_FFFE; load_lo = 1; @(negedge clk); load_lo = 0;
    load_val = 32'h0000_0007; load_hi = 1; @(negedge clk); load_hi = 0;
    checks++; if (tsf != 64'h0000_0007_FFFF_FFFE) begin failures++; $display("load %h", tsf); end
    enable = 1; repeat (3) @(negedge clk); enable = 0;
    checks++; if (tsf != 64'h0000_0008_0000_0001) begin failures++; $display("carry %h", tsf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
