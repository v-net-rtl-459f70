// tb_crc32_serial: checks the bit-serial CRC-32 engine against the standard
// check value (CRC-32 of "123456789" is 0xCBF43926) and against an MSB-first
// reference model run on bit-reversed bytes; then sends frames followed by
// their FCS and checks the receive residue, and that a flipped bit breaks it.
module tb_crc32_serial;
  logic clk = 0, rst_n = 0, init = 0, bit_en = 0, bit_in = 0;
  logic [31:0] crc, fcs;
  logic residue_ok;
  int checks = 0, failures = 0;

  crc32_serial dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rev8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction
  function automatic logic [31:0] rev32(input logic [31:0] w);
    for (int i = 0; i < 32; i++) rev32[i] = w[31-i];
  endfunction
  // MSB-first CRC-32 on reflected input, result reflected and complemented
  function automatic logic [31:0] ref_crc(input logic [7:0] d [], input int n);
    logic [31:0] r = 32'hFFFF_FFFF;
    for (int i = 0; i < n; i++) begin
      logic [7:0] b = rev8(d[i]);
      for (int j = 7; j >= 0; j--) begin
        logic fb = r[31] ^ b[j];
        r = {r[30:0], 1'b0} ^ (fb ? 32'h04C1_1DB7 : 32'h0);
      end
    end
    return ~rev32(r);
  endfunction

  task automatic send_bit(input logic b);
    @(negedge clk); bit_en = 1; bit_in = b;
    @(negedge clk); bit_en = 0;
  endtask
  task automatic send_byte(input logic [7:0] b);
    for (int i = 0; i < 8; i++) send_bit(b[i]);
  endtask
  task automatic start();
    @(negedge clk); init = 1; @(negedge clk); init = 0;
  endtask

  logic [7:0] d [];
  logic [31:0] exp_fcs, got;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // standard check value
    d = new[9];
    foreach (d[i]) d[i] = 8'h31 + 8'(i);
    start();
    foreach (d[i]) send_byte(d[i]);
    checks++; if (fcs !== 32'hCBF4_3926) begin failures++; $display("check value %h", fcs); end
    checks++; if (ref_crc(d, 9) !== 32'hCBF4_3926) begin failures++; $display("reference model wrong"); end
    // random frames, FCS and residue
    for (int t = 0; t < 20; t++) begin
      automatic int n = 1 + ($urandom % 40);
      d = new[n];
      foreach (d[i]) d[i] = 8'($urandom);
      exp_fcs = ref_crc(d, n);
      start();
      foreach (d[i]) send_byte(d[i]);
      got = fcs;
      checks++; if (got !== exp_fcs) begin failures++; $display("fcs %h exp %h", got, exp_fcs); end
      for (int i = 0; i < 32; i++) send_bit(got[i]);
      checks++; if (!residue_ok) begin failures++; $display("residue not ok %h", crc); end
      // corrupted frame
      start();
      foreach (d[i]) send_byte(i == 0 ? d[i] ^ 8'h04 : d[i]);
      for (int i = 0; i < 32; i++) send_bit(got[i]);
      checks++; if (residue_ok) begin failures++; $display("corrupted frame passed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
