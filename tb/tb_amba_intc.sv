// tb_amba_intc: programs the interrupt controller over the APB and drives
// random request patterns; for each it checks nIRQ/nFIQ against the enable
// and FIQ-select masks, the status registers and the vector registers
// (lowest pending source number wins), and software-raised requests.
module tb_amba_intc;
  import vnet_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, pclk_en = 0, psel = 0;
  apb_req_t preq = '0;
  logic [31:0] prdata;
  logic [N-1:0] src = 0;
  logic nfiq, nirq;
  int checks = 0, failures = 0, nf = 0, ni = 0;
  int pc = 0;

  amba_intc #(.NSRC(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin pc <= (pc == 2) ? 0 : pc + 1; pclk_en <= (pc == 1); end
  `include "apb_tasks.svh"

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] vec(input logic [N-1:0] s);
    for (int i = 0; i < N; i++) if (s[i]) return 32'h8000_0000 | 32'(i);
    return 0;
  endfunction

  initial begin
    logic [31:0] d;
    logic [N-1:0] en, fs, sw, raw, ist, fst;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_read(16'h08, d);
    checks++; if (d != 1) begin failures++; $display("FIQSEL reset %h", d); end
    checks++; if (!nfiq || !nirq) begin failures++; $display("lines active after reset"); end
    for (int t = 0; t < 200; t++) begin
      en = N'($urandom); fs = N'($urandom); sw = (t % 5 == 0) ? N'($urandom) : '0;
      apb_write(16'h04, 32'(en));
      apb_write(16'h08, 32'(fs));
      apb_write(16'h1C, 32'(sw));
      src = N'($urandom);
      @(negedge clk);
      raw = src | sw; ist = raw & en & ~fs; fst = raw & en & fs;
      checks++;
      if (nirq != !(|ist) || nfiq != !(|fst)) begin
        failures++; $display("lines: src %b en %b fs %b -> nirq %b nfiq %b", src, en, fs, nirq, nfiq);
      end
      if (!nfiq) nf++;
      if (!nirq) ni++;
      apb_read(16'h00, d); checks++; if (d != 32'(raw)) begin failures++; $display("RAW %h", d); end
      apb_read(16'h0C, d); checks++; if (d != 32'(ist)) begin failures++; $display("IRQSTAT %h", d); end
      apb_read(16'h10, d); checks++; if (d != 32'(fst)) begin failures++; $display("FIQSTAT %h", d); end
      apb_read(16'h14, d); checks++; if (d != vec(ist)) begin failures++; $display("IRQVEC %h exp %h", d, vec(ist)); end
      apb_read(16'h18, d); checks++; if (d != vec(fst)) begin failures++; $display("FIQVEC %h exp %h", d, vec(fst)); end
    end
    checks++; if (nf == 0 || ni == 0) begin failures++; $display("a line never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
