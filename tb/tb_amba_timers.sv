// tb_amba_timers: programs both timers over the APB with different loads and
// prescalers and measures, in clocks, the period between expiry flags against
// (LOAD+1)*(P+1); checks one-shot stop, flag clearing, the interrupt enable,
// and that the two timers run independently.
module tb_amba_timers;
  import vnet_pkg::*;
  logic clk = 0, rst_n = 0, pclk_en = 0, psel = 0;
  apb_req_t preq = '0;
  logic [31:0] prdata;
  logic [1:0] irq;
  int checks = 0, failures = 0, pc = 0, cyc = 0;
  int last_irq [2] = '{-1, -1};
  int period [2] = '{0, 0};
  int nirq [2] = '{0, 0};

  amba_timers #(.NTIMERS(2), .WIDTH(32)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin pc <= (pc == 2) ? 0 : pc + 1; pclk_en <= (pc == 1); end
  `include "apb_tasks.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure periods from the flag's rising edges (flag cleared by the testbench)
  logic [1:0] flag_q = 0;
  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < 2; i++) begin
      if (dut.flag[i] && !flag_q[i]) begin
        if (last_irq[i] >= 0) period[i] = cyc - last_irq[i];
        last_irq[i] = cyc;
        nirq[i]++;
      end
    end
    flag_q <= dut.flag;
  end
  // let n clocks pass, clearing flags as soon as they raise an interrupt
  task automatic run(input int n);
    int t0 = cyc;
    while (cyc - t0 < n) begin
      @(negedge clk);
      if (irq[0]) apb_write(16'h0C, 0);
      if (irq[1]) apb_write(16'h1C, 0);
    end
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // timer 0: load 99, prescale 0 -> 100 clocks; timer 1: load 9, prescale 19 -> 200 clocks
    apb_write(16'h00, 99);
    apb_write(16'h10, 9);
    apb_write(16'h08, 32'h0000_0007);
    apb_write(16'h18, 32'h0013_0007);
    run(2000);
    checks++; if (period[0] != 100) begin failures++; $display("timer0 period %0d", period[0]); end
    checks++; if (period[1] != 200) begin failures++; $display("timer1 period %0d", period[1]); end
    checks++; if (nirq[0] < 15 || nirq[1] < 7) begin failures++; $display("counts %0d %0d", nirq[0], nirq[1]); end
    apb_read(16'h18, d);
    checks++; if (d != 32'h0013_0007) begin failures++; $display("CTRL1 %h", d); end
    // one-shot on timer 0: load 49, prescale 3 -> one flag after 200 clocks, then stops
    apb_write(16'h08, 0);
    apb_write(16'h00, 49);
    nirq[0] = 0;
    apb_write(16'h08, 32'h0003_0005);
    run(1000);
    checks++; if (nirq[0] != 1) begin failures++; $display("one-shot fired %0d times", nirq[0]); end
    apb_read(16'h08, d);
    checks++; if (d[0]) begin failures++; $display("one-shot still enabled"); end
    // interrupt enable off: flag without irq
    apb_write(16'h18, 32'h0000_0003);
    repeat (400) @(negedge clk);
    apb_read(16'h1C, d);
    checks++; if (!d[0] || irq[1]) begin failures++; $display("flag %b irq %b", d[0], irq[1]); end
    apb_read(16'h14, d);
    checks++; if (d > 9) begin failures++; $display("VALUE %0d", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
