// APB master tasks for testbenches. They expect clk, pclk_en (one clock in
// three, driven by the including testbench), psel, preq and prdata in scope,
// and run setup and enable phases of one pclk_en period each.
task automatic apb_sync();
  do @(negedge clk); while (!pclk_en);
endtask
task automatic apb_write(input logic [15:0] a, input logic [31:0] d);
  apb_sync();
  psel = 1; preq.penable = 0; preq.pwrite = 1; preq.paddr = a; preq.pwdata = d;
  @(negedge clk); apb_sync();
  preq.penable = 1;
  @(negedge clk); apb_sync();
  psel = 0; preq.penable = 0;
endtask
task automatic apb_read(input logic [15:0] a, output logic [31:0] d);
  apb_sync();
  psel = 1; preq.penable = 0; preq.pwrite = 0; preq.paddr = a;
  @(negedge clk); apb_sync();
  preq.penable = 1;
  @(negedge clk); apb_sync();
  d = prdata;
  psel = 0; preq.penable = 0;
endtask
