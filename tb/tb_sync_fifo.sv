// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, full/empty/count, that pushes into a full FIFO and pops from an
// empty one are ignored, and clear.
module tb_sync_fifo;
  localparam int W = 8, D = 8;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [W-1:0] din = 0, dout;
  logic full, empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  int nfull = 0, nempty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
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
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // compare state with the model
      checks++;
      if (count != ($clog2(D)+1)'(q.size()) || full != (q.size() == D) || empty != (q.size() == 0) ||
          (q.size() > 0 && dout != q[0])) begin
        failures++;
        $display("t=%0d count %0d model %0d dout %h", t, count, q.size(), dout);
      end
      if (full) nfull++;
      if (empty) nempty++;
      clear = (t % 997 == 996);
      // bias towards filling in the first half of each 200-cycle window
      push = ((t % 200) < 100) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      pop  = ((t % 200) < 100) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      din  = W'($urandom);
      @(posedge clk);
      if (clear) q.delete();
      else begin
        automatic logic was_full = (q.size() == D);
        automatic logic was_empty = (q.size() == 0);
        if (pop && !was_empty) void'(q.pop_front());
        if (push && !was_full) q.push_back(din);
      end
    end
    checks++; if (nfull == 0 || nempty == 0) begin failures++; $display("full/empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
