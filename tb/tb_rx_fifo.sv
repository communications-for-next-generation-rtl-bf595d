// tb_rx_fifo: self-checking test of the receive FIFO at its full size
// (63-word array plus output register). A queue is the reference: random
// writes and reads are compared word by word; the FIFO must take exactly 64
// words before it reports full, refuse a 65th, keep order across the
// wrap of the address counters, and empty on clear.
module tb_rx_fifo;
  logic clk = 0, rst_n = 0, clr = 0, wr = 0, rd = 0;
  logic [15:0] wdata = '0, dout;
  logic out_valid, full;
  logic [6:0] count;
  logic [15:0] q[$];
  int checks = 0, failures = 0;

  rx_fifo #(.DEPTH(63), .W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one clock with the given strobes; the reference follows what is accepted
  task automatic step(input bit w, input bit r, input logic [15:0] d);
    @(negedge clk);
    wr = w; rd = r; wdata = d;
    if (r && out_valid) begin
      check(dout == q[0], "output word in order");
      void'(q.pop_front());
    end
    if (w && !full) q.push_back(d);
    @(negedge clk);
    wr = 0; rd = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); check(!out_valid && !full && count == 0, "empty after reset");
    // fill
    for (int i = 0; i < 70; i++) step(1, 0, 16'(i * 7 + 1));
    @(negedge clk);
    check(count == 64, "holds 64 words (63 + output register)");
    check(full, "full at 64");
    check(q.size() == 64, "reference took 64");
    // drain fully
    while (q.size() > 0) step(0, 1, '0);
    @(negedge clk); @(negedge clk);
    check(!out_valid && count == 0, "empty after drain");
    // random traffic across the counter wrap
    for (int i = 0; i < 3000; i++) step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), 16'($urandom));
    @(negedge clk); @(negedge clk);
    check(count == 7'(q.size()), "count matches reference");
    // clear
    @(negedge clk); clr = 1; @(negedge clk); clr = 0; q.delete();
    @(negedge clk); check(!out_valid && count == 0 && !full, "cleared");
    step(1, 0, 16'hBEEF); @(negedge clk); @(negedge clk);
    check(out_valid && dout == 16'hBEEF, "first word after clear at output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
