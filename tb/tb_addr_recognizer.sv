// tb_addr_recognizer: self-checking test of the address recognizer.
// A header for this chip's address and a broadcast header must give a match
// pulse one clock after TRANSMISSION END; another address, or no header at
// all, must give a no_match pulse (FIFO clear) instead.
module tb_addr_recognizer;
  import scc_comm_pkg::*;
  logic clk = 0, rst_n = 0, ld_addr = 0, hdr_wr = 0, trans_end = 0;
  logic [7:0] addr_in = '0, dev_addr;
  word_t hdr_word = '0;
  logic match, no_match, hdr_hit;
  int checks = 0, failures = 0;

  addr_recognizer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic packet(input bit with_hdr, input logic [7:0] dest, input bit exp_match);
    if (with_hdr) begin
      @(negedge clk); hdr_wr = 1; hdr_word = make_hdr0(dest);
      @(negedge clk); hdr_wr = 0;
      check(hdr_hit == exp_match, "hdr_hit during packet");
    end
    @(negedge clk); trans_end = 1;
    @(negedge clk); trans_end = 0;
    check(match == exp_match && no_match == !exp_match, "decision one clock after TRANSMISSION END");
    @(negedge clk);
    check(!match && !no_match, "decision is a pulse");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); ld_addr = 1; addr_in = 8'h2A; @(negedge clk); ld_addr = 0;
    check(dev_addr == 8'h2A, "device address loaded");
    packet(1, 8'h2A, 1);
    packet(1, 8'h2B, 0);
    packet(1, BROADCAST_ADDR, 1);
    packet(0, 8'h00, 0);
    for (int i = 0; i < 20; i++) begin
      logic [7:0] d;
      d = 8'($urandom_range(0, 3)) + 8'h29;
      packet(1, d, d == 8'h2A);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
