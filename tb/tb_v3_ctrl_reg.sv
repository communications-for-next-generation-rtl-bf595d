// tb_v3_ctrl_reg: self-checking test of the FIFO chip's control register.
// Checks bit positions 1,2,4..8 as bits 0,1,3..7, the device-address path
// (bit 15 of the written word), the message-waiting flag set by a match and
// released by writing STOP RECEIVING = 0, and the FIFO-full view of bit 2.
module tb_v3_ctrl_reg;
  import scc_comm_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0, msg_set = 0, fifo_full = 0, err_in = 0, da_in = 0, bg_in = 0;
  word_t wdata = '0, rdata;
  logic mode, dv_out, br_out, msg_wait, stop, release_msg, ld_addr;
  logic [7:0] addr_out;
  int checks = 0, failures = 0, releases = 0;

  v3_ctrl_reg dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (release_msg) releases <= releases + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (rdata=%h)", what, $time, rdata); end
  endtask
  task automatic write(input word_t w);
    @(negedge clk); wr = 1; wdata = w; #1;
    if (w[15]) check(ld_addr && addr_out == w[7:0], "device address strobe");
    @(negedge clk); wr = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check(rdata == 0 && !mode, "reset: normal mode");
    write(16'h00A1);   // MODE, DATA VALID, BUS REQUEST
    check(mode && dv_out && br_out, "writable bits");
    check(rdata == 16'h00A1, "read back");
    err_in = 1; da_in = 1; bg_in = 1; #1;
    check(rdata == 16'h00F9, "inputs at positions 4,5,7");
    err_in = 0; da_in = 0; bg_in = 0;
    write(16'h8033);
    check(mode && dv_out && br_out, "address write leaves register");
    fifo_full = 1; #1; check(stop && rdata[1], "full shows as STOP");
    fifo_full = 0;
    @(negedge clk); msg_set = 1; @(negedge clk); msg_set = 0;
    check(msg_wait && stop && rdata[1], "match sets message waiting");
    write(16'h0003);
    check(msg_wait && releases == 0, "writing 1 keeps the message");
    write(16'h0001);
    check(!msg_wait && releases == 1, "writing 0 releases once");
    write(16'h0001);
    check(releases == 1, "no release without a message");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
