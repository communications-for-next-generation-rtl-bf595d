// tb_rx_ctrl: self-checking test of the receiver control logic.
// Drives a transmitter-side four-phase handshake and checks: DATA ACCEPTED
// one clock after DATA VALID and a single FIFO write per word; DATA ACCEPTED
// withheld while STOP RECEIVING; a header with bad check bits refused with
// ERROR IN TRANS. and nothing stored; words of a packet for another chip
// acknowledged but not stored; nothing driven in normal mode.
module tb_rx_ctrl;
  import scc_comm_pkg::*;
  logic clk = 0, rst_n = 0, mode = 1, dv_in = 0, stop = 0, for_me = 1, pkt_start = 0;
  word_t r_data = '0;
  logic fifo_wr, hdr_wr, da_val, err_val, hs_oe, refused;
  int checks = 0, failures = 0, writes = 0, hdrs = 0;

  rx_ctrl dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (fifo_wr) writes <= writes + 1;
    if (hdr_wr)  hdrs   <= hdrs + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // returns 1 if accepted, 0 if error
  task automatic send(input word_t w, output bit acc);
    int n;
    @(negedge clk); r_data = w; dv_in = 1;
    n = 0;
    while (!da_val && !err_val) begin @(negedge clk); n++; end
    acc = da_val;
    dv_in = 0;
    @(negedge clk);
    check(!da_val && !err_val, "handshake lines fall after DV");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit acc;
    int w0;
    repeat (2) @(negedge clk); rst_n = 1;
    check(hs_oe, "lines driven in multicomputer mode");
    // bad header refused
    send(16'h0500, acc); check(!acc, "bad header refused with error");
    check(writes == 0, "refused word not stored");
    // good header then words
    send(make_hdr0(8'h05), acc); check(acc, "header accepted");
    check(hdrs == 1 && writes == 1, "header stored once");
    for (int i = 0; i < 5; i++) begin send(16'(i), acc); check(acc, "body word accepted"); end
    check(writes == 6, "one write per word");
    // stop receiving stalls
    stop = 1;
    @(negedge clk); r_data = 16'h7777; dv_in = 1;
    repeat (10) begin @(negedge clk); check(!da_val, "DA withheld while stopped"); end
    w0 = writes; stop = 0;
    @(negedge clk); check(da_val, "DA after stop clears");
    check(writes == w0 + 1, "stalled word stored once");
    dv_in = 0; @(negedge clk);
    // packet for someone else: acked, not stored
    for_me = 0;
    w0 = writes;
    for (int i = 0; i < 3; i++) begin send(16'(i), acc); check(acc, "foreign word acknowledged"); end
    check(writes == w0, "foreign words not stored");
    // new packet starts with a header again
    @(negedge clk); pkt_start = 1; @(negedge clk); pkt_start = 0;
    send(make_hdr0(8'h09), acc); check(acc && hdrs == 2, "next packet header");
    mode = 0; #1; check(!hs_oe, "normal mode: lines high impedance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
