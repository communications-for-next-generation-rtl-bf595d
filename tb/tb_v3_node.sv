// tb_v3_node: self-checking test of one chip with FIFO. The SCC side is the
// behavioural kernel (v3_scc_model); the test bench plays arbitrator,
// remote receiver and remote transmitter on the pins. Checks normal mode
// (port A reads port R, T0/T1 from pins), the transmit side (bus request,
// nothing driven before the grant, each word handshaken, request dropped at
// the end), the receive side (packet for this chip stored and delivered to
// the SCC after TRANSMISSION END, STOP RECEIVING until released), a foreign
// packet cleared from the FIFO, and a bad header refused with an error.
module tb_v3_node;
  import scc_comm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic a_wr, a_rd, b_wr;
  word_t a_wdata, b_wdata, a_rdata, b_rdata, s_data, r_data = '0;
  logic scc_t0, scc_t1, s_oe, dv_out, dv_oe, da_in = 0, err_in = 0, br_out, bg_in = 0;
  logic dv_in = 0, da_out, err_out, rhs_oe, trans_end = 0, t0_pin = 0, t1_pin = 0, refused, fifo_valid;
  logic [7:0] dev_addr;
  word_t got [$];
  int checks = 0, failures = 0;

  v3_node dut (.*);
  v3_scc_model k (.clk, .a_wr, .a_wdata, .a_rd, .a_rdata, .b_wr, .b_wdata, .b_rdata, .t0(scc_t0), .t1(scc_t1));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // remote transmitter on port R; returns 1 if the word was accepted
  task automatic rsend(input word_t w, output bit acc);
    @(negedge clk); r_data = w; dv_in = 1;
    while (!da_out && !err_out) @(negedge clk);
    acc = da_out; dv_in = 0;
    while (da_out || err_out) @(negedge clk);
  endtask
  task automatic tend();
    @(negedge clk); trans_end = 1; @(negedge clk); trans_end = 0;
  endtask

  // arbitrator and remote receiver for port S
  always @(negedge clk) begin
    bg_in <= br_out;
    da_in <= dv_oe && dv_out;
    if (dv_oe && dv_out && !da_in) got.push_back(s_data);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t body [$];
    bit ok, acc;
    repeat (2) @(negedge clk); rst_n = 1;
    r_data = 16'h2468; t0_pin = 1; t1_pin = 1; #1;
    check(a_rdata == 16'h2468 && scc_t0 && scc_t1, "normal mode straight through");
    t0_pin = 0; t1_pin = 0;
    k.init(8'h42);
    check(dev_addr == 8'h42 && b_rdata[0], "address loaded, multicomputer mode");
    check(!s_oe && !dv_oe, "send lines high impedance without grant");
    // transmit
    body = '{16'h0A0A, 16'h0B0B, 16'h0C0C};
    k.send(8'h07, body, ok);
    check(ok, "packet sent");
    check(got.size() >= 6, "all words seen on port S");
    if (got.size() >= 6) begin
      check(got[0] == make_hdr0(8'h07), "header word");
      check(got[1] == {8'h42, 8'd3}, "sender and length");
      check(got[2] == 16'h0A0A && got[4] == 16'h0C0C, "body");
      check(got[5] == (got[0] ^ got[1] ^ got[2] ^ got[3] ^ got[4]), "check word");
    end
    check(!br_out, "request dropped after the packet");
    // receive a packet for this chip
    rsend(make_hdr0(8'h42), acc); check(acc, "header accepted");
    rsend({8'h09, 8'd2}, acc);
    rsend(16'h1111, acc);
    rsend(16'h2222, acc);
    rsend(make_hdr0(8'h42) ^ {8'h09, 8'd2} ^ 16'h1111 ^ 16'h2222, acc);
    check(acc && b_rdata[15:8] == 8'd5, "five words in the FIFO");
    k.hold_rx = 1;
    tend();
    @(negedge clk);
    check(scc_t0 && b_rdata[1], "T0 and STOP RECEIVING after TRANSMISSION END");
    // the next packet's header (for another chip) is held off
    @(negedge clk); r_data = make_hdr0(8'h43); dv_in = 1;
    repeat (20) @(negedge clk);
    check(!da_out && !err_out, "no DATA ACCEPTED while a message waits");
    k.hold_rx = 0;
    while (!da_out) @(negedge clk);
    dv_in = 0;
    while (da_out) @(negedge clk);
    check(k.msgs_rx == 1 && k.lrc_errors == 0, "message delivered to the SCC");
    check(k.inbox.size() == 2 && k.inbox[0] == 16'h1111 && k.inbox[1] == 16'h2222, "body delivered");
    // rest of the foreign packet
    rsend({8'h09, 8'd1}, acc); rsend(16'h7777, acc);
    check(acc, "foreign words acknowledged");
    check(b_rdata[15:8] == 8'd1, "only the header of a foreign packet is stored");
    tend(); repeat (3) @(negedge clk);
    check(b_rdata[15:8] == 0 && !scc_t0, "foreign packet cleared, no interrupt");
    // bad header
    rsend(16'h4200, acc);
    check(!acc, "bad header refused with ERROR IN TRANS.");
    rsend(make_hdr0(8'hFF), acc); check(acc, "resent header accepted (broadcast)");
    rsend({8'h09, 8'd0}, acc); rsend(make_hdr0(8'hFF) ^ {8'h09, 8'd0}, acc);
    tend(); repeat (20) @(negedge clk);
    check(k.msgs_rx == 2, "broadcast delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
