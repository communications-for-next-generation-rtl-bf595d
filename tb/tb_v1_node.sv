// tb_v1_node: self-checking test of one version-1 chip, driven pin by pin.
// Normal mode: port A reads port R, port S is driven from latch B, T0/T1
// come from their pins, the token passes. Multicomputer mode: register
// access through port-A write / port-B read, send port and DATA VALID
// driven only with TX DRIVE, token kept with WAIT FOR TOKEN and released,
// selection by header (DATA ACCEPTED follows DATA VALID, T0 raised when the
// header handshake ends, header readable on port A), a data word
// acknowledged through the register, and T0 from the T0/M pin.
module tb_v1_node;
  import scc_comm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic a_wr = 0, b_wr = 0;
  word_t a_wdata = '0, b_wdata = '0, a_rdata, b_rdata, s_data, r_data = '0;
  logic scc_t0, scc_t1, s_oe, dv_out, dv_oe, da_in = 0, t0m = 0, arb_in = 0, arb_out;
  logic select = 0, dv_in = 0, da_out, da_oe, te_out, te_oe, r_en, t1_pin = 0;
  int checks = 0, failures = 0;

  v1_node dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (b_rdata=%h)", what, $time, b_rdata); end
  endtask
  task automatic wcsr(input word_t w);
    @(negedge clk); a_wr = 1; a_wdata = w; @(negedge clk); a_wr = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    v1_csr_t c;
    repeat (2) @(negedge clk); rst_n = 1;
    // normal mode
    r_data = 16'h1357; t1_pin = 1; t0m = 1; #1;
    check(a_rdata == 16'h1357 && scc_t1 && scc_t0, "normal mode: pins straight through");
    t1_pin = 0; t0m = 0;
    @(negedge clk); b_wr = 1; b_wdata = 16'hCAFE; @(negedge clk); b_wr = 0;
    check(s_oe && s_data == 16'hCAFE, "normal mode: latch B on port S");
    arb_in = 1; @(negedge clk); arb_in = 0; check(arb_out, "normal mode: token passes");
    // multicomputer mode
    c = '0; c.mode = 1; c.rfr = 1; wcsr(word_t'(c));
    check(b_rdata == word_t'(c), "register read back on port B");
    check(!s_oe && !dv_oe, "send port high impedance without TX DRIVE");
    c.tx_drive = 1; c.dv_out = 1; wcsr(word_t'(c));
    check(s_oe && dv_oe && dv_out, "TX DRIVE enables send port and DATA VALID");
    da_in = 1; #1; check(b_rdata[7], "DATA ACCEPTED in visible"); da_in = 0;
    c.tx_drive = 0; c.dv_out = 0; c.wait_token = 1; wcsr(word_t'(c));
    @(negedge clk); arb_in = 1; @(negedge clk); arb_in = 0;
    check(b_rdata[5] && !b_rdata[6], "token kept: TOKEN IN set, WAIT cleared");
    check(!arb_out, "kept token not passed");
    c.wait_token = 0; c.token_in = 0; c.rx_active = 1; c.rx_irq = 1;
    wcsr(word_t'(c));
    @(negedge clk); check(arb_out, "token passed one clock after TOKEN IN cleared");
    // selection
    @(negedge clk); r_data = make_hdr0(8'h04); select = 1; dv_in = 1;
    @(negedge clk); check(da_oe && da_out && r_en, "selected: DATA ACCEPTED true");
    check(!scc_t0, "no interrupt during header handshake");
    dv_in = 0; select = 0;
    @(negedge clk); @(negedge clk);
    check(scc_t0 && b_rdata[11] && b_rdata[10], "T0 after header handshake");
    check(a_rdata == make_hdr0(8'h04), "header on port A");
    // data word acknowledged by the kernel
    r_data = 16'h4242; dv_in = 1;
    @(negedge clk); @(negedge clk);
    check(b_rdata[3] && a_rdata == 16'h4242 && !da_out, "word visible, not yet accepted");
    c.da_out = 1; wcsr(word_t'(c));
    check(da_out && da_oe, "kernel DATA ACCEPTED on the pin");
    dv_in = 0;
    c.da_out = 0; c.rx_active = 0; c.rx_irq = 0; wcsr(word_t'(c));
    @(negedge clk);
    check(!da_oe && !te_oe && !scc_t0, "released: lines high impedance, T0 low");
    t0m = 1; #1; check(scc_t0 && b_rdata[8], "T0/M raises T0 in multicomputer mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
