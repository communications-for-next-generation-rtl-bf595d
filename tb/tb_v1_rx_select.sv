// tb_v1_rx_select: self-checking test of the version-1 receive selection.
// Covers: a ready receiver selected by header (DATA ACCEPTED follows DATA
// VALID, header captured, rx_set pulse), kernel-controlled DATA ACCEPTED
// and TRANS. ERROR while active, capture of later words, release; a
// not-ready receiver driving DATA ACCEPTED false until DATA VALID falls;
// a header with bad check bits and an unselected receiver being ignored.
module tb_v1_rx_select;
  import scc_comm_pkg::*;
  logic clk = 0, rst_n = 0, mode = 1, select = 0, dv_in = 0;
  word_t r_data = '0, rx_word;
  logic rfr = 1, rx_active = 0, da_bit = 0, te_bit = 0;
  logic rx_set, irq_set, da_oe, da_val, te_oe, te_val, rx_en;
  int checks = 0, failures = 0;

  v1_rx_select dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (rx_set) rx_active <= 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); check(!da_oe && !te_oe && !rx_en, "quiet after reset");
    // bad check bits: ignored
    r_data = 16'h0100; select = 1; dv_in = 1; #1;
    check(!rx_set, "bad header not selected");
    @(negedge clk); check(!da_oe, "bad header leaves DA high impedance");
    dv_in = 0; select = 0;
    // unselected
    @(negedge clk); r_data = make_hdr0(8'h02); dv_in = 1; select = 0;
    @(negedge clk); check(!da_oe, "unselected stays high impedance");
    dv_in = 0;
    // selected and ready
    @(negedge clk); r_data = make_hdr0(8'h01); select = 1; dv_in = 1; #1;
    check(rx_set, "rx_set on selection");
    @(negedge clk); check(da_oe && da_val, "DA true for header");
    check(rx_word == make_hdr0(8'h01), "header captured");
    check(!irq_set, "no interrupt during header handshake");
    dv_in = 0; select = 0; r_data = 16'h1234; #1;
    check(irq_set, "interrupt when header DATA VALID falls");
    @(negedge clk); check(da_oe && !da_val, "DA follows kernel bit (0)");
    check(te_oe && rx_en, "TE driven and port enabled while active");
    dv_in = 1; @(negedge clk); @(negedge clk);
    check(rx_word == 16'h1234, "word captured at DV rise");
    da_bit = 1; #1; check(da_val, "DA follows kernel bit (1)");
    te_bit = 1; #1; check(te_val, "TE follows kernel bit");
    te_bit = 0; da_bit = 0; dv_in = 0;
    // a header-like word while active is not a new selection
    @(negedge clk); r_data = make_hdr0(8'h01); select = 1; dv_in = 1; #1;
    check(!rx_set, "no reselection while active");
    @(negedge clk); dv_in = 0; select = 0;
    rx_active = 0;
    @(negedge clk); @(negedge clk); check(!da_oe && !te_oe, "released by kernel");
    // not ready
    rfr = 0;
    @(negedge clk); r_data = make_hdr0(8'h01); select = 1; dv_in = 1; #1;
    check(!rx_set, "not ready: no interrupt");
    @(negedge clk); check(da_oe && !da_val, "not ready: DA false");
    @(negedge clk); check(da_oe && !da_val, "not ready: DA held false");
    dv_in = 0; select = 0;
    @(negedge clk); check(!da_oe, "not ready: released after DV falls");
    // normal mode
    mode = 0; rfr = 1;
    @(negedge clk); select = 1; dv_in = 1; #1; check(!rx_set, "normal mode inactive");
    @(negedge clk); check(!da_oe, "normal mode high impedance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
