// tb_v1_csr: self-checking test of the version-1 control-status register.
// Checks full-word writes of the writable bits, the read-only live bits,
// TOKEN IN set / WAIT FOR TOKEN clear by hardware, write-0-to-clear of the
// hardware-set bits, and that writing 1 leaves them unchanged.
module tb_v1_csr;
  import scc_comm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr = 0, hw_token_set = 0, hw_rx_set = 0, hw_irq_set = 0, dv_in = 0, da_in = 0, te_in = 0;
  word_t wdata = '0, rdata;
  v1_csr_t csr;
  int checks = 0, failures = 0;

  v1_csr dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (rdata=%h)", what, rdata); end
  endtask
  task automatic write(input word_t w);
    @(negedge clk); wr = 1; wdata = w; @(negedge clk); wr = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check(rdata == 16'h0000, "reset value");
    // writable bits: mode(15) tx_drive(9) wait(6) dv_out(4) te_out(2) da_out(1) rfr(0)
    write(16'h8257);
    check(rdata == 16'h8257, "writable bits stored");
    check(csr.mode && csr.tx_drive && csr.wait_token && csr.dv_out && csr.te_out && csr.da_out && csr.rfr, "struct view");
    write(16'hFFFF);
    check(rdata == 16'h8257, "read-only and hw bits not writable to 1");
    // live inputs
    dv_in = 1; da_in = 1; te_in = 1; #1;
    check(rdata == (16'h8257 | 16'h0188), "live pins visible");
    dv_in = 0; da_in = 0; te_in = 0;
    // token capture
    @(negedge clk); hw_token_set = 1; @(negedge clk); hw_token_set = 0;
    check(rdata[5] == 1 && rdata[6] == 0, "token set, wait cleared");
    write(16'h8257 | 16'h0020);
    check(rdata[5] == 1, "writing 1 keeps TOKEN IN");
    write(16'h8257);
    check(rdata[5] == 0, "writing 0 clears TOKEN IN");
    // receive set
    @(negedge clk); hw_rx_set = 1; @(negedge clk); hw_rx_set = 0;
    check(rdata[10] && !rdata[11], "rx active set alone");
    @(negedge clk); hw_irq_set = 1; @(negedge clk); hw_irq_set = 0;
    check(rdata[10] && rdata[11], "rx irq set");
    write(16'h8000 | 16'h0400);
    check(rdata[10] && !rdata[11], "irq cleared, active kept");
    check(rdata[0] == 0 && rdata[9] == 0, "rfr and tx_drive cleared by write");
    // hw set wins over simultaneous clear
    @(negedge clk); wr = 1; wdata = 16'h8000; hw_rx_set = 1; hw_irq_set = 1; @(negedge clk); wr = 0; hw_rx_set = 0; hw_irq_set = 0;
    check(rdata[10] && rdata[11], "hardware set wins");
    rst_n = 0; @(negedge clk); rst_n = 1;
    check(rdata == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
