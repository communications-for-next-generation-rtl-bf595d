// tb_v1_token_arb: self-checking test of the daisy-chain token logic.
// A token arriving with WAIT FOR TOKEN clear must leave on ARBITRATION OUT
// exactly one clock later; with the flag set it must be kept (token_set) and
// leave one clock after TOKEN IN is cleared; outside multicomputer mode it
// always passes.
module tb_v1_token_arb;
  logic clk = 0, rst_n = 0, mode = 1, arb_in = 0, wait_token = 0, token_in = 0;
  logic token_set, arb_out;
  int checks = 0, failures = 0;

  v1_token_arb dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // model of the two register bits
  always_ff @(posedge clk) if (token_set) begin token_in <= 1; wait_token <= 0; end

  task automatic pulse();
    @(negedge clk); arb_in = 1; #1; @(negedge clk); arb_in = 0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // pass through
    @(negedge clk); arb_in = 1; #1; check(token_set == 0, "no capture without wait flag");
    @(negedge clk); arb_in = 0; check(arb_out == 1, "passed one clock later");
    @(negedge clk); check(arb_out == 0, "one-clock pulse");
    // capture
    wait_token = 1;
    @(negedge clk); arb_in = 1; #1; check(token_set == 1, "captured with wait flag");
    @(negedge clk); arb_in = 0; check(arb_out == 0, "not passed when kept");
    check(token_in == 1 && wait_token == 0, "TOKEN IN set, wait cleared");
    repeat (5) begin @(negedge clk); check(arb_out == 0, "held while TOKEN IN"); end
    token_in = 0;
    @(negedge clk); check(arb_out == 1, "released one clock after TOKEN IN clears");
    @(negedge clk); check(arb_out == 0, "release pulse one clock");
    // normal mode
    mode = 0; wait_token = 1;
    @(negedge clk); arb_in = 1; #1; check(token_set == 0, "normal mode never keeps");
    @(negedge clk); arb_in = 0; check(arb_out == 1, "normal mode passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
