// v1_token_arb: daisy-chain arbitration logic of the version-1 chip.
//
// The send ports on one bus have their ARBITRATION IN and OUT pins strung in
// a ring that carries a single token pulse. When the pulse arrives and the
// kernel has set WAIT FOR TOKEN, the logic keeps the token: it sets TOKEN IN
// and clears WAIT FOR TOKEN (through the control-status register). Otherwise
// the pulse is passed straight on. When the kernel later clears TOKEN IN,
// the pulse is sent on to the next chip. This follows the design; passing the
// pulse one clock later (instead of through a wire) is this design's choice,
// so that a ring of chips contains no combinational loop. Outside
// multicomputer mode the token is passed on unconditionally.
//
// Interface: arb_in/arb_out are one-clock pulses. token_set is a one-clock
// request to the register. Latency: arrival to arb_out is one clock; release
// (TOKEN IN falling) to arb_out is one clock.
module v1_token_arb (
  input  logic clk,
  input  logic rst_n,
  input  logic mode,
  input  logic arb_in,
  input  logic wait_token,
  input  logic token_in,
  output logic token_set,
  output logic arb_out
);

  logic token_q;   // TOKEN IN one clock ago

  assign token_set = mode && arb_in && wait_token && !token_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      token_q <= 1'b0;
      arb_out <= 1'b0;
    end else begin
      token_q <= token_in;
      arb_out <= (arb_in && !token_set) || (token_q && !token_in);
    end
  end

endmodule
