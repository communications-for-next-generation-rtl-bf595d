// v1_node: communication logic of the version-1 upgraded single chip
// computer (the logic that surrounds an existing SCC core).
//
// The SCC keeps its two bidirectional ports A and B and its interrupts T0
// and T1; the added logic turns them into a send port S and a receive port
// R plus 8 extra pins: SELECT, DATA VALID / DATA ACCEPTED on each side,
// TRANS. ERROR and ARBITRATE IN / OUT. It has three parts, as in the design:
// the daisy-chain arbitration logic (v1_token_arb), the control-status
// register (v1_csr) and the receive selection logic (v1_rx_select).
// Port usage (after the block diagram):
//   port-B write -> latch B -> port S         port-B read -> register
//   port-A read  <- receive word (port R)     port-A write -> register
// Words are sent and received with a double handshake per word (DATA VALID,
// DATA ACCEPTED) carried out by the kernel through the register bits.
//
// After reset MODE = 0: the chip behaves like the plain SCC (port A reads
// port R directly, port S always driven, T0/T1 from their pins, token passed
// on). With MODE = 1 the send port and DATA VALID out are driven only while
// TX DRIVE is set (the kernel sets it once it holds the token), and T0 is
// raised by the receive selection (RX IRQ) or by the T0/M pin, which carries
// the receivers' TRANS. ERROR back to the sender. The mode switch and the
// T0 combination are this design's choices.
//
// Three-state pins are given as value plus enable (*_oe). The SCC strobes
// are one clock wide; register and latch writes take effect on the next clock.
module v1_node
  import scc_comm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // SCC side
  input  logic  a_wr,
  input  word_t a_wdata,
  output word_t a_rdata,
  input  logic  b_wr,
  input  word_t b_wdata,
  output word_t b_rdata,
  output logic  scc_t0,
  output logic  scc_t1,
  // sender pins
  output word_t s_data,
  output logic  s_oe,
  output logic  dv_out,
  output logic  dv_oe,
  input  logic  da_in,
  input  logic  t0m,
  input  logic  arb_in,
  output logic  arb_out,
  // receiver pins
  input  word_t r_data,
  input  logic  select,
  input  logic  dv_in,
  output logic  da_out,
  output logic  da_oe,
  output logic  te_out,
  output logic  te_oe,
  output logic  r_en,
  // pass-through interrupt pin
  input  logic  t1_pin
);

  v1_csr_t csr;
  word_t   latch_b;
  word_t   rx_word;
  logic    token_set;
  logic    rx_set;
  logic    irq_set;

  v1_csr u_csr (
    .clk, .rst_n,
    .wr           (a_wr),
    .wdata        (a_wdata),
    .hw_token_set (token_set),
    .hw_rx_set    (rx_set),
    .hw_irq_set   (irq_set),
    .dv_in        (dv_in),
    .da_in        (da_in),
    .te_in        (t0m),
    .csr          (csr),
    .rdata        (b_rdata)
  );

  v1_token_arb u_arb (
    .clk, .rst_n,
    .mode       (csr.mode),
    .arb_in     (arb_in),
    .wait_token (csr.wait_token),
    .token_in   (csr.token_in),
    .token_set  (token_set),
    .arb_out    (arb_out)
  );

  v1_rx_select u_sel (
    .clk, .rst_n,
    .mode      (csr.mode),
    .select    (select),
    .dv_in     (dv_in),
    .r_data    (r_data),
    .rfr       (csr.rfr),
    .rx_active (csr.rx_active),
    .da_bit    (csr.da_out),
    .te_bit    (csr.te_out),
    .rx_set    (rx_set),
    .irq_set   (irq_set),
    .da_oe     (da_oe),
    .da_val    (da_out),
    .te_oe     (te_oe),
    .te_val    (te_out),
    .rx_en     (r_en),
    .rx_word   (rx_word)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) latch_b <= '0;
    else if (b_wr) latch_b <= b_wdata;
  end

  assign s_data  = latch_b;
  assign s_oe    = csr.mode ? csr.tx_drive : 1'b1;
  assign dv_out  = csr.dv_out;
  assign dv_oe   = csr.mode && csr.tx_drive;
  assign a_rdata = csr.mode ? rx_word : r_data;
  assign scc_t0  = csr.mode ? (csr.rx_irq || t0m) : t0m;
  assign scc_t1  = t1_pin;

endmodule
