// v1_csr: control-status register of the version-1 upgraded chip.
//
// The register sits between the SCC's two internal ports and the added
// communication pins. Following the block diagram of the chip, the SCC
// writes it with a port-A write (port A's output direction is otherwise
// unused, since port A only receives) and reads it with a port-B read (port
// B only sends). The field names are those of the drawing: READY FOR
// RECEIVING, DATA ACCEPTED, TRANS. ERROR and DATA VALID? on the receiver
// side; DATA VALID, TOKEN IN and WAIT FOR TOKEN on the sender side. The bit
// positions, the MODE / TX DRIVE / RX ACTIVE / RX IRQ bits and the
// write-0-to-clear rule for hardware-set bits are this design's choices.
//
// Interface: wr/wdata load the register (full-word write, one clock);
// hw_token_set sets TOKEN IN and clears WAIT FOR TOKEN (token captured);
// hw_rx_set sets RX ACTIVE (receiver selected); hw_irq_set sets RX IRQ
// (header handshake complete). dv_in, da_in and
// te_in are live pin values shown in the read-only bits. rdata is
// combinational. A hardware set in the same cycle as a write wins.
module v1_csr
  import scc_comm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    wr,
  input  word_t   wdata,
  input  logic    hw_token_set,
  input  logic    hw_rx_set,
  input  logic    hw_irq_set,
  input  logic    dv_in,
  input  logic    da_in,
  input  logic    te_in,
  output v1_csr_t csr,
  output word_t   rdata
);

  v1_csr_t r;
  v1_csr_t w;

  assign w = v1_csr_t'(wdata);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r <= '0;
    end else begin
      if (wr) begin
        r.mode       <= w.mode;
        r.tx_drive   <= w.tx_drive;
        r.wait_token <= w.wait_token;
        r.dv_out     <= w.dv_out;
        r.te_out     <= w.te_out;
        r.da_out     <= w.da_out;
        r.rfr        <= w.rfr;
        r.token_in   <= r.token_in  & w.token_in;
        r.rx_active  <= r.rx_active & w.rx_active;
        r.rx_irq     <= r.rx_irq    & w.rx_irq;
      end
      if (hw_token_set) begin
        r.token_in   <= 1'b1;
        r.wait_token <= 1'b0;
      end
      if (hw_rx_set)  r.rx_active <= 1'b1;
      if (hw_irq_set) r.rx_irq    <= 1'b1;
    end
  end

  always_comb begin
    csr       = r;
    csr.rsvd  = '0;
    csr.dv_in = dv_in;
    csr.da_in = da_in;
    csr.te_in = te_in;
  end

  assign rdata = word_t'(csr);

endmodule
