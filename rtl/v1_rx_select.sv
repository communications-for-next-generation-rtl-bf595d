// v1_rx_select: receive selection logic of the version-1 chip.
//
// The SELECT input of each receiver is wired to one line of the sender's
// data bus, so the first word of a message (receiver mask plus check bits)
// picks the receivers. While idle, a receiver is selected when SELECT and
// DATA VALID are high and the word on port R carries valid check bits. A
// selected receiver then drives its three-state DATA ACCEPTED line, which
// is wired-AND with the other receivers on the bus:
//   * READY FOR RECEIVING set: DATA ACCEPTED follows DATA VALID for the
//     header word, the header is captured, RX ACTIVE and RX IRQ are set
//     (T0 interrupt to the kernel), and after DATA VALID falls the line
//     follows the kernel's DATA ACCEPTED bit until the kernel clears RX
//     ACTIVE, which returns the lines to high impedance;
//   * flag clear: DATA ACCEPTED is driven false until DATA VALID falls.
// Selecting by a data line, the wired-AND and the answer by the READY FOR
// RECEIVING flag follow the design. The hardware acknowledge of the header
// and the check-bit qualification of SELECT are this design's choices; in
// the design the kernel does both.
//
// rx_word holds the header after selection and, while active, the word on
// port R at each rising edge of DATA VALID. Three-state outputs are given as
// value plus enable (da_oe, te_oe). One clock from select to response.
module v1_rx_select
  import scc_comm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mode,
  input  logic  select,
  input  logic  dv_in,
  input  word_t r_data,
  input  logic  rfr,
  input  logic  rx_active,
  input  logic  da_bit,
  input  logic  te_bit,
  output logic  rx_set,
  output logic  irq_set,
  output logic  da_oe,
  output logic  da_val,
  output logic  te_oe,
  output logic  te_val,
  output logic  rx_en,
  output word_t rx_word
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_NACK, S_ACTIVE} state_t;
  state_t state;
  logic   dv_q;
  logic   sel_evt;

  assign sel_evt = mode && (state == S_IDLE) && select && dv_in && hdr0_ok(r_data);
  assign rx_set  = sel_evt && rfr;
  assign irq_set = (state == S_HDR) && !dv_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      dv_q    <= 1'b0;
      rx_word <= '0;
    end else begin
      dv_q <= dv_in;
      unique case (state)
        S_IDLE: if (sel_evt) begin
          state <= rfr ? S_HDR : S_NACK;
          if (rfr) rx_word <= r_data;
        end
        S_HDR:    if (!dv_in) state <= S_ACTIVE;
        S_NACK:   if (!dv_in) state <= S_IDLE;
        S_ACTIVE: begin
          if (!rx_active) state <= S_IDLE;
          else if (dv_in && !dv_q) rx_word <= r_data;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    da_oe  = (state != S_IDLE);
    rx_en  = (state == S_HDR) || (state == S_ACTIVE);
    te_oe  = (state == S_ACTIVE);
    te_val = te_bit;
    unique case (state)
      S_HDR:    da_val = dv_in;
      S_ACTIVE: da_val = da_bit;
      default:  da_val = 1'b0;
    endcase
  end

endmodule
