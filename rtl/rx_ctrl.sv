// rx_ctrl: receiver control logic of the upgraded chip with FIFO.
//
// Receives a packet word by word from port R into the FIFO with a
// four-phase handshake: the transmitter raises DATA VALID, the receiver
// stores the word and raises DATA ACCEPTED, the transmitter drops DATA
// VALID, the receiver drops DATA ACCEPTED. DATA ACCEPTED of all receivers
// on a bus is wired-AND, so a word completes only when every receiver has
// it. The receiver withholds DATA ACCEPTED while STOP RECEIVING is set (FIFO
// full, or a received message still waits for the SCC), which stalls the
// transmitter. These points follow the design.
//
// Choices of this design: the first word of a packet whose check bits are
// wrong is refused with ERROR IN TRANS. (raised instead of DATA ACCEPTED
// until DATA VALID falls; the transmitter then resends it); once the header
// shows that the packet is for another module, later words are acknowledged
// but not stored, so that packets longer than the FIFO cannot block the bus;
// the handshake lines are driven only in multicomputer mode.
//
// Interface: fifo_wr/hdr_wr are one-clock strobes (hdr_wr marks the first
// word of a packet). for_me is the recognizer's view of the captured header.
// pkt_start (TRANSMISSION END or a FIFO clear) marks the next word as a
// header. DATA ACCEPTED rises one clock after DATA VALID and falls one
// clock after DATA VALID falls.
module rx_ctrl
  import scc_comm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mode,
  input  logic  dv_in,
  input  word_t r_data,
  input  logic  stop,
  input  logic  for_me,
  input  logic  pkt_start,
  output logic  fifo_wr,
  output logic  hdr_wr,
  output logic  da_val,
  output logic  err_val,
  output logic  hs_oe,
  output logic  refused
);

  typedef enum logic [1:0] {R_IDLE, R_ACK, R_ERR} rstate_t;
  rstate_t state;
  logic    first;
  logic    take;

  assign take    = mode && (state == R_IDLE) && dv_in && !stop;
  assign refused = take && first && !hdr0_ok(r_data);
  assign hdr_wr  = take && first && hdr0_ok(r_data);
  assign fifo_wr = hdr_wr || (take && !first && for_me);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= R_IDLE;
      first <= 1'b1;
    end else begin
      if (pkt_start)   first <= 1'b1;
      else if (hdr_wr) first <= 1'b0;
      unique case (state)
        R_IDLE:  if (refused) state <= R_ERR;
                 else if (take) state <= R_ACK;
        R_ACK:   if (!dv_in) state <= R_IDLE;
        R_ERR:   if (!dv_in) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

  assign da_val  = (state == R_ACK);
  assign err_val = (state == R_ERR);
  assign hs_oe   = mode;

endmodule
