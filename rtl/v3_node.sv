// v3_node: communication logic of the upgraded single chip computer with a
// receive FIFO (the logic that surrounds an existing dual-port SCC core).
//
// Port S transmits and port R receives. Transmission is under program
// control: the kernel raises BUS REQUEST, waits for BUS GRANT, then writes
// each word to port B (latch B drives port S) and handshakes it with the
// DATA VALID bit and the DATA ACCEPTED / ERROR IN TRANS. inputs of the
// control register, resending a word that draws an error. Reception is in
// hardware: the receiver control logic (rx_ctrl) stores every word of every
// packet on the bus into the 63x16 FIFO with its output register (rx_fifo),
// and at TRANSMISSION END the address recognizer (addr_recognizer) either
// interrupts the SCC (T0) to ship the message out of the FIFO with READ
// PULSEs on port A, or clears the FIFO. While a received message waits, STOP
// RECEIVING holds off the bus; the SCC writes STOP RECEIVING = 0 when done,
// which also clears what is left in the FIFO. This structure follows the
// design.
//
// Mode: after reset MODE = 0 (normal mode): port A reads port R directly,
// port S is always driven, T0/T1 come from their pins. MODE = 1 is
// multicomputer mode: port S and DATA VALID are driven only while BUS GRANT
// is high (three-state otherwise), T1 carries TRANSMISSION END and T0 the
// message-waiting flag. The T0 use, the port-A register path and the
// ignoring of the FIFO in normal mode are this design's choices.
//
// A port-B read returns the control register in bits 7:0 and the number of
// words held in the FIFO in bits 15:8, so the SCC can poll it.
// Three-state pins are value plus enable. SCC strobes are one clock wide.
module v3_node
  import scc_comm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 63
) (
  input  logic  clk,
  input  logic  rst_n,
  // SCC side
  input  logic  a_wr,
  input  word_t a_wdata,
  input  logic  a_rd,
  output word_t a_rdata,
  input  logic  b_wr,
  input  word_t b_wdata,
  output word_t b_rdata,
  output logic  scc_t0,
  output logic  scc_t1,
  // transmitter pins
  output word_t s_data,
  output logic  s_oe,
  output logic  dv_out,
  output logic  dv_oe,
  input  logic  da_in,
  input  logic  err_in,
  output logic  br_out,
  input  logic  bg_in,
  // receiver pins
  input  word_t r_data,
  input  logic  dv_in,
  output logic  da_out,
  output logic  err_out,
  output logic  rhs_oe,
  input  logic  trans_end,
  // pass-through interrupt pins
  input  logic  t0_pin,
  input  logic  t1_pin,
  // status
  output logic  refused,
  output logic [7:0] dev_addr,
  output logic  fifo_valid
);

  logic       mode, dv_bit, msg_wait, stop, release_msg, ld_addr;
  logic [7:0] addr_in;
  logic       match, no_match, hdr_hit;
  logic       fifo_wr, hdr_wr, fifo_clr, fifo_full;
  word_t      fifo_dout, latch_b, cr_rdata;
  logic [$clog2(FIFO_DEPTH+2)-1:0] fifo_count;

  v3_ctrl_reg u_cr (
    .clk, .rst_n,
    .wr          (a_wr),
    .wdata       (a_wdata),
    .msg_set     (match),
    .fifo_full   (fifo_full),
    .err_in      (err_in),
    .da_in       (da_in),
    .bg_in       (bg_in),
    .mode        (mode),
    .dv_out      (dv_bit),
    .br_out      (br_out),
    .msg_wait    (msg_wait),
    .stop        (stop),
    .release_msg (release_msg),
    .ld_addr     (ld_addr),
    .addr_out    (addr_in),
    .rdata       (cr_rdata)
  );

  addr_recognizer u_ar (
    .clk, .rst_n,
    .ld_addr   (ld_addr),
    .addr_in   (addr_in),
    .hdr_wr    (hdr_wr),
    .hdr_word  (r_data),
    .trans_end (trans_end && mode),
    .dev_addr  (dev_addr),
    .match     (match),
    .no_match  (no_match),
    .hdr_hit   (hdr_hit)
  );

  rx_ctrl u_rc (
    .clk, .rst_n,
    .mode      (mode),
    .dv_in     (dv_in),
    .r_data    (r_data),
    .stop      (stop),
    .for_me    (hdr_hit),
    .pkt_start (trans_end),
    .fifo_wr   (fifo_wr),
    .hdr_wr    (hdr_wr),
    .da_val    (da_out),
    .err_val   (err_out),
    .hs_oe     (rhs_oe),
    .refused   (refused)
  );

  assign fifo_clr = no_match || release_msg;

  rx_fifo #(.DEPTH(FIFO_DEPTH), .W(WORD_W)) u_fifo (
    .clk, .rst_n,
    .clr       (fifo_clr),
    .wr        (fifo_wr),
    .wdata     (r_data),
    .rd        (a_rd && mode),
    .dout      (fifo_dout),
    .out_valid (fifo_valid),
    .full      (fifo_full),
    .count     (fifo_count)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) latch_b <= '0;
    else if (b_wr) latch_b <= b_wdata;
  end

  // port-B read: control register in 7:0, words held in the FIFO in 15:8
  assign b_rdata = {8'(fifo_count), cr_rdata[7:0]};
  assign s_data  = latch_b;
  assign s_oe    = mode ? bg_in : 1'b1;
  assign dv_out  = dv_bit;
  assign dv_oe   = mode && bg_in;
  assign a_rdata = mode ? fifo_dout : r_data;
  assign scc_t0  = mode ? msg_wait  : t0_pin;
  assign scc_t1  = mode ? trans_end : t1_pin;

endmodule
