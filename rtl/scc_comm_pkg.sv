// scc_comm_pkg: types and constants shared by the communication logic of the
// two upgraded single chip computers (the version-1 chip with token chain and
// the chip with a receive FIFO).
//
// Message block (word parallel, 16-bit words):
//   word 0  [15:8] receiver I.D.   [7:0] check bits
//   word 1  [15:8] sender I.D.     [7:0] message length
//   body    0 to 254 words, then an optional longitudinal check word.
// The field layout and the 0-254 body limit follow the message format of the
// design. Which byte is upper, the check-bit code (complement of the receiver
// I.D.) and the longitudinal check (XOR of all words) are choices of this
// design. For the version-1 chip the receiver I.D. is a bit mask (bit i
// selects receiver i); for the FIFO chip it is a coded address, 8'hFF
// meaning broadcast.
//
// The register bit positions of both chips are defined here as well.
package scc_comm_pkg;

  parameter int unsigned WORD_W   = 16;
  parameter int unsigned MAX_BODY = 254;

  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic [7:0] rcv_id;
    logic [7:0] check;
  } hdr0_t;

  typedef struct packed {
    logic [7:0] snd_id;
    logic [7:0] length;
  } hdr1_t;

  localparam logic [7:0] BROADCAST_ADDR = 8'hFF;

  // Check bits of the first header word: complement of the receiver I.D.
  function automatic logic [7:0] check_bits(input logic [7:0] rcv_id);
    return ~rcv_id;
  endfunction

  function automatic word_t make_hdr0(input logic [7:0] rcv_id);
    hdr0_t h;
    h.rcv_id = rcv_id;
    h.check  = check_bits(rcv_id);
    return word_t'(h);
  endfunction

  function automatic logic hdr0_ok(input word_t w);
    hdr0_t h;
    h = hdr0_t'(w);
    return h.check == check_bits(h.rcv_id);
  endfunction

  // One step of the longitudinal check.
  function automatic word_t lrc_step(input word_t acc, input word_t w);
    return acc ^ w;
  endfunction

  // ---------------------------------------------------------------
  // Version-1 control-status register (16 bits).
  // ---------------------------------------------------------------
  typedef struct packed {
    logic       mode;        // 15  1: multicomputer mode, 0: ports pass through
    logic [2:0] rsvd;        // 14:12
    logic       rx_irq;      // 11  header accepted, T0 raised (write 0 clears)
    logic       rx_active;   // 10  receive port engaged (write 0 releases)
    logic       tx_drive;    // 9   send port and DATA VALID out enabled
    logic       te_in;       // 8   TRANSMISSION-ERROR IN (T0/M pin), read only
    logic       da_in;       // 7   DATA ACCEPTED in (sender side), read only
    logic       wait_token;  // 6   WAIT FOR TOKEN
    logic       token_in;    // 5   TOKEN IN (write 0 passes the token on)
    logic       dv_out;      // 4   DATA VALID out (sender side)
    logic       dv_in;       // 3   DATA VALID? in (receiver side), read only
    logic       te_out;      // 2   TRANS. ERROR out (receiver side)
    logic       da_out;      // 1   DATA ACCEPTED out (receiver side)
    logic       rfr;         // 0   READY FOR RECEIVING
  } v1_csr_t;

  // ---------------------------------------------------------------
  // FIFO chip control register: position n of the drawing is bit n-1.
  // ---------------------------------------------------------------
  localparam int unsigned CR_MODE   = 0;  // 1 MODE
  localparam int unsigned CR_STOP   = 1;  // 2 STOP RECEIVING / BUFFER FULL
  localparam int unsigned CR_ERR    = 3;  // 4 ERROR IN TRANS.
  localparam int unsigned CR_DA     = 4;  // 5 DATA ACCEPTED
  localparam int unsigned CR_DV     = 5;  // 6 DATA VALID
  localparam int unsigned CR_BG     = 6;  // 7 BUS GRANT
  localparam int unsigned CR_BR     = 7;  // 8 BUS REQUEST

  // Port-A write of the FIFO chip: bit 15 chooses the target.
  localparam int unsigned PA_SEL_DEVADDR = 15;

endpackage
