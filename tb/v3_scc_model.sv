// v3_scc_model: behavioural model of an SCC core running the communication
// kernel of the chip with FIFO (testbench only, not synthesizable).
//
// It attaches to one v3_node's SCC-side ports. Transmit (task send): raise
// BUS REQUEST, wait for BUS GRANT, then for each word write port B, raise
// DATA VALID and wait for DATA ACCEPTED or ERROR IN TRANS.; on an error drop
// DATA VALID, wait for the error to clear and resend the word (up to
// MAX_RETRY times); after the last word drop BUS REQUEST. A packet is
// header word 0 (destination, check bits), header word 1 (sender,
// length), the body and a longitudinal-check word. Receive (always running):
// on T0 (message waiting) read the packet from the FIFO with read pulses on
// port A, check the check word, store it, and write STOP RECEIVING = 0 to
// release the buffer. Optional hold_rx keeps a message waiting, to stall
// the bus. Task boot_addr carries out the boot-time address generation:
// all chips of a bus request it at once and each takes its address from
// the time that passed before its grant. Every register access takes one
// clock.
module v3_scc_model
  import scc_comm_pkg::*;
#(
  parameter int MAX_RETRY = 4
) (
  input  logic  clk,
  output logic  a_wr,
  output word_t a_wdata,
  output logic  a_rd,
  input  word_t a_rdata,
  output logic  b_wr,
  output word_t b_wdata,
  input  word_t b_rdata,
  input  logic  t0,
  input  logic  t1
);

  logic [7:0] my_id = 8'h00;
  word_t      cr_shadow = '0;     // written control bits (MODE, DV, BR)
  bit         lock = 0;
  bit         hold_rx = 0;
  bit         corrupt_next = 0;   // corrupt the next header's check bits once
  int         msgs_rx = 0, words_rx = 0, lrc_errors = 0, retries = 0, aborts = 0, msgs_tx = 0;
  int         te_seen = 0;
  word_t      last_msg [$];
  word_t      inbox [$];          // bodies of received messages, concatenated
  logic [7:0] inbox_src [$];

  initial begin a_wr = 0; a_rd = 0; b_wr = 0; a_wdata = '0; b_wdata = '0; end

  always @(posedge clk) if (t1 && cr_shadow[CR_MODE]) te_seen++;

  task automatic acquire(); while (lock) @(negedge clk); lock = 1; endtask
  task automatic release_lock(); lock = 0; endtask

  task automatic write_a(input word_t w);
    acquire();
    @(negedge clk); a_wr = 1; a_wdata = w;
    @(negedge clk); a_wr = 0;
    release_lock();
  endtask

  task automatic set_cr(input int bitpos, input bit v);
    word_t w;
    cr_shadow[bitpos] = v;
    w = cr_shadow;
    w[CR_STOP] = 1'b1;            // 1 leaves a waiting message alone
    write_a(w);
  endtask

  task automatic init(input logic [7:0] id);
    my_id = id;
    write_a(16'h8000 | word_t'(id));
    set_cr(CR_MODE, 1);
  endtask

  // Boot-time address generation: every chip on a local bus requests the
  // bus at the same moment; each holds it for BOOT_HOLD clocks once
  // granted, and takes as its address base + the number of whole slots
  // that went by before its grant.
  localparam int BOOT_HOLD = 30, BOOT_SLOT = 35;
  task automatic boot_addr(input logic [7:0] base);
    int n = 0;
    set_cr(CR_MODE, 1);
    set_cr(CR_BR, 1);
    while (!b_rdata[CR_BG]) begin @(negedge clk); n++; end
    my_id = base + 8'((n + BOOT_SLOT / 2) / BOOT_SLOT);
    write_a(16'h8000 | word_t'(my_id));
    repeat (BOOT_HOLD) @(negedge clk);
    set_cr(CR_BR, 0);
    while (b_rdata[CR_BG]) @(negedge clk);
  endtask

  task automatic wait_status(input int bitpos, input bit v, input int limit, output bit ok);
    int n = 0;
    while (b_rdata[bitpos] != v && n < limit) begin @(negedge clk); n++; end
    ok = (b_rdata[bitpos] == v);
  endtask

  task automatic send(input logic [7:0] dest, input word_t body [$], output bit done);
    word_t pkt [$];
    word_t lrc = '0;
    bit ok;
    int tries;
    pkt.push_back(make_hdr0(dest));
    pkt.push_back({my_id, 8'(body.size())});
    foreach (body[i]) pkt.push_back(body[i]);
    foreach (pkt[i]) lrc = lrc_step(lrc, pkt[i]);
    pkt.push_back(lrc);
    done = 0;
    set_cr(CR_BR, 1);
    wait_status(CR_BG, 1, 100000, ok);
    if (!ok) begin set_cr(CR_BR, 0); aborts++; return; end
    foreach (pkt[i]) begin
      tries = 0;
      forever begin
        acquire();
        @(negedge clk); b_wr = 1;
        b_wdata = (i == 0 && corrupt_next) ? (pkt[i] ^ 16'h0001) : pkt[i];
        @(negedge clk); b_wr = 0;
        release_lock();
        corrupt_next = (i == 0) ? 0 : corrupt_next;
        set_cr(CR_DV, 1);
        while (!b_rdata[CR_DA] && !b_rdata[CR_ERR]) @(negedge clk);
        if (b_rdata[CR_ERR]) begin
          set_cr(CR_DV, 0);
          wait_status(CR_ERR, 0, 1000, ok);
          retries++; tries++;
          if (tries > MAX_RETRY) begin set_cr(CR_BR, 0); aborts++; return; end
        end else begin
          set_cr(CR_DV, 0);
          wait_status(CR_DA, 0, 1000, ok);
          break;
        end
      end
    end
    set_cr(CR_BR, 0);
    wait_status(CR_BG, 0, 100, ok);
    msgs_tx++;
    done = 1;
  endtask

  task automatic read_word(output word_t w);
    while (b_rdata[15:8] == 0) @(negedge clk);
    @(negedge clk);
    acquire();
    w = a_rdata;
    a_rd = 1; @(negedge clk); a_rd = 0;
    release_lock();
  endtask

  // receive process
  initial begin
    word_t w, lrc;
    int len;
    forever begin
      @(negedge clk);
      if (t0 && cr_shadow[CR_MODE]) begin
        last_msg.delete();
        read_word(w); last_msg.push_back(w); lrc = w;
        read_word(w); last_msg.push_back(w); lrc = lrc_step(lrc, w);
        len = int'(w[7:0]);
        for (int i = 0; i < len; i++) begin
          read_word(w); last_msg.push_back(w); lrc = lrc_step(lrc, w);
        end
        for (int i = 0; i < len; i++) inbox.push_back(last_msg[2 + i]);
        inbox_src.push_back(last_msg[1][15:8]);
        read_word(w);
        if (w != lrc) lrc_errors++;
        words_rx += len + 3;
        msgs_rx++;
        while (hold_rx) @(negedge clk);
        begin
          word_t c;
          c = cr_shadow; c[CR_STOP] = 1'b0;
          write_a(c);
        end
        @(negedge clk);
      end
    end
  end

endmodule
