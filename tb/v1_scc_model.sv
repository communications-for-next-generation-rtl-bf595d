// v1_scc_model: behavioural model of an SCC core running the communication
// kernel of the version-1 chip (testbench only, not synthesizable).
//
// It attaches to one v1_node's SCC-side ports and follows the send and
// receive sequences of the version-1 protocol through the control-status
// register (port-A write, port-B read):
//   send: clear READY FOR RECEIVING, set WAIT FOR TOKEN, poll TOKEN IN;
//         drive the send port; per word write latch B, raise DATA VALID,
//         wait for DATA ACCEPTED (or TRANSMISSION ERROR IN: drop DATA VALID,
//         wait for it to clear, resend), drop DATA VALID, wait for DATA
//         ACCEPTED to fall; a timer on the header aborts the attempt; at the
//         end clear TOKEN IN, set READY FOR RECEIVING, release the port.
//   first-ready send: try receiver masks 1, 2, 4, ... one at a time until
//         one accepts the header.
//   receive (always running): on RX IRQ read the header, then handshake
//         each word with DATA ACCEPTED; an injected error answers one word
//         with TRANS. ERROR instead; finally release the receive port and
//         set READY FOR RECEIVING again.
//   boot_id: take an I.D. from the time the token needs to reach the chip.
// A packet is header word 0 (receiver mask, check bits), header word 1
// (sender, length), the body and a longitudinal-check word.
module v1_scc_model
  import scc_comm_pkg::*;
#(
  parameter int TIMEOUT = 40,
  parameter int MAX_RETRY = 4
) (
  input  logic  clk,
  output logic  a_wr,
  output word_t a_wdata,
  input  word_t a_rdata,
  output logic  b_wr,
  output word_t b_wdata,
  input  word_t b_rdata,
  input  logic  t0
);

  v1_csr_t    sh = '0;           // shadow of the written bits
  logic [7:0] my_id = '0;
  bit         lock = 0;
  int         err_at = -1;       // answer this word index with an error once
  int         msgs_rx = 0, msgs_tx = 0, retries = 0, aborts = 0, lrc_errors = 0, errs_sent = 0;
  word_t      inbox [$];
  logic [7:0] inbox_src [$];      // sender field of each received message

  initial begin a_wr = 0; b_wr = 0; a_wdata = '0; b_wdata = '0; end

  function automatic v1_csr_t st(); return v1_csr_t'(b_rdata); endfunction

  task automatic write_csr();
    v1_csr_t w;
    while (lock) @(negedge clk);
    lock = 1;
    w = sh;
    w.token_in = 1'b1; w.rx_active = 1'b1; w.rx_irq = 1'b1;   // 1 leaves these alone
    @(negedge clk); a_wr = 1; a_wdata = word_t'(w);
    @(negedge clk); a_wr = 0;
    lock = 0;
  endtask

  task automatic clear_sticky(input bit tok, input bit act, input bit irq);
    v1_csr_t w;
    while (lock) @(negedge clk);
    lock = 1;
    w = sh;
    w.token_in = !tok; w.rx_active = !act; w.rx_irq = !irq;
    @(negedge clk); a_wr = 1; a_wdata = word_t'(w);
    @(negedge clk); a_wr = 0;
    lock = 0;
  endtask

  task automatic init(input logic [7:0] id);
    my_id = id;
    sh = '0; sh.mode = 1; sh.rfr = 1;
    write_csr();
  endtask

  task automatic set_ready(input bit r); sh.rfr = r; write_csr(); endtask

  // one word with handshake; returns 0 on timeout
  task automatic put_word(input word_t w, input int limit, output bit ok);
    int n, tries;
    tries = 0;
    ok = 0;
    forever begin
      while (lock) @(negedge clk);
      lock = 1; @(negedge clk); b_wr = 1; b_wdata = w; @(negedge clk); b_wr = 0; lock = 0;
      sh.dv_out = 1; write_csr();
      n = 0;
      while (!st().da_in && !st().te_in && n < limit) begin @(negedge clk); n++; end
      sh.dv_out = 0; write_csr();
      if (st().te_in) begin
        while (st().te_in) @(negedge clk);
        retries++; tries++;
        if (tries > MAX_RETRY) return;
        continue;
      end
      if (!st().da_in && n >= limit) return;
      while (st().da_in) @(negedge clk);
      ok = 1;
      return;
    end
  endtask

  task automatic get_token();
    sh.rfr = 0; sh.wait_token = 1; write_csr();
    sh.wait_token = 0;                       // hardware clears it on capture
    while (!st().token_in) @(negedge clk);
    sh.tx_drive = 1; write_csr();
  endtask

  task automatic put_token();
    sh.tx_drive = 0; sh.rfr = 1;
    clear_sticky(1, 0, 0);
  endtask

  // header through body, token already held; 0 if the header was refused
  task automatic put_packet(input logic [7:0] mask, input word_t body [$], output bit ok);
    word_t pkt [$];
    word_t lrc = '0;
    pkt.push_back(make_hdr0(mask));
    pkt.push_back({my_id, 8'(body.size())});
    foreach (body[i]) pkt.push_back(body[i]);
    foreach (pkt[i]) lrc = lrc_step(lrc, pkt[i]);
    pkt.push_back(lrc);
    foreach (pkt[i]) begin
      put_word(pkt[i], (i == 0) ? TIMEOUT : 100000, ok);
      if (!ok) begin aborts++; return; end
    end
  endtask

  task automatic send(input logic [7:0] mask, input word_t body [$], output bit ok);
    get_token();
    put_packet(mask, body, ok);
    put_token();
    if (ok) msgs_tx++;
  endtask

  // Identity from the token: wait for the token with a counter running,
  // hold it BOOT_HOLD clocks, pass it on, and take base + the number of
  // whole slots counted as the chip's own I.D.
  localparam int BOOT_HOLD = 20, BOOT_SLOT = 26;
  task automatic boot_id(input logic [7:0] base);
    int n = 0;
    sh = '0; sh.mode = 1; sh.rfr = 1; sh.wait_token = 1; write_csr();
    sh.wait_token = 0;
    while (!st().token_in) begin @(negedge clk); n++; end
    my_id = base + 8'((n + BOOT_SLOT / 2) / BOOT_SLOT);
    repeat (BOOT_HOLD) @(negedge clk);
    clear_sticky(1, 0, 0);
  endtask

  // FIRST READY: one receiver at a time, starting from mask bit 0
  task automatic send_first_ready(input int n_rcv, input word_t body [$], output int taken);
    bit ok;
    get_token();
    taken = -1;
    for (int r = 0; r < n_rcv && taken < 0; r++) begin
      put_packet(8'(1 << r), body, ok);
      if (ok) taken = r;
    end
    put_token();
    if (taken >= 0) msgs_tx++;
  endtask

  // receive process
  initial begin
    word_t w, lrc;
    int len, idx, n;
    bit dead;
    forever begin
      @(negedge clk);
      if (st().rx_irq && st().mode) begin
        word_t msg [$];
        msg.delete();
        lrc = a_rdata;                       // captured header
        msg.push_back(a_rdata);
        clear_sticky(0, 0, 1);
        idx = 1; len = 0; dead = 0;
        while (!dead && (idx < 2 || idx < len + 3)) begin
          n = 0;
          while (!st().dv_in && n < 2000) begin @(negedge clk); n++; end
          if (n >= 2000) begin dead = 1; break; end
          @(negedge clk);
          w = a_rdata;
          if (idx == err_at) begin
            err_at = -1; errs_sent++;
            sh.te_out = 1; write_csr();
            while (st().dv_in) @(negedge clk);
            sh.te_out = 0; write_csr();
            continue;
          end
          msg.push_back(w);
          if (idx == 1) len = int'(w[7:0]);
          if (idx < len + 2) lrc = lrc_step(lrc, w);
          else if (w != lrc) lrc_errors++;
          sh.da_out = 1; write_csr();
          while (st().dv_in) @(negedge clk);
          sh.da_out = 0; write_csr();
          idx++;
        end
        clear_sticky(0, 1, 0);
        if (!dead) begin
          for (int i = 0; i < len; i++) inbox.push_back(msg[2 + i]);
          inbox_src.push_back(msg[1][15:8]);
          msgs_rx++;
        end
      end
    end
  end

endmodule
