// tb_v3_system: end-to-end test of two local buses of chips with FIFO.
// Seven behavioural SCC kernels (v3_scc_model) run the transmit and receive
// protocol. The three chips on bus A send tagged packets to the two middle
// chips; each middle chip forwards every packet it receives over bus B to
// one of the two last chips, chosen by the tag. One packet is broadcast,
// one has its header corrupted once (refused and resent), one fills a FIFO
// to all 64 words, and one middle chip holds a message for a while so the
// whole of bus A stalls. Checks every packet arrives once, intact, at the
// right chip, that the longitudinal checks agree, and that each mechanism
// (round robin and fixed priority, pre-arbitration, stall, refusal, FIFO
// full, discarded foreign packets, both buses busy at once) happened.
module tb_v3_system;
  import scc_comm_pkg::*;
  localparam int NN = 7;
  localparam int PER_SRC = 6;
  logic clk = 0, rst_n = 0;
  logic fixed_prio_a = 0, fixed_prio_b = 0;
  logic [NN-1:0] a_wr, a_rd, b_wr, scc_t0, scc_t1;
  word_t [NN-1:0] a_wdata, a_rdata, b_wdata, b_rdata;
  word_t bus_a_data, bus_b_data;
  logic [1:0] trans_end, prearb_grant;
  logic [NN-1:0] refused, fifo_valid;
  logic [7:0] dev_addr [7];
  int checks = 0, failures = 0;
  int n_prearb = 0, n_stall = 0, n_refused = 0, n_full = 0, n_both = 0, n_discard = 0, n_te = 0;
  int expected_rx [2];

  v3_system dut (.clk, .rst_n, .fixed_prio_a, .fixed_prio_b, .a_wr, .a_wdata, .a_rd, .a_rdata,
                 .b_wr, .b_wdata, .b_rdata, .scc_t0, .scc_t1, .t0_pin('0), .t1_pin('0),
                 .bus_a_data, .bus_b_data, .trans_end, .prearb_grant, .refused, .fifo_valid, .dev_addr);

  for (genvar i = 0; i < NN; i++) begin : g_k
    v3_scc_model k (.clk, .a_wr(a_wr[i]), .a_wdata(a_wdata[i]), .a_rd(a_rd[i]), .a_rdata(a_rdata[i]),
                    .b_wr(b_wr[i]), .b_wdata(b_wdata[i]), .b_rdata(b_rdata[i]), .t0(scc_t0[i]), .t1(scc_t1[i]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // body of a tagged packet
  function automatic int body_len(input word_t tag); return 1 + (tag % 13); endfunction
  function automatic word_t body_word(input word_t tag, input int i);
    return (i == 0) ? tag : tag ^ word_t'(i * 16'h1111);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (prearb_grant != 0) n_prearb++;
    if (dut.u_bus_a.bus_dv && !dut.u_bus_a.bus_da && dut.g_node[4].u_node.stop) n_stall++;
    if (refused != 0) n_refused++;
    if (dut.g_node[3].u_node.fifo_full) n_full++;
    if (dut.u_bus_a.bus_dv && dut.u_bus_b.bus_dv) n_both++;
    if (dut.g_node[3].u_node.u_rc.take && !dut.g_node[3].u_node.fifo_wr && !dut.g_node[3].u_node.refused) n_discard++;
    if (trans_end != 0) n_te++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sender on bus A
  task automatic a_source(input int s, input int count);
    word_t body [$];
    word_t tag;
    bit done;
    for (int m = 0; m < count; m++) begin
      tag = word_t'((s << 8) | m);
      body.delete();
      for (int i = 0; i < body_len(tag); i++) body.push_back(body_word(tag, i));
      g_send(s, (m % 2) ? 8'h21 : 8'h20, body, done);
      check(done, "packet sent on bus A");
      expected_rx[tag[0]]++;
    end
  endtask

  task automatic g_send(input int s, input logic [7:0] d, input word_t body [$], output bit done);
    case (s)
      0: g_k[0].k.send(d, body, done);
      1: g_k[1].k.send(d, body, done);
      2: g_k[2].k.send(d, body, done);
      3: g_k[3].k.send(d, body, done);
      default: g_k[4].k.send(d, body, done);
    endcase
  endtask

  // middle chip: forward every received body to bus B
  task automatic forward(input int mid);
    word_t body [$];
    word_t tag;
    int len;
    bit done;
    forever begin
      @(negedge clk);
      if (mid == 3 ? g_k[3].k.inbox.size() > 0 : g_k[4].k.inbox.size() > 0) begin
        tag = (mid == 3) ? g_k[3].k.inbox[0] : g_k[4].k.inbox[0];
        len = (tag == 16'hFFFF) ? 1 : (tag[15:8] == 8'hEE ? 61 : body_len(tag));
        body.delete();
        for (int i = 0; i < len; i++) begin
          if (mid == 3) body.push_back(g_k[3].k.inbox.pop_front());
          else          body.push_back(g_k[4].k.inbox.pop_front());
        end
        g_send(mid, tag[0] ? 8'h31 : 8'h30, body, done);
        check(done, "packet forwarded on bus B");
      end
    end
  endtask

  // check the bodies that arrived at a last chip
  task automatic check_sink(input int k);
    word_t tag;
    int len, n;
    n = 0;
    while ((k == 5 ? g_k[5].k.inbox.size() : g_k[6].k.inbox.size()) > 0) begin
      tag = (k == 5) ? g_k[5].k.inbox.pop_front() : g_k[6].k.inbox.pop_front();
      check(tag[0] == 1'(k - 5), "packet reached the chip its tag selects");
      len = (tag == 16'hFFFF) ? 1 : (tag[15:8] == 8'hEE ? 61 : body_len(tag));
      for (int i = 1; i < len; i++) begin
        word_t w;
        w = (k == 5) ? g_k[5].k.inbox.pop_front() : g_k[6].k.inbox.pop_front();
        check(w == body_word(tag, i), "body word intact");
      end
      n++;
    end
    check(n == expected_rx[k - 5], "every packet arrived once");
    $display("chip %0d received %0d packets (expected %0d)", k, n, expected_rx[k - 5]);
  endtask

  initial begin
    word_t body [$];
    bit done;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    g_k[0].k.init(8'h10); g_k[1].k.init(8'h11); g_k[2].k.init(8'h12);
    g_k[3].k.init(8'h20); g_k[4].k.init(8'h21); g_k[5].k.init(8'h30); g_k[6].k.init(8'h31);
    for (int i = 0; i < NN; i++) check(dev_addr[i] != 0, "device address loaded");
    fork
      forward(3);
      forward(4);
    join_none
    // phase 1: round robin on A, all three sources at once
    fork
      a_source(0, PER_SRC);
      a_source(1, PER_SRC);
      a_source(2, PER_SRC);
    join
    // phase 2: fixed priority, a corrupted header, a broadcast, a full FIFO,
    // and a stall while chip 4 holds a message
    fixed_prio_a = 1; fixed_prio_b = 1;
    g_k[0].k.corrupt_next = 1;
    body.delete(); body.push_back(16'hFFFF);
    g_k[0].k.send(8'hFF, body, done); check(done, "broadcast sent");
    expected_rx[1] += 2;                    // both middle chips forward it
    body.delete(); for (int i = 0; i < 61; i++) body.push_back(i == 0 ? 16'hEE00 : body_word(16'hEE00, i));
    g_k[1].k.send(8'h20, body, done); check(done, "64-word packet sent");
    expected_rx[0] += 1;
    g_k[4].k.hold_rx = 1;
    fork
      a_source(2, 2);
      begin repeat (3000) @(negedge clk); g_k[4].k.hold_rx = 0; end
    join
    repeat (3000) @(negedge clk);
    check_sink(5);
    check_sink(6);
    check(g_k[0].k.lrc_errors + g_k[1].k.lrc_errors + g_k[2].k.lrc_errors + g_k[3].k.lrc_errors +
          g_k[4].k.lrc_errors + g_k[5].k.lrc_errors + g_k[6].k.lrc_errors == 0, "longitudinal checks");
    check(g_k[0].k.retries >= 1, "corrupted header resent");
    check(n_prearb > 0, "pre-arbitrated grants happened");
    check(n_stall > 0, "bus stalled while a message waited");
    check(n_refused > 0, "header refused with ERROR IN TRANS.");
    check(n_full > 0, "FIFO reached 64 words");
    check(n_both > 0, "both buses busy at once");
    check(n_discard > 0, "foreign packet words discarded");
    $display("prearb=%0d stall=%0d refused=%0d full=%0d both=%0d discard=%0d te=%0d",
             n_prearb, n_stall, n_refused, n_full, n_both, n_discard, n_te);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
