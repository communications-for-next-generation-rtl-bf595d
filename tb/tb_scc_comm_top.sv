// tb_scc_comm_top: end-to-end test of the whole design at its default sizes
// (no parameter overrides). Behavioural SCC kernels drive every chip:
// version-1 kernels (v1_scc_model) on the version-1 bus and on the
// master-slave controller, FIFO-chip kernels (v3_scc_model) on the two local
// buses; the test bench itself plays the two devices of the master-slave
// controller and the modules of the two-level arbitration hierarchy.
//   Version-1 bus: broadcast to two receivers, a transmission error answered
//   by a resend, FIRST READY with not-ready chips, three senders at once
//   served in ring order.
//   FIFO chips: the chips of each bus generate their addresses at boot from
//   the order of their grants; bus-A chips send tagged packets to the middle
//   chips, which forward them over bus B by tag; round robin then fixed
//   priority, a corrupted header, a broadcast, a packet that fills a FIFO,
//   and a held message that stalls bus A.
//   Master-slave controller: the slave-B chips take I.D.s from the token
//   ring; the master sends a command to both devices through the slave-A
//   chips; both devices answer at once through the slave-B chips.
//   Hierarchy: random requests from both groups, each grant held a random
//   time.
// Each mechanism is counted and a failure is counted for any that never
// happened: token pass-through and capture, not-ready answer, error resend,
// FIRST READY time-out, public broadcast, mode switch, boot-time address
// generation, round robin, fixed priority, pre-arbitration, stall, refusal,
// FIFO full, foreign-packet discard, both buses busy, slave I.D.s from the
// token, master-slave traffic both ways, group grants and TRANSMISSION END
// at both levels of the hierarchy.
module tb_scc_comm_top;
  import scc_comm_pkg::*;
  localparam int N1 = 4, NN = 7, NG = 15, PER_SRC = 4;
  logic clk = 0, rst_n = 0;
  // version-1 side
  logic [N1-1:0] v1_a_wr, v1_b_wr, v1_scc_t0, v1_scc_t1, v1_token_pulse, v1_rx_engaged;
  word_t [N1-1:0] v1_a_wdata, v1_a_rdata, v1_b_wdata, v1_b_rdata;
  logic [N1-1:0] v1_t1_pin = '0;
  word_t v1_bus_data;
  logic v1_bus_dv, v1_bus_da, v1_bus_te;
  // FIFO-chip side
  logic v3_fixed_prio_a = 0, v3_fixed_prio_b = 0;
  logic [NN-1:0] v3_a_wr, v3_a_rd, v3_b_wr, v3_scc_t0, v3_scc_t1, v3_refused, v3_fifo_valid;
  logic [NN-1:0] v3_t0_pin = '0, v3_t1_pin = '0;
  word_t [NN-1:0] v3_a_wdata, v3_a_rdata, v3_b_wdata, v3_b_rdata;
  word_t v3_bus_a_data, v3_bus_b_data;
  logic [1:0] v3_trans_end, v3_prearb_grant;
  logic [7:0] v3_dev_addr [7];
  // master-slave controller
  logic [4:0] ms_a_wr, ms_b_wr, ms_scc_t0, ms_scc_t1, ms_rx_engaged;
  logic [4:0] ms_t1_pin = '0;
  word_t [4:0] ms_a_wdata, ms_a_rdata, ms_b_wdata, ms_b_rdata;
  word_t [1:0] ms_dev_tx_data, ms_dev_rx_data;
  logic [1:0] ms_dev_tx_dv, ms_dev_tx_da, ms_dev_rx_dv, ms_dev_rx_da, ms_dev_rx_te, ms_token_b;
  word_t ms_down_data, ms_up_data;
  word_t ms_dev_got [2][$];
  // hierarchy
  logic [NG-1:0] h_grp1_req = '0, h_grp2_req = '0, h_grp1_grant, h_grp2_grant;
  logic h_grp1_end, h_grp2_end, h_master_end;
  logic [1:0] h_master_grant;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pass = 0, n_capture = 0, n_nack = 0, n_mode = 0, n_rr = 0, n_fixed = 0, n_prearb = 0;
  int n_stall = 0, n_refused = 0, n_full = 0, n_both = 0, n_discard = 0;
  int n_ms_id = 0, n_ms_down = 0, n_ms_up = 0, n_boot = 0, n_g1 = 0, n_g2 = 0, n_gend = 0, n_mend = 0, h_served = 0, h_asked = 0;
  int order [$];
  int expected_rx [2];
  bit hier_done = 0;

  scc_comm_top dut (.*);

  for (genvar i = 0; i < N1; i++) begin : g_k1
    v1_scc_model k (.clk, .a_wr(v1_a_wr[i]), .a_wdata(v1_a_wdata[i]), .a_rdata(v1_a_rdata[i]),
                    .b_wr(v1_b_wr[i]), .b_wdata(v1_b_wdata[i]), .b_rdata(v1_b_rdata[i]), .t0(v1_scc_t0[i]));
    always @(posedge clk) if (rst_n) begin
      if (dut.u_v1.g_node[i].u_node.u_arb.token_set) begin n_capture++; order.push_back(i); end
      else if (dut.u_v1.g_node[i].u_node.arb_in && dut.u_v1.g_node[i].u_node.u_csr.r.mode) n_pass++;
      if (dut.u_v1.g_node[i].u_node.u_sel.state == 2'd2) n_nack++;
    end
  end
  for (genvar i = 0; i < NN; i++) begin : g_k3
    v3_scc_model k (.clk, .a_wr(v3_a_wr[i]), .a_wdata(v3_a_wdata[i]), .a_rd(v3_a_rd[i]), .a_rdata(v3_a_rdata[i]),
                    .b_wr(v3_b_wr[i]), .b_wdata(v3_b_wdata[i]), .b_rdata(v3_b_rdata[i]),
                    .t0(v3_scc_t0[i]), .t1(v3_scc_t1[i]));
    logic mode_q = 0;
    always @(posedge clk) begin
      if (rst_n && dut.u_v3.g_node[i].u_node.mode && !mode_q) n_mode++;
      mode_q <= dut.u_v3.g_node[i].u_node.mode;
    end
  end

  for (genvar i = 0; i < 5; i++) begin : g_km
    v1_scc_model k (.clk, .a_wr(ms_a_wr[i]), .a_wdata(ms_a_wdata[i]), .a_rdata(ms_a_rdata[i]),
                    .b_wr(ms_b_wr[i]), .b_wdata(ms_b_wdata[i]), .b_rdata(ms_b_rdata[i]), .t0(ms_scc_t0[i]));
  end
  // the two devices of the master-slave controller accept every word
  for (genvar k = 0; k < 2; k++) begin : g_dev
    initial ms_dev_tx_da[k] = 0;
    always @(negedge clk) begin
      if (ms_dev_tx_dv[k] && !ms_dev_tx_da[k]) begin ms_dev_got[k].push_back(ms_dev_tx_data[k]); ms_dev_tx_da[k] <= 1; end
      else if (!ms_dev_tx_dv[k]) ms_dev_tx_da[k] <= 0;
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (v3_trans_end[0]) begin if (v3_fixed_prio_a) n_fixed++; else n_rr++; end
    if (v3_prearb_grant != 0) n_prearb++;
    if (dut.u_v3.u_bus_a.bus_dv && !dut.u_v3.u_bus_a.bus_da && dut.u_v3.g_node[4].u_node.stop) n_stall++;
    if (v3_refused != 0) n_refused++;
    if (dut.u_v3.g_node[3].u_node.fifo_full) n_full++;
    if (dut.u_v3.u_bus_a.bus_dv && dut.u_v3.u_bus_b.bus_dv) n_both++;
    if (dut.u_v3.g_node[3].u_node.u_rc.take && !dut.u_v3.g_node[3].u_node.fifo_wr && !v3_refused[3]) n_discard++;
    if (h_grp1_end || h_grp2_end) n_gend++;
    if (h_master_end) n_mend++;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- version-1 bus ----------------
  function automatic word_t bw(input int tag, input int i);
    logic [7:0] b;
    b = 8'(tag * 17 + i * 5 + 1);
    return {b, b};
  endfunction
  function automatic int inbox1_size(input int k);
    case (k) 0: return g_k1[0].k.inbox.size(); 1: return g_k1[1].k.inbox.size();
             2: return g_k1[2].k.inbox.size(); default: return g_k1[3].k.inbox.size(); endcase
  endfunction
  function automatic word_t inbox1_pop(input int k);
    case (k) 0: return g_k1[0].k.inbox.pop_front(); 1: return g_k1[1].k.inbox.pop_front();
             2: return g_k1[2].k.inbox.pop_front(); default: return g_k1[3].k.inbox.pop_front(); endcase
  endfunction
  task automatic expect_body(input int k, input int tag, input int len);
    check(inbox1_size(k) >= len, "v1 body arrived");
    for (int i = 0; i < len && inbox1_size(k) > 0; i++) check(inbox1_pop(k) == bw(tag, i), "v1 body word intact");
  endtask
  task automatic mk(input int tag, input int len, output word_t body [$]);
    body.delete();
    for (int i = 0; i < len; i++) body.push_back(bw(tag, i));
  endtask

  task automatic run_v1();
    word_t body [$];
    bit ok;
    int taken;
    g_k1[0].k.init(8'h00); g_k1[1].k.init(8'h01); g_k1[2].k.init(8'h02); g_k1[3].k.init(8'h03);
    repeat (20) @(negedge clk);
    mk(1, 9, body);
    g_k1[0].k.send(8'b0110, body, ok); check(ok, "v1 broadcast sent");
    repeat (50) @(negedge clk);
    expect_body(1, 1, 9); expect_body(2, 1, 9);
    check(inbox1_size(3) == 0 && inbox1_size(0) == 0, "v1 unselected chips receive nothing");
    g_k1[3].k.err_at = 4;
    mk(2, 6, body);
    g_k1[1].k.send(8'b1000, body, ok); check(ok, "v1 sent despite one error");
    repeat (50) @(negedge clk);
    expect_body(3, 2, 6);
    check(g_k1[1].k.retries == 1 && g_k1[3].k.errs_sent == 1, "v1 one error, one resend");
    g_k1[0].k.set_ready(0); g_k1[1].k.set_ready(0);
    mk(3, 4, body);
    g_k1[3].k.send_first_ready(3, body, taken);
    check(taken == 2, "v1 first ready receiver found");
    repeat (50) @(negedge clk);
    expect_body(2, 3, 4);
    g_k1[0].k.set_ready(1); g_k1[1].k.set_ready(1);
    order.delete();
    fork
      begin word_t b[$]; bit o; mk(10, 5, b); g_k1[0].k.send(8'b1000, b, o); check(o, "v1 sender 0"); end
      begin word_t b[$]; bit o; mk(11, 5, b); g_k1[1].k.send(8'b1000, b, o); check(o, "v1 sender 1"); end
      begin word_t b[$]; bit o; mk(12, 5, b); g_k1[2].k.send(8'b1000, b, o); check(o, "v1 sender 2"); end
    join
    repeat (50) @(negedge clk);
    check(order.size() == 3, "v1 three token captures");
    if (order.size() == 3) begin
      check((order[1] == (order[0] + 1) % 3) && (order[2] == (order[1] + 1) % 3), "v1 served in ring order");
      for (int j = 0; j < 3; j++) expect_body(3, 10 + order[j], 5);
    end
    check(g_k1[0].k.lrc_errors + g_k1[1].k.lrc_errors + g_k1[2].k.lrc_errors + g_k1[3].k.lrc_errors == 0,
          "v1 longitudinal checks");
  endtask

  // ---------------- FIFO chips ----------------
  function automatic int body_len(input word_t tag); return 1 + (tag % 13); endfunction
  function automatic word_t body_word(input word_t tag, input int i);
    return (i == 0) ? tag : tag ^ word_t'(i * 16'h1111);
  endfunction
  task automatic g_send(input int s, input logic [7:0] d, input word_t body [$], output bit done);
    case (s)
      0: g_k3[0].k.send(d, body, done);
      1: g_k3[1].k.send(d, body, done);
      2: g_k3[2].k.send(d, body, done);
      3: g_k3[3].k.send(d, body, done);
      default: g_k3[4].k.send(d, body, done);
    endcase
  endtask
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
  task automatic forward(input int mid);
    word_t body [$];
    word_t tag;
    int len;
    bit done;
    forever begin
      @(negedge clk);
      if (mid == 3 ? g_k3[3].k.inbox.size() > 0 : g_k3[4].k.inbox.size() > 0) begin
        tag = (mid == 3) ? g_k3[3].k.inbox[0] : g_k3[4].k.inbox[0];
        len = (tag == 16'hFFFF) ? 1 : (tag[15:8] == 8'hEE ? 61 : body_len(tag));
        body.delete();
        for (int i = 0; i < len; i++) begin
          if (mid == 3) body.push_back(g_k3[3].k.inbox.pop_front());
          else          body.push_back(g_k3[4].k.inbox.pop_front());
        end
        g_send(mid, tag[0] ? 8'h31 : 8'h30, body, done);
        check(done, "packet forwarded on bus B");
      end
    end
  endtask
  task automatic check_sink(input int k);
    word_t tag;
    int len, n;
    n = 0;
    while ((k == 5 ? g_k3[5].k.inbox.size() : g_k3[6].k.inbox.size()) > 0) begin
      tag = (k == 5) ? g_k3[5].k.inbox.pop_front() : g_k3[6].k.inbox.pop_front();
      check(tag[0] == 1'(k - 5), "packet reached the chip its tag selects");
      len = (tag == 16'hFFFF) ? 1 : (tag[15:8] == 8'hEE ? 61 : body_len(tag));
      for (int i = 1; i < len; i++) begin
        word_t w;
        w = (k == 5) ? g_k3[5].k.inbox.pop_front() : g_k3[6].k.inbox.pop_front();
        check(w == body_word(tag, i), "body word intact");
      end
      n++;
    end
    check(n == expected_rx[k - 5], "every packet arrived once");
  endtask

  task automatic run_v3();
    word_t body [$];
    bit done;
    // normal mode: the interrupt pins go straight to the SCC
    v3_t0_pin = '1; v3_t1_pin = '1;
    @(negedge clk);
    check(v3_scc_t0 == '1 && v3_scc_t1 == '1, "normal mode passes T0 and T1 through");
    v3_t0_pin = '0; v3_t1_pin = '0;
    // boot-time address generation on both buses at once; the last two
    // chips transmit on no bus and get fixed addresses
    fork
      g_k3[0].k.boot_addr(8'h10); g_k3[1].k.boot_addr(8'h10); g_k3[2].k.boot_addr(8'h10);
      g_k3[3].k.boot_addr(8'h20); g_k3[4].k.boot_addr(8'h20);
      begin g_k3[5].k.init(8'h30); g_k3[6].k.init(8'h31); end
    join
    check(v3_dev_addr[0] == 8'h10 && v3_dev_addr[1] == 8'h11 && v3_dev_addr[2] == 8'h12 &&
          v3_dev_addr[3] == 8'h20 && v3_dev_addr[4] == 8'h21, "addresses generated in grant order");
    for (int i = 0; i < 5; i++) if (v3_dev_addr[i] == 8'h10 + 8'(i < 3 ? i : 13 + i)) n_boot++;
    v3_t0_pin = '1; @(negedge clk);
    check(v3_scc_t0 == '0, "multicomputer mode takes T0 from the chip");
    v3_t0_pin = '0;
    for (int i = 0; i < NN; i++) check(v3_dev_addr[i] != 0, "device address loaded");
    fork
      forward(3);
      forward(4);
    join_none
    fork
      a_source(0, PER_SRC);
      a_source(1, PER_SRC);
      a_source(2, PER_SRC);
    join
    v3_fixed_prio_a = 1; v3_fixed_prio_b = 1;
    g_k3[0].k.corrupt_next = 1;
    body.delete(); body.push_back(16'hFFFF);
    g_k3[0].k.send(8'hFF, body, done); check(done, "broadcast sent");
    expected_rx[1] += 2;
    body.delete(); for (int i = 0; i < 61; i++) body.push_back(i == 0 ? 16'hEE00 : body_word(16'hEE00, i));
    g_k3[1].k.send(8'h20, body, done); check(done, "64-word packet sent");
    expected_rx[0] += 1;
    g_k3[4].k.hold_rx = 1;
    fork
      a_source(2, 2);
      a_source(0, 1);
      begin repeat (3000) @(negedge clk); g_k3[4].k.hold_rx = 0; end
    join
    repeat (3000) @(negedge clk);
    check_sink(5);
    check_sink(6);
    check(g_k3[0].k.lrc_errors + g_k3[1].k.lrc_errors + g_k3[2].k.lrc_errors + g_k3[3].k.lrc_errors +
          g_k3[4].k.lrc_errors + g_k3[5].k.lrc_errors + g_k3[6].k.lrc_errors == 0, "longitudinal checks");
    check(g_k3[0].k.retries >= 1, "corrupted header resent");
  endtask

  // ---------------- master-slave controller ----------------
  task automatic ms_dev_send(input int k, input int tag, input int len);
    word_t pkt [$];
    word_t lrc = '0;
    pkt.push_back(make_hdr0(8'h01));
    pkt.push_back({8'hD0 + 8'(k), 8'(len)});
    for (int i = 0; i < len; i++) pkt.push_back(bw(tag, i));
    foreach (pkt[i]) lrc = lrc_step(lrc, pkt[i]);
    pkt.push_back(lrc);
    foreach (pkt[i]) begin
      @(negedge clk);
      if (k == 0) begin ms_dev_rx_data[0] = pkt[i]; ms_dev_rx_dv[0] = 1; end
      else        begin ms_dev_rx_data[1] = pkt[i]; ms_dev_rx_dv[1] = 1; end
      while (!ms_dev_rx_da[k]) @(negedge clk);
      if (k == 0) ms_dev_rx_dv[0] = 0; else ms_dev_rx_dv[1] = 0;
      while (ms_dev_rx_da[k]) @(negedge clk);
    end
  endtask
  // slave chip c (1..4) passes each received body on (A: to its device, B: to the master)
  task automatic ms_relay(input int c);
    word_t body [$];
    bit ok;
    forever begin
      @(negedge clk);
      if (ms_inbox_size(c) > 0) begin
        repeat (5) @(negedge clk);
        body.delete();
        while (ms_inbox_size(c) > 0) body.push_back(ms_inbox_pop(c));
        case (c)
          1: g_km[1].k.send(8'h01, body, ok);
          2: g_km[2].k.send(8'h01, body, ok);
          3: g_km[3].k.send(8'h01, body, ok);
          default: g_km[4].k.send(8'h01, body, ok);
        endcase
        check(ok, "slave chip passed a packet on");
      end
    end
  endtask
  function automatic int ms_inbox_size(input int c);
    case (c) 0: return g_km[0].k.inbox.size(); 1: return g_km[1].k.inbox.size(); 2: return g_km[2].k.inbox.size();
             3: return g_km[3].k.inbox.size(); default: return g_km[4].k.inbox.size(); endcase
  endfunction
  function automatic word_t ms_inbox_pop(input int c);
    case (c) 0: return g_km[0].k.inbox.pop_front(); 1: return g_km[1].k.inbox.pop_front(); 2: return g_km[2].k.inbox.pop_front();
             3: return g_km[3].k.inbox.pop_front(); default: return g_km[4].k.inbox.pop_front(); endcase
  endfunction

  task automatic run_ms();
    word_t body [$];
    bit ok;
    logic [7:0] id0, id1, src;
    ms_dev_rx_data = '0; ms_dev_rx_dv = '0;
    fork
      g_km[0].k.init(8'h00); g_km[1].k.init(8'h01); g_km[2].k.init(8'h02);
      g_km[3].k.boot_id(8'h10); g_km[4].k.boot_id(8'h10);
    join
    id0 = g_km[3].k.my_id; id1 = g_km[4].k.my_id;
    if (id0 != id1) n_ms_id++;
    check(id0 != id1, "slave-B chips took distinct I.D.s from the token");
    fork ms_relay(1); ms_relay(2); ms_relay(3); ms_relay(4); join_none
    body.delete(); for (int i = 0; i < 6; i++) body.push_back(bw(30, i));
    g_km[0].k.send(8'b0000_0011, body, ok);
    check(ok, "master command sent to both slave-A chips");
    repeat (400) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      check(ms_dev_got[k].size() == 9, "device got the whole command packet");
      if (ms_dev_got[k].size() == 9) begin
        n_ms_down++;
        for (int i = 0; i < 6; i++) check(ms_dev_got[k][2 + i] == bw(30, i), "command word intact at the device");
      end
    end
    fork ms_dev_send(0, 31, 4); ms_dev_send(1, 32, 7); join
    repeat (600) @(negedge clk);
    check(g_km[0].k.inbox_src.size() == 2 && g_km[0].k.inbox.size() == 11, "master got both answers");
    if (g_km[0].k.inbox_src.size() == 2 && g_km[0].k.inbox.size() == 11)
      for (int m = 0; m < 2; m++) begin
        src = g_km[0].k.inbox_src[m];
        check(src == id0 || src == id1, "answer carries a slave-B I.D.");
        for (int i = 0; i < ((src == id0) ? 4 : 7); i++)
          check(ms_inbox_pop(0) == bw((src == id0) ? 31 : 32, i), "answer word intact at the master");
        n_ms_up++;
      end
  endtask

  // ---------------- arbitration hierarchy ----------------
  task automatic run_hier();
    int g;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      h_grp1_req |= NG'($urandom) & NG'($urandom) & NG'($urandom);
      h_grp2_req |= NG'($urandom) & NG'($urandom) & NG'($urandom);
      h_asked += $countones(h_grp1_req) + $countones(h_grp2_req);
      while (h_grp1_grant == 0 && h_grp2_grant == 0) @(negedge clk);
      check($countones({h_grp1_grant, h_grp2_grant}) == 1, "one grant in the hierarchy");
      check(h_master_grant == {h_grp2_grant != 0, h_grp1_grant != 0}, "master grant matches the group");
      if (h_grp1_grant != 0) begin
        g = $clog2(h_grp1_grant); n_g1++;
        check(h_grp1_req[g], "group-1 grant to a requester");
        repeat (1 + $urandom_range(5)) @(negedge clk);
        h_grp1_req[g] = 0;
      end else begin
        g = $clog2(h_grp2_grant); n_g2++;
        check(h_grp2_req[g], "group-2 grant to a requester");
        repeat (1 + $urandom_range(5)) @(negedge clk);
        h_grp2_req[g] = 0;
      end
      h_served++;
    end
    // drain
    while (h_grp1_req != 0 || h_grp2_req != 0) begin
      while (h_grp1_grant == 0 && h_grp2_grant == 0) @(negedge clk);
      if (h_grp1_grant != 0) h_grp1_req[$clog2(h_grp1_grant)] = 0;
      else h_grp2_req[$clog2(h_grp2_grant)] = 0;
      @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(h_grp1_grant == 0 && h_grp2_grant == 0, "hierarchy idle after all requests served");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    fork
      run_v1();
      run_v3();
      run_ms();
      run_hier();
    join
    check(n_pass > 0, "token passed on by chips not waiting");
    check(n_capture >= 6, "token captured for each transfer");
    check(n_nack > 0, "not-ready receivers answered false");
    check(g_k1[3].k.aborts >= 2, "FIRST READY attempts timed out");
    check(n_mode == NN, "every FIFO chip switched to multicomputer mode");
    check(n_ms_id == 1, "slave I.D.s from the token ring");
    check(n_ms_down == 2 && n_ms_up == 2, "master-slave traffic both ways");
    check(n_boot == 5, "boot-time address generation");
    check(n_rr > 0, "round-robin arbitration used");
    check(n_fixed > 0, "fixed-priority arbitration used");
    check(n_prearb > 0, "pre-arbitrated grants happened");
    check(n_stall > 0, "bus stalled while a message waited");
    check(n_refused > 0, "header refused with ERROR IN TRANS.");
    check(n_full > 0, "FIFO reached 64 words");
    check(n_both > 0, "both buses busy at once");
    check(n_discard > 0, "foreign packet words discarded");
    check(n_g1 > 0 && n_g2 > 0, "both groups of the hierarchy granted");
    check(n_gend > 0 && n_mend > 0, "TRANSMISSION END at both levels");
    $display("v1: pass=%0d capture=%0d nack=%0d aborts=%0d", n_pass, n_capture, n_nack, g_k1[3].k.aborts);
    $display("v3: boot=%0d mode=%0d rr=%0d fixed=%0d prearb=%0d stall=%0d refused=%0d full=%0d both=%0d discard=%0d",
             n_boot, n_mode, n_rr, n_fixed, n_prearb, n_stall, n_refused, n_full, n_both, n_discard);
    $display("ms: ids=%0d down=%0d up=%0d", n_ms_id, n_ms_down, n_ms_up);
    $display("hier: grp1=%0d grp2=%0d group_end=%0d master_end=%0d", n_g1, n_g2, n_gend, n_mend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
