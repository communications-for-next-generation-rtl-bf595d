// tb_v1_master_slave: end-to-end test of the master-slave controller.
// Behavioural kernels (v1_scc_model) run on the master and on all four
// slave chips; the test bench plays the two bidirectional devices. Steps:
// the slave-B chips take their I.D.s from the token (boot_id); the master
// broadcasts a command to both slave-A chips; each slave A hands the
// command to its device; both devices answer at once through their slave
// B; the slave-B chips share the up bus by the token ring and forward the
// answers to the master. Checks that the I.D.s differ, that each device got
// the command intact, that the master got both answers intact with the
// right sender I.D., and that the longitudinal checks agree.
module tb_v1_master_slave;
  import scc_comm_pkg::*;
  localparam int NS = 2, NC = 1 + 2 * NS;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] a_wr, b_wr, scc_t0, scc_t1, rx_engaged;
  word_t [NC-1:0] a_wdata, a_rdata, b_wdata, b_rdata;
  word_t [NS-1:0] dev_tx_data, dev_rx_data;
  logic [NS-1:0] dev_tx_dv, dev_tx_da, dev_rx_dv, dev_rx_da, dev_rx_te, token_b;
  word_t down_data, up_data;
  word_t dev_got [NS][$];
  int checks = 0, failures = 0;

  v1_master_slave #(.N_SLAVE(NS)) dut (.clk, .rst_n, .a_wr, .a_wdata, .a_rdata, .b_wr, .b_wdata, .b_rdata,
    .scc_t0, .scc_t1, .t1_pin('0), .dev_tx_data, .dev_tx_dv, .dev_tx_da, .dev_rx_data, .dev_rx_dv,
    .dev_rx_da, .dev_rx_te, .down_data, .up_data, .token_b, .rx_engaged);

  for (genvar i = 0; i < NC; i++) begin : g_k
    v1_scc_model k (.clk, .a_wr(a_wr[i]), .a_wdata(a_wdata[i]), .a_rdata(a_rdata[i]),
                    .b_wr(b_wr[i]), .b_wdata(b_wdata[i]), .b_rdata(b_rdata[i]), .t0(scc_t0[i]));
  end

  // device receivers: accept every word from slave A
  for (genvar k = 0; k < NS; k++) begin : g_dev
    initial dev_tx_da[k] = 0;
    always @(negedge clk) begin
      if (dev_tx_dv[k] && !dev_tx_da[k]) begin dev_got[k].push_back(dev_tx_data[k]); dev_tx_da[k] <= 1; end
      else if (!dev_tx_dv[k]) dev_tx_da[k] <= 0;
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic word_t bw(input int tag, input int i);
    logic [7:0] b;
    b = 8'(tag * 29 + i * 3 + 7);
    return {b, b};
  endfunction

  // device k sends a packet to its slave B (receiver mask bit 0)
  task automatic dev_send(input int k, input int tag, input int len);
    word_t pkt [$];
    word_t lrc = '0;
    pkt.push_back(make_hdr0(8'h01));
    pkt.push_back({8'hD0 + 8'(k), 8'(len)});
    for (int i = 0; i < len; i++) pkt.push_back(bw(tag, i));
    foreach (pkt[i]) lrc = lrc_step(lrc, pkt[i]);
    pkt.push_back(lrc);
    foreach (pkt[i]) begin
      @(negedge clk);
      if (k == 0) begin dev_rx_data[0] = pkt[i]; dev_rx_dv[0] = 1; end
      else        begin dev_rx_data[1] = pkt[i]; dev_rx_dv[1] = 1; end
      while (!dev_rx_da[k]) @(negedge clk);
      if (k == 0) dev_rx_dv[0] = 0; else dev_rx_dv[1] = 0;
      while (dev_rx_da[k]) @(negedge clk);
    end
  endtask

  // slave A k: pass each received body on to the device
  task automatic relay_a(input int k);
    word_t body [$];
    bit ok;
    forever begin
      @(negedge clk);
      if (k == 0 ? g_k[1].k.inbox.size() > 0 : g_k[2].k.inbox.size() > 0) begin
        repeat (5) @(negedge clk);           // whole body has arrived
        body.delete();
        if (k == 0) while (g_k[1].k.inbox.size() > 0) body.push_back(g_k[1].k.inbox.pop_front());
        else        while (g_k[2].k.inbox.size() > 0) body.push_back(g_k[2].k.inbox.pop_front());
        if (k == 0) g_k[1].k.send(8'h01, body, ok); else g_k[2].k.send(8'h01, body, ok);
        check(ok, "slave A delivered to its device");
      end
    end
  endtask

  // slave B k: pass each packet from the device on to the master
  task automatic relay_b(input int k);
    word_t body [$];
    bit ok;
    forever begin
      @(negedge clk);
      if (k == 0 ? g_k[3].k.inbox.size() > 0 : g_k[4].k.inbox.size() > 0) begin
        repeat (5) @(negedge clk);
        body.delete();
        if (k == 0) while (g_k[3].k.inbox.size() > 0) body.push_back(g_k[3].k.inbox.pop_front());
        else        while (g_k[4].k.inbox.size() > 0) body.push_back(g_k[4].k.inbox.pop_front());
        if (k == 0) g_k[3].k.send(8'h01, body, ok); else g_k[4].k.send(8'h01, body, ok);
        check(ok, "slave B delivered to the master");
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t body [$];
    bit ok;
    logic [7:0] id0, id1;
    int got_tag [2];
    dev_rx_data = '0; dev_rx_dv = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    fork
      g_k[0].k.init(8'h00);
      g_k[1].k.init(8'h01);
      g_k[2].k.init(8'h02);
      g_k[3].k.boot_id(8'h10);
      g_k[4].k.boot_id(8'h10);
    join
    id0 = g_k[3].k.my_id; id1 = g_k[4].k.my_id;
    check(id0 != id1 && (id0 == 8'h10 || id0 == 8'h11) && (id1 == 8'h10 || id1 == 8'h11),
          "slave-B chips took distinct I.D.s from the token");
    fork relay_a(0); relay_a(1); relay_b(0); relay_b(1); join_none
    // command to both devices
    body.delete(); for (int i = 0; i < 6; i++) body.push_back(bw(1, i));
    g_k[0].k.send(8'b0000_0011, body, ok);
    check(ok, "master command sent to both slave-A chips");
    repeat (400) @(negedge clk);
    for (int k = 0; k < NS; k++) begin
      check(dev_got[k].size() == 9, "device got header, length, 6 words, check word");
      if (dev_got[k].size() == 9)
        for (int i = 0; i < 6; i++) check(dev_got[k][2 + i] == bw(1, i), "command word intact at the device");
    end
    // both devices answer at once
    fork dev_send(0, 20, 4); dev_send(1, 21, 7); join
    repeat (600) @(negedge clk);
    check(g_k[0].k.inbox_src.size() == 2, "master got two answers");
    check(g_k[0].k.inbox.size() == 11, "answer bodies complete");
    if (g_k[0].k.inbox_src.size() == 2 && g_k[0].k.inbox.size() == 11) begin
      // answers arrive in token order; identify each by its sender I.D.
      for (int m = 0; m < 2; m++) begin
        int len, tag;
        logic [7:0] src;
        src = g_k[0].k.inbox_src[m];
        check(src == id0 || src == id1, "sender I.D. is a slave-B I.D.");
        tag = (src == id0) ? 20 : 21;
        len = (src == id0) ? 4 : 7;
        for (int i = 0; i < len; i++) check(g_k[0].k.inbox.pop_front() == bw(tag, i), "answer word intact");
      end
    end
    check(g_k[0].k.lrc_errors + g_k[1].k.lrc_errors + g_k[2].k.lrc_errors + g_k[3].k.lrc_errors +
          g_k[4].k.lrc_errors == 0, "longitudinal checks");
    $display("slave-B I.D.s %h %h", id0, id1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
