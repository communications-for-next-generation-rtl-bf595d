// tb_v1_bus_system: end-to-end test of four version-1 chips on one bus.
// Behavioural SCC kernels (v1_scc_model) run the version-1 protocol. Cases:
// a public broadcast to two receivers; a transfer with a transmission error
// answered by resending the word; FIRST READY with the first receivers not
// ready (their DATA ACCEPTED is driven false, the sender times out and
// shifts the mask); three senders waiting for the token at once, served in
// ring order. Checks the delivered bodies word by word, the longitudinal
// checks, the ring order, and that token pass-through, token capture,
// not-ready answers and error resends all happened.
module tb_v1_bus_system;
  import scc_comm_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] a_wr, b_wr, scc_t0, scc_t1, token_pulse, rx_engaged;
  word_t [N-1:0] a_wdata, a_rdata, b_wdata, b_rdata;
  word_t bus_data;
  logic bus_dv, bus_da, bus_te;
  int checks = 0, failures = 0;
  int n_pass = 0, n_capture = 0, n_nack = 0, order [$];

  v1_bus_system #(.N(N)) dut (.clk, .rst_n, .a_wr, .a_wdata, .a_rdata, .b_wr, .b_wdata, .b_rdata,
                             .scc_t0, .scc_t1, .t1_pin('0), .bus_data, .bus_dv, .bus_da, .bus_te,
                             .token_pulse, .rx_engaged);

  for (genvar i = 0; i < N; i++) begin : g_k
    v1_scc_model k (.clk, .a_wr(a_wr[i]), .a_wdata(a_wdata[i]), .a_rdata(a_rdata[i]),
                    .b_wr(b_wr[i]), .b_wdata(b_wdata[i]), .b_rdata(b_rdata[i]), .t0(scc_t0[i]));
    always @(posedge clk) if (rst_n) begin
      if (dut.g_node[i].u_node.u_arb.token_set) begin n_capture++; order.push_back(i); end
      else if (dut.g_node[i].u_node.arb_in && dut.g_node[i].u_node.u_csr.r.mode) n_pass++;
      if (dut.g_node[i].u_node.u_sel.state == 2'd2) n_nack++;
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // body words have equal bytes, so they never look like a header
  function automatic word_t bw(input int tag, input int i);
    logic [7:0] b;
    b = 8'(tag * 17 + i * 5 + 1);
    return {b, b};
  endfunction

  function automatic int inbox_size(input int k);
    case (k) 0: return g_k[0].k.inbox.size(); 1: return g_k[1].k.inbox.size();
             2: return g_k[2].k.inbox.size(); default: return g_k[3].k.inbox.size(); endcase
  endfunction
  function automatic word_t inbox_pop(input int k);
    case (k) 0: return g_k[0].k.inbox.pop_front(); 1: return g_k[1].k.inbox.pop_front();
             2: return g_k[2].k.inbox.pop_front(); default: return g_k[3].k.inbox.pop_front(); endcase
  endfunction

  task automatic expect_body(input int k, input int tag, input int len);
    check(inbox_size(k) >= len, "body arrived");
    for (int i = 0; i < len && inbox_size(k) > 0; i++) check(inbox_pop(k) == bw(tag, i), "body word intact");
  endtask

  task automatic mk(input int tag, input int len, output word_t body [$]);
    body.delete();
    for (int i = 0; i < len; i++) body.push_back(bw(tag, i));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t body [$];
    bit ok;
    int taken;
    repeat (3) @(negedge clk); rst_n = 1;
    g_k[0].k.init(8'h00); g_k[1].k.init(8'h01); g_k[2].k.init(8'h02); g_k[3].k.init(8'h03);
    repeat (20) @(negedge clk);
    // 1. public broadcast 0 -> {1,2}
    mk(1, 9, body);
    g_k[0].k.send(8'b0110, body, ok); check(ok, "broadcast sent");
    repeat (50) @(negedge clk);
    expect_body(1, 1, 9); expect_body(2, 1, 9);
    check(inbox_size(3) == 0 && inbox_size(0) == 0, "unselected chips receive nothing");
    // 2. error and resend: 1 -> 3, receiver 3 refuses word 4 once
    g_k[3].k.err_at = 4;
    mk(2, 6, body);
    g_k[1].k.send(8'b1000, body, ok); check(ok, "sent despite one error");
    repeat (50) @(negedge clk);
    expect_body(3, 2, 6);
    check(g_k[1].k.retries == 1 && g_k[3].k.errs_sent == 1, "one error, one resend");
    // 3. first ready: 0 and 1 not ready, 2 ready; sender 3
    g_k[0].k.set_ready(0); g_k[1].k.set_ready(0);
    mk(3, 4, body);
    g_k[3].k.send_first_ready(3, body, taken);
    check(taken == 2, "first ready receiver found");
    repeat (50) @(negedge clk);
    expect_body(2, 3, 4);
    check(inbox_size(0) == 0 && inbox_size(1) == 0, "not-ready chips receive nothing");
    g_k[0].k.set_ready(1); g_k[1].k.set_ready(1);
    // 4. synchro-parallel: 0, 1, 2 all send to 3 at once
    order.delete();
    fork
      begin word_t b[$]; bit o; mk(10, 5, b); g_k[0].k.send(8'b1000, b, o); check(o, "sender 0"); end
      begin word_t b[$]; bit o; mk(11, 5, b); g_k[1].k.send(8'b1000, b, o); check(o, "sender 1"); end
      begin word_t b[$]; bit o; mk(12, 5, b); g_k[2].k.send(8'b1000, b, o); check(o, "sender 2"); end
    join
    repeat (50) @(negedge clk);
    check(order.size() == 3, "three token captures");
    if (order.size() == 3)
      check((order[1] == (order[0] + 1) % 3) && (order[2] == (order[1] + 1) % 3), "served in ring order");
    for (int j = 0; j < 3; j++) begin
      // bodies arrive in capture order
      if (order.size() == 3) expect_body(3, 10 + order[j], 5);
    end
    check(g_k[0].k.lrc_errors + g_k[1].k.lrc_errors + g_k[2].k.lrc_errors + g_k[3].k.lrc_errors == 0, "longitudinal checks");
    check(n_pass > 0, "token passed on by chips not waiting");
    check(n_capture >= 6, "token captured for each transfer");
    check(n_nack > 0, "not-ready receivers answered false");
    check(g_k[3].k.aborts >= 2, "first-ready attempts timed out");
    $display("pass=%0d capture=%0d nack=%0d aborts=%0d", n_pass, n_capture, n_nack, g_k[3].k.aborts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
