// tb_v1_fanout_tree: a two-level fan-out tree of version-1 buses.
//
// The document obtains larger fan-outs "by simply connecting the chips in
// the form of a tree", like a decoder tree. Here a root bus of N chips
// carries a source (chip 0) and N-1 relays (chips 1..N-1); each relay r
// drives its own leaf bus, where it is chip 0 and chips 1..N-1 are leaves.
// The source broadcasts a message to all relays (mask of chips 1..N-1),
// each relay kernel forwards the body by a broadcast on its leaf bus, so
// one send reaches (N-1)*(N-1) leaves: 49 with the full N = 8. Several
// messages are sent back to back, and every leaf must receive every body
// intact and in order.
//
// Design choices of this testbench: a relay is one chip in the document,
// receiving on its R port from the root bus and sending on its S port to
// its leaf bus; v1_bus_system joins both ports of a chip to one bus, so a
// relay is modelled as two chips (root-bus chip r, leaf-bus chip 0) whose
// kernels are joined here, the root-side kernel passing each received body
// to the leaf-side kernel. The document gives no tree size in chips beyond
// "one extra layer of 8 chips"; with eight SELECT lines per bus and the
// source on the root bus, N = 8 gives 7 relays and 49 leaves.
module tb_v1_fanout_tree;
  import scc_comm_pkg::*;
  localparam int N = 8;
  localparam int MSGS = 3;
  localparam int LEN = 12;
  localparam logic [7:0] ALL = 8'(((1 << N) - 1) & ~1);   // chips 1..N-1
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int got [N][N];       // messages a leaf received, [relay][leaf]
  int bad [N][N];       // body words that differed
  int fwd [N];          // messages a relay forwarded

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // body words have equal bytes, so they never look like a header
  function automatic word_t bw(input int tag, input int i);
    logic [7:0] b;
    b = 8'(tag * 29 + i * 3 + 7);
    return {b, b};
  endfunction

  // ---- root bus
  logic [N-1:0] r_a_wr, r_b_wr, r_t0, r_t1, r_tok, r_eng;
  word_t [N-1:0] r_a_wdata, r_a_rdata, r_b_wdata, r_b_rdata;
  word_t r_data;
  logic r_dv, r_da, r_te;

  v1_bus_system #(.N(N)) u_root (.clk, .rst_n, .a_wr(r_a_wr), .a_wdata(r_a_wdata), .a_rdata(r_a_rdata),
                                 .b_wr(r_b_wr), .b_wdata(r_b_wdata), .b_rdata(r_b_rdata),
                                 .scc_t0(r_t0), .scc_t1(r_t1), .t1_pin('0), .bus_data(r_data),
                                 .bus_dv(r_dv), .bus_da(r_da), .bus_te(r_te), .token_pulse(r_tok),
                                 .rx_engaged(r_eng));

  for (genvar i = 0; i < N; i++) begin : g_root
    v1_scc_model k (.clk, .a_wr(r_a_wr[i]), .a_wdata(r_a_wdata[i]), .a_rdata(r_a_rdata[i]),
                    .b_wr(r_b_wr[i]), .b_wdata(r_b_wdata[i]), .b_rdata(r_b_rdata[i]), .t0(r_t0[i]));
    initial begin
      repeat (3) @(negedge clk);
      k.init(8'(i));
    end
  end

  // ---- one leaf bus per relay
  for (genvar r = 1; r < N; r++) begin : g_leaf
    logic [N-1:0] a_wr, b_wr, t0, t1, tok, eng;
    word_t [N-1:0] a_wdata, a_rdata, b_wdata, b_rdata;
    word_t data;
    logic dv, da, te;

    v1_bus_system #(.N(N)) u_bus (.clk, .rst_n, .a_wr, .a_wdata, .a_rdata, .b_wr, .b_wdata, .b_rdata,
                                  .scc_t0(t0), .scc_t1(t1), .t1_pin('0), .bus_data(data), .bus_dv(dv),
                                  .bus_da(da), .bus_te(te), .token_pulse(tok), .rx_engaged(eng));

    for (genvar j = 0; j < N; j++) begin : g_k
      v1_scc_model k (.clk, .a_wr(a_wr[j]), .a_wdata(a_wdata[j]), .a_rdata(a_rdata[j]),
                      .b_wr(b_wr[j]), .b_wdata(b_wdata[j]), .b_rdata(b_rdata[j]), .t0(t0[j]));
      initial begin
        repeat (3) @(negedge clk);
        k.init(8'(16 * r + j));
      end
      // leaves check each body as it arrives
      if (j > 0) begin : g_chk
        initial begin
          forever begin
            @(negedge clk);
            if (k.inbox.size() >= LEN) begin
              for (int i = 0; i < LEN; i++)
                if (k.inbox.pop_front() != bw(got[r][j], i)) bad[r][j]++;
              got[r][j]++;
            end
          end
        end
      end
    end

    // the relay kernel: take each body from the root bus, broadcast it on
    // the leaf bus
    initial begin
      word_t body [$];
      bit ok;
      forever begin
        @(negedge clk);
        if (g_root[r].k.inbox.size() >= LEN) begin
          body.delete();
          for (int i = 0; i < LEN; i++) body.push_back(g_root[r].k.inbox.pop_front());
          g_k[0].k.send(ALL, body, ok);
          if (ok) fwd[r]++;
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t body [$];
    bit ok;
    int total, n;
    for (int r = 0; r < N; r++) begin
      fwd[r] = 0;
      for (int j = 0; j < N; j++) begin got[r][j] = 0; bad[r][j] = 0; end
    end
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (30) @(negedge clk);
    for (int m = 0; m < MSGS; m++) begin
      body.delete();
      for (int i = 0; i < LEN; i++) body.push_back(bw(m, i));
      g_root[0].k.send(ALL, body, ok);
      check(ok, "source broadcast to all relays");
    end
    // wait until every leaf has every message
    n = 0;
    do begin
      repeat (100) @(negedge clk); n++;
      total = 0;
      for (int r = 1; r < N; r++) for (int j = 1; j < N; j++) total += got[r][j];
    end while (total < MSGS * (N - 1) * (N - 1) && n < 2000);
    for (int r = 1; r < N; r++) begin
      check(fwd[r] == MSGS, "relay forwarded every message");
      for (int j = 1; j < N; j++) begin
        check(got[r][j] == MSGS, "leaf received every message");
        check(bad[r][j] == 0, "leaf bodies intact and in order");
      end
    end
    check(g_root[0].k.msgs_tx == MSGS, "one send per message at the source");
    $display("fanout=%0d messages delivered=%0d of %0d", (N - 1) * (N - 1), total, MSGS * (N - 1) * (N - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
