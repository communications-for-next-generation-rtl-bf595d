// tb_message_sizes: messages of every size the document quotes, on both
// kinds of chip.
//
// The document sizes its traffic from a text-to-speech system that sends
// "packages of between 2 and 130 bytes every 10 milliseconds", and its
// message format (header with an eight-bit length) allows bodies up to 254
// words here. This testbench sends such streams:
//   version-1 bus (v1_bus_system, 4 chips): chip 0 sends chip 2 a body of
//     1 word (2 bytes), 65 words (130 bytes), 254 words (the longest), and
//     a stream of random sizes between 1 and 65 words.
//   FIFO chips (v3_system, default size): chip 0 on bus A sends chip 3 the
//     same stream; a body that would not fit in the 64-word FIFO (more than
//     61 words) is split by the sender kernel into pieces of at most 61
//     words, which the receiver joins again. The 61-word piece fills the
//     FIFO to all 64 words.
// Every body must arrive intact and in order. The 10 ms period is not
// modelled: the document gives no clock rate, so packets follow each other
// as fast as the kernels send them.
module tb_message_sizes;
  import scc_comm_pkg::*;
  localparam int N1 = 4;
  localparam int NN = 7;
  localparam int FIFO_BODY = 61;       // 64 words less header (2) and check (1)
  localparam int N_RANDOM = 10;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int sizes [$];
  bit fifo_filled = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // body words have equal bytes, so they never look like a header
  function automatic word_t bw(input int tag, input int i);
    logic [7:0] b;
    b = 8'(tag * 37 + i * 11 + 3);
    return {b, b};
  endfunction

  // ---- version-1 bus
  logic [N1-1:0] v1_a_wr, v1_b_wr, v1_t0, v1_t1, v1_tok, v1_eng;
  word_t [N1-1:0] v1_a_wdata, v1_a_rdata, v1_b_wdata, v1_b_rdata;
  word_t v1_data;
  logic v1_dv, v1_da, v1_te;

  v1_bus_system #(.N(N1)) u_v1 (.clk, .rst_n, .a_wr(v1_a_wr), .a_wdata(v1_a_wdata), .a_rdata(v1_a_rdata),
                                .b_wr(v1_b_wr), .b_wdata(v1_b_wdata), .b_rdata(v1_b_rdata),
                                .scc_t0(v1_t0), .scc_t1(v1_t1), .t1_pin('0), .bus_data(v1_data),
                                .bus_dv(v1_dv), .bus_da(v1_da), .bus_te(v1_te), .token_pulse(v1_tok),
                                .rx_engaged(v1_eng));

  for (genvar i = 0; i < N1; i++) begin : g_v1
    v1_scc_model k (.clk, .a_wr(v1_a_wr[i]), .a_wdata(v1_a_wdata[i]), .a_rdata(v1_a_rdata[i]),
                    .b_wr(v1_b_wr[i]), .b_wdata(v1_b_wdata[i]), .b_rdata(v1_b_rdata[i]), .t0(v1_t0[i]));
  end

  // ---- FIFO chips
  logic fixed_prio_a = 0, fixed_prio_b = 0;
  logic [NN-1:0] a_wr, a_rd, b_wr, scc_t0, scc_t1;
  word_t [NN-1:0] a_wdata, a_rdata, b_wdata, b_rdata;
  word_t bus_a_data, bus_b_data;
  logic [1:0] trans_end, prearb_grant;
  logic [NN-1:0] refused, fifo_valid;
  logic [7:0] dev_addr [7];

  v3_system u_v3 (.clk, .rst_n, .fixed_prio_a, .fixed_prio_b, .a_wr, .a_wdata, .a_rd, .a_rdata,
                  .b_wr, .b_wdata, .b_rdata, .scc_t0, .scc_t1, .t0_pin('0), .t1_pin('0),
                  .bus_a_data, .bus_b_data, .trans_end, .prearb_grant, .refused, .fifo_valid, .dev_addr);

  for (genvar i = 0; i < NN; i++) begin : g_v3
    v3_scc_model k (.clk, .a_wr(a_wr[i]), .a_wdata(a_wdata[i]), .a_rd(a_rd[i]), .a_rdata(a_rdata[i]),
                    .b_wr(b_wr[i]), .b_wdata(b_wdata[i]), .b_rdata(b_rdata[i]), .t0(scc_t0[i]), .t1(scc_t1[i]));
  end

  always @(posedge clk) if (rst_n && u_v3.g_node[3].u_node.fifo_full) fifo_filled = 1;

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic mk(input int tag, input int len, output word_t body [$]);
    body.delete();
    for (int i = 0; i < len; i++) body.push_back(bw(tag, i));
  endtask

  task automatic v1_stream();
    word_t body [$];
    bit ok;
    foreach (sizes[m]) begin
      mk(m, sizes[m], body);
      g_v1[0].k.send(8'b0100, body, ok);
      check(ok, "version-1 message sent");
    end
    repeat (100) @(negedge clk);
    foreach (sizes[m]) begin
      check(g_v1[2].k.inbox.size() >= sizes[m], "version-1 body arrived");
      for (int i = 0; i < sizes[m] && g_v1[2].k.inbox.size() > 0; i++)
        check(g_v1[2].k.inbox.pop_front() == bw(m, i), "version-1 body word intact");
    end
    check(g_v1[2].k.msgs_rx == sizes.size(), "one version-1 message per body");
    check(g_v1[2].k.lrc_errors == 0, "version-1 longitudinal checks");
  endtask

  task automatic v3_stream();
    word_t body [$], piece [$];
    bit done;
    int pieces = 0;
    foreach (sizes[m]) begin
      mk(m, sizes[m], body);
      while (body.size() > 0) begin
        piece.delete();
        while (body.size() > 0 && piece.size() < FIFO_BODY) piece.push_back(body.pop_front());
        g_v3[0].k.send(8'h20, piece, done);
        check(done, "FIFO-chip packet sent");
        pieces++;
      end
    end
    repeat (200) @(negedge clk);
    foreach (sizes[m]) begin
      check(g_v3[3].k.inbox.size() >= sizes[m], "FIFO-chip body arrived");
      for (int i = 0; i < sizes[m] && g_v3[3].k.inbox.size() > 0; i++)
        check(g_v3[3].k.inbox.pop_front() == bw(m, i), "FIFO-chip body word intact");
    end
    check(g_v3[3].k.msgs_rx == pieces, "one FIFO-chip packet per piece");
    check(pieces > sizes.size(), "long bodies were split");
    check(g_v3[3].k.lrc_errors == 0, "FIFO-chip longitudinal checks");
  endtask

  initial begin
    sizes = '{1, 65, MAX_BODY, FIFO_BODY};
    for (int i = 0; i < N_RANDOM; i++) sizes.push_back($urandom_range(1, 65));
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    g_v1[0].k.init(8'h00); g_v1[1].k.init(8'h01); g_v1[2].k.init(8'h02); g_v1[3].k.init(8'h03);
    g_v3[0].k.init(8'h10); g_v3[1].k.init(8'h11); g_v3[2].k.init(8'h12);
    g_v3[3].k.init(8'h20); g_v3[4].k.init(8'h21); g_v3[5].k.init(8'h30); g_v3[6].k.init(8'h31);
    repeat (20) @(negedge clk);
    fork
      v1_stream();
      v3_stream();
    join
    check(fifo_filled, "a 61-word piece filled the FIFO");
    $display("messages=%0d longest=%0d words", sizes.size(), MAX_BODY);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
