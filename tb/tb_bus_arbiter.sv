// tb_bus_arbiter: self-checking test of the bus arbitrator at its full size
// (15 request pins). A reference model decides, for every tenure, who must
// be granted next: in fixed-priority mode the lowest pin number among the
// requesters, in round-robin mode the first requester after the previous
// master. Random requesters hold the bus for random times. Checks the
// winner, one grant at a time, the one-clock TRANSMISSION END pulse one
// clock after release, the pre-arbitrated grant one clock after that, and
// the one-clock grant latency on an idle bus. A last phase frees the bus
// completely between tenures, so that each grant is a fresh arbitration
// among several requesters, in both modes.
module tb_bus_arbiter;
  localparam int N = 15;
  logic clk = 0, rst_n = 0;
  logic [N:0] req_port, grant_port;
  logic up_req, prearb_grant;
  logic [N-1:0] want = '0;     // modules that want the bus
  logic fixed = 1;
  int hold [N];
  int checks = 0, failures = 0, prearbs = 0, tenures = 0;
  int last = N - 1;

  bus_arbiter #(.N_REQ(N)) dut (.clk, .rst_n, .req_port, .grant_port, .up_req, .up_gnt(1'b1), .prearb_grant);
  always #5 clk = ~clk;
  assign req_port = {fixed, want};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t grant=%h want=%h", what, $time, grant_port, want); end
  endtask

  function automatic int expect_winner(input logic [N-1:0] r, input int prev, input bit fx);
    for (int k = 0; k < N; k++) begin
      int i;
      i = fx ? k : (prev + 1 + k) % N;
      if (r[i]) return i;
    end
    return -1;
  endfunction

  always_ff @(posedge clk) if (prearb_grant) prearbs <= prearbs + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int g, e, cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    // idle bus: one clock to grant
    @(negedge clk); want = 15'h0010;
    @(negedge clk); check(grant_port == 16'h0010, "idle grant after one clock");
    last = 4;
    for (int phase = 0; phase < 2; phase++) begin
      fixed = (phase == 0);
      for (int t = 0; t < 150; t++) begin
        // current master is whoever holds the grant; others request at random
        g = -1;
        for (int i = 0; i < N; i++) if (grant_port[i]) g = i;
        if (g < 0) begin
          want = 15'($urandom) | 15'(1 << $urandom_range(0, N-1));
          @(negedge clk);
          for (int i = 0; i < N; i++) if (grant_port[i]) g = i;
          e = expect_winner(want, last, fixed);
          check(g == e, "winner on idle bus");
          last = g;
          continue;
        end
        // add requesters while busy, then release
        want |= 15'($urandom) & 15'($urandom);
        repeat ($urandom_range(1, 4)) @(negedge clk);
        want[g] = 1'b0;
        e = expect_winner(want, g, fixed);
        @(negedge clk);
        check(grant_port[N] == 1'b1 && grant_port[N-1:0] == '0, "TRANSMISSION END pulse, no grant");
        @(negedge clk);
        check(grant_port[N] == 1'b0, "TRANSMISSION END one clock");
        if (e >= 0) begin
          check(grant_port[N-1:0] == 15'(1 << e), "pre-arbitrated winner granted at once");
          last = e;
        end else begin
          check(grant_port[N-1:0] == '0, "no grant without requests");
        end
        tenures++;
      end
      want = '0;
      repeat (4) @(negedge clk);
    end
    // fresh arbitration on a free bus in both modes: every master releases
    // with nobody else waiting, then several modules request at once
    for (int t = 0; t < 60; t++) begin
      fixed = (t % 3 == 0);
      want = 15'($urandom) | 15'(1 << $urandom_range(0, N-1));
      @(negedge clk);
      g = -1;
      for (int i = 0; i < N; i++) if (grant_port[i]) g = i;
      e = expect_winner(want, last, fixed);
      check(g == e, "winner of a fresh arbitration");
      last = g;
      want = '0;
      repeat (3) @(negedge clk);
      check(grant_port == '0, "bus free again");
    end
    check(prearbs > 100, "pre-arbitration used");
    $display("tenures=%0d prearb=%0d", tenures, prearbs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
