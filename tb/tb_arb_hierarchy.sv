// tb_arb_hierarchy: self-checking test of the two-level arbitration system.
// Random modules of both groups request; each granted module holds the bus a
// random time and then drops its request. Checks that at most one module in
// the whole system holds a grant, that within a group successive grants go
// round robin (first requester after the previous one), that a grant goes
// only to a requester, that group 2 gets the bus while group 1 waits only
// right after a group-1 tenure (the master's pre-arbitration leaves out the
// group that is releasing), that group 1 wins when group 2 releases, that each release gives a group TRANSMISSION END,
// and that every requester is served.
module tb_arb_hierarchy;
  localparam int N = 15;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] grp1_req = '0, grp2_req = '0, grp1_grant, grp2_grant;
  logic grp1_end, grp2_end, master_end;
  logic [1:0] master_grant;
  int checks = 0, failures = 0, served1 = 0, served2 = 0, ends = 0, g1_over_g2 = 0;
  int last1 = N - 1, last2 = N - 1;

  arb_hierarchy #(.N_GRP(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int rr_next(input logic [N-1:0] r, input int prev);
    for (int k = 1; k <= N; k++) if (r[(prev + k) % N]) return (prev + k) % N;
    return -1;
  endfunction

  always @(negedge clk) if (rst_n) begin
    check($countones({grp1_grant, grp2_grant}) <= 1, "one grant in the system");
    if (grp1_end || grp2_end) ends++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int g, e, wait_n;
    int prev_grp = 0;
    logic [N-1:0] r1_before, r2_before;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      grp1_req |= 15'($urandom) & 15'($urandom) & 15'($urandom);
      grp2_req |= 15'($urandom) & 15'($urandom);
      r1_before = grp1_req; r2_before = grp2_req;
      // wait for the next grant
      wait_n = 0;
      while (grp1_grant == 0 && grp2_grant == 0 && wait_n < 50) begin @(negedge clk); wait_n++; end
      if (r1_before == 0 && r2_before == 0) continue;
      check(wait_n < 50, "a waiting request is granted");
      if (grp1_grant != 0) begin
        g = $clog2(grp1_grant);
        check(grp1_req[g], "grant goes to a group-1 requester");
        e = rr_next(r1_before, last1);
        check(g == e, "group 1 round robin");
        last1 = g; served1++;
        if (r2_before != 0 && prev_grp == 2) g1_over_g2++;
        prev_grp = 1;
        repeat ($urandom_range(1, 5)) @(negedge clk);
        grp1_req[g] = 1'b0;
      end else begin
        g = $clog2(grp2_grant);
        check(grp2_req[g], "grant goes to a group-2 requester");
        check(r1_before == 0 || prev_grp == 1, "group 2 only when group 1 is not waiting or just had its turn");
        prev_grp = 2;
        e = rr_next(r2_before, last2);
        check(g == e, "group 2 round robin");
        last2 = g; served2++;
        repeat ($urandom_range(1, 5)) @(negedge clk);
        grp2_req[g] = 1'b0;
      end
      @(negedge clk);
      check(grp1_end || grp2_end, "group TRANSMISSION END after release");
      @(negedge clk);
    end
    // drain: everyone left must be served
    grp1_req = grp1_req; repeat (2000) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (grp1_grant[i]) grp1_req[i] = 1'b0;
        if (grp2_grant[i]) grp2_req[i] = 1'b0;
      end
    end
    check(grp1_req == 0 && grp2_req == 0, "all requesters served");
    check(served1 > 20 && served2 > 5 && g1_over_g2 > 5, "both groups served, group 1 preferred");
    $display("served1=%0d served2=%0d g1_over_g2=%0d ends=%0d", served1, served2, g1_over_g2, ends);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
