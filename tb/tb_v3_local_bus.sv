// tb_v3_local_bus: self-checking test of one local bus (arbitrator plus
// joined lines) with three transmitters and two receivers. Random requests
// and random line values; checks that the bus carries the granted
// transmitter's data and DATA VALID, that DATA ACCEPTED is the AND of the
// driving receivers (false when none drives), that ERROR IN TRANS. is the
// OR, and that a release gives TRANSMISSION END.
module tb_v3_local_bus;
  import scc_comm_pkg::*;
  logic clk = 0, rst_n = 0, fixed_prio = 0;
  word_t [2:0] s_data;
  logic [2:0] s_oe, dv_out, dv_oe, br = '0, bg;
  logic [1:0] da_out, err_out, rhs_oe;
  word_t bus_data;
  logic bus_dv, bus_da, bus_err, trans_end, prearb_grant;
  int checks = 0, failures = 0, n_te = 0;

  v3_local_bus #(.N_TX(3), .N_RX(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // transmitters drive only while granted, as the chips do
  always_comb for (int i = 0; i < 3; i++) begin
    s_oe[i] = bg[i]; dv_oe[i] = bg[i];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [2:0] bg_prev;
    repeat (2) @(negedge clk); rst_n = 1;
    bg_prev = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t == 1000) fixed_prio = 1;
      // release a held grant sometimes, request at random
      for (int i = 0; i < 3; i++) begin
        if (bg[i] && $urandom_range(0, 7) == 0) br[i] = 0;
        else if (!bg[i] && $urandom_range(0, 3) == 0) br[i] = 1;
        s_data[i] = word_t'($urandom);
        dv_out[i] = 1'($urandom);
      end
      da_out = 2'($urandom); err_out = 2'($urandom); rhs_oe = 2'($urandom);
      #1;
      check($countones(bg) <= 1, "one grant");
      begin
        word_t ed; logic ev, ea, ee;
        ed = '0; ev = 0;
        for (int i = 0; i < 3; i++) if (bg[i]) begin ed = s_data[i]; ev = dv_out[i]; end
        ea = (rhs_oe != 0);
        ee = 0;
        for (int j = 0; j < 2; j++) if (rhs_oe[j]) begin ea &= da_out[j]; ee |= err_out[j]; end
        check(bus_data == ed && bus_dv == ev, "bus carries the granted sender");
        check(bus_da == ea, "wired-AND DATA ACCEPTED");
        check(bus_err == ee, "joined ERROR IN TRANS.");
      end
      if (trans_end) n_te++;
      bg_prev = bg;
    end
    check(n_te > 50, "TRANSMISSION END pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
