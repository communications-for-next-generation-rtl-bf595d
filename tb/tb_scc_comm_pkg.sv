// tb_scc_comm_pkg: self-checking test of the shared functions and types:
// header packing (receiver I.D. in the upper byte), check bits, header
// validity for every receiver byte, and the longitudinal check.
module tb_scc_comm_pkg;
  import scc_comm_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    hdr0_t h;
    hdr1_t h1;
    word_t acc;
    for (int i = 0; i < 256; i++) begin
      word_t w;
      w = make_hdr0(8'(i));
      check(w[15:8] == 8'(i) && w[7:0] == ~8'(i), "header layout");
      check(hdr0_ok(w), "valid header accepted");
      check(!hdr0_ok(w ^ 16'h0001) && !hdr0_ok(w ^ 16'h0100), "one-bit error rejected");
      check(!hdr0_ok({8'(i), 8'(i)}), "equal bytes never a header");
    end
    h = hdr0_t'(16'hA55A);
    check(h.rcv_id == 8'hA5 && h.check == 8'h5A, "hdr0 struct fields");
    h1 = hdr1_t'(16'h0709);
    check(h1.snd_id == 8'h07 && h1.length == 8'h09, "hdr1 struct fields");
    acc = '0;
    for (int i = 0; i < 10; i++) acc = lrc_step(acc, word_t'(i * 3));
    check(acc == (16'd0 ^ 16'd3 ^ 16'd6 ^ 16'd9 ^ 16'd12 ^ 16'd15 ^ 16'd18 ^ 16'd21 ^ 16'd24 ^ 16'd27), "longitudinal check");
    check(WORD_W == 16 && MAX_BODY == 254 && BROADCAST_ADDR == 8'hFF, "constants");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
