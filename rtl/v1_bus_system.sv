// v1_bus_system: N version-1 chips sharing one message bus.
//
// Every node's send port S drives the common 16-bit bus and every node's
// receive port R listens to it (the completely connected arrangement). The
// ARBITRATION OUT pin of node i feeds ARBITRATION IN of node i+1, and the
// last node closes the ring to node 0; one token pulse is inserted at node 0
// in the first clock after reset. The SELECT pin of node i is bus line 8+i,
// that is bit i of the receiver mask in the header word. The DATA ACCEPTED
// lines of all receivers are joined wired-AND; the sender's DATA ACCEPTED
// input sees the joined line. These connections follow the design.
//
// Choices of this design: three-state joining is modelled as OR of the
// enabled drivers for data and DATA VALID (one sender holds the token at a
// time), the wired-AND DATA ACCEPTED reads false when no receiver drives
// it, and the TRANS. ERROR lines are joined wired-OR onto every node's T0/M
// input. The ring needs at least 2 nodes; at most 8 can be selected.
//
// SCC-side ports of node i are the i-th element of each array. Debug
// outputs show the bus, its handshake lines, the token pulse entering each
// node and which nodes have their receive port engaged.
module v1_bus_system
  import scc_comm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  a_wr,
  input  word_t [N-1:0] a_wdata,
  output word_t [N-1:0] a_rdata,
  input  logic [N-1:0]  b_wr,
  input  word_t [N-1:0] b_wdata,
  output word_t [N-1:0] b_rdata,
  output logic [N-1:0]  scc_t0,
  output logic [N-1:0]  scc_t1,
  input  logic [N-1:0]  t1_pin,
  output word_t         bus_data,
  output logic          bus_dv,
  output logic          bus_da,
  output logic          bus_te,
  output logic [N-1:0]  token_pulse,
  output logic [N-1:0]  rx_engaged
);

  word_t [N-1:0] s_data;
  logic  [N-1:0] s_oe, dv_out, dv_oe, da_out, da_oe, te_out, te_oe;
  logic  [N-1:0] arb_in, arb_out;
  logic          start_done;
  logic          start_pulse;

  // One token pulse into the ring at reset time.
  always_ff @(posedge clk) begin
    if (!rst_n) start_done <= 1'b0;
    else        start_done <= 1'b1;
  end
  assign start_pulse = rst_n && !start_done;

  always_comb begin
    bus_data = '0;
    bus_dv   = 1'b0;
    bus_te   = 1'b0;
    bus_da   = |da_oe;
    for (int i = 0; i < N; i++) begin
      if (s_oe[i])  bus_data |= s_data[i];
      if (dv_oe[i]) bus_dv   |= dv_out[i];
      if (te_oe[i]) bus_te   |= te_out[i];
      if (da_oe[i]) bus_da   &= da_out[i];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_node
    if (i == 0) begin : g_first
      assign arb_in[i] = arb_out[N-1] || start_pulse;
    end else begin : g_next
      assign arb_in[i] = arb_out[i-1];
    end

    v1_node u_node (
      .clk, .rst_n,
      .a_wr    (a_wr[i]),
      .a_wdata (a_wdata[i]),
      .a_rdata (a_rdata[i]),
      .b_wr    (b_wr[i]),
      .b_wdata (b_wdata[i]),
      .b_rdata (b_rdata[i]),
      .scc_t0  (scc_t0[i]),
      .scc_t1  (scc_t1[i]),
      .s_data  (s_data[i]),
      .s_oe    (s_oe[i]),
      .dv_out  (dv_out[i]),
      .dv_oe   (dv_oe[i]),
      .da_in   (bus_da),
      .t0m     (bus_te),
      .arb_in  (arb_in[i]),
      .arb_out (arb_out[i]),
      .r_data  (bus_data),
      .select  (bus_data[8 + (i % 8)]),
      .dv_in   (bus_dv),
      .da_out  (da_out[i]),
      .da_oe   (da_oe[i]),
      .te_out  (te_out[i]),
      .te_oe   (te_oe[i]),
      .r_en    (rx_engaged[i]),
      .t1_pin  (t1_pin[i])
    );
  end

  assign token_pulse = arb_in;

endmodule
