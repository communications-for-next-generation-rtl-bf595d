// v3_system: two local buses of chips with FIFO in series.
//
// Three modules transmit on local bus A; two modules receive from bus A and
// transmit on local bus B; two modules receive from bus B. Each bus has its
// own arbitrator (v3_local_bus), so a transfer on A and a transfer on B can
// proceed at the same time, and a middle module can receive a packet into
// its FIFO while it transmits on B. The arrangement and the module counts
// follow the design's local bus connection scheme.
//
// SCC-side ports are arrays over the seven chips: index 0..2 transmit on A,
// 3..4 receive from A and transmit on B, 5..6 receive from B. The unused
// receive port of chips 0..2 sees an idle bus; the send port of chips 5..6
// has no bus in this arrangement and its outputs are left unused. dev_addr
// shows each chip's device address. fixed_prio_a/b
// drive pin 16 of each arbitrator's request port.
module v3_system
  import scc_comm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 63
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fixed_prio_a,
  input  logic          fixed_prio_b,
  input  logic [6:0]    a_wr,
  input  word_t [6:0]   a_wdata,
  input  logic [6:0]    a_rd,
  output word_t [6:0]   a_rdata,
  input  logic [6:0]    b_wr,
  input  word_t [6:0]   b_wdata,
  output word_t [6:0]   b_rdata,
  output logic [6:0]    scc_t0,
  output logic [6:0]    scc_t1,
  input  logic [6:0]    t0_pin,
  input  logic [6:0]    t1_pin,
  output word_t         bus_a_data,
  output word_t         bus_b_data,
  output logic [1:0]    trans_end,
  output logic [1:0]    prearb_grant,
  output logic [6:0]    refused,
  output logic [6:0]    fifo_valid,
  output logic [7:0]    dev_addr [7]
);

  localparam int unsigned NN = 7;

  word_t [NN-1:0] s_data, r_data;
  logic  [NN-1:0] s_oe, dv_out, dv_oe, br, bg, da_in, err_in;
  logic  [NN-1:0] dv_in, da_out, err_out, rhs_oe, te_in;
  logic           bus_a_dv, bus_a_da, bus_a_err, bus_b_dv, bus_b_da, bus_b_err;

  v3_local_bus #(.N_TX(3), .N_RX(2)) u_bus_a (
    .clk, .rst_n,
    .fixed_prio   (fixed_prio_a),
    .s_data       (s_data[2:0]),
    .s_oe         (s_oe[2:0]),
    .dv_out       (dv_out[2:0]),
    .dv_oe        (dv_oe[2:0]),
    .br           (br[2:0]),
    .bg           (bg[2:0]),
    .da_out       (da_out[4:3]),
    .err_out      (err_out[4:3]),
    .rhs_oe       (rhs_oe[4:3]),
    .bus_data     (bus_a_data),
    .bus_dv       (bus_a_dv),
    .bus_da       (bus_a_da),
    .bus_err      (bus_a_err),
    .trans_end    (trans_end[0]),
    .prearb_grant (prearb_grant[0])
  );

  v3_local_bus #(.N_TX(2), .N_RX(2)) u_bus_b (
    .clk, .rst_n,
    .fixed_prio   (fixed_prio_b),
    .s_data       (s_data[4:3]),
    .s_oe         (s_oe[4:3]),
    .dv_out       (dv_out[4:3]),
    .dv_oe        (dv_oe[4:3]),
    .br           (br[4:3]),
    .bg           (bg[4:3]),
    .da_out       (da_out[6:5]),
    .err_out      (err_out[6:5]),
    .rhs_oe       (rhs_oe[6:5]),
    .bus_data     (bus_b_data),
    .bus_dv       (bus_b_dv),
    .bus_da       (bus_b_da),
    .bus_err      (bus_b_err),
    .trans_end    (trans_end[1]),
    .prearb_grant (prearb_grant[1])
  );

  // Per-chip pin wiring.
  always_comb begin
    for (int i = 0; i < NN; i++) begin
      if (i < 3) begin
        da_in[i] = bus_a_da;  err_in[i] = bus_a_err;
        r_data[i] = '0;       dv_in[i] = 1'b0;  te_in[i] = 1'b0;
      end else if (i < 5) begin
        da_in[i] = bus_b_da;  err_in[i] = bus_b_err;
        r_data[i] = bus_a_data; dv_in[i] = bus_a_dv; te_in[i] = trans_end[0];
      end else begin
        da_in[i] = 1'b0;      err_in[i] = 1'b0;
        r_data[i] = bus_b_data; dv_in[i] = bus_b_dv; te_in[i] = trans_end[1];
      end
    end
  end
  assign bg[6:5] = '0;

  for (genvar i = 0; i < NN; i++) begin : g_node
    v3_node #(.FIFO_DEPTH(FIFO_DEPTH)) u_node (
      .clk, .rst_n,
      .a_wr      (a_wr[i]),
      .a_wdata   (a_wdata[i]),
      .a_rd      (a_rd[i]),
      .a_rdata   (a_rdata[i]),
      .b_wr      (b_wr[i]),
      .b_wdata   (b_wdata[i]),
      .b_rdata   (b_rdata[i]),
      .scc_t0    (scc_t0[i]),
      .scc_t1    (scc_t1[i]),
      .s_data    (s_data[i]),
      .s_oe      (s_oe[i]),
      .dv_out    (dv_out[i]),
      .dv_oe     (dv_oe[i]),
      .da_in     (da_in[i]),
      .err_in    (err_in[i]),
      .br_out    (br[i]),
      .bg_in     (bg[i]),
      .r_data    (r_data[i]),
      .dv_in     (dv_in[i]),
      .da_out    (da_out[i]),
      .err_out   (err_out[i]),
      .rhs_oe    (rhs_oe[i]),
      .trans_end (te_in[i]),
      .t0_pin    (t0_pin[i]),
      .t1_pin    (t1_pin[i]),
      .refused   (refused[i]),
      .dev_addr  (dev_addr[i]),
      .fifo_valid(fifo_valid[i])
    );
  end

endmodule
