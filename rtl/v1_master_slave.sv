// v1_master_slave: master-slave controller built from version-1 chips.
//
// A master chip talks both ways with N_SLAVE bidirectional devices, although
// each version-1 chip only sends on port S and receives on port R. Every
// device therefore gets two slave chips: slave A takes packets from the
// master and hands them to the device, slave B takes packets from the device
// and sends them to the master. The connections follow the master-slave
// figure of the design:
//   * down bus: master port S -> port R of every slave A. Slave A number k
//     is selected by data line 8+k (bit k of the receiver mask);
//   * up bus: port S of every slave B -> master port R. The master is
//     selected by data line 8 (bit 0). The ARBITRATION OUT / IN pins of the
//     slave-B chips form a ring with a start pulse at reset, so the slaves
//     take turns on the up bus;
//   * device side: port S of slave A and port R of slave B are brought out,
//     with their handshake lines, as the dev_tx_* and dev_rx_* ports.
// A chip that is the only sender on its bus (the master, each slave A) has
// its ARBITRATION OUT fed back to its own ARBITRATION IN with the start
// pulse, so it gets the token whenever it asks. This feedback, and the
// joining of three-state lines (OR of enabled drivers, wired-AND DATA
// ACCEPTED reading false when undriven, wired-OR TRANS. ERROR to the
// senders' T0/M), are this design's choices.
//
// Slaves with identical programs can still identify themselves. At reset,
// each slave counts until the token first reaches it, and takes an address
// from that count. This is kernel software; the ring makes it possible.
//
// SCC-side ports are arrays over the chips: index 0 is the master,
// 1..N_SLAVE the slave-A chips, N_SLAVE+1..2*N_SLAVE the slave-B chips.
// Device-side ports are indexed by device. down_data / up_data show the
// two buses, token_b the token entering each slave B, rx_engaged which
// chips have their receive port engaged. dev_rx_da / dev_rx_te read 0
// while slave B does not drive them.
module v1_master_slave
  import scc_comm_pkg::*;
#(
  parameter int unsigned N_SLAVE = 2,
  localparam int unsigned NC     = 1 + 2 * N_SLAVE
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NC-1:0]       a_wr,
  input  word_t [NC-1:0]      a_wdata,
  output word_t [NC-1:0]      a_rdata,
  input  logic [NC-1:0]       b_wr,
  input  word_t [NC-1:0]      b_wdata,
  output word_t [NC-1:0]      b_rdata,
  output logic [NC-1:0]       scc_t0,
  output logic [NC-1:0]       scc_t1,
  input  logic [NC-1:0]       t1_pin,
  output word_t [N_SLAVE-1:0] dev_tx_data,
  output logic [N_SLAVE-1:0]  dev_tx_dv,
  input  logic [N_SLAVE-1:0]  dev_tx_da,
  input  word_t [N_SLAVE-1:0] dev_rx_data,
  input  logic [N_SLAVE-1:0]  dev_rx_dv,
  output logic [N_SLAVE-1:0]  dev_rx_da,
  output logic [N_SLAVE-1:0]  dev_rx_te,
  output word_t               down_data,
  output word_t               up_data,
  output logic [N_SLAVE-1:0]  token_b,
  output logic [NC-1:0]       rx_engaged
);

  word_t [NC-1:0] s_data, r_data;
  logic  [NC-1:0] s_oe, dv_out, dv_oe, da_out, da_oe, te_out, te_oe;
  logic  [NC-1:0] arb_in, arb_out, select, dv_in, da_in, t0m;
  logic           down_dv, down_da, down_te, up_dv, up_da, up_te;
  logic           start_done, start_pulse;

  always_ff @(posedge clk) begin
    if (!rst_n) start_done <= 1'b0;
    else        start_done <= 1'b1;
  end
  assign start_pulse = rst_n && !start_done;

  // Bus joining.
  always_comb begin
    down_data = s_oe[0] ? s_data[0] : '0;
    down_dv   = dv_oe[0] && dv_out[0];
    down_da   = 1'b0;
    down_te   = 1'b0;
    up_data   = '0;
    up_dv     = 1'b0;
    up_da     = da_oe[0] && da_out[0];
    up_te     = te_oe[0] && te_out[0];
    for (int k = 0; k < N_SLAVE; k++) begin
      if (da_oe[1 + k]) down_da = 1'b1;
      if (te_oe[1 + k]) down_te |= te_out[1 + k];
      if (s_oe[1 + N_SLAVE + k])  up_data |= s_data[1 + N_SLAVE + k];
      if (dv_oe[1 + N_SLAVE + k]) up_dv   |= dv_out[1 + N_SLAVE + k];
    end
    for (int k = 0; k < N_SLAVE; k++)
      if (da_oe[1 + k]) down_da &= da_out[1 + k];
  end

  // Per-chip pin wiring.
  always_comb begin
    // master
    r_data[0] = up_data;   select[0] = up_data[8];  dv_in[0] = up_dv;
    da_in[0]  = down_da;   t0m[0]    = down_te;
    arb_in[0] = arb_out[0] || start_pulse;
    for (int k = 0; k < N_SLAVE; k++) begin
      // slave A: receives from the master, sends to the device
      r_data[1 + k] = down_data;  select[1 + k] = down_data[8 + (k % 8)];  dv_in[1 + k] = down_dv;
      da_in[1 + k]  = dev_tx_da[k];  t0m[1 + k] = 1'b0;
      arb_in[1 + k] = arb_out[1 + k] || start_pulse;
      // slave B: receives from the device, sends to the master
      r_data[1 + N_SLAVE + k] = dev_rx_data[k];
      select[1 + N_SLAVE + k] = dev_rx_data[k][8];
      dv_in[1 + N_SLAVE + k]  = dev_rx_dv[k];
      da_in[1 + N_SLAVE + k]  = up_da;
      t0m[1 + N_SLAVE + k]    = up_te;
      arb_in[1 + N_SLAVE + k] = (k == 0) ? (arb_out[NC-1] || start_pulse) : arb_out[N_SLAVE + k];
    end
  end

  for (genvar i = 0; i < NC; i++) begin : g_node
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
      .da_in   (da_in[i]),
      .t0m     (t0m[i]),
      .arb_in  (arb_in[i]),
      .arb_out (arb_out[i]),
      .r_data  (r_data[i]),
      .select  (select[i]),
      .dv_in   (dv_in[i]),
      .da_out  (da_out[i]),
      .da_oe   (da_oe[i]),
      .te_out  (te_out[i]),
      .te_oe   (te_oe[i]),
      .r_en    (rx_engaged[i]),
      .t1_pin  (t1_pin[i])
    );
  end

  // Device side.
  for (genvar k = 0; k < N_SLAVE; k++) begin : g_dev
    assign dev_tx_data[k] = s_oe[1 + k] ? s_data[1 + k] : '0;
    assign dev_tx_dv[k]   = dv_oe[1 + k] && dv_out[1 + k];
    assign dev_rx_da[k]   = da_oe[1 + N_SLAVE + k] && da_out[1 + N_SLAVE + k];
    assign dev_rx_te[k]   = te_oe[1 + N_SLAVE + k] && te_out[1 + N_SLAVE + k];
    assign token_b[k]     = arb_in[1 + N_SLAVE + k];
  end

endmodule
