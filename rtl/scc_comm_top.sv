// scc_comm_top: both upgraded single-chip-computer communication schemes,
// side by side.
//
//   v1:   four version-1 chips on one message bus with a token ring for
//         send arbitration, SELECT lines taken from the header word and a
//         wired-AND DATA ACCEPTED (v1_bus_system).
//   v3:   seven chips with receive FIFOs on two local buses in series, each
//         bus with its own arbitrator (v3_system).
//   ms:   a master-slave controller of version-1 chips: one master, two
//         bidirectional devices, each served by a slave-A chip (master to
//         device) and a slave-B chip (device to master) (v1_master_slave).
//   hier: a two-level arbitration system, a fixed-priority master over two
//         round-robin group arbitrators (arb_hierarchy).
// The four parts share only clock and reset. The SCC cores are not part of
// this design: every SCC's port-A/port-B strobes and data and its T0/T1
// interrupt inputs are top-level ports, indexed by chip, so a processor
// model or real cores can be attached.
module scc_comm_top
  import scc_comm_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // version-1 bus system, chips 0..3
  input  logic [3:0]    v1_a_wr,
  input  word_t [3:0]   v1_a_wdata,
  output word_t [3:0]   v1_a_rdata,
  input  logic [3:0]    v1_b_wr,
  input  word_t [3:0]   v1_b_wdata,
  output word_t [3:0]   v1_b_rdata,
  output logic [3:0]    v1_scc_t0,
  output logic [3:0]    v1_scc_t1,
  input  logic [3:0]    v1_t1_pin,
  output word_t         v1_bus_data,
  output logic          v1_bus_dv,
  output logic          v1_bus_da,
  output logic          v1_bus_te,
  output logic [3:0]    v1_token_pulse,
  output logic [3:0]    v1_rx_engaged,
  // FIFO-chip system, chips 0..6
  input  logic          v3_fixed_prio_a,
  input  logic          v3_fixed_prio_b,
  input  logic [6:0]    v3_a_wr,
  input  word_t [6:0]   v3_a_wdata,
  input  logic [6:0]    v3_a_rd,
  output word_t [6:0]   v3_a_rdata,
  input  logic [6:0]    v3_b_wr,
  input  word_t [6:0]   v3_b_wdata,
  output word_t [6:0]   v3_b_rdata,
  output logic [6:0]    v3_scc_t0,
  output logic [6:0]    v3_scc_t1,
  input  logic [6:0]    v3_t0_pin,
  input  logic [6:0]    v3_t1_pin,
  output word_t         v3_bus_a_data,
  output word_t         v3_bus_b_data,
  output logic [1:0]    v3_trans_end,
  output logic [1:0]    v3_prearb_grant,
  output logic [6:0]    v3_refused,
  output logic [6:0]    v3_fifo_valid,
  output logic [7:0]    v3_dev_addr [7],
  // master-slave controller: chip 0 master, 1..2 slave A, 3..4 slave B
  input  logic [4:0]    ms_a_wr,
  input  word_t [4:0]   ms_a_wdata,
  output word_t [4:0]   ms_a_rdata,
  input  logic [4:0]    ms_b_wr,
  input  word_t [4:0]   ms_b_wdata,
  output word_t [4:0]   ms_b_rdata,
  output logic [4:0]    ms_scc_t0,
  output logic [4:0]    ms_scc_t1,
  input  logic [4:0]    ms_t1_pin,
  output word_t [1:0]   ms_dev_tx_data,
  output logic [1:0]    ms_dev_tx_dv,
  input  logic [1:0]    ms_dev_tx_da,
  input  word_t [1:0]   ms_dev_rx_data,
  input  logic [1:0]    ms_dev_rx_dv,
  output logic [1:0]    ms_dev_rx_da,
  output logic [1:0]    ms_dev_rx_te,
  output word_t         ms_down_data,
  output word_t         ms_up_data,
  output logic [1:0]    ms_token_b,
  output logic [4:0]    ms_rx_engaged,
  // hierarchy arbitration system
  input  logic [14:0]   h_grp1_req,
  output logic [14:0]   h_grp1_grant,
  output logic          h_grp1_end,
  input  logic [14:0]   h_grp2_req,
  output logic [14:0]   h_grp2_grant,
  output logic          h_grp2_end,
  output logic          h_master_end,
  output logic [1:0]    h_master_grant
);

  v1_bus_system #(.N(4)) u_v1 (
    .clk, .rst_n,
    .a_wr        (v1_a_wr),
    .a_wdata     (v1_a_wdata),
    .a_rdata     (v1_a_rdata),
    .b_wr        (v1_b_wr),
    .b_wdata     (v1_b_wdata),
    .b_rdata     (v1_b_rdata),
    .scc_t0      (v1_scc_t0),
    .scc_t1      (v1_scc_t1),
    .t1_pin      (v1_t1_pin),
    .bus_data    (v1_bus_data),
    .bus_dv      (v1_bus_dv),
    .bus_da      (v1_bus_da),
    .bus_te      (v1_bus_te),
    .token_pulse (v1_token_pulse),
    .rx_engaged  (v1_rx_engaged)
  );

  v3_system u_v3 (
    .clk, .rst_n,
    .fixed_prio_a (v3_fixed_prio_a),
    .fixed_prio_b (v3_fixed_prio_b),
    .a_wr         (v3_a_wr),
    .a_wdata      (v3_a_wdata),
    .a_rd         (v3_a_rd),
    .a_rdata      (v3_a_rdata),
    .b_wr         (v3_b_wr),
    .b_wdata      (v3_b_wdata),
    .b_rdata      (v3_b_rdata),
    .scc_t0       (v3_scc_t0),
    .scc_t1       (v3_scc_t1),
    .t0_pin       (v3_t0_pin),
    .t1_pin       (v3_t1_pin),
    .bus_a_data   (v3_bus_a_data),
    .bus_b_data   (v3_bus_b_data),
    .trans_end    (v3_trans_end),
    .prearb_grant (v3_prearb_grant),
    .refused      (v3_refused),
    .fifo_valid   (v3_fifo_valid),
    .dev_addr     (v3_dev_addr)
  );

  v1_master_slave #(.N_SLAVE(2)) u_ms (
    .clk, .rst_n,
    .a_wr        (ms_a_wr),
    .a_wdata     (ms_a_wdata),
    .a_rdata     (ms_a_rdata),
    .b_wr        (ms_b_wr),
    .b_wdata     (ms_b_wdata),
    .b_rdata     (ms_b_rdata),
    .scc_t0      (ms_scc_t0),
    .scc_t1      (ms_scc_t1),
    .t1_pin      (ms_t1_pin),
    .dev_tx_data (ms_dev_tx_data),
    .dev_tx_dv   (ms_dev_tx_dv),
    .dev_tx_da   (ms_dev_tx_da),
    .dev_rx_data (ms_dev_rx_data),
    .dev_rx_dv   (ms_dev_rx_dv),
    .dev_rx_da   (ms_dev_rx_da),
    .dev_rx_te   (ms_dev_rx_te),
    .down_data   (ms_down_data),
    .up_data     (ms_up_data),
    .token_b     (ms_token_b),
    .rx_engaged  (ms_rx_engaged)
  );

  arb_hierarchy #(.N_GRP(15)) u_hier (
    .clk, .rst_n,
    .grp1_req     (h_grp1_req),
    .grp1_grant   (h_grp1_grant),
    .grp1_end     (h_grp1_end),
    .grp2_req     (h_grp2_req),
    .grp2_grant   (h_grp2_grant),
    .grp2_end     (h_grp2_end),
    .master_end   (h_master_end),
    .master_grant (h_master_grant)
  );

endmodule
