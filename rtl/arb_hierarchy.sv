// arb_hierarchy: two-level arbitration system.
//
// Modules of equal priority share one arbitrator working in round-robin
// mode; the two group arbitrators request the bus from a master arbitrator
// working in fixed-priority mode, where group 1 sits on pin 1 (highest) and
// group 2 on pin 2. Each group arbitrator's grant-port pin 16 gives its
// group's TRANSMISSION END; the master's pin 16 gives the end of each
// group's tenure. The arrangement (master in priority mode, groups in round
// robin) follows the design; the request/grant link between the levels is
// this design's choice (see bus_arbiter, HAS_UPSTREAM).
//
// Interface: grpN_req[i] is the bus request of module i of group N,
// grpN_grant[i] its grant, grpN_end the group's TRANSMISSION END pulse.
module arb_hierarchy #(
  parameter int unsigned N_GRP = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_GRP-1:0] grp1_req,
  output logic [N_GRP-1:0] grp1_grant,
  output logic             grp1_end,
  input  logic [N_GRP-1:0] grp2_req,
  output logic [N_GRP-1:0] grp2_grant,
  output logic             grp2_end,
  output logic             master_end,
  output logic [1:0]       master_grant
);

  localparam int unsigned NM = 15;

  logic [NM:0]    m_req, m_gnt;
  logic [N_GRP:0] g1_gnt, g2_gnt;
  logic           up1, up2;
  logic           m_up_unused, m_pre_unused, g1_pre_unused, g2_pre_unused;

  assign m_req = {1'b1, {(NM-2){1'b0}}, up2, up1};

  bus_arbiter #(.N_REQ(NM), .HAS_UPSTREAM(1'b0)) u_master (
    .clk, .rst_n,
    .req_port     (m_req),
    .grant_port   (m_gnt),
    .up_req       (m_up_unused),
    .up_gnt       (1'b1),
    .prearb_grant (m_pre_unused)
  );

  bus_arbiter #(.N_REQ(N_GRP), .HAS_UPSTREAM(1'b1)) u_grp1 (
    .clk, .rst_n,
    .req_port     ({1'b0, grp1_req}),
    .grant_port   (g1_gnt),
    .up_req       (up1),
    .up_gnt       (m_gnt[0]),
    .prearb_grant (g1_pre_unused)
  );

  bus_arbiter #(.N_REQ(N_GRP), .HAS_UPSTREAM(1'b1)) u_grp2 (
    .clk, .rst_n,
    .req_port     ({1'b0, grp2_req}),
    .grant_port   (g2_gnt),
    .up_req       (up2),
    .up_gnt       (m_gnt[1]),
    .prearb_grant (g2_pre_unused)
  );

  assign grp1_grant   = g1_gnt[N_GRP-1:0];
  assign grp1_end     = g1_gnt[N_GRP];
  assign grp2_grant   = g2_gnt[N_GRP-1:0];
  assign grp2_end     = g2_gnt[N_GRP];
  assign master_end   = m_gnt[NM];
  assign master_grant = m_gnt[1:0];

endmodule
