// v3_local_bus: one local communication bus of chips with FIFO.
//
// Joins N_TX transmitting chips and N_RX receiving chips with one
// arbitrator. The transmitters' bus requests go to the arbitrator's request
// pins 1..N_TX and its grant pins return BUS GRANT; grant-port pin 16
// (TRANSMISSION END) goes to every receiver. The data bus and DATA VALID
// carry whichever transmitter is granted; the receivers' DATA ACCEPTED
// lines are wired-AND, so a word completes only when all receivers have it;
// their ERROR IN TRANS. lines are joined so that any one reaches the
// transmitter. This follows the design's local bus scheme; modelling
// three-state joins as OR of enabled drivers (wired-AND for DATA ACCEPTED,
// false when nobody drives) and the use of pin 16 of the request port as a
// fixed_prio input are this design's choices.
module v3_local_bus
  import scc_comm_pkg::*;
#(
  parameter int unsigned N_TX = 3,
  parameter int unsigned N_RX = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fixed_prio,
  input  word_t [N_TX-1:0] s_data,
  input  logic  [N_TX-1:0] s_oe,
  input  logic  [N_TX-1:0] dv_out,
  input  logic  [N_TX-1:0] dv_oe,
  input  logic  [N_TX-1:0] br,
  output logic  [N_TX-1:0] bg,
  input  logic  [N_RX-1:0] da_out,
  input  logic  [N_RX-1:0] err_out,
  input  logic  [N_RX-1:0] rhs_oe,
  output word_t            bus_data,
  output logic             bus_dv,
  output logic             bus_da,
  output logic             bus_err,
  output logic             trans_end,
  output logic             prearb_grant
);

  localparam int unsigned NA = 15;

  logic [NA:0] req_port, grant_port;
  logic        up_unused;

  assign req_port = {fixed_prio, {(NA-N_TX){1'b0}}, br};

  bus_arbiter #(.N_REQ(NA), .HAS_UPSTREAM(1'b0)) u_arb (
    .clk, .rst_n,
    .req_port     (req_port),
    .grant_port   (grant_port),
    .up_req       (up_unused),
    .up_gnt       (1'b1),
    .prearb_grant (prearb_grant)
  );

  assign bg        = grant_port[N_TX-1:0];
  assign trans_end = grant_port[NA];

  always_comb begin
    bus_data = '0;
    bus_dv   = 1'b0;
    bus_err  = 1'b0;
    bus_da   = |rhs_oe;
    for (int i = 0; i < N_TX; i++) begin
      if (s_oe[i])  bus_data |= s_data[i];
      if (dv_oe[i]) bus_dv   |= dv_out[i];
    end
    for (int j = 0; j < N_RX; j++) begin
      if (rhs_oe[j]) begin
        bus_da  &= da_out[j];
        bus_err |= err_out[j];
      end
    end
  end

endmodule
