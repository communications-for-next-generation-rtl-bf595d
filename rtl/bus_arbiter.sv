// bus_arbiter: arbitrator for one local bus of chips with FIFO.
//
// Each module on the bus has one request pin (bus request port, pins
// 1..15) and one grant pin (bus grant port, pins 1..15). Pin 16 of the
// request port selects the scheme: high = fixed priority (pin 1 highest,
// pin 15 lowest), low = round robin (all pins equal, served in circular
// order starting after the current master). Pin 16 of the grant port is
// TRANSMISSION END: when the current master drops its request, its grant is
// removed and pin 16 pulses for one clock, telling all receivers that the
// packet is complete. While the bus is busy the arbitrator keeps deciding
// who comes next (pre-arbitration), so the next grant follows the
// TRANSMISSION END pulse directly. All of this follows the design, where the
// arbitrator is an SCC running a ROM program; here it is dedicated logic.
// Pin n is bit n-1.
//
// Hierarchy: with HAS_UPSTREAM = 1 the arbitrator itself requests its bus
// from a master arbitrator (up_req / up_gnt) and grants only while up_gnt is
// high. It drops up_req for at least one clock after each release and waits
// for up_gnt to fall, so that the master can arbitrate between groups. The
// upstream ports are this design's choice. With HAS_UPSTREAM = 0 up_gnt is
// ignored.
//
// Timing: request to grant 1 clock when idle; request drop to TRANSMISSION
// END 1 clock; TRANSMISSION END to the pre-arbitrated grant 1 clock.
// prearb_grant pulses with each grant that came from pre-arbitration.
module bus_arbiter #(
  parameter int unsigned N_REQ        = 15,
  parameter bit          HAS_UPSTREAM = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N_REQ:0] req_port,
  output logic [N_REQ:0] grant_port,
  output logic           up_req,
  input  logic           up_gnt,
  output logic           prearb_grant
);

  localparam int unsigned IW = (N_REQ > 1) ? $clog2(N_REQ) : 1;

  typedef enum logic [1:0] {A_IDLE, A_BUSY, A_END, A_WAITUP} astate_t;
  astate_t          state;
  logic [N_REQ-1:0] req, grant;
  logic             fixed_mode;
  logic [IW-1:0]    cur, last, save_idx;
  logic             save_valid;
  logic             te;
  logic             up_ok;

  logic             win_valid, pre_valid;
  logic [IW-1:0]    win_idx, pre_idx;

  assign req        = req_port[N_REQ-1:0];
  assign fixed_mode = req_port[N_REQ];
  assign up_ok      = !HAS_UPSTREAM || up_gnt;

  function automatic logic [IW-1:0] next_idx(input logic [IW-1:0] i);
    return (i == IW'(N_REQ - 1)) ? '0 : i + 1'b1;
  endfunction

  // First set bit of r, scanning circularly from 'start'.
  function automatic logic [IW:0] pick(input logic [N_REQ-1:0] r, input logic [IW-1:0] start);
    logic [IW-1:0] idx;
    logic [IW:0]   res;
    res = '0;
    idx = start;
    for (int k = 0; k < N_REQ; k++) begin
      if (!res[IW] && r[idx]) res = {1'b1, idx};
      idx = next_idx(idx);
    end
    return res;
  endfunction

  // Fresh arbitration (bus free) and pre-arbitration (bus busy).
  always_comb begin
    logic [IW:0] w, p;
    logic [N_REQ-1:0] others;
    w = pick(req, fixed_mode ? '0 : next_idx(last));
    others = req;
    others[cur] = 1'b0;
    p = pick(others, fixed_mode ? '0 : next_idx(cur));
    win_valid = w[IW];
    win_idx   = w[IW-1:0];
    pre_valid = p[IW];
    pre_idx   = p[IW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= A_IDLE;
      grant        <= '0;
      te           <= 1'b0;
      cur          <= '0;
      last         <= IW'(N_REQ - 1);
      save_idx     <= '0;
      save_valid   <= 1'b0;
      prearb_grant <= 1'b0;
    end else begin
      te           <= 1'b0;
      prearb_grant <= 1'b0;
      unique case (state)
        A_IDLE: if (win_valid && up_ok) begin
          grant        <= '0;
          grant[win_idx] <= 1'b1;
          cur          <= win_idx;
          last         <= win_idx;
          state        <= A_BUSY;
        end
        A_BUSY: begin
          save_valid <= pre_valid;
          save_idx   <= pre_idx;
          if (!req[cur]) begin
            grant <= '0;
            te    <= 1'b1;
            state <= A_END;
          end
        end
        A_END: begin
          if (HAS_UPSTREAM) begin
            state <= A_WAITUP;
          end else if (save_valid && req[save_idx]) begin
            grant           <= '0;
            grant[save_idx] <= 1'b1;
            cur             <= save_idx;
            last            <= save_idx;
            prearb_grant    <= 1'b1;
            state           <= A_BUSY;
          end else begin
            state <= A_IDLE;
          end
          save_valid <= 1'b0;
        end
        A_WAITUP: if (!up_gnt) state <= A_IDLE;
        default:  state <= A_IDLE;
      endcase
    end
  end

  assign up_req     = (state == A_BUSY) || ((state == A_IDLE) && (req != '0));
  assign grant_port = {te, grant};

  // Only one module holds the bus at a time.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  // TRANSMISSION END never coincides with a grant.
  assert property (@(posedge clk) disable iff (!rst_n) te |-> (grant == '0));

endmodule
