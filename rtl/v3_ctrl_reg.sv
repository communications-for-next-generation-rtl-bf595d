// v3_ctrl_reg: control register of the upgraded chip with FIFO.
//
// Eight bits, numbered 1..8 as in the design and stored at bit n-1:
//   1 MODE            1 = multicomputer mode, 0 = normal mode (both ports
//                     plain bidirectional SCC ports)
//   2 STOP RECEIVING  set while the FIFO is full or a received message
//     / BUFFER FULL   waits for the SCC; writing 0 releases the message
//   4 ERROR IN TRANS. transmitter's error input (read only)
//   5 DATA ACCEPTED   transmitter's accepted input (read only)
//   6 DATA VALID      transmitter's valid output
//   7 BUS GRANT       grant from the arbitrator (read only)
//   8 BUS REQUEST     request to the arbitrator
// Position 3 is unassigned and reads 0. The meaning of the bits follows the
// design; how the SCC reaches the register is this design's choice: a
// port-A write with bit 15 clear loads it, with bit 15 set loads the device
// address from bits 7:0; a port-B read returns it in bits 7:0.
//
// Interface: msg_set (address match) sets the message-waiting flag;
// release is a one-clock pulse when the SCC writes bit 2 as 0 while a
// message waits. Writes take effect on the next clock.
module v3_ctrl_reg
  import scc_comm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  word_t      wdata,
  input  logic       msg_set,
  input  logic       fifo_full,
  input  logic       err_in,
  input  logic       da_in,
  input  logic       bg_in,
  output logic       mode,
  output logic       dv_out,
  output logic       br_out,
  output logic       msg_wait,
  output logic       stop,
  output logic       release_msg,
  output logic       ld_addr,
  output logic [7:0] addr_out,
  output word_t      rdata
);

  logic wr_cr;

  assign wr_cr       = wr && !wdata[PA_SEL_DEVADDR];
  assign ld_addr     = wr &&  wdata[PA_SEL_DEVADDR];
  assign addr_out    = wdata[7:0];
  assign release_msg = wr_cr && msg_wait && !wdata[CR_STOP];
  assign stop        = msg_wait || fifo_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode     <= 1'b0;
      dv_out   <= 1'b0;
      br_out   <= 1'b0;
      msg_wait <= 1'b0;
    end else begin
      if (wr_cr) begin
        mode   <= wdata[CR_MODE];
        dv_out <= wdata[CR_DV];
        br_out <= wdata[CR_BR];
      end
      if (msg_set)          msg_wait <= 1'b1;
      else if (release_msg) msg_wait <= 1'b0;
    end
  end

  always_comb begin
    rdata          = '0;
    rdata[CR_MODE] = mode;
    rdata[CR_STOP] = stop;
    rdata[CR_ERR]  = err_in;
    rdata[CR_DA]   = da_in;
    rdata[CR_DV]   = dv_out;
    rdata[CR_BG]   = bg_in;
    rdata[CR_BR]   = br_out;
  end

endmodule
