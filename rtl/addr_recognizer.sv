// addr_recognizer: address recognizer of the upgraded chip with FIFO.
//
// Every receiver on a local bus stores every packet in its FIFO. The
// recognizer keeps the chip's device address (DEV ADDR, loaded by the SCC)
// and captures the destination byte of each packet's header word as the
// word enters the FIFO. When the arbitrator signals TRANSMISSION END, it
// decides: if the destination equals DEV ADDR or is the broadcast code
// 8'hFF, it reports a match (the SCC is interrupted to take the message);
// otherwise it orders the FIFO cleared for the next packet. This follows the
// design; the broadcast code and the upper-byte position of the destination
// are this design's choices. A TRANSMISSION END with no header received
// (the packet was refused) also clears the FIFO.
//
// Interface: ld_addr/addr_in load DEV ADDR; hdr_wr is high for the clock in
// which the first word of a packet is written, with hdr_word on the FIFO
// input; trans_end is the arbitrator's pulse. match and no_match are
// one-clock pulses in the clock after trans_end; hdr_hit tells, while a
// packet arrives, whether its captured header is for this chip.
module addr_recognizer
  import scc_comm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld_addr,
  input  logic [7:0] addr_in,
  input  logic       hdr_wr,
  input  word_t      hdr_word,
  input  logic       trans_end,
  output logic [7:0] dev_addr,
  output logic       match,
  output logic       no_match,
  output logic       hdr_hit
);

  logic [7:0] dest;
  logic       have_hdr;
  logic       hit;

  assign hit     = have_hdr && ((dest == dev_addr) || (dest == BROADCAST_ADDR));
  assign hdr_hit = hit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dev_addr <= '0;
      dest     <= '0;
      have_hdr <= 1'b0;
      match    <= 1'b0;
      no_match <= 1'b0;
    end else begin
      if (ld_addr) dev_addr <= addr_in;
      match    <= trans_end && hit;
      no_match <= trans_end && !hit;
      if (trans_end) begin
        have_hdr <= 1'b0;
      end else if (hdr_wr) begin
        dest     <= hdr_word[15:8];
        have_hdr <= 1'b1;
      end
    end
  end

endmodule
