// rx_fifo: receive FIFO of the upgraded chip with FIFO.
//
// Words from port R are written into a DEPTH x W storage array at the
// location held by the Write Address Counter (WAC). The current output word
// is always present in an output register; when it has been used (rd), the
// next word is read from the array at the Read Address Counter (RAC). This
// structure and the 63 x 16 array follow the design; the array plus the
// output register hold 64 words, the FIFO size the design asks for. The
// counters wrap at DEPTH, which need not be a power of two.
//
// Interface: wr stores wdata (ignored while full); rd drops the output word
// (ignored while empty); clr empties everything. out_valid says the output
// register holds a word. An empty output register is refilled from the array
// one clock after a word is there, so a word written into an empty FIFO
// appears at dout two clocks later. count is the number of words held,
// 0..DEPTH+1.
module rx_fifo #(
  parameter int unsigned DEPTH = 63,
  parameter int unsigned W     = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] dout,
  output logic         out_valid,
  output logic         full,
  output logic [$clog2(DEPTH+2)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wac, rac;
  logic [CW-1:0] n_arr;          // words in the array
  logic          do_wr, do_load;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  assign full    = (n_arr == CW'(DEPTH));
  assign do_wr   = wr && !full;
  // load the output register when it is empty or being emptied
  assign do_load = (n_arr != '0) && (!out_valid || rd);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wac] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wac       <= '0;
      rac       <= '0;
      n_arr     <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      if (do_wr) wac <= inc(wac);
      if (do_load) begin
        dout      <= mem[rac];
        rac       <= inc(rac);
        out_valid <= 1'b1;
      end else if (rd) begin
        out_valid <= 1'b0;
      end
      n_arr <= n_arr + CW'(do_wr) - CW'(do_load);
    end
  end

  assign count = ($bits(count))'(n_arr) + ($bits(count))'(out_valid);

endmodule
