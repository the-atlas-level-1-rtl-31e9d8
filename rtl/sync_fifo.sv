// sync_fifo: single-clock show-ahead FIFO used for the derandomizer, readout, monitoring
// and event buffers.
//
// dout shows the oldest word whenever empty is low; rd pops it. wr is ignored when the
// FIFO is full and rd when it is empty. count gives the fill level. Depth is a power of two.
module sync_fifo #(
  parameter int W     = 36,
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr,
  input  logic [W-1:0]             din,
  input  logic                     rd,
  output logic [W-1:0]             dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[AW:0]);
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
