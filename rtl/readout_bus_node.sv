// readout_bus_node: sender on the shared MIBAK readout bus (one per MIOCT and the MICTP).
//
// The bus is arbitrated by token passing. The MIROD launches a token for every event;
// it travels from node to node. A node that receives the token (token_in pulse) waits
// until its readout FIFO holds a complete fragment (counted with frag_done pulses), then
// drives the fragment words one per clock onto the bus, pausing while the MIROD raises
// bus_hold. After the trailer word it passes the token on with a one-clock token_out pulse.
// A node that does not hold the token drives zeros, so the backplane can combine all
// nodes with a wired-OR.
//
// Token passing for arbitration follows the description; the pulse protocol, the hold
// signal and the rule that every node sends one fragment per token are this design's
// choices.
module readout_bus_node
  import muctpi_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            token_in,
  output logic            token_out,
  input  logic            bus_hold,
  input  logic            frag_done,   // a complete fragment entered the FIFO
  input  logic [RO_W-1:0] fifo_dout,
  input  logic            fifo_empty,
  output logic            fifo_rd,
  output logic [RO_W-1:0] bus_data,
  output logic            bus_valid
);
  logic       have_token;
  logic [7:0] frags;
  logic       send_ok, is_trl;

  assign send_ok   = have_token && (frags != 0) && !bus_hold && !fifo_empty;
  assign is_trl    = fifo_dout[RO_W-1 -: 4] == TAG_TRL;
  assign fifo_rd   = send_ok;
  assign bus_valid = send_ok;
  assign bus_data  = send_ok ? fifo_dout : '0;

  always_ff @(posedge clk) begin
    token_out <= 1'b0;
    if (rst) begin
      have_token <= 1'b0;
      frags      <= '0;
    end else begin
      frags <= frags + (frag_done ? 8'd1 : 8'd0) - ((send_ok && is_trl) ? 8'd1 : 8'd0);
      if (token_in) have_token <= 1'b1;
      if (send_ok && is_trl) begin
        have_token <= 1'b0;
        token_out  <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) token_in |-> !have_token)
    else $error("readout_bus_node: second token while holding one");
endmodule
