// mibak: the active backplane of the MUCTPI crate.
//
// Trigger: the binary adder tree (mibak_adder_tree) sums the 18-bit multiplicities of
// the 16 octant modules into the 18-bit total delivered to the MICTP.
// Readout: the shared bus from the 16 MIOCTs (nodes 0..15) and the MICTP (node 16) to
// the MIROD. Only the token holder drives it, so the bus is the OR of all node outputs;
// an assertion flags two drivers at once. The token chain runs
// MIROD -> node 0 -> node 1 -> ... -> node 16 -> MIROD.
// The electrical bus (Bus LVDS) and the distribution of clock and timing signals are
// wiring and are not modelled beyond this. Purely combinational; clk and rst serve
// only the clocked bus-driver assertion, which is off during reset.
// Adder tree and token-passing bus follow the description; the node order is this
// design's choice.
module mibak
  import muctpi_pkg::*;
#(
  parameter int N_OCT = NUM_OCT
) (
  input  logic                          clk,   // only for the bus-driver assertion
  input  logic                          rst,
  input  logic [N_OCT-1:0][MULTS_W-1:0] mult_oct,
  output logic [MULTS_W-1:0]            mult_sum,
  input  logic [N_OCT:0][RO_W-1:0]      node_data,
  input  logic [N_OCT:0]                node_valid,
  output logic [RO_W-1:0]               bus_data,
  output logic                          bus_valid,
  input  logic                          token_launch,
  input  logic [N_OCT:0]                node_token_out,
  output logic [N_OCT:0]                node_token_in,
  output logic                          token_return
);
  mibak_adder_tree #(.N(N_OCT)) u_tree (.mult_in(mult_oct), .mult_sum);

  always_comb begin
    bus_data  = '0;
    for (int i = 0; i <= N_OCT; i++) bus_data |= node_data[i];
    bus_valid = |node_valid;
  end

  assign node_token_in = {node_token_out[N_OCT-1:0], token_launch};
  assign token_return  = node_token_out[N_OCT];

  a_one_driver: assert property (@(posedge clk) disable iff (rst) $onehot0(node_valid))
    else $error("mibak: several readout bus drivers");
endmodule
