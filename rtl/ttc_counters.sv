// ttc_counters: bunch-crossing and event counters kept by every module of the crate.
//
// bcid counts bunch crossings and restarts at 0 on the orbit (bunch-counter reset) pulse
// or after ORBIT_LEN crossings; l1id counts Level-1 Accepts and restarts on the event
// counter reset. l1id_cur is the number the event of an L1A in this cycle receives.
// The counter widths and the 3564-crossing turn are this design's choices.
module ttc_counters
  import muctpi_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              bcr,
  input  logic              ecr,
  input  logic              l1a,
  output logic [BCID_W-1:0] bcid,
  output logic [L1ID_W-1:0] l1id_cur
);
  always_ff @(posedge clk) begin
    if (rst || bcr)                             bcid <= '0;
    else if (bcid == BCID_W'(ORBIT_LEN - 1))    bcid <= '0;
    else                                        bcid <= bcid + 1'b1;
    if (rst || ecr)  l1id_cur <= '0;
    else if (l1a)    l1id_cur <= l1id_cur + 1'b1;
  end
endmodule
