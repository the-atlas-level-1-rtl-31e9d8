// multiplicity_summing: MIOCT multiplicity logic.
//
// Counts, for each of the six pT thresholds t = 1..6, the candidates of the 13 sectors
// whose pT code is t or higher and that the overlap logic has not suppressed. Each count
// saturates at 7 and is sent as a 3-bit value, threshold 1 in bits 2:0, giving the 18-bit
// octant multiplicity for the backplane adder tree.
//
// Timing: one register stage; mult is valid one clock after sec/supp. Counting per
// threshold with suppression and 3-bit results follows the description; inclusive
// counting (a candidate counts for every threshold up to its own) and saturation are
// this design's choices.
module multiplicity_summing
  import muctpi_pkg::*;
#(
  parameter int NSEC = NUM_SEC
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [NSEC-1:0][SEC_W-1:0] sec,
  input  logic [NSEC-1:0][1:0]       supp,
  output logic [MULTS_W-1:0]         mult
);
  logic [NUM_THR-1:0][MULT_W-1:0] cnt;

  always_comb begin
    for (int t = 0; t < NUM_THR; t++) begin
      int n;
      n = 0;
      for (int s = 0; s < NSEC; s++) begin
        sector_word_t w;
        w = sector_word_t'(sec[s]);
        if (!supp[s][0] && w.pt1 != 3'd0 && int'(w.pt1) >= t + 1) n++;
        if (!supp[s][1] && w.pt2 != 3'd0 && int'(w.pt2) >= t + 1) n++;
      end
      cnt[t] = (n > 7) ? 3'd7 : MULT_W'(n);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) mult <= '0;
    else     mult <= cnt;
  end
endmodule
