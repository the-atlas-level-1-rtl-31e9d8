// overlap_handling: MIOCT overlap handling logic for the 33 sector pairs of one octant.
//
// One overlap_pair per pair of neighbouring sectors: barrel-barrel (BA31/BA32,
// BA01/BA02), barrel-endcap (each of the 4 barrel sectors with each of the 6 end-cap
// sectors), endcap-endcap and forward-forward neighbours in phi. The suppression flags of
// all pairs are ORed per candidate, giving supp[sector][candidate]. The look-up tables
// are loaded bit by bit through the register bus; after reset a sweep of 2**16 cycles
// clears every table (busy is high meanwhile), so an unloaded system suppresses nothing.
//
// Timing: supp refers to the sector words presented one clock earlier (synchronous table
// read). RoI widths default to 5 bits (barrel), 8 bits (end-cap) and 6 bits (forward).
// The pair list for barrel-barrel and barrel-endcap follows the overlap figure of the
// description; the endcap-endcap and forward-forward pairs, the RoI widths, the
// clear sweep and the write interface are this design's choices.
module overlap_handling
  import muctpi_pkg::*;
#(
  parameter int BA_W = 5,
  parameter int EC_W = 8,
  parameter int FW_W = 6,
  parameter int CLR_W = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [NUM_SEC-1:0][SEC_W-1:0] sec,
  input  logic                        we_roi,
  input  logic                        we_pt,
  input  logic [5:0]                  wpair,
  input  logic [15:0]                 waddr,
  input  logic                        wdata,
  output logic [NUM_SEC-1:0][1:0]     supp,
  output logic [NUM_PAIRS-1:0][3:0]   ovl,
  output logic                        busy
);
  function automatic int roi_w(input int s);
    case (sec_type(s))
      SEC_BARREL: return BA_W;
      SEC_ENDCAP: return EC_W;
      default:    return FW_W;
    endcase
  endfunction

  logic [CLR_W-1:0] clr_cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b1;
      clr_cnt <= '0;
    end else if (busy) begin
      clr_cnt <= clr_cnt + 1'b1;
      if (&clr_cnt) busy <= 1'b0;
    end
  end

  logic [NUM_PAIRS-1:0][1:0] sa, sb;
  for (genvar p = 0; p < NUM_PAIRS; p++) begin : g_pair
    localparam int A = pair_a(p);
    localparam int B = pair_b(p);
    overlap_pair #(
      .AW_A (roi_w(A)),
      .AW_B (roi_w(B)),
      .IS_BE(pair_kind(p) == OVL_BE)
    ) u_pair (
      .clk     (clk),
      .clr     (busy),
      .clr_addr(16'(clr_cnt)),
      .we_roi  (we_roi && !busy && wpair == 6'(p)),
      .we_pt   (we_pt && !busy && wpair == 6'(p)),
      .waddr   (waddr),
      .wdata   (wdata),
      .a       (sector_word_t'(sec[A])),
      .b       (sector_word_t'(sec[B])),
      .supp_a  (sa[p]),
      .supp_b  (sb[p]),
      .ovl     (ovl[p])
    );
  end

  always_comb begin
    supp = '0;
    for (int p = 0; p < NUM_PAIRS; p++) begin
      supp[pair_a(p)] |= sa[p];
      supp[pair_b(p)] |= sb[p];
    end
  end
endmodule
