// overlap_pair: overlap look-up for one pair of neighbouring sectors (A, B) of an octant.
//
// For each of the four combinations of candidate i of sector A and candidate j of sector
// B, a RoI look-up table addressed by {RoI_A, RoI_B} says whether the two candidates lie
// in the overlap zone. For barrel-endcap pairs a second table addressed by
// {pT_A, pT_B, sign_A, sign_B} must also agree, so that the decision can depend on the
// pT threshold and charge sign. When two present candidates overlap, the one with the
// lower pT is flagged for suppression; on equal pT the candidate of sector B is flagged.
//
// Both tables are written one bit at a time through the register bus (we_roi / we_pt)
// and are cleared by the sweep of the parent (clr, clr_addr). Reads are synchronous: the
// suppression flags supp_a / supp_b refer to the sector words presented one clock earlier.
// Table look-up and the pT comparison follow the description; the table addressing, the
// tie rule and the clear sweep are this design's choices.
module overlap_pair
  import muctpi_pkg::*;
#(
  parameter int AW_A  = 8,
  parameter int AW_B  = 8,
  parameter bit IS_BE = 1'b0
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [15:0]  clr_addr,
  input  logic         we_roi,
  input  logic         we_pt,
  input  logic [15:0]  waddr,
  input  logic         wdata,
  input  sector_word_t a,
  input  sector_word_t b,
  output logic [1:0]   supp_a,
  output logic [1:0]   supp_b,
  output logic [3:0]   ovl      // overlap hits of the registered look-up, index 2*i+j
);
  localparam int AW = AW_A + AW_B;
  logic roi_lut [2**AW];
  logic pt_lut  [256];

  logic [1:0][7:0] roi_a, roi_b;
  logic [1:0][2:0] pt_a, pt_b;
  logic [1:0]      sg_a, sg_b;
  assign roi_a = {a.roi2, a.roi1};
  assign roi_b = {b.roi2, b.roi1};
  assign pt_a  = {a.pt2, a.pt1};
  assign pt_b  = {b.pt2, b.pt1};
  assign sg_a  = {a.sign2, a.sign1};
  assign sg_b  = {b.sign2, b.sign1};

  logic [3:0] roi_q, pt_q, pres_q, awin_q;

  always_ff @(posedge clk) begin
    if (clr)          roi_lut[clr_addr[AW-1:0]] <= 1'b0;
    else if (we_roi)  roi_lut[waddr[AW-1:0]]    <= wdata;
    if (clr)          pt_lut[clr_addr[7:0]]     <= 1'b0;
    else if (we_pt)   pt_lut[waddr[7:0]]        <= wdata;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        roi_q[2*i+j]  <= roi_lut[{roi_a[i][AW_A-1:0], roi_b[j][AW_B-1:0]}];
        pt_q[2*i+j]   <= IS_BE ? pt_lut[{pt_a[i], pt_b[j], sg_a[i], sg_b[j]}] : 1'b1;
        pres_q[2*i+j] <= (pt_a[i] != 3'd0) && (pt_b[j] != 3'd0);
        awin_q[2*i+j] <= (pt_a[i] >= pt_b[j]);
      end
  end

  logic [3:0] hit;
  assign hit = roi_q & pt_q & pres_q;
  assign ovl = hit;

  always_comb begin
    supp_a = '0;
    supp_b = '0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        if (hit[2*i+j]) begin
          if (awin_q[2*i+j]) supp_b[j] = 1'b1;
          else               supp_a[i] = 1'b1;
        end
  end
endmodule
