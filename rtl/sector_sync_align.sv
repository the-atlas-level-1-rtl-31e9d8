// sector_sync_align: input stage of the MIOCT trigger path.
//
// Each of the 13 sector words is registered in the system clock (the resynchronisation
// to the bunch clock received from the MICTP) and then delayed by a programmable number
// of bunch crossings, so that words from RPC and TGC sectors with different electronics
// and cable latencies line up on the same bunch crossing. After alignment the 3-bit BCID
// carried in every sector word is compared with the low bits of the local bunch counter
// plus a programmable offset; a mismatch sets a sticky per-sector error flag that the
// register bus can read and clear.
//
// Timing: out is valid 1 + dly[i] clock cycles after sector i's word is presented.
// Alignment and the alignment check follow the description; the delay range (0..7),
// the BCID field inside the word and the sticky flags are this design's choices.
module sector_sync_align
  import muctpi_pkg::*;
#(
  parameter int NSEC  = NUM_SEC,
  parameter int DLY_W = 3
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [NSEC-1:0][SEC_W-1:0] sec_in,
  input  logic [NSEC-1:0][DLY_W-1:0] dly,
  input  logic [2:0]                 bcid_ref,    // low bits of the local bunch counter
  input  logic [2:0]                 bcid_ofs,
  input  logic                       clr_err,
  output logic [NSEC-1:0][SEC_W-1:0] sec_out,
  output logic [NSEC-1:0]            align_err
);
  localparam int MAXD = 1 << DLY_W;
  logic [NSEC-1:0][SEC_W-1:0] in_q;
  logic [SEC_W-1:0] sr [NSEC][MAXD];

  always_ff @(posedge clk) begin
    in_q <= sec_in;
    for (int s = 0; s < NSEC; s++) begin
      sr[s][0] <= in_q[s];
      for (int k = 1; k < MAXD; k++) sr[s][k] <= sr[s][k-1];
    end
  end

  // in_q is one cycle after the input; sr[s][k] is k+2 cycles after. Output register adds 1.
  always_ff @(posedge clk) begin
    for (int s = 0; s < NSEC; s++)
      sec_out[s] <= (dly[s] == 0) ? sec_in[s] : ((dly[s] == 1) ? in_q[s] : sr[s][dly[s] - 2]);
  end

  logic [2:0] expect_bcid;
  assign expect_bcid = bcid_ref + bcid_ofs;

  always_ff @(posedge clk) begin
    if (rst || clr_err) align_err <= '0;
    else
      for (int s = 0; s < NSEC; s++) begin
        sector_word_t w;
        w = sector_word_t'(sec_out[s]);
        if (w.bcid != expect_bcid) align_err[s] <= 1'b1;
      end
  end
endmodule
