// muctpi_pkg: types and constants shared by the MUCTPI blocks.
//
// The MUCTPI combines 208 muon trigger sectors (64 barrel, 96 end-cap, 48 forward) in
// 16 octant modules (MIOCT) of 13 sectors each, counts muon candidates for six pT
// thresholds as six 3-bit values (18 bits), and reads candidate data out on a shared
// 36-bit backplane bus. Those numbers follow the published description of the system.
//
// The layout of the 32-bit sector word, the 36-bit readout word tags, the DAQ/Level-2
// word formats and the register map are this design's own choices: the description
// gives only the widths (32-bit sector words, 36-bit readout bus, 32-bit S-LINK).
package muctpi_pkg;

  // ---- system size -------------------------------------------------------------------
  localparam int NUM_OCT     = 16;   // MIOCT modules
  localparam int NUM_SEC     = 13;   // sectors per MIOCT: 4 barrel, 6 end-cap, 3 forward
  localparam int NUM_THR     = 6;    // pT thresholds
  localparam int MULT_W      = 3;    // bits per threshold multiplicity
  localparam int MULTS_W     = NUM_THR * MULT_W;  // 18
  localparam int SEC_W       = 32;   // sector word
  localparam int RO_W        = 36;   // backplane readout bus
  localparam int BCID_W      = 12;
  localparam int L1ID_W      = 24;
  localparam int ORBIT_LEN   = 3564; // bunch crossings per LHC turn
  localparam int MICTP_ID    = 16;   // module id of the MICTP on the readout bus

  // Sector index order inside a MIOCT (order of the inputs on the front panel):
  // 0 BA31, 1 BA32, 2 BA01, 3 BA02, 4 EC47, 5 EC00, 6 EC01, 7 EC02, 8 EC03, 9 EC04,
  // 10 FW00, 11 FW01, 12 FW02
  typedef enum logic [1:0] {SEC_BARREL = 2'd0, SEC_ENDCAP = 2'd1, SEC_FORWARD = 2'd2} sec_type_e;

  function automatic sec_type_e sec_type(input int idx);
    if (idx < 4)       return SEC_BARREL;
    else if (idx < 10) return SEC_ENDCAP;
    else               return SEC_FORWARD;
  endfunction

  // ---- sector word -------------------------------------------------------------------
  // pt = 0 means "no candidate"; 1..6 is the highest threshold passed; 7 is unused.
  typedef struct packed {
    logic       sign2;
    logic       sign1;
    logic [2:0] bcid;    // low bits of the bunch-crossing number, for the alignment check
    logic       ovf;     // more than two candidates seen in the sector
    logic [2:0] pt2;
    logic [2:0] pt1;
    logic [7:0] roi2;
    logic [7:0] roi1;
    logic [3:0] spare;
  } sector_word_t;

  // ---- overlap pairs -----------------------------------------------------------------
  // 2 barrel-barrel, 24 barrel-endcap (every barrel with every end-cap sector),
  // 5 endcap-endcap (neighbours in phi) and 2 forward-forward (neighbours in phi).
  localparam int NUM_PAIRS = 33;
  typedef enum logic [1:0] {OVL_BB = 2'd0, OVL_BE = 2'd1, OVL_EE = 2'd2, OVL_FF = 2'd3} ovl_kind_e;

  function automatic int pair_a(input int p);
    if (p == 0)       return 0;
    else if (p == 1)  return 2;
    else if (p < 26)  return (p - 2) / 6;
    else if (p < 31)  return 4 + (p - 26);
    else              return 10 + (p - 31);
  endfunction

  function automatic int pair_b(input int p);
    if (p == 0)       return 1;
    else if (p == 1)  return 3;
    else if (p < 26)  return 4 + (p - 2) % 6;
    else if (p < 31)  return 5 + (p - 26);
    else              return 11 + (p - 31);
  endfunction

  function automatic ovl_kind_e pair_kind(input int p);
    if (p < 2)        return OVL_BB;
    else if (p < 26)  return OVL_BE;
    else if (p < 31)  return OVL_EE;
    else              return OVL_FF;
  endfunction

  // ---- 36-bit readout word tags (bits 35:32) ------------------------------------------
  // 0..12 : sector word of that sector index, bits 31:0
  // 4'hD  : fragment header, bits 31:27 module id, bits 23:0 L1ID
  // 4'hE  : bit 31 = 0: slice header, bits 14:12 signed offset from the triggered BC,
  //         bits 11:0 BCID; bit 31 = 1: multiplicity word of the MICTP, bits 17:0
  // 4'hF  : fragment trailer, bits 15:0 number of words in the fragment before it
  localparam logic [3:0] TAG_HDR   = 4'hD;
  localparam logic [3:0] TAG_SLICE = 4'hE;
  localparam logic [3:0] TAG_TRL   = 4'hF;

  // ---- S-LINK control words (ctrl = 1) ------------------------------------------------
  localparam logic [31:0] SLINK_BOF = 32'hB0F0_0000;
  localparam logic [31:0] SLINK_EOF = 32'hE0F0_0000;

  // ---- register bus ------------------------------------------------------------------
  // A simple local bus standing in for the VMEbus slave. addr[23:19] selects the module
  // (0..15 MIOCT, 16 MICTP, 17 MIROD); the rest is decoded by the module. Read data
  // is returned on the cycle after re.
  typedef struct packed {
    logic        we;
    logic        re;
    logic [23:0] addr;
    logic [31:0] wdata;
  } cfg_req_t;

  // DAQ candidate word (32 bits): bit 31 = 0, 30:28 signed BC offset, 27:23 module id,
  // 22:19 sector, 18 candidate index, 17:15 pT, 14 sign, 7:0 RoI.
  function automatic logic [31:0] cand_word(input logic [2:0] off, input logic [4:0] mod,
                                            input logic [3:0] sec, input logic idx,
                                            input logic [2:0] pt, input logic sgn,
                                            input logic [7:0] roi);
    return {1'b0, off, mod, sec, idx, pt, sgn, 6'd0, roi};
  endfunction

endpackage
