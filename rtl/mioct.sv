// mioct: octant module. Receives the 32-bit words of 13 trigger sectors (4 barrel,
// 6 end-cap, 3 forward) every bunch crossing and produces the octant's six 3-bit
// candidate multiplicities for the backplane adder, plus readout fragments for the MIROD.
//
// Trigger path (3 clocks from sec_in to mult_out):
//   sector_sync_align (register + programmable delay, BCID check)  -> clock 1
//   overlap_handling  (look-up tables of the 33 sector pairs)      -> clock 2
//   multiplicity_summing (suppressed candidates removed, 6 counts) -> clock 3
// Readout path: mioct_readout keeps the aligned words in a pipeline memory and on each
// L1A writes a zero-suppressed fragment into the readout FIFO, which readout_bus_node
// sends on the backplane bus when the token arrives. A monitoring copy is read through
// the register bus. The snapshot memory records, per bunch crossing, the 416 aligned
// sector bits, the 18-bit multiplicity, the 26 suppression flags and a 32-bit clock
// count; in playback mode its lines replace the sector inputs.
//
// Register bus (cfg.addr[23:19] must equal mod_id; read data one clock after re):
//   addr[18:16]=0, addr[7:0]:  0x00-0x0C W sector delay, 0x10 W BCID offset,
//     0x11 W L1 latency, 0x12 W {win_post[3:2], win_pre[1:0]}, 0x13 W snapshot mode,
//     0x14 W monitoring enable, 0x15 W playback length, 0x16 W snapshot line address,
//     0x20 W command bits {fetch, commit, freeze, arm, clear alignment errors},
//     (a fetched line is in the staging words 3 clocks after the fetch command)
//     0x30 R alignment errors, 0x31 R status, 0x32 R monitoring word [31:0],
//     0x33 R {empty, [35:32]} and pops the monitoring FIFO, 0x34 R multiplicity
//   addr[18:16]=1: RoI table bit, pair = wdata[21:16], table address = addr[15:0]
//   addr[18:16]=2: pT/sign table bit, same layout
//   addr[18:16]=3: snapshot staging word addr[5:0] (W and R)
// The block structure follows the description's block diagram; the register map, the
// line layout and the 3-clock split are this design's choices.
module mioct
  import muctpi_pkg::*;
#(
  parameter int BA_W         = 5,
  parameter int EC_W         = 8,
  parameter int FW_W         = 6,
  parameter int CLR_W        = 16,
  parameter int PIPE_DEPTH   = 128,
  parameter int DERAND_DEPTH = 16,
  parameter int RO_DEPTH     = 512,
  parameter int SNAP_AW      = 17
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [4:0]                    mod_id,
  input  logic [NUM_SEC-1:0][SEC_W-1:0] sec_in,
  input  logic                          l1a,
  input  logic                          bcr,
  input  logic                          ecr,
  output logic [MULTS_W-1:0]            mult_out,
  input  logic                          token_in,
  output logic                          token_out,
  input  logic                          bus_hold,
  output logic [RO_W-1:0]               bus_data,
  output logic                          bus_valid,
  input  cfg_req_t                      cfg,
  output logic [31:0]                   cfg_rdata,
  output logic                          mem_we,
  output logic                          mem_re,
  output logic [SNAP_AW-1:0]            mem_addr,
  output logic [575:0]                  mem_wdata,
  input  logic [575:0]                  mem_rdata
);
  localparam int PAW = $clog2(PIPE_DEPTH);

  // ---------------- registers ----------------
  logic [NUM_SEC-1:0][2:0] dly;
  logic [2:0]              bcid_ofs;
  logic [PAW-1:0]          latency;
  logic [1:0]              win_pre, win_post;
  logic [1:0]              snap_mode;
  logic                    mon_en;
  logic [SNAP_AW-1:0]      play_len, host_addr;
  logic                    sel, cmd;
  logic                    clr_err, arm, freeze, commit, fetch;

  assign sel = cfg.addr[23:19] == mod_id;
  assign cmd = sel && cfg.we && cfg.addr[18:16] == 3'd0 && cfg.addr[7:0] == 8'h20;
  assign clr_err = cmd && cfg.wdata[0];
  assign arm     = cmd && cfg.wdata[1];
  assign freeze  = cmd && cfg.wdata[2];
  assign commit  = cmd && cfg.wdata[3];
  assign fetch   = cmd && cfg.wdata[4];

  always_ff @(posedge clk) begin
    if (rst) begin
      dly <= '0; bcid_ofs <= '0; latency <= PAW'(100); win_pre <= '0; win_post <= '0;
      snap_mode <= '0; mon_en <= 1'b0; play_len <= '0; host_addr <= '0;
    end else if (sel && cfg.we && cfg.addr[18:16] == 3'd0) begin
      if (cfg.addr[7:0] < 8'(NUM_SEC)) dly[cfg.addr[3:0]] <= cfg.wdata[2:0];
      case (cfg.addr[7:0])
        8'h10: bcid_ofs  <= cfg.wdata[2:0];
        8'h11: latency   <= cfg.wdata[PAW-1:0];
        8'h12: {win_post, win_pre} <= cfg.wdata[3:0];
        8'h13: snap_mode <= cfg.wdata[1:0];
        8'h14: mon_en    <= cfg.wdata[0];
        8'h15: play_len  <= cfg.wdata[SNAP_AW-1:0];
        8'h16: host_addr <= cfg.wdata[SNAP_AW-1:0];
        default: ;
      endcase
    end
  end

  // ---------------- timing ----------------
  logic [BCID_W-1:0] bcid;
  logic [L1ID_W-1:0] l1id;
  logic [31:0]       tstamp;
  ttc_counters u_ttc (.clk, .rst, .bcr, .ecr, .l1a, .bcid, .l1id_cur(l1id));
  always_ff @(posedge clk) tstamp <= rst ? '0 : tstamp + 1'b1;

  // ---------------- trigger path ----------------
  logic [575:0]                  play_line, cap_line;
  logic                          play_valid;
  logic [NUM_SEC-1:0][SEC_W-1:0] sec_src, sec_al, sec_d2, sec_d3;
  logic [NUM_SEC-1:0]            align_err;
  logic [NUM_SEC-1:0][1:0]       supp, supp_d3;
  logic                          lut_busy;

  assign sec_src = play_valid ? play_line[NUM_SEC*SEC_W-1:0] : sec_in;

  sector_sync_align u_align (
    .clk, .rst, .sec_in(sec_src), .dly, .bcid_ref(bcid[2:0]), .bcid_ofs, .clr_err,
    .sec_out(sec_al), .align_err);

  overlap_handling #(.BA_W(BA_W), .EC_W(EC_W), .FW_W(FW_W), .CLR_W(CLR_W)) u_ovl (
    .clk, .rst, .sec(sec_al),
    .we_roi(sel && cfg.we && cfg.addr[18:16] == 3'd1),
    .we_pt (sel && cfg.we && cfg.addr[18:16] == 3'd2),
    .wpair(cfg.wdata[21:16]), .waddr(cfg.addr[15:0]), .wdata(cfg.wdata[0]),
    .supp, .ovl(), .busy(lut_busy));

  always_ff @(posedge clk) begin
    sec_d2  <= sec_al;
    sec_d3  <= sec_d2;
    supp_d3 <= supp;
  end

  multiplicity_summing u_mult (.clk, .rst, .sec(sec_d2), .supp, .mult(mult_out));

  // ---------------- readout path ----------------
  logic            ro_rd, ro_empty, frag_done, mon_rd, mon_empty, mon_ovf;
  logic [RO_W-1:0] ro_dout, mon_dout;

  mioct_readout #(.PIPE_DEPTH(PIPE_DEPTH), .DERAND_DEPTH(DERAND_DEPTH), .RO_DEPTH(RO_DEPTH))
  u_ro (
    .clk, .rst, .sec(sec_al), .bcid, .l1a, .l1id, .latency, .win_pre, .win_post, .mod_id,
    .mon_en, .ro_rd, .ro_dout, .ro_empty, .frag_done, .mon_rd, .mon_dout, .mon_empty, .mon_ovf);

  readout_bus_node u_node (
    .clk, .rst, .token_in, .token_out, .bus_hold, .frag_done, .fifo_dout(ro_dout),
    .fifo_empty(ro_empty), .fifo_rd(ro_rd), .bus_data, .bus_valid);

  // ---------------- snapshot / test memory ----------------
  logic [31:0]        stage_rdata;
  logic [SNAP_AW-1:0] snap_ptr;
  logic               frozen, wrapped;

  assign cap_line = {84'd0, tstamp, supp_d3, mult_out, sec_d3};

  snapshot_mem_if #(.LINE_W(576), .AW(SNAP_AW)) u_snap (
    .clk, .rst, .mode(snap_mode), .arm, .freeze, .play_len, .cap_valid(1'b1), .cap_line,
    .play_line, .play_valid,
    .stage_we(sel && cfg.we && cfg.addr[18:16] == 3'd3), .stage_idx(cfg.addr[5:0]),
    .stage_wdata(cfg.wdata), .stage_rdata, .host_commit(commit), .host_fetch(fetch),
    .host_addr, .snap_ptr, .frozen, .wrapped,
    .mem_we, .mem_re, .mem_addr, .mem_wdata, .mem_rdata);

  // ---------------- register read ----------------
  logic rsel;
  assign rsel   = sel && cfg.re;
  assign mon_rd = rsel && cfg.addr[18:16] == 3'd0 && cfg.addr[7:0] == 8'h33;

  always_ff @(posedge clk) begin
    if (rst) cfg_rdata <= '0;
    else if (!(sel && cfg.re)) cfg_rdata <= '0;
    else begin
      cfg_rdata <= '0;
      if (cfg.addr[18:16] == 3'd3) cfg_rdata <= stage_rdata;
      else if (cfg.addr[18:16] == 3'd0)
        case (cfg.addr[7:0])
          8'h30: cfg_rdata <= 32'(align_err);
          8'h31: cfg_rdata <= {mon_ovf, lut_busy, frozen, wrapped, 28'(snap_ptr)};
          8'h32: cfg_rdata <= mon_dout[31:0];
          8'h33: cfg_rdata <= {mon_empty, 27'd0, mon_dout[35:32]};
          8'h34: cfg_rdata <= 32'(mult_out);
          default: ;
        endcase
    end
  end
endmodule
