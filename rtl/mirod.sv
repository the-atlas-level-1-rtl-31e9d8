// mirod: readout driver (the MIROD/CTP board loaded with its readout role).
//
// Event collection: every L1A seen on the backplane queues the event's L1ID and BCID.
// For each queued event the MIROD writes a start marker carrying the L1ID into its input
// FIFO (a header word with module id 30) and launches one token on the backplane;
// while the token travels through the 16 MIOCTs and the MICTP, their fragments arrive on
// the readout bus and are stored. When the token returns an end marker (module id 31)
// closes the event. bus_hold pauses the
// senders while the input FIFO is nearly full.
// Formatting: a converter reads the input FIFO and sends to the DAQ S-LINK
//   BOF (ctrl), L1ID, BCID, one candidate word per muon candidate of every sector word
//   (see muctpi_pkg::cand_word), one multiplicity word {4'h8, 18-bit total},
//   the number of data words, EOF (ctrl).
// Level-2: candidates of the triggered bunch crossing (offset 0) are inserted, as they
// pass, into a list kept sorted by decreasing pT (equal pT: arrival order) that holds
// the L2_MAX highest; after the DAQ fragment the L2 S-LINK gets BOF, L1ID, the sorted
// candidates, their number, EOF. Both links stall while their lff (link full) is high.
// Snapshot: the bus words can be captured in the 1M x 36 memory; in playback mode
// stored words are fed into the input FIFO in place of the bus, markers included.
//
// Register bus (cfg.addr[23:19] == 17): 0x13 W snapshot mode, 0x15 W playback length,
// 0x16 W snapshot line address, 0x20 W command {fetch, commit, freeze, arm, -},
// 0x31 R status, 0x35 R events sent; addr[18:16]=3 staging word.
// Collection of MIOCT and MICTP data per L1A, DAQ and pT-ordered Level-2 outputs follow
// the description; all formats, L2_MAX and the marker scheme are this design's choices.
module mirod
  import muctpi_pkg::*;
#(
  parameter int IN_DEPTH = 1024,
  parameter int L2_MAX   = 16,
  parameter int SNAP_AW  = 20
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               l1a,
  input  logic               bcr,
  input  logic               ecr,
  output logic               token_out,
  input  logic               token_return,
  output logic               bus_hold,
  input  logic [RO_W-1:0]    bus_data,
  input  logic               bus_valid,
  output logic [31:0]        daq_data,
  output logic               daq_ctrl,
  output logic               daq_wen,
  input  logic               daq_lff,
  output logic [31:0]        l2_data,
  output logic               l2_ctrl,
  output logic               l2_wen,
  input  logic               l2_lff,
  input  cfg_req_t           cfg,
  output logic [31:0]        cfg_rdata,
  output logic               mem_we,
  output logic               mem_re,
  output logic [SNAP_AW-1:0] mem_addr,
  output logic [35:0]        mem_wdata,
  input  logic [35:0]        mem_rdata
);
  // Event markers are header words with module ids no module uses.
  localparam logic [4:0] ID_START = 5'd30;
  localparam logic [4:0] ID_END   = 5'd31;
  localparam int EV_W = L1ID_W + BCID_W;
  localparam int IAW  = $clog2(IN_DEPTH);

  logic [BCID_W-1:0] bcid;
  logic [L1ID_W-1:0] l1id;
  ttc_counters u_ttc (.clk, .rst, .bcr, .ecr, .l1a, .bcid, .l1id_cur(l1id));

  // ---------------- registers ----------------
  logic               sel, cmd;
  logic [1:0]         snap_mode;
  logic [SNAP_AW-1:0] play_len, host_addr;
  assign sel = cfg.addr[23:19] == 5'(MICTP_ID + 1);
  assign cmd = sel && cfg.we && cfg.addr[18:16] == 3'd0 && cfg.addr[7:0] == 8'h20;
  always_ff @(posedge clk) begin
    if (rst) begin
      snap_mode <= '0; play_len <= '0; host_addr <= '0;
    end else if (sel && cfg.we && cfg.addr[18:16] == 3'd0)
      case (cfg.addr[7:0])
        8'h13: snap_mode <= cfg.wdata[1:0];
        8'h15: play_len  <= cfg.wdata[SNAP_AW-1:0];
        8'h16: host_addr <= cfg.wdata[SNAP_AW-1:0];
        default: ;
      endcase
  end

  // ---------------- L1A queue and token launch ----------------
  logic            l1q_rd, l1q_empty, l1q_full;
  logic [EV_W-1:0] l1q_dout;
  sync_fifo #(.W(EV_W), .DEPTH(16)) u_l1q (
    .clk, .rst, .wr(l1a), .din({l1id, bcid}), .rd(l1q_rd), .dout(l1q_dout),
    .empty(l1q_empty), .full(l1q_full), .count());

  logic            evq_rd, evq_empty;
  logic [EV_W-1:0] evq_dout;
  sync_fifo #(.W(EV_W), .DEPTH(16)) u_evq (
    .clk, .rst, .wr(l1q_rd), .din(l1q_dout), .rd(evq_rd), .dout(evq_dout),
    .empty(evq_empty), .full(), .count());

  logic            in_wr, in_rd, in_empty, in_full;
  logic [RO_W-1:0] in_din, in_dout;
  logic [IAW:0]    in_count;
  logic            tok_busy, play_valid;
  logic [35:0]     play_line;

  assign bus_hold = in_count > (IAW+1)'(IN_DEPTH - 16);
  assign l1q_rd   = !tok_busy && !l1q_empty && !bus_hold && !play_valid;

  always_ff @(posedge clk) begin
    token_out <= 1'b0;
    if (rst) tok_busy <= 1'b0;
    else if (l1q_rd) begin
      tok_busy  <= 1'b1;
      token_out <= 1'b1;
    end else if (token_return) tok_busy <= 1'b0;
  end

  always_comb begin
    in_wr  = 1'b0;
    in_din = bus_data;
    if (play_valid) begin
      in_wr = 1'b1; in_din = play_line;
    end else if (l1q_rd) begin
      in_wr = 1'b1; in_din = {TAG_HDR, ID_START, 3'd0, l1q_dout[EV_W-1 -: L1ID_W]};
    end else if (token_return) begin
      in_wr = 1'b1; in_din = {TAG_HDR, ID_END, 27'd0};
    end else if (bus_valid) in_wr = 1'b1;
  end

  sync_fifo #(.W(RO_W), .DEPTH(IN_DEPTH)) u_in (
    .clk, .rst, .wr(in_wr), .din(in_din), .rd(in_rd), .dout(in_dout),
    .empty(in_empty), .full(in_full), .count(in_count));

  // ---------------- Level-2 sorted candidate list ----------------
  logic [L2_MAX-1:0]       srt_v;
  logic [2:0]              srt_pt [L2_MAX];
  logic [31:0]             srt_w  [L2_MAX];
  logic                    ins, srt_clr;
  logic [2:0]              ins_pt;
  logic [31:0]             ins_w;
  int                      pos;

  always_comb begin
    pos = 0;
    for (int i = 0; i < L2_MAX; i++) if (srt_v[i] && srt_pt[i] >= ins_pt) pos = i + 1;
  end

  always_ff @(posedge clk) begin
    if (rst || srt_clr) srt_v <= '0;
    else if (ins && pos < L2_MAX) begin
      for (int i = L2_MAX - 1; i > 0; i--)
        if (i > pos) begin
          srt_v[i] <= srt_v[i-1]; srt_pt[i] <= srt_pt[i-1]; srt_w[i] <= srt_w[i-1];
        end
      srt_v[pos] <= 1'b1; srt_pt[pos] <= ins_pt; srt_w[pos] <= ins_w;
    end
  end

  // ---------------- converter ----------------
  typedef enum logic [3:0] {C_IDLE, C_BOF, C_L1ID, C_BCID, C_DATA, C_CNT, C_EOF,
                            C_L2BOF, C_L2ID, C_L2CAND, C_L2CNT, C_L2EOF} conv_e;
  conv_e             cst;
  logic [L1ID_W-1:0] ev_l1id;
  logic [BCID_W-1:0] ev_bcid;
  logic [4:0]        cur_mod;
  logic [2:0]        cur_off;
  logic              half;
  logic [15:0]       wcount;
  logic [$clog2(L2_MAX+1)-1:0] l2_idx, l2_n;
  logic [31:0]       ev_sent;
  sector_word_t      sw;
  logic [3:0]        tag;

  logic is_start, is_end;
  assign tag      = in_dout[RO_W-1 -: 4];
  assign is_start = (tag == TAG_HDR) && (in_dout[31:27] == ID_START);
  assign is_end   = (tag == TAG_HDR) && (in_dout[31:27] == ID_END);
  assign sw  = sector_word_t'(in_dout[31:0]);
  always_comb begin
    l2_n = '0;
    for (int i = 0; i < L2_MAX; i++) l2_n += $bits(l2_n)'(srt_v[i]);
  end

  always_comb begin
    daq_wen = 1'b0; daq_ctrl = 1'b0; daq_data = '0;
    l2_wen  = 1'b0; l2_ctrl  = 1'b0; l2_data  = '0;
    in_rd = 1'b0; evq_rd = 1'b0; ins = 1'b0; ins_pt = '0; ins_w = '0; srt_clr = 1'b0;
    case (cst)
      C_IDLE: if (!in_empty) begin
        in_rd = 1'b1;
        if (is_start) begin evq_rd = !evq_empty; srt_clr = 1'b1; end
      end
      C_BOF:  begin daq_wen = !daq_lff; daq_ctrl = 1'b1; daq_data = SLINK_BOF; end
      C_L1ID: begin daq_wen = !daq_lff; daq_data = 32'(ev_l1id); end
      C_BCID: begin daq_wen = !daq_lff; daq_data = 32'(ev_bcid); end
      C_DATA: if (!in_empty && !daq_lff) begin
        if (tag < 4'(NUM_SEC)) begin
          if (!half) begin
            if (sw.pt1 != 3'd0) begin
              daq_wen  = 1'b1;
              daq_data = cand_word(cur_off, cur_mod, tag, 1'b0, sw.pt1, sw.sign1, sw.roi1);
              ins = (cur_off == 3'd0); ins_pt = sw.pt1; ins_w = daq_data;
            end
            in_rd = (sw.pt2 == 3'd0);
          end else begin
            daq_wen  = 1'b1;
            daq_data = cand_word(cur_off, cur_mod, tag, 1'b1, sw.pt2, sw.sign2, sw.roi2);
            ins = (cur_off == 3'd0); ins_pt = sw.pt2; ins_w = daq_data;
            in_rd = 1'b1;
          end
        end else if (tag == TAG_SLICE && in_dout[31]) begin
          daq_wen = 1'b1; daq_data = {4'h8, 10'd0, in_dout[MULTS_W-1:0]}; in_rd = 1'b1;
        end else in_rd = 1'b1;
      end
      C_CNT:    begin daq_wen = !daq_lff; daq_data = 32'(wcount); end
      C_EOF:    begin daq_wen = !daq_lff; daq_ctrl = 1'b1; daq_data = SLINK_EOF; end
      C_L2BOF:  begin l2_wen = !l2_lff; l2_ctrl = 1'b1; l2_data = SLINK_BOF; end
      C_L2ID:   begin l2_wen = !l2_lff; l2_data = 32'(ev_l1id); end
      C_L2CAND: begin l2_wen = !l2_lff && (l2_idx < l2_n); l2_data = srt_w[l2_idx[$clog2(L2_MAX)-1:0]]; end
      C_L2CNT:  begin l2_wen = !l2_lff; l2_data = 32'(l2_n); end
      C_L2EOF:  begin l2_wen = !l2_lff; l2_ctrl = 1'b1; l2_data = SLINK_EOF; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cst <= C_IDLE; half <= 1'b0; wcount <= '0; l2_idx <= '0; ev_sent <= '0;
      ev_l1id <= '0; ev_bcid <= '0; cur_mod <= '0; cur_off <= '0;
    end else begin
      case (cst)
        C_IDLE: if (!in_empty && is_start) begin
          cst <= C_BOF;
          {ev_l1id, ev_bcid} <= evq_empty ? {in_dout[L1ID_W-1:0], BCID_W'(0)} : evq_dout;
          wcount <= '0; half <= 1'b0; cur_off <= '0; cur_mod <= '0;
        end
        C_BOF:  if (!daq_lff) cst <= C_L1ID;
        C_L1ID: if (!daq_lff) cst <= C_BCID;
        C_BCID: if (!daq_lff) cst <= C_DATA;
        C_DATA: if (!in_empty && !daq_lff) begin
          if (daq_wen) wcount <= wcount + 1'b1;
          if (tag < 4'(NUM_SEC)) half <= !half && (sw.pt1 != 3'd0) && (sw.pt2 != 3'd0) ? 1'b1 :
                                         (!half && sw.pt1 == 3'd0 && sw.pt2 != 3'd0) ? 1'b1 : 1'b0;
          if (tag == TAG_HDR && !is_end) cur_mod <= in_dout[31:27];
          if (tag == TAG_SLICE && !in_dout[31]) cur_off <= in_dout[14:12];
          if (is_end)           cst <= C_CNT;
        end
        C_CNT:    if (!daq_lff) cst <= C_EOF;
        C_EOF:    if (!daq_lff) cst <= C_L2BOF;
        C_L2BOF:  if (!l2_lff) cst <= C_L2ID;
        C_L2ID:   if (!l2_lff) begin cst <= C_L2CAND; l2_idx <= '0; end
        C_L2CAND: if (!l2_lff) begin
          if (l2_idx >= l2_n) cst <= C_L2CNT;
          else l2_idx <= l2_idx + 1'b1;
        end
        C_L2CNT:  if (!l2_lff) cst <= C_L2EOF;
        C_L2EOF:  if (!l2_lff) begin cst <= C_IDLE; ev_sent <= ev_sent + 1'b1; end
        default:  cst <= C_IDLE;
      endcase
    end
  end

  // ---------------- snapshot / test memory ----------------
  logic [31:0]        stage_rdata;
  logic [SNAP_AW-1:0] snap_ptr;
  logic               frozen, wrapped;
  snapshot_mem_if #(.LINE_W(36), .AW(SNAP_AW)) u_snap (
    .clk, .rst, .mode(snap_mode), .arm(cmd && cfg.wdata[1]), .freeze(cmd && cfg.wdata[2]),
    .play_len, .cap_valid(bus_valid), .cap_line(bus_data), .play_line, .play_valid,
    .stage_we(sel && cfg.we && cfg.addr[18:16] == 3'd3), .stage_idx(cfg.addr[5:0]),
    .stage_wdata(cfg.wdata), .stage_rdata, .host_commit(cmd && cfg.wdata[3]),
    .host_fetch(cmd && cfg.wdata[4]), .host_addr, .snap_ptr, .frozen, .wrapped,
    .mem_we, .mem_re, .mem_addr, .mem_wdata, .mem_rdata);

  always_ff @(posedge clk) begin
    if (rst) cfg_rdata <= '0;
    else if (!(sel && cfg.re)) cfg_rdata <= '0;
    else begin
      cfg_rdata <= '0;
      if (cfg.addr[18:16] == 3'd3) cfg_rdata <= stage_rdata;
      else if (cfg.addr[7:0] == 8'h31) cfg_rdata <= {l1q_full, in_full, frozen, wrapped, 28'(snap_ptr)};
      else if (cfg.addr[7:0] == 8'h35) cfg_rdata <= ev_sent;
    end
  end
endmodule
