// mictp: CTP interface module (the MIROD/CTP board loaded with its CTP-interface role).
//
// Timing: the Level-1 Accept, LHC orbit and event counter reset arriving from the CTP
// are synchronised (two flip-flops) and reshaped into one-clock pulses on their rising
// edge, then sent to all modules over the backplane (l1a, bcr, ecr). The bunch clock
// itself is the clk of the whole design.
// Trigger: the 18-bit multiplicity total from the backplane adder tree is latched every
// clock and driven to the CTP (mult_ctp, one clock after mult_bp). In playback mode the
// snapshot memory supplies mult_ctp instead, for module tests.
// Readout: the latched multiplicity is written into a pipeline memory; on an L1A the
// entry written latency clocks earlier is taken and a 3-word fragment {header,
// multiplicity word, trailer} is queued for the backplane readout bus (module id 16).
// Monitoring: per threshold, a 32-bit accumulator sums the multiplicities over all
// clocks (cleared by command); read through the register bus.
// Snapshot: each clock a 36-bit line {l1a, bcr, ecr, 3'b0, BCID, multiplicity} can be
// captured into the 1M x 36 memory.
//
// Register bus (cfg.addr[23:19] == 16): addr[7:0] 0x11 W latency, 0x13 W snapshot mode,
// 0x15 W playback length, 0x16 W snapshot line address, 0x20 W command bits {fetch,
// commit, freeze, arm, clear monitoring}, 0x31 R status, 0x34 R multiplicity,
// 0x40-0x45 R accumulators; addr[18:16]=3: staging word.
// Functions follow the description; formats, register map and the monitoring as
// accumulators are this design's choices.
module mictp
  import muctpi_pkg::*;
#(
  parameter int PIPE_DEPTH = 128,
  parameter int SNAP_AW    = 20
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ctp_l1a_in,
  input  logic               ctp_orbit_in,
  input  logic               ctp_ecr_in,
  output logic               l1a,
  output logic               bcr,
  output logic               ecr,
  input  logic [MULTS_W-1:0] mult_bp,
  output logic [MULTS_W-1:0] mult_ctp,
  input  logic               token_in,
  output logic               token_out,
  input  logic               bus_hold,
  output logic [RO_W-1:0]    bus_data,
  output logic               bus_valid,
  input  cfg_req_t           cfg,
  output logic [31:0]        cfg_rdata,
  output logic               mem_we,
  output logic               mem_re,
  output logic [SNAP_AW-1:0] mem_addr,
  output logic [35:0]        mem_wdata,
  input  logic [35:0]        mem_rdata
);
  localparam int PAW = $clog2(PIPE_DEPTH);

  // ---------------- timing reception ----------------
  logic [2:0] s_l1a, s_orb, s_ecr;
  always_ff @(posedge clk) begin
    if (rst) begin
      s_l1a <= '0; s_orb <= '0; s_ecr <= '0;
    end else begin
      s_l1a <= {s_l1a[1:0], ctp_l1a_in};
      s_orb <= {s_orb[1:0], ctp_orbit_in};
      s_ecr <= {s_ecr[1:0], ctp_ecr_in};
    end
  end
  assign l1a = s_l1a[1] && !s_l1a[2];
  assign bcr = s_orb[1] && !s_orb[2];
  assign ecr = s_ecr[1] && !s_ecr[2];

  logic [BCID_W-1:0] bcid;
  logic [L1ID_W-1:0] l1id;
  ttc_counters u_ttc (.clk, .rst, .bcr, .ecr, .l1a, .bcid, .l1id_cur(l1id));

  // ---------------- registers ----------------
  logic               sel, cmd;
  logic [PAW-1:0]     latency;
  logic [1:0]         snap_mode;
  logic [SNAP_AW-1:0] play_len, host_addr;
  assign sel = cfg.addr[23:19] == 5'(MICTP_ID);
  assign cmd = sel && cfg.we && cfg.addr[18:16] == 3'd0 && cfg.addr[7:0] == 8'h20;
  always_ff @(posedge clk) begin
    if (rst) begin
      latency <= PAW'(100); snap_mode <= '0; play_len <= '0; host_addr <= '0;
    end else if (sel && cfg.we && cfg.addr[18:16] == 3'd0)
      case (cfg.addr[7:0])
        8'h11: latency   <= cfg.wdata[PAW-1:0];
        8'h13: snap_mode <= cfg.wdata[1:0];
        8'h15: play_len  <= cfg.wdata[SNAP_AW-1:0];
        8'h16: host_addr <= cfg.wdata[SNAP_AW-1:0];
        default: ;
      endcase
  end

  // ---------------- multiplicity to CTP ----------------
  logic [35:0] play_line;
  logic        play_valid;
  always_ff @(posedge clk) begin
    if (rst) mult_ctp <= '0;
    else     mult_ctp <= play_valid ? play_line[MULTS_W-1:0] : mult_bp;
  end

  // ---------------- monitoring ----------------
  logic [NUM_THR-1:0][31:0] acc;
  always_ff @(posedge clk) begin
    if (rst || (cmd && cfg.wdata[0])) acc <= '0;
    else
      for (int t = 0; t < NUM_THR; t++) acc[t] <= acc[t] + 32'(mult_ctp[t*MULT_W +: MULT_W]);
  end

  // ---------------- readout pipeline ----------------
  logic [MULTS_W-1:0] pipe [PIPE_DEPTH];
  logic [PAW-1:0]     wp;
  always_ff @(posedge clk) begin
    pipe[wp] <= mult_ctp;
    wp <= rst ? '0 : wp + 1'b1;
  end

  logic                        ev_rd, ev_empty, ev_full;
  logic [MULTS_W+L1ID_W-1:0]   ev_dout;
  sync_fifo #(.W(MULTS_W + L1ID_W), .DEPTH(16)) u_ev (
    .clk, .rst, .wr(l1a), .din({pipe[wp - latency], l1id}), .rd(ev_rd), .dout(ev_dout),
    .empty(ev_empty), .full(ev_full), .count());

  logic [1:0]      fphase;
  logic            ro_wr, ro_full, ro_empty, ro_rd, frag_done;
  logic [RO_W-1:0] ro_din, ro_dout;
  always_comb begin
    ro_wr = !ev_empty && !ro_full;
    case (fphase)
      2'd0:    ro_din = {TAG_HDR, 5'(MICTP_ID), 3'd0, ev_dout[L1ID_W-1:0]};
      2'd1:    ro_din = {TAG_SLICE, 1'b1, 13'd0, ev_dout[L1ID_W +: MULTS_W]};
      default: ro_din = {TAG_TRL, 16'd0, 16'd2};
    endcase
  end
  assign ev_rd = ro_wr && fphase == 2'd2;
  always_ff @(posedge clk) begin
    frag_done <= 1'b0;
    if (rst) fphase <= '0;
    else if (ro_wr) begin
      fphase <= (fphase == 2'd2) ? 2'd0 : fphase + 1'b1;
      if (fphase == 2'd2) frag_done <= 1'b1;
    end
  end

  sync_fifo #(.W(RO_W), .DEPTH(64)) u_ro (
    .clk, .rst, .wr(ro_wr), .din(ro_din), .rd(ro_rd), .dout(ro_dout),
    .empty(ro_empty), .full(ro_full), .count());

  readout_bus_node u_node (
    .clk, .rst, .token_in, .token_out, .bus_hold, .frag_done, .fifo_dout(ro_dout),
    .fifo_empty(ro_empty), .fifo_rd(ro_rd), .bus_data, .bus_valid);

  // ---------------- snapshot / test memory ----------------
  logic [31:0]        stage_rdata;
  logic [SNAP_AW-1:0] snap_ptr;
  logic               frozen, wrapped;
  snapshot_mem_if #(.LINE_W(36), .AW(SNAP_AW)) u_snap (
    .clk, .rst, .mode(snap_mode), .arm(cmd && cfg.wdata[1]), .freeze(cmd && cfg.wdata[2]),
    .play_len, .cap_valid(1'b1), .cap_line({l1a, bcr, ecr, 3'd0, bcid, mult_ctp}),
    .play_line, .play_valid,
    .stage_we(sel && cfg.we && cfg.addr[18:16] == 3'd3), .stage_idx(cfg.addr[5:0]),
    .stage_wdata(cfg.wdata), .stage_rdata, .host_commit(cmd && cfg.wdata[3]),
    .host_fetch(cmd && cfg.wdata[4]), .host_addr, .snap_ptr, .frozen, .wrapped,
    .mem_we, .mem_re, .mem_addr, .mem_wdata, .mem_rdata);

  // ---------------- register read ----------------
  always_ff @(posedge clk) begin
    if (rst) cfg_rdata <= '0;
    else if (!(sel && cfg.re)) cfg_rdata <= '0;
    else begin
      cfg_rdata <= '0;
      if (cfg.addr[18:16] == 3'd3) cfg_rdata <= stage_rdata;
      else if (cfg.addr[18:16] == 3'd0) begin
        if (cfg.addr[7:0] == 8'h31) cfg_rdata <= {ev_full, 1'b0, frozen, wrapped, 28'(snap_ptr)};
        if (cfg.addr[7:0] == 8'h34) cfg_rdata <= 32'(mult_ctp);
        if (cfg.addr[7:4] == 4'h4 && cfg.addr[3:0] < 4'(NUM_THR)) cfg_rdata <= acc[cfg.addr[2:0]];
      end
    end
  end
endmodule
