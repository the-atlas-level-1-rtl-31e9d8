// mioct_readout: MIOCT readout path.
//
// Every bunch crossing the 13 aligned sector words and their BCID are written into a
// circular pipeline memory, which holds them for the Level-1 trigger latency. On a
// Level-1 Accept a job is queued that reads win_pre slices before and win_post slices
// after the triggered bunch crossing (each 0..2) from the pipeline, one slice per clock,
// into the derandomizer FIFO. The formatter empties the derandomizer, drops sector words
// that carry no candidate (zero suppression) and writes a fragment of 36-bit words into
// the readout FIFO, from which the backplane bus node sends it:
//   header {TAG_HDR, module id, L1ID}, per slice {TAG_SLICE, offset, BCID} followed by
//   {sector index, sector word} for each non-empty sector, trailer {TAG_TRL, word count}.
// When mon_en is set every word is also copied into the monitoring FIFO, read through
// the register bus; words that find it full are dropped and mon_ovf is set.
//
// Timing: the slice triggered by an L1A raised in cycle T is the one written in cycle
// T - latency. latency must exceed win_post and stay below PIPE_DEPTH - win_pre - the
// time the derandomizer may be blocked. frag_done pulses when a trailer is written.
// Pipeline, window, derandomizer, zero suppression, readout and monitoring FIFOs follow
// the description; the word format, depths and one-slice-per-clock transfer are this
// design's choices.
module mioct_readout
  import muctpi_pkg::*;
#(
  parameter int PIPE_DEPTH   = 128,
  parameter int DERAND_DEPTH = 16,
  parameter int RO_DEPTH     = 512,
  parameter int MON_DEPTH    = 512
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NUM_SEC-1:0][SEC_W-1:0] sec,
  input  logic [BCID_W-1:0]             bcid,
  input  logic                          l1a,
  input  logic [L1ID_W-1:0]             l1id,
  input  logic [$clog2(PIPE_DEPTH)-1:0] latency,
  input  logic [1:0]                    win_pre,
  input  logic [1:0]                    win_post,
  input  logic [4:0]                    mod_id,
  input  logic                          mon_en,
  input  logic                          ro_rd,
  output logic [RO_W-1:0]               ro_dout,
  output logic                          ro_empty,
  output logic                          frag_done,
  input  logic                          mon_rd,
  output logic [RO_W-1:0]               mon_dout,
  output logic                          mon_empty,
  output logic                          mon_ovf
);
  localparam int PAW    = $clog2(PIPE_DEPTH);
  localparam int SLICE_W = BCID_W + NUM_SEC * SEC_W;
  localparam int JOB_W   = PAW + 2 + 2 + L1ID_W;
  localparam int DR_W    = 1 + 1 + 3 + L1ID_W + SLICE_W;

  // ---------------- pipeline memory ----------------
  logic [SLICE_W-1:0] pipe [PIPE_DEPTH];
  logic [PAW-1:0]     wp;
  always_ff @(posedge clk) begin
    pipe[wp] <= {bcid, sec};
    if (rst) wp <= '0;
    else     wp <= wp + 1'b1;
  end

  // ---------------- L1A job queue ----------------
  logic             job_rd, job_empty, job_full;
  logic [JOB_W-1:0] job_dout;
  logic [PAW-1:0]   job_start;
  assign job_start = wp - latency - PAW'(win_pre);
  sync_fifo #(.W(JOB_W), .DEPTH(8)) u_jobs (
    .clk, .rst, .wr(l1a), .din({job_start, win_pre, win_post, l1id}),
    .rd(job_rd), .dout(job_dout), .empty(job_empty), .full(job_full), .count());

  // ---------------- sequencer: pipeline -> derandomizer ----------------
  logic              seq_busy;
  logic [PAW-1:0]    rd_addr;
  logic [2:0]        idx, nlast;
  logic [1:0]        pre_q;
  logic [L1ID_W-1:0] l1id_q;
  logic              dr_wr, dr_rd, dr_empty, dr_full;
  logic [DR_W-1:0]   dr_din, dr_dout;

  assign job_rd = !seq_busy && !job_empty;
  assign dr_wr  = seq_busy && !dr_full;
  assign dr_din = {idx == 3'd0, idx == nlast, idx - 3'(pre_q), l1id_q, pipe[rd_addr]};

  always_ff @(posedge clk) begin
    if (rst) begin
      seq_busy <= 1'b0;
      rd_addr <= '0; idx <= '0; nlast <= '0; pre_q <= '0; l1id_q <= '0;
    end else if (job_rd) begin
      seq_busy <= 1'b1;
      {rd_addr, pre_q} <= job_dout[JOB_W-1 -: PAW+2];
      nlast    <= 3'(job_dout[JOB_W-PAW-1 -: 2]) + 3'(job_dout[JOB_W-PAW-3 -: 2]);
      l1id_q   <= job_dout[L1ID_W-1:0];
      idx      <= '0;
    end else if (dr_wr) begin
      rd_addr <= rd_addr + 1'b1;
      idx     <= idx + 1'b1;
      if (idx == nlast) seq_busy <= 1'b0;
    end
  end

  sync_fifo #(.W(DR_W), .DEPTH(DERAND_DEPTH)) u_derand (
    .clk, .rst, .wr(dr_wr), .din(dr_din), .rd(dr_rd), .dout(dr_dout),
    .empty(dr_empty), .full(dr_full), .count());

  // ---------------- formatter: zero suppression ----------------
  typedef enum logic [2:0] {F_IDLE, F_HDR, F_SLICE, F_SCAN, F_TRL} fmt_e;
  fmt_e                          fst;
  logic                          d_first, d_last;
  logic [2:0]                    d_off;
  logic [L1ID_W-1:0]             d_l1id;
  logic [BCID_W-1:0]             d_bcid;
  logic [NUM_SEC-1:0][SEC_W-1:0] d_sec;
  logic [3:0]                    sidx;
  logic [15:0]                   wcnt;
  logic                          ro_wr, ro_full;
  logic [RO_W-1:0]               ro_din;
  sector_word_t                  cur;

  assign {d_first, d_last, d_off, d_l1id, d_bcid, d_sec} = dr_dout;
  assign cur = sector_word_t'(d_sec[sidx]);

  always_comb begin
    ro_wr  = 1'b0;
    ro_din = '0;
    dr_rd  = 1'b0;
    case (fst)
      F_HDR:   begin ro_wr = 1'b1; ro_din = {TAG_HDR, mod_id, 3'd0, d_l1id}; end
      F_SLICE: begin ro_wr = 1'b1; ro_din = {TAG_SLICE, 17'd0, d_off, d_bcid}; end
      F_SCAN:  begin
        ro_wr  = (cur.pt1 != 3'd0) || (cur.pt2 != 3'd0);
        ro_din = {sidx, d_sec[sidx]};
        dr_rd  = !ro_full && (sidx == 4'(NUM_SEC - 1));
      end
      F_TRL:   begin ro_wr = 1'b1; ro_din = {TAG_TRL, 16'd0, wcnt}; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    frag_done <= 1'b0;
    if (rst) begin
      fst <= F_IDLE; sidx <= '0; wcnt <= '0;
    end else if (!ro_full) begin
      if (ro_wr) wcnt <= wcnt + 1'b1;
      case (fst)
        F_IDLE:  if (!dr_empty) fst <= d_first ? F_HDR : F_SLICE;
        F_HDR:   begin fst <= F_SLICE; wcnt <= 16'd1; end
        F_SLICE: begin fst <= F_SCAN; sidx <= '0; end
        F_SCAN:  begin
          sidx <= sidx + 1'b1;
          if (sidx == 4'(NUM_SEC - 1)) fst <= d_last ? F_TRL : F_IDLE;
        end
        F_TRL:   begin fst <= F_IDLE; frag_done <= 1'b1; end
        default: fst <= F_IDLE;
      endcase
    end
  end

  sync_fifo #(.W(RO_W), .DEPTH(RO_DEPTH)) u_ro (
    .clk, .rst, .wr(ro_wr && !ro_full), .din(ro_din), .rd(ro_rd), .dout(ro_dout),
    .empty(ro_empty), .full(ro_full), .count());

  logic mon_full;
  sync_fifo #(.W(RO_W), .DEPTH(MON_DEPTH)) u_mon (
    .clk, .rst, .wr(mon_en && ro_wr && !ro_full), .din(ro_din), .rd(mon_rd), .dout(mon_dout),
    .empty(mon_empty), .full(mon_full), .count());

  always_ff @(posedge clk) begin
    if (rst) mon_ovf <= 1'b0;
    else if (mon_en && ro_wr && !ro_full && mon_full) mon_ovf <= 1'b1;
  end

  // An L1A that finds the job queue full is lost: flag it in simulation.
  assert property (@(posedge clk) disable iff (rst) l1a |-> !job_full)
    else $error("mioct_readout: L1A job queue overflow");
endmodule
