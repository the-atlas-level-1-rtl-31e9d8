// snapshot_mem_if: controller of the snapshot / test-data memory (external QDR SRAM).
//
// Modes (mode input):
//   0 idle     - the register bus can load lines into the memory (commit) and read them
//                back (fetch) through a staging register of LINE_W bits, 32 bits at a time;
//   1 snapshot - every clock with cap_valid one line is written at an incrementing
//                address, wrapping at 2**AW lines, until freeze; arm restarts at line 0;
//   2 playback - one line per clock is read from address 0..play_len-1 (wrapping) and
//                presented on play_line / play_valid to replace the live inputs.
// The memory port is line wide: one write or one read per clock, read data one clock
// after mem_re. On the MIOCT a line is the 416 bits of sector data, multiplicity,
// suppression flags and a timestamp of one bunch crossing, and 2**17 lines give the
// 128K bunch crossings of the description; the split of a line into 36-bit beats of the
// QDR device belongs to the memory PHY and is not modelled here.
// Snapshot, playback and the depth follow the description; modes, staging register and
// arming are this design's choices.
module snapshot_mem_if #(
  parameter int LINE_W = 576,
  parameter int AW     = 17
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [1:0]        mode,
  input  logic              arm,
  input  logic              freeze,
  input  logic [AW-1:0]     play_len,
  input  logic              cap_valid,
  input  logic [LINE_W-1:0] cap_line,
  output logic [LINE_W-1:0] play_line,
  output logic              play_valid,
  // register-bus access
  input  logic              stage_we,
  input  logic [5:0]        stage_idx,
  input  logic [31:0]       stage_wdata,
  output logic [31:0]       stage_rdata,
  input  logic              host_commit,
  input  logic              host_fetch,
  input  logic [AW-1:0]     host_addr,
  output logic [AW-1:0]     snap_ptr,
  output logic              frozen,
  output logic              wrapped,
  // memory port
  output logic              mem_we,
  output logic              mem_re,
  output logic [AW-1:0]     mem_addr,
  output logic [LINE_W-1:0] mem_wdata,
  input  logic [LINE_W-1:0] mem_rdata
);
  localparam int NW = (LINE_W + 31) / 32;
  logic [NW*32-1:0] stage;
  logic [AW-1:0]    play_ptr;
  logic             fetch_q, play_q;

  assign stage_rdata = (int'(stage_idx) < NW) ? stage[32*stage_idx +: 32] : '0;

  always_comb begin
    mem_we    = 1'b0;
    mem_re    = 1'b0;
    mem_addr  = host_addr;
    mem_wdata = stage[LINE_W-1:0];
    case (mode)
      2'd1: begin
        mem_we    = cap_valid && !frozen;
        mem_addr  = snap_ptr;
        mem_wdata = cap_line;
      end
      2'd2: begin
        mem_re   = 1'b1;
        mem_addr = play_ptr;
      end
      default: begin
        mem_we = host_commit;
        mem_re = host_fetch;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      snap_ptr <= '0; frozen <= 1'b0; wrapped <= 1'b0;
      play_ptr <= '0; fetch_q <= 1'b0; play_q <= 1'b0;
      stage    <= '0;
    end else begin
      fetch_q <= (mode == 2'd0) && host_fetch;
      play_q  <= (mode == 2'd2);
      if (arm) begin
        snap_ptr <= '0; frozen <= 1'b0; wrapped <= 1'b0;
      end else if (mode == 2'd1) begin
        if (freeze) frozen <= 1'b1;
        if (cap_valid && !frozen) begin
          snap_ptr <= snap_ptr + 1'b1;
          if (&snap_ptr) wrapped <= 1'b1;
        end
      end
      if (mode == 2'd2) play_ptr <= (play_ptr + 1'b1 == play_len) ? '0 : play_ptr + 1'b1;
      else              play_ptr <= '0;
      if (fetch_q) stage[LINE_W-1:0] <= mem_rdata;
      else if (stage_we && mode == 2'd0 && int'(stage_idx) < NW) stage[32*stage_idx +: 32] <= stage_wdata;
    end
  end

  assign play_line  = mem_rdata;
  assign play_valid = play_q && (mode == 2'd2);
endmodule
