// muctpi_top: the Muon to Central Trigger Processor Interface crate.
//
// 16 octant modules (mioct) each take 13 sector words per bunch crossing and send an
// 18-bit multiplicity to the backplane (mibak), whose adder tree totals them; the CTP
// interface (mictp) latches the total and drives it to the CTP. The mictp also receives
// L1A, orbit and event counter reset from the CTP and fans them out to every module.
// On each L1A the readout driver (mirod) passes a token along the backplane bus, collects
// the fragments of all MIOCTs and the MICTP and sends the formatted event to the DAQ and
// the pT-sorted candidates of the triggered crossing to Level-2 over two S-LINK ports.
//
// All modules run on clk, the 40.08 MHz bunch clock. The trigger path from sec_in to
// mult_ctp takes 3 clocks in the MIOCT plus 1 in the MICTP. A single register bus
// (cfg / cfg_rdata, read data one clock after re) reaches every module in place of VME.
// The external snapshot SRAMs (one 2**17 x 576-bit line memory per MIOCT, 1M x 36 for
// the MICTP and the MIROD) are attached through the mem_* ports.
module muctpi_top
  import muctpi_pkg::*;
#(
  parameter int BA_W       = 5,
  parameter int EC_W       = 8,
  parameter int FW_W       = 6,
  parameter int CLR_W      = 16,
  parameter int PIPE_DEPTH = 128,
  parameter int SNAP_AW    = 17,
  parameter int CTP_SNAP_AW = 20
) (
  input  logic                                        clk,
  input  logic                                        rst,
  input  logic [NUM_OCT-1:0][NUM_SEC-1:0][SEC_W-1:0]  sec_in,
  input  logic                                        ctp_l1a_in,
  input  logic                                        ctp_orbit_in,
  input  logic                                        ctp_ecr_in,
  output logic [MULTS_W-1:0]                          mult_ctp,
  output logic [31:0]                                 daq_data,
  output logic                                        daq_ctrl,
  output logic                                        daq_wen,
  input  logic                                        daq_lff,
  output logic [31:0]                                 l2_data,
  output logic                                        l2_ctrl,
  output logic                                        l2_wen,
  input  logic                                        l2_lff,
  input  cfg_req_t                                    cfg,
  output logic [31:0]                                 cfg_rdata,
  // MIOCT snapshot memories
  output logic [NUM_OCT-1:0]                          oct_mem_we,
  output logic [NUM_OCT-1:0]                          oct_mem_re,
  output logic [NUM_OCT-1:0][SNAP_AW-1:0]             oct_mem_addr,
  output logic [NUM_OCT-1:0][575:0]                   oct_mem_wdata,
  input  logic [NUM_OCT-1:0][575:0]                   oct_mem_rdata,
  // MICTP and MIROD snapshot memories
  output logic                                        ctp_mem_we,
  output logic                                        ctp_mem_re,
  output logic [CTP_SNAP_AW-1:0]                      ctp_mem_addr,
  output logic [35:0]                                 ctp_mem_wdata,
  input  logic [35:0]                                 ctp_mem_rdata,
  output logic                                        rod_mem_we,
  output logic                                        rod_mem_re,
  output logic [CTP_SNAP_AW-1:0]                      rod_mem_addr,
  output logic [35:0]                                 rod_mem_wdata,
  input  logic [35:0]                                 rod_mem_rdata
);
  logic                              l1a, bcr, ecr;
  logic [NUM_OCT-1:0][MULTS_W-1:0]   mult_oct;
  logic [MULTS_W-1:0]                mult_sum;
  logic [NUM_OCT:0][RO_W-1:0]        node_data;
  logic [NUM_OCT:0]                  node_valid, node_tok_in, node_tok_out;
  logic [RO_W-1:0]                   bus_data;
  logic                              bus_valid, bus_hold, tok_launch, tok_return;
  logic [NUM_OCT+1:0][31:0]          rdata;

  for (genvar o = 0; o < NUM_OCT; o++) begin : g_oct
    mioct #(.BA_W(BA_W), .EC_W(EC_W), .FW_W(FW_W), .CLR_W(CLR_W),
            .PIPE_DEPTH(PIPE_DEPTH), .SNAP_AW(SNAP_AW)) u_mioct (
      .clk, .rst, .mod_id(5'(o)), .sec_in(sec_in[o]), .l1a, .bcr, .ecr,
      .mult_out(mult_oct[o]), .token_in(node_tok_in[o]), .token_out(node_tok_out[o]),
      .bus_hold, .bus_data(node_data[o]), .bus_valid(node_valid[o]),
      .cfg, .cfg_rdata(rdata[o]),
      .mem_we(oct_mem_we[o]), .mem_re(oct_mem_re[o]), .mem_addr(oct_mem_addr[o]),
      .mem_wdata(oct_mem_wdata[o]), .mem_rdata(oct_mem_rdata[o]));
  end

  mibak u_mibak (
    .clk, .rst,
    .mult_oct, .mult_sum, .node_data, .node_valid, .bus_data, .bus_valid,
    .token_launch(tok_launch), .node_token_out(node_tok_out), .node_token_in(node_tok_in),
    .token_return(tok_return));

  mictp #(.PIPE_DEPTH(PIPE_DEPTH), .SNAP_AW(CTP_SNAP_AW)) u_mictp (
    .clk, .rst, .ctp_l1a_in, .ctp_orbit_in, .ctp_ecr_in, .l1a, .bcr, .ecr,
    .mult_bp(mult_sum), .mult_ctp, .token_in(node_tok_in[NUM_OCT]),
    .token_out(node_tok_out[NUM_OCT]), .bus_hold, .bus_data(node_data[NUM_OCT]),
    .bus_valid(node_valid[NUM_OCT]), .cfg, .cfg_rdata(rdata[NUM_OCT]),
    .mem_we(ctp_mem_we), .mem_re(ctp_mem_re), .mem_addr(ctp_mem_addr),
    .mem_wdata(ctp_mem_wdata), .mem_rdata(ctp_mem_rdata));

  mirod #(.SNAP_AW(CTP_SNAP_AW)) u_mirod (
    .clk, .rst, .l1a, .bcr, .ecr, .token_out(tok_launch), .token_return(tok_return),
    .bus_hold, .bus_data, .bus_valid, .daq_data, .daq_ctrl, .daq_wen, .daq_lff,
    .l2_data, .l2_ctrl, .l2_wen, .l2_lff, .cfg, .cfg_rdata(rdata[NUM_OCT+1]),
    .mem_we(rod_mem_we), .mem_re(rod_mem_re), .mem_addr(rod_mem_addr),
    .mem_wdata(rod_mem_wdata), .mem_rdata(rod_mem_rdata));

  // Only the addressed module returns non-zero read data.
  always_comb begin
    cfg_rdata = '0;
    for (int m = 0; m < NUM_OCT + 2; m++) cfg_rdata |= rdata[m];
  end
endmodule
