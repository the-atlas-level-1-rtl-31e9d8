// tb_mictp: drives the CTP timing inputs as multi-clock levels and checks that each
// rising edge gives exactly one l1a / bcr / ecr pulse two clocks later; checks that the
// backplane multiplicity reaches the CTP one clock later; for each L1A checks the 3-word
// readout fragment (header with L1ID, the multiplicity latched `latency` clocks before
// the L1A, trailer) sent on the bus when the token is given; reads the monitoring
// accumulators through the register bus and compares them with independent sums.
module tb_mictp;
  import muctpi_pkg::*;
  localparam int LAT = 30;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ctp_l1a_in, ctp_orbit_in, ctp_ecr_in, l1a, bcr, ecr;
  logic [MULTS_W-1:0] mult_bp, mult_ctp;
  logic token_in, token_out, bus_hold, bus_valid, mem_we, mem_re;
  logic [RO_W-1:0] bus_data;
  cfg_req_t cfg;
  logic [31:0] cfg_rdata;
  logic [19:0] mem_addr;
  logic [35:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  mictp dut (.*);
  line_memory #(.W(36), .AW(20)) u_mem (.clk, .we(mem_we), .re(mem_re), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata));

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, msg); end
  endtask

  // ---- monitor ----
  int e = 0, l1a_pulses = 0, bcr_pulses = 0, ecr_pulses = 0, l1id = 0, tokens_back = 0;
  logic [MULTS_W-1:0] mhist [100000];
  logic [MULTS_W-1:0] bp_prev;
  logic [RO_W-1:0] expq [$];
  longint acc [NUM_THR];
  bit acc_on = 0;
  bit freeze_bp = 0;
  int l1a_rise [$], bcr_rise [$], ecr_rise [$];

  always @(posedge clk) if (!rst) begin
    mhist[e] = mult_ctp;
    if (e > 0) chk(mult_ctp == bp_prev, "mult_ctp is not mult_bp of the previous clock");
    bp_prev = mult_bp;
    if (acc_on) for (int t = 0; t < NUM_THR; t++) acc[t] += mult_ctp[t*3 +: 3];
    if (ecr) begin ecr_pulses++; l1id = 0; chk(ecr_rise.size() && e - ecr_rise.pop_front() == 2, "ecr pulse timing"); end
    if (bcr) begin bcr_pulses++; chk(bcr_rise.size() && e - bcr_rise.pop_front() == 2, "bcr pulse timing"); end
    if (l1a) begin
      l1a_pulses++;
      chk(l1a_rise.size() && e - l1a_rise.pop_front() == 2, "l1a pulse timing");
      expq.push_back({TAG_HDR, 5'd16, 3'd0, 24'(l1id)});
      expq.push_back({TAG_SLICE, 1'b1, 13'd0, mhist[e - LAT]});
      expq.push_back({TAG_TRL, 16'd0, 16'd2});
      l1id++;
    end
    if (bus_valid) begin
      chk(expq.size() != 0 && bus_data == expq[0], $sformatf("bus word %h", bus_data));
      if (expq.size()) void'(expq.pop_front());
    end
    if (token_out) tokens_back++;
    e++;
  end

  task automatic cfg_write(input logic [7:0] a, input logic [31:0] d);
    cfg = '{we: 1'b1, re: 1'b0, addr: {5'd16, 11'd0, a}, wdata: d};
    @(posedge clk); #1; cfg = '0;
  endtask

  task automatic cfg_read(input logic [7:0] a, output logic [31:0] d);
    cfg = '{we: 1'b0, re: 1'b1, addr: {5'd16, 11'd0, a}, wdata: 0};
    @(posedge clk); #1; cfg = '0; d = cfg_rdata;
  endtask

  // Timing inputs: levels of random length, recorded at the clock where they rise.
  task automatic pulse_in(input int which, input int len);
    @(negedge clk);
    case (which)
      0: begin ctp_l1a_in = 1; l1a_rise.push_back(e); end
      1: begin ctp_orbit_in = 1; bcr_rise.push_back(e); end
      default: begin ctp_ecr_in = 1; ecr_rise.push_back(e); end
    endcase
    repeat (len) @(negedge clk);
    ctp_l1a_in = 0; ctp_orbit_in = 0; ctp_ecr_in = 0;
  endtask

  initial begin
    logic [31:0] d;
    int nl1a;
    ctp_l1a_in = 0; ctp_orbit_in = 0; ctp_ecr_in = 0; mult_bp = '0; token_in = 0;
    bus_hold = 0; cfg = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cfg_write(8'h11, LAT);
    cfg_write(8'h20, 32'h1);                 // clear accumulators
    acc_on = 1;
    for (int t = 0; t < NUM_THR; t++) acc[t] = 0;
    fork
      forever begin @(negedge clk); mult_bp = freeze_bp ? '0 : MULTS_W'($urandom); end
    join_none
    repeat (LAT + 5) @(posedge clk);
    nl1a = 0;
    for (int k = 0; k < 60; k++) begin
      int w;
      w = $urandom_range(0, 9);
      if (w < 6) begin pulse_in(0, $urandom_range(1, 4)); nl1a++; end
      else if (w < 8) pulse_in(1, $urandom_range(1, 3));
      else pulse_in(2, 1);
      repeat ($urandom_range(3, 8)) @(negedge clk);
      if (w < 6) begin
        // give the token for this event
        token_in = 1; @(negedge clk); token_in = 0;
        repeat (6) @(negedge clk);
      end
    end
    repeat (10) @(negedge clk);
    chk(l1a_pulses == nl1a && tokens_back == nl1a, $sformatf("l1a %0d tokens %0d expected %0d", l1a_pulses, tokens_back, nl1a));
    chk(expq.size() == 0, "readout words missing");
    chk(bcr_pulses > 0 && ecr_pulses > 0, "bcr/ecr never seen");
    freeze_bp = 1;
    repeat (4) @(negedge clk);
    for (int t = 0; t < NUM_THR; t++) begin
      cfg_read(8'h40 + 8'(t), d);
      chk(d == 32'(acc[t]), $sformatf("accumulator %0d: %0d vs %0d", t, d, acc[t]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
