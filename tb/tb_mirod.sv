// tb_mirod: plays the 17 senders of the backplane bus. For every L1A the MIROD's token
// is answered with random MIOCT fragments (random windows and candidates) and a MICTP
// multiplicity fragment, honouring bus_hold, then the token is returned. The DAQ
// S-LINK stream (BOF, L1ID, BCID, candidate words, multiplicity, count, EOF) and the
// Level-2 stream (candidates of the triggered crossing sorted by decreasing pT, at most
// L2_MAX) are compared word by word with an independent model. Both links assert lff
// at random; a small input FIFO makes bus_hold occur.
module tb_mirod;
  import muctpi_pkg::*;
  localparam int L2MAX = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic l1a, bcr, ecr, token_out, token_return, bus_hold, bus_valid;
  logic [RO_W-1:0] bus_data;
  logic [31:0] daq_data, l2_data, cfg_rdata;
  logic daq_ctrl, daq_wen, daq_lff, l2_ctrl, l2_wen, l2_lff, mem_we, mem_re;
  cfg_req_t cfg;
  logic [19:0] mem_addr;
  logic [35:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0, holds = 0, lff_stalls = 0, l2_trunc = 0, events = 0;

  mirod #(.IN_DEPTH(64), .L2_MAX(L2MAX)) dut (.*);
  line_memory #(.W(36), .AW(20)) u_mem (.clk, .we(mem_we), .re(mem_re), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata));

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [32:0] daqq [$];
  logic [32:0] l2q  [$];
  int e = 0;
  always @(posedge clk) if (!rst) begin
    if (daq_wen) begin
      checks++;
      if (daqq.size() == 0 || {daq_ctrl, daq_data} !== daqq[0]) begin
        failures++;
        if (failures < 10) $display("DAQ %b %h expected %h", daq_ctrl, daq_data, daqq.size() ? daqq[0] : '0);
      end
      if (daqq.size()) void'(daqq.pop_front());
    end
    if (l2_wen) begin
      checks++;
      if (l2q.size() == 0 || {l2_ctrl, l2_data} !== l2q[0]) begin
        failures++;
        if (failures < 10) $display("L2 %b %h expected %h", l2_ctrl, l2_data, l2q.size() ? l2q[0] : '0);
      end
      if (l2q.size()) void'(l2q.pop_front());
    end
    if (bus_hold) holds++;
    if ((daq_lff && dut.cst inside {[1:6]}) || (l2_lff && dut.cst > 6)) lff_stalls++;
    e++;
  end

  always @(negedge clk) begin
    daq_lff <= ($urandom_range(0, 4) == 0);
    l2_lff  <= ($urandom_range(0, 4) == 0);
  end

  task automatic send(input logic [RO_W-1:0] w);
    while (bus_hold) @(negedge clk);
    bus_data = w; bus_valid = 1;
    @(negedge clk);
    bus_data = '0; bus_valid = 0;
  endtask

  task automatic one_event(input int id);
    logic [31:0] l2w [$];
    logic [2:0]  l2p [$];
    int bc, ndata, pre, post;
    logic [MULTS_W-1:0] m;
    // L1A pulse; the MIROD samples its own BCID at that clock.
    @(negedge clk); l1a = 1; bc = (e % ORBIT_LEN); @(negedge clk); l1a = 0;
    daqq.push_back({1'b1, SLINK_BOF});
    daqq.push_back({1'b0, 32'(id)});
    daqq.push_back({1'b0, 32'(bc)});
    ndata = 0;
    while (!token_out) @(negedge clk);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    for (int o = 0; o < NUM_OCT; o++) begin
      int cnt;
      cnt = 0;
      send({TAG_HDR, 5'(o), 3'd0, 24'(id)}); cnt++;
      pre = $urandom_range(0, 2); post = $urandom_range(0, 2);
      for (int off = -pre; off <= post; off++) begin
        send({TAG_SLICE, 17'd0, 3'(off), 12'($urandom)}); cnt++;
        for (int s = 0; s < NUM_SEC; s++) begin
          sector_word_t sw;
          if ($urandom_range(0, 9) != 0) continue;
          sw = sector_word_t'($urandom);
          sw.pt1 = 3'($urandom_range(0, 6)); sw.pt2 = 3'($urandom_range(0, 6));
          if (sw.pt1 == 0 && sw.pt2 == 0) sw.pt1 = 3'd1;
          send({4'(s), 32'(sw)}); cnt++;
          for (int c = 0; c < 2; c++) begin
            logic [2:0] p; logic [31:0] w;
            p = c ? sw.pt2 : sw.pt1;
            if (p == 0) continue;
            w = cand_word(3'(off), 5'(o), 4'(s), c[0], p, c ? sw.sign2 : sw.sign1, c ? sw.roi2 : sw.roi1);
            daqq.push_back({1'b0, w}); ndata++;
            if (off == 0) begin
              // stable insertion by decreasing pT
              int pos;
              pos = 0;
              for (int i = 0; i < l2p.size(); i++) if (l2p[i] >= p) pos = i + 1;
              l2p.insert(pos, p); l2w.insert(pos, w);
            end
          end
        end
      end
      send({TAG_TRL, 16'd0, 16'(cnt)});
    end
    m = MULTS_W'($urandom);
    send({TAG_HDR, 5'd16, 3'd0, 24'(id)});
    send({TAG_SLICE, 1'b1, 13'd0, m});
    send({TAG_TRL, 16'd0, 16'd2});
    daqq.push_back({1'b0, 4'h8, 10'd0, m}); ndata++;
    daqq.push_back({1'b0, 32'(ndata)});
    daqq.push_back({1'b1, SLINK_EOF});
    token_return = 1; @(negedge clk); token_return = 0;
    if (l2w.size() > L2MAX) l2_trunc++;
    l2q.push_back({1'b1, SLINK_BOF});
    l2q.push_back({1'b0, 32'(id)});
    for (int i = 0; i < l2w.size() && i < L2MAX; i++) l2q.push_back({1'b0, l2w[i]});
    l2q.push_back({1'b0, 32'((l2w.size() < L2MAX) ? l2w.size() : L2MAX)});
    l2q.push_back({1'b1, SLINK_EOF});
  endtask

  initial begin
    logic [31:0] d;
    l1a = 0; bcr = 0; ecr = 0; token_return = 0; bus_data = '0; bus_valid = 0; cfg = '0;
    daq_lff = 0; l2_lff = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int k = 0; k < 40; k++) begin
      one_event(k);
      events++;
    end
    repeat (3000) @(negedge clk);
    cfg = '{we: 1'b0, re: 1'b1, addr: {5'd17, 11'd0, 8'h35}, wdata: 0};
    @(posedge clk); #1; cfg = '0; d = cfg_rdata;
    checks += 3;
    if (daqq.size() || l2q.size()) begin failures++; $display("missing words: DAQ %0d L2 %0d", daqq.size(), l2q.size()); end
    if (d != 32'(events)) begin failures++; $display("event counter %0d", d); end
    if (holds == 0 || lff_stalls == 0 || l2_trunc == 0) begin
      failures++; $display("holds %0d lff stalls %0d L2 truncations %0d", holds, lff_stalls, l2_trunc);
    end
    $display("events %0d, bus_hold cycles %0d, lff stalls %0d, L2 truncations %0d", events, holds, lff_stalls, l2_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
