// tb_muctpi_top: the whole crate at its default sizes: 16 octant modules with 13 sector
// inputs each, backplane, CTP interface and readout driver, with behavioural snapshot
// memories. After the overlap tables are cleared and loaded through the register bus,
// random muon candidates (including pairs placed in overlapping sectors, and dense
// bursts) are fed for several thousand bunch crossings while the CTP sends L1As, orbit
// and event-counter-reset signals. Checked against independent models:
//   - the 18-bit multiplicity to the CTP, every clock, 4 clocks after the sector words;
//   - every DAQ event (header, candidate words of all octants and window slices,
//     multiplicity, word count) and every Level-2 record (pT-ordered, at most 16);
//   - a snapshot line of one MIOCT, a monitoring-FIFO word, and the playback of test
//     lines from a snapshot memory into the trigger path.
// Mechanisms that must occur at least once are counted: overlap suppression, adder
// saturation, token round trips, zero suppression, multi-slice windows, S-LINK stalls,
// Level-2 truncation, snapshot capture, playback, monitoring.
// Timing: inputs change on the falling clock edge; the monitor samples on the rising
// edge. The L1 latency is 60 clocks in the MIOCTs and 57 in the MICTP, so that both
// read out the same bunch crossing (the MICTP sees it 3 clocks later). The expected
// words use this design's own formats (muctpi_pkg); the overlap tables loaded are test
// values, not physics tables.
module tb_muctpi_top;
  import muctpi_pkg::*;
  localparam int LAT = 60, N = 4000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NUM_OCT-1:0][NUM_SEC-1:0][SEC_W-1:0] sec_in;
  logic ctp_l1a_in, ctp_orbit_in, ctp_ecr_in;
  logic [MULTS_W-1:0] mult_ctp;
  logic [31:0] daq_data, l2_data, cfg_rdata;
  logic daq_ctrl, daq_wen, daq_lff, l2_ctrl, l2_wen, l2_lff;
  cfg_req_t cfg;
  logic [NUM_OCT-1:0] oct_mem_we, oct_mem_re;
  logic [NUM_OCT-1:0][16:0] oct_mem_addr;
  logic [NUM_OCT-1:0][575:0] oct_mem_wdata, oct_mem_rdata;
  logic ctp_mem_we, ctp_mem_re, rod_mem_we, rod_mem_re;
  logic [19:0] ctp_mem_addr, rod_mem_addr;
  logic [35:0] ctp_mem_wdata, ctp_mem_rdata, rod_mem_wdata, rod_mem_rdata;

  muctpi_top dut (.*);

  for (genvar o = 0; o < NUM_OCT; o++) begin : g_mem
    line_memory #(.W(576), .AW(17)) u_m (.clk, .we(oct_mem_we[o]), .re(oct_mem_re[o]),
      .addr(oct_mem_addr[o]), .wdata(oct_mem_wdata[o]), .rdata(oct_mem_rdata[o]));
  end
  line_memory #(.W(36), .AW(20)) u_cm (.clk, .we(ctp_mem_we), .re(ctp_mem_re), .addr(ctp_mem_addr),
    .wdata(ctp_mem_wdata), .rdata(ctp_mem_rdata));
  line_memory #(.W(36), .AW(20)) u_rm (.clk, .we(rod_mem_we), .re(rod_mem_re), .addr(rod_mem_addr),
    .wdata(rod_mem_wdata), .rdata(rod_mem_rdata));

  int checks = 0, failures = 0;
  int n_supp = 0, n_sat = 0, n_tokens = 0, n_zs = 0, n_window = 0, n_lff = 0, n_trunc = 0,
      n_snap = 0, n_play = 0, n_mon = 0, n_events = 0;

  initial begin
    #50ms; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, msg); end
  endtask

  // ---------------- reference model ----------------
  localparam int NP = 5;
  int ovl_pairs [NP] = '{0, 1, 2, 26, 31};     // BB, BB, BE, EE, FF
  function automatic bit in_table(input int p, input logic [7:0] ra, input logic [7:0] rb);
    foreach (ovl_pairs[i]) if (ovl_pairs[i] == p) return (ra < 4) && (rb < 4);
    return 0;
  endfunction

  function automatic logic [MULTS_W-1:0] oct_mult(input logic [NUM_SEC-1:0][SEC_W-1:0] x,
                                                  output bit suppressed);
    logic [NUM_SEC-1:0][1:0] r;
    logic [MULTS_W-1:0] m;
    r = '0;
    for (int p = 0; p < NUM_PAIRS; p++) begin
      sector_word_t a, b;
      a = sector_word_t'(x[pair_a(p)]); b = sector_word_t'(x[pair_b(p)]);
      for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
        logic [2:0] pa, pb;
        pa = i ? a.pt2 : a.pt1;  pb = j ? b.pt2 : b.pt1;
        if (pa != 0 && pb != 0 && in_table(p, i ? a.roi2 : a.roi1, j ? b.roi2 : b.roi1)) begin
          if (pa >= pb) r[pair_b(p)][j] = 1'b1; else r[pair_a(p)][i] = 1'b1;
        end
      end
    end
    suppressed = (r != '0);
    for (int t = 1; t <= NUM_THR; t++) begin
      int n;
      n = 0;
      for (int s = 0; s < NUM_SEC; s++) begin
        sector_word_t w;
        w = sector_word_t'(x[s]);
        if (!r[s][0] && w.pt1 != 0 && int'(w.pt1) >= t) n++;
        if (!r[s][1] && w.pt2 != 0 && int'(w.pt2) >= t) n++;
      end
      m[(t-1)*3 +: 3] = (n > 7) ? 3'd7 : 3'(n);
    end
    return m;
  endfunction

  function automatic logic [MULTS_W-1:0] total(input logic [NUM_OCT-1:0][NUM_SEC-1:0][SEC_W-1:0] x,
                                               output bit sat, output bit supp);
    logic [MULTS_W-1:0] m;
    int n [NUM_THR];
    sat = 0; supp = 0;
    foreach (n[t]) n[t] = 0;
    for (int o = 0; o < NUM_OCT; o++) begin
      bit s;
      m = oct_mult(x[o], s);
      if (s) supp = 1;
      for (int t = 0; t < NUM_THR; t++) n[t] += int'(m[t*3 +: 3]);
    end
    for (int t = 0; t < NUM_THR; t++) begin
      if (n[t] > 7) sat = 1;
      m[t*3 +: 3] = (n[t] > 7) ? 3'd7 : 3'(n[t]);
    end
    return m;
  endfunction

  // ---------------- stimulus history ----------------
  logic [NUM_OCT-1:0][NUM_SEC-1:0][SEC_W-1:0] hist [int];   // sec_in presented before edge k
  int e = 0, bcr_e = 0, ecr_l1 = 0, l1id = 0, arm_e = -1;
  bit mult_chk = 0;
  bit check_window = 1;
  logic [1:0] pre, post;
  logic [32:0] daqq [$];
  logic [32:0] l2q  [$];

  task automatic expect_event(input int j);
    logic [31:0] l2w [$];
    logic [2:0]  l2p [$];
    int ndata;
    bit s1, s2;
    daqq.push_back({1'b1, SLINK_BOF});
    daqq.push_back({1'b0, 32'(l1id)});
    daqq.push_back({1'b0, 32'((j - bcr_e - 1) % ORBIT_LEN)});
    ndata = 0;
    for (int o = 0; o < NUM_OCT; o++)
      for (int off = -int'(pre); off <= int'(post); off++) begin
        int k;
        k = j - LAT - 1 + off;
        for (int s = 0; s < NUM_SEC; s++) begin
          sector_word_t sw;
          sw = sector_word_t'(hist[k][o][s]);
          if (sw.pt1 == 0 && sw.pt2 == 0) begin n_zs++; continue; end
          for (int c = 0; c < 2; c++) begin
            logic [2:0] p; logic [31:0] w;
            p = c ? sw.pt2 : sw.pt1;
            if (p == 0) continue;
            w = cand_word(3'(off), 5'(o), 4'(s), c[0], p, c ? sw.sign2 : sw.sign1, c ? sw.roi2 : sw.roi1);
            daqq.push_back({1'b0, w}); ndata++;
            if (off == 0) begin
              int pos;
              pos = 0;
              for (int i = 0; i < l2p.size(); i++) if (l2p[i] >= p) pos = i + 1;
              l2p.insert(pos, p); l2w.insert(pos, w);
            end
          end
        end
      end
    daqq.push_back({1'b0, 4'h8, 10'd0, total(hist[j - LAT - 1], s1, s2)}); ndata++;
    daqq.push_back({1'b0, 32'(ndata)});
    daqq.push_back({1'b1, SLINK_EOF});
    if (l2w.size() > 16) n_trunc++;
    if (pre != 0 || post != 0) n_window++;
    l2q.push_back({1'b1, SLINK_BOF});
    l2q.push_back({1'b0, 32'(l1id)});
    for (int i = 0; i < l2w.size() && i < 16; i++) l2q.push_back({1'b0, l2w[i]});
    l2q.push_back({1'b0, 32'((l2w.size() < 16) ? l2w.size() : 16)});
    l2q.push_back({1'b1, SLINK_EOF});
  endtask

  always @(posedge clk) if (!rst) begin
    if (mult_chk && hist.exists(e - 4)) begin
      bit sat, supp;
      logic [MULTS_W-1:0] m;
      m = total(hist[e - 4], sat, supp);
      chk(mult_ctp == m, $sformatf("e=%0d mult_ctp %h expected %h", e, mult_ctp, m));
      if (sat) n_sat++;
      if (supp) n_supp++;
    end
    if (dut.bcr) bcr_e = e;
    if (dut.ecr) l1id = 0;
    if (dut.l1a) begin
      if (check_window) expect_event(e);
      l1id++;
      n_events++;
    end
    if (dut.tok_return) n_tokens++;
    if (daq_wen) begin
      chk(daqq.size() != 0 && {daq_ctrl, daq_data} == daqq[0],
          $sformatf("DAQ %b %h expected %h", daq_ctrl, daq_data, daqq.size() ? daqq[0] : '0));
      if (daqq.size()) void'(daqq.pop_front());
    end
    if (l2_wen) begin
      chk(l2q.size() != 0 && {l2_ctrl, l2_data} == l2q[0],
          $sformatf("L2 %b %h expected %h", l2_ctrl, l2_data, l2q.size() ? l2q[0] : '0));
      if (l2q.size()) void'(l2q.pop_front());
    end
    if ((daq_lff && dut.u_mirod.cst inside {[1:6]}) || (l2_lff && dut.u_mirod.cst > 6)) n_lff++;
    if (cfg.we && cfg.addr[23:19] == 5'd3 && cfg.addr[7:0] == 8'h20 && cfg.wdata[1]) arm_e = e;
    e++;
  end

  always @(negedge clk) begin
    daq_lff <= ($urandom_range(0, 5) == 0);
    l2_lff  <= ($urandom_range(0, 5) == 0);
  end

  // ---------------- register bus ----------------
  task automatic wr(input int m, input logic [2:0] region, input logic [15:0] a, input logic [31:0] d);
    cfg = '{we: 1'b1, re: 1'b0, addr: {5'(m), region, a}, wdata: d};
    @(negedge clk); cfg = '0;
  endtask
  task automatic rd(input int m, input logic [2:0] region, input logic [15:0] a, output logic [31:0] d);
    cfg = '{we: 1'b0, re: 1'b1, addr: {5'(m), region, a}, wdata: 0};
    @(negedge clk); cfg = '0; d = cfg_rdata;
  endtask

  // ---------------- sector data ----------------
  function automatic logic [SEC_W-1:0] cand_sector(input int t);
    sector_word_t w;
    w = sector_word_t'($urandom);
    w.bcid = 3'(t);
    w.roi1 = 8'($urandom_range(0, 5)); w.roi2 = 8'($urandom_range(0, 5));
    w.pt1 = 3'($urandom_range(1, 6));
    w.pt2 = ($urandom_range(0, 2) == 0) ? 3'($urandom_range(1, 6)) : 3'd0;
    return w;
  endfunction

  function automatic logic [NUM_OCT-1:0][NUM_SEC-1:0][SEC_W-1:0] gen_bc(input int t);
    logic [NUM_OCT-1:0][NUM_SEC-1:0][SEC_W-1:0] x;
    int dense;
    dense = ((t / 50) % 6 == 5);
    for (int o = 0; o < NUM_OCT; o++)
      for (int s = 0; s < NUM_SEC; s++) begin
        sector_word_t w;
        w = sector_word_t'($urandom);
        w.bcid = 3'(t); w.pt1 = 0; w.pt2 = 0;
        x[o][s] = w;
        if ($urandom_range(0, dense ? 4 : 150) == 0) x[o][s] = cand_sector(t);
      end
    // a muon crossing two sectors of one octant
    if ($urandom_range(0, 2) == 0) begin
      int o, p;
      o = $urandom_range(0, NUM_OCT - 1);
      p = ovl_pairs[$urandom_range(0, NP - 1)];
      x[o][pair_a(p)] = cand_sector(t);
      x[o][pair_b(p)] = cand_sector(t);
    end
    return x;
  endfunction

  initial begin
    logic [31:0] d;
    ctp_l1a_in = 0; ctp_orbit_in = 0; ctp_ecr_in = 0; cfg = '0; sec_in = '0;
    daq_lff = 0; l2_lff = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    // overlap tables are cleared after reset
    do begin
      repeat (1000) @(negedge clk);
      rd(0, 3'd0, 16'h31, d);
    end while (d[30]);
    // configuration of all MIOCTs: latency, window, overlap tables
    for (int o = 0; o < NUM_OCT; o++) begin
      wr(o, 3'd0, 16'h11, LAT);
      foreach (ovl_pairs[i]) begin
        int p, bw;
        p = ovl_pairs[i];
        bw = (sec_type(pair_b(p)) == SEC_BARREL) ? 5 : (sec_type(pair_b(p)) == SEC_ENDCAP) ? 8 : 6;
        for (int ra = 0; ra < 4; ra++) for (int rb = 0; rb < 4; rb++)
          wr(o, 3'd1, 16'((ra << bw) | rb), {10'd0, 6'(p), 15'd0, 1'b1});
        if (pair_kind(p) == OVL_BE) for (int a = 0; a < 256; a++) wr(o, 3'd2, 16'(a), {10'd0, 6'(p), 15'd0, 1'b1});
      end
    end
    wr(16, 3'd0, 16'h11, LAT - 3);
    wr(2, 3'd0, 16'h14, 1);                 // monitoring copy in MIOCT 2
    // orbit and event counter reset from the CTP
    ctp_orbit_in = 1; ctp_ecr_in = 1; repeat (3) @(negedge clk); ctp_orbit_in = 0; ctp_ecr_in = 0;
    repeat (5) @(negedge clk);
    // ---------------- main run ----------------
    for (int t = 0; t < N; t++) begin
      sec_in = gen_bc(t);
      hist[e] = sec_in;
      if (t == 10) mult_chk = 1;
      // L1A: a 2-clock level every ~120 BCs; the window changes between events
      if (t % 120 == 100 && t < N - 200) begin
        ctp_l1a_in = 1;
      end else if (t % 120 == 102) begin
        ctp_l1a_in = 0;
      end
      if (t % 120 == 0) begin
        pre = 2'($urandom_range(0, 2)); post = 2'($urandom_range(0, 2));
      end
      cfg = '0;
      if (t % 120 == 1)  cfg = '{we: 1'b1, re: 1'b0, addr: {5'd31, 3'd0, 16'h0}, wdata: 0};
      if (t % 120 >= 2 && t % 120 < 18)
        cfg = '{we: 1'b1, re: 1'b0, addr: {5'(t % 120 - 2), 3'd0, 16'h12}, wdata: 32'({post, pre})};
      if (t == 1000) cfg = '{we: 1'b1, re: 1'b0, addr: {5'd3, 3'd0, 16'h13}, wdata: 1};
      if (t == 1001) cfg = '{we: 1'b1, re: 1'b0, addr: {5'd3, 3'd0, 16'h20}, wdata: 32'h2};
      if (t == 1030) cfg = '{we: 1'b1, re: 1'b0, addr: {5'd3, 3'd0, 16'h20}, wdata: 32'h4};
      @(negedge clk);
    end
    sec_in = '0;
    repeat (3000) @(negedge clk);
    mult_chk = 0;
    chk(daqq.size() == 0 && l2q.size() == 0, $sformatf("missing DAQ %0d / L2 %0d words", daqq.size(), l2q.size()));
    chk(n_tokens == n_events, $sformatf("tokens %0d events %0d", n_tokens, n_events));
    // ---------------- snapshot line of MIOCT 3 ----------------
    wr(3, 3'd0, 16'h13, 0);
    begin
      logic [NUM_SEC-1:0][SEC_W-1:0] got;
      wr(3, 3'd0, 16'h16, 10);
      wr(3, 3'd0, 16'h20, 32'h10);
      repeat (4) @(negedge clk);          // fetch goes through the memory read
      for (int w = 0; w < NUM_SEC; w++) begin rd(3, 3'd3, 16'(w), d); got[w] = d; end
      chk(got == hist[arm_e + 10 - 2][3], "snapshot line of MIOCT 3");
      n_snap++;
    end
    // ---------------- monitoring FIFO of MIOCT 2: first word is a fragment header ----------------
    rd(2, 3'd0, 16'h32, d);
    chk(d[31:27] == 5'd2, $sformatf("monitoring word %h", d));
    rd(2, 3'd0, 16'h33, d);
    chk(d[3:0] == TAG_HDR && !d[31], "monitoring tag");
    n_mon++;
    // ---------------- playback through MIOCT 7 ----------------
    begin
      logic [NUM_SEC-1:0][SEC_W-1:0] pl [3];
      logic [NUM_OCT-1:0][NUM_SEC-1:0][SEC_W-1:0] x;
      bit sat, supp, ok, any;
      for (int i = 0; i < 3; i++) begin
        for (int s = 0; s < NUM_SEC; s++) begin
          pl[i][s] = cand_sector(0);
          wr(7, 3'd3, 16'(s), pl[i][s]);
        end
        wr(7, 3'd0, 16'h16, i);
        wr(7, 3'd0, 16'h20, 32'h8);
      end
      wr(7, 3'd0, 16'h15, 3);
      wr(7, 3'd0, 16'h13, 2);
      repeat (10) @(negedge clk);
      any = 0;
      for (int c = 0; c < 3; c++) begin
        ok = 1;
        for (int k = 0; k < 9; k++) begin
          x = '0; x[7] = pl[(k + c) % 3];
          if (mult_ctp != total(x, sat, supp)) ok = 0;
          @(negedge clk);
        end
        if (ok) any = 1;
      end
      chk(any, "playback of MIOCT 7 does not reach the CTP output");
      n_play++;
    end
    // ---------------- every mechanism happened ----------------
    $display("suppress %0d saturate %0d events %0d tokens %0d zero-suppressed %0d windows %0d lff %0d L2-trunc %0d snapshot %0d playback %0d monitor %0d",
             n_supp, n_sat, n_events, n_tokens, n_zs, n_window, n_lff, n_trunc, n_snap, n_play, n_mon);
    chk(n_supp > 0, "no overlap suppression");
    chk(n_sat > 0, "no adder saturation");
    chk(n_tokens > 0, "no token round trip");
    chk(n_zs > 0, "no zero suppression");
    chk(n_window > 0, "no multi-slice window");
    chk(n_lff > 0, "no S-LINK stall");
    chk(n_trunc > 0, "no Level-2 truncation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
