// tb_mioct_readout: random sector data every clock and L1As at random times with
// varying readout windows. For each L1A the expected fragment (header, per slice a slice
// header and the non-empty sector words of the bunch crossing latency clocks before the
// L1A, trailer with word count) is built from the input history and compared word by
// word with the readout FIFO and the monitoring FIFO. The readout FIFO is drained at a
// random rate so that the formatter is stalled by a full FIFO.
module tb_mioct_readout;
  import muctpi_pkg::*;
  localparam int N = 6000, LAT = 40;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NUM_SEC-1:0][SEC_W-1:0] sec;
  logic [BCID_W-1:0] bcid;
  logic l1a, mon_en, ro_rd, ro_empty, frag_done, mon_rd, mon_empty, mon_ovf;
  logic [L1ID_W-1:0] l1id;
  logic [6:0] latency;
  logic [1:0] win_pre, win_post;
  logic [4:0] mod_id;
  logic [RO_W-1:0] ro_dout, mon_dout;
  int checks = 0, failures = 0, frags = 0, suppressed = 0, stalls = 0, events = 0;

  mioct_readout #(.RO_DEPTH(16)) dut (.*);

  logic [NUM_SEC-1:0][SEC_W-1:0] hist [N];
  logic [BCID_W-1:0]             hbc  [N];
  logic [RO_W-1:0] expq [$];
  logic [RO_W-1:0] monq [$];

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (frag_done) frags++;
  always @(posedge clk) if (dut.ro_full && dut.ro_wr) stalls++;

  // readers
  always @(negedge clk) begin
    ro_rd  <= !rst && !ro_empty && ($urandom_range(0, 2) == 0);
    mon_rd <= !rst && !mon_empty;
  end
  always @(posedge clk) begin
    if (ro_rd && !ro_empty) begin
      checks++;
      if (expq.size() == 0 || ro_dout !== expq[0]) begin
        failures++;
        if (failures < 10) $display("ro word %h expected %h", ro_dout, expq.size() ? expq[0] : '0);
      end
      if (expq.size()) void'(expq.pop_front());
    end
    if (mon_rd && !mon_empty) begin
      checks++;
      if (monq.size() == 0 || mon_dout !== monq[0]) begin
        failures++;
        if (failures < 10) $display("mon word %h expected %h", mon_dout, monq.size() ? monq[0] : '0);
      end
      if (monq.size()) void'(monq.pop_front());
    end
  end

  task automatic expect_event(input int t, input int pre, input int post, input int id);
    logic [RO_W-1:0] w;
    int cnt;
    cnt = 0;
    w = {TAG_HDR, mod_id, 3'd0, L1ID_W'(id)}; expq.push_back(w); monq.push_back(w); cnt++;
    for (int o = -pre; o <= post; o++) begin
      int k;
      k = t - LAT + o;
      w = {TAG_SLICE, 17'd0, 3'(o), hbc[k]}; expq.push_back(w); monq.push_back(w); cnt++;
      for (int s = 0; s < NUM_SEC; s++) begin
        sector_word_t sw;
        sw = sector_word_t'(hist[k][s]);
        if (sw.pt1 != 0 || sw.pt2 != 0) begin
          w = {4'(s), hist[k][s]}; expq.push_back(w); monq.push_back(w); cnt++;
        end else suppressed++;
      end
    end
    w = {TAG_TRL, 16'd0, 16'(cnt)}; expq.push_back(w); monq.push_back(w);
  endtask

  initial begin
    int next_l1a;
    sec = '0; bcid = '0; l1a = 0; l1id = '0; latency = 7'(LAT); win_pre = 0; win_post = 0;
    mod_id = 5'd9; mon_en = 1; ro_rd = 0; mon_rd = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    next_l1a = 100;
    for (int t = 0; t < N; t++) begin
      for (int s = 0; s < NUM_SEC; s++) begin
        sector_word_t w;
        w = sector_word_t'($urandom);
        if ($urandom_range(0, 3) != 0) begin w.pt1 = 0; w.pt2 = 0; end
        else begin w.pt1 = 3'($urandom_range(1, 6)); w.pt2 = 3'($urandom_range(0, 6)); end
        sec[s] = w;
      end
      bcid = BCID_W'(t % ORBIT_LEN);
      hist[t] = sec; hbc[t] = bcid;
      l1a = (t == next_l1a) && (t < N - 500);
      if (l1a) begin
        win_pre  = 2'($urandom_range(0, 2));
        win_post = 2'($urandom_range(0, 2));
        l1id     = L1ID_W'(events);
        expect_event(t, win_pre, win_post, events);
        events++;
        next_l1a = t + $urandom_range(30, 90);
      end
      @(posedge clk); #1;
    end
    repeat (300) @(posedge clk);
    checks += 3;
    if (expq.size() != 0 || monq.size() != 0) begin failures++; $display("%0d words missing", expq.size()); end
    if (frags != events) begin failures++; $display("frag_done %0d events %0d", frags, events); end
    if (stalls == 0 || suppressed == 0 || mon_ovf) begin
      failures++; $display("stalls %0d suppressed %0d mon_ovf %0d", stalls, suppressed, mon_ovf);
    end
    $display("events %0d, zero-suppressed words %0d, stall cycles %0d", events, suppressed, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
