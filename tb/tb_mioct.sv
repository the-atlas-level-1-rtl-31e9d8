// tb_mioct: one octant module with reduced table and memory sizes, driven through its
// register bus. Checks: the multiplicity appears exactly 3 clocks after the sector words
// and equals an independent count with overlap suppression from the loaded tables;
// the per-sector delays realign skewed inputs;
// readout fragments for L1As are sent on the bus when the token arrives, with the
// triggered crossing's non-empty sector words; the snapshot memory captures aligned
// data and multiplicity; playback of loaded lines replaces the sector inputs.
module tb_mioct;
  import muctpi_pkg::*;
  localparam int BA_W = 3, EC_W = 4, FW_W = 3, CLR_W = 8, SNAP_AW = 6, LAT = 40;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NUM_SEC-1:0][SEC_W-1:0] sec_in;
  logic l1a, bcr, ecr, token_in, token_out, bus_hold, bus_valid, mem_we, mem_re;
  logic [MULTS_W-1:0] mult_out;
  logic [RO_W-1:0] bus_data;
  cfg_req_t cfg;
  logic [31:0] cfg_rdata;
  logic [SNAP_AW-1:0] mem_addr;
  logic [575:0] mem_wdata, mem_rdata;
  logic [4:0] mod_id;
  int checks = 0, failures = 0, suppressions = 0;

  mioct #(.BA_W(BA_W), .EC_W(EC_W), .FW_W(FW_W), .CLR_W(CLR_W), .SNAP_AW(SNAP_AW)) dut (.*);
  line_memory #(.W(576), .AW(SNAP_AW)) u_mem (.clk, .we(mem_we), .re(mem_re), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata));

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, msg); end
  endtask

  task automatic wr(input logic [2:0] region, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, re: 1'b0, addr: {mod_id, region, a}, wdata: d};
    @(negedge clk); cfg = '0;
  endtask
  task automatic rd(input logic [2:0] region, input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b0, re: 1'b1, addr: {mod_id, region, a}, wdata: 0};
    @(negedge clk); cfg = '0; d = cfg_rdata;
  endtask

  // ---- reference model ----
  bit roi_m [NUM_PAIRS][256];
  bit pt_m  [NUM_PAIRS][256];
  function automatic int rw(input int s);
    case (sec_type(s)) SEC_BARREL: return BA_W; SEC_ENDCAP: return EC_W; default: return FW_W; endcase
  endfunction
  function automatic logic [MULTS_W-1:0] ref_mult(input logic [NUM_SEC-1:0][SEC_W-1:0] x);
    logic [NUM_SEC-1:0][1:0] r;
    logic [MULTS_W-1:0] m;
    r = '0;
    for (int p = 0; p < NUM_PAIRS; p++) begin
      sector_word_t a, b;
      a = sector_word_t'(x[pair_a(p)]); b = sector_word_t'(x[pair_b(p)]);
      for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
        logic [2:0] pa, pb; logic [7:0] ra, rb; int ad;
        pa = i ? a.pt2 : a.pt1;  pb = j ? b.pt2 : b.pt1;
        ra = i ? a.roi2 : a.roi1; rb = j ? b.roi2 : b.roi1;
        ad = ((int'(ra) % (1 << rw(pair_a(p)))) << rw(pair_b(p))) | (int'(rb) % (1 << rw(pair_b(p))));
        if (pa != 0 && pb != 0 && roi_m[p][ad] &&
            (pair_kind(p) != OVL_BE || pt_m[p][{pa, pb, i ? a.sign2 : a.sign1, j ? b.sign2 : b.sign1}])) begin
          if (pa >= pb) r[pair_b(p)][j] = 1'b1; else r[pair_a(p)][i] = 1'b1;
        end
      end
    end
    if (r != '0) suppressions++;
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

  function automatic logic [SEC_W-1:0] rnd_word(input int t);
    sector_word_t w;
    w = sector_word_t'($urandom);
    w.roi1 = 8'($urandom_range(0, 7)); w.roi2 = 8'($urandom_range(0, 7));
    if ($urandom_range(0, 2) != 0) begin w.pt1 = 0; w.pt2 = 0; end
    else begin w.pt1 = 3'($urandom_range(1, 6)); w.pt2 = ($urandom_range(0, 1)) ? 3'($urandom_range(1, 6)) : 3'd0; end
    w.bcid = 3'(t);
    return w;
  endfunction

  // ---- stimulus history and checks (time base: posedge index e) ----
  localparam int N = 3000;
  logic [NUM_SEC-1:0][SEC_W-1:0] al [int];  // aligned data after each edge index
  logic [2:0] skew [NUM_SEC];
  int e = 0;
  bit run_chk = 0;
  logic [RO_W-1:0] expq [$];
  int l1id = 0;

  always @(posedge clk) if (!rst) begin
    if (run_chk && al.exists(e-3))
      chk(mult_out == ref_mult(al[e-3]), $sformatf("e=%0d mult %h expected %h", e, mult_out, ref_mult(al[e-3])));
    if (l1a) begin
      // window 0/0: the triggered crossing is the one whose aligned data entered LAT+1 clocks ago
      int cnt;
      expq.push_back({TAG_HDR, mod_id, 3'd0, 24'(l1id)}); cnt = 1;
      expq.push_back({TAG_SLICE, 17'd0, 3'd0, 12'((e - LAT - bcr_e - 1) % ORBIT_LEN)}); cnt++;
      for (int s = 0; s < NUM_SEC; s++) begin
        sector_word_t w;
        w = sector_word_t'(al[e - LAT - 1][s]);
        if (w.pt1 != 0 || w.pt2 != 0) begin expq.push_back({4'(s), al[e - LAT - 1][s]}); cnt++; end
      end
      expq.push_back({TAG_TRL, 16'd0, 16'(cnt)});
      l1id++;
    end
    if (bus_valid) begin
      chk(expq.size() != 0 && bus_data == expq[0], $sformatf("bus word %h expected %h", bus_data, expq.size() ? expq[0] : '0));
      if (expq.size()) void'(expq.pop_front());
    end
    e++;
  end

  // Sector s is presented 2 - skew[s] clocks early and delayed by as much in the
  // module, so the aligned word after edge t0 + t is gen[t] for every sector.
  logic [NUM_SEC-1:0][SEC_W-1:0] gen [N + 8];
  int bcr_e = 0, arm_e = 0, l1a_cnt = 0;
  always @(posedge clk) begin
    if (bcr) bcr_e = e;
    if (cfg.we && cfg.addr[18:16] == 0 && cfg.addr[7:0] == 8'h20 && cfg.wdata[1]) arm_e = e;
  end

  initial begin
    logic [31:0] d;
    logic [NUM_SEC-1:0][SEC_W-1:0] pl [4];
    int t0, phase_ok;
    sec_in = '0; l1a = 0; bcr = 0; ecr = 0; token_in = 0; bus_hold = 0; cfg = '0; mod_id = 5'd5;
    for (int t = 0; t < N + 8; t++) for (int s = 0; s < NUM_SEC; s++) gen[t][s] = rnd_word(t);
    for (int s = 0; s < NUM_SEC; s++) skew[s] = 3'($urandom_range(0, 2));
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat ((1 << CLR_W) + 5) @(negedge clk);
    rd(3'd0, 16'h31, d); chk(d[30] == 1'b0, "tables still busy after the clear sweep");
    for (int s = 0; s < NUM_SEC; s++) wr(3'd0, 16'(s), 32'(2 - skew[s]));
    wr(3'd0, 16'h11, LAT);
    wr(3'd0, 16'h12, 0);
    for (int p = 0; p < NUM_PAIRS; p++) for (int a = 0; a < 256; a++) begin roi_m[p][a] = 0; pt_m[p][a] = 0; end
    for (int k = 0; k < 120; k++) begin
      int p, a;
      p = $urandom_range(0, NUM_PAIRS - 1);
      a = $urandom_range(0, (1 << (rw(pair_a(p)) + rw(pair_b(p)))) - 1);
      roi_m[p][a] = 1; wr(3'd1, 16'(a), {10'd0, 6'(p), 15'd0, 1'b1});
      if (pair_kind(p) == OVL_BE) for (int b = 0; b < 256; b += 1 + $urandom_range(0, 2)) begin
        pt_m[p][b] = 1; wr(3'd2, 16'(b), {10'd0, 6'(p), 15'd0, 1'b1});
      end
    end
    @(negedge clk); bcr = 1; @(negedge clk); bcr = 0;
    t0 = e;
    for (int t = 0; t < N; t++) begin
      for (int s = 0; s < NUM_SEC; s++) sec_in[s] = gen[t + 2 - skew[s]][s];
      al[t0 + t] = gen[t];
      if (t == 6) run_chk = 1;
      l1a      = (t > LAT + 10) && (t % 97 == 0) && (t < N - 200);
      token_in = (t > LAT + 10) && (t % 97 == 30) && (t < N - 150);
      if (l1a) l1a_cnt++;
      cfg = '0;
      if (t == N - 100) cfg = '{we: 1'b1, re: 1'b0, addr: {mod_id, 3'd0, 16'h13}, wdata: 32'd1};
      if (t == N - 99)  cfg = '{we: 1'b1, re: 1'b0, addr: {mod_id, 3'd0, 16'h20}, wdata: 32'h2};
      if (t == N - 60)  cfg = '{we: 1'b1, re: 1'b0, addr: {mod_id, 3'd0, 16'h20}, wdata: 32'h4};
      @(negedge clk);
    end
    cfg = '0; token_in = 0; l1a = 0;
    run_chk = 0;
    sec_in = '0;
    repeat (20) @(negedge clk);
    chk(expq.size() == 0, $sformatf("%0d readout words not sent", expq.size()));
    chk(suppressions > 20, $sformatf("only %0d suppressions", suppressions));
    // ---- snapshot read-back: line n holds the aligned data of edge arm_e + n - 2 ----
    wr(3'd0, 16'h13, 0);
    for (int n = 3; n < 30; n += 9) begin
      logic [NUM_SEC-1:0][SEC_W-1:0] got;
      wr(3'd0, 16'h16, n);
      wr(3'd0, 16'h20, 32'h10);
      for (int w = 0; w < NUM_SEC; w++) begin rd(3'd3, 16'(w), d); got[w] = d; end
      chk(got == al[arm_e + n - 2], $sformatf("snapshot line %0d sector data", n));
      rd(3'd3, 16'd13, d);
      chk(d[17:0] == ref_mult(al[arm_e + n - 2]), $sformatf("snapshot line %0d multiplicity", n));
    end
    // ---- playback: 4 loaded lines replace the inputs (delays set to 0) ----
    for (int s = 0; s < NUM_SEC; s++) wr(3'd0, 16'(s), 0);
    for (int i = 0; i < 4; i++) begin
      for (int s = 0; s < NUM_SEC; s++) begin
        pl[i][s] = rnd_word(0);
        if (pl[i][s][25:20] == 0) pl[i][s][22:20] = 3'($urandom_range(1, 6));
        wr(3'd3, 16'(s), pl[i][s]);
      end
      wr(3'd0, 16'h16, i);
      wr(3'd0, 16'h20, 32'h8);
    end
    wr(3'd0, 16'h15, 4);
    wr(3'd0, 16'h13, 2);
    repeat (8) @(negedge clk);
    phase_ok = 0;
    for (int c = 0; c < 4; c++) begin
      int ok;
      ok = 1;
      for (int k = 0; k < 12; k++) begin
        if (k > 0) @(negedge clk);
        if (mult_out != ref_mult(pl[(k + c) % 4])) ok = 0;
      end
      if (ok) phase_ok = 1;
      @(negedge clk);
    end
    chk(phase_ok == 1, "playback multiplicities");
    $display("suppressions %0d, L1As %0d", suppressions, l1a_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
