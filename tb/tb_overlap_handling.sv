// tb_overlap_handling: loads random overlap tables into the 33 pair units (reduced RoI
// widths), drives random sector words and compares the suppression flags with a
// reference model of the tables, one clock after the words were presented. Also checks
// that the tables are cleared after reset and that the clear sweep ends on time.
module tb_overlap_handling;
  import muctpi_pkg::*;
  localparam int BA_W = 3, EC_W = 4, FW_W = 3, CLR_W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NUM_SEC-1:0][SEC_W-1:0] sec;
  logic we_roi, we_pt, wdata, busy;
  logic [5:0] wpair;
  logic [15:0] waddr;
  logic [NUM_SEC-1:0][1:0] supp, exp_supp;
  logic [NUM_PAIRS-1:0][3:0] ovl;
  int checks = 0, failures = 0, hits = 0;

  bit roi_m [NUM_PAIRS][256];
  bit pt_m  [NUM_PAIRS][256];

  overlap_handling #(.BA_W(BA_W), .EC_W(EC_W), .FW_W(FW_W), .CLR_W(CLR_W)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rw(input int s);
    case (sec_type(s))
      SEC_BARREL: return BA_W;
      SEC_ENDCAP: return EC_W;
      default:    return FW_W;
    endcase
  endfunction

  function automatic logic [NUM_SEC-1:0][1:0] model(input logic [NUM_SEC-1:0][SEC_W-1:0] x);
    logic [NUM_SEC-1:0][1:0] r;
    r = '0;
    for (int p = 0; p < NUM_PAIRS; p++) begin
      sector_word_t a, b;
      a = sector_word_t'(x[pair_a(p)]);
      b = sector_word_t'(x[pair_b(p)]);
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) begin
          logic [2:0] pa, pb; logic [7:0] ra, rb; logic sa, sb; int aw, bw, ad;
          pa = i ? a.pt2 : a.pt1;  pb = j ? b.pt2 : b.pt1;
          ra = i ? a.roi2 : a.roi1; rb = j ? b.roi2 : b.roi1;
          sa = i ? a.sign2 : a.sign1; sb = j ? b.sign2 : b.sign1;
          aw = rw(pair_a(p)); bw = rw(pair_b(p));
          ad = ((int'(ra) % (1 << aw)) << bw) | (int'(rb) % (1 << bw));
          if (pa != 0 && pb != 0 && roi_m[p][ad] &&
              (pair_kind(p) != OVL_BE || pt_m[p][{pa, pb, sa, sb}])) begin
            if (pa >= pb) r[pair_b(p)][j] = 1'b1;
            else          r[pair_a(p)][i] = 1'b1;
          end
        end
    end
    return r;
  endfunction

  function automatic logic [SEC_W-1:0] rnd_word();
    sector_word_t w;
    w = sector_word_t'($urandom);
    w.roi1 = 8'($urandom_range(0, 15));
    w.roi2 = 8'($urandom_range(0, 15));
    w.pt1  = 3'($urandom_range(0, 6));
    w.pt2  = ($urandom_range(0, 2) == 0) ? 3'($urandom_range(1, 6)) : 3'd0;
    return w;
  endfunction

  int cyc;
  initial begin
    we_roi = 0; we_pt = 0; wdata = 0; wpair = 0; waddr = 0; sec = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    cyc = 0;
    while (busy && cyc < 1000) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc != (1 << CLR_W)) begin failures++; $display("clear sweep took %0d cycles", cyc); end
    #1;
    // Cleared tables: nothing is suppressed.
    for (int n = 0; n < 50; n++) begin
      for (int s = 0; s < NUM_SEC; s++) sec[s] = rnd_word();
      @(posedge clk); #1;
      checks++;
      if (supp !== '0) begin failures++; $display("suppression with cleared tables"); end
    end
    // Load random tables.
    for (int p = 0; p < NUM_PAIRS; p++) begin
      for (int a = 0; a < 256; a++) begin
        roi_m[p][a] = ($urandom_range(0, 3) == 0);
        pt_m[p][a]  = ($urandom_range(0, 3) != 0);
      end
      for (int a = 0; a < (1 << (rw(pair_a(p)) + rw(pair_b(p)))); a++) begin
        we_roi = 1; wpair = 6'(p); waddr = 16'(a); wdata = roi_m[p][a];
        @(posedge clk); #1;
      end
      we_roi = 0;
      if (pair_kind(p) == OVL_BE)
        for (int a = 0; a < 256; a++) begin
          we_pt = 1; wpair = 6'(p); waddr = 16'(a); wdata = pt_m[p][a];
          @(posedge clk); #1;
        end
      we_pt = 0;
    end
    // Random traffic.
    for (int n = 0; n < 3000; n++) begin
      for (int s = 0; s < NUM_SEC; s++) sec[s] = rnd_word();
      exp_supp = model(sec);
      @(posedge clk); #1;
      checks++;
      if (exp_supp != '0) hits++;
      if (supp !== exp_supp) begin
        failures++;
        if (failures < 10) $display("n=%0d supp %b expected %b", n, supp, exp_supp);
      end
    end
    checks++;
    if (hits < 100) begin failures++; $display("too few overlaps exercised: %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
