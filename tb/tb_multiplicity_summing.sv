// tb_multiplicity_summing: random sector words and suppression flags; the six 3-bit
// counts (candidates at or above each threshold, not suppressed, saturated at 7) are
// compared with an independent count one clock later. Dense inputs exercise saturation.
module tb_multiplicity_summing;
  import muctpi_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [NUM_SEC-1:0][SEC_W-1:0] sec;
  logic [NUM_SEC-1:0][1:0]       supp;
  logic [MULTS_W-1:0]            mult, expv;
  int checks = 0, failures = 0, sat = 0;

  multiplicity_summing dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [MULTS_W-1:0] ref_count();
    logic [MULTS_W-1:0] r;
    for (int t = 1; t <= 6; t++) begin
      int n;
      n = 0;
      for (int s = 0; s < NUM_SEC; s++) begin
        logic [2:0] p1, p2;
        p1 = sec[s][22:20]; p2 = sec[s][25:23];
        if (!supp[s][0] && p1 != 0 && p1 >= 3'(t)) n++;
        if (!supp[s][1] && p2 != 0 && p2 >= 3'(t)) n++;
      end
      r[(t-1)*3 +: 3] = (n > 7) ? 3'd7 : 3'(n);
      if (n > 7) sat++;
    end
    return r;
  endfunction

  initial begin
    sec = '0; supp = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 2000; k++) begin
      int dens;
      dens = (k < 1000) ? 8 : 2;
      for (int s = 0; s < NUM_SEC; s++) begin
        sec[s] = $urandom;
        if ($urandom_range(0, dens) != 0) sec[s][22:20] = 3'd0;
        if ($urandom_range(0, dens) != 0) sec[s][25:23] = 3'd0;
        if (sec[s][22:20] == 3'd7) sec[s][22:20] = 3'd6;
        if (sec[s][25:23] == 3'd7) sec[s][25:23] = 3'd6;
        supp[s] = ($urandom_range(0, 4) == 0) ? 2'($urandom) : 2'b00;
      end
      expv = ref_count();
      @(posedge clk); #1;
      checks++;
      if (mult !== expv) begin
        failures++;
        if (failures < 10) $display("k=%0d mult %h expected %h", k, mult, expv);
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
