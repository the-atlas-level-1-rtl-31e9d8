// tb_mibak_adder_tree: random and corner-case octant multiplicities; each threshold of
// the total must equal min(7, sum of the 16 inputs).
module tb_mibak_adder_tree;
  import muctpi_pkg::*;
  logic [NUM_OCT-1:0][MULTS_W-1:0] mult_in;
  logic [MULTS_W-1:0]              mult_sum, expv;
  int checks = 0, failures = 0;

  mibak_adder_tree dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      for (int o = 0; o < NUM_OCT; o++)
        for (int t = 0; t < NUM_THR; t++)
          mult_in[o][t*3 +: 3] = (k % 3 == 0) ? 3'($urandom) :
                                 (($urandom_range(0, 15) == 0) ? 3'($urandom_range(1, 3)) : 3'd0);
      if (k == 0) mult_in = '0;
      if (k == 1) mult_in = '1;
      for (int t = 0; t < NUM_THR; t++) begin
        int n;
        n = 0;
        for (int o = 0; o < NUM_OCT; o++) n = n + int'(mult_in[o][t*3 +: 3]);
        expv[t*3 +: 3] = (n > 7) ? 3'd7 : 3'(n);
      end
      #1;
      checks++;
      if (mult_sum !== expv) begin
        failures++;
        if (failures < 10) $display("k=%0d sum %h expected %h", k, mult_sum, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
