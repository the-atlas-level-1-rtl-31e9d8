// tb_mibak: checks the backplane's multiplicity total (per threshold min(7, sum)), the
// readout bus (the word and valid of the single active node reach the MIROD side) and
// the token chain MIROD -> node 0 -> ... -> node 16 -> MIROD.
module tb_mibak;
  import muctpi_pkg::*;
  logic [NUM_OCT-1:0][MULTS_W-1:0] mult_oct;
  logic [MULTS_W-1:0]              mult_sum, expv;
  logic [NUM_OCT:0][RO_W-1:0]      node_data;
  logic [NUM_OCT:0]                node_valid, node_token_out, node_token_in;
  logic [RO_W-1:0]                 bus_data;
  logic                            bus_valid, token_launch, token_return;
  logic clk = 0, rst = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mibak dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    node_data = '0; node_valid = '0; node_token_out = '0; token_launch = 0;
    for (int k = 0; k < 500; k++) begin
      int a;
      for (int o = 0; o < NUM_OCT; o++) mult_oct[o] = ($urandom_range(0, 3) == 0) ? MULTS_W'($urandom) : '0;
      for (int t = 0; t < NUM_THR; t++) begin
        int n;
        n = 0;
        for (int o = 0; o < NUM_OCT; o++) n = n + int'(mult_oct[o][t*3 +: 3]);
        expv[t*3 +: 3] = (n > 7) ? 3'd7 : 3'(n);
      end
      a = $urandom_range(0, NUM_OCT + 1);   // NUM_OCT+1: bus idle
      node_data = '0; node_valid = '0;
      if (a <= NUM_OCT) begin
        node_data[a]  = {4'($urandom), 32'($urandom)};
        node_valid[a] = 1'b1;
      end
      #1;
      checks += 3;
      if (mult_sum !== expv) begin failures++; $display("sum %h expected %h", mult_sum, expv); end
      if (bus_valid !== (a <= NUM_OCT)) begin failures++; $display("bus_valid wrong"); end
      if (bus_data !== ((a <= NUM_OCT) ? node_data[a] : '0)) begin failures++; $display("bus_data wrong"); end
      #1;
    end
    // token chain
    node_valid = '0; node_data = '0;
    token_launch = 1; #1;
    checks++;
    if (node_token_in !== 17'd1) begin failures++; $display("launch does not reach node 0"); end
    token_launch = 0;
    for (int i = 0; i <= NUM_OCT; i++) begin
      node_token_out = '0; node_token_out[i] = 1'b1; #1;
      checks++;
      if (i < NUM_OCT && (node_token_in !== (17'd1 << (i + 1)) || token_return)) begin
        failures++; $display("token from node %0d misrouted", i);
      end
      if (i == NUM_OCT && (!token_return || node_token_in !== '0)) begin
        failures++; $display("token not returned to the MIROD");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
