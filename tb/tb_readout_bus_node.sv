// tb_readout_bus_node: feeds fragments into a FIFO in front of the node, passes tokens
// and checks that the node sends each fragment word for word only while it holds the
// token, waits for a fragment that is not yet complete, pauses under bus_hold, drives
// zeros otherwise, and returns the token one clock after the trailer.
module tb_readout_bus_node;
  import muctpi_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic            token_in, token_out, bus_hold, frag_done, fifo_rd, bus_valid;
  logic            f_wr, f_empty, f_full;
  logic [RO_W-1:0] f_din, fifo_dout, bus_data;
  logic            fifo_empty;
  int checks = 0, failures = 0, holds = 0, waits = 0;
  logic [RO_W-1:0] expq [$];

  sync_fifo #(.W(RO_W), .DEPTH(64)) u_f (.clk, .rst, .wr(f_wr), .din(f_din), .rd(fifo_rd),
    .dout(fifo_dout), .empty(f_empty), .full(f_full), .count());
  assign fifo_empty = f_empty;

  readout_bus_node dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Bus monitor: every valid word must be the next expected one; idle bus is zero.
  logic have;
  always @(posedge clk) if (!rst) begin
    if (bus_valid) begin
      checks++;
      if (!have || expq.size() == 0 || bus_data !== expq[0]) begin
        failures++; $display("unexpected bus word %h (token %0d)", bus_data, have);
      end
      if (expq.size() != 0) void'(expq.pop_front());
      if (bus_hold) begin failures++; $display("sent during hold"); end
    end else if (bus_data !== '0) begin
      checks++; failures++; $display("bus not idle: %h", bus_data);
    end
  end

  task automatic push_frag(input int n, input int id);
    for (int k = 0; k <= n; k++) begin
      f_wr  = 1;
      f_din = (k == n) ? {TAG_TRL, 16'd0, 16'(n)} : {4'(k % 13), 32'(id * 256 + k)};
      expq.push_back(f_din);
      frag_done = (k == n);
      @(posedge clk); #1;
    end
    f_wr = 0; frag_done = 0;
  endtask

  initial begin
    token_in = 0; bus_hold = 0; frag_done = 0; f_wr = 0; f_din = '0; have = 0;
    repeat (2) @(posedge clk);
    rst = 0; #1;
    for (int ev = 0; ev < 40; ev++) begin
      int n, cyc;
      n = $urandom_range(1, 12);
      if (ev % 4 != 3) push_frag(n, ev);
      // pass the token
      token_in = 1; have = 1; @(posedge clk); #1; token_in = 0;
      if (ev % 4 == 3) begin
        repeat (5) begin
          @(posedge clk); #1;
          checks++;
          if (bus_valid) begin failures++; $display("sent before fragment complete"); end
        end
        waits++;
        push_frag(n, ev);
      end
      cyc = 0;
      while (!token_out && cyc < 200) begin
        bus_hold = (ev % 2 == 1) && ($urandom_range(0, 2) == 0);
        if (bus_hold) holds++;
        @(posedge clk); #1; cyc++;
      end
      bus_hold = 0;
      checks++;
      if (!token_out || expq.size() != 0) begin
        failures++; $display("ev %0d: token_out %0d, %0d words left", ev, token_out, expq.size());
      end
      have = 0;
      @(posedge clk); #1;
      checks++;
      if (token_out) begin failures++; $display("token_out longer than one clock"); end
    end
    checks++;
    if (holds == 0 || waits == 0) begin failures++; $display("hold or wait not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
