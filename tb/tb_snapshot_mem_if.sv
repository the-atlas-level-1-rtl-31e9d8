// tb_snapshot_mem_if: exercises the three modes of the snapshot controller on a small
// memory: capture with gaps, wrap-around and freeze (then reads every line back through
// the staging register and compares with what was captured), register-bus load of test
// lines, and playback of those lines in order with wrap at the programmed length.
module tb_snapshot_mem_if;
  localparam int LINE_W = 72, AW = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [1:0]        mode;
  logic              arm, freeze, cap_valid, play_valid, stage_we, host_commit, host_fetch;
  logic [AW-1:0]     play_len, host_addr, snap_ptr, mem_addr;
  logic [LINE_W-1:0] cap_line, play_line, mem_wdata, mem_rdata;
  logic [5:0]        stage_idx;
  logic [31:0]       stage_wdata, stage_rdata;
  logic              frozen, wrapped, mem_we, mem_re;
  int checks = 0, failures = 0;
  logic [LINE_W-1:0] model [2**AW];

  snapshot_mem_if #(.LINE_W(LINE_W), .AW(AW)) dut (.*);
  line_memory #(.W(LINE_W), .AW(AW)) u_mem (.clk, .we(mem_we), .re(mem_re), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic read_line(input int a, output logic [LINE_W-1:0] l);
    host_addr = AW'(a); host_fetch = 1; @(posedge clk); #1; host_fetch = 0;
    @(posedge clk); #1;
    for (int w = 0; w < 3; w++) begin
      stage_idx = 6'(w); #1;
      l[32*w +: 32] = (w < 2) ? stage_rdata : stage_rdata[7:0];
      if (w == 2) l[71:64] = stage_rdata[7:0];
    end
  endtask

  initial begin
    int wp, n;
    logic [LINE_W-1:0] l;
    mode = 0; arm = 0; freeze = 0; cap_valid = 0; cap_line = '0; play_len = '0;
    stage_we = 0; stage_idx = 0; stage_wdata = 0; host_commit = 0; host_fetch = 0; host_addr = 0;
    repeat (2) @(posedge clk);
    rst = 0; #1;
    // ---- snapshot with wrap and freeze ----
    mode = 1; arm = 1; @(posedge clk); #1; arm = 0;
    wp = 0; n = 0;
    for (int k = 0; k < 70; k++) begin     // enough to wrap the 32-line memory
      cap_valid = ($urandom_range(0, 3) != 0);
      cap_line  = {8'($urandom), 32'($urandom), 32'($urandom)};
      if (cap_valid) begin model[wp % (2**AW)] = cap_line; wp++; end
      @(posedge clk); #1;
    end
    freeze = 1; cap_valid = 1; cap_line = '1; @(posedge clk); #1; freeze = 0;
    // The line presented with freeze is still taken; nothing after it.
    model[wp % (2**AW)] = cap_line; wp++;
    repeat (5) begin cap_line = '0; @(posedge clk); #1; end
    chk(frozen, "not frozen");
    chk(wp > 2**AW, "capture did not wrap");
    chk(wrapped == (wp > 2**AW), "wrap flag");
    chk(int'(snap_ptr) == wp % (2**AW), "snapshot pointer");
    mode = 0; cap_valid = 0; @(posedge clk); #1;
    for (int a = 0; a < 2**AW && a < wp; a++) begin   // lines never written are not compared
      read_line(a, l);
      chk(l === model[a], $sformatf("snapshot line %0d: %h vs %h", a, l, model[a]));
    end
    // ---- load test data through the staging register ----
    for (int a = 0; a < 2**AW; a++) begin
      model[a] = {8'($urandom), 32'($urandom), 32'($urandom)};
      for (int w = 0; w < 3; w++) begin
        stage_we = 1; stage_idx = 6'(w); stage_wdata = (w < 2) ? model[a][32*w +: 32] : 32'(model[a][71:64]);
        @(posedge clk); #1;
      end
      stage_we = 0; host_addr = AW'(a); host_commit = 1; @(posedge clk); #1; host_commit = 0;
    end
    read_line(7, l);
    chk(l === model[7], "load and fetch");
    // ---- playback ----
    play_len = AW'(11);
    mode = 2;
    n = 0;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk); #1;
      if (play_valid) begin
        chk(play_line === model[n % 11], $sformatf("playback %0d", n));
        n++;
      end
    end
    chk(n >= 35, "playback rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
