// tb_sector_sync_align: checks that every sector word leaves the alignment stage exactly
// 1 + delay clocks after it was presented, for fixed and random per-sector delays, and
// that the BCID check flags exactly the sector whose delay does not match the offset.
module tb_sector_sync_align;
  import muctpi_pkg::*;
  localparam int N = 401;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NUM_SEC-1:0][SEC_W-1:0] sec_in, sec_out;
  logic [NUM_SEC-1:0][2:0]       dly;
  logic [2:0]                    bcid_ref, bcid_ofs;
  logic                          clr_err;
  logic [NUM_SEC-1:0]            align_err;
  logic [NUM_SEC-1:0][SEC_W-1:0] hist [N];
  int checks = 0, failures = 0;

  sector_sync_align dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [SEC_W-1:0] word(input int t, input int s);
    sector_word_t w;
    w = sector_word_t'($urandom);
    w.bcid = 3'(t);
    return w;
  endfunction

  task automatic run(input int t0, input int t1, input bit clear_first);
    for (int t = t0; t < t1; t++) begin
      for (int s = 0; s < NUM_SEC; s++) sec_in[s] = word(t, s);
      hist[t]  = sec_in;
      bcid_ref = 3'(t);
      clr_err  = clear_first && (t == t0);
      @(posedge clk); #1;
      for (int s = 0; s < NUM_SEC; s++)
        if (t - int'(dly[s]) >= t0) begin
          checks++;
          if (sec_out[s] !== hist[t - int'(dly[s])][s]) begin
            failures++;
            if (failures < 10) $display("t=%0d sector %0d: got %h expected %h", t, s, sec_out[s], hist[t - int'(dly[s])][s]);
          end
        end
    end
  endtask

  initial begin
    clr_err = 0; bcid_ofs = 3'd5; sec_in = '0; bcid_ref = '0;
    for (int s = 0; s < NUM_SEC; s++) dly[s] = 3'd2;
    dly[7] = 3'd3;
    repeat (3) @(posedge clk);
    rst = 0;
    run(0, 10, 0);
    run(10, 100, 1);
    checks++;
    if (align_err !== 13'(1 << 7)) begin
      failures++; $display("align_err %b, expected only sector 7", align_err);
    end
    for (int s = 0; s < NUM_SEC; s++) dly[s] = 3'($urandom_range(0, 7));
    run(100, 400, 1);
    for (int s = 0; s < NUM_SEC; s++) dly[s] = 3'd0;
    run(400, 401, 1);
    checks++;
    if (align_err !== '0) begin failures++; $display("align_err not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
