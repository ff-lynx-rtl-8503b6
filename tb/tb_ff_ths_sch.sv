// tb_ff_ths_sch: checks THS_SCH. A tick every 4 clocks stands for the
// reference cycle. The 2-bit THS output is recorded after every tick and the
// 6-bit patterns are compared with the code words:
//  * 4 sync patterns right after reset;
//  * a trigger requested at tick t occupies cycles t+3..t+5 (fixed latency);
//  * a header starts on the tick it is granted, when the channel is free;
//  * a header is held back while an accepted trigger would collide with it;
//  * a trigger falling due while another is being sent is sent right after
//    (trg_late) and the header waits for both;
//  * a sync pattern is added after SYNC_PERIOD idle cycles.
module tb_ff_ths_sch;
  import ff_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  logic tick, trg_in, hdr_req, hdr_block, sync_req, hdr_gnt, trg_fire, trg_late;
  logic [1:0] ths_bits;
  int checks = 0, failures = 0;
  int tk = 0;
  logic [1:0] seq [300];
  int gnt_at [$];
  int late_n = 0;
  logic [1:0] div = 0;

  ff_ths_sch #(.TRG_LAT(3), .SYNC_N(4), .SYNC_PERIOD(32)) dut (.*);

  always #5 clk = ~clk;
  assign tick = (div == 2'd3);
  always @(posedge clk) begin
    div <= div + 1;
    if (tick && rst_n) begin
      if (hdr_gnt) gnt_at.push_back(tk);
      if (trg_late) late_n++;
    end
  end
  always @(negedge clk) if (rst_n && div == 2'd0) begin
    // ths_bits after tick tk-1
    if (tk > 0 && tk < 301) seq[tk-1] = ths_bits;
  end
  always @(posedge clk) if (rst_n && tick) tk <= tk + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [5:0] pat_at(input int k);
    return {seq[k], seq[k+1], seq[k+2]};
  endfunction

  // drive one tick: set inputs before tick tk == k
  task automatic at_tick(input int k);
    while (tk != k || !tick) @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trg_in = 0; hdr_req = 0; hdr_block = 0; sync_req = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // trigger alone
    at_tick(20); trg_in = 1; @(negedge clk); trg_in = 0;
    // header alone
    at_tick(30); hdr_req = 1;
    at_tick(31); hdr_req = 0;
    // trigger at 39 blocks header requested at 40
    at_tick(39); trg_in = 1; @(negedge clk); trg_in = 0;
    at_tick(40); hdr_req = 1;
    while (!(tick && hdr_gnt)) @(negedge clk);
    @(negedge clk); hdr_req = 0;
    // triggers 1 cycle apart, header waiting
    at_tick(60); trg_in = 1; @(negedge clk); trg_in = 0;
    at_tick(61); trg_in = 1; hdr_req = 1; @(negedge clk); trg_in = 0;
    while (!(tick && hdr_gnt)) @(negedge clk);
    @(negedge clk); hdr_req = 0;
    at_tick(140);
    at_tick(141);
    // sync after reset
    for (int i = 0; i < 4; i++)
      check(pat_at(3*i) == R_SYNC, $sformatf("sync %0d after reset: %b", i, pat_at(3*i)));
    check(pat_at(12) == 6'b0, "idle after syncs");
    check(pat_at(22) == R_TRG, $sformatf("trigger at fixed latency: %b", pat_at(22)));
    check(pat_at(19) == 6'b0 && seq[21] == 2'b00, "nothing before trigger");
    check(gnt_at.size() == 3, $sformatf("3 header grants, got %0d", gnt_at.size()));
    if (gnt_at.size() == 3) begin
      check(gnt_at[0] == 30, $sformatf("header granted at once: %0d", gnt_at[0]));
      check(pat_at(30) == R_HDR, "header pattern");
      check(pat_at(41) == R_TRG, "trigger 39 on time");
      // the periodic sync (32 cycles after the last reset sync at tick 9)
      // became due during the trigger and goes first
      check(pat_at(44) == R_SYNC, "periodic sync before header");
      check(gnt_at[1] == 47, $sformatf("header after trigger and sync: %0d", gnt_at[1]));
      check(pat_at(47) == R_HDR, "second header pattern");
      check(pat_at(62) == R_TRG && pat_at(65) == R_TRG, "two close triggers");
      check(gnt_at[2] == 68, $sformatf("header after two triggers: %0d", gnt_at[2]));
    end
    check(late_n == 1, $sformatf("one late trigger, got %0d", late_n));
    begin
      bit seen = 0;
      for (int k = 77; k < 135; k++) if (pat_at(k) == R_SYNC) seen = 1;
      check(seen, "periodic sync");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
