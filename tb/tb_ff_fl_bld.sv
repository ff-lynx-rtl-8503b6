// tb_ff_fl_bld: checks the FL frame builder against the trigger-frame
// examples of the FF-LYNX description (8x link, 3-cycle frames, 2 hits,
// 2-bit timing, 5-bit address). Two builders see the same hits, one without
// and one with hit recovery. Each frame is decoded by the testbench (hit
// count from the 3-bit repetition code, hit fields, parity) and compared with
// the expected list; the frame must follow its first hit by exactly 3 cycles
// (fixed latency), and the lost / carried hit counts must match.
module tb_ff_fl_bld;
  localparam int FRM_W = 6, NC = 3, NH = 2, HPC = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  logic tick;
  logic [2:0] div = 0;
  logic [HPC-1:0] hit_valid;
  logic [4:0] hit_addr [HPC];
  logic trg [2], fl_next [2];
  logic [FRM_W-1:0] fl_bits [2];
  logic [3:0] lost [2], carried [2];
  int checks = 0, failures = 0;
  int tk = 0;

  ff_fl_bld #(.FRM_W(FRM_W), .NC(NC), .NH(NH), .HPC(HPC), .ADDR_W(5), .RECOVERY(1'b0)) dut0 (
    .clk, .rst_n, .tick, .hit_valid, .hit_addr, .trg_in(trg[0]), .fl_next(fl_next[0]),
    .fl_bits(fl_bits[0]), .hits_lost(lost[0]), .hits_carried(carried[0]));
  ff_fl_bld #(.FRM_W(FRM_W), .NC(NC), .NH(NH), .HPC(HPC), .ADDR_W(5), .RECOVERY(1'b1)) dut1 (
    .clk, .rst_n, .tick, .hit_valid, .hit_addr, .trg_in(trg[1]), .fl_next(fl_next[1]),
    .fl_bits(fl_bits[1]), .hits_lost(lost[1]), .hits_carried(carried[1]));

  always #5 clk = ~clk;
  assign tick = (div == 3'd7);
  always @(posedge clk) div <= div + 1;
  always @(posedge clk) if (tick && rst_n) tk <= tk + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // monitors
  int trg_t [2][$];
  int frm_t [2][$];
  logic [17:0] frames [2][$];
  logic [17:0] acc [2];
  int nacc [2] = '{0, 0};
  int lost_tot [2] = '{0, 0}, carr_tot [2] = '{0, 0};
  logic capt [2] = '{0, 0};
  always @(posedge clk) if (tick && rst_n) begin
    for (int d = 0; d < 2; d++) begin
      if (trg[d]) trg_t[d].push_back(tk);
      lost_tot[d] += lost[d];
      carr_tot[d] += carried[d];
      capt[d] <= fl_next[d];
      if (fl_next[d] && nacc[d] == 0) frm_t[d].push_back(tk);
    end
  end
  always @(negedge clk) for (int d = 0; d < 2; d++) if (capt[d]) begin
    acc[d] = {acc[d][11:0], fl_bits[d]};
    nacc[d]++;
    capt[d] = 0;
    if (nacc[d] == NC) begin
      frames[d].push_back(acc[d]);
      nacc[d] = 0;
    end
  end

  // frame from expected hits: {timing, addr} pairs; n = number of hits
  function automatic logic [17:0] mk(input int n, input logic [6:0] h0, input logic [6:0] h1);
    logic [17:0] f;
    f = {{3{n == 2}}, h0, (n == 2) ? h1 : 7'd0, 1'b0};
    f[0] = ^f[14:1];
    return f;
  endfunction

  task automatic hits_at(input int k, input int n, input logic [4:0] a0, input logic [4:0] a1);
    while (!(tk == k && div == 3'd2)) @(negedge clk);
    hit_valid = (n == 2) ? 2'b11 : (n == 1) ? 2'b01 : 2'b00;
    hit_addr[0] = a0; hit_addr[1] = a1;
    while (!tick) @(negedge clk);
    @(negedge clk);
    hit_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] e0 [$], e1 [$];
    hit_valid = 0; hit_addr[0] = 0; hit_addr[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    hits_at(10, 1, 5'd1, 0);  hits_at(11, 1, 5'd2, 0);     // TF1: T0, T1
    hits_at(14, 1, 5'd3, 0);                               // TF2: T0
    hits_at(22, 2, 5'd4, 5'd5); hits_at(24, 1, 5'd6, 0);  // TF3: 2xT0, T2 extra
    hits_at(26, 1, 5'd7, 0);  hits_at(28, 1, 5'd8, 0);
    hits_at(34, 2, 5'd9, 5'd10); hits_at(35, 1, 5'd11, 0); // 2xT0, T1 extra
    while (tk < 50) @(negedge clk);
    // without recovery
    e0 = '{mk(2, {2'd0, 5'd1}, {2'd1, 5'd2}), mk(1, {2'd0, 5'd3}, 0),
           mk(2, {2'd0, 5'd4}, {2'd0, 5'd5}), mk(2, {2'd0, 5'd7}, {2'd2, 5'd8}),
           mk(2, {2'd0, 5'd9}, {2'd0, 5'd10})};
    // with recovery: the T2 hit of the third window goes to a window opened
    // right after, with timing -1 (code 3)
    e1 = '{mk(2, {2'd0, 5'd1}, {2'd1, 5'd2}), mk(1, {2'd0, 5'd3}, 0),
           mk(2, {2'd0, 5'd4}, {2'd0, 5'd5}), mk(2, {2'd3, 5'd6}, {2'd1, 5'd7}),
           mk(1, {2'd0, 5'd8}, 0), mk(2, {2'd0, 5'd9}, {2'd0, 5'd10})};
    check(frames[0].size() == e0.size(), $sformatf("frames without recovery: %0d", frames[0].size()));
    check(frames[1].size() == e1.size(), $sformatf("frames with recovery: %0d", frames[1].size()));
    for (int i = 0; i < e0.size() && i < frames[0].size(); i++)
      check(frames[0][i] == e0[i], $sformatf("no-rec frame %0d: %b exp %b", i, frames[0][i], e0[i]));
    for (int i = 0; i < e1.size() && i < frames[1].size(); i++)
      check(frames[1][i] == e1[i], $sformatf("rec frame %0d: %b exp %b", i, frames[1][i], e1[i]));
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < trg_t[d].size() && i < frm_t[d].size(); i++)
        check(frm_t[d][i] == trg_t[d][i] + NC - 1,
              $sformatf("dut%0d frame %0d latency: trigger %0d frame tick %0d", d, i, trg_t[d][i], frm_t[d][i]));
    check(lost_tot[0] == 2 && carr_tot[0] == 0, $sformatf("no-rec lost %0d", lost_tot[0]));
    check(lost_tot[1] == 1 && carr_tot[1] == 1, $sformatf("rec lost %0d carried %0d", lost_tot[1], carr_tot[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
