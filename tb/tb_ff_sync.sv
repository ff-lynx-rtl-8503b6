// tb_ff_sync: checks SYNC (with DES) at 8x. The testbench sends reference
// cycles bit by bit, starting at a random bit offset: 4 sync patterns, then
// idle THS with a cycle counter in the FRM bits and a sync every 20 cycles.
//  * the receiver must lock by the end of the third sync pattern;
//  * after lock every captured cycle must be the next cycle sent;
//  * 3 extra bits are slipped into the line: the receiver must re-lock to
//    the new alignment from the following sync patterns, once the old
//    alignment has gone WD_CYC/2 cycles without one;
//  * the syncs stop: the watchdog must drop the lock.
module tb_ff_sync;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  logic dat, tick_rx, locked, cyc_valid;
  logic [5:0] raw6;
  logic [1:0] cyc_ths;
  logic [5:0] cyc_frm;
  logic [2:0] phase;
  int checks = 0, failures = 0;
  int sent = 0;
  int lock_at = -1;
  logic [1:0] sent_ths [4096];

  ff_des  #(.SPEED(8)) u_des (.clk, .rst_n, .dat, .tick_rx, .raw6, .cyc_valid, .cyc_ths, .cyc_frm);
  ff_sync #(.SPEED(8), .LOCK_TH(3), .UNLOCK_TH(3), .WD_CYC(40)) dut (.clk, .rst_n, .raw6, .tick_rx, .locked, .phase);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send_bit(input logic b);
    @(negedge clk);
    dat = b;
  endtask

  task automatic send_cycle(input logic [1:0] ths);
    logic [7:0] w;
    sent_ths[sent % 4096] = ths;
    w = {ths, 6'(sent)};
    for (int i = 7; i >= 0; i--) send_bit(w[i]);
    sent++;
  endtask

  task automatic send_pat(input logic [5:0] p);
    send_cycle(p[5:4]); send_cycle(p[3:2]); send_cycle(p[1:0]);
  endtask

  always @(posedge clk) if (locked && lock_at < 0) lock_at = sent;

  // captured-cycle checker: after lock, cycles must be consecutive
  int last_idx = -1, capt = 0;
  bit chk_on = 1;
  always @(posedge clk) #1 if (cyc_valid && chk_on) begin
    int idx;
    idx = int'(cyc_frm);
    if (last_idx >= 0) begin
      check(idx == (last_idx + 1) % 64, $sformatf("cycle order %0d after %0d", idx, last_idx));
    end
    last_idx = idx;
    capt++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int off;
    dat = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    off = $urandom_range(0, 7);
    for (int i = 0; i < off + 5; i++) send_bit(1'($urandom));
    for (int i = 0; i < 4; i++) send_pat(6'b011110);
    check(lock_at >= 0 && lock_at <= 10, $sformatf("locked after third sync (cycle %0d)", lock_at));
    for (int n = 0; n < 100; n++) begin
      if (n % 20 == 0) send_pat(6'b011110);
      else send_cycle(2'b00);
    end
    check(locked, "still locked");
    check(capt > 90, $sformatf("cycles captured %0d", capt));
    // bit slip
    chk_on = 0;
    for (int i = 0; i < 3; i++) send_bit(1'b0);
    for (int i = 0; i < 4; i++) send_pat(6'b011110);
    last_idx = -1;
    chk_on = 1;
    capt = 0;
    for (int n = 0; n < 90; n++) begin
      if (n % 20 == 0) send_pat(6'b011110);
      else send_cycle(2'b00);
    end
    check(locked && capt > 50, $sformatf("re-locked after slip, %0d cycles", capt));
    // no more syncs: watchdog
    for (int n = 0; n < 60; n++) send_cycle(2'b00);
    check(!locked, "lock dropped by watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
