// tb_ff_emu: replays, scaled down in time, the two load cases of the
// published FF-LYNX link-emulator runs on a down-link:
//   4x, level-1 triggers at 400 kHz, 5-word packets at 400 kHz
//   8x, level-1 triggers at 133 kHz, 8-word packets at 133 kHz
// with F = 40 MHz, i.e. one trigger and one packet per 100 and per 300
// reference cycles on average (Poisson arrivals). The published runs lasted
// 60 s; here each link runs for CYCLES reference cycles.
// For each link (emu_link) it checks that the receiver stays locked, that
// every packet arrives complete and intact in order, that every trigger
// arrives, and that every trigger the scheduler did not have to delay has
// the same latency, so that fixed-latency triggers hold under data load.
module tb_ff_emu;
  localparam int CYCLES = 60000;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  always #5 clk = ~clk;
  logic run = 0;

  int trg_req [2], trg_got [2], trg_fixed [2], trg_delayed [2], lat0 [2];
  int pck_req [2], pck_got [2], pck_pending [2], errors [2];
  logic [1:0] locked;

  emu_link #(.SPEED(4), .TRG_PER(100), .PCK_PER(100), .PCK_SIZE(5)) u_l4 (
    .clk, .rst_n, .run, .trg_req(trg_req[0]), .trg_got(trg_got[0]), .trg_fixed(trg_fixed[0]),
    .trg_delayed(trg_delayed[0]), .lat0(lat0[0]), .pck_req(pck_req[0]), .pck_got(pck_got[0]),
    .pck_pending(pck_pending[0]), .errors(errors[0]), .locked(locked[0]));
  emu_link #(.SPEED(8), .TRG_PER(300), .PCK_PER(300), .PCK_SIZE(8)) u_l8 (
    .clk, .rst_n, .run, .trg_req(trg_req[1]), .trg_got(trg_got[1]), .trg_fixed(trg_fixed[1]),
    .trg_delayed(trg_delayed[1]), .lat0(lat0[1]), .pck_req(pck_req[1]), .pck_got(pck_got[1]),
    .pck_pending(pck_pending[1]), .errors(errors[1]), .locked(locked[1]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (8 * CYCLES + 40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (8 * 40) @(posedge clk);
    check(locked == '1, $sformatf("both receivers locked: %b", locked));
    run = 1;
    // CYCLES reference cycles of the 8x link (twice as many at 4x)
    repeat (8 * CYCLES) @(posedge clk);
    run = 0;
    repeat (8 * 1000) @(posedge clk);
    for (int i = 0; i < 2; i++) begin
      $display("link %0d: %0d triggers, %0d received, %0d at fixed latency %0d clocks, %0d delayed; %0d packets, %0d received",
               i, trg_req[i], trg_got[i], trg_fixed[i], lat0[i], trg_delayed[i], pck_req[i], pck_got[i]);
      check(locked[i], $sformatf("link %0d still locked", i));
      check(errors[i] == 0, $sformatf("link %0d: %0d wrong entries or triggers", i, errors[i]));
      check(trg_req[i] > 100 && pck_req[i] > 100, $sformatf("link %0d: load generated", i));
      check(trg_got[i] == trg_req[i], $sformatf("link %0d: %0d of %0d triggers", i, trg_got[i], trg_req[i]));
      check(pck_got[i] == pck_req[i] && pck_pending[i] == 0,
            $sformatf("link %0d: %0d of %0d packets", i, pck_got[i], pck_req[i]));
      check(trg_fixed[i] + trg_delayed[i] >= trg_got[i],
            $sformatf("link %0d: %0d triggers off the fixed latency, %0d reported delayed",
                      i, trg_got[i] - trg_fixed[i], trg_delayed[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
