// tb_ff_tte: runs the trigger data transmission efficiency workload on four
// up-link configurations side by side, each a transmitter-receiver pair
// (tte_link) fed with Poisson hits at 0.125 hits per reference cycle per
// front-end circuit:
//   8x,  NC = 3, NH = 2,  one front-end circuit   (published TTE 96.57 %)
//   8x,  NC = 5, NH = 3,  one front-end circuit   (published TTE 98.53 %)
//   16x, NC = 4, NH = 7,  four front-end circuits (published TTE 97.29 %)
//   16x, NC = 8, NH = 13, four front-end circuits (published TTE 98.94 %)
// The hit rates, configurations and published percentages are those of the
// FF-LYNX efficiency study; the run length and tolerance are this
// testbench's. For each link it checks that
//  * the receiver stays locked and no FL frame has a detected error;
//  * every generated hit is either decoded at the receiver or reported lost
//    by the transmitter (nothing vanishes, nothing is invented);
//  * the measured efficiency got/sent is within 3 percentage points of the
//    published value. This design adds hit recovery to the frame packing, so
//    small differences from the published numbers are expected.
module tb_ff_tte;
  localparam int NCFG = 4;
  localparam int CYCLES = 40000;
  localparam real PUB [NCFG] = '{96.57, 98.53, 97.29, 98.94};

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  always #5 clk = ~clk;
  logic run = 0;

  int sent [NCFG], got [NCFG], lost [NCFG], capped [NCFG], fl_errs [NCFG], frames [NCFG];
  logic [NCFG-1:0] locked;

  tte_link #(.SPEED(8), .NC(3), .NH(2), .HPC(2), .N_FE(1)) u_l0 (
    .clk, .rst_n, .run, .sent(sent[0]), .got(got[0]), .lost(lost[0]), .capped(capped[0]),
    .fl_errs(fl_errs[0]), .frames(frames[0]), .locked(locked[0]));
  tte_link #(.SPEED(8), .NC(5), .NH(3), .HPC(2), .N_FE(1)) u_l1 (
    .clk, .rst_n, .run, .sent(sent[1]), .got(got[1]), .lost(lost[1]), .capped(capped[1]),
    .fl_errs(fl_errs[1]), .frames(frames[1]), .locked(locked[1]));
  tte_link #(.SPEED(16), .NC(4), .NH(7), .HPC(4), .N_FE(4)) u_l2 (
    .clk, .rst_n, .run, .sent(sent[2]), .got(got[2]), .lost(lost[2]), .capped(capped[2]),
    .fl_errs(fl_errs[2]), .frames(frames[2]), .locked(locked[2]));
  tte_link #(.SPEED(16), .NC(8), .NH(13), .HPC(4), .N_FE(4)) u_l3 (
    .clk, .rst_n, .run, .sent(sent[3]), .got(got[3]), .lost(lost[3]), .capped(capped[3]),
    .fl_errs(fl_errs[3]), .frames(frames[3]), .locked(locked[3]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (16 * CYCLES + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    // all four locked before hits start
    repeat (16 * 40) @(posedge clk);
    check(locked == '1, $sformatf("all receivers locked: %b", locked));
    run = 1;
    // CYCLES reference cycles of the slowest (16x) link
    repeat (16 * CYCLES) @(posedge clk);
    run = 0;
    repeat (16 * 40) @(posedge clk);
    for (int i = 0; i < NCFG; i++) begin
      real tte;
      tte = 100.0 * real'(got[i]) / real'(sent[i]);
      $display("config %0d: %0d hits sent, %0d decoded, %0d lost, %0d FL frames, TTE %.2f %% (published %.2f %%)",
               i, sent[i], got[i], lost[i], frames[i], tte, PUB[i]);
      check(locked[i], $sformatf("config %0d still locked", i));
      check(fl_errs[i] == 0, $sformatf("config %0d: %0d FL frames with errors", i, fl_errs[i]));
      check(sent[i] > 1000, $sformatf("config %0d: %0d hits", i, sent[i]));
      check(got[i] + lost[i] == sent[i],
            $sformatf("config %0d: %0d decoded + %0d lost != %0d sent", i, got[i], lost[i], sent[i]));
      check(tte > PUB[i] - 3.0 && tte < PUB[i] + 3.0,
            $sformatf("config %0d: TTE %.2f %% against published %.2f %%", i, tte, PUB[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
