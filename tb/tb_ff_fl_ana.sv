// tb_ff_fl_ana: checks the FL frame analyzer at the 8x up-link size (NC = 3
// cycles of 6 bits, NH = 2 hits of 2 timing + 5 address bits).
//
// The testbench packs each frame itself: hit count - 1 as a 3-bit Hamming
// (repetition) code, the two hit fields (first hit first, unused field zero),
// then an even-parity bit over the hit fields, MSB first over the 3 cycles.
// Timing code 3 (all ones) is a hit recovered from the previous window and
// must read as -1. Checked for random frames: fl_valid exactly two clocks
// after the third cycle's clock, fl_n, every address and timing; one flipped count
// bit must be corrected (cnt_corr, same result); one flipped hit bit must
// raise par_err.
module tb_ff_fl_ana;
  import ff_lynx_pkg::*;
  import ff_ref_pkg::*;
  localparam int FRM_W = 6, NC = 3, NH = 2, ADDR_W = 5;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  always #5 clk = ~clk;

  logic fl_ce = 0, fl_first = 0;
  logic [FRM_W-1:0] fl_bits = '0;
  logic fl_valid, cnt_corr, cnt_err, par_err;
  logic [1:0] fl_n;
  logic [ADDR_W-1:0] fl_addr [NH];
  logic signed [2:0] fl_time [NH];

  ff_fl_ana #(.FRM_W(FRM_W), .NC(NC), .NH(NH), .ADDR_W(ADDR_W), .RECOVERY(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_corr = 0, n_par = 0;

  // flip: 0 none, 1 one count bit, 2 one hit bit
  task automatic frame(input int flip);
    logic [17:0] p;
    logic [6:0] h [NH];
    int n;
    bit par;
    n = $urandom_range(1, NH);
    par = 0;
    for (int j = 0; j < NH; j++) begin
      h[j] = (j < n) ? {2'($urandom), 5'($urandom)} : 7'h0;
      par ^= ^h[j];
    end
    p = {ref_cnt3(1'(n - 1)), h[0], h[1], par};
    if (flip == 1) p[17 - $urandom_range(0, 2)] ^= 1'b1;
    if (flip == 2) p[14 - $urandom_range(0, 13)] ^= 1'b1;
    for (int c = 0; c < NC; c++) begin
      @(negedge clk);
      fl_ce = 1; fl_first = (c == 0); fl_bits = p[17 - c*FRM_W -: FRM_W];
      @(negedge clk);
      fl_ce = 0; fl_first = 0;
      if (c == NC - 1) begin
        check(!fl_valid, "no fl_valid on the clock of the last cycle");
        @(negedge clk);
        check(fl_valid, "fl_valid two clocks after the last cycle");
        if (flip == 2) begin
          check(par_err, "par_err for a flipped hit bit");
          if (par_err) n_par++;
        end else begin
          check(!par_err && !cnt_err, "no error");
          check(cnt_corr == (flip == 1), "cnt_corr");
          if (cnt_corr) n_corr++;
          check(int'(fl_n) == n, $sformatf("fl_n %0d exp %0d", fl_n, n));
          for (int j = 0; j < NH; j++)
            if (j < n)
              check(fl_addr[j] == h[j][4:0] &&
                    fl_time[j] == ((h[j][6:5] == 2'b11) ? -3'sd1 : $signed({1'b0, h[j][6:5]})),
                    $sformatf("hit %0d: addr %0d/%0d time %0d", j, fl_addr[j], h[j][4:0],
                              fl_time[j]));
        end
      end else check(!fl_valid, "no fl_valid before the last cycle");
      repeat (4) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 60; k++) frame(0);
    for (int k = 0; k < 20; k++) frame(1);
    for (int k = 0; k < 20; k++) frame(2);
    check(n_corr == 20 && n_par == 20, "all single errors seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
