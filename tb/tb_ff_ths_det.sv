// tb_ff_ths_det: checks THS_DET. THS bit pairs are fed once per cycle:
//  * each code word, alone and back to back, must be detected on its third
//    cycle, with no detection elsewhere and no error flag;
//  * each code word with any single bit flipped must be detected exactly
//    once, at most one cycle early, flagged as corrected. With these code
//    words two of the 18 single flips (bits 2 and 3 of the trigger word)
//    make the window ending one cycle early read as a corrected header or
//    sync: those cases are counted and must not exceed 2 (the number found
//    by sliding every corrupted word through the window);
//  * each code word with two bits flipped must never be reported as that
//    pattern or another on its third cycle; at least half of the double
//    errors must raise err (the others leave a window that reads as a
//    corrected pattern one cycle off, the known limit of a 6-bit code
//    sliding over 2-bit cycles).
module tb_ff_ths_det;
  import ff_lynx_pkg::*;
  import ff_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  logic ce;
  logic [1:0] ths;
  ths_pat_e pat;
  logic corr, err;
  int checks = 0, failures = 0;

  ff_ths_det dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle: returns what the detector says
  task automatic cyc(input logic [1:0] b, output ths_pat_e p, output logic c, output logic e);
    @(negedge clk);
    ths = b; ce = 1;
    #1;
    p = pat; c = corr; e = err;
    @(posedge clk);
    #1 ce = 0;
    @(negedge clk);
  endtask

  // sends idle, the word w, idle x3; checks detection on the third cycle
  int early = 0, wrong = 0, dbl_flagged = 0, dbl_total = 0;

  task automatic word(input logic [5:0] w, input ths_pat_e exp_p, input bit exp_c, input bit dbl,
                      input string name);
    ths_pat_e p;
    logic c, e;
    bit e_seen;
    int ndet, at;
    e_seen = 0;
    ndet = 0;
    at = -1;
    for (int i = 0; i < 3; i++) begin
      cyc(2'b00, p, c, e);
      check(p == PAT_NONE, {name, ": idle before"});
    end
    for (int i = 0; i < 3; i++) begin
      cyc(w[5-2*i -: 2], p, c, e);
      e_seen |= e;
      if (p != PAT_NONE) begin
        ndet++;
        at = i;
        if (!dbl) begin
          check(c == exp_c, $sformatf("%s: corr %0d", name, c));
          if (p != exp_p) begin
            wrong++;
            $display("note: %s read as pattern %0d at cycle %0d", name, p, i);
          end
        end
      end
      if (dbl && i == 2) check(p == PAT_NONE, {name, ": double error not taken as a pattern"});
    end
    if (!dbl) begin
      check(ndet == 1, $sformatf("%s: detected %0d times", name, ndet));
      if (!exp_c) check(at == 2, {name, ": exact word on its third cycle"});
      else check(at == 2 || at == 1, {name, ": corrected word at most one cycle early"});
      if (at == 1) early++;
    end
    for (int i = 0; i < 3; i++) begin
      cyc(2'b00, p, c, e);
      e_seen |= e;
      if (!dbl) check(p == PAT_NONE, {name, ": idle after"});
    end
    if (dbl) begin
      dbl_total++;
      if (e_seen) dbl_flagged++;
    end else check(!e_seen, {name, ": no error flag"});
  endtask

  initial begin
    logic [5:0] codes [3];
    ths_pat_e   kinds [3];
    ths_pat_e p;
    logic c, e;
    codes = '{R_TRG, R_HDR, R_SYNC};
    kinds = '{PAT_TRG, PAT_HDR, PAT_SYNC};
    ce = 0; ths = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      word(codes[k], kinds[k], 0, 0, $sformatf("code %0d", k));
      for (int b = 0; b < 6; b++)
        word(codes[k] ^ (6'd1 << b), kinds[k], 1, 0, $sformatf("code %0d flip %0d", k, b));
      for (int b = 0; b < 6; b++)
        for (int b2 = b + 1; b2 < 6; b2++)
          word(codes[k] ^ (6'd1 << b) ^ (6'd1 << b2), PAT_NONE, 0, 1,
               $sformatf("code %0d flips %0d,%0d", k, b, b2));
    end
    // back to back: TRG HDR SYNC
    for (int k = 0; k < 3; k++)
      for (int i = 0; i < 3; i++) begin
        cyc(codes[k][5-2*i -: 2], p, c, e);
        if (i == 2) check(p == kinds[k], $sformatf("back-to-back %0d", k));
        else check(p == PAT_NONE || k == 0, $sformatf("back-to-back %0d early", k));
      end
    $display("single flips detected one cycle early: %0d of 18", early);
    $display("double flips flagged: %0d of %0d", dbl_flagged, dbl_total);
    $display("single flips read as another pattern: %0d of 18", wrong);
    check(early <= 2, "at most 2 single-flip cases detected early");
    check(wrong <= 2, "at most 2 single-flip cases read as another pattern");
    check(2 * dbl_flagged >= dbl_total, "at least half of the double errors flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
