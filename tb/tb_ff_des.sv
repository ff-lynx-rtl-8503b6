// tb_ff_des: checks DES at 8x. Random bits are shifted in; on every clock the
// raw 6-bit THS view must equal the first two bits of each of the last three
// 8-bit groups, and on a tick (every 8 clocks, at an arbitrary phase) the
// captured cycle must be the last 8 bits split into 2 THS and 6 FRM bits,
// with cyc_valid one clock later.
module tb_ff_des;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  logic dat, tick_rx, cyc_valid;
  logic [5:0] raw6;
  logic [1:0] cyc_ths;
  logic [5:0] cyc_frm;
  int checks = 0, failures = 0;
  logic [23:0] hist = '0;   // bit 0 = newest bit shifted in

  ff_des #(.SPEED(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ticks = 0;
    logic [7:0] exp_cyc;
    dat = 0; tick_rx = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      dat = 1'($urandom);
      tick_rx = (n % 8 == 5) && n > 30;
      @(posedge clk);
      #1;
      exp_cyc = hist[7:0];          // bits before this clock's shift
      if (tick_rx) begin
        check(cyc_valid && {cyc_ths, cyc_frm} == exp_cyc,
              $sformatf("cycle %h got %b %h", exp_cyc, cyc_ths, cyc_frm));
        ticks++;
      end else begin
        check(!cyc_valid, "no cyc_valid without tick");
      end
      hist = {hist[22:0], dat};
      check(raw6 == {hist[23:22], hist[15:14], hist[7:6]}, $sformatf("raw6 %b", raw6));
    end
    check(ticks > 40, "ticks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
