// tb_ff_ser: checks SER at the 8x and 4x speeds. Random THS and FRM values
// are presented before each tick; the serial output of the following SPEED
// bit clocks must be the THS bits then the FRM bits, MSB first, and the tick
// must come exactly once every SPEED clocks.
module tb_ff_ser;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  logic [1:0] ths8, ths4;
  logic [5:0] frm8;
  logic [1:0] frm4;
  logic tick8, tick4, dat8, dat4;
  int checks = 0, failures = 0;

  ff_ser #(.SPEED(8)) dut8 (.clk, .rst_n, .ths_bits(ths8), .frm_bits(frm8), .tick(tick8), .dat(dat8));
  ff_ser #(.SPEED(4)) dut4 (.clk, .rst_n, .ths_bits(ths4), .frm_bits(frm4), .tick(tick4), .dat(dat4));

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

  // 8x
  initial begin : p8
    logic [7:0] w, got;
    int last;
    ths8 = 0; frm8 = 0; ths4 = 0; frm4 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    last = -1;
    for (int n = 0; n < 40; n++) begin
      while (!tick8) @(negedge clk);
      w = 8'($urandom);
      {ths8, frm8} = w;
      @(posedge clk); #1;
      got = '0;
      for (int b = 0; b < 8; b++) begin
        got = {got[6:0], dat8};
        if (b == 6) check(!tick8, "no early tick");
        @(posedge clk); #1;
      end
      check(got == w, $sformatf("8x word %h got %h", w, got));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 4x, same clock
  initial begin : p4
    logic [3:0] w, got;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      @(negedge clk);
      while (!tick4) @(negedge clk);
      w = 4'($urandom);
      {ths4, frm4} = w;
      @(posedge clk); #1;
      got = '0;
      for (int b = 0; b < 4; b++) begin
        got = {got[2:0], dat4};
        @(posedge clk); #1;
      end
      check(got == w, $sformatf("4x word %h got %h", w, got));
    end
  end
endmodule
