// tb_ff_tx_buf: checks TX_BUF. Words are written with the data_valid /
// get_data handshake on host_ce strobes (one clock in four) until the buffer
// is full; get_data must fall at exactly DEPTH words, a further word must be
// ignored, and the words must come out in order with a correct count.
module tb_ff_tx_buf;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  logic host_ce, data_valid, get_data, rd_en;
  logic [15:0] data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;

  ff_tx_buf #(.DEPTH(DEPTH)) dut (.*);

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
    host_ce = 0; data_valid = 0; data = 0; rd_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // write until full, on host_ce strobes
    for (int i = 0; i < DEPTH + 1; i++) begin
      repeat (3) @(posedge clk);
      #1 host_ce = 1; data_valid = 1; data = 16'hA000 + 16'(i);
      check(get_data == (i < DEPTH), $sformatf("get_data before word %0d", i));
      @(posedge clk);
      #1 host_ce = 0;
    end
    data_valid = 0;
    check(count == DEPTH, "count at full");
    // data_valid without host_ce must not write
    for (int i = 0; i < DEPTH; i++) begin
      check(rd_data == 16'hA000 + 16'(i), $sformatf("word %0d: %h", i, rd_data));
      #1 rd_en = 1;
      @(posedge clk);
      #1 rd_en = 0;
    end
    check(count == 0, "empty at end");
    check(get_data == 1, "get_data after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
