// tb_ff_rx_buf: checks RX_BUF, the receiver's output buffer (depth 8 here).
//
// Random entries are written while a host takes them with the FF-LYNX
// handshake: an entry is taken only on a clock where host_ce and get_data
// are both high; with get_data low the same entry must stay on the port.
// The testbench keeps its own queue of what was written and checks every
// entry taken, in order. It then fills the buffer with the host stopped:
// data_valid must stay high, the write beyond the depth must pulse
// overflow and be dropped, and the buffer must drain to exactly DEPTH
// entries.
module tb_ff_rx_buf;
  import ff_lynx_pkg::*;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  always #5 clk = ~clk;

  logic wr_en = 0, host_ce = 0, get_data = 0, data_valid, overflow;
  rx_entry_t wr_entry = '0, entry;

  ff_rx_buf #(.DEPTH(DEPTH)) dut (.*);

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

  rx_entry_t q [$];
  rx_entry_t held;
  bit was_held = 0;
  int taken = 0, n_ovf = 0, holds = 0;
  bit run = 1;

  always @(posedge clk) if (rst_n) begin
    if (overflow) n_ovf++;
    check(data_valid == (q.size() > 0), "data_valid while entries are held");
    if (data_valid) begin
      check(entry == q[0], $sformatf("entry %h exp %h", entry, q[0]));
      if (was_held) begin
        check(entry == held, "entry held while not taken");
        holds++;
      end
    end
    was_held = data_valid && !(host_ce && get_data);
    held = entry;
    // a write to a full buffer is dropped even when an entry leaves
    if (wr_en && q.size() < DEPTH) q.push_back(wr_entry);
    if (data_valid && host_ce && get_data) begin
      void'(q.pop_front());
      taken++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 2) == 0);
      wr_entry = rx_entry_t'({$urandom, $urandom});
      host_ce = ($urandom_range(0, 1) == 0);
      get_data = ($urandom_range(0, 3) != 0);
    end
    // fill with the host stopped
    @(negedge clk);
    wr_en = 0; get_data = 0; host_ce = 1;
    while (q.size() > 0) begin
      get_data = 1;
      @(negedge clk);
    end
    get_data = 0;
    for (int k = 0; k < DEPTH + 1; k++) begin
      wr_en = 1;
      wr_entry = rx_entry_t'({$urandom, $urandom});
      if (k == DEPTH) begin
        #1 check(overflow, "overflow on the write beyond the depth");
      end else begin
        #1 check(!overflow, "no overflow below the depth");
      end
      @(negedge clk);
    end
    wr_en = 0;
    check(q.size() == DEPTH, "buffer holds DEPTH entries");
    get_data = 1;
    while (data_valid) @(negedge clk);
    check(q.size() == 0, "drained");
    check(taken > 300 && holds > 100, $sformatf("taken %0d held %0d", taken, holds));
    check(n_ovf >= 1, $sformatf("overflow pulses %0d", n_ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
