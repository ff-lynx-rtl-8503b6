// tb_ff_rx_rm: checks the receive-side redundancy manager.
//
// Two entry streams (primary = input 0, bypass = input 1) carry frames whose
// words are tagged {input, frame number, word index}; the output is taken
// with a randomly stalling get. The testbench checks that:
//  * while the primary link is locked only primary frames come out, each
//    one whole and in order, and the bypass stream is drained;
//  * when the primary link loses lock in the middle of a frame, that frame
//    is finished first, then the manager switches to the bypass input
//    (switched pulses, sel = 1) and bypass frames come out whole;
//  * when the primary link locks again it switches back;
//  * frames that arrive on the other input before a switch are discarded
//    (the test only expects frames queued after it);
//  * no frame is ever cut or mixed with another.
module tb_ff_rx_rm;
  import ff_lynx_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  always #5 clk = ~clk;

  logic [1:0] locked = 2'b11;
  rx_entry_t in_entry [2];
  logic [1:0] in_valid, in_get;
  rx_entry_t entry;
  logic valid, get, sel, switched;

  ff_rx_rm dut (.*);

  int checks = 0, failures = 0;
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

  rx_entry_t q [2][$];
  int fno [2] = '{0, 0};
  always_comb
    for (int i = 0; i < 2; i++) in_entry[i] = (q[i].size() > 0) ? q[i][0] : '0;
  assign in_valid = {q[1].size() > 0, q[0].size() > 0};

  always @(posedge clk) begin
    for (int i = 0; i < 2; i++)
      if (in_get[i] && in_valid[i]) void'(q[i].pop_front());
    get <= ($urandom_range(0, 3) != 0);
  end

  task automatic add(input int inp, input int len);
    for (int i = 0; i < len; i++) begin
      rx_entry_t e;
      e = '0;
      e.word = {1'(inp), 7'(fno[inp]), 8'(i)};
      e.fd.len = 4'(len);
      e.sof = (i == 0);
      e.eof = (i == len - 1);
      q[inp].push_back(e);
    end
    fno[inp]++;
  endtask

  // output checker
  int frames_out [2] = '{0, 0};
  int n_sw = 0, last_fno [2] = '{-1, -1};
  bit in_frame = 0;
  logic [15:0] prev;
  always @(posedge clk) begin
    if (rst_n && switched) n_sw++;
    if (valid && get) begin
      if (entry.sof) begin
        check(!in_frame, "frame cut before a new one starts");
        check(entry.word[7:0] == 0, "frame starts at word 0");
        check(int'(entry.word[14:8]) > last_fno[entry.word[15]], "frames in order");
        last_fno[entry.word[15]] = int'(entry.word[14:8]);
        in_frame = 1;
      end else begin
        check(in_frame && entry.word[15:8] == prev[15:8] && entry.word[7:0] == prev[7:0] + 1,
              $sformatf("word %h follows %h", entry.word, prev));
      end
      check(entry.word[15] == sel, "word comes from the selected input");
      prev = entry.word;
      if (entry.eof) begin
        in_frame = 0;
        frames_out[entry.word[15]]++;
      end
    end
  end

  initial begin
    int f0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      add(0, $urandom_range(1, 10));
      add(1, $urandom_range(1, 10));
    end
    while (q[0].size() + q[1].size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    check(frames_out[0] == 8 && frames_out[1] == 0, "primary frames only while locked");
    check(q[1].size() == 0, "bypass stream drained");
    check(sel == 0, "primary selected");
    // primary lost in the middle of a long frame
    add(0, 15);
    add(1, 5);
    while (!(valid && get && !entry.sof)) @(posedge clk);
    locked[0] = 0;
    f0 = frames_out[0];
    while (!sel) @(posedge clk);
    for (int k = 0; k < 4; k++) add(1, $urandom_range(1, 10));
    repeat (400) @(posedge clk);
    check(frames_out[0] == f0 + 1, "the frame in progress is finished");
    check(sel == 1 && n_sw == 1, $sformatf("switched to the bypass link: sel %0d, %0d switches", sel, n_sw));
    check(frames_out[1] >= 4, $sformatf("bypass frames forwarded: %0d", frames_out[1]));
    // primary back
    locked[0] = 1;
    while (sel) @(posedge clk);
    add(0, 4);
    repeat (200) @(posedge clk);
    check(sel == 0 && n_sw == 2, $sformatf("switched back to the primary link: sel %0d, %0d switches", sel, n_sw));
    check(frames_out[0] == f0 + 2, "primary frame after switching back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
