// tb_ff_dcm: checks the data concentrator with two input streams.
//
// Each input is a queue of receive-buffer entries (frames of 0 to 15 words,
// random descriptors and data) presented with the buffer handshake; the
// output side takes descriptors and words with a randomly stalling get.
// Every frame that comes out must equal, descriptor and words, the next
// frame not yet sent of one of the inputs; frames never interleave. With
// both inputs full from the start the inputs must alternate (round-robin).
// A stray entry without a first-of-frame mark must be dropped (dropped
// pulse) and never reach the output. Event building is on: in a last phase
// pairs of labelled frames with the same label are offered on both inputs
// at once and must come out as one frame (summed length, the first frame's
// words, then the second's without its label), while a pair with different
// labels and a pair too long for one frame must come out separately.
module tb_ff_dcm;
  import ff_lynx_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  always #5 clk = ~clk;

  rx_entry_t in_entry [2];
  logic [1:0] in_valid, in_get;
  logic [15:0] data;
  logic data_valid, get_data, frm_valid, frm_get, merged, dropped;
  fd_t frm_desc;

  ff_dcm #(.N_IN(2), .EVB(1'b1)) dut (.*);

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

  rx_entry_t q0 [$], q1 [$];
  // expected frames per input: descriptor and words
  fd_t f_exp [2][$];
  logic [15:0] w_exp [2][$];
  int n_exp [2][$];
  bit src_en = 1, sink_rand = 0;

  always_comb begin
    in_entry[0] = (q0.size() > 0) ? q0[0] : '0;
    in_entry[1] = (q1.size() > 0) ? q1[0] : '0;
  end
  logic [1:0] en = 2'b11;
  assign in_valid = {q1.size() > 0 && en[1], q0.size() > 0 && en[0]};

  always @(posedge clk) begin
    if (in_get[0] && in_valid[0]) void'(q0.pop_front());
    if (in_get[1] && in_valid[1]) void'(q1.pop_front());
    if (sink_rand) begin
      get_data <= ($urandom_range(0, 2) != 0);
      frm_get  <= ($urandom_range(0, 2) != 0);
      en       <= 2'($urandom);
    end else begin
      get_data <= 1;
      frm_get  <= 1;
      en       <= 2'b11;
    end
  end

  task automatic add(input int inp, input int len);
    // dtype tells the inputs apart, so a descriptor names its input
    add_f(inp, len, 1'(inp), 1'($urandom), 16'($urandom));
  endtask

  // lab_on: labelled frame whose first word is `label`
  task automatic add_f(input int inp, input int len, input bit dt, input bit lab_on,
                       input logic [15:0] label);
    fd_t f;
    f = '{len: 4'(len), dtype: dt, label_on: lab_on, last: 1'($urandom)};
    f_exp[inp].push_back(f);
    n_exp[inp].push_back(len);
    for (int i = 0; i < (len == 0 ? 1 : len); i++) begin
      rx_entry_t e;
      e = '0;
      e.word = (i == 0 && lab_on) ? label : 16'($urandom);
      e.fd = f;
      e.sof = (i == 0);
      e.eof = (i == len - 1) || len == 0;
      e.nodata = (len == 0);
      if (len != 0) w_exp[inp].push_back(e.word);
      if (inp == 0) q0.push_back(e); else q1.push_back(e);
    end
  endtask

  // output collector
  int out_frames = 0, n_merged = 0, n_dropped = 0, alt_ok = 0, last_src = -1;
  bit in_frame = 0, strict = 0;
  int cur_src, cur_left, cur_b, n_evb = 0;
  always @(posedge clk) begin
    if (merged) n_merged++;
    if (dropped) n_dropped++;
    if (frm_valid && frm_get) begin
      check(!in_frame, "descriptor inside a frame");
      cur_src = -1;
      for (int i = 0; i < 2; i++)
        if (cur_src < 0 && f_exp[i].size() > 0 && f_exp[i][0] == frm_desc) cur_src = i;
      cur_b = -1;
      // event building: the next frames of both inputs merged, a first
      if (cur_src < 0 && f_exp[0].size() > 0 && f_exp[1].size() > 0)
        for (int a = 0; a < 2; a++) begin
          fd_t fa, fb;
          fa = f_exp[a][0];
          fb = f_exp[1-a][0];
          if (cur_src < 0 && fa.label_on && fb.label_on && w_exp[a][0] == w_exp[1-a][0] &&
              frm_desc == '{len: 4'(int'(fa.len) + int'(fb.len) - 1), dtype: fa.dtype,
                            label_on: 1'b1, last: fa.last}) begin
            cur_src = a;
            cur_b = 1 - a;
          end
        end
      check(cur_src >= 0, $sformatf("descriptor %h is the next frame of an input", frm_desc));
      if (cur_b >= 0) begin
        // merged: the words of a, then those of b without b's label
        void'(f_exp[cur_src].pop_front());
        void'(f_exp[cur_b].pop_front());
        cur_left = n_exp[cur_src].pop_front();
        for (int i = 0; i < n_exp[cur_b][0]; i++) begin
          logic [15:0] wb;
          wb = w_exp[cur_b].pop_front();
          if (i > 0) w_exp[cur_src].insert(cur_left + i - 1, wb);
        end
        cur_left += n_exp[cur_b].pop_front() - 1;
        n_evb++;
        last_src = cur_src;
        out_frames++;
        in_frame = 1;
      end else if (cur_src >= 0) begin
        void'(f_exp[cur_src].pop_front());
        cur_left = n_exp[cur_src].pop_front();
        if (strict && last_src >= 0) begin
          check(cur_src != last_src, "round-robin alternation");
          alt_ok++;
        end
        last_src = cur_src;
        out_frames++;
        in_frame = (cur_left > 0);
      end
    end else if (data_valid && get_data) begin
      check(in_frame, "word outside a frame");
      if (in_frame) begin
        logic [15:0] w;
        w = w_exp[cur_src].pop_front();
        check(data == w, $sformatf("word %h exp %h", data, w));
        cur_left--;
        if (cur_left == 0) in_frame = 0;
      end
    end
  end

  initial begin
    int total;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: both inputs full, free-running sink: strict alternation
    strict = 1;
    for (int k = 0; k < 6; k++) begin
      add(0, $urandom_range(0, 15));
      add(1, $urandom_range(0, 15));
    end
    total = 12;
    while (out_frames < 11) @(posedge clk);
    strict = 0;
    while (q0.size() + q1.size() > 0) @(posedge clk);
    // phase 2: random valid and stalls, stray entry on input 1
    sink_rand = 1;
    begin
      rx_entry_t e;
      e = '0;
      e.word = 16'hdead;
      e.eof = 1;
      q1.push_back(e);
    end
    for (int k = 0; k < 20; k++) begin
      int i;
      i = $urandom_range(0, 1);
      add(i, $urandom_range(0, 15));
      total++;
      repeat ($urandom_range(0, 30)) @(posedge clk);
    end
    while (q0.size() + q1.size() > 0 || in_frame) @(posedge clk);
    repeat (5) @(posedge clk);
    // phase 3: event building, both inputs offered at once
    sink_rand = 0;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 6; k++) begin
      logic [15:0] lab;
      lab = 16'($urandom);
      add_f(0, $urandom_range(2, 8), 1'b0, 1'b1, lab);
      add_f(1, $urandom_range(2, 8), 1'b1, 1'b1, lab);
      total++;
    end
    add_f(0, 4, 1'b0, 1'b1, 16'h1234);     // different labels
    add_f(1, 4, 1'b1, 1'b1, 16'h4321);
    add_f(0, 9, 1'b0, 1'b1, 16'h5555);     // 9 + 9 - 1 > 15 words
    add_f(1, 9, 1'b1, 1'b1, 16'h5555);
    total += 4;
    while (q0.size() + q1.size() > 0 || in_frame) @(posedge clk);
    repeat (5) @(posedge clk);
    check(n_evb == 6, $sformatf("%0d frame pairs merged by event building, 6 expected", n_evb));
    check(out_frames == total, $sformatf("%0d frames out of %0d", out_frames, total));
    check(n_merged == total, $sformatf("merged %0d", n_merged));
    check(n_dropped == 1, $sformatf("dropped %0d", n_dropped));
    check(alt_ok >= 9, $sformatf("alternation checked %0d times", alt_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
