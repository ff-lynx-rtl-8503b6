// tb_ff_rx: checks FF-RX over a link driven by an FF-TX (up-link settings,
// 8 bits per reference cycle, fixed-latency frames on).
//
// The transmitter's serial output reaches the receiver through a delay of a
// few bit clocks, so the receiver has to find the reference cycle by itself.
// The testbench:
//  * waits for lock (the transmitter sends its sync patterns after reset);
//  * sends VL frames of random length, label and data through the
//    transmitter's host port and compares every entry the receiver delivers
//    (word, descriptor, first/last marks, CRC flag) with what was sent, while
//    the receiver's host drops get_data at random (flow control);
//  * sends clusters of hits; every fixed-latency frame must arrive with a trigger pulse,
//    and every decoded hit address must be one that was sent and not lost;
//    the trigger pulse must come a fixed number of clocks after the first
//    hit of its window (the same for every frame);
//  * flips one THS bit of a pattern on the line; each must be corrected (ths_corr)
//    without losing a frame.
module tb_ff_rx;
  import ff_lynx_pkg::*;
  import ff_ref_pkg::*;
  localparam int SPEED = 8, NC = 3, NH = 2, HPC = 2, ADDR_W = 5, DLY = 5;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  always #5 clk = ~clk;

  // transmitter
  logic crc_en = 1;
  logic [15:0] t_data;
  logic t_valid, t_get, f_valid, f_get, trg_late, sync_req;
  fd_t f_desc;
  logic [HPC-1:0] hit_valid;
  logic [ADDR_W-1:0] hit_addr [HPC];
  logic tick, dat;
  logic [3:0] hits_lost, hits_carried;

  ff_tx u_tx (
    .clk, .rst_n, .crc_en, .host_ce(1'b1), .data(t_data), .data_valid(t_valid),
    .get_data(t_get), .frm_valid(f_valid), .frm_desc(f_desc), .frm_get(f_get),
    .trg_in(1'b0), .sync_req, .hit_valid, .hit_addr, .tick, .dat, .trg_late,
    .hits_lost, .hits_carried
  );

  // line: delay and bit flips on THS bits
  logic [DLY-1:0] line = '0;
  logic [2:0] ph = 0;
  bit flip_req = 0;
  int flips = 0;
  logic dat_rx;
  logic [1:0] cur_ths = 0, prev_ths = 0;
  logic do_flip;
  // flip the second bit of the first cycle of a pattern (the transmitter's
  // THS pair for the current cycle is observed inside it)
  assign do_flip = flip_req && ph == 3'd1 && cur_ths != 0 && prev_ths == 0;
  always @(posedge clk) begin
    ph <= tick ? 3'd0 : ph + 3'd1;
    if (tick) begin
      cur_ths <= u_tx.ths_bits;
      prev_ths <= cur_ths;
    end
    line <= {line[DLY-2:0], dat ^ do_flip};
    if (do_flip) begin
      flip_req <= 0;
      flips++;
    end
  end
  assign dat_rx = line[DLY-1];

  // receiver
  rx_entry_t entry;
  logic r_valid, r_get, tick_rx, locked, trg_out, fl_valid, fl_err;
  logic [$clog2(NH+1)-1:0] fl_n;
  logic [ADDR_W-1:0] fl_addr [NH];
  logic signed [clog2_min1(NC):0] fl_time [NH];
  logic ths_corr, ths_err, fd_err, frm_done, overflow, sync_det;

  ff_rx dut (
    .clk, .rst_n, .dat(dat_rx), .crc_en, .host_ce(1'b1), .entry, .data_valid(r_valid),
    .get_data(r_get), .tick_rx, .locked, .trg_out, .fl_valid, .fl_n, .fl_addr, .fl_time,
    .fl_err, .ths_corr, .ths_err, .fd_err, .frm_done, .overflow, .sync_det
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected entries (VL words) in order
  logic [15:0] exp_w [$];
  fd_t         exp_fd [$];
  bit          exp_sof [$], exp_eof [$], exp_nod [$];
  int got_entries = 0, stalls = 0;

  always @(posedge clk) begin
    if (rst_n) r_get <= ($urandom_range(0, 3) != 0);
    if (r_valid && !r_get) stalls++;
    if (r_valid && r_get) begin
      got_entries++;
      if (exp_w.size() == 0) check(0, "entry with nothing expected");
      else begin
        logic [15:0] w;
        fd_t f;
        bit s, e, n;
        w = exp_w.pop_front(); f = exp_fd.pop_front();
        s = exp_sof.pop_front(); e = exp_eof.pop_front(); n = exp_nod.pop_front();
        check((n || entry.word == w) && entry.fd == f && entry.sof == s && entry.eof == e &&
              entry.nodata == n && !entry.crc_err,
              $sformatf("entry %0d: word %h/%h fd %h/%h sof %0d/%0d eof %0d/%0d nod %0d crc %0d",
                        got_entries, entry.word, w, entry.fd, f, entry.sof, s, entry.eof, e,
                        entry.nodata, entry.crc_err));
      end
    end
  end

  // hits and fixed-latency frames
  int hits_sent = 0, hits_got = 0, fl_frames = 0, trgs = 0, corrs = 0, lost_tot = 0;
  bit addr_sent [2**ADDR_W];
  longint first_hit_t [$];
  longint lat0 = -1;
  longint now = 0;
  bit win_open = 0;
  int win_cnt = 0;
  always @(posedge clk) begin
    now++;
    if (trg_out) trgs++;
    if (ths_corr) corrs++;
    if (hits_lost != 0) lost_tot += int'(hits_lost);
    // window tracking at the transmitter: a window opens on the first hit
    if (tick) begin
      if (win_open) begin
        win_cnt++;
        if (win_cnt == NC) win_open = 0;
      end
      if (!win_open && hit_valid != 0) begin
        win_open = 1;
        win_cnt = 0;
        first_hit_t.push_back(now);
      end
    end
    if (trg_out) begin
      if (first_hit_t.size() == 0) check(0, "trigger without hits");
      else begin
        longint l;
        l = now - first_hit_t.pop_front();
        if (lat0 < 0) lat0 = l;
        check(l == lat0, $sformatf("trigger latency %0d clocks, first frame %0d", l, lat0));
      end
    end
    if (fl_valid) begin
      fl_frames++;
      check(!fl_err, "FL frame without error");
      for (int j = 0; j < NH; j++)
        if (j < int'(fl_n)) begin
          hits_got++;
          check(addr_sent[fl_addr[j]], $sformatf("FL hit address %0d was sent", fl_addr[j]));
        end
    end
  end

  task automatic send_frame(input int len, input bit lab);
    logic [15:0] w [16];
    fd_t f;
    f = '{len: 4'(len), dtype: 1'($urandom), label_on: lab, last: 1'($urandom)};
    for (int i = 0; i < len; i++) w[i] = 16'($urandom);
    if (len == 0) begin
      exp_w.push_back(0); exp_fd.push_back(f);
      exp_sof.push_back(1); exp_eof.push_back(1); exp_nod.push_back(1);
    end
    for (int i = 0; i < len; i++) begin
      exp_w.push_back(w[i]); exp_fd.push_back(f);
      exp_sof.push_back(i == 0); exp_eof.push_back(i == len - 1); exp_nod.push_back(0);
    end
    @(negedge clk);
    f_desc = f; f_valid = 1;
    do @(posedge clk); while (!f_get);
    @(negedge clk); f_valid = 0;
    for (int i = 0; i < len; i++) begin
      t_data = w[i]; t_valid = 1;
      do @(posedge clk); while (!t_get);
      @(negedge clk);
    end
    t_valid = 0;
  endtask

  // clusters: one reference cycle with 1..HPC hits (never more than a frame
  // holds), then a random gap longer than the window
  task automatic hits(input int nclus);
    for (int c = 0; c < nclus; c++) begin
      int n;
      @(negedge clk);
      while (!tick) @(negedge clk);
      n = $urandom_range(1, HPC);
      for (int h = 0; h < HPC; h++) begin
        hit_valid[h] = (h < n);
        hit_addr[h] = ADDR_W'($urandom);
        if (hit_valid[h]) begin
          addr_sent[hit_addr[h]] = 1;
          hits_sent++;
        end
      end
      @(posedge clk);
      #1 hit_valid = '0;
      repeat (SPEED * (NC + 1 + $urandom_range(0, 6))) @(posedge clk);
    end
  endtask

  initial begin
    longint t0;
    t_valid = 0; f_valid = 0; t_data = 0; f_desc = '0; sync_req = 0; hit_valid = '0;
    hit_addr = '{default: '0};
    repeat (5) @(posedge clk);
    rst_n = 1;
    t0 = now;
    while (!locked && now < 3000) @(posedge clk);
    check(locked, "receiver locks on the sync patterns");
    $display("locked after %0d clocks", now - t0);
    // VL frames
    for (int k = 0; k < 12; k++) send_frame($urandom_range(0, 15), 1'($urandom));
    // hits with VL traffic in between
    fork
      hits(40);
      for (int k = 0; k < 8; k++) send_frame($urandom_range(1, 10), 1);
    join
    // single THS bit flips
    for (int k = 0; k < 6; k++) begin
      repeat (200) @(posedge clk);
      flip_req = 1;
      fork send_frame(3, 1); wait (!flip_req); join
    end
    repeat (3000) @(posedge clk);
    check(exp_w.size() == 0, $sformatf("all entries received, %0d missing", exp_w.size()));
    check(fl_frames > 10, $sformatf("%0d FL frames received", fl_frames));
    check(trgs == fl_frames, $sformatf("one trigger per FL frame: %0d/%0d", trgs, fl_frames));
    check(hits_got + lost_tot == hits_sent,
          $sformatf("hits: %0d received + %0d lost = %0d sent", hits_got, lost_tot, hits_sent));
    check(flips == 6 && corrs == 6, $sformatf("THS flips %0d corrected %0d", flips, corrs));
    check(stalls > 0, "host flow control exercised");
    check(!ths_err && locked, "still locked");
    $display("entries %0d, FL frames %0d, hits %0d sent %0d lost, latency %0d clocks",
             got_entries, fl_frames, hits_sent, lost_tot, lat0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
