// tb_ff_lynx_node: end-to-end test of a piece of an FF-LYNX ring, with every
// node at its default parameters (8 bits per reference cycle, up-link with
// fixed-latency trigger frames, NC = 3, NH = 2).
//
//   source S (FF-TX) --+--> A.in0, A.in1
//                      +--> B.in1                (bypass around A)
//   A.out0 --> B.in0,  A.out1 --> C.in1          (bypass around B)
//   B.out0 --> C.in0   (cut by the testbench to simulate a failed node B)
//   C.out0 --> sink K (FF-RX)
//
// S and every node send local VL frames whose words are tagged {origin,
// frame number, word index}; the sink checks that every frame arrives
// whole, in order per origin, with a good CRC, and counts frames per
// origin. Nodes receive hits from their chip; the FL frames they send are
// decoded by the next receiver (node or sink) and checked against the
// addresses sent. The test runs in three phases:
//   1. normal ring: all frames of S, A, B and C must reach the sink;
//   2. node B fails (its output stuck at 0): C must lose the primary link,
//      switch to the bypass link from A, and deliver the frames of S, A and
//      C sent after the switch; B's frames are lost;
//   3. node B recovers: C must switch back, and B's frames arrive again.
// Mechanisms counted (each must happen at least once, or it is a failure):
// receiver lock, VL frames delivered, CRC checked, FL frames decoded (at a
// node and at the sink), VL frame suspended by an FL frame (pre-emption),
// hit recovered into the next window, hit lost, host flow control at the
// sink, back-pressure from a transmit buffer into a concentrator,
// concentrator merges, redundancy switch (to bypass and back), corrected
// THS pattern after a bit flip on a link.
module tb_ff_lynx_node;
  import ff_lynx_pkg::*;
  localparam int NH = 2, HPC = 2, ADDR_W = 5, NN = 3;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- source
  logic [15:0] s_data = 0;
  logic s_valid = 0, s_get, s_fvalid = 0, s_fget, s_tick, s_dat, s_late;
  fd_t s_desc = '0;
  logic [HPC-1:0] s_hit = '0;
  logic [ADDR_W-1:0] s_addr [HPC] = '{default: '0};
  logic [3:0] s_lost, s_carr;

  ff_tx u_src (
    .clk, .rst_n, .crc_en(1'b1), .host_ce(1'b1), .data(s_data), .data_valid(s_valid),
    .get_data(s_get), .frm_valid(s_fvalid), .frm_desc(s_desc), .frm_get(s_fget),
    .trg_in(1'b0), .sync_req(1'b0), .hit_valid(s_hit), .hit_addr(s_addr), .tick(s_tick),
    .dat(s_dat), .trg_late(s_late), .hits_lost(s_lost), .hits_carried(s_carr)
  );

  // ----------------------------------------------------------------- nodes
  logic [1:0] din [NN], dout [NN];
  rx_entry_t loc_entry [NN];
  logic loc_valid [NN], loc_get [NN], loc_tick [NN];
  logic [HPC-1:0] hit_valid [NN];
  logic [ADDR_W-1:0] hit_addr [NN][HPC];
  logic [3:0] hits_lost [NN], hits_carried [NN];
  logic trg_out [NN], fl_valid [NN];
  logic [1:0] fl_n [NN];
  logic [ADDR_W-1:0] fl_addr [NN][NH];
  logic signed [2:0] fl_time [NN][NH];
  logic [1:0] rx_locked [NN], rx_errors [NN];
  logic rm_sel [NN], rm_switched [NN], dcm_merged [NN];

  for (genvar n = 0; n < NN; n++) begin : g_node
    ff_lynx_node u_node (
      .clk, .rst_n, .crc_en(1'b1), .tx_en(2'b11), .dat_in(din[n]), .dat_out(dout[n]),
      .loc_entry(loc_entry[n]), .loc_valid(loc_valid[n]), .loc_get(loc_get[n]),
      .loc_tick(loc_tick[n]), .hit_valid(hit_valid[n]), .hit_addr(hit_addr[n]),
      .trg_in(1'b0), .hits_lost(hits_lost[n]), .hits_carried(hits_carried[n]),
      .trg_out(trg_out[n]), .fl_valid(fl_valid[n]), .fl_n(fl_n[n]), .fl_addr(fl_addr[n]),
      .fl_time(fl_time[n]), .rx_locked(rx_locked[n]), .rm_sel(rm_sel[n]),
      .rm_switched(rm_switched[n]), .dcm_merged(dcm_merged[n]), .rx_errors(rx_errors[n])
    );
  end

  // ------------------------------------------------------------------ links
  bit kill_b = 0, flip_req = 0;
  int flips = 0;
  logic [2:0] ph = 0;
  logic [1:0] s_ths = 0, s_prev = 0;
  logic s_line, flip_now;
  // one THS bit flipped on the source-to-A primary link, in the first cycle
  // of a pattern (the source's THS pair is observed inside it)
  assign flip_now = flip_req && ph == 3'd1 && s_ths != 0 && s_prev == 0;
  always @(posedge clk) begin
    ph <= s_tick ? 3'd0 : ph + 3'd1;
    if (s_tick) begin
      s_ths <= u_src.ths_bits;
      s_prev <= s_ths;
    end
    if (flip_now) begin
      flip_req <= 0;
      flips++;
    end
  end
  assign s_line = s_dat ^ flip_now;
  assign din[0] = {s_dat, s_line};
  assign din[1] = {s_dat, dout[0][0]};
  assign din[2] = {dout[0][1], kill_b ? 1'b0 : dout[1][0]};

  // ------------------------------------------------------------------- sink
  rx_entry_t k_entry;
  logic k_valid, k_get = 0, k_tick, k_locked, k_trg, k_flv, k_flerr;
  logic [1:0] k_fln;
  logic [ADDR_W-1:0] k_fladdr [NH];
  logic signed [2:0] k_fltime [NH];
  logic k_corr, k_therr, k_fderr, k_done, k_ovf, k_sync;

  ff_rx u_sink (
    .clk, .rst_n, .dat(dout[2][0]), .crc_en(1'b1), .host_ce(1'b1), .entry(k_entry),
    .data_valid(k_valid), .get_data(k_get), .tick_rx(k_tick), .locked(k_locked),
    .trg_out(k_trg), .fl_valid(k_flv), .fl_n(k_fln), .fl_addr(k_fladdr), .fl_time(k_fltime),
    .fl_err(k_flerr), .ths_corr(k_corr), .ths_err(k_therr), .fd_err(k_fderr),
    .frm_done(k_done), .overflow(k_ovf), .sync_det(k_sync)
  );

  // ------------------------------------------------- local frame generation
  // origin 0..2 = node A..C, 3 = source S
  rx_entry_t lq [NN][$];
  int fno [4] = '{0, 0, 0, 0};
  int sent [4] = '{0, 0, 0, 0};
  always_comb
    for (int n = 0; n < NN; n++) begin
      loc_entry[n] = (lq[n].size() > 0) ? lq[n][0] : '0;
      loc_valid[n] = (lq[n].size() > 0);
    end
  always @(posedge clk)
    for (int n = 0; n < NN; n++)
      if (loc_valid[n] && loc_get[n]) void'(lq[n].pop_front());

  function automatic logic [15:0] tag(input int o, input int f, input int i);
    return {2'(o), 6'(f), 8'(i)};
  endfunction

  task automatic node_frame(input int n, input int len);
    fd_t f;
    f = '{len: 4'(len), dtype: 1'b1, label_on: 1'b1, last: 1'b1};
    for (int i = 0; i < len; i++) begin
      rx_entry_t e;
      e = '0;
      e.word = tag(n, fno[n], i);
      e.fd = f;
      e.sof = (i == 0);
      e.eof = (i == len - 1);
      lq[n].push_back(e);
    end
    fno[n]++;
    sent[n]++;
  endtask

  task automatic src_frame(input int len);
    fd_t f;
    f = '{len: 4'(len), dtype: 1'b1, label_on: 1'b1, last: 1'b1};
    @(negedge clk);
    s_desc = f; s_fvalid = 1;
    do @(posedge clk); while (!s_fget);
    @(negedge clk); s_fvalid = 0;
    for (int i = 0; i < len; i++) begin
      s_data = tag(3, fno[3], i); s_valid = 1;
      do @(posedge clk); while (!s_get);
      @(negedge clk);
    end
    s_valid = 0;
    fno[3]++;
    sent[3]++;
  endtask

  // ------------------------------------------------------------ sink checks
  int got [4] = '{0, 0, 0, 0};
  int last_f [4] = '{-1, -1, -1, -1};
  int k_entries = 0, k_stalls = 0, crc_ok = 0;
  bit k_in = 0;
  logic [15:0] k_prev;
  always @(posedge clk) if (rst_n) begin
    k_get <= ($urandom_range(0, 4) != 0);
    if (k_valid && !k_get) k_stalls++;
    if (k_valid && k_get) begin
      k_entries++;
      check(!k_entry.crc_err, "sink: CRC good");
      if (k_entry.sof) begin
        check(!k_in, "sink: previous frame complete");
        check(k_entry.word[7:0] == 0, "sink: frame starts with word 0");
        check(int'(k_entry.word[13:8]) > last_f[k_entry.word[15:14]],
              $sformatf("sink: frames of origin %0d in order", k_entry.word[15:14]));
        last_f[k_entry.word[15:14]] = int'(k_entry.word[13:8]);
        k_in = 1;
      end else begin
        check(k_in && k_entry.word[15:8] == k_prev[15:8] && k_entry.word[7:0] == k_prev[7:0] + 1,
              $sformatf("sink: word %h follows %h", k_entry.word, k_prev));
      end
      k_prev = k_entry.word;
      if (k_entry.eof) begin
        check(int'(k_entry.fd.len) == int'(k_entry.word[7:0]) + 1, "sink: frame length");
        k_in = 0;
        got[k_entry.word[15:14]]++;
        crc_ok++;
      end
    end
  end

  // ------------------------------------------------------ mechanism counters
  int m_lock = 0, m_fl_sink = 0, m_fl_node = 0, m_preempt = 0, m_carry = 0, m_lost = 0;
  int m_txbp = 0, m_merge = 0, m_switch = 0, m_corr = 0;
  int fl_hits_sink = 0, fl_bad = 0;
  bit c_addr_sent [2**ADDR_W];
  logic k_locked_d = 0;
  always @(posedge clk) if (rst_n) begin
    k_locked_d <= k_locked;
    if (k_locked && !k_locked_d) m_lock++;
    if (k_flv) begin
      m_fl_sink++;
      if (k_flerr) fl_bad++;
      for (int j = 0; j < NH; j++)
        if (j < int'(k_fln)) begin
          fl_hits_sink++;
          check(c_addr_sent[k_fladdr[j]], $sformatf("sink: FL address %0d sent by C", k_fladdr[j]));
        end
    end
    for (int n = 0; n < NN; n++) begin
      if (fl_valid[n]) m_fl_node++;
      if (hits_carried[n] != 0) m_carry += int'(hits_carried[n]);
      if (hits_lost[n] != 0) m_lost += int'(hits_lost[n]);
      if (dcm_merged[n]) m_merge++;
      if (rm_switched[n]) m_switch++;
    end
    if (g_node[2].u_node.g_tx[0].u_tx.stall && g_node[2].u_node.g_tx[0].u_tx.tick &&
        g_node[2].u_node.g_tx[0].u_tx.u_bld.busy) m_preempt++;
    if ((g_node[0].u_node.d_valid && !g_node[0].u_node.d_get) ||
        (g_node[0].u_node.d_frm_valid && !g_node[0].u_node.d_frm_get)) m_txbp++;
    if (g_node[0].u_node.g_rx[0].u_rx.ths_corr) m_corr++;
  end

  // ------------------------------------------------------------------ hits
  int c_hits = 0;
  task automatic hit_cycle(input int n, input int nh);
    @(negedge clk);
    while (!loc_tick[n]) @(negedge clk);
    for (int h = 0; h < HPC; h++) begin
      hit_valid[n][h] = (h < nh);
      hit_addr[n][h] = ADDR_W'($urandom);
      if (h < nh && n == 2) begin
        c_addr_sent[hit_addr[n][h]] = 1;
        c_hits++;
      end
    end
    @(posedge clk);
    #1 hit_valid[n] = '0;
  endtask

  task automatic idle_cycles(input int k);
    repeat (8 * k) @(posedge clk);
  endtask

  // a burst that fills a window, loses a hit and carries two into the next
  task automatic hit_burst(input int n);
    hit_cycle(n, 2);
    hit_cycle(n, 1);
    hit_cycle(n, 2);
  endtask

  // traffic: frames from everyone, hits on every node
  task automatic traffic(input int rounds, input bit with_b);
    for (int r = 0; r < rounds; r++) begin
      fork
        src_frame($urandom_range(1, 6));
        begin
          for (int n = 0; n < NN; n++)
            if (n != 1 || with_b) node_frame(n, $urandom_range(1, 8));
        end
        begin
          for (int n = 0; n < NN; n++) begin
            if (r % 3 == 0) hit_burst(n);
            else hit_cycle(n, $urandom_range(1, 2));
          end
        end
      join
      idle_cycles($urandom_range(40, 80));
    end
  endtask

  task automatic drain(input int cycles);
    idle_cycles(cycles);
    while (k_valid) @(posedge clk);
  endtask

  initial begin
    int g0 [4], s0 [4];
    for (int n = 0; n < NN; n++) begin
      hit_valid[n] = '0;
      hit_addr[n] = '{default: '0};
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (!(k_locked && g_node[2].u_node.rx_locked == 2'b11)) @(posedge clk);
    check(g_node[0].u_node.rx_locked == 2'b11 && g_node[1].u_node.rx_locked == 2'b11,
          "every receiver locked");

    // ---- phase 1: normal ring
    traffic(6, 1);
    // a burst of long local frames at A fills its transmit buffers
    for (int k = 0; k < 4; k++) node_frame(0, 15);
    flip_req = 1;
    fork src_frame(3); wait (!flip_req); join
    drain(400);
    for (int o = 0; o < 4; o++)
      check(got[o] == sent[o], $sformatf("phase 1: origin %0d: %0d of %0d frames", o, got[o], sent[o]));
    check(g_node[2].u_node.rm_sel == 0, "phase 1: C on its primary link");

    // ---- phase 2: node B fails
    kill_b = 1;
    while (g_node[2].u_node.rm_sel == 0) @(posedge clk);
    idle_cycles(20);
    g0 = got; s0 = sent;
    traffic(4, 0);
    drain(400);
    for (int o = 0; o < 4; o++)
      if (o != 1)
        check(got[o] - g0[o] == sent[o] - s0[o],
              $sformatf("phase 2: origin %0d: %0d of %0d frames", o, got[o] - g0[o], sent[o] - s0[o]));
    check(!g_node[2].u_node.rx_locked[0], "phase 2: C lost the link from B");

    // ---- phase 3: node B back
    kill_b = 0;
    while (g_node[2].u_node.rm_sel == 1) @(posedge clk);
    idle_cycles(20);
    g0 = got; s0 = sent;
    traffic(3, 1);
    drain(400);
    for (int o = 0; o < 4; o++)
      check(got[o] - g0[o] == sent[o] - s0[o],
            $sformatf("phase 3: origin %0d: %0d of %0d frames", o, got[o] - g0[o], sent[o] - s0[o]));

    // ---- mechanisms
    m_lock += 0;
    check(m_lock >= 1, "mechanism: sink lock");
    check(k_entries > 0 && crc_ok > 20, $sformatf("mechanism: VL frames with CRC checked (%0d)", crc_ok));
    check(m_fl_sink > 5, $sformatf("mechanism: FL frames at the sink (%0d)", m_fl_sink));
    check(m_fl_node > 5, $sformatf("mechanism: FL frames at the nodes (%0d)", m_fl_node));
    check(fl_bad == 0, "FL frames without error");
    check(m_preempt >= 1, $sformatf("mechanism: VL frame suspended by an FL frame (%0d)", m_preempt));
    check(m_carry >= 1, $sformatf("mechanism: hits recovered (%0d)", m_carry));
    check(m_lost >= 1, $sformatf("mechanism: hits lost (%0d)", m_lost));
    check(k_stalls >= 1, $sformatf("mechanism: sink flow control (%0d)", k_stalls));
    check(m_txbp >= 1, $sformatf("mechanism: transmit back-pressure (%0d)", m_txbp));
    check(m_merge >= 20, $sformatf("mechanism: concentrator merges (%0d)", m_merge));
    check(m_switch == 2, $sformatf("mechanism: redundancy switches (%0d)", m_switch));
    check(flips == 1 && m_corr >= 1, $sformatf("mechanism: corrected THS (%0d)", m_corr));
    $display("frames S %0d/%0d A %0d/%0d B %0d/%0d C %0d/%0d", got[3], sent[3], got[0], sent[0],
             got[1], sent[1], got[2], sent[2]);
    $display("FL sink %0d node %0d, preempt %0d, carried %0d, lost %0d, stalls %0d, bp %0d, merges %0d, switches %0d, corr %0d",
             m_fl_sink, m_fl_node, m_preempt, m_carry, m_lost, k_stalls, m_txbp, m_merge, m_switch, m_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
