// tb_ff_star: the star topology. Four front-end links at 4x are received
// and merged by one data concentrator (N_IN = 4) into a single 16x link:
//
//   source s (FF-TX 4x) -> FF-RX 4x -> DCM input s -> FF-TX 16x -> FF-RX 16x
//
// Each source sends labelled frames of 1 to 8 words at random intervals;
// the label is {source, sequence number}. At the far end every frame must
// arrive whole, words in order, CRC clean, and in sequence per source; all
// frames sent must arrive. The 4x-to-16x merge follows the published star
// example; the traffic pattern is this testbench's.
// All links here run on one bit clock, so the 16x link has the bit rate of
// a 4x link and a reference cycle four times longer (in hardware the
// reference clock is shared and the 16x bit clock is four times faster).
// The sources are therefore loaded lightly (a frame every ~1700 clocks), so
// that the test checks merging, not the rate of the central link.
module tb_ff_star;
  import ff_lynx_pkg::*;
  localparam int NS = 4, NFR = 40;

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

  logic [4:0] no_addr [2];
  assign no_addr = '{default: '0};

  // words sent per source, in order (label first)
  logic [15:0] expq [NS][$];
  int sent_fr [NS];
  rx_entry_t c_entry [NS];
  logic [NS-1:0] c_valid, c_get, c_locked;

  for (genvar s = 0; s < NS; s++) begin : g_src
    logic [15:0] data;
    logic data_valid, get_data, frm_valid, frm_get, dat, tick, trg_late, r_trg;
    fd_t frm_desc;
    logic [3:0] lost, carried;
    logic tick_rx, fl_valid, fl_err, ths_corr, ths_err, fd_err, frm_done, overflow, sync_det;
    logic [1:0] fl_n;
    logic [4:0] fl_addr [2];
    logic signed [2:0] fl_time [2];

    ff_tx #(.SPEED(4), .FL_EN(1'b0)) u_tx (
      .clk, .rst_n, .crc_en(1'b1), .host_ce(1'b1), .data, .data_valid, .get_data,
      .frm_valid, .frm_desc, .frm_get, .trg_in(1'b0), .sync_req(1'b0), .hit_valid('0),
      .hit_addr(no_addr), .tick, .dat, .trg_late, .hits_lost(lost), .hits_carried(carried)
    );
    ff_rx #(.SPEED(4), .FL_EN(1'b0)) u_rx (
      .clk, .rst_n, .dat, .crc_en(1'b1), .host_ce(1'b1), .entry(c_entry[s]),
      .data_valid(c_valid[s]), .get_data(c_get[s]), .tick_rx, .locked(c_locked[s]),
      .trg_out(r_trg), .fl_valid, .fl_n, .fl_addr, .fl_time, .fl_err, .ths_corr, .ths_err,
      .fd_err, .frm_done, .overflow, .sync_det
    );

    initial begin
      data_valid = 0; frm_valid = 0; data = '0; frm_desc = '0;
      sent_fr[s] = 0;
      wait (rst_n);
      repeat (600) @(posedge clk);
      for (int k = 0; k < NFR; k++) begin
        int len;
        fd_t f;
        len = $urandom_range(1, 8);
        f = '{len: 4'(len), dtype: 1'($urandom), label_on: 1'b1, last: 1'($urandom)};
        repeat ($urandom_range(0, 3000)) @(posedge clk);
        @(negedge clk);
        frm_desc = f;
        frm_valid = 1;
        do @(posedge clk); while (!frm_get);
        @(negedge clk);
        frm_valid = 0;
        for (int i = 0; i < len; i++) begin
          data = (i == 0) ? {2'(s), 14'(k)} : 16'($urandom);
          data_valid = 1;
          expq[s].push_back(data);
          do @(posedge clk); while (!get_data);
          @(negedge clk);
        end
        data_valid = 0;
        sent_fr[s]++;
      end
    end
  end

  // concentrator onto the 16x link
  logic [15:0] m_data;
  logic m_valid, m_get, m_frm_valid, m_frm_get, merged, dropped;
  fd_t m_desc;
  ff_dcm #(.N_IN(NS)) u_dcm (
    .clk, .rst_n, .in_entry(c_entry), .in_valid(c_valid), .in_get(c_get), .data(m_data),
    .data_valid(m_valid), .get_data(m_get), .frm_valid(m_frm_valid), .frm_desc(m_desc),
    .frm_get(m_frm_get), .merged, .dropped
  );

  logic dat16, tick16, late16;
  logic [3:0] lost16, carried16;
  ff_tx #(.SPEED(16), .FL_EN(1'b0)) u_tx16 (
    .clk, .rst_n, .crc_en(1'b1), .host_ce(1'b1), .data(m_data), .data_valid(m_valid),
    .get_data(m_get), .frm_valid(m_frm_valid), .frm_desc(m_desc), .frm_get(m_frm_get),
    .trg_in(1'b0), .sync_req(1'b0), .hit_valid('0), .hit_addr(no_addr), .tick(tick16),
    .dat(dat16), .trg_late(late16), .hits_lost(lost16), .hits_carried(carried16)
  );

  rx_entry_t entry;
  logic r_valid, tick_rx, locked, trg_out, fl_valid, fl_err, ths_corr, ths_err, fd_err;
  logic frm_done, overflow, sync_det;
  logic [1:0] fl_n;
  logic [4:0] fl_addr [2];
  logic signed [2:0] fl_time [2];
  ff_rx #(.SPEED(16), .FL_EN(1'b0)) u_rx16 (
    .clk, .rst_n, .dat(dat16), .crc_en(1'b1), .host_ce(1'b1), .entry, .data_valid(r_valid),
    .get_data(1'b1), .tick_rx, .locked, .trg_out, .fl_valid, .fl_n, .fl_addr, .fl_time,
    .fl_err, .ths_corr, .ths_err, .fd_err, .frm_done, .overflow, .sync_det
  );

  // far-end checker
  int cur = -1, got_fr [NS], n_merged = 0, next_seq [NS];
  initial for (int s = 0; s < NS; s++) begin got_fr[s] = 0; next_seq[s] = 0; end
  always @(posedge clk) begin
    if (merged) n_merged++;
    if (r_valid) begin
      logic [15:0] w;
      if (entry.sof) begin
        cur = int'(entry.word[15:14]);
        check(int'(entry.word[13:0]) == next_seq[cur],
              $sformatf("source %0d frame %0d, expected %0d", cur, entry.word[13:0], next_seq[cur]));
        next_seq[cur]++;
      end
      if (cur < 0 || expq[cur].size() == 0) check(0, "word with nothing expected");
      else begin
        w = expq[cur].pop_front();
        check(entry.word == w && !entry.crc_err,
              $sformatf("source %0d word %h, expected %h, crc_err %0d", cur, entry.word, w, entry.crc_err));
      end
      if (entry.eof && cur >= 0) got_fr[cur]++;
    end
  end

  initial begin
    int done;
    repeat (5) @(posedge clk);
    rst_n = 1;
    do begin
      repeat (1000) @(posedge clk);
      done = 1;
      for (int s = 0; s < NS; s++) if (got_fr[s] < NFR) done = 0;
    end while (!done && $time < 3500000);
    repeat (100) @(posedge clk);
    check(c_locked == '1 && locked, "all links locked");
    for (int s = 0; s < NS; s++)
      check(got_fr[s] == NFR && sent_fr[s] == NFR && expq[s].size() == 0,
            $sformatf("source %0d: %0d of %0d frames", s, got_fr[s], sent_fr[s]));
    check(n_merged == NS * NFR, $sformatf("%0d frames through the concentrator", n_merged));
    check(!dropped, "nothing dropped");
    $display("star: %0d frames from %0d sources over one 16x link", n_merged, NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
