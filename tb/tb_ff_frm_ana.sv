// tb_ff_frm_ana: checks FRM_ANA on its own, with the reference-cycle stream
// built by the testbench (6 FRM bits per cycle, one ce clock in 8).
//
// Each VL frame is built from the reference models (Hamming descriptor,
// words, CRC-8, zero padding) and cut into cycles; the header verdict is
// given on the frame's third cycle, as the THS detector would. Some frames
// are interrupted by a fixed-latency frame (trigger verdict on its third
// cycle, NC cycles of FL data), which must come out on fl_bits with
// fl_first on its first cycle while the VL frame resumes unharmed.
// Checked: every buffer entry (word, descriptor, sof/eof, nodata, crc_err,
// fd_corr), fd_err for a descriptor with two flipped bits (frame dropped),
// crc_err for a corrupted word, fd_corr for one flipped descriptor bit,
// and frm_done once per frame.
module tb_ff_frm_ana;
  import ff_lynx_pkg::*;
  import ff_ref_pkg::*;
  localparam int FRM_W = 6, NC = 3;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  always #5 clk = ~clk;

  logic ce = 0, crc_en = 1;
  logic [FRM_W-1:0] frm = '0;
  ths_pat_e pat = PAT_NONE;
  logic fl_ce, fl_first, wr_en, fd_err, frm_done;
  logic [FRM_W-1:0] fl_bits;
  rx_entry_t wr_entry;

  ff_frm_ana #(.FRM_W(FRM_W), .NC(NC), .FL_EN(1'b1)) dut (.*);

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

  // one reference cycle
  task automatic cycle(input logic [FRM_W-1:0] b, input ths_pat_e p);
    @(negedge clk);
    frm = b; pat = p; ce = 1;
    @(negedge clk);
    ce = 0; pat = PAT_NONE;
    repeat (6) @(negedge clk);
  endtask

  rx_entry_t exp_q [$];
  logic [FRM_W-1:0] fl_exp [$];
  int n_done = 0, n_fderr = 0, n_fl = 0, n_first = 0;

  always @(posedge clk) begin
    if (frm_done) n_done++;
    if (fd_err) n_fderr++;
    if (fl_ce) begin
      n_fl++;
      if (fl_first) n_first++;
      if (fl_exp.size() == 0) check(0, "unexpected FL cycle");
      else check(fl_bits == fl_exp.pop_front(), "FL bits");
    end
    if (wr_en) begin
      if (exp_q.size() == 0) check(0, "unexpected entry");
      else begin
        rx_entry_t e;
        e = exp_q.pop_front();
        if (e.nodata) e.word = wr_entry.word;
        check(wr_entry == e, $sformatf("entry got %h exp %h", wr_entry, e));
      end
    end
  end

  // frame: fd_flips = descriptor bits to flip, bad_word = word index to
  // corrupt after the CRC is computed (-1: none), fl_at = cycle of the frame
  // where an FL frame starts (-1: none)
  task automatic frame(input int len, input bit lab, input logic [11:0] fd_flips,
                       input int bad_word, input int fl_at);
    logic [15:0] w [16];
    logic [511:0] bits;
    int nb, ncyc, c, fc;
    fd_t f;
    logic [11:0] code;
    logic [7:0] crc;
    f = '{len: 4'(len), dtype: 1'($urandom), label_on: lab, last: 1'($urandom)};
    for (int i = 0; i < 16; i++) w[i] = (i < len) ? 16'($urandom) : 16'h0;
    crc = ref_crc8(w, len);
    code = ref_fd(f) ^ fd_flips;
    // expected entries
    if ($countones(fd_flips) < 2) begin
      for (int i = 0; i < (len == 0 ? 1 : len); i++) begin
        rx_entry_t e;
        e.word = (i == bad_word) ? w[i] ^ 16'h0100 : w[i];
        e.fd = f;
        e.sof = (i == 0);
        e.eof = (i == len - 1) || len == 0;
        e.nodata = (len == 0);
        e.crc_err = crc_en && (i == len - 1) && bad_word >= 0;
        e.fd_corr = (fd_flips != 0);
        exp_q.push_back(e);
      end
    end
    if (bad_word >= 0) w[bad_word] ^= 16'h0100;
    bits = '0;
    nb = 0;
    for (int b = 11; b >= 0; b--) begin bits[511-nb] = code[b]; nb++; end
    for (int i = 0; i < len; i++)
      for (int b = 15; b >= 0; b--) begin bits[511-nb] = w[i][b]; nb++; end
    if (crc_en)
      for (int b = 7; b >= 0; b--) begin bits[511-nb] = crc[b]; nb++; end
    ncyc = (nb + FRM_W - 1) / FRM_W;
    c = 0;
    fc = 0;
    while (c < ncyc) begin
      if (fc == fl_at && fl_at >= 0) begin
        for (int k = 0; k < NC; k++) begin
          logic [FRM_W-1:0] x;
          x = FRM_W'($urandom);
          fl_exp.push_back(x);
          cycle(x, (k == 2) ? PAT_TRG : PAT_NONE);
          fc++;
        end
      end else begin
        cycle(bits[511 - c*FRM_W -: FRM_W], (fc == 2) ? PAT_HDR : PAT_NONE);
        c++;
        fc++;
      end
    end
    // at least one idle cycle after the header's third cycle
    while (fc < 3) begin
      cycle('0, (fc == 2) ? PAT_HDR : PAT_NONE);
      fc++;
    end
  endtask

  initial begin
    int nframes;
    repeat (3) @(posedge clk);
    rst_n = 1;
    nframes = 0;
    frame(3, 1, 12'h000, -1, -1); nframes++;                       // plain, 3 words + CRC
    frame(0, 0, 12'h000, -1, -1); nframes++;                       // no words
    frame(15, 1, 12'h000, -1, 5); nframes++;                       // FL frame inside
    frame(4, 0, 12'h010, -1, -1); nframes++;                       // one FD bit flipped
    frame(2, 1, 12'h000, 1, -1); nframes++;                        // CRC error
    frame(5, 1, 12'h003, -1, -1); nframes++;                       // FD double error
    frame(1, 1, 12'h000, -1, 3); nframes++;                        // FL on the CRC cycle
    crc_en = 0;
    frame(6, 0, 12'h000, -1, 3); nframes++;                        // no CRC, FL right after the header
    for (int k = 0; k < 10; k++) begin
      frame($urandom_range(0, 15), 1'($urandom), 12'h000, -1,
            ($urandom_range(0, 1) != 0) ? $urandom_range(3, 8) : -1);
      nframes++;
    end
    for (int k = 0; k < 4; k++) cycle('0, PAT_NONE);
    check(exp_q.size() == 0, $sformatf("%0d entries missing", exp_q.size()));
    check(fl_exp.size() == 0, $sformatf("%0d FL cycles missing", fl_exp.size()));
    check(n_fderr == 1, $sformatf("fd_err %0d, expected 1", n_fderr));
    check(n_done == nframes - 1, $sformatf("frm_done %0d, expected %0d", n_done, nframes - 1));
    check(n_first * NC == n_fl && n_first >= 3, $sformatf("FL frames %0d cycles %0d", n_first, n_fl));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
