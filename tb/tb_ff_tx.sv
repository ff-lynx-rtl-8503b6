// tb_ff_tx: checks FF-TX alone, by reading its serial output at the known
// reference phase (8 bits per cycle: 2 THS bits, then 6 FRM bits).
//
// Two transmitters are tested side by side:
//  * u_dn, a down-link transmitter (no fixed-latency frames): after reset it
//    must send SYNC_N sync patterns back to back; a frame with a label, three
//    words and a CRC must go out as a header pattern whose first cycle
//    carries the start of the frame descriptor, and the frame must take
//    exactly 14 cycles (12 + 16*4 + 8 bits in 6-bit cycles); a level-1
//    trigger given during the frame must appear as a trigger pattern exactly
//    TRG_LAT + 1 = 4 cycles after the cycle it was sampled in, while the
//    frame continues without a gap. The frame bits are compared with a
//    frame built by the reference models.
//  * u_up, an up-link transmitter (fixed-latency frames, NC = 3, NH = 2):
//    hits given during a VL frame must produce a trigger pattern NC + 1
//    cycles after the first hit, and the 3 cycles that start with it carry
//    the FL frame (hit count code, hit fields, parity, checked bit by bit)
//    while the VL frame is suspended, then resumes: the VL bits collected
//    outside the FL cycles must still equal the reference frame.
module tb_ff_tx;
  import ff_lynx_pkg::*;
  import ff_ref_pkg::*;
  localparam int SPEED = 8, FRM_W = 6, NC = 3, NH = 2, HPC = 2, ADDR_W = 5, SYNC_N = 4;
  localparam int MAXC = 600;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shared host inputs
  logic crc_en = 1;
  logic [15:0] data = 0;
  logic data_valid = 0, frm_valid = 0, trg_in = 0;
  fd_t frm_desc = '0;
  logic [HPC-1:0] hit_valid = '0;
  logic [ADDR_W-1:0] hit_addr [HPC] = '{default: '0};
  logic [1:0] get_data, frm_get, tick, dat, trg_late;
  logic [3:0] lost [2], carried [2];

  ff_tx #(.FL_EN(1'b0)) u_dn (
    .clk, .rst_n, .crc_en, .host_ce(1'b1), .data, .data_valid, .get_data(get_data[0]),
    .frm_valid, .frm_desc, .frm_get(frm_get[0]), .trg_in, .sync_req(1'b0),
    .hit_valid('0), .hit_addr, .tick(tick[0]), .dat(dat[0]), .trg_late(trg_late[0]),
    .hits_lost(lost[0]), .hits_carried(carried[0])
  );
  ff_tx u_up (
    .clk, .rst_n, .crc_en, .host_ce(1'b1), .data, .data_valid, .get_data(get_data[1]),
    .frm_valid, .frm_desc, .frm_get(frm_get[1]), .trg_in(1'b0), .sync_req(1'b0),
    .hit_valid, .hit_addr, .tick(tick[1]), .dat(dat[1]), .trg_late(trg_late[1]),
    .hits_lost(lost[1]), .hits_carried(carried[1])
  );

  // deserialize both at the known phase: cycle n follows the n-th tick edge
  logic [1:0] ths_c [2][MAXC];
  logic [FRM_W-1:0] frm_c [2][MAXC];
  int tcount = 0;
  logic [2:0] ph = 0;
  logic [7:0] cur [2];
  always @(posedge clk) if (rst_n) begin
    ph <= tick[0] ? 3'd0 : ph + 3'd1;
    if (tick[0]) tcount <= tcount + 1;
  end
  always @(negedge clk) if (rst_n && tcount > 0 && tcount < MAXC) begin
    for (int i = 0; i < 2; i++) begin
      cur[i][7 - ph] = dat[i];
      if (ph == 3'd7) begin
        ths_c[i][tcount] = cur[i][7:6];
        frm_c[i][tcount] = cur[i][5:0];
      end
    end
  end

  function automatic logic [5:0] ths_at(input int i, input int c);
    return {ths_c[i][c], ths_c[i][c+1], ths_c[i][c+2]};
  endfunction

  logic [15:0] w [16];
  fd_t f;
  logic [511:0] ref_bits;
  int ref_n;

  initial begin
    int trg_t, hit_t, c, n, hs, ts, fs;
    logic [511:0] got;
    logic [17:0] flp;
    logic [6:0] h0, h1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reference frame: label + 3 words, CRC
    f = '{len: 4'd4, dtype: 1'b1, label_on: 1'b1, last: 1'b1};
    for (int i = 0; i < 16; i++) w[i] = (i < 4) ? 16'($urandom) : 16'h0;
    ref_bits = '0;
    ref_n = 0;
    for (int b = 11; b >= 0; b--) begin ref_bits[511-ref_n] = ref_fd(f)[b]; ref_n++; end
    for (int i = 0; i < 4; i++)
      for (int b = 15; b >= 0; b--) begin ref_bits[511-ref_n] = w[i][b]; ref_n++; end
    for (int b = 7; b >= 0; b--) begin ref_bits[511-ref_n] = ref_crc8(w, 4)[b]; ref_n++; end
    check((ref_n + FRM_W - 1) / FRM_W == 14, "reference frame is 14 cycles");
    // wait for the syncs, then queue the frame in both transmitters
    while (tcount < 30) @(posedge clk);
    @(negedge clk);
    frm_desc = f; frm_valid = 1;
    @(negedge clk); frm_valid = 0;
    for (int i = 0; i < 4; i++) begin
      data = w[i]; data_valid = 1;
      @(negedge clk);
    end
    data_valid = 0;
    // level-1 trigger for u_dn and a hit cluster for u_up, a few cycles on
    while (tcount < 38) @(posedge clk);
    @(negedge clk);
    while (!tick[0]) @(negedge clk);
    trg_in = 1;
    hit_valid = 2'b11;
    hit_addr = '{5'd17, 5'd6};
    @(posedge clk);
    trg_t = tcount;   // sampled on this edge
    hit_t = tcount;
    #1 trg_in = 0; hit_valid = '0;
    while (tcount < 100) @(posedge clk);

    // syncs after reset (both)
    for (int i = 0; i < 2; i++) begin
      c = 1;
      while (c < 10 && ths_c[i][c] == 2'b00) c++;
      for (int k = 0; k < SYNC_N; k++)
        check(ths_at(i, c + 3*k) == R_SYNC, $sformatf("tx %0d: sync %0d at cycle %0d", i, k, c + 3*k));
    end

    // ---- down-link: header, frame, trigger
    hs = -1; ts = -1;
    for (int k = 20; k < 90; k++) begin
      if (hs < 0 && ths_at(0, k) == R_HDR) hs = k;
      if (ts < 0 && ths_at(0, k) == R_TRG) ts = k;
    end
    check(hs > 0, "down-link header found");
    check(ts == trg_t + 4, $sformatf("trigger pattern at cycle %0d, trigger sampled at %0d", ts, trg_t));
    check(ts > hs && ts < hs + 14, "trigger sent while the frame is in progress");
    got = '0;
    for (int k = 0; k < 14; k++) got[511 - k*FRM_W -: FRM_W] = frm_c[0][hs + k];
    check(got == ref_bits, $sformatf("down-link frame bits\n got %h\n exp %h", got[511 -: 96], ref_bits[511 -: 96]));
    check(frm_c[0][hs + 14] == '0, "nothing after the 14 cycles");

    // ---- up-link: header, FL frame, resumed frame
    hs = -1; ts = -1;
    for (int k = 20; k < 90; k++) begin
      if (hs < 0 && ths_at(1, k) == R_HDR) hs = k;
      if (ts < 0 && ths_at(1, k) == R_TRG) ts = k;
    end
    check(hs > 0 && ts > hs, "up-link header, then trigger");
    check(ts == hit_t + NC + 1, $sformatf("FL trigger at cycle %0d, hits at %0d", ts, hit_t));
    flp = {frm_c[1][ts], frm_c[1][ts + 1], frm_c[1][ts + 2]};
    h0 = {2'b00, 5'd17};
    h1 = {2'b00, 5'd6};
    check(flp == {ref_cnt3(1'b1), h0, h1, ^{h0, h1}}, $sformatf("FL frame bits %b", flp));
    got = '0;
    n = 0;
    for (int k = hs; k < hs + 17; k++)
      if (k < ts || k >= ts + NC) begin
        got[511 - n*FRM_W -: FRM_W] = frm_c[1][k];
        n++;
      end
    check(n == 14 && got == ref_bits, "up-link VL frame resumes after the FL frame");
    check(lost[1] == 0 && trg_late == 0, "nothing lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
