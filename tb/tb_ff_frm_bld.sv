// tb_ff_frm_bld: checks FRM_BLD (with a TX_BUF holding the words).
// Frames of several lengths, with and without label and CRC, are requested;
// the testbench grants the header one cycle after the request and stalls the
// builder on chosen cycles (as a fixed-latency frame would). The FRM bits of
// every non-stalled cycle after the grant are collected and compared with a
// frame built by the reference model: Hamming descriptor, words, CRC, zero
// padding, and the number of cycles the frame takes.
module tb_ff_frm_bld;
  import ff_lynx_pkg::*;
  import ff_ref_pkg::*;
  localparam int FRM_W = 6;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge, so the asynchronous resets act at once
  logic tick, host_ce, crc_en, frm_valid, frm_get, buf_rd, hdr_req, hdr_gnt, stall, busy;
  fd_t frm_desc;
  logic [15:0] data, buf_data;
  logic data_valid, get_data;
  logic [5:0] buf_count;
  logic [FRM_W-1:0] frm_bits;
  logic [2:0] div = 0;
  int checks = 0, failures = 0;
  bit grant_on = 0;
  logic [15:0] stall_mask = 0;
  int cyc = 0;

  ff_tx_buf #(.DEPTH(32)) u_buf (.clk, .rst_n, .host_ce(1'b1), .data, .data_valid, .get_data,
    .rd_en(buf_rd), .rd_data(buf_data), .count(buf_count));
  ff_frm_bld #(.FRM_W(FRM_W), .CW(6)) dut (.*);

  always #5 clk = ~clk;
  assign tick    = (div == 3'd7);
  assign host_ce = 1'b1;
  always @(posedge clk) div <= div + 1;
  assign hdr_gnt = tick && hdr_req && grant_on;
  assign stall   = tick && busy && !hdr_gnt && stall_mask[cyc % 16];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame(input int len, input bit lab, input bit crc, input logic [15:0] seed,
                            input logic [15:0] smask);
    logic [15:0] w [16];
    logic [511:0] exp_bits, got_bits;
    int nbits, ncyc, got, stalls;
    fd_t f;
    f = '{len: 4'(len), dtype: seed[0], label_on: lab, last: seed[1]};
    for (int i = 0; i < 16; i++) w[i] = (i < len) ? seed * 16'(i + 3) ^ 16'h5a5a : 16'h0;
    crc_en = crc;
    // descriptor, then words
    @(negedge clk);
    frm_desc = f; frm_valid = 1;
    @(negedge clk); frm_valid = 0;
    for (int i = 0; i < len; i++) begin
      data = w[i]; data_valid = 1;
      @(negedge clk);
    end
    data_valid = 0;
    // expected bit string, MSB first, left aligned
    exp_bits = '0;
    nbits = 0;
    for (int b = 11; b >= 0; b--) begin exp_bits[511-nbits] = ref_fd(f)[b]; nbits++; end
    for (int i = 0; i < len; i++)
      for (int b = 15; b >= 0; b--) begin exp_bits[511-nbits] = w[i][b]; nbits++; end
    if (crc)
      for (int b = 7; b >= 0; b--) begin exp_bits[511-nbits] = ref_crc8(w, len)[b]; nbits++; end
    ncyc = (nbits + FRM_W - 1) / FRM_W;
    // grant and collect
    stall_mask = smask;
    col_n = 0; col_bits = '0; col_stalls = 0; cyc = 0;
    grant_on = 1;
    while (!sending) @(negedge clk);
    grant_on = 0;
    while (sending) @(negedge clk);
    got = col_n; got_bits = col_bits; stalls = col_stalls;
    check(got == ncyc, $sformatf("len %0d: %0d cycles, expected %0d", len, got, ncyc));
    check(got_bits[511 -: 256] == exp_bits[511 -: 256],
          $sformatf("len %0d lab %0d crc %0d: bits\n got %h\n exp %h", len, lab, crc,
                    got_bits[511 -: 256], exp_bits[511 -: 256]));
    check(smask == 0 || stalls > 0, "stall exercised");
    stall_mask = 0;
  endtask

  // collector: a tick emits frame bits when it grants the header or when a
  // frame is being sent, unless it is a stall tick
  bit sending = 0, emit = 0;
  int col_n = 0, col_stalls = 0;
  logic [511:0] col_bits;
  always @(posedge clk) begin
    emit <= tick && !stall && (hdr_gnt || (sending && busy));
    if (tick) begin
      cyc <= cyc + 1;
      if (stall) col_stalls <= col_stalls + 1;
      if (hdr_gnt) sending <= 1;
      else if (sending && !busy) sending <= 0;
    end
  end
  always @(negedge clk) if (emit) begin
    for (int i = 0; i < FRM_W; i++) col_bits[511 - col_n*FRM_W - i] = frm_bits[FRM_W-1-i];
    col_n++;
  end

  initial begin
    frm_valid = 0; frm_desc = '0; data = 0; data_valid = 0; crc_en = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_frame(4, 1, 1, 16'h1234, 16'b0000_0000_0000_0000);
    send_frame(1, 1, 0, 16'h0bad, 16'b0000_0000_0000_0000);
    send_frame(0, 0, 0, 16'h0002, 16'b0000_0000_0000_0000);
    send_frame(15, 1, 1, 16'h7777, 16'b0000_0110_0001_1100);
    send_frame(3, 0, 1, 16'h4321, 16'b0000_0000_0000_0110);
    check(!busy && buf_count == 0, "idle and buffer empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
