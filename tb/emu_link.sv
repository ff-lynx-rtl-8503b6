// emu_link: one down-link (FF-TX, wire, FF-RX) loaded with level-1 triggers
// and data packets arriving as independent random (Poisson) processes, as in
// the published FPGA link-emulator runs.
//
// Per reference cycle, a trigger is requested with probability 1/TRG_PER and
// a packet (a VL frame of PCK_SIZE words, no label, random data, CRC on) is
// queued with probability 1/PCK_PER, i.e. mean rates F/TRG_PER and
// F/PCK_PER. A host process feeds the queued packets to the transmitter
// with its handshake; the receiver's buffer is read on every clock.
// Checked inside and reported as counts: every received entry must be the
// next expected word (word, descriptor, first/last marks, no CRC error);
// every trigger must come out of the receiver, with its latency from the
// request measured in clocks. Triggers that the scheduler had to delay
// (trg_late) are counted separately. `run` gates the sources.
//
// The load model follows the published emulator runs; everything else is
// this testbench's choice.
module emu_link
  import ff_lynx_pkg::*;
#(
  parameter int unsigned SPEED    = 8,
  parameter int unsigned TRG_PER  = 300,
  parameter int unsigned PCK_PER  = 300,
  parameter int unsigned PCK_SIZE = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output int   trg_req,
  output int   trg_got,
  output int   trg_fixed,
  output int   trg_delayed,
  output int   lat0,
  output int   pck_req,
  output int   pck_got,
  output int   pck_pending,
  output int   errors,
  output logic locked
);
  logic [15:0] t_data;
  logic t_valid, t_get, f_valid, f_get, trg_in, trg_late, tick, dat;
  fd_t f_desc;
  logic [3:0] hits_lost, hits_carried;
  logic [4:0] hit_addr [2];
  assign hit_addr = '{default: '0};

  ff_tx #(.SPEED(SPEED), .FL_EN(1'b0)) u_tx (
    .clk, .rst_n, .crc_en(1'b1), .host_ce(1'b1), .data(t_data), .data_valid(t_valid),
    .get_data(t_get), .frm_valid(f_valid), .frm_desc(f_desc), .frm_get(f_get),
    .trg_in, .sync_req(1'b0), .hit_valid('0), .hit_addr, .tick, .dat, .trg_late,
    .hits_lost, .hits_carried
  );

  rx_entry_t entry;
  logic r_valid, tick_rx, trg_out, fl_valid, fl_err;
  logic [1:0] fl_n;
  logic [4:0] fl_addr [2];
  logic signed [2:0] fl_time [2];
  logic ths_corr, ths_err, fd_err, frm_done, overflow, sync_det;

  ff_rx #(.SPEED(SPEED), .FL_EN(1'b0)) u_rx (
    .clk, .rst_n, .dat, .crc_en(1'b1), .host_ce(1'b1), .entry, .data_valid(r_valid),
    .get_data(1'b1), .tick_rx, .locked, .trg_out, .fl_valid, .fl_n, .fl_addr, .fl_time,
    .fl_err, .ths_corr, .ths_err, .fd_err, .frm_done, .overflow, .sync_det
  );

  longint now = 0;
  longint trg_t [$];
  logic [15:0] exp_w [$];
  bit exp_sof [$], exp_eof [$];
  fd_t exp_fd [$];
  int to_send = 0;

  initial begin
    trg_req = 0; trg_got = 0; trg_fixed = 0; trg_delayed = 0; lat0 = -1;
    pck_req = 0; pck_got = 0; errors = 0;
    trg_in = 0; t_valid = 0; f_valid = 0; t_data = '0; f_desc = '0;
  end
  assign pck_pending = to_send;

  // sources: one draw per reference cycle, applied right after the tick
  always @(posedge clk) begin
    now++;
    if (tick) begin
      if (run && $urandom_range(0, TRG_PER - 1) == 0) begin
        trg_in <= 1'b1;
        trg_t.push_back(now + longint'(SPEED));  // sampled on the next tick
        trg_req <= trg_req + 1;
      end else begin
        trg_in <= 1'b0;
      end
      if (run && $urandom_range(0, PCK_PER - 1) == 0) begin
        to_send <= to_send + 1;
        pck_req <= pck_req + 1;
      end
    end
    if (trg_late) trg_delayed <= trg_delayed + 1;
  end

  // host: writes each queued packet, descriptor first, then its words
  initial begin
    forever begin
      fd_t f;
      @(negedge clk);
      if (to_send > 0 && rst_n) begin
        f = '{len: 4'(PCK_SIZE), dtype: 1'b0, label_on: 1'b0, last: 1'b1};
        f_desc = f;
        f_valid = 1;
        do @(posedge clk); while (!f_get);
        @(negedge clk);
        f_valid = 0;
        for (int i = 0; i < int'(PCK_SIZE); i++) begin
          t_data = 16'($urandom);
          t_valid = 1;
          exp_w.push_back(t_data); exp_fd.push_back(f);
          exp_sof.push_back(i == 0); exp_eof.push_back(i == int'(PCK_SIZE) - 1);
          do @(posedge clk); while (!t_get);
          @(negedge clk);
        end
        t_valid = 0;
        to_send = to_send - 1;
      end
    end
  end

  // receiver side
  always @(posedge clk) begin
    if (r_valid) begin
      if (exp_w.size() == 0) errors <= errors + 1;
      else begin
        logic [15:0] w;
        fd_t f;
        bit s, e;
        w = exp_w.pop_front(); f = exp_fd.pop_front();
        s = exp_sof.pop_front(); e = exp_eof.pop_front();
        if (entry.word != w || entry.fd != f || entry.sof != s || entry.eof != e || entry.crc_err)
          errors <= errors + 1;
        if (entry.eof) pck_got <= pck_got + 1;
      end
    end
    if (trg_out) begin
      if (trg_t.size() == 0) errors <= errors + 1;
      else begin
        int l;
        l = int'(now - trg_t.pop_front());
        if (lat0 < 0) lat0 <= l;
        if (lat0 < 0 || l == lat0) trg_fixed <= trg_fixed + 1;
        trg_got <= trg_got + 1;
      end
    end
  end
endmodule
