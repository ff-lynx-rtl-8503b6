// tte_link: one up-link (FF-TX, wire, FF-RX) carrying trigger hits only,
// used to measure the trigger data transmission efficiency (the fraction of
// front-end hits that reach the trigger side inside fixed-latency frames).
//
// On every reference cycle a Poisson-distributed number of hits, mean
// RATE_X1000/1000 per front-end circuit times N_FE circuits, is put on the
// transmitter's HPC hit inputs (capped at HPC; the cap is counted in
// `capped`, which is negligible at these rates). Hit addresses are random.
// The receiver's decoded FL frames are counted hit by hit. The outputs are
// running counts: hits generated, hits decoded at the receiver, hits the
// transmitter reported lost, FL frames with a detected error, and whether
// the receiver is locked. `run` gates the hit source; after it drops, the
// caller waits a few frames for the last ones to arrive.
//
// The Poisson hit model and the rate follow the published efficiency study;
// the rest (no VL traffic, hit-input count, cap) is this testbench's choice.
module tte_link
  import ff_lynx_pkg::*;
#(
  parameter int unsigned SPEED      = 8,
  parameter int unsigned NC         = 3,
  parameter int unsigned NH         = 2,
  parameter int unsigned HPC        = 2,
  parameter int unsigned N_FE       = 1,
  parameter int unsigned RATE_X1000 = 125
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output int   sent,
  output int   got,
  output int   lost,
  output int   capped,
  output int   fl_errs,
  output int   frames,
  output logic locked
);
  localparam int unsigned ADDR_W = 5;

  logic [HPC-1:0] hit_valid;
  logic [ADDR_W-1:0] hit_addr [HPC];
  logic tick, dat, trg_late, t_get, f_get;
  logic [3:0] hits_lost, hits_carried;

  ff_tx #(.SPEED(SPEED), .NC(NC), .NH(NH), .HPC(HPC), .ADDR_W(ADDR_W)) u_tx (
    .clk, .rst_n, .crc_en(1'b1), .host_ce(1'b1), .data(16'h0), .data_valid(1'b0),
    .get_data(t_get), .frm_valid(1'b0), .frm_desc('0), .frm_get(f_get),
    .trg_in(1'b0), .sync_req(1'b0), .hit_valid, .hit_addr, .tick, .dat, .trg_late,
    .hits_lost, .hits_carried
  );

  rx_entry_t entry;
  logic r_valid, tick_rx, trg_out, fl_valid, fl_err;
  logic [$clog2(NH+1)-1:0] fl_n;
  logic [ADDR_W-1:0] fl_addr [NH];
  logic signed [clog2_min1(NC):0] fl_time [NH];
  logic ths_corr, ths_err, fd_err, frm_done, overflow, sync_det;

  ff_rx #(.SPEED(SPEED), .NC(NC), .NH(NH), .ADDR_W(ADDR_W)) u_rx (
    .clk, .rst_n, .dat, .crc_en(1'b1), .host_ce(1'b1), .entry, .data_valid(r_valid),
    .get_data(1'b1), .tick_rx, .locked, .trg_out, .fl_valid, .fl_n, .fl_addr, .fl_time,
    .fl_err, .ths_corr, .ths_err, .fd_err, .frm_done, .overflow, .sync_det
  );

  // Poisson sample by inversion of the cumulative distribution
  function automatic int poisson(input real lambda);
    real u, p, f;
    int k;
    u = real'($urandom) / 4294967296.0;
    p = $exp(-lambda);
    f = p;
    k = 0;
    while (u > f && k < 50) begin
      k++;
      p = p * lambda / real'(k);
      f = f + p;
    end
    return k;
  endfunction

  initial begin
    sent = 0; got = 0; lost = 0; capped = 0; fl_errs = 0; frames = 0;
    hit_valid = '0;
    hit_addr = '{default: '0};
  end

  // new hits are applied right after each tick, for the next one to sample
  always @(posedge clk) begin
    if (tick) begin
      int k;
      k = run ? poisson(real'(RATE_X1000) * real'(N_FE) / 1000.0) : 0;
      if (k > int'(HPC)) begin
        capped <= capped + k - int'(HPC);
        k = int'(HPC);
      end
      for (int h = 0; h < int'(HPC); h++) begin
        hit_valid[h] <= (h < k);
        hit_addr[h] <= ADDR_W'($urandom);
      end
      sent <= sent + k;
      lost <= lost + int'(hits_lost);
    end
    if (fl_valid) begin
      got <= got + int'(fl_n);
      frames <= frames + 1;
      if (fl_err) fl_errs <= fl_errs + 1;
    end
  end
endmodule
