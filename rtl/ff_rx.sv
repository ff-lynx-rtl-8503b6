// ff_rx: FF-RX, the FF-LYNX receiver interface.
//
// Joins DES (deserializer), SYNC (reference-cycle recovery), THS_DET (THS
// pattern detector), FRM_ANA (frame analyzer), the FL frame analyzer and
// RX_BUF (output buffer). It runs on the line clock `clk` (the bit clock of
// the double-wire link) and recovers the reference cycle from the sync
// patterns: tick_rx pulses once per reference cycle while `locked`.
//
// Outputs:
//  * host port: entry / data_valid / get_data (taken on host_ce edges; use
//    tick_rx as host_ce for a reference-rate host);
//  * trg_out: one pulse per trigger pattern, 3 reference cycles plus the
//    deserializer delay after the pattern started on the line; on an up-link
//    (FL_EN = 1) each trigger announces an FL frame, decoded on fl_*;
//  * status pulses: ths_corr (corrected THS pattern), ths_err (double error),
//    fd_err (frame dropped for a descriptor double error), frm_done,
//    overflow (RX_BUF full), sync_det (sync pattern seen).
// crc_en must match the transmitter's setting.
// Structure and block split follow the document; the block internals are
// this design's choices, described in each block.
module ff_rx
  import ff_lynx_pkg::*;
#(
  parameter int unsigned SPEED     = 8,
  parameter bit          FL_EN     = 1'b1,
  parameter int unsigned NC        = 3,
  parameter int unsigned NH        = 2,
  parameter int unsigned ADDR_W    = 5,
  parameter bit          RECOVERY  = 1'b1,
  parameter int unsigned BUF_DEPTH = 32,
  parameter int unsigned LOCK_TH   = 3,
  parameter int unsigned UNLOCK_TH = 3,
  parameter int unsigned WD_CYC    = 128
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           dat,
  input  logic                           crc_en,
  input  logic                           host_ce,
  output rx_entry_t                      entry,
  output logic                           data_valid,
  input  logic                           get_data,
  output logic                           tick_rx,
  output logic                           locked,
  output logic                           trg_out,
  output logic                           fl_valid,
  output logic [$clog2(NH+1)-1:0]        fl_n,
  output logic [ADDR_W-1:0]              fl_addr [NH],
  output logic signed [clog2_min1(NC):0] fl_time [NH],
  output logic                           fl_err,
  output logic                           ths_corr,
  output logic                           ths_err,
  output logic                           fd_err,
  output logic                           frm_done,
  output logic                           overflow,
  output logic                           sync_det
);
  localparam int unsigned FRM_W = SPEED - 2;

  logic [5:0]       raw6;
  logic             cyc_valid;
  logic [1:0]       cyc_ths;
  logic [FRM_W-1:0] cyc_frm;
  ths_pat_e         pat;
  logic             fl_ce, fl_first;
  logic [FRM_W-1:0] fl_bits;
  logic             wr_en;
  rx_entry_t        wr_entry;
  logic             cnt_corr, cnt_err, par_err;

  ff_des #(.SPEED(SPEED)) u_des (
    .clk, .rst_n, .dat, .tick_rx, .raw6, .cyc_valid, .cyc_ths, .cyc_frm
  );

  ff_sync #(.SPEED(SPEED), .LOCK_TH(LOCK_TH), .UNLOCK_TH(UNLOCK_TH), .WD_CYC(WD_CYC)) u_sync (
    .clk, .rst_n, .raw6, .tick_rx, .locked, .phase()
  );

  ff_ths_det u_det (
    .clk, .rst_n, .ce(cyc_valid), .ths(cyc_ths), .pat, .corr(ths_corr), .err(ths_err)
  );

  assign trg_out  = (pat == PAT_TRG);
  assign sync_det = (pat == PAT_SYNC);

  ff_frm_ana #(.FRM_W(FRM_W), .NC(NC), .FL_EN(FL_EN)) u_ana (
    .clk, .rst_n, .ce(cyc_valid), .frm(cyc_frm), .pat, .crc_en,
    .fl_ce, .fl_first, .fl_bits, .wr_en, .wr_entry, .fd_err, .frm_done
  );

  if (FL_EN) begin : g_fl
    ff_fl_ana #(.FRM_W(FRM_W), .NC(NC), .NH(NH), .ADDR_W(ADDR_W), .RECOVERY(RECOVERY)) u_fl (
      .clk, .rst_n, .fl_ce, .fl_first, .fl_bits,
      .fl_valid, .fl_n, .fl_addr, .fl_time, .cnt_corr, .cnt_err, .par_err
    );
    assign fl_err = fl_valid && (cnt_err || par_err);
  end else begin : g_nofl
    assign fl_valid = 1'b0;
    assign fl_n     = '0;
    assign fl_err   = 1'b0;
    assign cnt_corr = 1'b0;
    assign cnt_err  = 1'b0;
    assign par_err  = 1'b0;
    for (genvar j = 0; j < NH; j++) begin : g_z
      assign fl_addr[j] = '0;
      assign fl_time[j] = '0;
    end
  end

  ff_rx_buf #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .wr_en, .wr_entry, .host_ce, .entry, .data_valid, .get_data, .overflow
  );
endmodule
