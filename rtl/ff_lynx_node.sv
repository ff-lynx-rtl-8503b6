// ff_lynx_node: an FF-LYNX ring node (top level).
//
// In the ring topology every node receives the link of the previous node
// (dat_in[0]) and a bypass link from the node before that (dat_in[1]), and
// drives a link to the next node (dat_out[0]) and a bypass link to the node
// after it (dat_out[1]). Data path:
//
//   dat_in[0] -> FF-RX --\                 /-> FF-TX -> dat_out[0]
//                         RX_RM -> DCM -> TX_RM
//   dat_in[1] -> FF-RX --/         ^       \-> FF-TX -> dat_out[1]
//                                  |
//                      local chip frames (loc_*)
//
// RX_RM takes the primary link while it is synchronized and the bypass link
// otherwise, so a failed node is skipped. The DCM merges the frames received
// from upstream with the local chip's frames, one whole frame at a time.
// Both transmitters send the same stream (TX_RM). The local chip's hits
// (hit_valid / hit_addr, sampled on loc_tick) go out as fixed-latency
// trigger frames (FL_EN = 1, up-link) in both transmitters; with FL_EN = 0
// the chip's level-1 triggers trg_in are sent instead (down-link). Triggers
// and FL frames received on the selected link are given to the local chip
// on trg_out / fl_*; they are not forwarded, because the merging of trigger
// data is not part of the concentrator.
//
// Local frame port: loc_entry / loc_valid / loc_get, one entry per word, per
// clock, in the receive-entry format (word, frame descriptor fields, sof /
// eof marks; nodata for a frame without words). loc_tick is the reference
// tick of this node's transmitters. All of the node runs on the bit clock.
// The topology and the blocks follow the document; port formats and the
// handling of received trigger data are this design's choices.
module ff_lynx_node
  import ff_lynx_pkg::*;
#(
  parameter int unsigned SPEED     = 8,
  parameter bit          FL_EN     = 1'b1,
  parameter int unsigned NC        = 3,
  parameter int unsigned NH        = 2,
  parameter int unsigned HPC       = 2,
  parameter int unsigned ADDR_W    = 5,
  parameter bit          RECOVERY  = 1'b1,
  parameter int unsigned BUF_DEPTH = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           crc_en,
  input  logic [1:0]                     tx_en,
  // links
  input  logic [1:0]                     dat_in,
  output logic [1:0]                     dat_out,
  // local chip: frames
  input  rx_entry_t                      loc_entry,
  input  logic                           loc_valid,
  output logic                           loc_get,
  output logic                           loc_tick,
  // local chip: hits (up-link) or level-1 triggers (down-link)
  input  logic [HPC-1:0]                 hit_valid,
  input  logic [ADDR_W-1:0]              hit_addr [HPC],
  input  logic                           trg_in,
  output logic [3:0]                     hits_lost,
  output logic [3:0]                     hits_carried,
  // received trigger data
  output logic                           trg_out,
  output logic                           fl_valid,
  output logic [$clog2(NH+1)-1:0]        fl_n,
  output logic [ADDR_W-1:0]              fl_addr [NH],
  output logic signed [clog2_min1(NC):0] fl_time [NH],
  // status
  output logic [1:0]                     rx_locked,
  output logic                           rm_sel,
  output logic                           rm_switched,
  output logic                           dcm_merged,
  output logic [1:0]                     rx_errors
);
  rx_entry_t   rx_entry [2];
  logic [1:0]  rx_valid, rx_get, rx_trg, rx_flv, rx_flerr, rx_fderr, rx_therr;
  logic [$clog2(NH+1)-1:0]        rx_fln   [2];
  logic [ADDR_W-1:0]              rx_fladdr[2][NH];
  logic signed [clog2_min1(NC):0] rx_fltime[2][NH];

  rx_entry_t   rm_entry;
  logic        rm_valid, rm_get;
  rx_entry_t   dcm_in [2];
  logic [1:0]  dcm_valid, dcm_get;
  logic [15:0] d_data;
  logic        d_valid, d_get, d_frm_valid, d_frm_get;
  fd_t         d_desc;
  logic [15:0] t_data;
  logic [1:0]  t_valid, t_get, t_frm_valid, t_frm_get, t_tick, t_late;
  fd_t         t_desc;
  logic [3:0]  t_lost [2];
  logic [3:0]  t_carr [2];

  for (genvar r = 0; r < 2; r++) begin : g_rx
    ff_rx #(.SPEED(SPEED), .FL_EN(FL_EN), .NC(NC), .NH(NH), .ADDR_W(ADDR_W),
            .RECOVERY(RECOVERY), .BUF_DEPTH(BUF_DEPTH)) u_rx (
      .clk, .rst_n, .dat(dat_in[r]), .crc_en, .host_ce(1'b1),
      .entry(rx_entry[r]), .data_valid(rx_valid[r]), .get_data(rx_get[r]),
      .tick_rx(), .locked(rx_locked[r]), .trg_out(rx_trg[r]),
      .fl_valid(rx_flv[r]), .fl_n(rx_fln[r]), .fl_addr(rx_fladdr[r]), .fl_time(rx_fltime[r]),
      .fl_err(rx_flerr[r]), .ths_corr(), .ths_err(rx_therr[r]), .fd_err(rx_fderr[r]),
      .frm_done(), .overflow(), .sync_det()
    );
  end

  ff_rx_rm u_rx_rm (
    .clk, .rst_n, .locked(rx_locked), .in_entry(rx_entry), .in_valid(rx_valid),
    .in_get(rx_get), .entry(rm_entry), .valid(rm_valid), .get(rm_get),
    .sel(rm_sel), .switched(rm_switched)
  );

  assign trg_out   = rx_trg[rm_sel];
  assign fl_valid  = rx_flv[rm_sel];
  assign fl_n      = rx_fln[rm_sel];
  assign fl_addr   = rx_fladdr[rm_sel];
  assign fl_time   = rx_fltime[rm_sel];
  assign rx_errors = {rx_fderr[rm_sel], rx_therr[rm_sel] | rx_flerr[rm_sel]};

  assign dcm_in[0]    = rm_entry;
  assign dcm_in[1]    = loc_entry;
  assign dcm_valid    = {loc_valid, rm_valid};
  assign rm_get       = dcm_get[0];
  assign loc_get      = dcm_get[1];

  ff_dcm #(.N_IN(2)) u_dcm (
    .clk, .rst_n, .in_entry(dcm_in), .in_valid(dcm_valid), .in_get(dcm_get),
    .data(d_data), .data_valid(d_valid), .get_data(d_get),
    .frm_valid(d_frm_valid), .frm_desc(d_desc), .frm_get(d_frm_get),
    .merged(dcm_merged), .dropped()
  );

  ff_tx_rm u_tx_rm (
    .en(tx_en), .data(d_data), .data_valid(d_valid), .get_data(d_get),
    .frm_valid(d_frm_valid), .frm_desc(d_desc), .frm_get(d_frm_get),
    .tx_data(t_data), .tx_data_valid(t_valid), .tx_get_data(t_get),
    .tx_frm_valid(t_frm_valid), .tx_frm_desc(t_desc), .tx_frm_get(t_frm_get)
  );

  for (genvar t = 0; t < 2; t++) begin : g_tx
    ff_tx #(.SPEED(SPEED), .FL_EN(FL_EN), .NC(NC), .NH(NH), .HPC(HPC), .ADDR_W(ADDR_W),
            .RECOVERY(RECOVERY), .BUF_DEPTH(BUF_DEPTH)) u_tx (
      .clk, .rst_n, .crc_en, .host_ce(1'b1),
      .data(t_data), .data_valid(t_valid[t]), .get_data(t_get[t]),
      .frm_valid(t_frm_valid[t]), .frm_desc(t_desc), .frm_get(t_frm_get[t]),
      .trg_in, .sync_req(1'b0), .hit_valid, .hit_addr,
      .tick(t_tick[t]), .dat(dat_out[t]), .trg_late(t_late[t]),
      .hits_lost(t_lost[t]), .hits_carried(t_carr[t])
    );
  end

  assign loc_tick     = t_tick[0];
  assign hits_lost    = t_lost[0];
  assign hits_carried = t_carr[0];
endmodule
