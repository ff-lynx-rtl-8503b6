// ff_tx: FF-TX, the FF-LYNX transmitter interface.
//
// Joins TX_BUF (input word buffer), FRM_BLD (VL frame builder), the FL frame
// builder, THS_SCH (THS channel scheduler) and SER (serializer). Everything
// runs on the bit clock `clk`; the reference cycle is marked by `tick`
// (one bit clock in SPEED), which SER produces and which the host may use as
// its clock enable (connect it to host_ce for a reference-rate host port).
//
// Host side:
//  * words: data / data_valid / get_data, taken on host_ce edges;
//  * frame descriptors: frm_desc / frm_valid / frm_get, taken on host_ce edges,
//    one per frame, words of the frame (label first if label_on) in TX_BUF;
//  * FL_EN = 0 (down-link): trg_in, sampled on tick, sends a trigger pattern
//    3 cycles later (level-1 trigger distribution); VL frames continue in the
//    FRM channel meanwhile;
//  * FL_EN = 1 (up-link): hit_valid / hit_addr, sampled on tick, feed the FL
//    frame builder; each FL frame is sent with a trigger pattern NC cycles
//    after its first hit, pre-empting a VL frame in progress (trg_in unused);
//  * sync_req asks for one extra sync pattern; SYNC_N are sent after reset.
// Line side: dat, one bit per clk, clock = clk (double-wire link).
// Latency: a frame's header starts at least 2 ticks after its last word is
// buffered; a trigger pattern starts on the wire TRG_LAT+1 ticks after the
// trg_in tick (the extra tick is the serializer load).
// Channel structure, speeds and frame formats follow the document; buffer
// depths, sync count and host-port details are this design's choices.
module ff_tx
  import ff_lynx_pkg::*;
#(
  parameter int unsigned SPEED    = 8,
  parameter bit          FL_EN    = 1'b1,
  parameter int unsigned NC       = 3,
  parameter int unsigned NH       = 2,
  parameter int unsigned HPC      = 2,
  parameter int unsigned ADDR_W   = 5,
  parameter bit          RECOVERY = 1'b1,
  parameter int unsigned BUF_DEPTH = 32,
  parameter int unsigned SYNC_N   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              crc_en,
  input  logic              host_ce,
  input  logic [15:0]       data,
  input  logic              data_valid,
  output logic              get_data,
  input  logic              frm_valid,
  input  fd_t               frm_desc,
  output logic              frm_get,
  input  logic              trg_in,
  input  logic              sync_req,
  input  logic [HPC-1:0]    hit_valid,
  input  logic [ADDR_W-1:0] hit_addr [HPC],
  output logic              tick,
  output logic              dat,
  output logic              trg_late,
  output logic [3:0]        hits_lost,
  output logic [3:0]        hits_carried
);
  localparam int unsigned FRM_W   = SPEED - 2;
  localparam int unsigned CW      = $clog2(BUF_DEPTH + 1);
  localparam int unsigned TRG_LAT = FL_EN ? NC : 3;

  logic [CW-1:0]    buf_count;
  logic             buf_rd;
  logic [15:0]      buf_data;
  logic             hdr_req, hdr_gnt, trg_fire;
  logic             fl_trg, fl_next, fl_sel;
  logic [FRM_W-1:0] fl_bits, vl_bits;
  logic [1:0]       ths_bits;
  logic             stall;

  ff_tx_buf #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .host_ce, .data, .data_valid, .get_data,
    .rd_en(buf_rd), .rd_data(buf_data), .count(buf_count)
  );

  if (FL_EN) begin : g_fl
    ff_fl_bld #(.FRM_W(FRM_W), .NC(NC), .NH(NH), .HPC(HPC), .ADDR_W(ADDR_W),
                .RECOVERY(RECOVERY)) u_fl (
      .clk, .rst_n, .tick, .hit_valid, .hit_addr,
      .trg_in(fl_trg), .fl_next, .fl_bits, .hits_lost, .hits_carried
    );
  end else begin : g_nofl
    assign fl_trg       = trg_in;
    assign fl_next      = 1'b0;
    assign fl_bits      = '0;
    assign hits_lost    = '0;
    assign hits_carried = '0;
  end

  assign stall = fl_next;

  ff_frm_bld #(.FRM_W(FRM_W), .CW(CW)) u_bld (
    .clk, .rst_n, .tick, .host_ce, .crc_en,
    .frm_valid, .frm_desc, .frm_get,
    .buf_count, .buf_rd, .buf_data,
    .hdr_req, .hdr_gnt, .stall,
    .frm_bits(vl_bits), .busy()
  );

  ff_ths_sch #(.TRG_LAT(TRG_LAT), .SYNC_N(SYNC_N)) u_sch (
    .clk, .rst_n, .tick,
    .trg_in(fl_trg), .hdr_req, .hdr_block(stall), .sync_req,
    .hdr_gnt, .trg_fire, .trg_late, .ths_bits
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    fl_sel <= 1'b0;
    else if (tick) fl_sel <= fl_next;
  end

  ff_ser #(.SPEED(SPEED)) u_ser (
    .clk, .rst_n, .ths_bits,
    .frm_bits(fl_sel ? fl_bits : vl_bits),
    .tick, .dat
  );
endmodule
