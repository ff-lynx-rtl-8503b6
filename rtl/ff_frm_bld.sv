// ff_frm_bld: FRM_BLD, the variable-latency (VL) frame builder of the FF-LYNX
// transmitter.
//
// A VL frame is: frame descriptor (12 bits, Hamming-coded length, data type,
// label-on and last-frame fields), then `len` 16-bit words (the first is the
// label when label_on is set), then an optional 8-bit CRC of those words.
// The frame is sent MSB first on the FRM channel, FRM_W bits per reference
// cycle; the last cycle is padded with zeros. Its first cycle is the first
// cycle of the header pattern on the THS channel.
//
// Operation: the host writes a descriptor on the frm_* port (taken on a
// host_ce edge with frm_valid and frm_get high; two are buffered) and the
// frame's words into TX_BUF. When all `len` words are in TX_BUF the builder
// raises hdr_req; on hdr_gnt (a tick) it loads the descriptor into a
// left-aligned bit shift register and from then on, at every tick, refills it
// from TX_BUF (or with the CRC) whenever fewer than FRM_W bits are left and
// registers the next FRM_W bits as frm_bits for the next cycle. While `stall`
// is high at a tick (the next cycle carries a fixed-latency frame) it sends
// nothing and holds its state, so a VL frame is suspended and resumed.
// Frame format and suspension follow the document. Whether a CRC is appended
// is the static input crc_en here, because the descriptor has no bit for it;
// the CRC polynomial and the descriptor port are this design's choices.
module ff_frm_bld
  import ff_lynx_pkg::*;
#(
  parameter int unsigned FRM_W = 6,
  parameter int unsigned CW    = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  logic             host_ce,
  input  logic             crc_en,
  input  logic             frm_valid,
  input  fd_t              frm_desc,
  output logic             frm_get,
  input  logic [CW-1:0]    buf_count,
  output logic             buf_rd,
  input  logic [15:0]      buf_data,
  output logic             hdr_req,
  input  logic             hdr_gnt,
  input  logic             stall,
  output logic [FRM_W-1:0] frm_bits,
  output logic             busy
);
  localparam int unsigned SRW = FRM_W + 16;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SEND} state_e;

  state_e         state;
  fd_t            fd;
  logic [SRW-1:0] sr, sr_n;
  logic [5:0]     nb, nb_n;
  logic [4:0]     wleft, wleft_n;
  logic           cleft, cleft_n;
  logic [7:0]     crc, crc_n;
  logic [FRM_W-1:0] out_n;
  logic           done;
  logic           dq_empty, dq_full, dq_rd;
  fd_t            dq_data;

  ff_fifo #(.W($bits(fd_t)), .DEPTH(2)) u_desc (
    .clk, .rst_n,
    .wr_en  (host_ce && frm_valid),
    .wr_data(frm_desc),
    .rd_en  (dq_rd),
    .rd_data(dq_data),
    .full   (dq_full),
    .empty  (dq_empty),
    .count  ()
  );

  assign frm_get = !dq_full;
  assign dq_rd   = tick && state == S_IDLE && !dq_empty;
  assign hdr_req = (state == S_WAIT) && (buf_count >= CW'(fd.len));
  assign busy    = (state != S_IDLE);

  // one emission step: optional load on grant, refill, take FRM_W bits
  always_comb begin
    sr_n    = sr;
    nb_n    = nb;
    wleft_n = wleft;
    cleft_n = cleft;
    crc_n   = crc;
    out_n   = '0;
    buf_rd  = 1'b0;
    done    = 1'b0;
    if (state == S_WAIT && hdr_gnt) begin
      sr_n    = {fd_encode(fd), {(SRW-12){1'b0}}};
      nb_n    = 6'd12;
      wleft_n = {1'b0, fd.len};
      cleft_n = crc_en;
      crc_n   = '0;
    end
    if (tick && !stall && (state == S_SEND || (state == S_WAIT && hdr_gnt))) begin
      if (nb_n < 6'(FRM_W)) begin
        if (wleft_n != '0) begin
          sr_n    = sr_n | (SRW'({buf_data, {(SRW-16){1'b0}}}) >> nb_n);
          nb_n    = nb_n + 6'd16;
          wleft_n = wleft_n - 5'd1;
          crc_n   = crc8_word(crc_n, buf_data);
          buf_rd  = 1'b1;
        end else if (cleft_n) begin
          sr_n    = sr_n | (SRW'({crc_n, {(SRW-8){1'b0}}}) >> nb_n);
          nb_n    = nb_n + 6'd8;
          cleft_n = 1'b0;
        end
      end
      out_n = sr_n[SRW-1 -: FRM_W];
      sr_n  = sr_n << FRM_W;
      nb_n  = (nb_n > 6'(FRM_W)) ? nb_n - 6'(FRM_W) : 6'd0;
      done  = (nb_n == 6'd0) && (wleft_n == '0) && !cleft_n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      fd       <= '0;
      sr       <= '0;
      nb       <= '0;
      wleft    <= '0;
      cleft    <= 1'b0;
      crc      <= '0;
      frm_bits <= '0;
    end else if (tick) begin
      sr       <= sr_n;
      nb       <= nb_n;
      wleft    <= wleft_n;
      cleft    <= cleft_n;
      crc      <= crc_n;
      frm_bits <= out_n;
      case (state)
        S_IDLE: if (!dq_empty) begin
          fd    <= dq_data;
          state <= S_WAIT;
        end
        S_WAIT: if (hdr_gnt) state <= done ? S_IDLE : S_SEND;
        S_SEND: if (done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
