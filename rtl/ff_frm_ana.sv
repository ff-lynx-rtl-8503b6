// ff_frm_ana: FRM_ANA, the frame analyzer of the FF-LYNX receiver.
//
// Works on the stream of reference cycles from the deserializer (ce =
// cyc_valid, frm = FRM bits of the cycle) and on the THS detector's verdict
// for the same cycle (pat). A pattern is only known once its third cycle has
// arrived, while the frame it announces started with its first cycle, so the
// FRM bits go through a 3-cycle delay line and are tagged before they leave:
//  * header detected: the oldest cycle in the line is the first cycle of a VL
//    frame (frame descriptor at its MSB);
//  * trigger detected and FL_EN = 1: the oldest cycle and the next NC-1
//    cycles are a fixed-latency frame. They go to the FL analyzer (fl_ce,
//    fl_first, fl_bits) and are skipped by the VL frame parser, which resumes
//    the suspended VL frame afterwards. With FL_EN = 0 (down-link) triggers
//    carry no FRM data and the FRM channel is not interrupted.
// VL frame parser: the FRM bits of a frame are appended to a bit accumulator
// on ce; on the other bit clocks one field is taken per clock: the 12-bit
// descriptor (Hamming decoded: single errors corrected, double errors drop
// the frame and pulse fd_err), then `len` 16-bit words, then the CRC when
// crc_en. Each word is written to RX_BUF (wr_en / wr_entry) with its frame
// information; the last word is held back until the CRC has been checked so
// that it carries eof and crc_err. A frame with no words is written as one
// entry flagged nodata. frm_done pulses at the end of every frame.
// The frame format follows the document; the delay-line tagging and the
// buffer entry format are this design's choices.
module ff_frm_ana
  import ff_lynx_pkg::*;
#(
  parameter int unsigned FRM_W = 6,
  parameter int unsigned NC    = 3,
  parameter bit          FL_EN = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic [FRM_W-1:0] frm,
  input  ths_pat_e         pat,
  input  logic             crc_en,
  output logic             fl_ce,
  output logic             fl_first,
  output logic [FRM_W-1:0] fl_bits,
  output logic             wr_en,
  output rx_entry_t        wr_entry,
  output logic             fd_err,
  output logic             frm_done
);
  localparam int unsigned AW = 32;

  typedef enum logic [1:0] {P_IDLE, P_FD, P_WORD, P_CRC} pstate_e;

  // delay line
  logic [FRM_W-1:0] d1, d2;
  logic             fl1, fl2;
  logic [3:0]       fl_extra;
  logic             trg, hdr, out_fl;

  // parser
  pstate_e        ps;
  logic [AW-1:0]  acc;
  logic [5:0]     nb;
  fd_t            fd;
  logic           fd_c;
  logic [4:0]     wleft;
  logic [7:0]     crc;
  logic           hold_v, hold_sof;
  logic [15:0]    hold_w;

  assign trg    = FL_EN && ce && pat == PAT_TRG;
  assign hdr    = ce && pat == PAT_HDR;
  assign out_fl = fl2 || trg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1       <= '0;
      d2       <= '0;
      fl1      <= 1'b0;
      fl2      <= 1'b0;
      fl_extra <= '0;
      fl_ce    <= 1'b0;
      fl_first <= 1'b0;
      fl_bits  <= '0;
    end else begin
      fl_ce    <= ce && out_fl;
      fl_first <= trg;
      if (ce) begin
        fl_bits  <= d2;
        d2       <= d1;
        fl2      <= fl1 || trg;
        d1       <= frm;
        fl1      <= trg || fl_extra != '0;
        if (trg) fl_extra <= 4'(NC - 3);
        else if (fl_extra != '0) fl_extra <= fl_extra - 4'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps       <= P_IDLE;
      acc      <= '0;
      nb       <= '0;
      fd       <= '0;
      fd_c     <= 1'b0;
      wleft    <= '0;
      crc      <= '0;
      hold_v   <= 1'b0;
      hold_sof <= 1'b0;
      hold_w   <= '0;
      wr_en    <= 1'b0;
      wr_entry <= '0;
      fd_err   <= 1'b0;
      frm_done <= 1'b0;
    end else begin
      wr_en    <= 1'b0;
      fd_err   <= 1'b0;
      frm_done <= 1'b0;
      if (ps == P_IDLE && hold_v) begin
        // last word of a frame without CRC
        wr_en    <= 1'b1;
        wr_entry <= '{word: hold_w, fd: fd, sof: hold_sof, eof: 1'b1, nodata: 1'b0,
                      crc_err: 1'b0, fd_corr: fd_c};
        hold_v   <= 1'b0;
        frm_done <= 1'b1;
      end
      if (ce) begin
        if (hdr && !out_fl) begin
          // a new frame starts (an unfinished one is abandoned)
          ps     <= P_FD;
          acc    <= {d2, {(AW-FRM_W){1'b0}}};
          nb     <= 6'(FRM_W);
          if (ps != P_IDLE) hold_v <= 1'b0;
        end else if (!out_fl && ps != P_IDLE) begin
          acc <= acc | (AW'({d2, {(AW-FRM_W){1'b0}}}) >> nb);
          nb  <= nb + 6'(FRM_W);
        end
      end else begin
        case (ps)
          P_FD: if (nb >= 6'd12) begin
            logic c, e;
            fd_t  f;
            f    = fd_decode(acc[AW-1 -: 12], c, e);
            acc  <= acc << 12;
            nb   <= nb - 6'd12;
            fd   <= f;
            fd_c <= c;
            crc  <= '0;
            wleft <= {1'b0, f.len};
            if (e) begin
              fd_err <= 1'b1;
              ps     <= P_IDLE;
            end else if (f.len != 4'd0) begin
              ps <= P_WORD;
            end else if (crc_en) begin
              ps <= P_CRC;
            end else begin
              wr_en    <= 1'b1;
              wr_entry <= '{word: '0, fd: f, sof: 1'b1, eof: 1'b1, nodata: 1'b1,
                            crc_err: 1'b0, fd_corr: c};
              frm_done <= 1'b1;
              ps       <= P_IDLE;
            end
          end
          P_WORD: if (nb >= 6'd16) begin
            logic [15:0] w;
            w      = acc[AW-1 -: 16];
            acc    <= acc << 16;
            nb     <= nb - 6'd16;
            crc    <= crc8_word(crc, w);
            wleft  <= wleft - 5'd1;
            hold_w   <= w;
            hold_v   <= 1'b1;
            hold_sof <= !hold_v;
            if (hold_v) begin
              wr_en    <= 1'b1;
              wr_entry <= '{word: hold_w, fd: fd, sof: hold_sof, eof: 1'b0, nodata: 1'b0,
                            crc_err: 1'b0, fd_corr: fd_c};
            end
            if (wleft == 5'd1) ps <= crc_en ? P_CRC : P_IDLE;
          end
          P_CRC: if (nb >= 6'd8) begin
            acc      <= acc << 8;
            nb       <= nb - 6'd8;
            wr_en    <= 1'b1;
            wr_entry <= '{word: hold_w, fd: fd, sof: !hold_v || hold_sof, eof: 1'b1,
                          nodata: !hold_v, crc_err: acc[AW-1 -: 8] != crc, fd_corr: fd_c};
            hold_v   <= 1'b0;
            frm_done <= 1'b1;
            ps       <= P_IDLE;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
