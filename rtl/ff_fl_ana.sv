// ff_fl_ana: FL frame analyzer of the FF-LYNX receiver (up-link trigger data).
//
// Collects the NC cycles of a fixed-latency frame handed over by the frame
// analyzer (fl_ce per cycle, fl_first on the first) and decodes it:
//   hit count - 1 in CNTW Hamming-coded bits (a single error is corrected,
//   cnt_corr; an invalid syndrome gives cnt_err), NH hit fields
//   {timing, address} and an even-parity bit over the hit fields (par_err).
// Two clocks after the edge that takes the last cycle it pulses fl_valid
// with fl_n (1..NH) hits:
// fl_addr[i] and fl_time[i], the hit timing relative to the first cycle of
// the window, as a signed value (-1 is a hit recovered from the previous
// window when RECOVERY = 1). The absolute hit time at the source is the time
// the frame started minus the fixed latency NC plus fl_time.
// The frame layout must match ff_fl_bld. The fields follow the document; the
// order of the fields is this design's choice.
module ff_fl_ana
  import ff_lynx_pkg::*;
#(
  parameter int unsigned FRM_W    = 6,
  parameter int unsigned NC       = 3,
  parameter int unsigned NH       = 2,
  parameter int unsigned ADDR_W   = 5,
  parameter bit          RECOVERY = 1'b1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           fl_ce,
  input  logic                           fl_first,
  input  logic [FRM_W-1:0]               fl_bits,
  output logic                           fl_valid,
  output logic [$clog2(NH+1)-1:0]        fl_n,
  output logic [ADDR_W-1:0]              fl_addr [NH],
  output logic signed [clog2_min1(NC):0] fl_time [NH],
  output logic                           cnt_corr,
  output logic                           cnt_err,
  output logic                           par_err
);
  localparam int unsigned TW   = clog2_min1(NC);
  localparam int unsigned HW   = TW + ADDR_W;
  localparam int unsigned PW   = NC * FRM_W;
  localparam int          CNTW = int'(PW) - 1 - int'(NH * HW);

  logic [PW-1:0]        sr;
  logic [$clog2(NC+1)-1:0] cnt;
  logic                 full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      cnt  <= '0;
      full <= 1'b0;
    end else begin
      full <= 1'b0;
      if (fl_ce) begin
        sr <= {sr[PW-FRM_W-1:0], fl_bits};
        if (fl_first) cnt <= 1;
        else if (cnt != '0) cnt <= cnt + 1'b1;
        if ((fl_first && NC == 1) || (!fl_first && cnt == ($clog2(NC+1))'(NC - 1))) begin
          full <= 1'b1;
          cnt  <= '0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fl_valid <= 1'b0;
      fl_n     <= '0;
      cnt_corr <= 1'b0;
      cnt_err  <= 1'b0;
      par_err  <= 1'b0;
      for (int j = 0; j < NH; j++) begin
        fl_addr[j] <= '0;
        fl_time[j] <= '0;
      end
    end else begin
      fl_valid <= full;
      if (full) begin
        logic [7:0]  cc;
        logic [3:0]  v;
        logic        c, e, par;
        logic [HW-1:0] h;
        cc  = 8'(sr[PW-1 -: CNTW]);
        v   = hcnt_decode(cc, CNTW, c, e);
        par = sr[0];
        for (int j = 0; j < NH; j++) begin
          h   = sr[PW-1-CNTW-j*HW -: HW];
          par ^= ^h;
          fl_addr[j] <= h[ADDR_W-1:0];
          if (RECOVERY && h[HW-1 -: TW] == {TW{1'b1}})
            fl_time[j] <= -1;
          else
            fl_time[j] <= $signed({1'b0, h[HW-1 -: TW]});
        end
        fl_n     <= ($clog2(NH+1))'(v) + 1'b1;
        cnt_corr <= c;
        cnt_err  <= e || (int'(v) + 1 > int'(NH));
        par_err  <= par;
      end
    end
  end
endmodule
