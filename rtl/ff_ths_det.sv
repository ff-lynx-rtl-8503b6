// ff_ths_det: THS_DET, the THS pattern detector of the FF-LYNX receiver.
//
// Once per reference cycle (ce, the deserializer's cyc_valid) it takes the
// 2 THS bits of the new cycle and looks at the window made of the last three
// cycles (6 bits). The window is compared with the trigger, header and sync
// code words:
//  * distance 0 or 1 to a code word: that pattern is detected in the window
//    ending with this cycle (corr = 1 when one bit was corrected);
//  * distance 2 (and none closer): a possible double error. Such a window
//    may also be the first part of a pattern still arriving, so the flag is
//    held for two cycles and dropped if a pattern is detected meanwhile;
//    err therefore reports a double error two cycles late;
//  * otherwise nothing.
// After a detection the next two windows, which overlap the detected
// pattern, are not examined. The outputs are combinational and valid while
// ce is high: `pat` names the pattern whose 3 cycles end with this cycle.
// The 6-bit robust coding with single-error correction and double-error
// detection follows the document; the code words and the blanking rule are
// this design's choice.
module ff_ths_det
  import ff_lynx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic [1:0] ths,
  output ths_pat_e   pat,
  output logic       corr,
  output logic       err
);
  logic [1:0] h1, h2;
  logic [1:0] blank;
  logic       cand;
  logic [1:0] epipe;
  logic [5:0] win;
  int unsigned d_trg, d_hdr, d_sync;

  assign win    = {h2, h1, ths};
  assign d_trg  = popcount6(win ^ THS_TRG);
  assign d_hdr  = popcount6(win ^ THS_HDR);
  assign d_sync = popcount6(win ^ THS_SYNC);

  always_comb begin
    pat  = PAT_NONE;
    corr = 1'b0;
    cand = 1'b0;
    if (ce && blank == 2'd0) begin
      if (d_trg <= 1) begin
        pat  = PAT_TRG;
        corr = (d_trg == 1);
      end else if (d_hdr <= 1) begin
        pat  = PAT_HDR;
        corr = (d_hdr == 1);
      end else if (d_sync <= 1) begin
        pat  = PAT_SYNC;
        corr = (d_sync == 1);
      end else if (d_trg == 2 || d_hdr == 2 || d_sync == 2) begin
        cand = 1'b1;
      end
    end
  end

  assign err = ce && epipe[1] && pat == PAT_NONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h1    <= '0;
      h2    <= '0;
      blank <= '0;
      epipe <= '0;
    end else if (ce) begin
      epipe <= (pat != PAT_NONE) ? 2'b00 : {epipe[0], cand};
      h2 <= h1;
      h1 <= ths;
      if (pat != PAT_NONE) blank <= 2'd2;
      else if (blank != 2'd0) blank <= blank - 2'd1;
    end
  end
endmodule
