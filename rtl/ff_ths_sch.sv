// ff_ths_sch: THS_SCH, the THS channel scheduler of the FF-LYNX transmitter.
//
// The THS channel carries 2 bits per reference cycle; every pattern (trigger,
// frame header, sync) is 6 bits long and takes 3 cycles. This block decides,
// once per reference cycle (on tick), which pattern starts in the next cycle
// and registers the 2 THS bits of that next cycle.
//
// Arbitration (priority trigger > sync > header):
//  * A trigger requested on trg_in at tick t is due TRG_LAT ticks later, so
//    that its pattern occupies cycles t+TRG_LAT .. t+TRG_LAT+2: a fixed
//    latency. If the channel is still busy at that tick it is counted as
//    pending and sent as soon as the channel frees (trg_late pulses then).
//  * A header or sync pattern only starts when no pattern is in progress, no
//    trigger is pending, and no trigger already requested would fall due
//    within the 3 cycles of the new pattern. This keeps the trigger latency
//    fixed whenever triggers are at least 3 cycles apart.
//  * After reset SYNC_N sync patterns are sent; sync_req asks for one more,
//    and one is added whenever SYNC_PERIOD cycles passed without one, so
//    that the receiver can tell a silent link from a dead one.
//  * hdr_gnt pulses on the tick at which a header starts: the frame builder
//    must place the first frame-descriptor bits in the same next cycle.
//    hdr_block holds back headers (the FRM channel is reserved that cycle).
// The fixed 3-cycle trigger latency and the coincidence of header and frame
// descriptor are read off the document's timing figures; the pending counter,
// the sync count and the exact blocking rule are this design's choices.
module ff_ths_sch
  import ff_lynx_pkg::*;
#(
  parameter int unsigned TRG_LAT = 3,
  parameter int unsigned SYNC_N  = 4,
  parameter int unsigned SYNC_PERIOD = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       trg_in,
  input  logic       hdr_req,
  input  logic       hdr_block,
  input  logic       sync_req,
  output logic       hdr_gnt,
  output logic       trg_fire,
  output logic       trg_late,
  output logic [1:0] ths_bits
);
  logic [TRG_LAT-1:0] q;          // q[k]: trigger requested k ticks ago (q[0] = trg_in)
  logic [TRG_LAT-1:1] q_r;
  logic [3:0]         pend;
  logic [3:0]         sync_cnt;
  logic [3:0]         pat_sr;
  logic [1:0]         pat_rem;
  logic [$clog2(SYNC_PERIOD+1)-1:0] since_sync;
  logic               per_req;
  logic               fire_due, busy, soon, start_trg, start_sync, start_hdr;

  assign q        = {q_r, trg_in};
  assign fire_due = q[TRG_LAT-1];
  assign busy     = (pat_rem != 2'd0);

  always_comb begin
    soon = 1'b0;
    for (int k = 0; k <= int'(TRG_LAT) - 2; k++)
      if (k >= int'(TRG_LAT) - 3 && q[k]) soon = 1'b1;
  end

  assign per_req    = (since_sync >= ($clog2(SYNC_PERIOD+1))'(SYNC_PERIOD));
  assign start_trg  = !busy && (fire_due || pend != 4'd0);
  assign start_sync = !busy && !start_trg && !soon && sync_cnt != 4'd0;
  assign start_hdr  = !busy && !start_trg && !soon && !start_sync && hdr_req && !hdr_block;
  assign hdr_gnt    = tick && start_hdr;
  assign trg_fire   = tick && start_trg;
  assign trg_late   = tick && start_trg && !(fire_due && pend == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r      <= '0;
      pend     <= '0;
      sync_cnt <= 4'(SYNC_N);
      pat_sr   <= '0;
      pat_rem  <= '0;
      ths_bits <= '0;
      since_sync <= '0;
    end else if (tick) begin
      q_r <= q[TRG_LAT-2:0];
      // pending trigger bookkeeping
      if (busy && fire_due) pend <= (pend == 4'hF) ? pend : pend + 4'd1;
      else if (start_trg && !fire_due) pend <= pend - 4'd1;
      if (start_sync) sync_cnt <= sync_cnt - 4'd1 + {3'd0, sync_req};
      else if ((sync_req || (per_req && sync_cnt == 4'd0)) && sync_cnt != 4'hF)
        sync_cnt <= sync_cnt + 4'd1;
      if (start_sync) since_sync <= '0;
      else if (!per_req) since_sync <= since_sync + 1'b1;
      if (busy) begin
        ths_bits <= pat_sr[3:2];
        pat_sr   <= {pat_sr[1:0], 2'b00};
        pat_rem  <= pat_rem - 2'd1;
      end else begin
        logic [5:0] pat;
        pat = start_trg ? THS_TRG : start_sync ? THS_SYNC : start_hdr ? THS_HDR : THS_IDLE;
        ths_bits <= pat[5:4];
        pat_sr   <= pat[3:0];
        pat_rem  <= (start_trg || start_sync || start_hdr) ? 2'd2 : 2'd0;
      end
    end
  end

  if (TRG_LAT < 3) begin : g_bad_lat
    $error("ff_ths_sch: TRG_LAT must be at least 3");
  end
endmodule
