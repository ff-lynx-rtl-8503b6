// ff_sync: SYNC, the synchronizer of the FF-LYNX receiver.
//
// The receiver gets the bit clock with the data but not the position of the
// reference-cycle boundary, so it does not know which bits belong to the THS
// channel. SYNC finds it by counting sync patterns:
//  * a free-running bit counter (0..SPEED-1) gives every bit clock a phase;
//    DES's raw6 view is compared with the sync code word on every bit clock,
//    and each phase has its own match counter;
//  * while unlocked, the first phase whose counter reaches LOCK_TH becomes
//    the locked phase and all counters are cleared;
//  * while locked, tick_rx pulses when the bit counter equals the locked
//    phase. A sync match at the locked phase clears the counters of the other
//    phases. A phase other than the locked one that has collected UNLOCK_TH
//    matches becomes the new locked phase (the transmitter restarted with
//    another alignment), but only once the locked phase has gone WD_CYC/2
//    reference cycles without a sync. Frame data can look like a sync
//    pattern at a wrong phase, even several times within a sync period, so
//    a link that still delivers its syncs is never moved by it;
//  * a watchdog counts reference cycles since the last sync pattern at the
//    locked phase; after WD_CYC of them (the transmitter sends one at least
//    every SYNC_PERIOD cycles) the link is taken as lost and the lock is
//    dropped. The redundancy manager uses `locked` to bypass a dead link.
// The document evaluates synchronization algorithms that differ in such
// counting thresholds; this counting scheme and its default thresholds are
// this design's choice.
module ff_sync
  import ff_lynx_pkg::*;
#(
  parameter int unsigned SPEED     = 8,
  parameter int unsigned LOCK_TH   = 3,
  parameter int unsigned UNLOCK_TH = 3,
  parameter int unsigned WD_CYC    = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [5:0]               raw6,
  output logic                     tick_rx,
  output logic                     locked,
  output logic [$clog2(SPEED)-1:0] phase
);
  localparam int unsigned PW = $clog2(SPEED);
  localparam int unsigned WW = $clog2(WD_CYC + 1);

  logic [PW-1:0] pcnt;
  logic [3:0]    cnt [SPEED];
  logic [WW-1:0] wd;
  logic          match, at_phase, reach;

  assign match    = (raw6 == THS_SYNC);
  assign at_phase = locked && (pcnt == phase);
  assign tick_rx  = at_phase;
  assign reach    = match && !at_phase &&
                    (cnt[pcnt] + 4'd1 >= 4'(locked ? UNLOCK_TH : LOCK_TH)) &&
                    (!locked || wd >= WW'(WD_CYC / 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt   <= '0;
      locked <= 1'b0;
      phase  <= '0;
      wd     <= '0;
      for (int p = 0; p < SPEED; p++) cnt[p] <= '0;
    end else begin
      pcnt <= pcnt + 1'b1;
      // watchdog
      if (!locked || (match && at_phase)) wd <= '0;
      else if (tick_rx) wd <= wd + 1'b1;
      if (locked && wd >= WW'(WD_CYC)) begin
        locked <= 1'b0;
        for (int p = 0; p < SPEED; p++) cnt[p] <= '0;
      end else if (match && at_phase) begin
        for (int p = 0; p < SPEED; p++) cnt[p] <= '0;
      end else if (reach) begin
        locked <= 1'b1;
        phase  <= pcnt;
        wd     <= '0;
        for (int p = 0; p < SPEED; p++) cnt[p] <= '0;
      end else if (match && cnt[pcnt] != 4'hf) begin
        cnt[pcnt] <= cnt[pcnt] + 4'd1;
      end
    end
  end
endmodule
