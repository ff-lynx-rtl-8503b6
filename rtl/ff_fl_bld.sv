// ff_fl_bld: fixed-latency (FL) frame builder of the FF-LYNX transmitter,
// used on up-links that carry "trigger" data (hit addresses and timing) from
// front-end chips to the level-1 trigger processor.
//
// The first hit seen while no window is open opens a window of NC reference
// cycles (T0 .. T(NC-1)) and requests a trigger pattern on the THS channel
// (trg_in). Hits in the window are stored with their relative timing (the
// cycle index inside the window), up to NH hits. When the window closes the
// FL frame is formed and sent on the FRM channel in the NC cycles that follow,
// exactly when the trigger pattern is sent, so the latency from the first hit
// to the frame is always NC cycles. The receiver finds each hit's time by
// subtracting the fixed latency and adding the relative timing.
//
// FL frame, NC*FRM_W bits, MSB first:
//   hit count - 1, Hamming-coded in CNTW bits (CNTW is what remains)
//   NH hit fields {timing (TW bits), address (ADDR_W bits)}, unused ones 0
//   1 even-parity bit over the hit fields
// With 8x links (FRM_W = 6), NC = 3 and NH = 2: 3 + 2x7 + 1 = 18 bits.
//
// Hits beyond NH are lost, except with RECOVERY = 1: hits lost in the last
// cycle of a window are carried to a new window opened in the very next
// cycle with timing -1 (all ones in TW bits), in front of that window's own
// hits. hits_lost / hits_carried report, per tick, how many hits were dropped
// or carried. hit_valid/hit_addr are sampled on tick (HPC hits per cycle).
// fl_next is high on a tick whose next cycle carries FL frame bits; the VL
// frame builder is stalled then.
// Frame fields, sizes, window and recovery rules follow the document; the
// order of the fields in the frame and the number of hit inputs per cycle
// are this design's choices.
module ff_fl_bld
  import ff_lynx_pkg::*;
#(
  parameter int unsigned FRM_W    = 6,
  parameter int unsigned NC       = 3,
  parameter int unsigned NH       = 2,
  parameter int unsigned HPC      = 2,
  parameter int unsigned ADDR_W   = 5,
  parameter bit          RECOVERY = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic [HPC-1:0]    hit_valid,
  input  logic [ADDR_W-1:0] hit_addr [HPC],
  output logic              trg_in,
  output logic              fl_next,
  output logic [FRM_W-1:0]  fl_bits,
  output logic [3:0]        hits_lost,
  output logic [3:0]        hits_carried
);
  localparam int unsigned TW   = clog2_min1(NC);
  localparam int unsigned HW   = TW + ADDR_W;
  localparam int unsigned PW   = NC * FRM_W;
  localparam int          CNTW = int'(PW) - 1 - int'(NH * HW);
  localparam int unsigned NW   = $clog2(NH + 1);

  logic              win_open;
  logic [TW-1:0]     wcnt;
  logic [NW-1:0]     nh;
  logic [HW-1:0]     hits [NH];
  logic [$clog2(HPC+1)-1:0] carry_n;
  logic [ADDR_W-1:0] carry_addr [HPC];
  logic [PW-1:0]     fl_sr;
  logic [TW-1:0]     fl_rem;

  // next-state values
  logic              opening, active, closing;
  logic [TW-1:0]     t;
  logic [NW-1:0]     n_n;
  logic [HW-1:0]     hits_n [NH];
  logic [$clog2(HPC+1)-1:0] carry_n_n;
  logic [ADDR_W-1:0] carry_addr_n [HPC];
  logic [3:0]        lost_n, carried_n;
  logic [PW-1:0]     payload;

  always_comb begin
    opening   = !win_open && (hit_valid != '0 || carry_n != '0);
    active    = win_open || opening;
    t         = opening ? '0 : wcnt;
    n_n       = opening ? '0 : nh;
    hits_n    = hits;
    carry_n_n = '0;
    carry_addr_n = carry_addr;
    lost_n    = '0;
    carried_n = '0;
    if (opening) begin
      for (int j = 0; j < NH; j++) hits_n[j] = '0;
      for (int c = 0; c < HPC; c++) begin
        if (c < int'(carry_n)) begin
          if (int'(n_n) < int'(NH)) begin
            hits_n[n_n] = {{TW{1'b1}}, carry_addr[c]};
            n_n = n_n + 1'b1;
          end else begin
            lost_n = lost_n + 4'd1;
          end
        end
      end
    end
    if (active) begin
      for (int i = 0; i < HPC; i++) begin
        if (hit_valid[i]) begin
          if (int'(n_n) < int'(NH)) begin
            hits_n[n_n] = {t, hit_addr[i]};
            n_n = n_n + 1'b1;
          end else if (RECOVERY && int'(t) == int'(NC) - 1) begin
            carry_addr_n[carry_n_n] = hit_addr[i];
            carry_n_n = carry_n_n + 1'b1;
            carried_n = carried_n + 4'd1;
          end else begin
            lost_n = lost_n + 4'd1;
          end
        end
      end
    end
    closing = active && int'(t) == int'(NC) - 1;
    // frame assembly
    payload = '0;
    begin
      logic [7:0]  cc;
      logic        par;
      logic [PW-1:0] tmp;
      cc  = hcnt_encode(4'(n_n - 1'b1), CNTW);
      par = 1'b0;
      tmp = PW'(cc[CNTW-1:0]);
      for (int j = 0; j < NH; j++) begin
        tmp = (tmp << HW) | PW'(hits_n[j]);
        par ^= ^hits_n[j];
      end
      payload = (tmp << 1) | PW'(par);
    end
  end

  assign trg_in       = tick && opening;
  assign fl_next      = tick && (closing || fl_rem != '0);
  assign hits_lost    = tick ? lost_n : 4'd0;
  assign hits_carried = tick ? carried_n : 4'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_open <= 1'b0;
      wcnt     <= '0;
      nh       <= '0;
      carry_n  <= '0;
      fl_sr    <= '0;
      fl_rem   <= '0;
      fl_bits  <= '0;
      for (int j = 0; j < NH; j++) hits[j] <= '0;
      for (int c = 0; c < HPC; c++) carry_addr[c] <= '0;
    end else if (tick) begin
      hits <= hits_n;
      nh   <= n_n;
      if (opening) carry_n <= '0;
      if (closing) begin
        win_open     <= 1'b0;
        carry_n      <= carry_n_n;
        carry_addr   <= carry_addr_n;
        fl_bits      <= payload[PW-1 -: FRM_W];
        fl_sr        <= payload << FRM_W;
        fl_rem       <= TW'(NC - 1);
      end else begin
        if (active) begin
          win_open <= 1'b1;
          wcnt     <= t + 1'b1;
        end
        if (fl_rem != '0) begin
          fl_bits <= fl_sr[PW-1 -: FRM_W];
          fl_sr   <= fl_sr << FRM_W;
          fl_rem  <= fl_rem - 1'b1;
        end else begin
          fl_bits <= '0;
        end
      end
    end
  end

  if (CNTW < 1 || CNTW > 8) begin : g_bad_size
    $error("ff_fl_bld: NC*FRM_W too small or too large for NH hits");
  end
  if (RECOVERY && NC > (1 << TW) - 1) begin : g_bad_rec
    $error("ff_fl_bld: hit recovery needs a spare timing code");
  end
endmodule
