// ff_lynx_pkg: constants, types and coding functions shared by the FF-LYNX
// transmitter and receiver.
//
// The link carries, in every cycle of the reference clock F, S serial bits:
// 2 bits of the THS channel (triggers, frame headers, sync) followed by S-2
// bits of the FRM channel (frame data). S is 4, 8 or 16 (the 4x, 8x and 16x
// speed options). THS patterns are 6 bits long and so span 3 reference cycles.
//
// Protocol facts (the 2+S-2 split, 6-bit THS patterns, 12-bit Hamming-coded
// frame descriptor with 4-bit length, data type, label-on and last-frame
// fields, 16-bit label and words, 8-bit CRC, Hamming-coded hit count and
// payload parity in FL frames) follow the FF-LYNX description. The actual
// code words below are this design's choice: the three THS code words are at
// Hamming distance 4 from each other and from the idle pattern 000000, so a
// single flipped bit is corrected and a double flip is flagged. The frame
// descriptor uses an extended Hamming(12,7) SEC-DED code, the hit count a
// Hamming code shortened to the width that is left in the FL frame, and the
// CRC is CRC-8 with polynomial x^8+x^2+x+1 and a zero initial value.
package ff_lynx_pkg;

  // THS channel code words, sent MSB first, 2 bits per reference cycle.
  localparam logic [5:0] THS_IDLE = 6'b000000;
  localparam logic [5:0] THS_SYNC = 6'b011110;
  localparam logic [5:0] THS_HDR  = 6'b101101;
  localparam logic [5:0] THS_TRG  = 6'b110011;

  typedef enum logic [1:0] {
    PAT_NONE = 2'd0,
    PAT_TRG  = 2'd1,
    PAT_HDR  = 2'd2,
    PAT_SYNC = 2'd3
  } ths_pat_e;

  // The 7 information bits of a VL frame descriptor.
  typedef struct packed {
    logic [3:0] len;       // 16-bit words after the descriptor, label included
    logic       dtype;     // data type: 0 configuration/monitoring, 1 raw data
    logic       label_on;  // first word is a label
    logic       last;      // last frame of a data packet
  } fd_t;

  // Receive-side buffer entry: one word plus the frame information.
  typedef struct packed {
    logic [15:0] word;
    fd_t         fd;
    logic        sof;       // first entry of a frame
    logic        eof;       // last entry of a frame
    logic        nodata;    // frame without words (len = 0): entry carries no word
    logic        crc_err;   // CRC mismatch (valid on the eof entry)
    logic        fd_corr;   // frame descriptor had a corrected single error
  } rx_entry_t;

  function automatic int unsigned popcount6(input logic [5:0] v);
    int unsigned n = 0;
    for (int i = 0; i < 6; i++) n += v[i];
    return n;
  endfunction

  // ---------------------------------------------------------------------
  // Extended Hamming(12,7). Code bit c[p-1] holds position p (p = 1..11):
  // parity at positions 1,2,4,8, data at 3,5,6,7,9,10,11. c[11] is the
  // overall parity of c[10:0].
  // ---------------------------------------------------------------------
  function automatic logic [11:0] fd_encode(input fd_t fd);
    logic [6:0]  d;
    logic [11:0] c;
    int          k;
    d = fd;
    c = '0;
    k = 0;
    for (int p = 1; p <= 11; p++) begin
      if ((p & (p - 1)) != 0) begin
        c[p-1] = d[k];
        k++;
      end
    end
    for (int b = 0; b < 4; b++) begin
      logic par;
      par = 1'b0;
      for (int p = 1; p <= 11; p++)
        if ((p & (1 << b)) != 0 && (p & (p - 1)) != 0) par ^= c[p-1];
      c[(1 << b) - 1] = par;
    end
    c[11] = ^c[10:0];
    return c;
  endfunction

  // Returns the corrected descriptor; corr = a single error was corrected,
  // err = an uncorrectable (double) error was found.
  function automatic fd_t fd_decode(input logic [11:0] c_in, output logic corr,
                                    output logic err);
    logic [11:0] c;
    logic [3:0]  syn;
    logic        par;
    logic [6:0]  d;
    int          k;
    c   = c_in;
    syn = '0;
    for (int p = 1; p <= 11; p++)
      if (c[p-1]) syn ^= 4'(p);
    par  = ^c;
    corr = 1'b0;
    err  = 1'b0;
    if (par) begin
      corr = 1'b1;
      if (syn == 4'd0) c[11] = ~c[11];
      else if (syn <= 4'd11) c[syn-1] = ~c[syn-1];
      else err = 1'b1;
    end else if (syn != 4'd0) begin
      err = 1'b1;
    end
    d = '0;
    k = 0;
    for (int p = 1; p <= 11; p++) begin
      if ((p & (p - 1)) != 0) begin
        d[k] = c[p-1];
        k++;
      end
    end
    return fd_t'(d);
  endfunction

  // ---------------------------------------------------------------------
  // Hamming code for the hit count of FL frames, n code bits (n <= 8).
  // Positions 1..n, parity bits at powers of two, data bits (LSB first) at
  // the other positions; data bits beyond the available positions are 0.
  // Code bit c[p-1] holds position p.
  // ---------------------------------------------------------------------
  function automatic logic [7:0] hcnt_encode(input logic [3:0] v, input int n);
    logic [7:0] c;
    int         k;
    c = '0;
    k = 0;
    for (int p = 1; p <= 8; p++) begin
      if (p <= n && (p & (p - 1)) != 0) begin
        c[p-1] = (k < 4) ? v[k] : 1'b0;
        k++;
      end
    end
    for (int b = 0; b < 3; b++) begin
      logic par;
      par = 1'b0;
      for (int p = 1; p <= 8; p++)
        if (p <= n && (p & (1 << b)) != 0 && (p & (p - 1)) != 0) par ^= c[p-1];
      if ((1 << b) <= n) c[(1 << b) - 1] = par;
    end
    return c;
  endfunction

  function automatic logic [3:0] hcnt_decode(input logic [7:0] c_in, input int n,
                                             output logic corr, output logic err);
    logic [7:0] c;
    logic [3:0] syn;
    logic [3:0] v;
    int         k;
    c   = c_in;
    syn = '0;
    for (int p = 1; p <= 8; p++)
      if (p <= n && c[p-1]) syn ^= 4'(p);
    corr = 1'b0;
    err  = 1'b0;
    if (syn != 4'd0) begin
      if (int'(syn) <= n) begin
        c[syn-1] = ~c[syn-1];
        corr = 1'b1;
      end else begin
        err = 1'b1;
      end
    end
    v = '0;
    k = 0;
    for (int p = 1; p <= 8; p++) begin
      if (p <= n && (p & (p - 1)) != 0) begin
        if (k < 4) v[k] = c[p-1];
        k++;
      end
    end
    return v;
  endfunction

  // CRC-8, polynomial 0x07, MSB first, over 16-bit words.
  function automatic logic [7:0] crc8_word(input logic [7:0] crc_in, input logic [15:0] w);
    logic [7:0] crc;
    crc = crc_in;
    for (int i = 15; i >= 0; i--) begin
      logic fb;
      fb  = crc[7] ^ w[i];
      crc = {crc[6:0], 1'b0};
      if (fb) crc ^= 8'h07;
    end
    return crc;
  endfunction

  function automatic int unsigned clog2_min1(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
