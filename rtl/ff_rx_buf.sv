// ff_rx_buf: RX_BUF, the output buffer of the FF-LYNX receiver.
//
// Holds received words, each with its frame information (rx_entry_t: word,
// descriptor fields, first/last-of-frame marks, error flags), until the host
// takes them. Host side, FF-LYNX handshake: data_valid is high while an entry
// is available on `entry`; it is taken on a clock edge where host_ce and
// get_data are both high; with get_data low the buffer holds the entry
// (flow control). host_ce is the host's clock enable (the recovered
// reference tick, or 1). A write to a full buffer is dropped and pulses
// overflow. The handshake follows the document; the depth is this design's
// choice.
module ff_rx_buf
  import ff_lynx_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      wr_en,
  input  rx_entry_t wr_entry,
  input  logic      host_ce,
  output rx_entry_t entry,
  output logic      data_valid,
  input  logic      get_data,
  output logic      overflow
);
  logic full, empty;

  ff_fifo #(.W($bits(rx_entry_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en,
    .wr_data(wr_entry),
    .rd_en  (host_ce && get_data),
    .rd_data(entry),
    .full,
    .empty,
    .count  ()
  );

  assign data_valid = !empty;
  assign overflow   = wr_en && full;
endmodule
