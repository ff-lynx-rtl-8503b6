// ff_tx_buf: TX_BUF, the input buffer of the FF-LYNX transmitter.
//
// Holds the 16-bit words written by the host until the frame builder puts
// them into a frame. The host side uses the FF-LYNX handshake: the host
// raises data_valid with a word on data; the word is taken on a clock edge
// where host_ce is high and get_data is high. get_data is high while the
// buffer has room, so the host stops when it is low and resumes when it
// returns high (optional flow control). host_ce is the strobe at which the
// host port is sampled: the reference-cycle tick for a host running at the
// reference clock, or 1 for a host running at the bit clock.
// The read side is show-ahead: rd_data is the oldest word, rd_en takes it,
// count is the number of words held.
// The handshake follows the document; the depth (32 words, two maximum-size
// frames) is this design's choice.
module ff_tx_buf #(
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       host_ce,
  input  logic [15:0]                data,
  input  logic                       data_valid,
  output logic                       get_data,
  input  logic                       rd_en,
  output logic [15:0]                rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  logic full, empty;

  ff_fifo #(.W(16), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en  (host_ce && data_valid),
    .wr_data(data),
    .rd_en,
    .rd_data,
    .full,
    .empty,
    .count
  );

  assign get_data = !full;
endmodule
