// ff_tx_rm: TX_RM, the transmit-side Redundancy Manager of an FF-LYNX ring
// node.
//
// Feeds one stream (frame descriptors and words, per-clock handshakes) to the
// two transmitters of a node: one drives the link to the next node, the other
// the bypass link to the node after it. A word or descriptor is offered to
// the enabled transmitters only when all of them can take it, so both
// transmitters see the same frames and stay identical. A transmitter whose
// en bit is 0 is left out of the handshake.
// Duplicating the output towards two nodes follows the document; the
// handshake rule is this design's choice.
module ff_tx_rm
  import ff_lynx_pkg::*;
(
  input  logic [1:0]  en,
  input  logic [15:0] data,
  input  logic        data_valid,
  output logic        get_data,
  input  logic        frm_valid,
  input  fd_t         frm_desc,
  output logic        frm_get,
  output logic [15:0] tx_data,
  output logic [1:0]  tx_data_valid,
  input  logic [1:0]  tx_get_data,
  output logic [1:0]  tx_frm_valid,
  output fd_t         tx_frm_desc,
  input  logic [1:0]  tx_frm_get
);
  assign get_data      = &(tx_get_data | ~en);
  assign frm_get       = &(tx_frm_get | ~en);
  assign tx_data       = data;
  assign tx_frm_desc   = frm_desc;
  assign tx_data_valid = {2{data_valid && get_data}} & en;
  assign tx_frm_valid  = {2{frm_valid && frm_get}} & en;
endmodule
