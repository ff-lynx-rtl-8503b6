// ff_rx_rm: RX_RM, the receive-side Redundancy Manager of an FF-LYNX ring node.
//
// In a ring every node receives two links: the primary one from the previous
// node and a bypass one from the node before that. RX_RM forwards the entry
// stream of the primary receiver while that receiver is synchronized
// (locked[0]) and switches to the bypass receiver when the primary link is
// lost, so a failed node is skipped; it switches back once the primary link
// is locked again. It only switches between frames, unless the selected link
// is lost and its buffer is empty. The stream that is not selected is
// drained and discarded, so after a switch the new input usually starts in
// the middle of a frame: its entries are discarded up to the next
// first-of-frame entry, and only whole frames are forwarded.
// Handshakes are per clock (entry / valid / get).
// sel tells which input is in use.
// Bypassing faulty nodes follows the document; the selection rule is this
// design's choice.
module ff_rx_rm
  import ff_lynx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] locked,
  input  rx_entry_t  in_entry [2],
  input  logic [1:0] in_valid,
  output logic [1:0] in_get,
  output rx_entry_t  entry,
  output logic       valid,
  input  logic       get,
  output logic       sel,
  output logic       switched
);
  logic mid;      // a frame is partly forwarded
  logic want;
  logic skip;     // discarding a frame tail after a switch
  logic tail;

  assign want  = locked[0] ? 1'b0 : (locked[1] ? 1'b1 : sel);
  // nothing is forwarded on the clock of a switch
  assign switched = (want != sel) && (!mid || (!locked[sel] && !in_valid[sel]));
  assign tail  = skip && in_valid[sel] && !in_entry[sel].sof;
  assign entry = in_entry[sel];
  assign valid = in_valid[sel] && !tail && !switched;

  always_comb begin
    in_get       = '0;
    in_get[sel]  = tail ? 1'b1 : (get && !switched);
    in_get[!sel] = 1'b1;
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel  <= 1'b0;
      mid  <= 1'b0;
      skip <= 1'b0;
    end else begin
      if (switched) begin
        sel  <= want;
        mid  <= 1'b0;
        skip <= 1'b1;
      end else if (in_valid[sel] && in_entry[sel].sof) begin
        skip <= 1'b0;
      end
      if (!switched && valid && get) begin
        mid <= !entry.eof;
      end
    end
  end
endmodule
