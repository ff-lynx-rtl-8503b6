// ff_dcm: DCM, the FF-LYNX Data Concentrator.
//
// Merges N_IN frame streams into one. Each input is a stream of receive-buffer
// entries (rx_entry_t: word plus frame information, first/last marks), as
// delivered by an FF-RX host port or by a local chip. The output drives the
// host port of an FF-TX: a frame descriptor (frm_*) followed by the frame's
// words (data / data_valid / get_data).
// Frames are never interleaved: an idle concentrator picks the next input
// holding data in round-robin order, sends the descriptor of the frame at
// its head, then copies the frame's words until the entry marked eof. An
// entry found at the head of an input without a first-of-frame mark (rest
// of a truncated frame) is discarded (dropped pulses). A frame without
// words (nodata) only sends its descriptor. All handshakes are per clock
// (connect host_ce = 1 on both sides); the descriptor is offered only while
// its input still presents the frame. merged pulses once per frame sent.
// Event building (EVB = 1): when the frame picked carries a label and the
// frame at the head of another input carries the same label, and the two
// fit in one frame (15 words), they go out as one frame: one descriptor
// with the summed length, the picked frame's words (label first), then the
// other frame's words without its label. Only frames present at the same
// time are merged: nothing is held back to wait for a partner. The inputs
// must hold their head entries until taken (buffers do).
// Merging streams and the optional merging of frames with the same label
// follow the document; the round-robin, frame-granular policy and the
// merge rule above are this design's choices.
module ff_dcm
  import ff_lynx_pkg::*;
#(
  parameter int unsigned N_IN = 2,
  parameter bit          EVB  = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  rx_entry_t       in_entry [N_IN],
  input  logic [N_IN-1:0] in_valid,
  output logic [N_IN-1:0] in_get,
  output logic [15:0]     data,
  output logic            data_valid,
  input  logic            get_data,
  output logic            frm_valid,
  output fd_t             frm_desc,
  input  logic            frm_get,
  output logic            merged,
  output logic            dropped
);
  localparam int unsigned SW = (N_IN > 1) ? $clog2(N_IN) : 1;

  typedef enum logic [2:0] {D_IDLE, D_DESC, D_WORDS, D_SKIP, D_WORDS2} dstate_e;

  dstate_e   state;
  logic [SW-1:0] sel, last, pick, sel2, part;
  logic      found, pfound, evb;
  rx_entry_t head, head2;
  logic [4:0] mlen;

  assign head  = in_entry[sel];
  assign head2 = in_entry[sel2];
  assign mlen  = 5'(head.fd.len) + 5'(head2.fd.len) - 5'd1;

  // event-building partner of the input picked: another input whose head
  // is a labelled frame with the same label, short enough to merge
  always_comb begin
    rx_entry_t a, b;
    pfound = 1'b0;
    part   = pick;
    a      = in_entry[pick];
    for (int k = 0; k < int'(N_IN); k++) begin
      b = in_entry[k];
      if (EVB && !pfound && SW'(k) != pick && in_valid[k] && b.sof && b.fd.label_on &&
          !b.nodata && b.fd.len != 4'd0 && a.fd.label_on && !a.nodata && a.fd.len != 4'd0 &&
          b.word == a.word && 5'(a.fd.len) + 5'(b.fd.len) - 5'd1 <= 5'd15) begin
        pfound = 1'b1;
        part   = SW'(k);
      end
    end
  end

  // round-robin: first input with data after the last one served
  always_comb begin
    logic [SW:0] idx;
    found = 1'b0;
    pick  = last;
    idx   = '0;
    for (int k = 1; k <= int'(N_IN); k++) begin
      idx = (SW+1)'(last) + (SW+1)'(k);
      if (idx >= (SW+1)'(N_IN)) idx = idx - (SW+1)'(N_IN);
      if (!found && in_valid[idx[SW-1:0]]) begin
        found = 1'b1;
        pick  = idx[SW-1:0];
      end
    end
  end

  always_comb begin
    in_get     = '0;
    data       = head.word;
    data_valid = 1'b0;
    frm_valid  = 1'b0;
    frm_desc   = head.fd;
    dropped    = 1'b0;
    merged     = 1'b0;
    case (state)
      D_IDLE: if (found && !in_entry[pick].sof) begin
        in_get[pick] = 1'b1;
        dropped      = 1'b1;
      end
      D_DESC: begin
        frm_valid = in_valid[sel] && (!evb || in_valid[sel2]);
        if (evb) frm_desc.len = mlen[3:0];
        if (frm_get && frm_valid && head.nodata) begin
          in_get[sel] = 1'b1;
          merged      = 1'b1;
        end
      end
      D_WORDS: begin
        data_valid  = in_valid[sel];
        in_get[sel] = get_data;
        merged      = in_valid[sel] && get_data && head.eof && !evb;
      end
      D_SKIP: begin
        // the partner's label is already sent
        in_get[sel2] = 1'b1;
        merged       = in_valid[sel2] && head2.eof;
      end
      D_WORDS2: begin
        data        = head2.word;
        data_valid  = in_valid[sel2];
        in_get[sel2] = get_data;
        merged      = in_valid[sel2] && get_data && head2.eof;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE;
      sel   <= '0;
      sel2  <= '0;
      evb   <= 1'b0;
      last  <= SW'(N_IN - 1);
    end else begin
      case (state)
        D_IDLE: if (found && in_entry[pick].sof) begin
          sel   <= pick;
          last  <= pick;
          sel2  <= part;
          evb   <= pfound;
          state <= D_DESC;
        end
        D_DESC: if (frm_get && frm_valid) state <= head.nodata ? D_IDLE : D_WORDS;
        D_WORDS: if (in_valid[sel] && get_data && head.eof) state <= evb ? D_SKIP : D_IDLE;
        D_SKIP: if (in_valid[sel2]) state <= head2.eof ? D_IDLE : D_WORDS2;
        D_WORDS2: if (in_valid[sel2] && get_data && head2.eof) state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule
