// ff_des: DES, the deserializer of the FF-LYNX receiver.
//
// Shifts the serial line `dat` into a register of the last 3*SPEED bits on
// every bit clock. Two views of it are given:
//  * raw6: the 6 bits that would be a THS pattern if the newest bit were the
//    last bit of a reference cycle (the first 2 bits of each of the last three
//    SPEED-bit groups). The synchronizer scans it for the sync pattern at
//    every bit position.
//  * on the recovered reference tick (tick_rx from SYNC) the newest SPEED
//    bits are one reference cycle: they are split into the 2 THS bits and the
//    SPEED-2 FRM bits and registered as cyc_ths / cyc_frm, with cyc_valid
//    high for one clock in the clock that follows.
// The THS/FRM split follows the document; the rest is this design's choice.
module ff_des #(
  parameter int unsigned SPEED = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             dat,
  input  logic             tick_rx,
  output logic [5:0]       raw6,
  output logic             cyc_valid,
  output logic [1:0]       cyc_ths,
  output logic [SPEED-3:0] cyc_frm
);
  localparam int unsigned L = 3 * SPEED;

  logic [L-1:0] sh;

  assign raw6 = {sh[L-1 -: 2], sh[2*SPEED-1 -: 2], sh[SPEED-1 -: 2]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      cyc_valid <= 1'b0;
      cyc_ths   <= '0;
      cyc_frm   <= '0;
    end else begin
      sh        <= {sh[L-2:0], dat};
      cyc_valid <= tick_rx;
      if (tick_rx) begin
        cyc_ths <= sh[SPEED-1 -: 2];
        cyc_frm <= sh[SPEED-3:0];
      end
    end
  end
endmodule
