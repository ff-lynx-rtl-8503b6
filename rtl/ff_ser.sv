// ff_ser: SER, the serializer of the FF-LYNX transmitter.
//
// The transmitter runs on the bit clock (SPEED times the reference clock F;
// SPEED = 4, 8 or 16). A bit counter divides it down and pulses `tick` on the
// last bit clock of every reference cycle: all reference-rate logic of the
// transmitter advances on that tick. At the tick the serializer loads the
// 2 THS bits and the SPEED-2 FRM bits prepared for the next cycle and then
// shifts them out MSB first, THS bits first, one per bit clock on `dat`.
// The line clock of the double-wire link is the bit clock itself.
// The THS-first order within a reference cycle and the bit split follow the
// document; the MSB-first order is this design's choice.
module ff_ser #(
  parameter int unsigned SPEED = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       ths_bits,
  input  logic [SPEED-3:0] frm_bits,
  output logic             tick,
  output logic             dat
);
  logic [$clog2(SPEED)-1:0] cnt;
  logic [SPEED-1:0]         sr;

  assign tick = (cnt == ($clog2(SPEED))'(SPEED - 1));
  assign dat  = sr[SPEED-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      sr  <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (tick) sr <= {ths_bits, frm_bits};
      else      sr <= sr << 1;
    end
  end

  if (SPEED != 4 && SPEED != 8 && SPEED != 16) begin : g_bad_speed
    $error("ff_ser: SPEED must be 4, 8 or 16");
  end
endmodule
