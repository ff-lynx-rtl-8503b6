// ff_ref_pkg: reference models used by the FF-LYNX testbenches.
//
// Written independently of the RTL functions: the CRC is computed by long
// division of the message polynomial, the Hamming codes from explicit parity
// equations, so that a testbench does not check the RTL against itself.
package ff_ref_pkg;

  localparam logic [5:0] R_SYNC = 6'b011110;
  localparam logic [5:0] R_HDR  = 6'b101101;
  localparam logic [5:0] R_TRG  = 6'b110011;

  // CRC-8 (x^8+x^2+x+1, zero init) of n 16-bit words: remainder of
  // M(x)*x^8 divided by the generator.
  function automatic logic [7:0] ref_crc8(input logic [15:0] w [16], input int n);
    logic [8:0] rem;
    rem = '0;
    for (int i = 0; i < n; i++)
      for (int b = 15; b >= 0; b--) begin
        rem = {rem[7:0], w[i][b]};
        if (rem[8]) rem = rem ^ 9'h107;
      end
    for (int b = 0; b < 8; b++) begin
      rem = {rem[7:0], 1'b0};
      if (rem[8]) rem = rem ^ 9'h107;
    end
    return rem[7:0];
  endfunction

  // Extended Hamming(12,7) of {len[3:0], dtype, label_on, last}.
  // Bit k of the result is code position k+1; bit 11 is overall parity.
  function automatic logic [11:0] ref_fd(input logic [6:0] d);
    logic [11:0] c;
    c = '0;
    c[2]  = d[0];  // pos 3
    c[4]  = d[1];  // pos 5
    c[5]  = d[2];  // pos 6
    c[6]  = d[3];  // pos 7
    c[8]  = d[4];  // pos 9
    c[9]  = d[5];  // pos 10
    c[10] = d[6];  // pos 11
    c[0]  = c[2] ^ c[4] ^ c[6] ^ c[8] ^ c[10];          // pos 1: 3,5,7,9,11
    c[1]  = c[2] ^ c[5] ^ c[6] ^ c[9] ^ c[10];          // pos 2: 3,6,7,10,11
    c[3]  = c[4] ^ c[5] ^ c[6];                         // pos 4: 5,6,7
    c[7]  = c[8] ^ c[9] ^ c[10];                        // pos 8: 9,10,11
    c[11] = ^c[10:0];
    return c;
  endfunction

  // Hamming(3,1) = repetition: hit count - 1 for 2 hits maximum.
  function automatic logic [2:0] ref_cnt3(input logic v);
    return {3{v}};
  endfunction

endpackage
