// msq_csa: N-bit carry-save adder with a modulus-dependent re-entrant carry.
//
// Reduces three N-bit vectors to a sum and a carry vector.  The carry out of
// the top bit position, worth 2^N, re-enters at bit 0 of the carry vector:
//   modulo 2^N-1 : as it is (end-around carry, 2^N = 1)
//   modulo 2^N   : dropped (2^N = 0)
//   modulo 2^N+1 : inverted (inverted end-around carry, 2^N = -1 = ~z - 1);
//                  the -1 this leaves is part of the squarer's correction word
// Purely combinational.
module msq_csa #(
  parameter int N = 8
) (
  input  logic              [N-1:0] x,
  input  logic              [N-1:0] y,
  input  logic              [N-1:0] z,
  input  msq_pkg::msq_mode_e        mode,
  output logic              [N-1:0] s,
  output logic              [N-1:0] c
);
  import msq_pkg::*;

  logic [N-1:0] maj;
  logic         reentry;

  assign s   = x ^ y ^ z;
  assign maj = (x & y) | (x & z) | (y & z);

  always_comb begin
    unique case (mode)
      MOD_M1:   reentry = maj[N-1];
      MOD_POW2: reentry = 1'b0;
      default:  reentry = ~maj[N-1];
    endcase
  end

  assign c = {maj[N-2:0], reentry};

endmodule
