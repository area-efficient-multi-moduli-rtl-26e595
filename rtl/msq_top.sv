// msq_top: the two multi-moduli squarer architectures side by side.
//
// Channel 3 is the three-moduli squarer (modulo 2^N-1, 2^N, diminished-one
// 2^N+1, N-bit operand); channel 4 is the four-moduli squarer (adds the
// normal-representation modulo 2^N+1 case, N+1 bit operand and result).
// Each has its own operand and modulus select; see msq_squarer3 and
// msq_squarer4.  Both are purely combinational.  N defaults to 8, the
// operand width of the worked example; any even N from 4 up works.
module msq_top #(
  parameter int N = 8
) (
  input  logic              [N-1:0] a3,
  input  msq_pkg::msq_mode_e        f3,
  output logic              [N-1:0] r3,
  input  logic              [N:0]   a4,
  input  msq_pkg::msq_mode_e        f4,
  output logic              [N:0]   r4
);

  msq_squarer3 #(.N(N)) u_sq3 (
    .a (a3),
    .f (f3),
    .r (r3)
  );

  msq_squarer4 #(.N(N)) u_sq4 (
    .a (a4),
    .f (f4),
    .r (r4)
  );

endmodule
