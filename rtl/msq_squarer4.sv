// msq_squarer4: four-moduli Booth-encoded squarer.
//
// r = a^2 modulo 2^N-1, 2^N, or 2^N+1 in either representation, as f selects
// (msq_pkg::msq_mode_e).  The operand has N+1 bits; a[N] is used only in the
// normal modulo 2^N+1 mode (operand 0 .. 2^N, result 0 .. 2^N in r[N:0]).  In
// the other modes a[N] is ignored, r[N] is 0 and r[N-1:0] is as in
// msq_squarer3 (diminished-one operand and result for MOD_DIM).
//
// It is the three-moduli squarer with one more matrix row, <-2A> in the
// normal mode and 0 otherwise, so the CSA tree has one more CSA; the low N
// operand bits drive the diminished-one Booth logic, which then yields
// (A+1)^2 - 1, and the extra row turns that into A^2.  The operand 2^N
// (a[N] = 1) is handled by OR-ing a[N] into bit 0 of that row.  The final
// adder supplies r[N].  Purely combinational.  N must be even and >= 4.
module msq_squarer4 #(
  parameter int N = 8
) (
  input  logic              [N:0] a,
  input  msq_pkg::msq_mode_e      f,
  output logic              [N:0] r
);
  import msq_pkg::*;

  localparam int ROWS = num_rows(N, 1'b1);

  if (N % 2 != 0 || N < 4 || N > 62) begin : g_bad_n
    $error("msq_squarer4: N must be even and within 4 .. 62");
  end

  logic [N-1:0] rows [ROWS];
  logic [N-1:0] sa, sb;

  msq_ppgen #(.N(N), .FOUR(1'b1)) u_pp (
    .a    (a[N-1:0]),
    .a_n  (a[N]),
    .mode (f),
    .rows (rows)
  );

  msq_csa_tree #(.N(N), .ROWS(ROWS)) u_tree (
    .rows  (rows),
    .mode  (f),
    .sum_a (sa),
    .sum_b (sb)
  );

  msq_final_adder #(.N(N)) u_add (
    .x    (sa),
    .y    (sb),
    .mode (f),
    .r    (r)
  );

endmodule
