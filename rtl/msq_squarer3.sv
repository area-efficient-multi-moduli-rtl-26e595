// msq_squarer3: three-moduli Booth-encoded squarer.
//
// r = a^2 modulo 2^N-1, 2^N or 2^N+1 as f selects (msq_pkg::msq_mode_e).
// Modulo 2^N+1 the operand and result are in diminished-one form: a holds
// A-1 for A in 1 .. 2^N and r holds <A^2>-1 (a zero operand, which the
// diminished-one form flags apart, is not handled here).  f = MOD_NORM is
// not a mode of this squarer and acts as MOD_DIM.  Modulo 2^N-1 a zero
// result may appear as all ones.
//
// Structure: msq_ppgen builds the folded partial-product matrix (N + N^2/4 - 1
// Booth pp bits plus N correction bits), msq_csa_tree reduces it to two rows
// with modulo CSAs, msq_final_adder adds them.  Purely combinational, no
// clock.  N must be even and at least 4.
module msq_squarer3 #(
  parameter int N = 8
) (
  input  logic              [N-1:0] a,
  input  msq_pkg::msq_mode_e        f,
  output logic              [N-1:0] r
);
  import msq_pkg::*;

  localparam int ROWS = num_rows(N, 1'b0);

  if (N % 2 != 0 || N < 4 || N > 62) begin : g_bad_n
    $error("msq_squarer3: N must be even and within 4 .. 62");
  end

  msq_mode_e    mode;
  logic [N-1:0] rows [ROWS];
  logic [N-1:0] sa, sb;
  logic [N:0]   sum;   // sum[N] is 0 outside the normal 2^N+1 mode

  assign mode = (f == MOD_NORM) ? MOD_DIM : f;

  msq_ppgen #(.N(N), .FOUR(1'b0)) u_pp (
    .a    (a),
    .a_n  (1'b0),
    .mode (mode),
    .rows (rows)
  );

  msq_csa_tree #(.N(N), .ROWS(ROWS)) u_tree (
    .rows  (rows),
    .mode  (mode),
    .sum_a (sa),
    .sum_b (sb)
  );

  msq_final_adder #(.N(N)) u_add (
    .x    (sa),
    .y    (sb),
    .mode (mode),
    .r    (sum)
  );

  assign r = sum[N-1:0];

endmodule
