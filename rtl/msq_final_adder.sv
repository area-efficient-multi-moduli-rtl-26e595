// msq_final_adder: two-operand multi-moduli adder, Kogge-Stone prefix.
//
// Adds the two vectors left by the CSA tree modulo the selected modulus.  A
// Kogge-Stone parallel-prefix network forms the group generate G[i:0] and
// propagate P[i:0] of x + y.  A multiplexer picks the re-entrant carry cin:
//   modulo 2^N-1 : G[N-1:0]          (end-around carry)
//   modulo 2^N   : 0
//   modulo 2^N+1 : ~G[N-1:0]         (diminished-one addition, adds 1 mod 2^N+1)
// One extra prefix level folds cin into every carry, c[i] = G[i-1:0] |
// P[i-1:0] & cin, and a row of XOR gates gives r[N-1:0] = p ^ c.
// In the normal modulo 2^N+1 mode the result is one bit wider: r[N] is set
// when x + y = 2^N - 1, i.e. ~G & P[N-1:0]; then x + y + 1 = 2^N and the low
// bits are 0.  In the other modes r[N] is 0.
// Modulo 2^N-1 the sum 2^N-1 is left as all ones (the second encoding of 0).
// Purely combinational, log2(N) + 1 prefix levels.
module msq_final_adder #(
  parameter int N = 8
) (
  input  logic              [N-1:0] x,
  input  logic              [N-1:0] y,
  input  msq_pkg::msq_mode_e        mode,
  output logic              [N:0]   r
);
  import msq_pkg::*;

  localparam int L = $clog2(N);

  logic [N-1:0] g [L+1];
  logic [N-1:0] p [L+1];

  assign g[0] = x & y;
  assign p[0] = x ^ y;

  for (genvar l = 0; l < L; l++) begin : g_ks
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_op
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
        assign p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
      end else begin : g_buf
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  logic gall, pall, cin;
  assign gall = g[L][N-1];
  assign pall = p[L][N-1];

  always_comb begin
    unique case (mode)
      MOD_M1:   cin = gall;
      MOD_POW2: cin = 1'b0;
      default:  cin = ~gall;
    endcase
  end

  logic [N-1:0] carry;
  assign carry[0] = cin;
  for (genvar i = 1; i < N; i++) begin : g_cin
    assign carry[i] = g[L][i-1] | (p[L][i-1] & cin);
  end

  assign r[N-1:0] = p[0] ^ carry;
  assign r[N]     = (mode == MOD_NORM) & ~gall & pall;

endmodule
