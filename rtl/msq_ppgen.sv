// msq_ppgen: partial-product matrix of the multi-moduli squarer.
//
// Builds the N-bit wide, ROWS-high matrix whose column sums give the square
// of the operand for the selected modulus.  Bits of weight below 2^N are the
// same in every mode and go straight into the matrix.  Bits of weight
// 2^(N+i) are folded into column i through a small per-bit multiplexer:
//   modulo 2^N-1 : the bit itself, sign bits of P inverted
//   modulo 2^N   : 0 (the bit is worth nothing)
//   modulo 2^N+1 : the bit inverted, sign bits of P as they are
// A row of correction bits t (one per column, a different constant per
// modulus, see msq_pkg) completes the matrix.  With FOUR = 1 (four-moduli
// squarer) one more row holds <-2A> for the normal modulo 2^N+1 mode: the
// vector ~a[N-2:0], a[N-1] | a_n, where a_n = 1 encodes the operand 2^N; it
// is 0 in the other modes.  The lowest Booth digit uses a[N-1] below a[0]
// for 2^N-1, 0 for 2^N and ~a[N-1] for both 2^N+1 modes.
//
// Rows are packed column by column (msq_pkg::cell_src) so the matrix is as
// high as its tallest column.  Purely combinational.  The encoding of mode
// is this design's own; in the three-moduli squarer (FOUR = 0) MOD_NORM is
// treated as MOD_DIM.
module msq_ppgen #(
  parameter int N    = 8,
  parameter bit FOUR = 1'b0,
  localparam int ROWS = msq_pkg::num_rows(N, FOUR)
) (
  input  logic              [N-1:0] a,
  input  logic                      a_n,
  input  msq_pkg::msq_mode_e        mode,
  output logic              [N-1:0] rows [ROWS]
);
  import msq_pkg::*;

  localparam int NPP = num_pp(N);
  localparam logic [N-1:0] T_M1   = N'(corr_m1(N));
  localparam logic [N-1:0] T_DIM  = N'(corr_dim(N, FOUR));
  localparam logic [N-1:0] T_NORM = N'(corr_norm(N));

  logic is_m1, is_p1, is_norm;
  assign is_m1   = (mode == MOD_M1);
  assign is_p1   = mode[1];
  assign is_norm = FOUR && (mode == MOD_NORM);

  // Bit below a[0] for the lowest Booth digit
  logic a_m1;
  assign a_m1 = is_m1 ? a[N-1] : (is_p1 ? ~a[N-1] : 1'b0);

  logic [N-1:0]       c_bits;
  logic [NPP-N-1:0]   p_bits;
  logic [NPP-1:0]     raw, pp;

  msq_booth_terms #(.N(N)) u_terms (
    .a      (a),
    .a_m1   (a_m1),
    .c_bits (c_bits),
    .p_bits (p_bits)
  );

  assign raw = {p_bits, c_bits};

  // Folding multiplexers for the bits of weight 2^N and above
  for (genvar k = 0; k < NPP; k++) begin : g_fold
    if (pp_weight(N, k) < N) begin : g_low
      assign pp[k] = raw[k];
    end else if (pp_is_msb(N, k)) begin : g_sign
      assign pp[k] = is_m1 ? ~raw[k] : (is_p1 & raw[k]);
    end else begin : g_high
      assign pp[k] = is_m1 ? raw[k] : (is_p1 & ~raw[k]);
    end
  end

  // Correction row
  logic [N-1:0] t;
  always_comb begin
    unique case (mode)
      MOD_M1:   t = T_M1;
      MOD_POW2: t = '0;
      MOD_DIM:  t = T_DIM;
      default:  t = FOUR ? T_NORM : T_DIM;
    endcase
  end

  // <-2A> row, four-moduli normal mode only
  logic [N-1:0] x2;
  if (FOUR) begin : g_x2row
    assign x2 = is_norm ? {~a[N-2:0], a[N-1] | a_n} : '0;
  end else begin : g_no_x2row
    assign x2 = '0;
  end

  // Pack the matrix
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      localparam int SRC = cell_src(N, FOUR, r, c);
      if (SRC >= 0) begin : g_pp
        assign rows[r][c] = pp[SRC];
      end else if (SRC == -2) begin : g_t
        assign rows[r][c] = t[c];
      end else if (FOUR && SRC == -3) begin : g_x2
        assign rows[r][c] = x2[c];
      end else begin : g_zero
        assign rows[r][c] = 1'b0;
      end
    end
  end

endmodule
