// msq_booth_terms: radix-4 modified-Booth recoding of an N-bit operand and
// generation of the squaring terms C_i and P_i.
//
// Digit i is A_i = -2 a[2i+1] + a[2i] + a[2i-1], i = 0 .. N/2-1, where the
// bit below a[0] is the input a_m1.  The caller chooses a_m1 per modulus
// (0 for 2^N, a[N-1] for 2^N-1, ~a[N-1] for diminished-one 2^N+1), which
// makes the digits sum to the operand modulo the chosen modulus.  Then
//   A^2 = sum 2^(4i) C_i + sum 2^(4i+3) P_i
// with C_i = A_i^2, which is 0, 1 or 4 and so needs only bits 0 and 2, and
// P_i = A_i * Y_i where Y_i = sum_{k>i} 4^(k-i-1) A_k is the value of the
// bits above digit i (signed a[N-1:2i+2] plus a[2i+1]).  P_i fits in N-1-2i
// two's complement bits.  Each P_i is formed by a Booth select (0, Y, 2Y)
// followed by a conditional negation; the original description leaves it to
// earlier work, so the select-and-negate form is this design's choice.
//
// Interface: c_bits[2i] is C_i bit 0, c_bits[2i+1] is C_i bit 2; p_bits
// holds P_0, P_1, ... from bit 0 upwards, P_i at msq_pkg::p_offset(N, i).
// Purely combinational.
module msq_booth_terms #(
  parameter int N = 8
) (
  input  logic [N-1:0]                   a,
  input  logic                           a_m1,
  output logic [N-1:0]                   c_bits,
  output logic [msq_pkg::num_pp(N)-N-1:0] p_bits
);

  for (genvar i = 0; i < N / 2; i++) begin : g_digit
    logic b2, b1, b0;
    logic one, two;
    assign b2 = a[2*i+1];
    assign b1 = a[2*i];
    if (i == 0) begin : g_lsd
      assign b0 = a_m1;
    end else begin : g_digit_low
      assign b0 = a[2*i-1];
    end
    // |A_i| = 1, |A_i| = 2 (and, for P_i below, A_i < 0)
    assign one = b1 ^ b0;
    assign two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);

    assign c_bits[2*i]   = one;
    assign c_bits[2*i+1] = two;

    if (i < N / 2 - 1) begin : g_p
      localparam int W   = msq_pkg::p_width(N, i);
      localparam int OFF = msq_pkg::p_offset(N, i);
      // Y_i in W+1 bits: signed a[N-1:2i+2] plus a[2i+1]
      logic              neg;
      logic signed [W:0] y, mag;
      logic [W-1:0]      prod;
      assign neg  = b2 & ~(b1 & b0);
      assign y    = (W+1)'($signed(a[N-1:2*i+2])) + (W+1)'({1'b0, a[2*i+1]});
      assign mag  = two ? (y <<< 1) : (one ? y : '0);
      // the product fits in W bits, so bit W of the negation is dropped
      assign prod = W'(neg ? -mag : mag);
      assign p_bits[OFF +: W] = prod;
    end
  end

endmodule
