// tb_msq_booth_terms: exhaustive check of the Booth recoding and the squaring
// terms.  For every operand and both values of the bit below a[0] it checks
// each C_i and P_i against A_i^2 and A_i*Y_i worked out from integer digit
// values, and the total sum 2^(4i) C_i + 2^(4i+3) P_i against the square of
// the recoded value a - 2^N a[N-1] + a_m1.
module tb_msq_booth_terms;
  localparam int N  = 8;
  localparam int NP = msq_pkg::num_pp(N) - N;

  logic [N-1:0]  a;
  logic          a_m1;
  logic [N-1:0]  c_bits;
  logic [NP-1:0] p_bits;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;

  msq_booth_terms dut (.a(a), .a_m1(a_m1), .c_bits(c_bits), .p_bits(p_bits));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(input logic [N-1:0] v, input logic m1, input int i);
    int lo;
    lo = (i == 0) ? int'(m1) : int'(v[2*i-1]);
    return -2 * int'(v[2*i+1]) + int'(v[2*i]) + lo;
  endfunction

  initial begin
    longint total, val, y, pi, ci;
    int off, w;
    for (int av = 0; av < (1 << N); av++) begin
      for (int m = 0; m < 2; m++) begin
        @(negedge clk);
        a = N'(av);
        a_m1 = m[0];
        #1;
        total = 0;
        off = 0;
        for (int i = 0; i < N / 2; i++) begin
          ci = 4 * longint'(c_bits[2*i+1]) + longint'(c_bits[2*i]);
          checks++;
          if (ci != digit(a, a_m1, i) * digit(a, a_m1, i)) begin
            failures++;
            if (failures < 10) $display("C%0d wrong a=%h m1=%0d", i, a, a_m1);
          end
          total += ci << (4 * i);
          if (i < N / 2 - 1) begin
            w = N - 1 - 2 * i;
            y = 0;
            for (int k = i + 1; k < N / 2; k++) y += longint'(digit(a, a_m1, k)) << (2 * (k - i - 1));
            pi = 0;
            for (int j = 0; j < w; j++) pi += longint'(p_bits[off + j]) << j;
            if (p_bits[off + w - 1]) pi -= longint'(1) << w;
            checks++;
            if (pi != y * digit(a, a_m1, i)) begin
              failures++;
              if (failures < 10) $display("P%0d wrong a=%h m1=%0d got %0d", i, a, a_m1, pi);
            end
            total += pi << (4 * i + 3);
            off += w;
          end
        end
        val = longint'(av) - (longint'(a[N-1]) << N) + longint'(a_m1);
        checks++;
        if (total != val * val) begin
          failures++;
          if (failures < 10) $display("sum wrong a=%h m1=%0d %0d vs %0d", a, a_m1, total, val * val);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
