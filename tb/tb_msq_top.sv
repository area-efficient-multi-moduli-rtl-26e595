// tb_msq_top: end-to-end test of both squarers at the default N = 8.
//
// Every operand of both channels is squared in every mode the channel has
// (the three-moduli channel in 3 modes, the four-moduli channel in 4 modes
// plus the operand 2^N) and compared with integer squaring.  It also counts
// how often each mechanism of the design was exercised and counts a failure
// for any that never happened:
//   - each modulus mode of each channel
//   - the normal-mode operand 2^N (a[N] = 1) and a result of 2^N (r[N] = 1)
//   - final-adder end-around carry = 1 modulo 2^N-1
//   - final-adder inverted carry = 1 modulo 2^N+1 (diminished-one increment)
//   - final-adder carry out dropped modulo 2^N
//   - a zero result modulo 2^N-1 (accepted as 0 or all ones)
module tb_msq_top;
  import msq_pkg::*;
  import tb_msq_ref_pkg::*;
  localparam int N = 8;

  logic [N-1:0] a3, r3;
  logic [N:0]   a4, r4;
  msq_mode_e    f3, f4;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  msq_top dut (.a3(a3), .f3(f3), .r3(r3), .a4(a4), .f4(f4), .r4(r4));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_mode3 [4];
  int n_mode4 [4];
  int n_two_n_in, n_two_n_out, n_eac, n_inv_eac, n_drop, n_zero_m1;

  initial begin
    u128_t e3, e4, v4;
    int md3;
    for (int md = 0; md < 4; md++) begin
      for (int av = 0; av <= (1 << N); av++) begin
        @(negedge clk);
        md3 = (md == 3) ? 2 : md;
        f3 = msq_mode_e'(md3);
        f4 = msq_mode_e'(md);
        a3 = N'(av);
        a4 = (N+1)'(av);
        #1;
        // three-moduli channel
        if (av < (1 << N)) begin
          checks++;
          n_mode3[md3]++;
          if (!sq_ok(N, md3, u128_t'(av), u128_t'(r3))) begin
            failures++;
            if (failures < 10) $display("sq3 mode %0d a=%0d r=%0d", md3, av, r3);
          end
        end
        // four-moduli channel (the operand 2^N exists only in normal mode)
        if (av < (1 << N) || md == 3) begin
          v4 = u128_t'(av);
          checks++;
          n_mode4[md]++;
          if (md == 3 && a4[N]) n_two_n_in++;
          if (md == 3 && r4[N]) n_two_n_out++;
          if (md == 0 && sq_ref(N, 0, v4) == 0) n_zero_m1++;
          if (!sq_ok(N, md, v4, u128_t'(r4))) begin
            failures++;
            if (failures < 10) $display("sq4 mode %0d a=%0d r=%0d", md, av, r4);
          end
          if (md == 0 && dut.u_sq4.u_add.gall) n_eac++;
          if (md >= 2 && dut.u_sq4.u_add.cin)  n_inv_eac++;
          if (md == 1 && dut.u_sq4.u_add.gall) n_drop++;
        end
      end
    end
    $display("modes sq3: %0d %0d %0d  sq4: %0d %0d %0d %0d",
             n_mode3[0], n_mode3[1], n_mode3[2], n_mode4[0], n_mode4[1], n_mode4[2], n_mode4[3]);
    $display("2^N in %0d, 2^N out %0d, EAC %0d, inverted carry %0d, dropped carry %0d, zero mod 2^N-1 %0d",
             n_two_n_in, n_two_n_out, n_eac, n_inv_eac, n_drop, n_zero_m1);
    for (int m = 0; m < 3; m++) begin checks++; if (n_mode3[m] == 0) failures++; end
    for (int m = 0; m < 4; m++) begin checks++; if (n_mode4[m] == 0) failures++; end
    checks++; if (n_two_n_in == 0)  failures++;
    checks++; if (n_two_n_out == 0) failures++;
    checks++; if (n_eac == 0)       failures++;
    checks++; if (n_inv_eac == 0)   failures++;
    checks++; if (n_drop == 0)      failures++;
    checks++; if (n_zero_m1 == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
