// tb_msq_squarer3: checks the three-moduli squarer against integer squaring.
// N = 8 (the default) and N = 12 are checked exhaustively in every mode,
// N = 10 (where 2^N+1 = 5^2 * 41 makes a zero diminished-one square possible;
// those operands are skipped), N = 16, N = 20 and N = 32 with random operands.
// f = 2'b11 must behave as the diminished-one mode.
module tb_msq_squarer3;
  import msq_pkg::*;
  import tb_msq_ref_pkg::*;

  logic      clk = 1'b0;
  int        checks = 0, failures = 0;
  msq_mode_e f;
  u128_t     stim;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS [6] = '{8, 12, 10, 16, 20, 32};
  u128_t res [6];

  for (genvar g = 0; g < 6; g++) begin : g_dut
    localparam int W = NS[g];
    logic [W-1:0] r;
    if (g == 0) begin : g_default
      msq_squarer3 dut (.a(stim[W-1:0]), .f(f), .r(r));
    end else begin : g_sized
      msq_squarer3 #(.N(W)) dut (.a(stim[W-1:0]), .f(f), .r(r));
    end
    assign res[g] = u128_t'(r);
  end

  task automatic check(input int g, input int md);
    u128_t av;
    int n;
    n = NS[g];
    av = stim & ((u128_t'(1) << n) - 1);
    if (md == 2 && dim_zero(n, av)) return;
    checks++;
    if (!sq_ok(n, md, av, res[g])) begin
      failures++;
      if (failures < 10) $display("N=%0d mode %0d a=%0h r=%0h expected %0h", n, md, av, res[g], sq_ref(n, md, av));
    end
  endtask

  initial begin
    for (int fm = 0; fm < 4; fm++) begin
      f = msq_mode_e'(fm);
      // exhaustive N = 8 and N = 12 (N = 8 sees the low 8 bits of each value)
      for (int av = 0; av < (1 << 12); av++) begin
        @(negedge clk);
        stim = u128_t'(av);
        #1;
        if (av < 256) check(0, fm == 3 ? 2 : fm);
        check(1, fm == 3 ? 2 : fm);
      end
      for (int it = 0; it < 4000; it++) begin
        @(negedge clk);
        stim = {$urandom, $urandom, $urandom, $urandom};
        if (it < 4) stim = (it[0]) ? '1 : '0;
        #1;
        for (int g = 2; g < 6; g++) check(g, fm == 3 ? 2 : fm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
