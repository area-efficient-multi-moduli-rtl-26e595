// tb_msq_squarer4: checks the four-moduli squarer against integer squaring.
// N = 8 (the default) and N = 12 are checked exhaustively in all four modes,
// including the normal-mode operand 2^N (a[N] = 1); N = 10 (zero
// diminished-one squares skipped), N = 16, N = 20 and N = 32 with random operands.
// Outside the normal mode a[N] is driven at random and r[N] must stay 0.
module tb_msq_squarer4;
  import msq_pkg::*;
  import tb_msq_ref_pkg::*;

  logic      clk = 1'b0;
  int        checks = 0, failures = 0;
  msq_mode_e f;
  u128_t     stim;
  logic      top_bit;

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
    logic [W:0] r;
    logic [W:0] a;
    assign a = {top_bit, stim[W-1:0]};
    if (g == 0) begin : g_default
      msq_squarer4 dut (.a(a), .f(f), .r(r));
    end else begin : g_sized
      msq_squarer4 #(.N(W)) dut (.a(a), .f(f), .r(r));
    end
    assign res[g] = u128_t'(r);
  end

  // operand value as seen by channel g: the low N bits, or 2^N
  task automatic check(input int g, input int md);
    u128_t av;
    int n;
    n = NS[g];
    av = stim & ((u128_t'(1) << n) - 1);
    if (md == 3 && top_bit) av = u128_t'(1) << n;
    if (md == 2 && dim_zero(n, av)) return;
    checks++;
    if (!sq_ok(n, md, av, res[g])) begin
      failures++;
      if (failures < 10) $display("N=%0d mode %0d a=%0h r=%0h expected %0h", n, md, av, res[g], sq_ref(n, md, av));
    end
  endtask

  initial begin
    for (int md = 0; md < 4; md++) begin
      f = msq_mode_e'(md);
      for (int av = 0; av < (1 << 12); av++) begin
        @(negedge clk);
        stim = u128_t'(av);
        top_bit = (md == 3) ? 1'b0 : 1'($urandom);
        #1;
        if (av < 256) check(0, md);
        check(1, md);
      end
      for (int it = 0; it < 4000; it++) begin
        @(negedge clk);
        stim = {$urandom, $urandom, $urandom, $urandom};
        top_bit = (md == 3) ? 1'b0 : 1'($urandom);
        if (it < 4) stim = (it[0]) ? '1 : '0;
        #1;
        for (int g = 2; g < 6; g++) check(g, md);
      end
    end
    // operand 2^N in the normal mode, every width
    @(negedge clk);
    f = MOD_NORM;
    stim = '0;
    top_bit = 1'b1;
    #1;
    for (int g = 0; g < 6; g++) check(g, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
