// tb_msq_csa_tree: random check of the Dadda CSA tree for several row counts.
// The two outputs must add up, modulo the selected modulus, to the sum of
// all input rows, plus one per CSA (ROWS-2 in all) modulo 2^N+1.
module tb_msq_csa_tree;
  import msq_pkg::*;
  localparam int N = 8;

  logic      clk = 1'b0;
  int        checks = 0, failures = 0;
  msq_mode_e mode;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Trees of 3 .. 7 rows, all driven with the same random rows
  logic [N-1:0] rnd [7];
  logic [N-1:0] sa [3:7];
  logic [N-1:0] sb [3:7];

  for (genvar R = 3; R <= 7; R++) begin : g_dut
    logic [N-1:0] rows [R];
    for (genvar r = 0; r < R; r++) begin : g_r
      assign rows[r] = rnd[r];
    end
    msq_csa_tree #(.N(N), .ROWS(R)) dut (.rows(rows), .mode(mode), .sum_a(sa[R]), .sum_b(sb[R]));
  end

  initial begin
    longint m, tot, lhs;
    int md;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      for (int r = 0; r < 7; r++) rnd[r] = (it < 8) ? '1 : N'($urandom);
      md = it % 4;
      mode = msq_mode_e'(md);
      #1;
      case (md)
        0: m = (longint'(1) << N) - 1;
        1: m = longint'(1) << N;
        default: m = (longint'(1) << N) + 1;
      endcase
      for (int R = 3; R <= 7; R++) begin
        tot = (md >= 2) ? longint'(R - 2) : 0;
        for (int r = 0; r < R; r++) tot += longint'(rnd[r]);
        lhs = longint'(sa[R]) + longint'(sb[R]);
        checks++;
        if (lhs % m != tot % m) begin
          failures++;
          if (failures < 10) $display("rows=%0d mode=%0d mismatch", R, md);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
