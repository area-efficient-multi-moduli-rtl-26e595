// tb_msq_ppgen: exhaustive check of the folded partial-product matrix, for
// the three-moduli (FOUR = 0) and four-moduli (FOUR = 1) variants at N = 8.
// The weighted sum S of all matrix bits must satisfy, with NCSA = ROWS - 2
// CSAs to follow and a final adder that adds 1 modulo 2^N+1:
//   2^N-1 : S = A^2               mod 2^N-1
//   2^N   : S = A^2               mod 2^N
//   dim   : S + NCSA + 1 = (A+1)^2 - 1 mod 2^N+1   (a holds A)
//   normal: S + NCSA + 1 = A^2    mod 2^N+1         (four-moduli only)
// It also checks the matrix heights (5 rows and 6 rows at N = 8) and the
// matrix bit and multiplexer counts for N = 8, 12, 16, 20 and 32.
module tb_msq_ppgen;
  import msq_pkg::*;
  import tb_msq_ref_pkg::*;
  localparam int N  = 8;
  localparam int R3 = num_rows(N, 1'b0);
  localparam int R4 = num_rows(N, 1'b1);

  logic [N-1:0] a;
  logic         a_n;
  msq_mode_e    mode;
  logic [N-1:0] rows3 [R3];
  logic [N-1:0] rows4 [R4];
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  msq_ppgen #(.N(N), .FOUR(1'b0)) dut3 (.a(a), .a_n(1'b0), .mode(mode), .rows(rows3));
  msq_ppgen #(.N(N), .FOUR(1'b1)) dut4 (.a(a), .a_n(a_n), .mode(mode), .rows(rows4));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit matrix_ok(input longint s, input int rows, input int md, input u128_t av);
    longint m, e;
    case (md)
      0: begin m = (longint'(1) << N) - 1; return (s % m) == longint'(sq_ref(N, 0, av)); end
      1: begin m = longint'(1) << N;       return (s % m) == longint'(sq_ref(N, 1, av)); end
      2: begin m = (longint'(1) << N) + 1; e = longint'(sq_ref(N, 2, av));
               return ((s + rows - 2 + 1) % m) == e; end
      default: begin m = (longint'(1) << N) + 1; e = longint'(sq_ref(N, 3, av));
               return ((s + rows - 2 + 1) % m) == e; end
    endcase
  endfunction

  // Matrix sizes for N = 8, 12, 16, 20, 32: matrix bits of the three- and
  // four-moduli squarers and folding multiplexers (one per bit of weight
  // 2^N or more, plus the selector of the bit below a[0]).
  localparam int TN [5]    = '{8, 12, 16, 20, 32};
  localparam int TBITS3 [5] = '{31, 59, 95, 139, 319};
  localparam int TBITS4 [5] = '{39, 71, 111, 159, 351};
  localparam int TMUX [5]   = '{14, 27, 44, 65, 152};

  task automatic check_sizes();
    int n, mux;
    for (int t = 0; t < 5; t++) begin
      n = TN[t];
      mux = 1;
      for (int k = 0; k < num_pp(n); k++) if (pp_weight(n, k) >= n) mux++;
      checks++;
      if (num_pp(n) + n != TBITS3[t] || num_pp(n) + 2 * n != TBITS4[t] || mux != TMUX[t]) begin
        failures++;
        $display("N=%0d: %0d / %0d bits, %0d multiplexers", n, num_pp(n) + n, num_pp(n) + 2 * n, mux);
      end
    end
  endtask

  initial begin
    longint s3, s4;
    check_sizes();
    checks++;
    if (R3 != 5 || R4 != 6) begin
      failures++;
      $display("matrix heights %0d %0d, expected 5 and 6", R3, R4);
    end
    for (int md = 0; md < 4; md++) begin
      for (int av = 0; av <= (1 << N); av++) begin
        if (av == (1 << N) && md != 3) continue;
        @(negedge clk);
        a = N'(av);
        a_n = (av == (1 << N));
        mode = msq_mode_e'(md);
        #1;
        s3 = 0;
        s4 = 0;
        for (int r = 0; r < R3; r++) s3 += longint'(rows3[r]);
        for (int r = 0; r < R4; r++) s4 += longint'(rows4[r]);
        if (md != 3) begin
          checks++;
          if (!matrix_ok(s3, R3, md, u128_t'(av))) begin
            failures++;
            if (failures < 10) $display("3-moduli matrix wrong mode %0d a=%0d", md, av);
          end
        end
        checks++;
        if (!matrix_ok(s4, R4, md, u128_t'(av))) begin
          failures++;
          if (failures < 10) $display("4-moduli matrix wrong mode %0d a=%0d", md, av);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
