// tb_msq_csa: random check of the modulo carry-save adder in all three carry
// modes.  The two outputs must add up, modulo the selected modulus, to the
// sum of the three inputs, plus 1 modulo 2^N+1 (inverted end-around carry).
module tb_msq_csa;
  import msq_pkg::*;
  localparam int N = 8;

  logic [N-1:0] x, y, z, s, c;
  msq_mode_e    mode;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  msq_csa dut (.x(x), .y(y), .z(z), .mode(mode), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m, lhs, rhs;
    int md;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      x = N'($urandom);
      y = N'($urandom);
      z = N'($urandom);
      if (it < 8) begin x = '1; y = '1; z = '1; end  // forces a carry out of the top bit
      md = it % 4;
      mode = msq_mode_e'(md);
      #1;
      case (md)
        0: m = (longint'(1) << N) - 1;
        1: m = longint'(1) << N;
        default: m = (longint'(1) << N) + 1;
      endcase
      lhs = (longint'(s) + longint'(c)) % m;
      rhs = (longint'(x) + longint'(y) + longint'(z) + ((md >= 2) ? 1 : 0)) % m;
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("mode %0d x=%h y=%h z=%h s=%h c=%h", md, x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
