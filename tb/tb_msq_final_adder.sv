// tb_msq_final_adder: exhaustive check of the multi-moduli final adder for
// N = 8 in all four modes:
//   2^N-1 : r = x + y mod 2^N-1 (all ones accepted for 0)
//   2^N   : r = x + y mod 2^N
//   dim   : r = x + y + 1 mod 2^N+1, low N bits (the value 2^N gives 0)
//   normal: r = x + y + 1 mod 2^N+1, all N+1 bits
module tb_msq_final_adder;
  import msq_pkg::*;
  localparam int N = 8;

  logic [N-1:0] x, y;
  logic [N:0]   r;
  msq_mode_e    mode;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  msq_final_adder dut (.x(x), .y(y), .mode(mode), .r(r));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, m, got;
    bit ok;
    for (int md = 0; md < 4; md++) begin
      for (int xv = 0; xv < (1 << N); xv++) begin
        for (int yv = 0; yv < (1 << N); yv++) begin
          @(negedge clk);
          x = N'(xv);
          y = N'(yv);
          mode = msq_mode_e'(md);
          #1;
          got = longint'(r);
          case (md)
            0: begin m = (longint'(1) << N) - 1; e = (xv + yv) % m;
                     ok = (got == e) || (e == 0 && got == m); end
            1: begin m = longint'(1) << N; e = (xv + yv) % m; ok = (got == e); end
            2: begin m = (longint'(1) << N) + 1; e = (xv + yv + 1) % m;
                     ok = (got == e % (longint'(1) << N)); end
            default: begin m = (longint'(1) << N) + 1; e = (xv + yv + 1) % m; ok = (got == e); end
          endcase
          checks++;
          if (!ok) begin
            failures++;
            if (failures < 10) $display("mode %0d x=%h y=%h r=%h expected %h", md, x, y, r, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
