// msq_csa_tree: Dadda tree of N-bit modulo carry-save adders.
//
// Reduces ROWS N-bit vectors to two.  Each level brings the row count down
// to the next smaller number of the Dadda sequence 2, 3, 4, 6, 9, 13, ...,
// using only as many CSAs as that takes (one CSA removes one row); rows not
// fed to a CSA pass to the next level unchanged.  ROWS - 2 CSAs are used in
// all, each an msq_csa whose re-entrant carry follows mode.  Purely
// combinational; the depth is msq_pkg::tree_levels(ROWS) CSA delays.
module msq_csa_tree #(
  parameter int N    = 8,
  parameter int ROWS = 5
) (
  input  logic              [N-1:0] rows [ROWS],
  input  msq_pkg::msq_mode_e        mode,
  output logic              [N-1:0] sum_a,
  output logic              [N-1:0] sum_b
);
  import msq_pkg::*;

  localparam int LEVELS = tree_levels(ROWS);

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int HIN  = tree_height(ROWS, l);
    localparam int HOUT = tree_height(ROWS, l + 1);
    localparam int NCSA = HIN - HOUT;
    logic [N-1:0] cur [HIN];
    logic [N-1:0] nxt [HOUT];

    for (genvar r = 0; r < HIN; r++) begin : g_in
      if (l == 0) begin : g_first
        assign cur[r] = rows[r];
      end else begin : g_later
        assign cur[r] = g_level[l-1].nxt[r];
      end
    end

    for (genvar j = 0; j < NCSA; j++) begin : g_csa
      msq_csa #(.N(N)) u_csa (
        .x    (cur[3*j]),
        .y    (cur[3*j+1]),
        .z    (cur[3*j+2]),
        .mode (mode),
        .s    (nxt[2*j]),
        .c    (nxt[2*j+1])
      );
    end
    for (genvar r = 3 * NCSA; r < HIN; r++) begin : g_pass
      assign nxt[r - NCSA] = cur[r];
    end
  end

  if (LEVELS == 0) begin : g_no_tree
    assign sum_a = rows[0];
    assign sum_b = rows[1];
  end else begin : g_out
    assign sum_a = g_level[LEVELS-1].nxt[0];
    assign sum_b = g_level[LEVELS-1].nxt[1];
  end

endmodule
