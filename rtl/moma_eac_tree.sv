// moma_eac_tree: inverted end-around-carry carry-save Dadda tree, modulo 2^n+1.
//
// Reduces ROWS n-bit vectors to two final addends F and G with
//   |F + G|_{2^n+1} = |sum(rows) + (ROWS - 2)|_{2^n+1},
// since each of the ROWS-2 inverted-EAC carry-save adders adds one (its re-entered
// top carry is complemented). The end-around carry makes all bit columns equally
// tall, so the Dadda schedule is applied to whole rows: a level with h rows and next
// Dadda height d (2, 3, 4, 6, 9, 13, ...) places h-d carry-save adders on the first
// 3(h-d) rows and passes the remaining rows through unchanged. The number of levels
// is the minimum CSA-tree depth theta(ROWS).
// Row order within a level (which rows meet in which adder) is this design's choice;
// any order gives the same value of F + G modulo 2^n+1.
// Purely combinational.
module moma_eac_tree
  import moma_pkg::*;
#(
  parameter int N    = 4,
  parameter int ROWS = 7
) (
  input  logic [N-1:0] rows [ROWS],
  output logic [N-1:0] f,
  output logic [N-1:0] g
);

  localparam int STAGES = tree_stages(ROWS);

  // Each level holds its own row array; slots at or above stage_rows(ROWS, s+1) are
  // unused and tied to zero.
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int H    = stage_rows(ROWS, s);
    localparam int HN   = stage_rows(ROWS, s + 1);
    localparam int NCSA = H - HN;
    logic [N-1:0] cur [ROWS];
    logic [N-1:0] nxt [ROWS];
    if (s == 0) begin : g_first
      assign cur = rows;
    end else begin : g_next
      assign cur = g_stage[s-1].nxt;
    end
    for (genvar i = 0; i < NCSA; i++) begin : g_csa
      moma_eac_csa #(.N(N)) u_csa (
        .x0 (cur[3*i]),
        .x1 (cur[3*i+1]),
        .x2 (cur[3*i+2]),
        .s  (nxt[2*i]),
        .c  (nxt[2*i+1])
      );
    end
    for (genvar r = 3 * NCSA; r < H; r++) begin : g_pass
      assign nxt[r - NCSA] = cur[r];
    end
    for (genvar r = HN; r < ROWS; r++) begin : g_unused
      assign nxt[r] = '0;
    end
  end

  if (STAGES == 0) begin : g_no_tree
    assign f = rows[0];
    assign g = rows[1];
  end else begin : g_out
    assign f = g_stage[STAGES-1].nxt[0];
    assign g = g_stage[STAGES-1].nxt[1];
  end

  if (ROWS < 2) begin : g_bad_rows
    $error("moma_eac_tree: ROWS must be at least 2");
  end

endmodule
