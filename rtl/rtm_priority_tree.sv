// rtm_priority_tree: binary tree of Priority Test cells shared by task
// scheduling and event management in the RTM.
//
// RECORDS leaf flags (from the Ready Test or the Event Test cells) and the
// records' priorities enter at the leaves. Level l (1 .. log2(RECORDS)) has
// RECORDS >> l cells of order l; each cell forwards the better of its two
// inputs and adds one index bit, so the single root cell, of order
// log2(RECORDS), outputs the index of the highest-priority flagged record
// (RECORDS-1 cells in all, 63 for the reference 64 records). The delay grows
// with log2(RECORDS) and the logic linearly, as in the reference
// architecture. Purely combinational. RECORDS must be a power of two, at
// least 2.
module rtm_priority_tree #(
  parameter int unsigned RECORDS = 64,
  parameter int unsigned PRIO_W  = rtm_pkg::PRIO_W,
  localparam int unsigned LOG    = $clog2(RECORDS)
) (
  input  logic              leaf_valid [RECORDS],  // per-record flag
  input  logic [PRIO_W-1:0] leaf_prio  [RECORDS],  // per-record priority
  output logic              found,                 // some record is flagged
  output logic [PRIO_W-1:0] best_prio,             // priority of the winner
  output logic [LOG-1:0]    best_idx               // index of the winner
);

  if (RECORDS < 2 || (1 << LOG) != RECORDS) begin : g_bad_size
    $error("rtm_priority_tree: RECORDS must be a power of two >= 2");
  end

  for (genvar l = 1; l <= LOG; l++) begin : g_lvl
    localparam int unsigned N = RECORDS >> l;
    logic              v  [N];
    logic [PRIO_W-1:0] p  [N];
    logic [l-1:0]      ix [N];

    for (genvar j = 0; j < N; j++) begin : g_cell
      if (l == 1) begin : g_first
        rtm_priority_test_cell #(.ORDER(1), .PRIO_W(PRIO_W)) u_pt (
          .a_valid(leaf_valid[2*j]),   .a_prio(leaf_prio[2*j]),   .a_idx(1'b0),
          .b_valid(leaf_valid[2*j+1]), .b_prio(leaf_prio[2*j+1]), .b_idx(1'b0),
          .y_valid(v[j]), .y_prio(p[j]), .y_idx(ix[j])
        );
      end else begin : g_inner
        rtm_priority_test_cell #(.ORDER(l), .PRIO_W(PRIO_W)) u_pt (
          .a_valid(g_lvl[l-1].v[2*j]),   .a_prio(g_lvl[l-1].p[2*j]),   .a_idx(g_lvl[l-1].ix[2*j]),
          .b_valid(g_lvl[l-1].v[2*j+1]), .b_prio(g_lvl[l-1].p[2*j+1]), .b_idx(g_lvl[l-1].ix[2*j+1]),
          .y_valid(v[j]), .y_prio(p[j]), .y_idx(ix[j])
        );
      end
    end
  end

  assign found     = g_lvl[LOG].v[0];
  assign best_prio = g_lvl[LOG].p[0];
  assign best_idx  = g_lvl[LOG].ix[0];

endmodule
