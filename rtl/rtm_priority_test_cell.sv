// rtm_priority_test_cell: Nth-order Priority Test cell of the RTM comparator tree.
//
// Takes two candidates, each a flag (ready or event match), a priority and
// an (ORDER-1)-bit index inside its half of the subtree, and passes on the
// better one with an ORDER-bit index whose top bit says which side won.
// The structure follows the reference cell: a PRIO_W-bit comparator, a
// PRIO_W-bit 2:1 multiplexer for the priority, an (ORDER-1)-bit 2:1
// multiplexer for the index, an OR gate for the output flag, and an AND and
// a NAND gate that form the select:
//   sel_b = b_valid AND NAND(a_valid, a_prio <= b_prio)
// A numerically smaller priority value is the higher priority (as in
// uC/OS-II) and on equal priorities the left (lower-index) input wins; both
// are this design's choices. At ORDER 1 the index inputs are unused.
// Purely combinational.
module rtm_priority_test_cell #(
  parameter int unsigned ORDER  = 1,
  parameter int unsigned PRIO_W = rtm_pkg::PRIO_W,
  localparam int unsigned IW    = (ORDER > 1) ? ORDER - 1 : 1
) (
  input  logic              a_valid,
  input  logic [PRIO_W-1:0] a_prio,
  input  logic [IW-1:0]     a_idx,
  input  logic              b_valid,
  input  logic [PRIO_W-1:0] b_prio,
  input  logic [IW-1:0]     b_idx,
  output logic              y_valid,
  output logic [PRIO_W-1:0] y_prio,
  output logic [ORDER-1:0]  y_idx
);

  logic a_wins_cmp;  // comparator: left priority at least as high
  logic sel_b;

  assign a_wins_cmp = (a_prio <= b_prio);
  assign sel_b      = b_valid & ~(a_valid & a_wins_cmp);
  assign y_valid    = a_valid | b_valid;
  assign y_prio     = sel_b ? b_prio : a_prio;

  if (ORDER > 1) begin : g_idx
    assign y_idx = {sel_b, (sel_b ? b_idx : a_idx)};
  end else begin : g_leaf
    assign y_idx = sel_b;
    logic unused_idx;
    assign unused_idx = ^{a_idx, b_idx};
  end

endmodule
