// tb_rtm_priority_test_cell: checks a third-order Priority Test cell
// (2-bit input indices, 3-bit output index) against a reference: the
// flagged input with the smaller priority value wins, the left input wins
// ties, and the output index is {right_won, winner's index}.
module tb_rtm_priority_test_cell;
  localparam int unsigned ORDER = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic av, bv, yv;
  logic [7:0] ap, bp, yp;
  logic [ORDER-2:0] ai, bi;
  logic [ORDER-1:0] yi;
  int checks = 0, failures = 0;

  rtm_priority_test_cell #(.ORDER(ORDER)) dut (
    .a_valid(av), .a_prio(ap), .a_idx(ai),
    .b_valid(bv), .b_prio(bp), .b_idx(bi),
    .y_valid(yv), .y_prio(yp), .y_idx(yi));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic a_v, input logic [7:0] a_p, input logic [1:0] a_i,
                       input logic b_v, input logic [7:0] b_p, input logic [1:0] b_i);
    logic right;
    av = a_v; ap = a_p; ai = a_i; bv = b_v; bp = b_p; bi = b_i;
    @(posedge clk);
    if (!a_v && !b_v)      right = 1'b0;
    else if (!a_v)         right = 1'b1;
    else if (!b_v)         right = 1'b0;
    else                   right = (b_p < a_p);
    checks++;
    if (yv !== (a_v | b_v)) begin failures++; $display("FAIL valid"); end
    if (a_v | b_v) begin
      checks++;
      if (yp !== (right ? b_p : a_p) || yi !== {right, (right ? b_i : a_i)}) begin
        failures++;
        $display("FAIL a=%b/%0d/%0d b=%b/%0d/%0d -> %0d/%0d", a_v, a_p, a_i, b_v, b_p, b_i, yp, yi);
      end
    end
  endtask

  initial begin
    check(1, 5, 1, 1, 3, 2);   // right has higher priority
    check(1, 3, 1, 1, 5, 2);   // left has higher priority
    check(1, 4, 3, 1, 4, 0);   // tie: left wins
    check(0, 1, 3, 1, 9, 2);   // only right flagged, lower priority ignored
    check(1, 9, 3, 0, 1, 2);   // only left flagged
    check(0, 0, 0, 0, 0, 0);
    for (int k = 0; k < 2000; k++)
      check(1'($urandom), 8'($urandom % 8), 2'($urandom), 1'($urandom), 8'($urandom % 8), 2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
