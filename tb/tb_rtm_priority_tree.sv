// tb_rtm_priority_tree: checks the 64-leaf Priority Test tree against a
// linear scan that keeps the first flagged record with the smallest
// priority value. Random patterns use narrow priority ranges so that ties
// are frequent, plus directed cases (no flag, one flag at each end, all
// flagged with equal priority).
module tb_rtm_priority_tree;
  localparam int unsigned N = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       lv [N];
  logic [7:0] lp [N];
  logic       found;
  logic [7:0] bp;
  logic [5:0] bi;
  int checks = 0, failures = 0;

  rtm_priority_tree #(.RECORDS(N)) dut (.leaf_valid(lv), .leaf_prio(lp), .found(found), .best_prio(bp), .best_idx(bi));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int best; best = -1;
    @(posedge clk);
    for (int i = 0; i < N; i++)
      if (lv[i] && (best < 0 || lp[i] < lp[best])) best = i;
    checks++;
    if (found !== (best >= 0)) begin failures++; $display("FAIL found=%b", found); end
    else if (best >= 0) begin
      checks++;
      if (bi !== 6'(best) || bp !== lp[best]) begin
        failures++;
        $display("FAIL idx=%0d prio=%0d exp %0d/%0d", bi, bp, best, lp[best]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin lv[i] = 0; lp[i] = 8'(i); end
    check();
    lv[N-1] = 1; check();
    lv[0] = 1; lp[0] = 8'hFF; check();
    for (int i = 0; i < N; i++) begin lv[i] = 1; lp[i] = 8'd7; end
    check();
    for (int k = 0; k < 3000; k++) begin
      int range;
      range = (k % 3 == 0) ? 4 : (k % 3 == 1) ? 64 : 256;
      for (int i = 0; i < N; i++) begin
        lv[i] = (($urandom % 8) < (k % 8));
        lp[i] = 8'($urandom % range);
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
