// tb_rtm_delay_decrement_cell: checks the Delay Decrement cell on corner
// cases (exact expiry, underflow, zero ticks, not delayed) and random
// values, against delay - ticks saturated at zero.
module tb_rtm_delay_decrement_cell;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        dly, dly_n;
  logic [15:0] d, t, d_n;
  int checks = 0, failures = 0;

  rtm_delay_decrement_cell dut (.delayed(dly), .delay(d), .ticks(t), .delayed_next(dly_n), .delay_next(d_n));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic dl, input int unsigned dv, input int unsigned tv);
    int unsigned ed; logic edl;
    dly = dl; d = 16'(dv); t = 16'(tv);
    @(posedge clk);
    if (!dl)          begin ed = dv;      edl = 1'b0; end
    else if (tv >= dv) begin ed = 0;      edl = 1'b0; end
    else              begin ed = dv - tv; edl = 1'b1; end
    checks++;
    if (d_n !== 16'(ed) || dly_n !== edl) begin
      failures++;
      $display("FAIL dl=%b d=%0d t=%0d -> %0d/%b exp %0d/%b", dl, dv, tv, d_n, dly_n, ed, edl);
    end
  endtask

  initial begin
    check(1, 10, 1);
    check(1, 1, 1);
    check(1, 5, 7);
    check(1, 0, 0);
    check(1, 100, 0);
    check(1, 16'hFFFF, 1);
    check(1, 16'hFFFF, 16'hFFFF);
    check(1, 1, 16'hFFFF);
    check(0, 5, 3);
    check(0, 5, 9);
    for (int k = 0; k < 3000; k++) begin
      int unsigned dv;
      dv = $urandom % 65536;
      check(1'($urandom), dv, (k % 2) ? ($urandom % 65536) : ($urandom % 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
