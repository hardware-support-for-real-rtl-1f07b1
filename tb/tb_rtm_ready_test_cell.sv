// tb_rtm_ready_test_cell: exhaustive check of the Ready Test cell over all
// 16 combinations of the valid, delayed, event and suspended bits. The
// expected value is written out as a truth-table row count: exactly one
// combination (valid only) is ready.
module tb_rtm_ready_test_cell;
  import rtm_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  rtm_status_t status;
  logic        ready;
  int checks = 0, failures = 0, n_ready = 0;

  rtm_ready_test_cell dut (.status(status), .ready(ready));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      status = rtm_status_t'(v[3:0]);
      @(posedge clk);
      checks++;
      if (ready !== (v == 1)) begin
        failures++;
        $display("FAIL status=%b ready=%b", v[3:0], ready);
      end
      if (ready) n_ready++;
    end
    checks++;
    if (n_ready != 1) begin failures++; $display("FAIL %0d ready rows", n_ready); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
