// tb_rtm_event_test_cell: checks the Event Test cell. For every status
// combination it tries a matching and random event IDs; a record matches
// only when its event bit is set and its ID equals the query.
module tb_rtm_event_test_cell;
  import rtm_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  rtm_status_t status;
  logic [7:0]  event_id, query_id;
  logic        match;
  int checks = 0, failures = 0;

  rtm_event_test_cell dut (.status(status), .event_id(event_id), .query_id(query_id), .match(match));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] st, input logic [7:0] id, input logic [7:0] q);
    logic exp;
    status = rtm_status_t'(st); event_id = id; query_id = q;
    @(posedge clk);
    exp = st[2] && (id == q);
    checks++;
    if (match !== exp) begin
      failures++;
      $display("FAIL st=%b id=%h q=%h match=%b exp=%b", st, id, q, match, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [7:0] id;
      id = 8'($urandom);
      check(v[3:0], id, id);                 // same ID
      check(v[3:0], id, id ^ 8'h80);         // differ in top bit
      check(v[3:0], id, id ^ 8'h01);         // differ in bottom bit
      for (int k = 0; k < 20; k++) check(v[3:0], 8'($urandom), 8'($urandom));
    end
    check(4'b0100, 8'h00, 8'h00);
    check(4'b0100, 8'hFF, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
