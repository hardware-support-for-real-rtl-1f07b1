// tb_rtm: end-to-end test of the Real-Time Task Manager at its default
// size (64 records), driven over the memory-mapped bus the way an RTOS
// would drive it.
//
// A reference model of the task database in the testbench tracks every
// write and tick. The test first runs a short directed RTOS scenario (two
// periodic tasks, a noise task and a semaphore wait), then a long random
// mix of record writes with random byte enables, record reads, schedule
// queries, event queries and ticks. Every query result is read back in the
// cycle right after the command, which checks the one-cycle, task-count
// independent latency; every read is checked to return one cycle after its
// request. Each mechanism of the design is counted and must occur at least
// once: a schedule that finds a task and one that finds none, an event
// query that hits and one that misses, a tick that releases a task and one
// that only shortens a delay, a suspended task that would otherwise have
// won, a priority tie broken by index, a partial (byte-enable) field write,
// and a switch of the shared tree between event and schedule mode.
module tb_rtm;
  import rtm_pkg::*;
  localparam int unsigned N      = 64;
  localparam int unsigned ADDR_W = 10;
  localparam logic [ADDR_W-1:0] A_CMD    = ADDR_W'(N * 8);
  localparam logic [ADDR_W-1:0] A_RESULT = ADDR_W'(N * 8 + 4);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n, bus_req, bus_we, bus_rvalid;
  logic [ADDR_W-1:0] bus_addr;
  logic [3:0]        bus_be;
  logic [31:0]       bus_wdata, bus_rdata;

  rtm dut (.clk(clk), .rst_n(rst_n), .bus_req(bus_req), .bus_we(bus_we), .bus_addr(bus_addr),
           .bus_be(bus_be), .bus_wdata(bus_wdata), .bus_rdata(bus_rdata), .bus_rvalid(bus_rvalid));

  // reference model
  logic [3:0]  m_st [N];
  logic [7:0]  m_pr [N], m_ev [N];
  logic [15:0] m_dl [N];

  int checks = 0, failures = 0;
  int n_sched_found = 0, n_sched_empty = 0, n_event_hit = 0, n_event_miss = 0;
  int n_tick_release = 0, n_tick_partial = 0, n_susp_excluded = 0, n_tie = 0;
  int n_partial_write = 0, n_mode_switch = 0;
  logic last_was_event = 1'b0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ------------------------------------------------------------ bus access
  task automatic bus_write(input logic [ADDR_W-1:0] a, input logic [3:0] be, input logic [31:0] d);
    bus_req = 1; bus_we = 1; bus_addr = a; bus_be = be; bus_wdata = d;
    @(posedge clk); #1;
    bus_req = 0; bus_we = 0;
  endtask

  task automatic bus_read(input logic [ADDR_W-1:0] a, output logic [31:0] d);
    bus_req = 1; bus_we = 0; bus_addr = a; bus_be = 4'h0;
    @(posedge clk); #1;
    bus_req = 0;
    checks++;
    if (!bus_rvalid) fail("read data not valid one cycle after the request");
    d = bus_rdata;
  endtask

  // --------------------------------------------------------- model updates
  task automatic write_rec(input int i, input bit word, input logic [3:0] be, input logic [31:0] d);
    bus_write(ADDR_W'(i * 8 + (word ? 4 : 0)), be, d);
    if (be != 4'hF && be != 4'h0) n_partial_write++;
    if (!word) begin
      if (be[0]) m_st[i] = d[3:0];
      if (be[1]) m_pr[i] = d[15:8];
      if (be[2]) m_ev[i] = d[23:16];
    end else begin
      if (be[0]) m_dl[i][7:0]  = d[7:0];
      if (be[1]) m_dl[i][15:8] = d[15:8];
    end
  endtask

  task automatic set_task(input int i, input logic [3:0] st, input logic [7:0] pr,
                          input logic [7:0] ev, input logic [15:0] dl);
    write_rec(i, 1, 4'b0011, {16'h0, dl});
    write_rec(i, 0, 4'b0111, {8'h0, ev, pr, 4'h0, st});
  endtask

  task automatic check_rec(input int i);
    logic [31:0] d0, d1;
    bus_read(ADDR_W'(i * 8), d0);
    bus_read(ADDR_W'(i * 8 + 4), d1);
    checks++;
    if (d0 !== {8'h0, m_ev[i], m_pr[i], 4'h0, m_st[i]} || d1 !== {16'h0, m_dl[i]})
      fail($sformatf("record %0d reads %h %h, expected st=%b pr=%0d ev=%0d dl=%0d",
                     i, d0, d1, m_st[i], m_pr[i], m_ev[i], m_dl[i]));
  endtask

  // ------------------------------------------------------------- commands
  function automatic int model_best(input bit ev_mode, input logic [7:0] id, input bit ignore_susp);
    int best; best = -1;
    for (int i = 0; i < N; i++) begin
      bit f;
      if (ev_mode) f = m_st[i][2] && (m_ev[i] == id);
      else         f = m_st[i][0] && !m_st[i][1] && !m_st[i][2] && (ignore_susp || !m_st[i][3]);
      if (f && (best < 0 || m_pr[i] < m_pr[best])) best = i;
    end
    return best;
  endfunction

  task automatic query(input bit ev_mode, input logic [7:0] id, output int got);
    int exp, exp_ns, nties;
    logic [31:0] r;
    exp = model_best(ev_mode, id, 0);
    bus_write(A_CMD, 4'hF, {16'h0, id, 6'h0, (ev_mode ? CMD_EVENT : CMD_SCHEDULE)});
    bus_read(A_RESULT, r);    // issued in the very next cycle
    checks++;
    if (exp < 0) begin
      if (r[31] !== 1'b0) fail($sformatf("query ev=%0d id=%0d found %0d, expected none", ev_mode, id, r[7:0]));
      got = -1;
    end else begin
      if (r !== {1'b1, 15'h0, m_pr[exp], 8'(exp)})
        fail($sformatf("query ev=%0d id=%0d got %h, expected idx %0d prio %0d", ev_mode, id, r, exp, m_pr[exp]));
      got = int'(r[7:0]);
    end
    // mechanism counts
    if (!ev_mode) begin
      if (exp < 0) n_sched_empty++; else n_sched_found++;
      exp_ns = model_best(0, 0, 1);
      if (exp_ns >= 0 && m_st[exp_ns][3]) n_susp_excluded++;
      if (last_was_event) n_mode_switch++;
    end else begin
      if (exp < 0) n_event_miss++; else n_event_hit++;
    end
    if (exp >= 0) begin
      nties = 0;
      for (int i = 0; i < N; i++)
        if (i != exp && m_pr[i] == m_pr[exp] &&
            (ev_mode ? (m_st[i][2] && m_ev[i] == id) : (m_st[i] == 4'b0001))) nties++;
      if (nties > 0) n_tie++;
    end
    last_was_event = ev_mode;
  endtask

  task automatic tick(input logic [15:0] t);
    bus_write(A_CMD, 4'hF, {t, 8'h0, 6'h0, CMD_TICK});
    for (int i = 0; i < N; i++) begin
      if (m_st[i][1]) begin
        if (m_dl[i] <= t) begin m_dl[i] = 0; m_st[i][1] = 0; n_tick_release++; end
        else begin m_dl[i] = m_dl[i] - t; if (t != 0) n_tick_partial++; end
      end
    end
  endtask

  // ---------------------------------------------------------------- stimulus
  initial begin
    int got;
    logic [31:0] r;
    rst_n = 0; bus_req = 0; bus_we = 0; bus_addr = '0; bus_be = '0; bus_wdata = '0;
    for (int i = 0; i < N; i++) begin m_st[i] = 0; m_pr[i] = 0; m_ev[i] = 0; m_dl[i] = 0; end
    repeat (2) @(posedge clk); #1;
    rst_n = 1;

    // After reset: empty database, idle result.
    for (int i = 0; i < N; i++) check_rec(i);
    query(0, 0, got);

    // Directed RTOS scenario. Task 0 is an idle task at the lowest priority,
    // tasks 1 and 2 are periodic (period 20 ticks), task 3 a noise task
    // (period 32 ticks), task 4 waits on semaphore 7.
    set_task(0, 4'b0001, 8'd63, 8'd0, 16'd0);
    set_task(1, 4'b0011, 8'd10, 8'd0, 16'd20);
    set_task(2, 4'b0011, 8'd11, 8'd0, 16'd20);
    set_task(3, 4'b0011, 8'd20, 8'd0, 16'd32);
    set_task(4, 4'b0101, 8'd5,  8'd7, 16'd0);
    query(0, 0, got);  checks++; if (got != 0) fail("idle task expected");
    tick(16'd19);
    query(0, 0, got);  checks++; if (got != 0) fail("idle task expected after 19 ticks");
    tick(16'd1);
    query(0, 0, got);  checks++; if (got != 1) fail("task 1 expected after 20 ticks");
    query(1, 8'd7, got); checks++; if (got != 4) fail("task 4 expected on semaphore 7");
    // RTOS gives the semaphore to task 4: clear its event bit.
    write_rec(4, 0, 4'b0001, 32'h1);
    query(0, 0, got);  checks++; if (got != 4) fail("task 4 expected once released");
    write_rec(4, 0, 4'b0001, 32'h9);   // suspend task 4
    query(0, 0, got);  checks++; if (got != 1) fail("task 1 expected with task 4 suspended");
    write_rec(1, 0, 4'b0001, 32'h3);   // task 1 finished: delay again for 20
    write_rec(1, 1, 4'b0011, 32'd20);
    query(0, 0, got);  checks++; if (got != 2) fail("task 2 expected");
    write_rec(2, 0, 4'b0001, 32'h3);   // task 2 finished as well
    write_rec(2, 1, 4'b0011, 32'd20);
    tick(16'd12);
    query(0, 0, got);  checks++; if (got != 3) fail("noise task expected after 32 ticks");
    for (int i = 0; i < 5; i++) check_rec(i);

    // Random mix.
    for (int k = 0; k < 6000; k++) begin
      int op, i;
      op = $urandom % 16;
      i  = $urandom % N;
      if (op < 5) begin
        logic [3:0] st;
        st = 4'b0001;
        case ($urandom % 8)
          0: st = 4'b0000;
          1, 2: st = 4'b0011;
          3: st = 4'b0101;
          4: st = 4'b1001;
          5: st = 4'($urandom);
          default: st = 4'b0001;
        endcase
        set_task(i, st, 8'($urandom % 16), 8'($urandom % 6), 16'($urandom % 40));
      end else if (op < 7) begin
        write_rec(i, 1'($urandom), 4'($urandom % 15 + 1), $urandom);
      end else if (op < 8) begin
        check_rec(i);
      end else if (op < 11) begin
        query(0, 0, got);
      end else if (op < 13) begin
        query(1, 8'($urandom % 7), got);
      end else begin
        tick(($urandom % 8 == 0) ? 16'($urandom) : 16'($urandom % 10));
      end
    end
    for (int i = 0; i < N; i++) check_rec(i);

    // Reset in the middle of operation clears the database.
    rst_n = 0; @(posedge clk); #1; rst_n = 1;
    for (int i = 0; i < N; i++) begin m_st[i] = 0; m_pr[i] = 0; m_ev[i] = 0; m_dl[i] = 0; end
    for (int i = 0; i < N; i += 7) check_rec(i);
    bus_read(A_RESULT, r);
    checks++; if (r !== 32'h0) fail("RESULT not cleared by reset");

    $display("mechanisms: sched_found=%0d sched_empty=%0d event_hit=%0d event_miss=%0d tick_release=%0d tick_partial=%0d",
             n_sched_found, n_sched_empty, n_event_hit, n_event_miss, n_tick_release, n_tick_partial);
    $display("            suspended_excluded=%0d tie=%0d partial_write=%0d mode_switch=%0d",
             n_susp_excluded, n_tie, n_partial_write, n_mode_switch);
    checks++; if (n_sched_found == 0)   fail("no schedule query found a task");
    checks++; if (n_sched_empty == 0)   fail("no schedule query found no task");
    checks++; if (n_event_hit == 0)     fail("no event query hit");
    checks++; if (n_event_miss == 0)    fail("no event query missed");
    checks++; if (n_tick_release == 0)  fail("no tick released a task");
    checks++; if (n_tick_partial == 0)  fail("no tick shortened a delay");
    checks++; if (n_susp_excluded == 0) fail("no suspended task was passed over");
    checks++; if (n_tie == 0)           fail("no priority tie occurred");
    checks++; if (n_partial_write == 0) fail("no partial field write");
    checks++; if (n_mode_switch == 0)   fail("tree never switched from event to schedule mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
