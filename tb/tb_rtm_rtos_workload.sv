// tb_rtm_rtos_workload: runs the task sets of the two RTOS styles the RTM
// was evaluated with, on the default 64-record RTM, with the testbench
// playing the RTOS kernel. Every scheduling decision is taken from the RTM
// and compared with the choice worked out from the kernel's own task state.
//
// Task set, for CHANNELS data channels (1 tick = 1 ms):
//   * per channel an input task and an output task, period 20 ticks;
//   * a noise task, period 32 ticks;
//   * an aperiodic I/O handler; I/O events arrive at random, on average
//     one every 10 ticks;
//   * an idle task at the lowest priority.
// Preemptive style (uC/OS-II like): the output task of a channel pends on
// the channel's semaphore (event ID = channel + 1), which the input task
// posts through an RTM event query; the I/O handler pends on event 200 and
// is released by the I/O interrupt. Non-preemptive style (NOS like): no
// IPC; the I/O handler is a task polled every tick. Tasks run to
// completion between ticks, so both styles use the RTM the same way here:
// after each tick and each task completion the kernel asks for the
// highest-priority ready task.
// With CHANNELS = 30 the set needs 63 records, the most that 64 holds.
// Checks: every schedule and event-query answer; each periodic task
// completes once per period (ceil(TICKS / period) runs); every I/O event
// is handled; each RTM operation costs one bus write and one read.
module tb_rtm_rtos_workload;
  import rtm_pkg::*;
  localparam int N        = 64;
  localparam int ADDR_W   = 10;
  localparam int CHANNELS = 30;
  localparam int TICKS    = 200;
  localparam int PERIOD   = 20;
  localparam int NOISE_P  = 32;
  localparam logic [7:0] IO_EVENT = 8'd200;
  localparam logic [ADDR_W-1:0] A_CMD    = ADDR_W'(N * 8);
  localparam logic [ADDR_W-1:0] A_RESULT = ADDR_W'(N * 8 + 4);
  // record numbers
  localparam int R_IDLE = 0, R_IO = 1, R_NOISE = 2;
  function automatic int r_out(input int c); return 3 + 2 * c; endfunction
  function automatic int r_in (input int c); return 4 + 2 * c; endfunction

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n, bus_req, bus_we, bus_rvalid;
  logic [ADDR_W-1:0] bus_addr;
  logic [3:0]        bus_be;
  logic [31:0]       bus_wdata, bus_rdata;

  rtm dut (.clk(clk), .rst_n(rst_n), .bus_req(bus_req), .bus_we(bus_we), .bus_addr(bus_addr),
           .bus_be(bus_be), .bus_wdata(bus_wdata), .bus_rdata(bus_rdata), .bus_rvalid(bus_rvalid));

  // kernel's own view of each task
  int  k_prio [N];     // priority (unique)
  int  k_delay [N];    // remaining ticks, 0 = not sleeping
  bit  k_block [N];    // waiting on an event
  bit  k_used [N];
  int  runs [N];
  int  sem_cnt [CHANNELS];
  bit  has_data [CHANNELS];
  int  io_pending, io_arrived, io_handled;

  int checks = 0, failures = 0;
  int n_sched = 0, n_evq_hit = 0, n_evq_miss = 0, n_released = 0, n_blocks = 0;
  int op_cycles_max = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic bus_write(input logic [ADDR_W-1:0] a, input logic [3:0] be, input logic [31:0] d);
    bus_req = 1; bus_we = 1; bus_addr = a; bus_be = be; bus_wdata = d;
    @(posedge clk); #1;
    bus_req = 0; bus_we = 0;
  endtask

  task automatic bus_read(input logic [ADDR_W-1:0] a, output logic [31:0] d);
    bus_req = 1; bus_we = 0; bus_addr = a; bus_be = 4'h0;
    @(posedge clk); #1;
    bus_req = 0;
    if (!bus_rvalid) fail("read data late");
    d = bus_rdata;
  endtask

  // record writes used by the kernel
  task automatic set_status(input int r, input logic [3:0] st);
    bus_write(ADDR_W'(r * 8), 4'b0001, {28'h0, st});
  endtask
  task automatic create(input int r, input int prio);
    bus_write(ADDR_W'(r * 8 + 4), 4'b0011, 32'h0);
    bus_write(ADDR_W'(r * 8), 4'b0111, {8'h0, 8'h0, 8'(prio), 4'h0, 4'b0001});
    k_prio[r] = prio; k_delay[r] = 0; k_block[r] = 0; k_used[r] = 1; runs[r] = 0;
  endtask
  task automatic delay_task(input int r, input int ticks);
    bus_write(ADDR_W'(r * 8 + 4), 4'b0011, 32'(ticks));
    set_status(r, 4'b0011);
    k_delay[r] = ticks;
  endtask
  task automatic pend(input int r, input logic [7:0] ev);
    bus_write(ADDR_W'(r * 8), 4'b0101, {8'h0, ev, 8'h0, 4'h0, 4'b0101});
    k_block[r] = 1; n_blocks++;
  endtask

  // timed RTM command: write CMD, read RESULT in the next cycle
  task automatic command(input logic [31:0] cmd, output logic [31:0] res);
    longint t0, dt;
    t0 = $time;
    bus_write(A_CMD, 4'hF, cmd);
    bus_read(A_RESULT, res);
    dt = ($time - t0) / 10;
    if (int'(dt) > op_cycles_max) op_cycles_max = int'(dt);
  endtask

  function automatic int expected_task();
    int best; best = -1;
    for (int r = 0; r < N; r++)
      if (k_used[r] && k_delay[r] == 0 && !k_block[r] && (best < 0 || k_prio[r] < k_prio[best])) best = r;
    return best;
  endfunction

  task automatic schedule(output int r);
    logic [31:0] res;
    int exp;
    command({16'h0, 8'h0, 6'h0, CMD_SCHEDULE}, res);
    exp = expected_task();
    n_sched++;
    checks++;
    if (!res[31] || int'(res[7:0]) != exp || int'(res[15:8]) != k_prio[exp])
      fail($sformatf("schedule: RTM %h, kernel expects task %0d", res, exp));
    r = exp;
  endtask

  // post an event: returns the released record or -1
  task automatic post(input logic [7:0] ev, input int waiter, output int r);
    logic [31:0] res;
    command({16'h0, ev, 6'h0, CMD_EVENT}, res);
    checks++;
    if (k_block[waiter]) begin
      if (!res[31] || int'(res[7:0]) != waiter) fail($sformatf("event %0d: RTM %h, expected %0d", ev, res, waiter));
      set_status(waiter, 4'b0001);
      k_block[waiter] = 0;
      n_evq_hit++;
      r = waiter;
    end else begin
      if (res[31]) fail($sformatf("event %0d: RTM found %0d, nobody waits", ev, res[7:0]));
      n_evq_miss++;
      r = -1;
    end
  endtask

  task automatic tick();
    logic [31:0] res;
    command({16'd1, 8'h0, 6'h0, CMD_TICK}, res);
    for (int r = 0; r < N; r++)
      if (k_delay[r] > 0) begin
        k_delay[r]--;
        if (k_delay[r] == 0) n_released++;
      end
  endtask

  // one run-to-completion step of task r
  task automatic run_task(input int r, input bit preemptive);
    int w;
    if (r == R_IO) begin
      if (preemptive) begin
        if (io_pending > 0) begin io_pending--; io_handled++; runs[r]++; end
        else pend(r, IO_EVENT);
      end else begin
        io_handled += io_pending; io_pending = 0; runs[r]++;
        delay_task(r, 1);           // polled every tick
      end
    end else if (r == R_NOISE) begin
      runs[r]++;
      delay_task(r, NOISE_P);
    end else begin
      int c; bit is_out;
      c = (r - 3) / 2; is_out = ((r - 3) % 2 == 0);
      if (!preemptive) begin
        runs[r]++;
        delay_task(r, PERIOD);
      end else if (is_out) begin
        if (has_data[c]) begin has_data[c] = 0; runs[r]++; delay_task(r, PERIOD); end
        else if (sem_cnt[c] > 0) begin sem_cnt[c]--; runs[r]++; delay_task(r, PERIOD); end
        else pend(r, 8'(c + 1));
      end else begin
        runs[r]++;
        post(8'(c + 1), r_out(c), w);
        if (w >= 0) has_data[c] = 1; else sem_cnt[c]++;
        delay_task(r, PERIOD);
      end
    end
  endtask

  task automatic run_system(input bit preemptive);
    int r, guard;
    rst_n = 0; @(posedge clk); #1; rst_n = 1;
    for (int i = 0; i < N; i++) begin k_used[i] = 0; k_delay[i] = 0; k_block[i] = 0; runs[i] = 0; end
    for (int c = 0; c < CHANNELS; c++) begin sem_cnt[c] = 0; has_data[c] = 0; end
    io_pending = 0; io_arrived = 0; io_handled = 0;
    n_sched = 0; n_evq_hit = 0; n_evq_miss = 0; n_released = 0; n_blocks = 0;
    // priorities: I/O handler highest, then channels (output above input), noise, idle
    create(R_IDLE, 63);
    create(R_IO, 1);
    create(R_NOISE, 62);
    for (int c = 0; c < CHANNELS; c++) begin
      create(r_out(c), 2 + 2 * c);
      create(r_in(c),  3 + 2 * c);
    end
    for (int t = 0; t < TICKS; t++) begin
      if (t > 0) tick();
      if ($urandom % 10 == 0) begin            // I/O interrupt
        io_arrived++;
        if (preemptive) begin
          post(IO_EVENT, R_IO, r);
          io_pending++;
        end else io_pending++;
      end
      guard = 0;
      forever begin
        schedule(r);
        if (r == R_IDLE || r < 0) break;
        run_task(r, preemptive);
        guard++;
        if (guard > 4 * N) begin fail("kernel loop does not settle"); break; end
      end
    end
    // drain: handler must have served every event
    checks++;
    if (!preemptive) begin
      // the poller serves at its next tick
      tick(); schedule(r); if (r == R_IO) run_task(r, preemptive);
    end
    if (io_handled != io_arrived) fail($sformatf("I/O events %0d arrived, %0d handled", io_arrived, io_handled));
    for (int c = 0; c < CHANNELS; c++) begin
      checks += 2;
      if (runs[r_in(c)]  != (TICKS + PERIOD - 1) / PERIOD) fail($sformatf("input task %0d ran %0d times", c, runs[r_in(c)]));
      if (runs[r_out(c)] != (TICKS + PERIOD - 1) / PERIOD) fail($sformatf("output task %0d ran %0d times", c, runs[r_out(c)]));
    end
    checks++;
    if (runs[R_NOISE] != (TICKS + NOISE_P - 1) / NOISE_P) fail($sformatf("noise task ran %0d times", runs[R_NOISE]));
    $display("%s: %0d tasks, %0d schedules, %0d event hits, %0d event misses, %0d blocks, %0d delays expired, %0d I/O events",
             preemptive ? "preemptive" : "non-preemptive", 2 * CHANNELS + 3, n_sched, n_evq_hit, n_evq_miss,
             n_blocks, n_released, io_arrived);
  endtask

  initial begin
    rst_n = 0; bus_req = 0; bus_we = 0; bus_addr = '0; bus_be = '0; bus_wdata = '0;
    repeat (2) @(posedge clk); #1;
    run_system(1'b1);
    checks++; if (n_evq_hit == 0 || n_blocks == 0) fail("semaphores never blocked a task");
    run_system(1'b0);
    checks++; if (n_released == 0) fail("no delay expired");
    checks++;
    if (op_cycles_max != 2) fail($sformatf("an RTM operation took %0d bus cycles", op_cycles_max));
    $display("longest RTM operation: %0d bus cycles (command write + result read)", op_cycles_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
