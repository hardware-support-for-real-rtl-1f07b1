// rtm: Real-Time Task Manager, a memory-mapped peripheral that keeps the
// task database of an RTOS and does its scheduling, time management and
// event management in constant time.
//
// Structure. RECORDS task records (rtm_task_records) are visible at once.
// Each record has a Ready Test cell and an Event Test cell; a 2:1 select per
// record hands one of the two flags to a single binary tree of Priority
// Test cells (rtm_priority_tree), which is thus shared by scheduling and
// event management. Each record also has a Delay Decrement cell, so a tick
// updates every delay in one clock edge.
//
// Bus. A 32-bit request bus with byte enables and no wait states: a request
// is taken in the cycle bus_req is high, and read data come back registered
// in the next cycle with bus_rvalid. Byte address map (ADDR_W bits):
//   0 .. RECORDS*8-1   records, record r at byte 8r (64-bit boundaries)
//       +0 word 0      [3:0] status {suspended, event, delayed, valid},
//                      [15:8] priority, [23:16] event ID
//       +4 word 1      [15:0] delay (clock ticks)
//   RECORDS*8 + 0      CMD (write): [1:0] op, [15:8] event ID, [31:16] ticks
//                      op 1 = schedule, 2 = event query, 3 = tick
//   RECORDS*8 + 4      RESULT (read): [31] found, [15:8] priority, [7:0] index
// Unused bits and addresses read as zero; writes to them are ignored.
//
// Timing. A command is evaluated entirely in the cycle it is written: the
// schedule and event queries load RESULT, a tick loads the new delays and
// delayed bits, all at the same clock edge. A read issued in the next cycle
// already sees the outcome, so every operation takes one cycle whatever the
// number of tasks.
//
// What follows the reference architecture: the record fields and widths,
// 64 records, the test cells, the shared tree and the per-record decrement
// cells. This design's own choices: the bus, the register map and command
// encoding, smaller value = higher priority, lower index wins ties,
// saturation of delays at zero, reset clearing all records.
module rtm
  import rtm_pkg::*;
#(
  parameter int unsigned RECORDS = 64,
  localparam int unsigned IDX_W  = $clog2(RECORDS),
  localparam int unsigned ADDR_W = $clog2(RECORDS * REC_BYTES) + 1
) (
  input  logic              clk,
  input  logic              rst_n,       // synchronous, active low
  input  logic              bus_req,
  input  logic              bus_we,
  input  logic [ADDR_W-1:0] bus_addr,    // byte address
  input  logic [3:0]        bus_be,
  input  logic [BUS_W-1:0]  bus_wdata,
  output logic [BUS_W-1:0]  bus_rdata,
  output logic              bus_rvalid
);

  if (RECORDS > 256) begin : g_bad_size
    $error("rtm: RESULT holds an 8-bit index, RECORDS must be <= 256");
  end

  // ---------------------------------------------------------------- decode
  logic              is_ctrl;
  logic [IDX_W-1:0]  rec_idx;
  logic              rec_word;
  logic [ADDR_W-4:0] reg_word;   // word offset inside the control region

  assign is_ctrl  = bus_addr[ADDR_W-1];
  assign rec_idx  = bus_addr[ADDR_W-2:3];
  assign rec_word = bus_addr[2];
  assign reg_word = bus_addr[ADDR_W-2:2];

  logic     cmd_wr;
  rtm_cmd_e cmd_op;
  logic [EVID_W-1:0]  cmd_evid;
  logic [DELAY_W-1:0] cmd_ticks;

  assign cmd_wr    = bus_req & bus_we & is_ctrl & (reg_word == (ADDR_W-3)'(REG_CMD));
  assign cmd_op    = rtm_cmd_e'(bus_wdata[1:0]);
  assign cmd_evid  = bus_wdata[15:8];
  assign cmd_ticks = bus_wdata[31:16];

  // --------------------------------------------------------- task records
  rtm_rec_t recs [RECORDS];

  rtm_task_records #(.RECORDS(RECORDS)) u_records (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (bus_req & bus_we & ~is_ctrl),
    .wr_idx     (rec_idx),
    .wr_word    (rec_word),
    .wr_be      (bus_be),
    .wr_data    (bus_wdata),
    .tick_en    (cmd_wr && cmd_op == CMD_TICK),
    .tick_count (cmd_ticks),
    .recs       (recs)
  );

  // ------------------------------------------------ test cells and tree
  logic              ready   [RECORDS];
  logic              evmatch [RECORDS];
  logic              leaf_v  [RECORDS];
  logic [PRIO_W-1:0] leaf_p  [RECORDS];
  logic              event_mode;

  assign event_mode = (cmd_op == CMD_EVENT);

  for (genvar i = 0; i < RECORDS; i++) begin : g_leaf
    rtm_ready_test_cell u_rt (
      .status (recs[i].status),
      .ready  (ready[i])
    );
    rtm_event_test_cell #(.EVID_W(EVID_W)) u_et (
      .status   (recs[i].status),
      .event_id (recs[i].event_id),
      .query_id (cmd_evid),
      .match    (evmatch[i])
    );
    assign leaf_v[i] = event_mode ? evmatch[i] : ready[i];
    assign leaf_p[i] = recs[i].prio;
  end

  logic              found;
  logic [PRIO_W-1:0] best_prio;
  logic [IDX_W-1:0]  best_idx;

  rtm_priority_tree #(.RECORDS(RECORDS), .PRIO_W(PRIO_W)) u_tree (
    .leaf_valid (leaf_v),
    .leaf_prio  (leaf_p),
    .found      (found),
    .best_prio  (best_prio),
    .best_idx   (best_idx)
  );

  // --------------------------------------------------------------- RESULT
  logic              res_found;
  logic [PRIO_W-1:0] res_prio;
  logic [IDX_W-1:0]  res_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_found <= 1'b0;
      res_prio  <= '0;
      res_idx   <= '0;
    end else if (cmd_wr && (cmd_op == CMD_SCHEDULE || cmd_op == CMD_EVENT)) begin
      res_found <= found;
      res_prio  <= best_prio;
      res_idx   <= best_idx;
    end
  end

  // ------------------------------------------------------------ read path
  logic [BUS_W-1:0] rd_mux;

  always_comb begin
    rd_mux = '0;
    if (!is_ctrl) begin
      if (!rec_word) begin
        rd_mux[STATUS_W-1:0] = recs[rec_idx].status;
        rd_mux[8 +: PRIO_W]  = recs[rec_idx].prio;
        rd_mux[16 +: EVID_W] = recs[rec_idx].event_id;
      end else begin
        rd_mux[DELAY_W-1:0]  = recs[rec_idx].delay;
      end
    end else if (reg_word == (ADDR_W-3)'(REG_RESULT)) begin
      rd_mux[31]          = res_found;
      rd_mux[8 +: PRIO_W] = res_prio;
      rd_mux[IDX_W-1:0]   = res_idx;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_rvalid <= 1'b0;
      bus_rdata  <= '0;
    end else begin
      bus_rvalid <= bus_req & ~bus_we;
      if (bus_req && !bus_we) bus_rdata <= rd_mux;
    end
  end

  // ----------------------------------------------------------- assertions
  // A query that finds a record must name a record that is flagged and
  // whose priority it reports; no flagged record may beat it.
  always_comb begin
    if (rst_n && cmd_wr && found) begin
      a_winner_flagged: assert (leaf_v[best_idx] && leaf_p[best_idx] == best_prio);
    end
  end
  // A write carries at least one byte enable.
  always_ff @(posedge clk) begin
    if (rst_n && bus_req && bus_we && !is_ctrl) begin
      a_write_has_be: assert (bus_be != 4'b0);
    end
  end

endmodule
