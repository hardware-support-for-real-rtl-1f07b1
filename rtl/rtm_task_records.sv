// rtm_task_records: the RTM task database, RECORDS task records with one
// Delay Decrement cell each.
//
// Each record holds the status flags (valid, delayed, event, suspended), an
// 8-bit priority, an 8-bit event ID and a 16-bit delay: 36 flip-flops, 2304
// for the reference 64 records. The CPU writes a record as two 32-bit words
// with byte enables, so every field can be written on its own:
//   word 0: [3:0] status, [15:8] priority, [23:16] event ID
//   word 1: [15:0] delay
// (this packing is this design's choice). A tick subtracts tick_count from
// the delay of every delayed record in the same clock edge and clears the
// delayed bit of each record whose delay runs out: constant time whatever
// the number of tasks. All records are visible at once on recs, which feeds
// the Ready Test and Event Test cells. A write and a tick never come in the
// same cycle from the RTM's bus decoder; if they did, the write would win.
// Synchronous active-low reset clears every record.
module rtm_task_records
  import rtm_pkg::*;
#(
  parameter int unsigned RECORDS = 64,
  localparam int unsigned IDX_W  = $clog2(RECORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,       // write one record word
  input  logic [IDX_W-1:0]   wr_idx,      // record written
  input  logic               wr_word,     // 0: status/priority/event ID, 1: delay
  input  logic [3:0]         wr_be,       // byte enables
  input  logic [BUS_W-1:0]   wr_data,
  input  logic               tick_en,     // apply a tick to every record
  input  logic [DELAY_W-1:0] tick_count,  // clock ticks elapsed
  output rtm_rec_t           recs [RECORDS]
);

  logic               dd_delayed [RECORDS];
  logic [DELAY_W-1:0] dd_delay   [RECORDS];

  for (genvar i = 0; i < RECORDS; i++) begin : g_dd
    rtm_delay_decrement_cell #(.DELAY_W(DELAY_W)) u_dd (
      .delayed      (recs[i].status.delayed),
      .delay        (recs[i].delay),
      .ticks        (tick_count),
      .delayed_next (dd_delayed[i]),
      .delay_next   (dd_delay[i])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < RECORDS; i++) recs[i] <= '0;
    end else if (wr_en) begin
      if (!wr_word) begin
        if (wr_be[0]) recs[wr_idx].status   <= rtm_status_t'(wr_data[STATUS_W-1:0]);
        if (wr_be[1]) recs[wr_idx].prio     <= wr_data[8 +: PRIO_W];
        if (wr_be[2]) recs[wr_idx].event_id <= wr_data[16 +: EVID_W];
      end else begin
        if (wr_be[0]) recs[wr_idx].delay[7:0]  <= wr_data[7:0];
        if (wr_be[1]) recs[wr_idx].delay[15:8] <= wr_data[15:8];
      end
    end else if (tick_en) begin
      for (int i = 0; i < RECORDS; i++) begin
        recs[i].status.delayed <= dd_delayed[i];
        recs[i].delay          <= dd_delay[i];
      end
    end
  end

endmodule
