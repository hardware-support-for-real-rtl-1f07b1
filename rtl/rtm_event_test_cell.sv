// rtm_event_test_cell: Event Test cell of the RTM event manager.
//
// Flags a record that pends on the event being released: its event bit is
// set and its event ID equals the queried ID (one EVID_W-bit equality
// comparator and one AND gate). As in the reference architecture the valid
// bit is not tested; the RTOS clears the event bit of a task it deletes.
// Purely combinational; one cell per record feeds a leaf of the shared
// Priority Test tree.
module rtm_event_test_cell #(
  parameter int unsigned EVID_W = rtm_pkg::EVID_W
) (
  input  rtm_pkg::rtm_status_t status,    // status flags of one record
  input  logic [EVID_W-1:0]  event_id,  // the record's event ID field
  input  logic [EVID_W-1:0]  query_id,  // ID of the event being released
  output logic               match      // 1 = record waits on that event
);

  assign match = status.event_p & (event_id == query_id);

endmodule
