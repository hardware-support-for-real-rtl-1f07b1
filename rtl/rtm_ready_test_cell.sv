// rtm_ready_test_cell: Ready Test cell of the RTM task scheduler.
//
// A record is ready to run when its valid bit is set and its delayed, event
// and suspended bits are all clear: three inverters and one AND gate, as in
// the reference architecture. One cell per record feeds a leaf of the
// Priority Test tree. Purely combinational.
module rtm_ready_test_cell (
  input  rtm_pkg::rtm_status_t status,  // status flags of one record
  output logic        ready    // 1 = valid and not delayed, pending or suspended
);

  assign ready = status.valid & ~status.delayed & ~status.event_p & ~status.suspended;

endmodule
