// rtm_delay_decrement_cell: Delay Decrement cell of the RTM time manager.
//
// On a tick the RTOS hands the RTM the number of clock ticks that have
// elapsed; every record subtracts it from its delay at once, so time
// management takes constant time. The cell is a DELAY_W-bit subtractor and
// an AND gate: when the subtraction reaches zero or borrows, the delay
// becomes zero and the delayed bit is cleared (delayed_next = delayed AND
// NOT expired), which makes the task ready if nothing else holds it.
// Saturating at zero instead of wrapping, and leaving the delay of a record
// whose delayed bit is clear untouched, are this design's choices.
// Purely combinational; the record array registers the outputs.
module rtm_delay_decrement_cell #(
  parameter int unsigned DELAY_W = rtm_pkg::DELAY_W
) (
  input  logic               delayed,       // record's delayed bit
  input  logic [DELAY_W-1:0] delay,         // record's remaining delay
  input  logic [DELAY_W-1:0] ticks,         // ticks elapsed
  output logic               delayed_next,
  output logic [DELAY_W-1:0] delay_next
);

  logic [DELAY_W:0] diff;     // borrow in the top bit
  logic             expired;

  assign diff         = {1'b0, delay} - {1'b0, ticks};
  assign expired      = diff[DELAY_W] | (diff[DELAY_W-1:0] == '0);
  assign delayed_next = delayed & ~expired;
  assign delay_next   = !delayed ? delay
                      : expired  ? '0
                      :            diff[DELAY_W-1:0];

endmodule
