// rtm_pkg: types and constants shared by the Real-Time Task Manager (RTM).
//
// A task record holds four status flags, a priority, an event ID and a delay.
// The field widths (8-bit priority and event ID, 16-bit delay) are the
// reference sizes of the RTM. Only four status bits are stored, which gives
// the reference 36 flip-flops per record (2304 for 64 records); the status
// byte seen on the bus reads its upper four bits as zero. The bit positions
// of the flags, the register map and the command encoding are this design's
// own choices.
package rtm_pkg;

  localparam int unsigned PRIO_W  = 8;
  localparam int unsigned EVID_W  = 8;
  localparam int unsigned DELAY_W = 16;
  localparam int unsigned BUS_W   = 32;

  // Status flags. Bit 0 valid, bit 1 delayed, bit 2 event, bit 3 suspended.
  typedef struct packed {
    logic suspended;  // task suspended by the RTOS
    logic event_p;    // task pends on the event in event_id
    logic delayed;    // task waits for delay clock ticks
    logic valid;      // record is in use by a task
  } rtm_status_t;

  localparam int unsigned STATUS_W = $bits(rtm_status_t);

  // One task record (reference widths).
  typedef struct packed {
    rtm_status_t          status;
    logic [PRIO_W-1:0]    prio;
    logic [EVID_W-1:0]    event_id;
    logic [DELAY_W-1:0]   delay;
  } rtm_rec_t;

  // Commands written to the CMD register, bits [1:0].
  typedef enum logic [1:0] {
    CMD_NOP      = 2'd0,
    CMD_SCHEDULE = 2'd1,  // highest-priority ready task
    CMD_EVENT    = 2'd2,  // highest-priority task pending on event ID [15:8]
    CMD_TICK     = 2'd3   // subtract tick count [31:16] from all delays
  } rtm_cmd_e;

  // Byte offsets inside the record of the two 32-bit words that hold it.
  localparam int unsigned REC_BYTES = 8;       // records sit at 64-bit boundaries
  // Control registers, word offsets in the control region.
  localparam int unsigned REG_CMD    = 0;
  localparam int unsigned REG_RESULT = 1;

endpackage
