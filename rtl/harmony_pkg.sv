// harmony_pkg -- types and constants shared by every Harmony Bus block.
//
// A Harmony Bus (HB) message is one 64-bit word: 32 bits of data, a 24-bit
// timestamp in nanoseconds and an 8-bit source ID. The widths, the 125 MHz bus
// clock and the two reserved IDs (0: periodic timestamp reset every 16 ms,
// 255: error message) are the ones Harmony defines. The order of the fields
// inside the word (data high, ID low) is this design's choice.
package harmony_pkg;

  localparam int unsigned HB_DATA_W = 32;
  localparam int unsigned HB_TS_W   = 24;
  localparam int unsigned HB_ID_W   = 8;
  localparam int unsigned HB_MSG_W  = HB_DATA_W + HB_TS_W + HB_ID_W;  // 64

  // Bus clock is 125 MHz: the timestamp advances 8 ns per cycle.
  localparam int unsigned CLK_PERIOD_NS      = 8;
  // ID 0 is sent every 16 ms and clears all timestamps.
  localparam int unsigned TS_RESET_PERIOD_NS = 16_000_000;
  localparam int unsigned TS_RESET_CYCLES    = TS_RESET_PERIOD_NS / CLK_PERIOD_NS;

  typedef logic [HB_ID_W-1:0]   hb_id_t;
  typedef logic [HB_TS_W-1:0]   hb_ts_t;
  typedef logic [HB_DATA_W-1:0] hb_data_t;

  localparam hb_id_t HB_ID_TS_RESET = 8'd0;
  localparam hb_id_t HB_ID_ERROR    = 8'd255;

  // One bus word: data[63:32], ts[31:8], id[7:0].
  typedef struct packed {
    hb_data_t data;
    hb_ts_t   ts;
    hb_id_t   id;
  } hb_msg_t;

  // Broadcast bus: the valid line plus the message.
  typedef struct packed {
    logic    valid;
    hb_msg_t msg;
  } hb_bcast_t;

  // Status flags every core reports.
  typedef struct packed {
    logic full;         // upstream queue is full now
    logic overflow;     // a message was dropped (sticky until cleared)
    logic err_pending;  // an ID 255 error message still has to be sent
  } hb_status_t;

  function automatic logic hb_match(hb_bcast_t b, hb_id_t id);
    return b.valid && (b.msg.id == id);
  endfunction

endpackage
