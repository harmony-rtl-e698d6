// hb_memory -- Memory core: circular recording buffer of bus messages.
//
// While running, every broadcast message whose ID lies in [id_lo, id_hi] is
// written, whole (data, timestamp and ID), into a DEPTH-entry RAM at wr_ptr,
// which then advances and wraps; `wrapped` tells that the oldest entries have
// been overwritten. Recording starts on a sw_start pulse or stops on a sw_stop
// pulse from the slow bus or, when trig_en is set, on broadcast messages with
// ID start_id / stop_id (the fast bus). A start message is not stored; a stop
// message in range is stored as the last entry. Starting clears wr_ptr and
// `wrapped`. The stored frames are read back through rd_addr/rd_data.
//
// Harmony gives the function (RAM storing bus data as a circular buffer that is
// started and stopped from the fast or the slow bus); the ID window, storing
// whole frames and the size are this design's choices.
//
// Timing: a message is written in the cycle after it is seen on the bus;
// rd_data follows rd_addr by one cycle (synchronous block-RAM read).
module hb_memory
  import harmony_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  hb_bcast_t                bc,
  // configuration
  input  logic                     sw_start,
  input  logic                     sw_stop,
  input  logic                     trig_en,
  input  hb_id_t                   start_id,
  input  hb_id_t                   stop_id,
  input  hb_id_t                   id_lo,
  input  hb_id_t                   id_hi,
  // read-back
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output hb_msg_t                  rd_data,
  output logic                     running,
  output logic [$clog2(DEPTH)-1:0] wr_ptr,
  output logic                     wrapped
);

  localparam int unsigned AW = $clog2(DEPTH);

  hb_msg_t mem [DEPTH];
  logic    in_range, store, do_start, do_stop;

  assign in_range = bc.valid && (bc.msg.id >= id_lo) && (bc.msg.id <= id_hi);
  assign store    = running && in_range;
  assign do_start = sw_start || (trig_en && hb_match(bc, start_id));
  assign do_stop  = sw_stop  || (trig_en && hb_match(bc, stop_id));

  always_ff @(posedge clk) begin
    if (store) mem[wr_ptr] <= bc.msg;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0; wr_ptr <= '0; wrapped <= 1'b0;
    end else if (!running && do_start) begin
      running <= 1'b1; wr_ptr <= '0; wrapped <= 1'b0;
    end else begin
      if (store) begin
        wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        if (wr_ptr == AW'(DEPTH - 1)) wrapped <= 1'b1;
      end
      if (do_stop) running <= 1'b0;
    end
  end

endmodule
