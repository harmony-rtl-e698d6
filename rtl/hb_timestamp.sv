// hb_timestamp -- the local nanosecond timestamp of one Harmony core.
//
// Every cycle the 24-bit count advances by TS_STEP (the clock period in ns,
// 8 at 125 MHz). When an ID 0 message appears on the broadcast bus the count
// restarts from zero, so all cores share one time base that is re-aligned every
// 16 ms. The count wraps at 2^24 ns (16.78 ms) if no ID 0 arrives. Keeping one
// counter per core, cleared by the broadcast, is this design's reading of the
// reserved ID 0; the skew between cores is the few cycles of bridge latency.
//
// Timing: ts is a register; it reads 0 in the cycle after the ID 0 message.
module hb_timestamp
  import harmony_pkg::*;
#(
  parameter int unsigned TS_STEP = CLK_PERIOD_NS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  hb_bcast_t bc,
  output hb_ts_t    ts
);

  always_ff @(posedge clk) begin
    if (!rst_n)                        ts <= '0;
    else if (hb_match(bc, HB_ID_TS_RESET)) ts <= '0;
    else                               ts <= ts + hb_ts_t'(TS_STEP);
  end

endmodule
