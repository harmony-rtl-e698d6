// id_gen -- ID GEN core: generates a sequence of messages with a chosen ID.
//
// A run starts on a `start` pulse from the slow bus or, when trig_en is set, on
// a broadcast message with ID trig_id. It then sends `count` messages (count=0:
// until `stop`) with ID gen_id and data start_data, start_data+step,
// start_data+2*step ..., the first in the cycle after the start and then one
// every `period` cycles (0 acts as 1). It is used to preload memories or
// exercise the bus for diagnostics; a period of 1 floods the bus, which shows
// how the bridges and the overflow flags behave under load.
//
// Harmony names the core and its use; the ramp, count, period and trigger
// controls are this design's choices.
module id_gen
  import harmony_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  hb_bcast_t   bc,
  output logic        up_req,
  output hb_msg_t     up_msg,
  input  logic        up_rd,
  output hb_status_t  status,
  input  logic        clear_status,
  // configuration
  input  logic        start,
  input  logic        stop,
  input  logic        trig_en,
  input  hb_id_t      trig_id,
  input  hb_id_t      gen_id,
  input  hb_data_t    start_data,
  input  hb_data_t    step,
  input  logic [31:0] count,
  input  logic [31:0] period,
  output logic        busy
);

  logic [31:0] sent, wait_cnt;
  hb_data_t    value;
  logic        go, fire;
  hb_ts_t      ts;

  hb_timestamp u_ts (.clk, .rst_n, .bc, .ts);

  assign go   = !busy && (start || (trig_en && hb_match(bc, trig_id)));
  assign fire = busy && (wait_cnt == '0);

  always_ff @(posedge clk) begin
    if (!rst_n || stop) begin
      busy <= 1'b0; sent <= '0; wait_cnt <= '0; value <= '0;
    end else if (go) begin
      busy     <= 1'b1;
      sent     <= '0;
      wait_cnt <= '0;
      value    <= start_data;
    end else if (fire) begin
      value    <= value + step;
      sent     <= sent + 1'b1;
      wait_cnt <= (period > 32'd1) ? period - 1 : '0;
      if (count != '0 && sent + 1 == count) busy <= 1'b0;
    end else if (busy) begin
      wait_cnt <= wait_cnt - 1'b1;
    end
  end

  hb_master #(.DEPTH(4)) u_port (
    .clk, .rst_n,
    .push     (fire),
    .push_msg ('{data: value, ts: ts, id: gen_id}),
    .err_tag  (gen_id), .ts,
    .up_req, .up_msg, .up_rd, .status, .clear_status
  );

endmodule
