// hb_average -- AVERAGE core: running (moving-window) average on the bus.
//
// An ACC_W-bit two's complement accumulator adds the data of every broadcast
// message with ID add_id and subtracts the data of every message with ID
// sub_id. In the Em# chain add_id is an ADC channel and sub_id the same channel
// delayed by a FIFO core by N messages, so the accumulator holds the sum of the
// last N samples. After each subtraction the core sends acc >>> shift (an
// arithmetic shift: the average when N = 2^shift) with ID out_id.
//
// The add/subtract accumulator and the 32-bit two's complement format follow
// Harmony; sending after each subtraction and the shift used as the divider are
// this design's choices. Messages with other IDs are ignored; if add_id equals
// sub_id the data is added and subtracted, leaving acc unchanged.
//
// Timing: acc is updated the cycle after the message; the result is pushed to
// the upstream port in that same cycle (one cycle after the sub_id message).
module hb_average
  import harmony_pkg::*;
#(
  parameter int unsigned ACC_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  hb_bcast_t        bc,
  output logic             up_req,
  output hb_msg_t          up_msg,
  input  logic             up_rd,
  output hb_status_t       status,
  input  logic             clear_status,
  // configuration
  input  logic             enable,
  input  logic             clear,
  input  hb_id_t           add_id,
  input  hb_id_t           sub_id,
  input  hb_id_t           out_id,
  input  logic [4:0]       shift,
  output logic [ACC_W-1:0] acc
);

  logic                    is_add, is_sub, send;
  logic signed [ACC_W-1:0] term_add, term_sub, result;
  hb_ts_t                  ts;

  hb_timestamp u_ts (.clk, .rst_n, .bc, .ts);

  assign is_add   = enable && hb_match(bc, add_id);
  assign is_sub   = enable && hb_match(bc, sub_id);
  assign term_add = is_add ? ACC_W'(signed'(bc.msg.data)) : '0;
  assign term_sub = is_sub ? ACC_W'(signed'(bc.msg.data)) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      acc  <= '0;
      send <= 1'b0;
    end else begin
      acc  <= acc + term_add - term_sub;
      send <= is_sub;
    end
  end

  assign result = signed'(acc) >>> shift;

  hb_master #(.DEPTH(4)) u_port (
    .clk, .rst_n,
    .push     (send),
    .push_msg ('{data: hb_data_t'(result), ts: ts, id: out_id}),
    .err_tag  (out_id), .ts,
    .up_req, .up_msg, .up_rd, .status, .clear_status
  );

endmodule
