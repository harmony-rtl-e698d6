// hb_master -- upstream port of a Harmony core.
//
// A core hands each message it wants to publish to this port (push/push_msg).
// The port keeps them in a DEPTH-entry queue and offers the oldest to its
// bridge on the upstream bus with the two handshake lines Harmony defines:
// up_req ("data request") is high while a message waits on up_msg, and the
// bridge raises up_rd ("reading") in the cycle it takes it. up_msg is stable
// while up_req is high and up_rd low.
//
// If a message is pushed while the queue is full it is dropped: the sticky
// overflow flag is set and one error message (reserved ID 255, data = err_tag,
// normally the core's own output ID) is queued as soon as there is room and no
// new message is pushed in that cycle. The status flags are Harmony's "status
// flags used to ensure a correct communication process"; which flags, the queue
// and the error message contents are this design's choices.
//
// Timing: a push is visible on up_req the next cycle; one message per cycle.
module hb_master
  import harmony_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  hb_msg_t    push_msg,
  input  hb_id_t     err_tag,
  input  hb_ts_t     ts,
  output logic       up_req,
  output hb_msg_t    up_msg,
  input  logic       up_rd,
  output hb_status_t status,
  input  logic       clear_status
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  hb_msg_t            q [DEPTH];
  logic [AW-1:0]      rp, wp;
  logic [AW:0]        cnt;
  logic               overflow, err_pending;
  logic               full, pop, do_push, do_err;
  hb_msg_t            wmsg;

  assign full    = (cnt == (AW+1)'(DEPTH));
  assign pop     = up_req && up_rd;
  assign do_push = push && (!full || pop);
  assign do_err  = err_pending && !push && (!full || pop);
  assign wmsg    = do_err ? '{data: hb_data_t'(err_tag), ts: ts, id: HB_ID_ERROR} : push_msg;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
      overflow <= 1'b0; err_pending <= 1'b0;
    end else begin
      if (do_push || do_err) begin
        q[wp] <= wmsg;
        wp    <= inc(wp);
      end
      if (pop) rp <= inc(rp);
      cnt <= cnt + (AW+1)'(do_push || do_err) - (AW+1)'(pop);
      if (push && !do_push) begin
        overflow    <= 1'b1;
        err_pending <= 1'b1;
      end else begin
        if (clear_status) overflow <= 1'b0;
        if (do_err)       err_pending <= 1'b0;
      end
    end
  end

  assign up_req = (cnt != '0);
  assign up_msg = q[rp];
  assign status = '{full: full, overflow: overflow, err_pending: err_pending};

  // The bridge may only read a message that is offered.
  a_rd_needs_req: assert property (@(posedge clk) disable iff (!rst_n) up_rd |-> up_req);

endmodule
