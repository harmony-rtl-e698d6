// hb_fifo -- FIFO core: delays the data of one bus ID by a number of messages.
//
// Every broadcast message whose ID equals in_id is written into a circular
// buffer. Once the buffer already holds `delay` words, each new arrival also
// reads out the oldest word, which is sent on the Harmony Bus with ID out_id.
// The output stream is therefore the input stream delayed by `delay` messages;
// in the Em# acquisition chain it feeds the subtracting input of an AVERAGE core
// to form a moving window.
//
// Store mode (store_mode=1): nothing is sent; arriving words are kept until the
// buffer holds MAX_DEPTH (later arrivals are dropped) and the control software
// takes them out, oldest first, with rd_pop: rd_word is valid (rd_valid) the
// cycle after the pop. A pop with the buffer empty, or in a cycle where the
// delay line itself reads the buffer, is ignored (rd_valid stays low).
//
// Harmony gives the function (one core per channel, data delayed "some
// messages", new ID); the buffer size, the read-before-write order, the
// timestamp of the delayed message (the time it is sent) and the treatment of
// delay=0 (as 1; values above MAX_DEPTH act as MAX_DEPTH) are this design's
// choices. After lowering `delay` at run time, pulse `clear`: words already held
// beyond the new delay are otherwise kept.
//
// Timing: the buffer is read synchronously, so the delayed message is pushed
// to the upstream port one cycle after the arriving one is seen.
module hb_fifo
  import harmony_pkg::*;
#(
  parameter int unsigned MAX_DEPTH = 1024
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  hb_bcast_t                      bc,
  output logic                           up_req,
  output hb_msg_t                        up_msg,
  input  logic                           up_rd,
  output hb_status_t                     status,
  input  logic                           clear_status,
  // configuration
  input  logic                           enable,
  input  logic                           clear,
  input  hb_id_t                         in_id,
  input  hb_id_t                         out_id,
  input  logic [$clog2(MAX_DEPTH+1)-1:0] delay,
  input  logic                           store_mode,
  output logic [$clog2(MAX_DEPTH+1)-1:0] fill,
  // store-mode read-back
  input  logic                           rd_pop,
  output hb_data_t                       rd_word,
  output logic                           rd_valid
);

  localparam int unsigned AW = (MAX_DEPTH > 1) ? $clog2(MAX_DEPTH) : 1;
  localparam int unsigned CW = $clog2(MAX_DEPTH + 1);

  hb_data_t       mem [MAX_DEPTH];
  logic [AW-1:0]  wp, rp;
  logic           hit, emit, emit_q, wr, pop, pop_q;
  hb_data_t       rdata;
  logic [CW-1:0]  dly;
  hb_ts_t         ts;

  hb_timestamp u_ts (.clk, .rst_n, .bc, .ts);

  assign dly  = (delay == '0) ? CW'(1) :
                (delay > CW'(MAX_DEPTH)) ? CW'(MAX_DEPTH) : delay;
  assign hit  = enable && hb_match(bc, in_id);
  assign emit = hit && !store_mode && (fill >= dly);
  // In store mode a full buffer drops new words.
  assign wr   = hit && !(store_mode && fill == CW'(MAX_DEPTH));
  assign pop  = rd_pop && !emit && (fill != '0);

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(MAX_DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  // Buffer memory: one write and one synchronous read port.
  always_ff @(posedge clk) begin
    if (wr)          mem[wp] <= bc.msg.data;
    if (emit || pop) rdata   <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wp <= '0; rp <= '0; fill <= '0; emit_q <= 1'b0; pop_q <= 1'b0;
    end else begin
      emit_q <= emit;
      pop_q  <= pop;
      if (wr)          wp <= inc(wp);
      if (emit || pop) rp <= inc(rp);
      // In delay mode a full buffer (fill = MAX_DEPTH) always emits, in store
      // mode it stops writing, so fill never overflows.
      fill <= fill + CW'(wr) - CW'(emit || pop);
    end
  end

  assign rd_word  = rdata;
  assign rd_valid = pop_q;

  hb_master #(.DEPTH(4)) u_port (
    .clk, .rst_n,
    .push     (emit_q),
    .push_msg ('{data: rdata, ts: ts, id: out_id}),
    .err_tag  (out_id), .ts,
    .up_req, .up_msg, .up_rd, .status, .clear_status
  );

endmodule
