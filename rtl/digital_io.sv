// digital_io -- Digital I/O core: front-panel digital ports on the bus.
//
// Each of the N_IO pins (4 coaxial and 9 RS422 ports on the Em#) has a 2-bit
// mode:
//   0 off     : the pin is an input and is ignored;
//   1 trigger : every rising edge sends a message with ID pin_id[i] whose data
//               is the pin's edge count (an external trigger on the bus);
//   2 counter : rising edges are counted; each broadcast message with ID
//               sample_id makes the pin send its count with ID pin_id[i];
//   3 output  : the pin is driven (io_oe=1) with bit 0 of the data of every
//               broadcast message whose ID is pin_id[i], for feedback outputs.
// Inputs pass through a two-flip-flop synchroniser at the bus clock, so an input
// must stay high and low for more than one clock each (about 50 MHz at most). Events are timestamped when
// they happen and held one per pin until sent; the lowest pending pin is sent
// first, one per cycle. An event on a pin whose previous event is still held is
// lost and sets that pin's sticky `lost` flag.
//
// Harmony says the core controls the digital ports and can implement a counter
// or an external trigger; the modes, the message data and the output mode are
// this design's choices.
//
// Timing: a rising edge at io_in reaches the upstream port 4 cycles later
// (2 synchroniser stages, edge detect, pending register) when no other pin is
// pending.
module digital_io
  import harmony_pkg::*;
#(
  parameter int unsigned N_IO  = 13,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  hb_bcast_t              bc,
  output logic                   up_req,
  output hb_msg_t                up_msg,
  input  logic                   up_rd,
  output hb_status_t             status,
  input  logic                   clear_status,
  // configuration
  input  logic [N_IO-1:0][1:0]   mode,
  input  hb_id_t [N_IO-1:0]      pin_id,
  input  hb_id_t                 sample_id,
  // pins
  input  logic [N_IO-1:0]        io_in,
  output logic [N_IO-1:0]        io_out,
  output logic [N_IO-1:0]        io_oe,
  // observation
  output logic [N_IO-1:0][31:0]  counts,
  output logic [N_IO-1:0]        lost
);

  localparam logic [1:0] M_OFF = 2'd0, M_TRIG = 2'd1, M_CNT = 2'd2, M_OUT = 2'd3;
  localparam int unsigned PW = (N_IO > 1) ? $clog2(N_IO) : 1;

  logic [N_IO-1:0]       s1, s2, s3, rise, event_i, pend;
  logic [N_IO-1:0][31:0] pdata;
  hb_ts_t [N_IO-1:0]     pts;
  hb_ts_t                ts;
  logic                  any;
  logic [PW-1:0]         sel;

  hb_timestamp u_ts (.clk, .rst_n, .bc, .ts);

  always_ff @(posedge clk) begin
    if (!rst_n) {s1, s2, s3} <= '0;
    else begin
      s1 <= io_in;
      s2 <= s1;
      s3 <= s2;
    end
  end
  assign rise = s2 & ~s3;

  always_comb begin
    for (int i = 0; i < N_IO; i++)
      event_i[i] = (mode[i] == M_TRIG && rise[i]) ||
                   (mode[i] == M_CNT  && hb_match(bc, sample_id));
  end

  // Lowest pending pin is sent first.
  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int i = N_IO - 1; i >= 0; i--)
      if (pend[i]) begin
        any = 1'b1;
        sel = PW'(i);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      counts <= '0; pend <= '0; lost <= '0; io_out <= '0; pdata <= '0; pts <= '0;
    end else begin
      for (int i = 0; i < N_IO; i++) begin
        logic [31:0] c;
        c = counts[i];
        if (mode[i] != M_OFF && mode[i] != M_OUT && rise[i]) c = c + 1;
        counts[i] <= c;
        if (any && sel == PW'(i)) pend[i] <= 1'b0;
        if (event_i[i]) begin
          if (pend[i] && !(any && sel == PW'(i))) lost[i] <= 1'b1;
          else begin
            pend[i]  <= 1'b1;
            pdata[i] <= c;
            pts[i]   <= ts;
          end
        end
        if (clear_status) lost[i] <= 1'b0;
        if (mode[i] == M_OUT && hb_match(bc, pin_id[i])) io_out[i] <= bc.msg.data[0];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_IO; i++) io_oe[i] = (mode[i] == M_OUT);
  end

  hb_master #(.DEPTH(DEPTH)) u_port (
    .clk, .rst_n,
    .push     (any),
    .push_msg ('{data: pdata[sel], ts: pts[sel], id: pin_id[sel]}),
    .err_tag  (pin_id[0]), .ts,
    .up_req, .up_msg, .up_rd, .status, .clear_status
  );

endmodule
