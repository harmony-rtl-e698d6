// hb_timebase -- the periodic time reference of the Harmony Bus.
//
// While enabled it sends a message with the reserved ID 0 every PERIOD_CYCLES
// clock cycles (16 ms at 125 MHz by default). Every core clears its timestamp
// when that message reaches it over the broadcast bus, so all timestamps
// restart together. The message data is an epoch number that counts the
// references sent since reset; its timestamp is 0. The period and the reserved
// ID follow Harmony; giving the job to a core of its own and the epoch data are
// this design's choices.
//
// Timing: the first reference goes out PERIOD_CYCLES cycles after enable rises,
// then one every PERIOD_CYCLES cycles.
module hb_timebase
  import harmony_pkg::*;
#(
  parameter int unsigned PERIOD_CYCLES = TS_RESET_CYCLES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  output logic       up_req,
  output hb_msg_t    up_msg,
  input  logic       up_rd,
  output hb_status_t status,
  input  logic       clear_status
);

  localparam int unsigned CW = $clog2(PERIOD_CYCLES + 1);

  logic [CW-1:0]  cyc;
  hb_data_t       epoch;
  logic           fire;

  assign fire = enable && (cyc == CW'(PERIOD_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc   <= '0;
      epoch <= '0;
    end else if (!enable) begin
      cyc   <= '0;
    end else if (fire) begin
      cyc   <= '0;
      epoch <= epoch + 1'b1;
    end else begin
      cyc   <= cyc + 1'b1;
    end
  end

  hb_master #(.DEPTH(2)) u_port (
    .clk, .rst_n,
    .push     (fire),
    .push_msg ('{data: epoch, ts: '0, id: HB_ID_TS_RESET}),
    .err_tag  (HB_ID_TS_RESET),
    .ts       ('0),
    .up_req, .up_msg, .up_rd,
    .status, .clear_status
  );

endmodule
