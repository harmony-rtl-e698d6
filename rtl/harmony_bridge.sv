// harmony_bridge -- a node of the Harmony Bus tree.
//
// Cores and lower bridges (the children) connect to a bridge on two buses. On
// the upstream bus each child holds dn_req high while it offers dn_msg; the
// bridge arbitrates round-robin among the requesting children, takes one
// message per cycle (dn_rd high for that child in that cycle) into a buffer of
// SLOTS messages and offers the oldest to its parent with the same req/rd
// handshake. The top bridge (ROOT=1) has no parent: every cycle it takes one
// message from its buffer and drives it onto the broadcast bus. Every bridge
// registers the broadcast bus from its parent (bc_in) before passing it down
// (bc_out), so each level adds one cycle to the broadcast and at least one cycle
// to the upstream path.
//
// Diagnostics, as in Harmony: the number of messages passed on (diag_sent), the
// slots occupied now (diag_used) and the largest number occupied since the last
// clear_diag (diag_max_used). The top bridge ignores bc_in and up_rd and
// drives up_req/up_msg to zero. Round-robin arbitration, the buffer as a FIFO and
// its size are this design's choices.
module harmony_bridge
  import harmony_pkg::*;
#(
  parameter int unsigned N_PORTS = 8,
  parameter int unsigned SLOTS   = 16,
  parameter bit          ROOT    = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // children
  input  logic    [N_PORTS-1:0]    dn_req,
  input  hb_msg_t [N_PORTS-1:0]    dn_msg,
  output logic    [N_PORTS-1:0]    dn_rd,
  // parent
  output logic                     up_req,
  output hb_msg_t                  up_msg,
  input  logic                     up_rd,
  input  hb_bcast_t                bc_in,
  output hb_bcast_t                bc_out,
  // diagnostics
  input  logic                     clear_diag,
  output logic [31:0]              diag_sent,
  output logic [$clog2(SLOTS+1)-1:0] diag_used,
  output logic [$clog2(SLOTS+1)-1:0] diag_max_used
);

  localparam int unsigned AW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned CW = $clog2(SLOTS+1);
  localparam int unsigned PW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;

  hb_msg_t        slot [SLOTS];
  logic [AW-1:0]  rp, wp;
  logic [CW-1:0]  cnt;
  logic [PW-1:0]  last;          // child served most recently
  logic           pop, take, full;
  logic [PW-1:0]  sel;
  logic           any;

  assign full = (cnt == CW'(SLOTS));
  assign pop  = (cnt != '0) && (ROOT ? 1'b1 : up_rd);

  // Round-robin: first requesting child after the one served last.
  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int unsigned k = 1; k <= N_PORTS; k++) begin
      logic [PW-1:0] i;
      i = PW'((int'(last) + k) % N_PORTS);
      if (!any && dn_req[i]) begin
        any = 1'b1;
        sel = i;
      end
    end
  end

  assign take = any && (!full || pop);

  always_comb begin
    dn_rd = '0;
    if (take) dn_rd[sel] = 1'b1;
  end

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(SLOTS-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0; last <= PW'(N_PORTS-1);
      diag_sent <= '0; diag_max_used <= '0;
    end else begin
      if (take) begin
        slot[wp] <= dn_msg[sel];
        wp       <= inc(wp);
        last     <= sel;
      end
      if (pop) rp <= inc(rp);
      cnt <= cnt + CW'(take) - CW'(pop);
      if (clear_diag) begin
        diag_sent     <= '0;
        diag_max_used <= cnt;
      end else begin
        if (pop) diag_sent <= diag_sent + 1'b1;
        if (cnt > diag_max_used) diag_max_used <= cnt;
      end
    end
  end

  assign diag_used = cnt;

  generate
    if (ROOT) begin : g_root
      assign up_req = 1'b0;
      assign up_msg = '0;
      always_ff @(posedge clk) begin
        if (!rst_n) bc_out <= '0;
        else        bc_out <= '{valid: pop, msg: slot[rp]};
      end
    end else begin : g_node
      assign up_req = (cnt != '0);
      assign up_msg = slot[rp];
      always_ff @(posedge clk) begin
        if (!rst_n) bc_out <= '0;
        else        bc_out <= bc_in;
      end
    end
  endgenerate

  // Handshake rules of the upstream bus.
  a_rd_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(dn_rd));
  a_rd_needs_req: assert property (@(posedge clk) disable iff (!rst_n) (dn_rd & ~dn_req) == '0);

endmodule
