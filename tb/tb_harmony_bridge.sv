// tb_harmony_bridge -- self-checking test of the Harmony bridge.
//
// Three producer cores feed a non-root bridge whose parent reads at random,
// with a stall long enough to fill all slots. Checks: every message arrives at
// the parent exactly once and in order per child, no more than one child is
// read per cycle, all children are served (round-robin, no starvation),
// the broadcast is passed down one cycle later unchanged, and the
// diagnostics (messages sent, maximum occupied slots) match what was seen.
// A second bridge with ROOT=1 must broadcast every message it takes, one per
// cycle.
module tb_harmony_bridge;
  import harmony_pkg::*;

  localparam int NP = 3, SL = 4, NMSG = 200;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- non-root bridge ----------------
  logic    [NP-1:0] dn_req, dn_rd;
  hb_msg_t [NP-1:0] dn_msg;
  logic up_req, up_rd, rd_en, clear_diag;
  hb_msg_t up_msg;
  hb_bcast_t bc_in, bc_out, bc_in_q;
  logic [31:0] diag_sent;
  logic [2:0] diag_used, diag_max_used;

  harmony_bridge #(.N_PORTS(NP), .SLOTS(SL), .ROOT(1'b0)) dut (
    .clk, .rst_n, .dn_req, .dn_msg, .dn_rd, .up_req, .up_msg, .up_rd,
    .bc_in, .bc_out, .clear_diag, .diag_sent, .diag_used, .diag_max_used
  );

  int sent_k [NP];       // next sequence number each producer offers
  int recv_k [NP];       // next sequence number expected from each producer
  int total = 0, max_seen = 0;
  bit stall;

  for (genvar p = 0; p < NP; p++) begin : g_prod
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        dn_req[p] <= 1'b0;
        sent_k[p] <= 0;
      end else begin
        if (dn_req[p] && dn_rd[p]) sent_k[p] <= sent_k[p] + 1;
        // offer the next message at random, keep it up until it is read
        if (!dn_req[p] || dn_rd[p]) begin
          int k;
          k = (dn_req[p] && dn_rd[p]) ? sent_k[p] + 1 : sent_k[p];
          dn_req[p] <= (k < NMSG) && (($urandom % 3) != 0);
          dn_msg[p] <= '{data: 32'(k), ts: 24'(k * 8), id: 8'(p + 1)};
        end
      end
    end
  end

  assign up_rd = up_req && rd_en;
  always_ff @(posedge clk) rd_en <= !stall && (($urandom % 4) != 0);

  always @(posedge clk) if (rst_n) begin
    if ($countones(dn_rd) > 1) begin failures++; $display("two children read at once"); end
    if (up_req && up_rd) begin
      int p;
      p = int'(up_msg.id) - 1;
      checks++;
      if (p < 0 || p >= NP || up_msg.data != 32'(recv_k[p]) || up_msg.ts != 24'(recv_k[p] * 8)) begin
        failures++; $display("out of order: %p", up_msg);
      end else recv_k[p]++;
      total++;
    end
    if (int'(diag_used) > max_seen) max_seen = int'(diag_used);
    // broadcast passes down one cycle later
    checks++;
    if (bc_out != bc_in_q) begin failures++; $display("broadcast mismatch"); end
    bc_in_q <= bc_in;
    bc_in <= '{valid: 1'($urandom), msg: {$urandom, $urandom}};
  end

  // ---------------- root bridge ----------------
  logic [1:0] r_req, r_rd;
  hb_msg_t [1:0] r_msg;
  hb_bcast_t r_bc;
  logic [31:0] r_sent;
  logic [2:0] r_used, r_max;
  hb_msg_t rootq[$];
  int r_k [2];
  int r_bcast = 0;

  harmony_bridge #(.N_PORTS(2), .SLOTS(SL), .ROOT(1'b1)) root (
    .clk, .rst_n, .dn_req(r_req), .dn_msg(r_msg), .dn_rd(r_rd), .up_req(), .up_msg(), .up_rd(1'b0),
    .bc_in('0), .bc_out(r_bc), .clear_diag(1'b0), .diag_sent(r_sent), .diag_used(r_used), .diag_max_used(r_max)
  );

  for (genvar p = 0; p < 2; p++) begin : g_rprod
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        r_req[p] <= 1'b0; r_k[p] <= 0;
      end else if (!r_req[p] || r_rd[p]) begin
        int k;
        k = r_k[p] + int'(r_req[p] && r_rd[p]);
        r_k[p] <= k;
        r_req[p] <= (k < 50);
        r_msg[p] <= '{data: 32'(k), ts: '0, id: 8'(100 + p)};
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++) if (r_req[p] && r_rd[p]) rootq.push_back(r_msg[p]);
    if (r_bc.valid) begin
      hb_msg_t e;
      checks++;
      r_bcast++;
      e = rootq.pop_front();
      if (r_bc.msg != e) begin failures++; $display("root broadcast %p expected %p", r_bc.msg, e); end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bc_in = '0; bc_in_q = '0; clear_diag = 0; stall = 0;
    for (int p = 0; p < NP; p++) recv_k[p] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (40) @(posedge clk);
    stall <= 1;                       // parent stops reading: slots fill up
    repeat (30) @(posedge clk);
    checks++;
    if (int'(diag_used) != SL) begin failures++; $display("slots not full during stall: %0d", diag_used); end
    stall <= 0;
    wait (total == NP * NMSG);
    repeat (10) @(posedge clk);
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (recv_k[p] != NMSG) begin failures++; $display("child %0d delivered %0d", p, recv_k[p]); end
    end
    checks += 3;
    if (diag_sent != 32'(NP * NMSG)) begin failures++; $display("diag_sent %0d", diag_sent); end
    if (diag_max_used != 3'(max_seen) || max_seen != SL) begin failures++; $display("diag_max_used %0d seen %0d", diag_max_used, max_seen); end
    if (r_bcast != 100 || r_sent != 100) begin failures++; $display("root broadcast %0d sent %0d", r_bcast, r_sent); end
    // clearing the diagnostics
    clear_diag <= 1; @(posedge clk); clear_diag <= 0; @(posedge clk);
    checks++;
    if (diag_sent != 0 || diag_max_used != 0) begin failures++; $display("diagnostics not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
