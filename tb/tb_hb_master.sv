// tb_hb_master -- self-checking test of the core upstream port.
//
// Pushes numbered messages while the consumer (the bridge side) reads at random,
// and checks that every accepted message comes out once and in order, that a
// push into a full queue sets the overflow flag and is followed by exactly one
// ID 255 message carrying err_tag, and that clear_status clears the flag.
module tb_hb_master;
  import harmony_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic push, up_req, up_rd, clear_status, rd_en;
  hb_msg_t push_msg, up_msg;
  hb_status_t status;
  int checks = 0, failures = 0;

  hb_master #(.DEPTH(4)) dut (
    .clk, .rst_n, .push, .push_msg, .err_tag(8'h5A), .ts(24'h123456),
    .up_req, .up_msg, .up_rd, .status, .clear_status
  );

  assign up_rd = up_req && rd_en;

  hb_msg_t expq[$];
  int n_err = 0;

  // Model: what the queue should hold.
  int model_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (up_req && up_rd) begin
      if (up_msg.id == HB_ID_ERROR) begin
        n_err++;
        checks++;
        if (up_msg.data != 32'h5A) begin failures++; $display("bad error data %h", up_msg.data); end
      end else begin
        hb_msg_t e;
        checks++;
        if (expq.size() == 0) begin failures++; $display("unexpected %p", up_msg); end
        else begin
          e = expq.pop_front();
          if (e != up_msg) begin failures++; $display("got %h exp %h", up_msg, e); end
        end
      end
    end
  end

  task automatic do_push(input int v);
    // accepted if not full or a pop happens in the same cycle
    logic acc;
    @(negedge clk);
    push = 1'b1;
    push_msg = '{data: 32'(v), ts: 24'(v * 8), id: 8'(v % 200 + 1)};
    #1;
    acc = !status.full || (up_req && up_rd);
    if (acc) expq.push_back(push_msg);
    @(posedge clk);
    #1 push = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; push_msg = '0; clear_status = 0; rd_en = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Phase 1: random traffic with random reading, never overflow.
    for (int v = 0; v < 300; v++) begin
      @(negedge clk) rd_en = ($urandom % 4) != 0;
      if (!status.full) do_push(v); else @(posedge clk);
    end
    @(negedge clk) rd_en = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (status.overflow || n_err != 0) begin failures++; $display("spurious overflow"); end
    // Phase 2: fill while nothing is read, then overflow twice.
    @(negedge clk) rd_en = 0;
    for (int v = 1000; v < 1006; v++) do_push(v);
    @(posedge clk);
    checks++;
    if (!status.overflow || !status.err_pending) begin failures++; $display("overflow not flagged"); end
    @(negedge clk) rd_en = 1;
    repeat (20) @(posedge clk);
    checks++;
    if (n_err != 1) begin failures++; $display("error messages %0d, expected 1", n_err); end
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d messages lost", expq.size()); end
    checks++;
    if (!status.overflow) begin failures++; $display("overflow flag not sticky"); end
    clear_status <= 1; @(posedge clk); clear_status <= 0; @(posedge clk);
    checks++;
    if (status.overflow) begin failures++; $display("overflow not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
