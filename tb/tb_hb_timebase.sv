// tb_hb_timebase -- self-checking test of the ID 0 time reference.
//
// With a short period, checks that ID 0 messages come out exactly PERIOD
// cycles apart with increasing epoch numbers, that none come out while the
// core is disabled, and that an hb_timestamp fed with the resulting broadcast
// restarts from 0 and then advances 8 ns per cycle.
module tb_hb_timebase;
  import harmony_pkg::*;

  localparam int P = 37;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic enable, up_req, up_rd, clear_status;
  hb_msg_t up_msg;
  hb_status_t status;
  hb_bcast_t bc;
  hb_ts_t ts;
  int checks = 0, failures = 0;
  longint cyc = 0, last = -1;
  int n = 0;

  hb_timebase #(.PERIOD_CYCLES(P)) dut (.clk, .rst_n, .enable, .up_req, .up_msg, .up_rd, .status, .clear_status);
  hb_timestamp u_ts (.clk, .rst_n, .bc, .ts);

  assign up_rd = up_req;
  always @(posedge clk) cyc <= cyc + 1;
  // A one-stage stand-in for the bus: the message is broadcast the next cycle.
  always_ff @(posedge clk) bc <= rst_n ? '{valid: up_req && up_rd, msg: up_msg} : '0;

  always @(posedge clk) if (rst_n && up_req && up_rd) begin
    checks += 2;
    if (up_msg.id != HB_ID_TS_RESET || up_msg.data != 32'(n)) begin
      failures++; $display("bad message %p, expected epoch %0d", up_msg, n);
    end
    if (last >= 0 && cyc - last != P) begin failures++; $display("spacing %0d", cyc - last); end
    if (!enable) begin failures++; $display("message while disabled"); end
    last = cyc; n++;
  end

  // After each broadcast of ID 0 the timestamp restarts.
  always @(posedge clk) if (rst_n && bc.valid) begin
    #1;
    checks++;
    if (ts != 0) begin failures++; $display("ts not cleared: %0d", ts); end
    repeat (6) @(posedge clk);
    #1;
    checks++;
    if (ts != 6 * CLK_PERIOD_NS) begin failures++; $display("ts step wrong: %0d", ts); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0; clear_status = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (100) @(posedge clk);
    checks++;
    if (n != 0) begin failures++; $display("messages while disabled"); end
    enable <= 1;
    repeat (10 * P + 5) @(posedge clk);
    checks++;
    if (n != 10) begin failures++; $display("%0d references in 10 periods", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
