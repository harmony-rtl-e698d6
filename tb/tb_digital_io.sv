// tb_digital_io -- self-checking test of the Digital I/O core (5 pins).
//
// Pin 0 trigger input, pin 1 counter, pin 2 output, pin 3 off, pin 4 trigger.
// Checks: each rising edge on a trigger pin yields one message with the pin's
// ID and its edge count, offered 4 cycles after the edge; the counter pin
// reports its count when the sample ID is broadcast; the output pin follows
// bit 0 of messages with its ID and is the only one with io_oe set; an off pin
// sends nothing; simultaneous edges on two pins give two messages, lowest pin
// first.
module tb_digital_io;
  import harmony_pkg::*;

  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  hb_bcast_t bc;
  logic up_req, up_rd, clear_status;
  hb_msg_t up_msg;
  hb_status_t status;
  logic [N-1:0][1:0] mode;
  hb_id_t [N-1:0] pin_id;
  logic [N-1:0] io_in, io_out, io_oe, lost;
  logic [N-1:0][31:0] counts;

  digital_io #(.N_IO(N), .DEPTH(8)) dut (
    .clk, .rst_n, .bc, .up_req, .up_msg, .up_rd, .status, .clear_status,
    .mode, .pin_id, .sample_id(8'd99), .io_in, .io_out, .io_oe, .counts, .lost
  );
  assign up_rd = up_req;

  hb_msg_t got[$];
  longint cyc = 0, req_at = -1;
  logic req_q = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    req_q <= up_req;
    if (rst_n && up_req && !req_q) req_at = cyc;
    if (rst_n && up_req && up_rd) got.push_back(up_msg);
  end

  task automatic pulse(input int p);
    longint t;
    @(posedge clk); io_in[p] <= 1'b1; t = cyc;
    repeat (3) @(posedge clk); io_in[p] <= 1'b0;
    repeat (6) @(posedge clk);
  endtask

  task automatic expect_msg(input logic [7:0] id, input logic [31:0] d);
    checks++;
    if (got.size() == 0) begin failures++; $display("missing message %0d:%0d", id, d); end
    else begin
      hb_msg_t m;
      m = got.pop_front();
      if (m.id != id || m.data != d) begin failures++; $display("got %0d:%0d expected %0d:%0d", m.id, m.data, id, d); end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    bc = '0; clear_status = 0; io_in = '0;
    mode = '{2'd1, 2'd0, 2'd3, 2'd2, 2'd1};     // pin4..pin0
    pin_id = '{8'd14, 8'd13, 8'd12, 8'd11, 8'd15};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    checks++;
    if (io_oe != 5'b00100) begin failures++; $display("io_oe %b", io_oe); end
    // trigger pin 0: latency and count
    @(posedge clk); io_in[0] <= 1; t0 = cyc;
    repeat (3) @(posedge clk); io_in[0] <= 0;
    repeat (6) @(posedge clk);
    checks++;
    // io_in changes at edge 0; up_req rises at edge 4 and is first sampled at edge 5
    if (req_at - t0 != 5) begin failures++; $display("trigger latency %0d", req_at - t0); end
    expect_msg(8'd15, 1);
    pulse(0);
    expect_msg(8'd15, 2);
    // off pin: nothing
    pulse(3);
    checks++;
    if (got.size() != 0) begin failures++; $display("off pin sent"); end
    // counter pin 1: three edges, then a sample request
    pulse(1); pulse(1); pulse(1);
    checks++;
    if (got.size() != 0) begin failures++; $display("counter sent before sample"); end
    @(posedge clk); bc <= '{valid: 1'b1, msg: '{data: '0, ts: '0, id: 8'd99}};
    @(posedge clk); bc <= '0;
    repeat (5) @(posedge clk);
    expect_msg(8'd11, 3);
    // output pin 2
    @(posedge clk); bc <= '{valid: 1'b1, msg: '{data: 32'd1, ts: '0, id: 8'd12}};
    @(posedge clk); bc <= '0;
    @(posedge clk);
    checks++;
    if (io_out[2] != 1'b1) begin failures++; $display("output pin not set"); end
    @(posedge clk); bc <= '{valid: 1'b1, msg: '{data: 32'd2, ts: '0, id: 8'd12}};
    @(posedge clk); bc <= '0;
    @(posedge clk);
    checks++;
    if (io_out[2] != 1'b0) begin failures++; $display("output pin not cleared"); end
    // simultaneous edges on pins 4 and 0
    @(posedge clk); io_in[0] <= 1; io_in[4] <= 1;
    repeat (3) @(posedge clk); io_in[0] <= 0; io_in[4] <= 0;
    repeat (8) @(posedge clk);
    expect_msg(8'd15, 3);
    expect_msg(8'd14, 1);
    checks++;
    if (counts[0] != 3 || counts[1] != 3 || counts[3] != 0 || lost != 0) begin failures++; $display("counts/lost wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
