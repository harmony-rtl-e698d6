// tb_hb_memory -- self-checking test of the Memory core (DEPTH 16).
//
// Part 1: started from the slow bus with an ID window of [1, 30]; random
// broadcast traffic (inside and outside the window) is recorded; after more
// than DEPTH frames the buffer wraps, and the last DEPTH frames in range must
// be read back in circular order. Part 2: started and stopped by start/stop IDs
// on the fast bus; the start frame is not stored, the stop frame is, and
// nothing after it.
module tb_hb_memory;
  import harmony_pkg::*;

  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  hb_bcast_t bc;
  logic sw_start, sw_stop, trig_en, running, wrapped;
  logic [3:0] rd_addr, wr_ptr;
  hb_msg_t rd_data;
  logic [7:0] id_lo, id_hi;

  hb_memory #(.DEPTH(D)) dut (
    .clk, .rst_n, .bc, .sw_start, .sw_stop, .trig_en, .start_id(8'd50), .stop_id(8'd51),
    .id_lo, .id_hi, .rd_addr, .rd_data, .running, .wr_ptr, .wrapped
  );

  hb_msg_t stored[$];

  task automatic send(input logic [7:0] id);
    hb_msg_t m;
    m = '{data: $urandom, ts: 24'($urandom), id: id};
    @(posedge clk);
    bc <= '{valid: 1'b1, msg: m};
    if (running_model && id >= id_lo && id <= id_hi) stored.push_back(m);
    if (trig_en && id == 8'd50) running_model = 1;
    if (trig_en && id == 8'd51) running_model = 0;
    @(posedge clk);
    bc <= '0;
  endtask

  bit running_model = 0;

  task automatic check_contents(input int n);
    // entry for stored[k] (of the last n) sits at (start + k) mod D
    for (int k = 0; k < n; k++) begin
      int a;
      a = (stored.size() - n + k) % D;
      @(posedge clk); rd_addr <= 4'(a);
      @(posedge clk); @(posedge clk);
      checks++;
      if (rd_data != stored[stored.size() - n + k]) begin
        failures++; $display("addr %0d: %p expected %p", a, rd_data, stored[stored.size() - n + k]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bc = '0; sw_start = 0; sw_stop = 0; trig_en = 0; id_lo = 1; id_hi = 30; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    send(8'd5);                               // not running: not stored
    sw_start <= 1; @(posedge clk); sw_start <= 0; running_model = 1;
    for (int i = 0; i < 40; i++) send(8'($urandom % 60));
    sw_stop <= 1; @(posedge clk); sw_stop <= 0; running_model = 0;
    send(8'd6);                               // stopped: not stored
    @(posedge clk);
    checks += 3;
    if (running) begin failures++; $display("still running"); end
    if (wrapped != (stored.size() > D)) begin failures++; $display("wrapped %0d with %0d frames", wrapped, stored.size()); end
    if (wr_ptr != 4'(stored.size() % D)) begin failures++; $display("wr_ptr %0d", wr_ptr); end
    check_contents(stored.size() < D ? stored.size() : D);
    // Part 2: start and stop from the fast bus.
    stored.delete();
    trig_en <= 1; id_lo <= 0; id_hi <= 255;
    @(posedge clk);
    send(8'd7);
    send(8'd50);
    for (int i = 0; i < 5; i++) send(8'(60 + i));
    send(8'd51);
    send(8'd8);
    @(posedge clk);
    checks += 2;
    if (stored.size() != 6 || stored[5].id != 8'd51) begin failures++; $display("model holds %0d", stored.size()); end
    if (wr_ptr != 4'd6 || running) begin failures++; $display("wr_ptr %0d running %0d", wr_ptr, running); end
    check_contents(6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
