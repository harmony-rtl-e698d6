// tb_hb_fifo -- self-checking test of the FIFO (delay) core.
//
// Drives the broadcast bus with a random mix of the input ID and other IDs and
// compares the core's messages with a reference queue: the k-th output must be
// the (k)-th input, sent with out_id, once `delay` newer words have arrived.
// Also checks that an output is offered exactly 2 cycles after the broadcast
// that causes it, that the full buffer (delay = MAX_DEPTH) works, clear, and
// store mode: words kept without being sent, read back oldest first.
module tb_hb_fifo;
  import harmony_pkg::*;

  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  hb_bcast_t bc;
  logic up_req, up_rd, enable, clear, clear_status;
  hb_msg_t up_msg;
  hb_status_t status;
  logic [4:0] delay, fill;
  logic store_mode, rd_pop, rd_valid;
  logic [31:0] rd_word;

  hb_fifo #(.MAX_DEPTH(D)) dut (
    .clk, .rst_n, .bc, .up_req, .up_msg, .up_rd, .status, .clear_status,
    .enable, .clear, .in_id(8'd1), .out_id(8'd11), .delay, .store_mode, .fill,
    .rd_pop, .rd_word, .rd_valid
  );
  assign up_rd = up_req;

  logic [31:0] ref_q[$], exp_q[$];
  longint cyc = 0;
  longint due[$];
  int nout = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && up_req && up_rd) begin
      logic [31:0] e;
      longint t;
      checks += 2;
      e = exp_q.pop_front();
      t = due.pop_front();
      if (up_msg.id != 8'd11 || up_msg.data != e) begin failures++; $display("got %0d:%h expected %h", up_msg.id, up_msg.data, e); end
      if (cyc != t) begin failures++; $display("output at %0d, expected %0d", cyc, t); end
      nout++;
    end
  end

  task automatic send(input logic [7:0] id, input logic [31:0] d);
    @(posedge clk);
    bc <= '{valid: 1'b1, msg: '{data: d, ts: '0, id: id}};
    if (id == 8'd1) begin
      ref_q.push_back(d);
      if (ref_q.size() > int'(delay)) begin
        exp_q.push_back(ref_q.pop_front());
        due.push_back(cyc + 3);  // broadcast seen at cyc+1, offered after cyc+2, taken at cyc+3
      end
    end
    @(posedge clk);
    bc <= '0;
    repeat ($urandom % 3) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bc = '0; enable = 1; clear = 0; clear_status = 0; delay = 5; store_mode = 0; rd_pop = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 200; i++)
      send(($urandom % 3 == 0) ? 8'(2 + $urandom % 20) : 8'd1, $urandom);
    repeat (5) @(posedge clk);
    checks++;
    if (fill != 5) begin failures++; $display("fill %0d", fill); end
    // full-depth delay after a clear
    clear <= 1; @(posedge clk); clear <= 0; delay <= 5'(D);
    ref_q.delete();
    @(posedge clk);
    for (int i = 0; i < 100; i++) send(8'd1, $urandom);
    repeat (5) @(posedge clk);
    checks += 2;
    if (fill != 5'(D)) begin failures++; $display("fill %0d at full depth", fill); end
    if (nout != 200 - 200 / 3 - 10 && exp_q.size() != 0) begin failures++; end
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    // Store mode: D+4 words arrive, the first D are kept, none is sent, and
    // they are read back oldest first; a pop on an empty buffer gives nothing.
    clear <= 1; @(posedge clk); clear <= 0; store_mode <= 1; delay <= 1;
    ref_q.delete();
    @(posedge clk);
    begin
      int n0;
      n0 = nout;
      for (int i = 0; i < D + 4; i++) begin
        logic [31:0] d;
        d = $urandom;
        @(posedge clk);
        bc <= '{valid: 1'b1, msg: '{data: d, ts: '0, id: 8'd1}};
        if (i < D) ref_q.push_back(d);
      end
      @(posedge clk); bc <= '0;
      repeat (4) @(posedge clk);
      checks += 2;
      if (nout != n0) begin failures++; $display("store mode sent messages"); end
      if (fill != 5'(D)) begin failures++; $display("store fill %0d", fill); end
    end
    for (int i = 0; i < D + 1; i++) begin
      @(posedge clk); rd_pop <= 1;
      @(posedge clk); rd_pop <= 0;
      #1;
      checks++;
      if (i < D) begin
        logic [31:0] e;
        e = ref_q.pop_front();
        if (!rd_valid || rd_word != e) begin failures++; $display("store read %0d: %h valid %0d expected %h", i, rd_word, rd_valid, e); end
      end else if (rd_valid) begin failures++; $display("pop on empty buffer returned data"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
