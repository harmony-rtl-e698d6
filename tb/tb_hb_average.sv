// tb_hb_average -- self-checking test of the AVERAGE core.
//
// Sends a random mix of add-ID, sub-ID and unrelated messages with random
// signed data (back to back or spaced). A reference accumulator gives the
// expected result after every sub-ID message: (sum of added - sum of
// subtracted) >>> shift, sent with out_id and offered 2 cycles after the
// message. A second part feeds a sample stream and the same stream delayed by
// 4, as the FIFO core would, and checks the 4-sample moving average.
module tb_hb_average;
  import harmony_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  hb_bcast_t bc;
  logic up_req, up_rd, enable, clear, clear_status;
  hb_msg_t up_msg;
  hb_status_t status;
  logic [4:0] shift;
  logic [31:0] acc;

  hb_average dut (
    .clk, .rst_n, .bc, .up_req, .up_msg, .up_rd, .status, .clear_status,
    .enable, .clear, .add_id(8'd1), .sub_id(8'd11), .out_id(8'd21), .shift, .acc
  );
  assign up_rd = up_req;

  logic signed [31:0] model = 0;
  logic [31:0] exp_q[$];
  longint due[$];
  longint cyc = 0;
  int nout = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && up_req && up_rd) begin
      logic [31:0] e;
      longint t;
      checks += 2;
      e = exp_q.pop_front();
      t = due.pop_front();
      if (up_msg.id != 8'd21 || up_msg.data != e) begin failures++; $display("got %0d:%h expected %h", up_msg.id, up_msg.data, e); end
      if (cyc != t) begin failures++; $display("output at %0d, expected %0d", cyc, t); end
      nout++;
    end
  end

  task automatic send(input logic [7:0] id, input logic signed [31:0] d, input int gap);
    @(posedge clk);
    bc <= '{valid: 1'b1, msg: '{data: d, ts: '0, id: id}};
    if (id == 8'd1)  model += d;
    if (id == 8'd11) begin
      model -= d;
      exp_q.push_back(model >>> shift);
      due.push_back(cyc + 3);  // seen at cyc+1, offered after cyc+2, taken at cyc+3
    end
    if (gap > 0) begin
      @(posedge clk);
      bc <= '0;
      repeat (gap - 1) @(posedge clk);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [31:0] s [$];
  initial begin
    bc = '0; enable = 1; clear = 0; clear_status = 0; shift = 3;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 300; i++) begin
      int r;
      r = $urandom % 5;
      send(r < 2 ? 8'd1 : r < 4 ? 8'd11 : 8'(30 + $urandom % 10),
           32'(signed'(18'($urandom))), $urandom % 3);
    end
    @(posedge clk); bc <= '0;
    repeat (5) @(posedge clk);
    checks++;
    if (acc != model) begin failures++; $display("acc %h model %h", acc, model); end
    // Moving average over 4 samples, as built with a FIFO core of delay 4.
    clear <= 1; @(posedge clk); clear <= 0; shift <= 2; model = 0;
    for (int i = 0; i < 40; i++) begin
      logic signed [31:0] x;
      x = 32'(signed'(18'($urandom)));
      s.push_back(x);
      send(8'd1, x, 2);
      if (s.size() > 4) send(8'd11, s.pop_front(), 2);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (acc != s[0] + s[1] + s[2] + s[3]) begin failures++; $display("window sum wrong"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
