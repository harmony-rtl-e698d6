// tb_id_gen -- self-checking test of the ID GEN core.
//
// Run 1: started by the start pulse, count 10, period 7: ten messages with
// the programmed ID and data start, start+step, ... exactly 7 cycles apart,
// then busy drops. Run 2: started by a trigger ID on the broadcast bus, count 0
// (endless), stopped by the stop pulse. Run 3: period 1 with a consumer that
// never reads: the port overflows and, once reading resumes, one ID 255 error
// message follows.
module tb_id_gen;
  import harmony_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  hb_bcast_t bc;
  logic up_req, up_rd, rd_en, clear_status, start, stop, trig_en, busy;
  hb_msg_t up_msg;
  hb_status_t status;
  logic [31:0] count, period, start_data, step;
  logic [7:0] gen_id;

  id_gen dut (
    .clk, .rst_n, .bc, .up_req, .up_msg, .up_rd, .status, .clear_status,
    .start, .stop, .trig_en, .trig_id(8'd15), .gen_id, .start_data, .step, .count, .period, .busy
  );
  assign up_rd = up_req && rd_en;

  longint cyc = 0, last = -1;
  int n = 0, n_err = 0;
  logic [31:0] expd;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && up_req && up_rd) begin
      if (up_msg.id == HB_ID_ERROR) n_err++;
      else begin
        checks++;
        if (up_msg.id != gen_id || up_msg.data != expd) begin failures++; $display("got %0d:%h expected %h", up_msg.id, up_msg.data, expd); end
        if (last >= 0 && period > 1) begin
          checks++;
          if (cyc - last != longint'(period)) begin failures++; $display("spacing %0d", cyc - last); end
        end
        last = cyc;
        expd = expd + step;
        n++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bc = '0; start = 0; stop = 0; trig_en = 0; clear_status = 0; rd_en = 1;
    gen_id = 8'd40; start_data = 32'hFFFF_FFF0; step = 32'd3; count = 10; period = 7;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    expd = start_data;
    start <= 1; @(posedge clk); start <= 0;
    repeat (100) @(posedge clk);
    checks += 2;
    if (n != 10) begin failures++; $display("run 1 sent %0d", n); end
    if (busy) begin failures++; $display("still busy"); end
    // Run 2: trigger from the bus, endless until stop.
    gen_id <= 8'd41; start_data <= 32'd100; step <= 32'hFFFF_FFFF; count <= 0; period <= 4; trig_en <= 1;
    @(posedge clk);
    n = 0; last = -1; expd = 100;
    bc <= '{valid: 1'b1, msg: '{data: '0, ts: '0, id: 8'd15}};
    @(posedge clk); bc <= '0;
    repeat (4 * 25) @(posedge clk);
    stop <= 1; @(posedge clk); stop <= 0;
    repeat (20) @(posedge clk);
    checks += 2;
    if (n < 24 || n > 26) begin failures++; $display("run 2 sent %0d", n); end
    if (busy) begin failures++; $display("not stopped"); end
    // Run 3: flood with nobody reading.
    trig_en <= 0; rd_en <= 0; period <= 1; count <= 8; gen_id <= 8'd42; start_data <= 0; step <= 1;
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (!status.overflow) begin failures++; $display("no overflow"); end
    n = 0; last = -1; expd = 0;
    rd_en <= 1;
    repeat (20) @(posedge clk);
    checks += 2;
    if (n != 4) begin failures++; $display("run 3 delivered %0d, expected the 4 queued", n); end
    if (n_err != 1) begin failures++; $display("%0d error messages", n_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
