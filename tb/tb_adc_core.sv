// tb_adc_core -- self-checking test of the ADC core with a serial ADC model.
//
// The model is loaded with random 18-bit two's complement values for each
// conversion. Checks: each conversion yields one message per channel with
// ID base_id+k and the sign-extended value; conversions start exactly
// `period` cycles apart; the first message appears CONV_CYCLES +
// 2*SCK_HALF*ADC_BITS + 1 cycles after adc_cnv rises; timestamps of successive
// conversions differ by period * 8 ns.
module tb_adc_core;
  import harmony_pkg::*;

  localparam int NCH = 4, BITS = 18, CONV = 80, HALF = 2, PERIOD = 200, NCONV = 12;
  localparam int LAT = CONV + 2 * HALF * BITS + 1;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  logic up_req, up_rd, enable, cnv, sck, clear_status;
  hb_msg_t up_msg;
  hb_status_t status;
  logic [NCH-1:0] sdo;
  logic [NCH-1:0][BITS-1:0] value;
  logic [31:0] period;

  adc_core #(.N_CH(NCH), .ADC_BITS(BITS), .CONV_CYCLES(CONV), .SCK_HALF(HALF)) dut (
    .clk, .rst_n, .bc('0), .up_req, .up_msg, .up_rd, .status, .clear_status,
    .enable, .period, .base_id(8'd1), .adc_cnv(cnv), .adc_sck(sck), .adc_sdo(sdo)
  );
  adc_model #(.N_CH(NCH), .BITS(BITS)) adc (.cnv, .sck, .value, .sdo);

  assign up_rd = up_req;

  logic [NCH-1:0][BITS-1:0] expq[$];
  longint cyc = 0, last_cnv = -1, t_cnv = 0;
  logic cnv_q = 0, req_q = 0;
  int nconv = 0, nmsg = 0, ch = 0;
  logic [23:0] last_ts;
  logic [NCH-1:0][BITS-1:0] cur;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    cnv_q <= cnv;
    req_q <= up_req;
    if (cnv && !cnv_q) begin
      if (last_cnv >= 0) begin
        checks++;
        if (cyc - last_cnv != PERIOD) begin failures++; $display("conversion spacing %0d", cyc - last_cnv); end
      end
      last_cnv = cyc; t_cnv = cyc; nconv++;
    end
    if (rst_n && up_req && !req_q) begin
      checks++;
      if (cyc - t_cnv != LAT) begin failures++; $display("latency %0d expected %0d", cyc - t_cnv, LAT); end
    end
    if (rst_n && up_req && up_rd) begin
      logic [31:0] e;
      if (ch == 0) cur = expq.pop_front();
      e = 32'(signed'(cur[ch]));
      checks += 2;
      if (up_msg.id != 8'(1 + ch) || up_msg.data != e) begin
        failures++; $display("ch %0d got id %0d data %h expected %h", ch, up_msg.id, up_msg.data, e);
      end
      if (ch == 0 && nmsg > 0 && up_msg.ts - last_ts != 24'(PERIOD * 8)) begin
        failures++; $display("timestamp step %0d", up_msg.ts - last_ts);
      end
      if (ch == 0) last_ts = up_msg.ts;
      ch = (ch + 1) % NCH;
      nmsg++;
    end
  end

  // New random values for every conversion, recorded when it starts.
  always @(posedge cnv) begin
    expq.push_back(value);
    #2;
    for (int k = 0; k < NCH; k++) value[k] = BITS'($urandom);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0; clear_status = 0; period = PERIOD;
    value[0] = 18'h1FFFF; value[1] = 18'h20000; value[2] = 18'h3FFFF; value[3] = 18'h00001;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    enable <= 1;
    wait (nconv == NCONV);
    enable <= 0;
    repeat (PERIOD) @(posedge clk);
    checks++;
    if (nmsg != NCONV * NCH) begin failures++; $display("%0d messages for %0d conversions", nmsg, NCONV); end
    checks++;
    if (status.overflow) begin failures++; $display("overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
