// tb_harmony_top -- end-to-end test of the Em# Harmony system at its default
// sizes (4 channels, 13 digital pins, 4096-frame memory, 16 ms time reference).
//
// The Em# acquisition chain is configured as on the instrument: ADC channel c
// is sent as ID 1+c, FIFO c delays it by 4 messages as ID 11+c, AVERAGE c adds
// ID 1+c, subtracts ID 11+c and sends the 4-sample moving average as ID 21+c.
// The memory records the whole broadcast bus. A serial ADC model supplies random
// samples. Every broadcast message is checked against a reference computed
// here from the samples. On top of that the test makes these mechanisms happen
// and counts them (each must occur at least once):
//   contention  - a core waits with its request up while another is served
//   occupancy   - a channel bridge holds more than one message while the
//                 top bridge serves others (AVERAGE 3 is re-programmed to
//                 answer every generator message for this)
//   overflow    - the ID generator floods the bus, its port overflows and an
//                 ID 255 error message is broadcast
//   wrap        - more than 4096 frames are recorded, the memory wraps; the
//                 last 4096 frames are read back and compared
//   trigger, counter and output modes of the digital I/O
//   time reference - ID 0 is broadcast 16 ms (2,000,000 cycles) after the
//                 time reference is enabled, and timestamps restart from 0
//   store mode  - FIFO 0 keeps the following channel-0 samples, which are then
//                 read back through its read port
module tb_harmony_top;
  import harmony_pkg::*;

  localparam int NCH = 4, NIO = 13, MEMD = 4096, ADC_PERIOD = 500, NCONV = 40;
  localparam int P = TS_RESET_CYCLES;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  // configuration
  logic cfg_tb_enable, cfg_adc_enable;
  logic [31:0] cfg_adc_period;
  logic [NCH-1:0] cfg_fifo_enable, cfg_fifo_clear, cfg_avg_enable, cfg_avg_clear;
  hb_id_t [NCH-1:0] cfg_fifo_in_id, cfg_fifo_out_id, cfg_avg_add_id, cfg_avg_sub_id, cfg_avg_out_id;
  logic [NCH-1:0][10:0] cfg_fifo_delay;
  logic [NCH-1:0][4:0] cfg_avg_shift;
  logic [NCH-1:0] cfg_fifo_store, cfg_fifo_rd_pop, fifo_rd_valid;
  logic [NCH-1:0][31:0] fifo_rd_word, avg_acc;
  logic [NCH-1:0][10:0] fifo_fill;
  logic cfg_gen_start, cfg_gen_stop, gen_busy;
  logic [31:0] cfg_gen_count, cfg_gen_period;
  logic cfg_mem_sw_start, cfg_mem_sw_stop;
  logic [11:0] mem_rd_addr, mem_wr_ptr;
  hb_msg_t mem_rd_data;
  logic mem_running, mem_wrapped;
  logic [NIO-1:0][1:0] cfg_dio_mode;
  hb_id_t [NIO-1:0] cfg_dio_pin_id;
  logic [NIO-1:0] io_in, io_out, io_oe, dio_lost;
  logic [NIO-1:0][31:0] dio_counts;
  logic clear_status, clear_diag;
  hb_status_t [4+2*NCH-1:0] core_status;
  logic [NCH:0][31:0] diag_sent;
  logic [NCH:0][4:0] diag_used, diag_max_used;
  hb_bcast_t bc_mon;
  logic adc_cnv, adc_sck;
  logic [NCH-1:0] adc_sdo;
  logic [NCH-1:0][17:0] value;

  harmony_top dut (
    .clk, .rst_n,
    .cfg_tb_enable,
    .cfg_adc_enable, .cfg_adc_period, .cfg_adc_base_id(8'd1), .adc_cnv, .adc_sck, .adc_sdo,
    .cfg_fifo_enable, .cfg_fifo_clear, .cfg_fifo_in_id, .cfg_fifo_out_id, .cfg_fifo_delay,
    .cfg_fifo_store, .cfg_fifo_rd_pop, .fifo_rd_word, .fifo_rd_valid, .fifo_fill,
    .cfg_avg_enable, .cfg_avg_clear, .cfg_avg_add_id, .cfg_avg_sub_id, .cfg_avg_out_id, .cfg_avg_shift, .avg_acc,
    .cfg_gen_start, .cfg_gen_stop, .cfg_gen_trig_en(1'b0), .cfg_gen_trig_id(8'd0), .cfg_gen_id(8'h30),
    .cfg_gen_start_data(32'd0), .cfg_gen_step(32'd1), .cfg_gen_count, .cfg_gen_period, .gen_busy,
    .cfg_mem_sw_start, .cfg_mem_sw_stop, .cfg_mem_trig_en(1'b0), .cfg_mem_start_id(8'd0), .cfg_mem_stop_id(8'd0),
    .cfg_mem_id_lo(8'd0), .cfg_mem_id_hi(8'd255), .mem_rd_addr, .mem_rd_data, .mem_running, .mem_wr_ptr, .mem_wrapped,
    .cfg_dio_mode, .cfg_dio_pin_id, .cfg_dio_sample_id(8'd21), .io_in, .io_out, .io_oe, .dio_counts, .dio_lost,
    .clear_status, .clear_diag, .core_status, .diag_sent, .diag_used, .diag_max_used, .bc_mon
  );

  adc_model #(.N_CH(NCH), .BITS(18)) adc (.cnv(adc_cnv), .sck(adc_sck), .value, .sdo(adc_sdo));

  always @(posedge adc_cnv) begin
    for (int c = 0; c < NCH; c++) xs[c].push_back(32'(signed'(value[c])));
    #2;
    for (int c = 0; c < NCH; c++) value[c] = 18'($urandom);
  end

  // ---------------- reference model of the broadcast stream ----------------
  logic [31:0] xs [NCH][$];       // samples per channel, in conversion order
  int n_adc [NCH], n_fifo [NCH], n_avg [NCH];
  int n_id0 = 0, n_err = 0, n_gen = 0, n_trig = 0, n_cnt = 0, n_out_toggle = 0;
  int n_stall = 0, n_bc = 0, n_store0 = 0, n_store_rd = 0;
  longint cyc = 0, t_tb_enable = -1, t_id0 = -1;
  logic out_model = 0;
  hb_msg_t memlog[$];
  hb_ts_t last_adc_ts = '0;
  bit after_id0 = 0, ts_restart_seen = 0, phase2 = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if ((dut.r_req & ~dut.r_rd) != '0) n_stall++;
      // output pin 2 follows bit 0 of ID 0x30 messages
      if (io_out[2] != out_model) begin failures++; $display("io_out[2] wrong at %0d", cyc); end
      if (bc_mon.valid) begin
        hb_msg_t m;
        m = bc_mon.msg;
        n_bc++;
        if (mem_running) memlog.push_back(m);
        if (m.id >= 1 && m.id <= NCH) begin
          int c; c = m.id - 1;
          checks++;
          if (m.data != xs[c][n_adc[c]]) begin failures++; $display("ADC ch%0d sample %0d: %h expected %h", c, n_adc[c], m.data, xs[c][n_adc[c]]); end
          if (after_id0 && !ts_restart_seen) begin
            checks++;
            ts_restart_seen = 1;
            if (m.ts > 24'(8 * 5000)) begin failures++; $display("timestamp not restarted: %0d", m.ts); end
          end
          n_adc[c]++;
        end else if (m.id >= 11 && m.id < 11 + NCH) begin
          int c; c = m.id - 11;
          checks++;
          if (m.data != xs[c][n_fifo[c]]) begin failures++; $display("FIFO ch%0d: %h expected %h", c, m.data, xs[c][n_fifo[c]]); end
          n_fifo[c]++;
        end else if (m.id >= 21 && m.id < 21 + NCH) begin
          int c, k;
          logic signed [31:0] s;
          c = m.id - 21; k = n_avg[c];
          if (!phase2) begin
            s = xs[c][k+1] + xs[c][k+2] + xs[c][k+3] + xs[c][k+4];
            checks++;
          end
          if (!phase2 && m.data != 32'(s >>> 2)) begin failures++; $display("AVG ch%0d #%0d: %h expected %h", c, k, m.data, s >>> 2); end
          n_avg[c]++;
        end else if (m.id == 8'h30) begin
          n_gen++;
          if (m.data[0] != out_model) n_out_toggle++;
          out_model = m.data[0];
        end else if (m.id == HB_ID_ERROR) begin
          checks++;
          if (m.data != 32'h30 && m.data != 32'd24) begin failures++; $display("error message data %h", m.data); end
          n_err++;
        end else if (m.id == HB_ID_TS_RESET) begin
          n_id0++;
          t_id0 = cyc;
          after_id0 = 1;
        end else if (m.id == 8'h0F) begin
          checks++;
          n_trig++;
          if (m.data != 32'(n_trig)) begin failures++; $display("trigger count %0d", m.data); end
        end else if (m.id == 8'h31) begin
          n_cnt++;
        end else begin
          failures++; $display("unexpected ID %0d", m.id);
        end
      end
    end
  end

  function automatic int max_slots();
    int m = 0;
    for (int b = 0; b <= NCH; b++) if (int'(diag_max_used[b]) > m) m = int'(diag_max_used[b]);
    return m;
  endfunction

  task automatic pulse(input int p);
    @(posedge clk) io_in[p] <= 1'b1;
    repeat (4) @(posedge clk);
    io_in[p] <= 1'b0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (P + 200_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin
      n_adc[c] = 0; n_fifo[c] = 0; n_avg[c] = 0;
      cfg_fifo_in_id[c] = 8'(1 + c);  cfg_fifo_out_id[c] = 8'(11 + c); cfg_fifo_delay[c] = 11'd4;
      cfg_avg_add_id[c] = 8'(1 + c);  cfg_avg_sub_id[c]  = 8'(11 + c); cfg_avg_out_id[c] = 8'(21 + c);
      cfg_avg_shift[c]  = 5'd2;
      value[c] = 18'($urandom);
    end
    cfg_fifo_store = '0; cfg_fifo_rd_pop = '0;
    cfg_fifo_enable = '1; cfg_avg_enable = '1; cfg_fifo_clear = '0; cfg_avg_clear = '0;
    cfg_tb_enable = 0; cfg_adc_enable = 0; cfg_adc_period = ADC_PERIOD;
    cfg_gen_start = 0; cfg_gen_stop = 0; cfg_gen_count = 5000; cfg_gen_period = 1;
    cfg_mem_sw_start = 0; cfg_mem_sw_stop = 0; mem_rd_addr = '0;
    cfg_dio_mode = '0; cfg_dio_pin_id = '0;
    cfg_dio_mode[0] = 2'd1; cfg_dio_pin_id[0] = 8'h0F;   // external trigger
    cfg_dio_mode[1] = 2'd2; cfg_dio_pin_id[1] = 8'h31;   // counter, sampled on ID 21
    cfg_dio_mode[2] = 2'd3; cfg_dio_pin_id[2] = 8'h30;   // output from ID 0x30
    io_in = '0; clear_status = 0; clear_diag = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);
    checks++;
    if (io_oe != 13'b100) begin failures++; $display("io_oe %b", io_oe); end
    cfg_mem_sw_start <= 1; @(posedge clk); cfg_mem_sw_start <= 0;
    cfg_tb_enable <= 1; t_tb_enable = cyc;
    cfg_adc_enable <= 1;
    // acquisition, with digital inputs and an ID generator flood on top
    repeat (5 * ADC_PERIOD) @(posedge clk);
    pulse(0); pulse(1); pulse(1);
    cfg_gen_start <= 1; @(posedge clk); cfg_gen_start <= 0;
    pulse(0);
    wait (n_adc[NCH-1] >= NCONV);
    cfg_adc_enable <= 0;
    wait (!gen_busy);
    repeat (2 * ADC_PERIOD) @(posedge clk);
    cfg_mem_sw_stop <= 1; @(posedge clk); cfg_mem_sw_stop <= 0;
    repeat (4) @(posedge clk);
    // chain results
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (n_fifo[c] != n_adc[c] - 4 || n_avg[c] != n_adc[c] - 4) begin
        failures++; $display("ch%0d: %0d samples %0d delayed %0d averages", c, n_adc[c], n_fifo[c], n_avg[c]);
      end
    end
    checks += 2;
    if (diag_sent[NCH] != 32'(n_bc)) begin failures++; $display("top bridge sent %0d, broadcast %0d", diag_sent[NCH], n_bc); end
    if (!core_status[2].overflow) begin failures++; $display("no overflow flag on the generator"); end
    // Load one channel bridge: AVERAGE 3 now adds and subtracts the flood, so
    // channel bridge 3 gets a message almost every cycle and must buffer them.
    phase2 = 1;
    cfg_avg_add_id[3] <= 8'h30; cfg_avg_sub_id[3] <= 8'h30; cfg_gen_count <= 300;
    @(posedge clk);
    cfg_gen_start <= 1; @(posedge clk); cfg_gen_start <= 0;
    wait (!gen_busy);
    repeat (200) @(posedge clk);
    // memory read-back: the last MEMD frames, oldest at wr_ptr
    checks++;
    if (!mem_wrapped || memlog.size() <= MEMD) begin failures++; $display("memory did not wrap (%0d frames)", memlog.size()); end
    for (int a = 0; a < MEMD; a++) begin
      int k;
      hb_msg_t e;
      k = memlog.size() - MEMD + ((a - int'(mem_wr_ptr) + MEMD) % MEMD);
      e = memlog[k];
      mem_rd_addr <= 12'(a);
      @(posedge clk); @(posedge clk);
      checks++;
      if (mem_rd_data != e) begin failures++; if (failures < 10) $display("memory[%0d] %h expected %h", a, mem_rd_data, e); end
    end
    // time reference: ID 0 after 16 ms, then timestamps restart
    wait (n_id0 == 1);
    checks++;
    // enable seen at the next edge, reference pushed P edges later, taken by
    // the top bridge, broadcast, and sampled here: P + 3 edges in all
    if (t_id0 - t_tb_enable != longint'(P + 3)) begin failures++; $display("ID 0 after %0d cycles", t_id0 - t_tb_enable); end
    // FIFO 0 switches to store mode: the next samples of channel 0 are kept and
    // read back over its read port.
    cfg_fifo_clear[0] <= 1; cfg_fifo_store[0] <= 1;
    @(posedge clk); cfg_fifo_clear[0] <= 0;
    n_store0 = n_adc[0];
    cfg_adc_enable <= 1;
    wait (ts_restart_seen);
    wait (n_adc[0] >= n_store0 + 6);
    cfg_adc_enable <= 0;
    repeat (ADC_PERIOD) @(posedge clk);
    checks++;
    if (int'(fifo_fill[0]) != n_adc[0] - n_store0) begin failures++; $display("store fill %0d", fifo_fill[0]); end
    for (int k = n_store0; k < n_adc[0]; k++) begin
      @(posedge clk) cfg_fifo_rd_pop[0] <= 1;
      @(posedge clk) cfg_fifo_rd_pop[0] <= 0;
      #1;
      checks++;
      if (!fifo_rd_valid[0] || fifo_rd_word[0] != xs[0][k]) begin failures++; $display("stored word %0d: %h", k, fifo_rd_word[0]); end
      else n_store_rd++;
    end
    // every mechanism must have happened
    checks += 10;
    if (n_store_rd == 0)           begin failures++; $display("nothing read from FIFO store mode"); end
    if (n_stall == 0)              begin failures++; $display("no contention"); end
    if (max_slots() < 2)           begin failures++; $display("no bridge ever held 2 messages"); end
    if (n_err == 0)                begin failures++; $display("no error message"); end
    if (n_gen == 0)                begin failures++; $display("no generated data"); end
    if (n_trig != 2)               begin failures++; $display("%0d triggers", n_trig); end
    if (n_cnt == 0 || dio_counts[1] != 2) begin failures++; $display("counter: %0d reports, count %0d", n_cnt, dio_counts[1]); end
    if (n_out_toggle < 2)          begin failures++; $display("output pin toggled %0d times", n_out_toggle); end
    if (n_id0 != 1)                begin failures++; $display("%0d time references", n_id0); end
    if (n_avg[0] == 0)             begin failures++; $display("no averages"); end
    $display("mechanisms: stall-cycles=%0d max-slots=%0d errors=%0d generated=%0d triggers=%0d counter-reports=%0d out-toggles=%0d id0=%0d frames-recorded=%0d averages=%0d stored-words-read=%0d",
             n_stall, max_slots(), n_err, n_gen, n_trig, n_cnt, n_out_toggle, n_id0, memlog.size(), n_avg[0], n_store_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
