// harmony_top -- Harmony Bus system of the four-channel Em# electrometer.
//
// The cores of one instrument share their data over the Harmony Bus: every
// core sends 64-bit timestamped messages up a tree of bridges to the top
// bridge, which broadcasts each message back down to all cores. Each core picks
// the IDs it was configured to use, so processing chains are set up at run time
// without changing the FPGA design. This top builds the Em# set of cores:
//
//   top bridge (ROOT) : port 0 time reference (hb_timebase, ID 0 every 16 ms)
//                       port 1 ADC core (4 channels, IDs base_id..base_id+3)
//                       port 2 ID generator
//                       port 3 digital I/O (N_IO front-panel pins)
//                       port 4+c channel bridge c, c = 0..N_CH-1
//   channel bridge c  : port 0 FIFO core c, port 1 AVERAGE core c
//   memory core       : listens to the broadcast bus of the top bridge
//
// With the Em# configuration (ADC base_id 1, FIFO c: in 1+c out 11+c, AVERAGE
// c: add 1+c, sub 11+c, out 21+c) each ADC channel yields a moving average
// with ID 21+c, and the memory can record all of it with timestamps.
//
// The cores, the bus format and the bridge tree follow Harmony. The exact tree
// (a bridge per channel under the top bridge) is this design's choice. The
// slow control bus of the real instrument is not part of this design: every
// register it would write is a cfg_* input and every diagnostic it would read an
// output; the FIFO cores' store-mode read ports are top-level ports too.
// bc_mon shows the top-level broadcast bus, the trace one would capture
// with a logic analyser.
//
// Latency: a message crosses one bridge in 1 cycle when the bus is idle; a
// channel core's message reaches the top broadcast 2 cycles after it is
// offered, and a channel core sees a broadcast 1 cycle after bc_mon.
module harmony_top
  import harmony_pkg::*;
#(
  parameter int unsigned N_CH       = 4,
  parameter int unsigned N_IO       = 13,
  parameter int unsigned MEM_DEPTH  = 4096,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned TB_PERIOD  = TS_RESET_CYCLES,
  parameter int unsigned SLOTS      = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // time reference
  input  logic                              cfg_tb_enable,
  // ADC core and ADC serial lines
  input  logic                              cfg_adc_enable,
  input  logic [31:0]                       cfg_adc_period,
  input  hb_id_t                            cfg_adc_base_id,
  output logic                              adc_cnv,
  output logic                              adc_sck,
  input  logic [N_CH-1:0]                   adc_sdo,
  // FIFO cores
  input  logic [N_CH-1:0]                   cfg_fifo_enable,
  input  logic [N_CH-1:0]                   cfg_fifo_clear,
  input  hb_id_t [N_CH-1:0]                 cfg_fifo_in_id,
  input  hb_id_t [N_CH-1:0]                 cfg_fifo_out_id,
  input  logic [N_CH-1:0][$clog2(FIFO_DEPTH+1)-1:0] cfg_fifo_delay,
  input  logic [N_CH-1:0]                   cfg_fifo_store,
  input  logic [N_CH-1:0]                   cfg_fifo_rd_pop,
  output hb_data_t [N_CH-1:0]               fifo_rd_word,
  output logic [N_CH-1:0]                   fifo_rd_valid,
  output logic [N_CH-1:0][$clog2(FIFO_DEPTH+1)-1:0] fifo_fill,
  // AVERAGE cores
  input  logic [N_CH-1:0]                   cfg_avg_enable,
  input  logic [N_CH-1:0]                   cfg_avg_clear,
  input  hb_id_t [N_CH-1:0]                 cfg_avg_add_id,
  input  hb_id_t [N_CH-1:0]                 cfg_avg_sub_id,
  input  hb_id_t [N_CH-1:0]                 cfg_avg_out_id,
  input  logic [N_CH-1:0][4:0]              cfg_avg_shift,
  output hb_data_t [N_CH-1:0]               avg_acc,
  // ID generator
  input  logic                              cfg_gen_start,
  input  logic                              cfg_gen_stop,
  input  logic                              cfg_gen_trig_en,
  input  hb_id_t                            cfg_gen_trig_id,
  input  hb_id_t                            cfg_gen_id,
  input  hb_data_t                          cfg_gen_start_data,
  input  hb_data_t                          cfg_gen_step,
  input  logic [31:0]                       cfg_gen_count,
  input  logic [31:0]                       cfg_gen_period,
  output logic                              gen_busy,
  // memory
  input  logic                              cfg_mem_sw_start,
  input  logic                              cfg_mem_sw_stop,
  input  logic                              cfg_mem_trig_en,
  input  hb_id_t                            cfg_mem_start_id,
  input  hb_id_t                            cfg_mem_stop_id,
  input  hb_id_t                            cfg_mem_id_lo,
  input  hb_id_t                            cfg_mem_id_hi,
  input  logic [$clog2(MEM_DEPTH)-1:0]      mem_rd_addr,
  output hb_msg_t                           mem_rd_data,
  output logic                              mem_running,
  output logic [$clog2(MEM_DEPTH)-1:0]      mem_wr_ptr,
  output logic                              mem_wrapped,
  // digital I/O
  input  logic [N_IO-1:0][1:0]              cfg_dio_mode,
  input  hb_id_t [N_IO-1:0]                 cfg_dio_pin_id,
  input  hb_id_t                            cfg_dio_sample_id,
  input  logic [N_IO-1:0]                   io_in,
  output logic [N_IO-1:0]                   io_out,
  output logic [N_IO-1:0]                   io_oe,
  output logic [N_IO-1:0][31:0]             dio_counts,
  output logic [N_IO-1:0]                   dio_lost,
  // status and diagnostics
  input  logic                              clear_status,
  input  logic                              clear_diag,
  output hb_status_t [4+2*N_CH-1:0]         core_status,
  output logic [N_CH:0][31:0]               diag_sent,      // [N_CH] = top bridge
  output logic [N_CH:0][$clog2(SLOTS+1)-1:0] diag_used,
  output logic [N_CH:0][$clog2(SLOTS+1)-1:0] diag_max_used,
  output hb_bcast_t                         bc_mon
);

  localparam int unsigned NR = 4 + N_CH;   // ports of the top bridge

  hb_bcast_t                  bc_root;
  hb_bcast_t [N_CH-1:0]       bc_ch;
  logic      [NR-1:0]         r_req, r_rd;
  hb_msg_t   [NR-1:0]         r_msg;
  logic      [N_CH-1:0][1:0]  c_req, c_rd;
  hb_msg_t   [N_CH-1:0][1:0]  c_msg;

  assign bc_mon = bc_root;

  harmony_bridge #(.N_PORTS(NR), .SLOTS(SLOTS), .ROOT(1'b1)) u_root (
    .clk, .rst_n,
    .dn_req (r_req), .dn_msg (r_msg), .dn_rd (r_rd),
    .up_req (), .up_msg (), .up_rd (1'b0),
    .bc_in  ('0), .bc_out (bc_root),
    .clear_diag,
    .diag_sent (diag_sent[N_CH]), .diag_used (diag_used[N_CH]), .diag_max_used (diag_max_used[N_CH])
  );

  hb_timebase #(.PERIOD_CYCLES(TB_PERIOD)) u_timebase (
    .clk, .rst_n, .enable (cfg_tb_enable),
    .up_req (r_req[0]), .up_msg (r_msg[0]), .up_rd (r_rd[0]),
    .status (core_status[0]), .clear_status
  );

  adc_core #(.N_CH(N_CH)) u_adc (
    .clk, .rst_n, .bc (bc_root),
    .up_req (r_req[1]), .up_msg (r_msg[1]), .up_rd (r_rd[1]),
    .status (core_status[1]), .clear_status,
    .enable (cfg_adc_enable), .period (cfg_adc_period), .base_id (cfg_adc_base_id),
    .adc_cnv, .adc_sck, .adc_sdo
  );

  id_gen u_idgen (
    .clk, .rst_n, .bc (bc_root),
    .up_req (r_req[2]), .up_msg (r_msg[2]), .up_rd (r_rd[2]),
    .status (core_status[2]), .clear_status,
    .start (cfg_gen_start), .stop (cfg_gen_stop), .trig_en (cfg_gen_trig_en),
    .trig_id (cfg_gen_trig_id), .gen_id (cfg_gen_id), .start_data (cfg_gen_start_data),
    .step (cfg_gen_step), .count (cfg_gen_count), .period (cfg_gen_period), .busy (gen_busy)
  );

  digital_io #(.N_IO(N_IO)) u_dio (
    .clk, .rst_n, .bc (bc_root),
    .up_req (r_req[3]), .up_msg (r_msg[3]), .up_rd (r_rd[3]),
    .status (core_status[3]), .clear_status,
    .mode (cfg_dio_mode), .pin_id (cfg_dio_pin_id), .sample_id (cfg_dio_sample_id),
    .io_in, .io_out, .io_oe, .counts (dio_counts), .lost (dio_lost)
  );

  hb_memory #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .rst_n, .bc (bc_root),
    .sw_start (cfg_mem_sw_start), .sw_stop (cfg_mem_sw_stop), .trig_en (cfg_mem_trig_en),
    .start_id (cfg_mem_start_id), .stop_id (cfg_mem_stop_id),
    .id_lo (cfg_mem_id_lo), .id_hi (cfg_mem_id_hi),
    .rd_addr (mem_rd_addr), .rd_data (mem_rd_data),
    .running (mem_running), .wr_ptr (mem_wr_ptr), .wrapped (mem_wrapped)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    harmony_bridge #(.N_PORTS(2), .SLOTS(SLOTS), .ROOT(1'b0)) u_bridge (
      .clk, .rst_n,
      .dn_req (c_req[c]), .dn_msg (c_msg[c]), .dn_rd (c_rd[c]),
      .up_req (r_req[4+c]), .up_msg (r_msg[4+c]), .up_rd (r_rd[4+c]),
      .bc_in  (bc_root), .bc_out (bc_ch[c]),
      .clear_diag,
      .diag_sent (diag_sent[c]), .diag_used (diag_used[c]), .diag_max_used (diag_max_used[c])
    );

    hb_fifo #(.MAX_DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .bc (bc_ch[c]),
      .up_req (c_req[c][0]), .up_msg (c_msg[c][0]), .up_rd (c_rd[c][0]),
      .status (core_status[4+c]), .clear_status,
      .enable (cfg_fifo_enable[c]), .clear (cfg_fifo_clear[c]),
      .in_id (cfg_fifo_in_id[c]), .out_id (cfg_fifo_out_id[c]),
      .delay (cfg_fifo_delay[c]), .store_mode (cfg_fifo_store[c]), .fill (fifo_fill[c]),
      .rd_pop (cfg_fifo_rd_pop[c]), .rd_word (fifo_rd_word[c]), .rd_valid (fifo_rd_valid[c])
    );

    hb_average u_avg (
      .clk, .rst_n, .bc (bc_ch[c]),
      .up_req (c_req[c][1]), .up_msg (c_msg[c][1]), .up_rd (c_rd[c][1]),
      .status (core_status[4+N_CH+c]), .clear_status,
      .enable (cfg_avg_enable[c]), .clear (cfg_avg_clear[c]),
      .add_id (cfg_avg_add_id[c]), .sub_id (cfg_avg_sub_id[c]), .out_id (cfg_avg_out_id[c]),
      .shift (cfg_avg_shift[c]), .acc (avg_acc[c])
    );
  end

endmodule
