// adc_core -- ADCCORE: drives the multi-channel serial ADC and publishes samples.
//
// Every `period` cycles (while enabled) the core starts a conversion on all
// N_CH channels at once: adc_cnv is held high for CONV_CYCLES, then the core
// reads the ADC_BITS-bit results, MSB first, on one serial data line per
// channel. adc_sck has a period of 2*SCK_HALF clock cycles; the core samples
// adc_sdo as it raises adc_sck and the ADC moves to the next bit on the falling
// edge (the MSB is on the line as soon as adc_cnv falls). Each result, a two's
// complement number, is sign-extended to 32 bits and sent on the Harmony Bus
// with ID base_id+k for channel k, timestamped at the start of the conversion.
// A period that ends while a conversion is still running is skipped.
//
// Harmony gives the block's job (control the ADC over fast serial lines, send
// channel 1 as ID 1 ...) and the 18-bit, 4-channel converter; the serial
// protocol, the conversion time and the serial clock rate are this design's.
//
// Timing: from the start of a conversion, channel 0 is pushed to the upstream
// port after CONV_CYCLES + 2*SCK_HALF*ADC_BITS + 1 cycles, channel k k cycles
// later.
module adc_core
  import harmony_pkg::*;
#(
  parameter int unsigned N_CH        = 4,
  parameter int unsigned ADC_BITS    = 18,
  parameter int unsigned CONV_CYCLES = 80,
  parameter int unsigned SCK_HALF    = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  hb_bcast_t       bc,
  output logic            up_req,
  output hb_msg_t         up_msg,
  input  logic            up_rd,
  output hb_status_t      status,
  input  logic            clear_status,
  // configuration
  input  logic            enable,
  input  logic [31:0]     period,
  input  hb_id_t          base_id,
  // ADC serial lines
  output logic            adc_cnv,
  output logic            adc_sck,
  input  logic [N_CH-1:0] adc_sdo
);

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_SHIFT, S_SEND} state_t;

  localparam int unsigned CCW = $clog2(CONV_CYCLES + 1);
  localparam int unsigned HW  = $clog2(SCK_HALF + 1);
  localparam int unsigned BW  = $clog2(ADC_BITS + 1);
  localparam int unsigned NW  = (N_CH > 1) ? $clog2(N_CH) : 1;

  state_t                     state;
  logic [31:0]                pcnt;
  logic                       tick;
  logic [CCW-1:0]             ccnt;
  logic [HW-1:0]              hcnt;
  logic [BW-1:0]              bcnt;
  logic [NW-1:0]              ch;
  logic [ADC_BITS-1:0]        sreg [N_CH];
  hb_ts_t                     ts, ts_conv;
  logic                       push;
  hb_msg_t                    push_msg;

  hb_timestamp u_ts (.clk, .rst_n, .bc, .ts);

  // Sampling period.
  assign tick = enable && (pcnt >= period - 1);
  always_ff @(posedge clk) begin
    if (!rst_n || !enable || tick) pcnt <= '0;
    else                           pcnt <= pcnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; adc_cnv <= 1'b0; adc_sck <= 1'b0;
      ccnt <= '0; hcnt <= '0; bcnt <= '0; ch <= '0; ts_conv <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (tick) begin
          state   <= S_CONV;
          adc_cnv <= 1'b1;
          ccnt    <= '0;
          ts_conv <= ts;
        end
        S_CONV: if (ccnt == CCW'(CONV_CYCLES - 1)) begin
          state   <= S_SHIFT;
          adc_cnv <= 1'b0;
          hcnt    <= '0;
          bcnt    <= '0;
        end else ccnt <= ccnt + 1'b1;
        S_SHIFT: if (hcnt == HW'(SCK_HALF - 1)) begin
          hcnt <= '0;
          if (!adc_sck) begin
            adc_sck <= 1'b1;
            for (int k = 0; k < N_CH; k++) sreg[k] <= {sreg[k][ADC_BITS-2:0], adc_sdo[k]};
            bcnt <= bcnt + 1'b1;
          end else begin
            adc_sck <= 1'b0;
            if (bcnt == BW'(ADC_BITS)) begin
              state <= S_SEND;
              ch    <= '0;
            end
          end
        end else hcnt <= hcnt + 1'b1;
        S_SEND: begin
          ch <= ch + 1'b1;
          if (ch == NW'(N_CH - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign push     = (state == S_SEND);
  assign push_msg = '{data: hb_data_t'(signed'(sreg[ch])),
                      ts:   ts_conv,
                      id:   base_id + hb_id_t'(ch)};

  hb_master #(.DEPTH(2 * N_CH)) u_port (
    .clk, .rst_n, .push, .push_msg,
    .err_tag (base_id), .ts,
    .up_req, .up_msg, .up_rd, .status, .clear_status
  );

endmodule
