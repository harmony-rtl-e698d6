// adc_model -- behavioural model of a simultaneous-sampling serial ADC with
// one data line per channel, for simulation only (not synthesizable logic).
//
// The value of channel k is taken from `value[k]` when adc_cnv rises. When
// adc_cnv falls the MSB appears on sdo[k]; each falling edge of sck moves to the
// next bit, MSB first. This is the protocol adc_core expects.
module adc_model #(
  parameter int N_CH = 4,
  parameter int BITS = 18
) (
  input  logic                      cnv,
  input  logic                      sck,
  input  logic [N_CH-1:0][BITS-1:0] value,
  output logic [N_CH-1:0]           sdo
);
  logic [N_CH-1:0][BITS-1:0] held;
  int                        bitn;

  initial begin
    sdo  = '0;
    held = '0;
    bitn = 0;
  end

  always @(posedge cnv) held = value;

  always @(negedge cnv) begin
    bitn = BITS - 1;
    for (int k = 0; k < N_CH; k++) sdo[k] = held[k][bitn];
  end

  always @(negedge sck) begin
    if (bitn > 0) begin
      bitn = bitn - 1;
      for (int k = 0; k < N_CH; k++) sdo[k] = held[k][bitn];
    end
  end
endmodule
