// adc_bank_model: behavioural model of the converter channels of the MADC
// card (sample & hold plus 14-bit serial A/D converter per channel), for
// simulation only.
//
// On the rising edge of stc every channel holds its input value; on every
// rising edge of sclk each converter puts the next bit of its held sample on
// sdo, most significant bit first. The input is the ideal digital value the
// converter would produce.
module adc_bank_model #(
  parameter int unsigned NUM_CH   = 36,
  parameter int unsigned SAMPLE_W = 14
) (
  input  logic                stc,
  input  logic                sclk,
  input  logic [SAMPLE_W-1:0] value [NUM_CH],
  output logic [NUM_CH-1:0]   sdo
);
  logic [SAMPLE_W-1:0] held [NUM_CH];
  int unsigned         conversions = 0;

  initial begin
    sdo = '0;
    for (int c = 0; c < NUM_CH; c++) held[c] = '0;
  end

  always @(posedge stc) begin
    for (int c = 0; c < NUM_CH; c++) held[c] = value[c];
    conversions++;
  end

  always @(posedge sclk) begin
    for (int c = 0; c < NUM_CH; c++) begin
      sdo[c]  = held[c][SAMPLE_W-1];
      held[c] = {held[c][SAMPLE_W-2:0], 1'b0};
    end
  end
endmodule
