// temp_sensor_model -- behavioural model of one SPI temperature sensor, for
// testbenches only. While `cs_n` is low it shifts `value` out on `so`, most
// significant bit first: the first bit appears when `cs_n` falls, the next
// one after every falling edge of `sck`. `so` is 0 while deselected.
module temp_sensor_model (
  input  logic        sck,
  input  logic        cs_n,
  input  logic [15:0] value,
  output logic        so
);
  int idx = 15;
  initial so = 1'b0;
  always @(negedge cs_n) begin
    idx = 15;
    so = value[15];
  end
  always @(posedge cs_n) so = 1'b0;
  always @(negedge sck) if (!cs_n) begin
    idx = idx - 1;
    so = (idx >= 0) ? value[idx] : 1'b0;
  end
endmodule
