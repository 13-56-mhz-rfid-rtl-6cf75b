// adc_model: behavioural model of the front-end's 10-bit pipelined ADC, for
// testbenches only.
//
// The converter samples its analog input on each rising edge of adc_clk (the
// 13.56 MHz carrier from the FPGA) and presents the code three samples later,
// as a pipelined converter with a latency of 3 cycles does. Here the "analog"
// input is already a 10-bit code; the model adds uniform noise of up to
// +/-NOISE LSB. The edge of adc_clk is found by sampling it with the fast
// main clock.
module adc_model #(
  parameter int unsigned NOISE = 3
) (
  input  logic       clk,
  input  logic       adc_clk,
  input  logic [9:0] level,
  output logic [9:0] adc_data
);
  logic       adc_clk_q = 1'b0;
  logic [9:0] pipe [3];

  initial begin
    for (int i = 0; i < 3; i++) pipe[i] = 10'd0;
  end

  always_ff @(posedge clk) begin
    adc_clk_q <= adc_clk;
    if (adc_clk && !adc_clk_q) begin
      int v;
      v = int'(level) + int'($urandom_range(2 * NOISE)) - int'(NOISE);
      if (v < 0) v = 0;
      if (v > 1023) v = 1023;
      pipe[0] <= 10'(v);
      pipe[1] <= pipe[0];
      pipe[2] <= pipe[1];
    end
  end

  assign adc_data = pipe[2];
endmodule
