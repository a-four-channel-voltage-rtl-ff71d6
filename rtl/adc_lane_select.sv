// adc_lane_select: turns the converter core's four AXI-stream outputs into
// one stream of four-channel time steps.
//
// Each ADC runs at 1966.08 Msps; the converter core decimates by two and
// delivers four successive samples per 245.76 MHz fabric clock on its
// AXI-stream output. This block keeps one of those four samples (lane LANE)
// from every ADC, which gives 245.76 Msps per channel, and widens each
// 14-bit sample to 16 bits by appending two zero least-significant bits.
//
// Interface: adc_tdata[a][l] is sample lane l of ADC a (a = 0..3 for
// ADC_A..ADC_D), adc_tvalid[a] its valid. A step is produced when all four
// ADCs are valid in the same clock.
// Timing: one register stage; step_o/valid_o follow the input by one clock.
//
// Keeping one lane and the zero padding follow the description of the
// firmware; which lane is kept (lane 0, the oldest) and the all-valid rule
// are this design's choices.
module adc_lane_select
  import vrec_pkg::*;
#(
  parameter int unsigned LANE = 0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  adc_beat_t [N_ADC-1:0] adc_tdata,
  input  logic      [N_ADC-1:0] adc_tvalid,
  output step_t                 step_o,
  output logic                  valid_o
);

  localparam int unsigned PAD = SAMPLE_BITS - ADC_BITS;

  step_t step_d;

  always_comb begin
    for (int a = 0; a < N_ADC; a++)
      step_d[a] = {adc_tdata[a][LANE], {PAD{1'b0}}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o <= 1'b0;
      step_o  <= '0;
    end else begin
      valid_o <= &adc_tvalid;
      if (&adc_tvalid)
        step_o <= step_d;
    end
  end

endmodule
