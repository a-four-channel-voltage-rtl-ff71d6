// vrec_top: FPGA datapath of the four-channel voltage recorder.
//
// The recorder captures time-domain voltages from a radio telescope and
// three reference antennas for offline RFI-mitigation research. The four
// converters' AXI-stream outputs (four samples per 245.76 MHz clock per ADC)
// enter here; the datapath
//   1. keeps one sample per clock from each ADC and widens it to 16 bits
//      (adc_lane_select),
//   2. keeps one of every `decim` steps: 5 -> 49.152 Msps, 4 -> 61.44 Msps,
//      1 -> 245.76 Msps (rate_selector),
//   3. packs the steps into 8256-byte UDP payloads with a 64-bit packet
//      counter in the header and hands them to the 100 GbE core
//      (packetizer, with its packet_buffer).
// The converter core and the 100 GbE core (UDP/IP framing, MAC, QSFP) lie
// outside: their streams are this module's ports.
//
// Ports: adc_tdata[a][l] (14-bit sample lane l of ADC a, ADC_A = 0),
// adc_tvalid[a]; decim, the sampling frequency selector's factor; tx_*
// towards the 100 GbE core with tx_ready as back-pressure; pkt_count,
// drop_count and overflow as status.
// Timing: everything runs on the 245.76 MHz fabric clock with a synchronous
// active-high reset. A sample is stored in the packet buffer four clocks
// after it enters; a packet is sent once all 1024 of its steps are stored.
//
// The chain and its rates follow the firmware description; the run-time
// decim port replaces the per-build constant of the original firmware.
module vrec_top
  import vrec_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  adc_beat_t [N_ADC-1:0] adc_tdata,
  input  logic      [N_ADC-1:0] adc_tvalid,
  input  logic      [7:0]       decim,
  input  logic                  tx_ready,
  output word_t                 tx_data,
  output logic                  tx_valid,
  output logic                  tx_eof,
  output logic      [63:0]      pkt_count,
  output logic      [31:0]      drop_count,
  output logic                  overflow
);

  step_t sel_step, dec_step;
  logic  sel_valid, dec_valid;

  adc_lane_select u_lane (
    .clk        (clk),
    .rst        (rst),
    .adc_tdata  (adc_tdata),
    .adc_tvalid (adc_tvalid),
    .step_o     (sel_step),
    .valid_o    (sel_valid)
  );

  rate_selector u_rate (
    .clk     (clk),
    .rst     (rst),
    .decim   (decim),
    .step_i  (sel_step),
    .valid_i (sel_valid),
    .step_o  (dec_step),
    .valid_o (dec_valid)
  );

  packetizer u_pkt (
    .clk        (clk),
    .rst        (rst),
    .step_i     (dec_step),
    .valid_i    (dec_valid),
    .tx_ready   (tx_ready),
    .tx_data    (tx_data),
    .tx_valid   (tx_valid),
    .tx_eof     (tx_eof),
    .pkt_count  (pkt_count),
    .drop_count (drop_count),
    .overflow_o (overflow)
  );

endmodule
