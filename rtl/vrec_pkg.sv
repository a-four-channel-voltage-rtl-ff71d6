// vrec_pkg: sizes and types shared by the four-channel voltage recorder
// firmware datapath.
//
// The recorder digitises four RF channels, keeps one 14-bit sample per ADC
// per fabric clock, widens it to 16 bits and ships the samples to a server
// in UDP payloads of 8256 bytes: a 64-byte header holding a 64-bit packet
// counter, then 8192 bytes of samples (1024 samples from each of the four
// ADCs). The 512-bit word width of the transmit stream is this design's
// choice; it makes the header exactly one word and the data 128 words.
package vrec_pkg;

  localparam int unsigned N_ADC        = 4;    // ADC_A..ADC_D
  localparam int unsigned ADC_BITS     = 14;   // converter resolution
  localparam int unsigned SAMPLE_BITS  = 16;   // widened sample in the packet
  localparam int unsigned AXI_LANES    = 4;    // successive samples per clock per ADC

  localparam int unsigned WORD_BITS    = 512;  // transmit stream width
  localparam int unsigned HDR_BYTES    = 64;   // packet header
  localparam int unsigned DATA_BYTES   = 8192; // sample payload per packet
  localparam int unsigned PKT_BYTES    = HDR_BYTES + DATA_BYTES; // 8256

  // Samples of one ADC in one packet: 8192 / (4 ADCs * 2 bytes) = 1024.
  localparam int unsigned SAMPLES_PER_PKT = DATA_BYTES / (N_ADC * SAMPLE_BITS / 8);
  // Time steps (four samples each) in one 512-bit word: 8.
  localparam int unsigned STEPS_PER_WORD  = WORD_BITS / (N_ADC * SAMPLE_BITS);
  // Data words per packet: 128.
  localparam int unsigned DATA_WORDS      = DATA_BYTES * 8 / WORD_BITS;

  typedef logic [ADC_BITS-1:0]               adc_sample_t;
  typedef logic [SAMPLE_BITS-1:0]            sample_t;
  // One time step: the four channels' samples, ADC_A in the lowest bits.
  typedef sample_t [N_ADC-1:0]               step_t;
  // One AXI-stream beat of one ADC: four successive samples, oldest lowest.
  typedef adc_sample_t [AXI_LANES-1:0]       adc_beat_t;
  typedef logic [WORD_BITS-1:0]              word_t;

endpackage
