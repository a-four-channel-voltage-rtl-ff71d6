// tb_vrec_sustained: the recorder's three operating modes as continuous
// recordings. For each mode (decim 5: 49.152 Msps, decim 4: 61.44 Msps,
// decim 1: 245.76 Msps) it resets the datapath, streams PKTS packets' worth
// of converter beats without a break while the 100 GbE side accepts a word
// in only half the clocks at random, and checks that
//   - no packet is dropped (drop_count stays 0, overflow never pulses),
//   - packet k carries counter k and exactly steps 1024k .. 1024k+1023,
//     i.e. converter beats 1024kN, 1024kN + N, ...,
//   - the average packet rate equals the sample rate: the headers of the
//     first and last packet are (PKTS-1) * 1024 * N clocks apart, give or
//     take the back-pressure jitter of a few hundred clocks.
// The converter model is the one of tb_vrec_top: on the n-th all-valid beat
// lane l of ADC a carries (4n + l + 3001a + 37 floor(n / 4096)) mod 2^14.
module tb_vrec_sustained;
  import vrec_pkg::*;

  localparam int unsigned SPP  = SAMPLES_PER_PKT;
  localparam int unsigned PKTS = 12;

  logic                  clk = 1'b0;
  logic                  rst = 1'b1;
  adc_beat_t [N_ADC-1:0] adc_tdata;
  logic      [N_ADC-1:0] adc_tvalid;
  logic      [7:0]       decim;
  logic                  tx_ready;
  word_t                 tx_data;
  logic                  tx_valid, tx_eof;
  logic      [63:0]      pkt_count;
  logic      [31:0]      drop_count;
  logic                  overflow;

  int checks = 0, failures = 0;

  vrec_top dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (250000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- converter model ----------------
  int unsigned beat = 0;
  bit          adc_on = 0;

  function automatic adc_sample_t v(int unsigned n, int l, int a);
    return adc_sample_t'(4 * n + l + 3001 * a + 37 * (n >> 12));
  endfunction

  always @(posedge clk) begin
    #1;
    if (adc_on && (adc_tvalid == '1)) beat++;
    for (int a = 0; a < N_ADC; a++) begin
      adc_tvalid[a] = adc_on;
      for (int l = 0; l < AXI_LANES; l++) adc_tdata[a][l] = v(beat, l, a);
    end
    tx_ready = ($urandom_range(0, 1) == 1);
  end

  function automatic word_t exp_word(int unsigned blk, int unsigned w, int unsigned n_dec);
    word_t x;
    for (int k = 0; k < STEPS_PER_WORD; k++) begin
      int unsigned j = blk * SPP + w * STEPS_PER_WORD + k;
      for (int a = 0; a < N_ADC; a++)
        x[k*64 + a*16 +: 16] = {v(j * n_dec, 0, a), 2'b00};
    end
    return x;
  endfunction

  // ---------------- 100 GbE side model ----------------
  int          rx_word = -1;
  int unsigned rx_pkts = 0, cur_dec = 5, n_overflow = 0, word_errors = 0;
  longint      cyc = 0, first_hdr = 0, last_hdr = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (overflow) n_overflow++;
      if (tx_valid && tx_ready) begin
        if (rx_word < 0) begin
          checks++;
          if (tx_data != word_t'(64'(rx_pkts)) || tx_eof) begin
            failures++; $display("decim %0d: header %0d wrong", cur_dec, rx_pkts);
          end
          if (rx_pkts == 0) first_hdr = cyc;
          last_hdr = cyc;
          rx_word = 0;
        end else begin
          if (tx_data != exp_word(rx_pkts, rx_word, cur_dec) ||
              tx_eof != (rx_word == DATA_WORDS - 1)) word_errors++;
          if (rx_word == DATA_WORDS - 1) begin
            rx_pkts++;
            rx_word = -1;
          end else rx_word++;
        end
      end
    end
  end

  task automatic record(int unsigned n_dec);
    longint want, got;
    adc_on = 0;
    rst = 1'b1;
    decim = 8'(n_dec);
    cur_dec = n_dec;
    repeat (3) @(posedge clk);
    #2;
    rx_word = -1; rx_pkts = 0; beat = 0; n_overflow = 0; word_errors = 0;
    rst = 1'b0;
    adc_on = 1;
    while (rx_pkts < PKTS) @(posedge clk);
    #2;
    checks++;
    if (word_errors != 0) begin
      failures++; $display("decim %0d: %0d data words wrong", n_dec, word_errors);
    end
    checks++;
    if (drop_count != 0 || n_overflow != 0) begin
      failures++; $display("decim %0d: %0d packets dropped", n_dec, drop_count);
    end
    want = (longint'(PKTS) - 1) * SPP * n_dec;
    got  = last_hdr - first_hdr;
    checks++;
    if (got < want - 300 || got > want + 300) begin
      failures++; $display("decim %0d: %0d packets took %0d clocks, expected %0d", n_dec, PKTS, got, want);
    end
    $display("decim %0d: %0d packets, header span %0d clocks (ideal %0d), %.2f Gbps payload",
             n_dec, PKTS, got, want,
             real'(PKTS - 1) * PKT_BYTES * 8.0 * 0.24576 / real'(got));
  endtask

  initial begin
    adc_tvalid = '0; adc_tdata = '0; tx_ready = 1'b0; decim = 8'd5;
    record(5);
    record(4);
    record(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
