// tb_vrec_top: end-to-end test of the recorder datapath at its default
// sizes (1024 samples per ADC per packet, 8256-byte payloads).
//
// A converter model drives the four ADCs' AXI-stream outputs: on the n-th
// beat in which all four ADCs are valid, lane l of ADC a carries
// (4n + l + 3001a + 37 floor(n / 4096)) mod 2^14, so that no two packets of
// a run carry the same samples. The expected payload is worked out from that
// rule alone: step j of a run with decimation N is beat jN, and channel a
// of it is lane 0 of ADC a shifted left by two bits.
//
// The three modes of the recorder are run in turn, each after a reset:
//   mode 1, decim 5 (49.152 Msps): two packets, receiver always ready;
//           packet headers must be 5 * 1024 clocks apart.
//   mode 2, decim 4 (61.44 Msps): two packets with random ADC valid gaps
//           and random receiver back-pressure (stalls).
//   mode 3, decim 1 (245.76 Msps): receiver blocked for five packets, so
//           three are dropped (overflow); then it opens, two more packets
//           follow, headers 1024 clocks apart; received blocks 0 1 5 6.
// Every header must carry the packet counter, every data word the right
// samples, tx_eof the last word. Mode switches, stalls, overflows and packet
// counter steps are counted; each must happen at least once.
module tb_vrec_top;
  import vrec_pkg::*;

  localparam int unsigned SPP = SAMPLES_PER_PKT;

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
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- converter model ----------------
  int unsigned beat = 0;       // all-valid beats since the last reset
  bit          gaps = 0;
  bit          adc_on = 0;

  function automatic adc_sample_t v(int unsigned n, int l, int a);
    return adc_sample_t'(4 * n + l + 3001 * a + 37 * (n >> 12));
  endfunction

  always @(posedge clk) begin
    #1;
    if (adc_on && (adc_tvalid == '1)) beat++;
    for (int a = 0; a < N_ADC; a++) begin
      adc_tvalid[a] = adc_on && (!gaps || $urandom_range(0, 19) != 0);
      for (int l = 0; l < AXI_LANES; l++) adc_tdata[a][l] = v(beat, l, a);
    end
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
  int unsigned rx_blocks[$];
  longint      hdr_time[$];
  int          rx_word = -1;
  int unsigned rx_blk, rx_pkts = 0, cur_dec = 5;
  int unsigned pkt_cycles = 0, pkt_stalls = 0;
  bit          in_pkt = 0;
  longint      cyc = 0;
  int unsigned n_stall = 0, n_overflow = 0, n_count_steps = 0, n_mode_switch = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (overflow) n_overflow++;
      if (tx_valid) begin
        if (!in_pkt) begin in_pkt = 1; pkt_cycles = 0; pkt_stalls = 0; end
        pkt_cycles++;
        if (!tx_ready) begin pkt_stalls++; n_stall++; end
      end
      if (tx_valid && tx_ready) begin
        if (rx_word < 0) begin
          checks++;
          if (tx_data != word_t'(64'(rx_pkts)) || tx_eof) begin
            failures++; $display("header %0d wrong: %h", rx_pkts, tx_data[63:0]);
          end
          if (rx_pkts > 0) n_count_steps++;
          hdr_time.push_back(cyc);
          rx_word = 0;
        end else begin
          if (rx_word == 0) begin
            rx_blk = (rx_blocks.size() == 0) ? 0 : rx_blocks[$] + 1;
            while (rx_blk < 32 && tx_data != exp_word(rx_blk, 0, cur_dec)) rx_blk++;
            rx_blocks.push_back(rx_blk);
          end
          checks++;
          if (tx_data != exp_word(rx_blk, rx_word, cur_dec)) begin
            failures++; $display("decim %0d packet %0d word %0d wrong", cur_dec, rx_pkts, rx_word);
          end
          checks++;
          if (tx_eof != (rx_word == DATA_WORDS - 1)) begin
            failures++; $display("packet %0d word %0d eof %b", rx_pkts, rx_word, tx_eof);
          end
          if (rx_word == DATA_WORDS - 1) begin
            checks++;
            if (pkt_cycles != DATA_WORDS + 1 + pkt_stalls) begin
              failures++; $display("packet %0d took %0d clocks, %0d stalled", rx_pkts, pkt_cycles, pkt_stalls);
            end
            rx_pkts++;
            rx_word = -1;
            in_pkt = 0;
          end else rx_word++;
        end
      end
    end
  end

  task automatic start_mode(int unsigned n_dec, bit with_gaps);
    adc_on = 0;
    rst = 1'b1;
    decim = 8'(n_dec);
    cur_dec = n_dec;
    gaps = with_gaps;
    repeat (3) @(posedge clk);
    #2;
    rx_blocks.delete(); hdr_time.delete();
    rx_word = -1; rx_pkts = 0; in_pkt = 0; beat = 0;
    rst = 1'b0;
    adc_on = 1;
    n_mode_switch++;
  endtask

  // run until `steps` decimated steps have been produced
  // (pause: then hold the converters idle before the next beat is taken)
  task automatic run_steps(int unsigned steps, int unsigned n_dec, bit rnd_ready, bit pause = 0);
    adc_on = 1;
    while (beat < steps * n_dec) begin
      if (rnd_ready) tx_ready = ($urandom_range(0, 9) < 8);
      @(posedge clk); #2;
    end
    if (pause) begin
      adc_on = 0;
      adc_tvalid = '0;
    end
  endtask

  task automatic expect_blocks(string tag, int unsigned want[$]);
    checks++;
    if (rx_blocks != want) begin
      failures++; $display("%s: received blocks %p, expected %p", tag, rx_blocks, want);
    end
  endtask

  task automatic expect_spacing(string tag, int i, longint clocks);
    checks++;
    if (hdr_time.size() <= i || hdr_time[i] - hdr_time[i-1] != clocks) begin
      failures++; $display("%s: header spacing wrong", tag);
    end
  endtask

  initial begin
    adc_tvalid = '0; adc_tdata = '0; tx_ready = 1'b1; decim = 8'd5;

    // mode 1: 49.152 Msps
    start_mode(5, 0);
    tx_ready = 1'b1;
    run_steps(2 * SPP + 8, 5, 0);
    repeat (200) @(posedge clk); #2;
    expect_blocks("mode 1", '{0, 1});
    expect_spacing("mode 1", 1, longint'(5 * SPP));

    // mode 2: 61.44 Msps, valid gaps and back-pressure
    start_mode(4, 1);
    run_steps(2 * SPP + 8, 4, 1);
    tx_ready = 1'b1;
    repeat (300) @(posedge clk); #2;
    expect_blocks("mode 2", '{0, 1});

    // mode 3: 245.76 Msps, receiver blocked then open
    start_mode(1, 0);
    tx_ready = 1'b0;
    run_steps(5 * SPP, 1, 0, 1);
    repeat (20) @(posedge clk); #2;
    checks++;
    if (drop_count != 3 || rx_pkts != 0) begin
      failures++; $display("mode 3: drops %0d, sent %0d", drop_count, rx_pkts);
    end
    tx_ready = 1'b1;
    repeat (400) @(posedge clk); #2;
    checks++;
    if (rx_pkts != 2) begin failures++; $display("mode 3: buffer did not drain"); end
    run_steps(7 * SPP + 8, 1, 0);
    repeat (300) @(posedge clk); #2;
    expect_blocks("mode 3", '{0, 1, 5, 6});
    expect_spacing("mode 3", 3, longint'(SPP));
    checks++;
    if (pkt_count != 4 || drop_count != 3) begin
      failures++; $display("mode 3: pkt_count %0d drop_count %0d", pkt_count, drop_count);
    end

    $display("mechanisms: mode switches %0d, stalls %0d, overflows %0d, counter steps %0d",
             n_mode_switch, n_stall, n_overflow, n_count_steps);
    checks++; if (n_mode_switch < 3) failures++;
    checks++; if (n_stall == 0)      begin failures++; $display("no stall"); end
    checks++; if (n_overflow == 0)   begin failures++; $display("no overflow"); end
    checks++; if (n_count_steps == 0) begin failures++; $display("no counter step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
