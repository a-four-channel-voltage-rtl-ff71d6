// tb_packetizer: self-checking test of packing, buffering and framing at
// the full packet size (1024 steps, one header word plus 128 data words).
//
// Every input step carries its own sequence number, so each received data
// word can be compared with the steps it must hold. Phases:
//   1. tx_ready low while five packets' worth of steps arrive: two packets
//      fill the buffer, the next three must be dropped (drop_count = 3,
//      three overflow pulses, nothing sent).
//   2. tx_ready high: packets 0 and 1 leave, back to back, 129 clocks each.
//   3. random tx_ready and random input gaps for four more packets: packets
//      5..8 must arrive whole, in order, with no further drops.
// Every header must carry the packet counter (0, 1, 2, ...) in bits 63:0
// and zeros above; tx_eof must mark the 129th word; a packet must take 129
// clocks plus the clocks it was stalled.
module tb_packetizer;
  import vrec_pkg::*;

  localparam int unsigned SPP = SAMPLES_PER_PKT;   // 1024

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  step_t       step_i;
  logic        valid_i;
  logic        tx_ready;
  word_t       tx_data;
  logic        tx_valid, tx_eof;
  logic [63:0] pkt_count;
  logic [31:0] drop_count;
  logic        overflow_o;

  int checks = 0, failures = 0;

  packetizer dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic step_t mk(int unsigned n);
    step_t s;
    for (int a = 0; a < N_ADC; a++) s[a] = sample_t'(n * 4 + a);
    return s;
  endfunction

  function automatic word_t exp_word(int unsigned blk, int unsigned w);
    word_t x;
    for (int k = 0; k < STEPS_PER_WORD; k++)
      x[k*64 +: 64] = mk(blk * SPP + w * STEPS_PER_WORD + k);
    return x;
  endfunction

  // ---------------- receiver ----------------
  int unsigned rx_blocks[$];
  int          rx_word = -1;        // -1: expecting a header
  int unsigned rx_blk;
  int unsigned rx_pkts = 0;
  int unsigned pkt_cycles = 0, pkt_stalls = 0;
  int unsigned n_overflow = 0, n_stall_total = 0;
  bit          in_pkt = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (overflow_o) n_overflow++;
      if (tx_valid) begin
        if (!in_pkt) begin in_pkt = 1; pkt_cycles = 0; pkt_stalls = 0; end
        pkt_cycles++;
        if (!tx_ready) begin pkt_stalls++; n_stall_total++; end
      end
      if (tx_valid && tx_ready) begin
        if (rx_word < 0) begin
          checks++;
          if (tx_data != word_t'(64'(rx_pkts)) || tx_eof) begin
            failures++; $display("header %0d wrong: %h eof %b", rx_pkts, tx_data[63:0], tx_eof);
          end
          rx_word = 0;
        end else begin
          if (rx_word == 0) begin
            // which block is this? the first one at or after the last seen
            rx_blk = (rx_blocks.size() == 0) ? 0 : rx_blocks[$] + 1;
            while (rx_blk < 64 && tx_data != exp_word(rx_blk, 0)) rx_blk++;
            rx_blocks.push_back(rx_blk);
          end
          checks++;
          if (tx_data != exp_word(rx_blk, rx_word)) begin
            failures++; $display("packet %0d word %0d wrong", rx_pkts, rx_word);
          end
          checks++;
          if (tx_eof != (rx_word == DATA_WORDS - 1)) begin
            failures++; $display("packet %0d word %0d eof %b", rx_pkts, rx_word, tx_eof);
          end
          if (rx_word == DATA_WORDS - 1) begin
            checks++;
            if (pkt_cycles != DATA_WORDS + 1 + pkt_stalls) begin
              failures++; $display("packet %0d took %0d clocks with %0d stalls", rx_pkts, pkt_cycles, pkt_stalls);
            end
            rx_pkts++;
            rx_word = -1;
            in_pkt = 0;
          end else rx_word++;
        end
      end
    end
  end

  // ---------------- source ----------------
  int unsigned n_in = 0;

  task automatic feed(int unsigned n_steps, bit gaps, bit rnd_ready);
    int unsigned stop = n_in + n_steps;
    while (n_in < stop) begin
      valid_i = gaps ? ($urandom_range(0, 1) == 1) : 1'b1;
      step_i  = mk(n_in);
      if (rnd_ready) tx_ready = ($urandom_range(0, 9) < 7);
      @(posedge clk); #1;
      if (valid_i) n_in++;
    end
    valid_i = 1'b0;
  endtask

  initial begin
    valid_i = 0; step_i = '0; tx_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // 1: receiver blocked
    feed(5 * SPP, 0, 0);
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (drop_count != 3 || n_overflow != 3 || rx_pkts != 0) begin
      failures++; $display("phase 1: drops %0d pulses %0d sent %0d", drop_count, n_overflow, rx_pkts);
    end

    // 2: receiver open, buffer drains
    tx_ready = 1'b1;
    repeat (400) @(posedge clk);
    #1;
    checks++;
    if (rx_pkts != 2 || pkt_count != 2) begin
      failures++; $display("phase 2: sent %0d, pkt_count %0d", rx_pkts, pkt_count);
    end

    // 3: random back-pressure and input gaps
    feed(4 * SPP, 1, 1);
    tx_ready = 1'b1;
    repeat (600) @(posedge clk);
    #1;
    checks++;
    if (rx_pkts != 6 || pkt_count != 6 || drop_count != 3) begin
      failures++; $display("phase 3: sent %0d, pkt_count %0d drops %0d", rx_pkts, pkt_count, drop_count);
    end
    checks++;
    if (rx_blocks.size() != 6 || rx_blocks[0] != 0 || rx_blocks[1] != 1 || rx_blocks[2] != 5 ||
        rx_blocks[3] != 6 || rx_blocks[4] != 7 || rx_blocks[5] != 8) begin
      failures++; $display("received blocks %p, expected 0 1 5 6 7 8", rx_blocks);
    end
    checks++;
    if (n_stall_total == 0) begin failures++; $display("no stall happened"); end
    $display("stalls %0d, overflows %0d", n_stall_total, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
