// tb_rate_selector: self-checking test of the sampling frequency selector.
// For the three decimation factors of the recorder (5, 4, 1) and one more
// (3), the test resets the block, feeds numbered steps with valid held high
// and then with random gaps, and checks that exactly steps 0, N, 2N, ... of
// the valid ones come out, one clock later. With valid held high it checks
// the output rate: 245.76/N Msps means one step every N clocks.
module tb_rate_selector;
  import vrec_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [7:0]  decim;
  step_t       step_i, step_o;
  logic        valid_i, valid_o;

  int checks = 0, failures = 0;

  rate_selector dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic step_t mk(int unsigned n);
    step_t s;
    for (int a = 0; a < N_ADC; a++) s[a] = sample_t'(n * 7 + a * 977);
    return s;
  endfunction

  task automatic run(int n_dec, bit gaps, int n_in);
    int unsigned in_cnt = 0, out_cnt = 0, cycles = 0;
    int unsigned exp_idx;
    bit          exp_v;
    rst = 1'b1; valid_i = 1'b0; step_i = '0; decim = 8'(n_dec);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    while (in_cnt < n_in) begin
      valid_i = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      step_i  = mk(in_cnt);
      exp_v   = valid_i && (in_cnt % n_dec == 0);
      exp_idx = in_cnt;
      if (valid_i) in_cnt++;
      @(posedge clk); #1;
      cycles++;
      checks++;
      if (valid_o != exp_v) begin
        failures++; $display("decim %0d: valid %b expected %b at input %0d", n_dec, valid_o, exp_v, exp_idx);
      end
      if (exp_v) begin
        out_cnt++;
        checks++;
        if (step_o != mk(exp_idx)) begin
          failures++; $display("decim %0d: step %h expected %h", n_dec, step_o, mk(exp_idx));
        end
      end
    end
    valid_i = 1'b0;
    checks++;
    if (out_cnt != (n_in + n_dec - 1) / n_dec) begin
      failures++; $display("decim %0d: %0d outputs, expected %0d", n_dec, out_cnt, (n_in + n_dec - 1) / n_dec);
    end
    if (!gaps) begin
      checks++;
      if (cycles != n_in) begin failures++; $display("decim %0d: rate wrong", n_dec); end
    end
  endtask

  initial begin
    run(5, 0, 1000);
    run(4, 0, 1000);
    run(1, 0, 500);
    run(3, 0, 600);
    run(5, 1, 1000);
    run(4, 1, 1000);
    run(1, 1, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
