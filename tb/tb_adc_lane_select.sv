// tb_adc_lane_select: self-checking test of the lane selector.
// Drives random 14-bit samples on all lanes of all four ADCs with random
// valid patterns and checks, one clock later, that each channel carries
// lane 0 of its ADC shifted left by two, and that a step is valid only when
// all four ADCs were valid.
module tb_adc_lane_select;
  import vrec_pkg::*;

  logic                  clk = 1'b0;
  logic                  rst = 1'b1;
  adc_beat_t [N_ADC-1:0] adc_tdata;
  logic      [N_ADC-1:0] adc_tvalid;
  step_t                 step_o;
  logic                  valid_o;

  int checks = 0, failures = 0;
  int n_valid = 0;

  adc_lane_select dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive();
    for (int a = 0; a < N_ADC; a++) begin
      for (int l = 0; l < AXI_LANES; l++) adc_tdata[a][l] = adc_sample_t'($urandom);
      adc_tvalid[a] = ($urandom_range(0, 7) != 0);
    end
  endtask

  initial begin
    adc_beat_t [N_ADC-1:0] prev_data;
    logic      [N_ADC-1:0] prev_valid;
    step_t                 held;
    drive();
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    if (valid_o !== 1'b0 || step_o != '0) begin
      failures++; $display("reset state wrong");
    end
    checks++;
    held = '0;
    for (int t = 0; t < 2000; t++) begin
      prev_data  = adc_tdata;
      prev_valid = adc_tvalid;
      @(posedge clk);
      #1;
      // expected: independent model of lane 0 padded with two zeros
      checks++;
      if (valid_o != (prev_valid == 4'hF)) begin
        failures++; $display("t=%0d valid %b expected %b", t, valid_o, prev_valid == 4'hF);
      end
      if (prev_valid == 4'hF) begin
        n_valid++;
        for (int a = 0; a < N_ADC; a++) held[a] = {prev_data[a][0], 2'b00};
      end
      checks++;
      if (step_o != held) begin
        failures++;
        $display("t=%0d step %h expected %h", t, step_o, held);
      end
      drive();
    end
    checks++;
    if (n_valid < 500) begin failures++; $display("too few valid steps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
