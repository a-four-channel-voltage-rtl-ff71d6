// tb_packet_buffer: self-checking test of the FIFO against a queue model.
// Uses an 8-word buffer so that full and empty are reached often; random
// pushes and pops (never a push when full or a pop when empty) are mirrored
// in a SystemVerilog queue and the head word, count, full and empty are
// compared every clock.
module tb_packet_buffer;
  localparam int unsigned W = 32;
  localparam int unsigned D = 8;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          wr_en, rd_en;
  logic [W-1:0]  wr_data, rd_data;
  logic [3:0]    count;
  logic          full, empty;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  logic [W-1:0] model[$];

  packet_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 4000; t++) begin
      // compare state with the model
      checks++;
      if (count != 4'(model.size()) || full != (model.size() == D) || empty != (model.size() == 0)) begin
        failures++;
        $display("t=%0d count %0d full %b empty %b, model %0d", t, count, full, empty, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (rd_data != model[0]) begin
          failures++; $display("t=%0d head %h expected %h", t, rd_data, model[0]);
        end
      end
      if (model.size() == D) n_full++;
      if (model.size() == 0) n_empty++;
      // bias toward filling in the first half, draining in the second
      wr_en   = (model.size() < D) && ($urandom_range(0, 9) < ((t / 500) % 2 ? 3 : 7));
      rd_en   = (model.size() > 0) && ($urandom_range(0, 9) < ((t / 500) % 2 ? 7 : 3));
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      #1;
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++; $display("full or empty never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
