// rate_selector: the sampling frequency selector. It lowers the sample rate
// of the four-channel stream by keeping one of every `decim` valid steps.
//
// With 245.76 Msps coming in, decim = 5 gives 49.152 Msps (about 25 MHz of
// bandwidth), decim = 4 gives 61.44 Msps (about 30 MHz) and decim = 1 passes
// the full 245.76 Msps (about 122 MHz). A modulo-decim counter advances on
// every valid input step; the step seen when the counter is zero is passed
// on. No filtering is done: the analog band-pass filter in front of the
// converters limits the bandwidth.
//
// Interface: step_i/valid_i in, step_o/valid_o out, decim (0 counts as 1).
// Changing decim takes effect at once; a counter beyond the new modulus
// wraps to zero on the next valid step.
// Timing: one register stage.
//
// The keep-one-in-N selector and the three factors follow the firmware
// description; the run-time decim port is this design's choice (the
// firmware fixed the constant per build).
module rate_selector
  import vrec_pkg::*;
#(
  parameter int unsigned DECIM_W = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [DECIM_W-1:0] decim,
  input  step_t              step_i,
  input  logic               valid_i,
  output step_t              step_o,
  output logic               valid_o
);

  logic [DECIM_W-1:0] cnt;
  logic [DECIM_W-1:0] last;   // decim - 1, with 0 treated as 1

  assign last = (decim == '0) ? '0 : decim - 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      valid_o <= 1'b0;
      step_o  <= '0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i) begin
        if (cnt == '0) begin
          valid_o <= 1'b1;
          step_o  <= step_i;
        end
        cnt <= (cnt >= last) ? '0 : cnt + 1'b1;
      end
    end
  end

endmodule
