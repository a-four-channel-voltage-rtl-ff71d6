// packet_buffer: synchronous first-word-fall-through FIFO holding packed
// sample words until the packet transmitter sends them.
//
// A circular memory of DEPTH words with write and read pointers one bit
// wider than the address, so that full and empty are told apart. rd_data
// always shows the oldest word while the FIFO is not empty; rd_en pops it.
// count gives the fill level, which the packetizer uses to reserve room for
// whole packets and to start a packet only when all of it is stored.
//
// Interface: wr_en/wr_data, rd_en/rd_data, count, full, empty. Writing when
// full and reading when empty are errors, checked by assertions.
// Timing: a word written in one clock is visible on rd_data the next.
//
// That the firmware buffers the ADC data is from its description; the FIFO
// structure and its depth (two packets, 256 words) are this design's choice.
module packet_buffer #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic [AW:0]      count,
  output logic             full,
  output logic             empty
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;

  assign count   = wr_ptr - rd_ptr;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full)
      mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (wr_en && !full)  wr_ptr <= wr_ptr + 1'b1;
      if (rd_en && !empty) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));

endmodule
