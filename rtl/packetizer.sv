// packetizer: packs the four-channel sample stream into UDP payloads and
// sends them to the 100 GbE core.
//
// Each payload is 8256 bytes: a 64-byte header followed by 8192 bytes of
// samples, 1024 time steps of four 16-bit samples. On the 512-bit transmit
// stream that is one header word and 128 data words.
//
// Packing: eight successive time steps fill one data word, step k in bits
// [64k+63:64k] and, within a step, ADC_A in the lowest 16 bits. Whole words
// go into the packet buffer. Before the first step of a packet the packer
// checks that the buffer has room for the whole packet; if not, that
// packet's 1024 steps are discarded, overflow_o pulses and drop_count
// counts it, so the buffer only ever holds whole packets and packet
// boundaries never slip.
//
// Framing: when the buffer holds at least one whole packet, the framer
// sends the header word, then the 128 data words with tx_eof on the last.
// The header carries the 64-bit packet counter in bits [63:0] (bytes 0-7,
// least significant byte first); the other 56 header bytes are zero. The
// counter starts at zero after reset and goes up by one for every packet
// sent, so a gap in the counter seen by the receiver means a lost packet.
//
// Interface: step_i/valid_i in; tx_data/tx_valid/tx_eof out with tx_ready
// as back-pressure (a word moves when tx_valid && tx_ready; while tx_ready
// is low the word and tx_eof are held). pkt_count is the number of packets
// sent, drop_count the number discarded.
// Timing: a packet leaves in 129 transferring clocks, plus one idle clock
// between packets. At the full 245.76 Msps rate a packet's samples take
// 1024 clocks to arrive, so the transmitter keeps up with ample margin.
//
// The packet layout sizes (64 + 8192 bytes, 1024 16-bit values per ADC) and
// the hardware 64-bit packet counter follow the firmware description. The
// 512-bit stream, the sample order, the counter's place in the header, the
// zero header fill, the ready handshake and whole-packet dropping are this
// design's choices.
module packetizer
  import vrec_pkg::*;
#(
  parameter int unsigned PKT_WORDS = DATA_WORDS,   // data words per packet (128)
  parameter int unsigned BUF_DEPTH = 2 * DATA_WORDS
) (
  input  logic        clk,
  input  logic        rst,
  input  step_t       step_i,
  input  logic        valid_i,
  input  logic        tx_ready,
  output word_t       tx_data,
  output logic        tx_valid,
  output logic        tx_eof,
  output logic [63:0] pkt_count,
  output logic [31:0] drop_count,
  output logic        overflow_o
);

  localparam int unsigned AW  = $clog2(BUF_DEPTH);
  localparam int unsigned SW  = $clog2(STEPS_PER_WORD);
  localparam int unsigned WW  = $clog2(PKT_WORDS);
  localparam int unsigned STEP_BITS = N_ADC * SAMPLE_BITS;

  // ---------------- packer ----------------
  logic [SW-1:0]  step_idx;    // step within the word being filled
  logic [WW-1:0]  word_idx;    // word within the packet being filled
  logic           discard;     // current packet is being dropped
  logic [WORD_BITS-STEP_BITS-1:0] acc;  // first seven steps of the word being filled
  logic           wr_en;
  word_t          wr_data;

  logic [AW:0]    buf_count;
  logic           buf_full, buf_empty;
  logic [AW+1:0]  used;        // words stored or about to be stored
  logic           room;        // space for one more whole packet
  logic           pkt_start;

  assign used      = (AW+2)'(buf_count) + (AW+2)'(wr_en);
  assign room      = (used + (AW+2)'(PKT_WORDS)) <= (AW+2)'(BUF_DEPTH);
  assign pkt_start = (step_idx == '0) && (word_idx == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      step_idx   <= '0;
      word_idx   <= '0;
      discard    <= 1'b0;
      acc        <= '0;
      wr_en      <= 1'b0;
      wr_data    <= '0;
      drop_count <= '0;
      overflow_o <= 1'b0;
    end else begin
      wr_en      <= 1'b0;
      overflow_o <= 1'b0;
      if (valid_i) begin
        logic drop_now;
        drop_now = pkt_start ? !room : discard;
        if (pkt_start) begin
          discard <= !room;
          if (!room) begin
            drop_count <= drop_count + 1'b1;
            overflow_o <= 1'b1;
          end
        end
        step_idx <= step_idx + 1'b1;
        if (step_idx != SW'(STEPS_PER_WORD - 1)) begin
          acc[step_idx*STEP_BITS +: STEP_BITS] <= step_i;
        end else begin
          wr_en    <= !drop_now;
          wr_data  <= {step_i, acc};
          word_idx <= (word_idx == WW'(PKT_WORDS - 1)) ? '0 : word_idx + 1'b1;
        end
      end
    end
  end

  // ---------------- buffer ----------------
  logic  rd_en;
  word_t rd_data;

  packet_buffer #(
    .WIDTH (WORD_BITS),
    .DEPTH (BUF_DEPTH)
  ) u_buf (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (wr_en),
    .wr_data (wr_data),
    .rd_en   (rd_en),
    .rd_data (rd_data),
    .count   (buf_count),
    .full    (buf_full),
    .empty   (buf_empty)
  );

  // ---------------- framer ----------------
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} fr_state_t;
  fr_state_t     state;
  logic [WW-1:0] tx_idx;       // data word being sent

  assign tx_valid = (state != S_IDLE);
  assign tx_eof   = (state == S_DATA) && (tx_idx == WW'(PKT_WORDS - 1));
  assign tx_data  = (state == S_HDR) ? word_t'(pkt_count) : rd_data;
  assign rd_en    = (state == S_DATA) && tx_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      tx_idx    <= '0;
      pkt_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (buf_count >= (AW+1)'(PKT_WORDS)) state <= S_HDR;
        S_HDR:  if (tx_ready) begin
                  state  <= S_DATA;
                  tx_idx <= '0;
                end
        S_DATA: if (tx_ready) begin
                  tx_idx <= tx_idx + 1'b1;
                  if (tx_eof) begin
                    state     <= S_IDLE;
                    pkt_count <= pkt_count + 1'b1;
                  end
                end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A held word must not change until it is taken.
  a_tx_stable: assert property (@(posedge clk) disable iff (rst)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data) && $stable(tx_eof));
  // Only whole packets are ever read.
  a_no_underrun: assert property (@(posedge clk) disable iff (rst) !(rd_en && buf_empty));
  a_no_overrun:  assert property (@(posedge clk) disable iff (rst) !(wr_en && buf_full));

endmodule
