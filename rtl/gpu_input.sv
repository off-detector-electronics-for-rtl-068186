// gpu_input: input side of a DSP module (expansion-bus FPGA and input buffer).
//
// The 17 lines routed to a DSP module carry, in two consecutive line-clock
// cycles, the two 16-bit G-Link words of one word period (see tm_link_mux).
// This block rebuilds the 32-bit word {word_b, word_a}, as the document says
// the module's FPGAs do, and stores it in the input buffer. The buffer holds
// NUM_BUFS whole events so one can be filled while another is processed; an
// event that finds no free buffer is dropped and counted.
//
// Event layout (this design's choice; the document does not give the link
// format): an event is STRIPS*N_SAMPLES/2 words. Link A carries channels
// 0..STRIPS/2-1 and link B the upper half, each channel as its four samples
// in time order, the 12-bit ADC value in bits 11:0 of the word.
//
// Read side: evt_avail says the oldest stored event is complete; rd_en with
// rd_ch returns that channel's four samples on rd_samples one cycle later;
// evt_release frees the buffer.
module gpu_input
  import csc_pkg::*;
#(
  parameter int unsigned STRIPS   = 192,
  parameter int unsigned NUM_BUFS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [16:0] lines,
  output logic        word_valid,     // rebuilt 32-bit word, for monitoring
  output logic [31:0] word,
  output logic        evt_avail,
  input  logic        rd_en,
  input  logic [$clog2(STRIPS)-1:0] rd_ch,
  output samples_t    rd_samples,
  input  logic        evt_release,
  output logic [15:0] dropped_events
);
  localparam int unsigned HALF  = STRIPS / 2;
  localparam int unsigned WORDS = HALF * N_SAMPLES;
  localparam int unsigned WCW   = $clog2(WORDS + 1);
  localparam int unsigned BW    = (NUM_BUFS > 1) ? $clog2(NUM_BUFS) : 1;

  // mem[buffer][half][channel] = four samples
  samples_t mem [NUM_BUFS][2][HALF];

  logic [15:0]      word_a;
  logic             have_a;
  logic [WCW-1:0]   wcount;
  logic [BW-1:0]    wbuf, rbuf;
  logic [NUM_BUFS-1:0] full;
  logic             discard;

  logic [$clog2(HALF)-1:0]      wch;
  logic [1:0]                   ws;
  assign wch = ($clog2(HALF))'(wcount / N_SAMPLES);
  assign ws  = 2'(wcount % N_SAMPLES);

  function automatic logic [BW-1:0] next_buf(input logic [BW-1:0] b);
    return (b == BW'(NUM_BUFS-1)) ? '0 : b + 1'b1;
  endfunction

  // word rebuild
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_a     <= '0;
      have_a     <= 1'b0;
      word_valid <= 1'b0;
      word       <= '0;
    end else begin
      word_valid <= 1'b0;
      if (lines[16]) begin
        word_a <= lines[15:0];
        have_a <= 1'b1;
      end else if (have_a) begin
        word       <= {lines[15:0], word_a};
        word_valid <= 1'b1;
        have_a     <= 1'b0;
      end
    end
  end

  // an event is discarded when its first word finds the next buffer full
  logic drop_now, store;
  assign drop_now = word_valid && (wcount == 0) && full[wbuf];
  assign store    = word_valid && !discard && !drop_now;

  // buffer write
  always_ff @(posedge clk) begin
    if (store) begin
      mem[wbuf][0][wch][ws] <= word[ADC_BITS-1:0];
      mem[wbuf][1][wch][ws] <= word[16+ADC_BITS-1:16];
    end
  end

  logic last_word;
  assign last_word = word_valid && (wcount == WCW'(WORDS-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcount         <= '0;
      wbuf           <= '0;
      rbuf           <= '0;
      full           <= '0;
      discard        <= 1'b0;
      dropped_events <= '0;
    end else begin
      if (word_valid) begin
        if (drop_now) begin
          discard        <= 1'b1;     // no free buffer for this event
          dropped_events <= dropped_events + 1'b1;
        end
        wcount <= last_word ? '0 : wcount + 1'b1;
        if (last_word) discard <= 1'b0;
      end
      if (last_word && store) begin
        full[wbuf] <= 1'b1;
        wbuf       <= next_buf(wbuf);
      end
      if (evt_release && full[rbuf]) begin
        full[rbuf] <= 1'b0;
        rbuf       <= next_buf(rbuf);
      end
    end
  end

  assign evt_avail = full[rbuf];

  always_ff @(posedge clk) begin
    if (rd_en) rd_samples <= (rd_ch < ($clog2(STRIPS))'(HALF)) ?
                             mem[rbuf][0][rd_ch[$clog2(HALF)-1:0]] :
                             mem[rbuf][1][($clog2(HALF))'(rd_ch - ($clog2(STRIPS))'(HALF))];
  end

  initial assert (STRIPS % 2 == 0) else $error("STRIPS must be even");
endmodule
