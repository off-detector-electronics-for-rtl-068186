// tm_link_mux: Transition Module routing of one ASM board onto the backplane.
//
// Each ASM board sends its data on two G-Links of 16-bit words at 40 Mwords/s.
// The Transition Module hands them to the ROD on 17 lines that run at twice
// the word rate (the document gives 170 lines for ten boards and more than
// 80 Mbit/s per line). This block time-multiplexes the two words of a word
// period onto 16 data lines and marks the first half with line 16:
//   cycle after word_en: lines = {1'b1, word_a}
//   next cycle:          lines = {1'b0, word_b}
// Idle periods carry all zeros. The split of the 17 lines into 16 data lines
// and one framing line is this design's reading of the 170-line figure.
//
// Interface: clk is the 80 MHz line clock; word_en is high one cycle in two
// (the 40 MHz word rate) and then word_a/word_b/valid hold a word pair.
// Latency: one cycle to the first half, two to the second.
module tm_link_mux (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        word_en,
  input  logic        valid,
  input  logic [15:0] word_a,
  input  logic [15:0] word_b,
  output logic [16:0] lines
);
  logic [15:0] hold_b;
  logic        second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lines  <= '0;
      hold_b <= '0;
      second <= 1'b0;
    end else if (word_en && valid) begin
      lines  <= {1'b1, word_a};
      hold_b <= word_b;
      second <= 1'b1;
    end else if (second) begin
      lines  <= {1'b0, hold_b};
      second <= 1'b0;
    end else begin
      lines  <= '0;
    end
  end

  a_word_rate: assert property (@(posedge clk) disable iff (!rst_n) word_en |=> !word_en);
endmodule
