// tb_gpu_input: sends events on the 17 lines, checks the rebuilt 32-bit
// words, reads every channel's four samples back from the input buffer,
// and checks that a third event arriving while both buffers are full is
// dropped and counted, and that buffers are reused after release.
module tb_gpu_input;
  import csc_pkg::*;
  localparam int STRIPS = 192;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [16:0] lines;
  logic word_valid, evt_avail, rd_en, evt_release;
  logic [31:0] word;
  logic [7:0] rd_ch;
  samples_t rd_samples;
  logic [15:0] dropped_events;
  gpu_input #(.STRIPS(STRIPS)) dut (.*);

  int checks = 0, failures = 0;
  int ev [4][STRIPS][4];
  logic [31:0] wq [$];

  always @(negedge clk) if (rst_n && word_valid) begin
    checks++;
    if (wq.size() == 0 || word != wq[0]) begin failures++; $display("FAIL word %h exp %h", word, wq[0]); end
    if (wq.size() > 0) void'(wq.pop_front());
  end

  task automatic send(input int e);
    for (int w = 0; w < STRIPS * 2; w++) begin
      logic [15:0] a, b;
      a = {4'h0, 12'(ev[e][w/4][w%4])};
      b = {4'h0, 12'(ev[e][STRIPS/2 + w/4][w%4])};
      wq.push_back({b, a});
      @(negedge clk) lines = {1'b1, a};
      @(negedge clk) lines = {1'b0, b};
      if (w % 7 == 3) @(negedge clk) lines = '0;   // idle word period
    end
    @(negedge clk) lines = '0;
  endtask

  task automatic readback(input int e);
    checks++;
    if (!evt_avail) begin failures++; $display("FAIL event %0d not available", e); end
    for (int c = 0; c < STRIPS; c++) begin
      @(negedge clk) rd_en = 1; rd_ch = 8'(c);
      @(negedge clk) rd_en = 0;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (rd_samples[k] != 12'(ev[e][c][k])) begin
          failures++; $display("FAIL ev %0d ch %0d s %0d: %0d", e, c, k, rd_samples[k]);
        end
      end
    end
    @(negedge clk) evt_release = 1;
    @(negedge clk) evt_release = 0;
  endtask

  initial begin
    lines = '0; rd_en = 0; rd_ch = 0; evt_release = 0;
    for (int e = 0; e < 4; e++)
      for (int c = 0; c < STRIPS; c++)
        for (int k = 0; k < 4; k++) ev[e][c][k] = $urandom_range(0, 4095);
    repeat (2) @(negedge clk); rst_n = 1;
    send(0); send(1);
    begin
      // third event with both buffers full: dropped, no words stored
      for (int w = 0; w < STRIPS * 2; w++) wq.push_back({4'h0, 12'(ev[2][STRIPS/2 + w/4][w%4]), 4'h0, 12'(ev[2][w/4][w%4])});
      for (int w = 0; w < STRIPS * 2; w++) begin
        @(negedge clk) lines = {1'b1, 4'h0, 12'(ev[2][w/4][w%4])};
        @(negedge clk) lines = {1'b0, 4'h0, 12'(ev[2][STRIPS/2 + w/4][w%4])};
      end
      @(negedge clk) lines = '0;
    end
    checks++;
    if (dropped_events != 1) begin failures++; $display("FAIL dropped %0d", dropped_events); end
    readback(0);
    send(3);
    readback(1);
    readback(3);
    checks++;
    if (evt_avail) begin failures++; $display("FAIL buffers not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
