// tb_tm_link_mux: drives random G-Link word pairs at the 40 MHz word rate,
// with idle periods, and checks the 17-line pattern: A word with line 16 set,
// then B word with line 16 clear, zeros when idle.
module tb_tm_link_mux;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic word_en, valid;
  logic [15:0] word_a, word_b;
  logic [16:0] lines;
  tm_link_mux dut (.*);

  int checks = 0, failures = 0;
  logic [16:0] expq [$];

  always @(negedge clk) begin
    logic [16:0] e;
    #1;
    if (rst_n) begin
      e = (expq.size() > 0) ? expq.pop_front() : 17'h0;
      checks++;
      if (lines !== e) begin failures++; $display("FAIL lines %h exp %h at %0t chk %0d", lines, e, $time, checks); end
    end
  end

  initial begin
    word_en = 0; valid = 0; word_a = 0; word_b = 0;
    @(negedge clk); rst_n = 1;
    expq.push_back(17'h0);
    expq.push_back(17'h0);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      word_en = 1; valid = ($urandom_range(0, 3) != 0);
      word_a = 16'($urandom); word_b = 16'($urandom);
      if (valid) begin expq.push_back({1'b1, word_a}); expq.push_back({1'b0, word_b}); end
      else begin expq.push_back(17'h0); expq.push_back(17'h0); end
      @(negedge clk);
      word_en = 0; valid = 0;
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
