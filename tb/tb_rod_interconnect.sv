// tb_rod_interconnect: checks the reset routing (line i from Transition
// Module line i for the first 170 output lines, zero above), then
// reprogrammes lines to other Transition Module lines, to DSP test lines and
// to nothing, and checks the one-cycle registered outputs against a model
// of the routing table kept in the testbench.
module tb_rod_interconnect;
  localparam int N_IN = 192, N_OUT = 13 * 17, N_SRC = N_IN + N_OUT;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N_IN-1:0]  tm_lines;
  logic [N_OUT-1:0] test_lines, dsp_lines;
  logic cfg_we;
  logic [15:0] cfg_addr, cfg_src;
  rod_interconnect dut (.*);

  int checks = 0, failures = 0;
  int route [N_OUT];

  task automatic check_all();
    logic [N_IN+N_OUT-1:0] all;
    @(negedge clk);
    tm_lines = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    test_lines = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    all = {test_lines, tm_lines};
    @(negedge clk);
    for (int o = 0; o < N_OUT; o++) begin
      logic e;
      e = (route[o] < N_SRC) ? all[route[o]] : 1'b0;
      checks++;
      if (dsp_lines[o] !== e) begin failures++; $display("FAIL line %0d", o); end
    end
  endtask

  initial begin
    tm_lines = '0; test_lines = '0; cfg_we = 0; cfg_addr = 0; cfg_src = 0;
    for (int o = 0; o < N_OUT; o++) route[o] = (o < 170) ? o : N_SRC;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (4) check_all();
    for (int n = 0; n < 300; n++) begin
      int o, s;
      o = $urandom_range(0, N_OUT - 1);
      s = $urandom_range(0, N_SRC + 20);
      @(negedge clk) cfg_we = 1; cfg_addr = 16'(o); cfg_src = 16'(s);
      route[o] = (s < N_SRC) ? s : N_SRC;
      @(negedge clk) cfg_we = 0;
      if (n % 30 == 0) check_all();
    end
    repeat (8) check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
