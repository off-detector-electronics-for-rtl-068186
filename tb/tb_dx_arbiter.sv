// tb_dx_arbiter: five sources send numbered records through the arbiter to a
// destination that is randomly not ready. Checks that every record arrives
// once and in order per source, that a waiting source is served within five
// transfers (round robin), and that in_ready goes only to the shown source.
module tb_dx_arbiter;
  localparam int N = 5, W = 16, PER = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] in_valid, in_ready;
  logic [W-1:0] in_data [N];
  logic out_valid, out_ready;
  logic [W-1:0] out_data;
  logic [2:0] out_src;
  dx_arbiter #(.N_SRC(N), .WIDTH(W)) dut (.*);

  int checks = 0, failures = 0;
  int sent [N], rcvd [N], wait_xfers [N], max_wait = 0;

  // sources: record = {source, sequence}
  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < N; s++) begin
      if (in_valid[s] && in_ready_q[s]) sent[s]++;
      if (sent[s] < PER) begin
        if (!in_valid[s] || in_ready_q[s]) in_valid[s] = (sent[s] < PER) && ($urandom_range(0, 2) != 0);
        in_data[s] = 16'((s << 8) | sent[s]);
      end else in_valid[s] = 0;
    end
    out_ready = ($urandom_range(0, 3) != 0);
  end

  logic [N-1:0] in_ready_q;
  always @(posedge clk) begin
    in_ready_q <= in_ready;
    if (rst_n && out_valid && out_ready) begin
      int s, q;
      s = out_data[15:8]; q = out_data[7:0];
      checks += 3;
      if (s != int'(out_src)) begin failures++; $display("FAIL src"); end
      if (q != rcvd[s]) begin failures++; $display("FAIL order src %0d got %0d exp %0d", s, q, rcvd[s]); end
      if (in_ready != (N'(1) << s)) begin failures++; $display("FAIL ready"); end
      rcvd[s]++;
      for (int o = 0; o < N; o++) begin
        if (o == s) wait_xfers[o] = 0;
        else if (in_valid[o]) begin
          wait_xfers[o]++;
          if (wait_xfers[o] > max_wait) max_wait = wait_xfers[o];
        end
      end
    end
  end

  initial begin
    in_valid = '0; out_ready = 0;
    for (int s = 0; s < N; s++) in_data[s] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (2000) @(negedge clk);
    for (int s = 0; s < N; s++) begin
      checks++;
      if (rcvd[s] != PER) begin failures++; $display("FAIL source %0d got %0d", s, rcvd[s]); end
    end
    checks++;
    if (max_wait > N - 1) begin failures++; $display("FAIL waited %0d transfers", max_wait); end
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
