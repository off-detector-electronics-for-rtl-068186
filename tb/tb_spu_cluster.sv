// tb_spu_cluster: feeds a hand-made flagged channel stream and checks the
// clusters, the largest-channel choice, the parabola peaking times (worked
// out by hand) and the 35 ns window around 75 ns, including a cluster split
// by a layer boundary.
module tb_spu_cluster;
  import csc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_flag, in_layer_last, in_evt_last;
  logic [7:0] in_strip;
  logic [1:0] in_layer;
  logic signed [17:0] in_corr [4];
  logic out_valid, evt_done;
  cluster_t out_cluster;
  logic [15:0] n_found, n_rejected;

  spu_cluster dut (.*);

  int checks = 0, failures = 0;
  // per strip: flag and four samples (strips 0..16, layer boundary after 15)
  int ys [17][4];
  bit fl [17];
  cluster_t exp_q [$];
  int dones = 0;

  function automatic cluster_t mk(int l, int f, int la, int p, int a, int t);
    cluster_t c;
    c = '0; c.layer = 2'(l); c.first = 8'(f); c.last = 8'(la); c.peak = 8'(p);
    c.amp = 16'(a); c.t_ns = 10'(t);
    return c;
  endfunction

  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra cluster"); end
      else if (out_cluster != exp_q[0]) begin
        failures++; $display("FAIL got %p exp %p", out_cluster, exp_q[0]);
        void'(exp_q.pop_front());
      end else void'(exp_q.pop_front());
    end
    if (evt_done) dones++;
  end

  initial begin
    for (int s = 0; s < 17; s++) begin fl[s] = 0; ys[s] = '{0, 0, 0, 0}; end
    fl[3] = 1; ys[3] = '{0, 60, 50, 0};
    fl[4] = 1; ys[4] = '{0, 100, 100, 0};      // t = 50 + 25*100/100 = 75
    fl[5] = 1; ys[5] = '{0, 90, 20, 0};
    fl[9] = 1; ys[9] = '{0, 100, 50, 0};       // t = 50 + 1250/150 = 58
    fl[12] = 1; ys[12] = '{0, 50, 100, 90};    // t = 100 + 1000/60 = 116: rejected
    fl[14] = 1; ys[14] = '{0, 40, 80, 0};      // t = 100 - 1000/120 = 92
    fl[15] = 1; ys[15] = '{0, 30, 20, 0};
    fl[16] = 1; ys[16] = '{10, 200, 100, 10};  // t = 50 + 2250/290 = 57: rejected
    exp_q.push_back(mk(0, 3, 5, 4, 100, 75));
    exp_q.push_back(mk(0, 9, 9, 9, 100, 58));
    exp_q.push_back(mk(0, 14, 15, 14, 80, 92));
    in_valid = 0; in_flag = 0; in_layer_last = 0; in_evt_last = 0; in_strip = 0; in_layer = 0;
    for (int k = 0; k < 4; k++) in_corr[k] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 17; s++) begin
      @(negedge clk);
      in_valid = 1; in_strip = 8'(s); in_layer = (s < 16) ? 2'd0 : 2'd1; in_flag = fl[s];
      for (int k = 0; k < 4; k++) in_corr[k] = 18'(ys[s][k]);
      in_layer_last = (s == 15); in_evt_last = (s == 16);
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    checks += 4;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d clusters missing", exp_q.size()); end
    if (n_found != 5) begin failures++; $display("FAIL found %0d", n_found); end
    if (n_rejected != 2) begin failures++; $display("FAIL rejected %0d", n_rejected); end
    if (dones != 1) begin failures++; $display("FAIL evt_done %0d", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
