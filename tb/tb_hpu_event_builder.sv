// tb_hpu_event_builder: two RPU models offer random kept clusters and an end
// record per event and pulse done. The testbench rebuilds every expected
// Readout Link word (header with marker, source, L1ID and BCID; two words
// per cluster, RPU 0 first; trailer with status and word count) and checks
// the stream, with the link randomly not ready. It also checks that nothing
// is sent before both RPUs are done.
module tb_hpu_event_builder;
  import csc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic l1a;
  logic [11:0] bcid;
  logic rpu_done [2], rpu_valid [2], rpu_ready [2];
  cluster_t rpu_rec [2];
  logic [15:0] status;
  logic rol_valid, rol_ctrl, rol_ready;
  logic [31:0] rol_data;
  logic [15:0] n_built, lost_triggers;
  hpu_event_builder #(.SOURCE_ID(32'h0069_0001)) dut (.*);

  int checks = 0, failures = 0;
  cluster_t rq [2][$];
  logic [32:0] expw [$];    // {ctrl, data}
  int words = 0;

  // RPU models: first-word-fall-through queues; sampling at the falling edge
  always @(negedge clk) begin
    rol_ready = ($urandom_range(0, 4) != 0);
    for (int r = 0; r < 2; r++) begin
      rpu_valid[r] = rq[r].size() > 0;
      rpu_rec[r]   = (rq[r].size() > 0) ? rq[r][0] : '0;
    end
    #1;
    if (rol_valid && rol_ready) begin
      checks++;
      words++;
      if (expw.size() == 0 || {rol_ctrl, rol_data} != expw[0]) begin
        failures++;
        $display("FAIL word %h exp %h", {rol_ctrl, rol_data}, expw.size() ? expw[0] : 33'h0);
      end
      if (expw.size()) void'(expw.pop_front());
    end
    for (int r = 0; r < 2; r++) if (rpu_ready[r] && rpu_valid[r]) void'(rq[r].pop_front());
  end

  initial begin
    l1a = 0; bcid = 0; status = 16'h0005;
    for (int r = 0; r < 2; r++) begin rpu_done[r] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int ev = 0; ev < 12; ev++) begin
      int n [2];
      logic [11:0] b;
      int nw;
      b = 12'($urandom);
      @(negedge clk) l1a = 1; bcid = b;
      @(negedge clk) l1a = 0;
      expw.push_back({1'b1, HDR_MARKER});
      expw.push_back({1'b1, 32'h0069_0001});
      expw.push_back({1'b1, 32'(ev)});
      expw.push_back({1'b1, 20'h0, b});
      nw = 0;
      for (int r = 0; r < 2; r++) begin
        n[r] = $urandom_range(0, 6);
        for (int i = 0; i < n[r]; i++) begin
          cluster_t c;
          c = cluster_t'({$urandom, $urandom});
          c.is_end = 0;
          rq[r].push_back(c);
          expw.push_back({1'b0, CLU_TAG, c.axis, c.layer, 1'b0, c.peak, c.first, c.last});
          expw.push_back({1'b0, c.amp, 6'h0, c.t_ns});
          nw += 2;
        end
        begin cluster_t e; e = '0; e.is_end = 1; rq[r].push_back(e); end
      end
      expw.push_back({1'b1, 32'h5});
      expw.push_back({1'b1, 32'(nw)});
      // RPU 0 done first; nothing may be sent until RPU 1 is done too
      @(negedge clk) rpu_done[0] = 1;
      @(negedge clk) rpu_done[0] = 0;
      repeat (10) @(negedge clk);
      checks++;
      if (expw.size() != 6 + nw) begin failures++; $display("FAIL sent before both RPUs done"); end
      rpu_done[1] = 1;
      @(negedge clk) rpu_done[1] = 0;
      wait (expw.size() == 0);
      repeat (3) @(negedge clk);
    end
    checks += 2;
    if (n_built != 12) begin failures++; $display("FAIL built %0d", n_built); end
    if (rq[0].size() + rq[1].size() != 0) begin failures++; $display("FAIL records left"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
