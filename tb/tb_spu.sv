// tb_spu: self-checking test of the Sparsification Processing Unit.
// Two SPUs, one precision (one layer of 192 strips) and one transverse (four
// layers of 48 strips), receive the same random events on their 17 lines.
// Every cluster record is compared with the loop-based reference model of
// tb_ref_pkg, the end-of-event record is checked, and the scan time is
// checked against the rate of one channel per clock.
module tb_spu;
  import csc_pkg::*;
  import tb_ref_pkg::*;

  localparam int STRIPS = 192;
  localparam int NEV    = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [16:0] lines;
  logic cfg_we;
  logic [1:0] cfg_sel;
  logic [7:0] cfg_addr;
  logic [15:0] cfg_data;
  logic     ov [2];
  cluster_t orec [2];
  logic [15:0] nev [2], nf [2], nr [2], dr [2];
  logic     busy [2];

  spu #(.STRIPS(STRIPS), .STRIPS_PER_LAYER(192), .LAYER_BASE(2), .AXIS(AXIS_PREC)) dut_p (
    .clk, .rst_n, .lines, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data,
    .out_valid(ov[0]), .out_rec(orec[0]), .out_ready(1'b1),
    .n_events(nev[0]), .n_found(nf[0]), .n_rejected(nr[0]), .dropped_events(dr[0]), .busy(busy[0]));
  spu #(.STRIPS(STRIPS), .STRIPS_PER_LAYER(48), .LAYER_BASE(0), .AXIS(AXIS_TRANS)) dut_t (
    .clk, .rst_n, .lines, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data,
    .out_valid(ov[1]), .out_rec(orec[1]), .out_ready(1'b1),
    .n_events(nev[1]), .n_found(nf[1]), .n_rejected(nr[1]), .dropped_events(dr[1]), .busy(busy[1]));

  int checks = 0, failures = 0;
  int thr [256], ped [256], gain [256];
  cluster_t expq [2][$];
  int tot_found [2], tot_rej [2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // collect outputs
  int got_end [2];
  always @(posedge clk) begin
    for (int u = 0; u < 2; u++) if (rst_n && ov[u]) begin
      if (orec[u].is_end) begin
        got_end[u]++;
        check(orec[u].axis == (u ? AXIS_TRANS : AXIS_PREC), "end record axis");
      end else begin
        cluster_t e;
        if (expq[u].size() == 0) check(0, $sformatf("unit %0d unexpected cluster", u));
        else begin
          e = expq[u].pop_front();
          check(orec[u] == e, $sformatf("unit %0d cluster got %p exp %p", u, orec[u], e));
        end
      end
    end
  end

  // scan time: busy high for at most STRIPS + 12 cycles per event
  int busy_len [2], max_busy [2];
  always @(posedge clk) for (int u = 0; u < 2; u++) begin
    if (busy[u]) busy_len[u]++;
    else begin
      if (busy_len[u] > max_busy[u]) max_busy[u] = busy_len[u];
      busy_len[u] = 0;
    end
  end

  task automatic send_event(input raw_ev_t raw);
    for (int w = 0; w < STRIPS * 2; w++) begin
      @(negedge clk) lines = {1'b1, 4'h0, 12'(raw[w/4][w%4])};
      @(negedge clk) lines = {1'b0, 4'h0, 12'(raw[STRIPS/2 + w/4][w%4])};
    end
    @(negedge clk) lines = '0;
  endtask

  initial begin
    raw_ev_t raw;
    int unsigned s [4];
    cluster_t q [$];
    int nf_ref, nr_ref;
    lines = '0; cfg_we = 0; cfg_sel = 0; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // calibration: pedestal around 200, threshold pedestal + 60, gains near 1
    for (int c = 0; c < STRIPS; c++) begin
      ped[c]  = 180 + (c * 7) % 40;
      thr[c]  = ped[c] + 60;
      gain[c] = 3800 + (c * 13) % 600;
      for (int t = 0; t < 3; t++) begin
        @(negedge clk);
        cfg_we = 1; cfg_sel = 2'(t); cfg_addr = 8'(c);
        cfg_data = 16'((t == 0) ? thr[c] : (t == 1) ? ped[c] : gain[c]);
      end
    end
    @(negedge clk) cfg_we = 0;
    for (int ev = 0; ev < NEV; ev++) begin
      for (int c = 0; c < STRIPS; c++)
        for (int k = 0; k < 4; k++) raw[c][k] = ped[c] + $urandom_range(0, 20) - 10;
      // hits: some isolated, some wide, some at layer edges, some out of time
      for (int h = 0; h < 8; h++) begin
        int c0, w;
        c0 = (h == 0) ? 47 : (h == 1) ? 48 : (h == 2) ? 0 : (h == 3) ? 191 : $urandom_range(0, STRIPS-1);
        w  = $urandom_range(1, 4);
        for (int c = c0; c < c0 + w && c < STRIPS; c++) begin
          make_pulse(ped[c], $urandom_range(150, 2500), (h == 5) ? 3 : $urandom_range(0, 2), s);
          for (int k = 0; k < 4; k++) raw[c][k] = (s[k] > 4095) ? 4095 : s[k];
        end
      end
      for (int u = 0; u < 2; u++) begin
        q.delete();
        ref_clusters(raw, STRIPS, u ? 48 : 192, u ? 0 : 2, u ? AXIS_TRANS : AXIS_PREC,
                     thr, ped, gain, 75, 35, q, nf_ref, nr_ref);
        foreach (q[i]) expq[u].push_back(q[i]);
        tot_found[u] += nf_ref;
        tot_rej[u] += nr_ref;
      end
      send_event(raw);
    end
    repeat (600) @(posedge clk);
    for (int u = 0; u < 2; u++) begin
      check(expq[u].size() == 0, $sformatf("unit %0d missing %0d clusters", u, expq[u].size()));
      check(got_end[u] == NEV, $sformatf("unit %0d end records %0d", u, got_end[u]));
      check(nev[u] == 16'(NEV), "event counter");
      check(nf[u] == 16'(tot_found[u]), $sformatf("unit %0d found %0d exp %0d", u, nf[u], tot_found[u]));
      check(nr[u] == 16'(tot_rej[u]), $sformatf("unit %0d rejected %0d exp %0d", u, nr[u], tot_rej[u]));
      check(tot_rej[u] > 0, "time window rejected something");
      check(max_busy[u] > STRIPS && max_busy[u] <= STRIPS + 12,
            $sformatf("unit %0d scan took %0d cycles", u, max_busy[u]));
      check(dr[u] == 0, "no dropped events");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
