// tb_rod_top: end-to-end test of one ROD at its full default size (two
// chambers, ten ASM boards of 192 strips, SCA of 144 cells).
// For each event the testbench builds muon tracks (a cluster in every layer,
// precision and transverse), isolated neutron hits in a single layer, and
// out-of-time pulses, sends the ten boards' G-Link words, raises LVL1
// Accept, and checks the Readout Link output against the reference model:
// header, the kept clusters of chamber 0 then chamber 1 (compared as sets,
// since the Data Exchange order depends on arbitration), trailer with status
// and word count. It also checks the SCA read strobes, and counts each
// mechanism of the design, failing if one never happened: time-window cut,
// neutron removal, kept clusters, Data Exchange contention, Readout Link
// back-pressure, SCA readout, interconnect re-routing to DSP test lines,
// RPU track records (checked for consistency: each track spans at least two
// layers; the exact count depends on the Data Exchange arrival order).
module tb_rod_top;
  import csc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NEV = 4, NA = 10, STR = 192;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bc_en = 0, l1a = 0;
  logic [11:0] bcid = 0;
  logic link_valid [NA];
  logic [15:0] link_a [NA], link_b [NA];
  logic [16:0] sca_ctrl_word;
  logic sca_ctrl_valid, sca_busy;
  logic spu_cfg_we = 0;
  logic [3:0] spu_cfg_unit = 0;
  logic [1:0] spu_cfg_sel = 0;
  logic [7:0] spu_cfg_addr = 0;
  logic [15:0] spu_cfg_data = 0;
  logic ic_cfg_we = 0;
  logic [15:0] ic_cfg_addr = 0, ic_cfg_src = 0;
  logic [13*17-1:0] test_lines = '0;
  logic [3*17-1:0] spare_lines;
  logic rol_valid, rol_ctrl, rol_ready;
  logic [31:0] rol_data;
  logic [15:0] n_events_built, sca_lost_triggers, sca_write_overflows;
  logic [15:0] n_clusters_found [NA], n_clusters_timecut [NA], n_dropped_events [NA];
  logic [15:0] n_kept [2], n_removed [2];
  logic [15:0] n_tracks [2][2], trk_layer_hits [2][2][4];

  rod_top dut (.*);

  int checks = 0, failures = 0;
  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  // ---------------- mechanism counters ----------------
  int m_tracks, m_timecut, m_removed, m_kept, m_dx_contention, m_rol_stall, m_sca_reads, m_test_route;

  // bunch-crossing strobe: every second clock
  always @(posedge clk) bc_en <= !bc_en;

  always @(negedge clk) begin
    rol_ready = ($urandom_range(0, 5) != 0);
    if (rol_valid && !rol_ready) m_rol_stall++;
    if ($countones(dut.g_chamber[0].v) > 1 || $countones(dut.g_chamber[1].v) > 1) m_dx_contention++;
  end

  // ---------------- Readout Link receiver ----------------
  logic [32:0] rx [$];
  always @(negedge clk) begin
    #1;
    if (rol_valid && rol_ready) rx.push_back({rol_ctrl, rol_data});
  end

  // SCA read strobes
  always @(posedge clk) if (bc_en && sca_ctrl_valid && sca_ctrl_word[16]) m_sca_reads++;

  // ---------------- event generation ----------------
  raw_ev_t raw [NA];
  int thr [256], ped [256], gain [256];

  function automatic void put(int s, int ch, int amp, int shape);
    int unsigned v [4];
    make_pulse(0, amp, shape, v);
    for (int k = 0; k < 4; k++) raw[s][ch][k] = (v[k] > 4095) ? 4095 : int'(v[k]);
  endfunction

  task automatic make_event(input int ev);
    for (int s = 0; s < NA; s++)
      for (int c = 0; c < STR; c++)
        for (int k = 0; k < 4; k++) raw[s][c][k] = $urandom_range(0, 30);
    for (int ch = 0; ch < 2; ch++) begin
      // muon tracks: every precision layer and every transverse layer
      for (int t = 0; t < 2; t++) begin
        int p, q;
        p = $urandom_range(2, 185);
        q = $urandom_range(1, 45);
        for (int l = 0; l < 4; l++) begin
          put(5*ch + l, p + (l > 1 ? 1 : 0), $urandom_range(800, 3000), $urandom_range(0, 2));
          put(5*ch + l, p + 1 + (l > 1 ? 1 : 0), $urandom_range(300, 700), $urandom_range(0, 2));
          put(5*ch + 4, 48*l + q, $urandom_range(500, 2000), $urandom_range(0, 2));
        end
      end
      // neutrons: one layer only
      for (int n = 0; n < 3; n++)
        put(5*ch + $urandom_range(0, 4), $urandom_range(0, 191), $urandom_range(300, 2000), $urandom_range(0, 2));
      // out of time
      put(5*ch + $urandom_range(0, 3), $urandom_range(0, 191), 2000, 3);
    end
  endtask

  // expected kept clusters of one chamber
  task automatic expected(input int ch, ref cluster_t kept[$], ref int rej);
    cluster_t all [$];
    cluster_t q [$];
    int nf, nr;
    all.delete();
    kept.delete();
    for (int u = 0; u < 5; u++) begin
      q.delete();
      ref_clusters(raw[5*ch+u], STR, (u == 4) ? 48 : 192, (u == 4) ? 0 : u,
                   (u == 4) ? AXIS_TRANS : AXIS_PREC, thr, ped, gain, 75, 35, q, nf, nr);
      rej += nr;
      foreach (q[i]) all.push_back(q[i]);
    end
    for (int i = 0; i < all.size(); i++) if (has_partner(all, i, 0)) kept.push_back(all[i]);
  endtask

  // send the ten boards' words; board 0 optionally through DSP test lines
  task automatic send_links(input bit via_test);
    for (int w = 0; w < STR * 2; w++) begin
      @(negedge clk);
      while (!bc_en) @(negedge clk);
      for (int a = 0; a < NA; a++) begin
        link_valid[a] = !(via_test && a == 0);
        link_a[a] = 16'(raw[a][w/4][w%4]);
        link_b[a] = 16'(raw[a][STR/2 + w/4][w%4]);
      end
      if (via_test) test_lines[16:0] = {1'b1, 16'(raw[0][w/4][w%4])};
      @(negedge clk);
      if (via_test) test_lines[16:0] = {1'b0, 16'(raw[0][STR/2 + w/4][w%4])};
      for (int a = 0; a < NA; a++) link_valid[a] = 0;
    end
    @(negedge clk) test_lines = '0;
  endtask

  task automatic route_spu0(input bit to_test);
    for (int i = 0; i < 17; i++) begin
      @(negedge clk);
      ic_cfg_we = 1; ic_cfg_addr = 16'(i); ic_cfg_src = 16'(to_test ? 192 + i : i);
    end
    @(negedge clk) ic_cfg_we = 0;
  endtask

  initial begin
    int exp_rej = 0;
    for (int a = 0; a < NA; a++) begin link_valid[a] = 0; link_a[a] = 0; link_b[a] = 0; end
    for (int c = 0; c < 256; c++) begin thr[c] = 100; ped[c] = 0; gain[c] = 4096; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (400) @(negedge clk);    // SCA free list and latency pipeline fill
    for (int ev = 0; ev < NEV; ev++) begin
      cluster_t k0 [$], k1 [$];
      logic [11:0] b;
      bit via_test;
      int nw;
      via_test = (ev == 2);
      make_event(ev);
      expected(0, k0, exp_rej);
      expected(1, k1, exp_rej);
      if (via_test) begin route_spu0(1); m_test_route++; end
      b = 12'($urandom);
      @(negedge clk);
      while (!bc_en) @(negedge clk);
      l1a = 1; bcid = b;
      @(negedge clk) l1a = 0;
      send_links(via_test);
      if (via_test) route_spu0(0);
      // wait for header + clusters + trailer
      nw = 4 + 2 * (k0.size() + k1.size()) + 2;
      fork
        wait (rx.size() >= nw);
        repeat (20000) @(negedge clk);
      join_any
      disable fork;
      repeat (50) @(negedge clk);
      checks++;
      if (rx.size() != nw) fail($sformatf("event %0d: %0d words, expected %0d", ev, rx.size(), nw));
      else begin
        cluster_t exp_all [2][$];
        checks += 6;
        if (rx[0] != {1'b1, HDR_MARKER}) fail("header marker");
        if (rx[2] != {1'b1, 8'h0, 24'(ev)}) fail("L1ID");
        if (rx[3] != {1'b1, 20'h0, b}) fail("BCID");
        if (rx[nw-2] != {1'b1, 32'h0}) fail($sformatf("status %h", rx[nw-2]));
        if (rx[nw-1] != {1'b1, 32'(nw - 6)}) fail("word count");
        exp_all[0] = k0;
        exp_all[1] = k1;
        for (int i = 0; i < k0.size() + k1.size(); i++) begin
          logic [31:0] w0, w1;
          int side, found;
          w0 = rx[4 + 2*i][31:0];
          w1 = rx[5 + 2*i][31:0];
          side = (i < k0.size()) ? 0 : 1;
          found = -1;
          foreach (exp_all[side][j]) begin
            cluster_t c;
            c = exp_all[side][j];
            if (found < 0 && w0 == {CLU_TAG, c.axis, c.layer, 1'b0, c.peak, c.first, c.last} &&
                w1 == {c.amp, 6'h0, c.t_ns}) found = j;
          end
          checks++;
          if (found < 0) fail($sformatf("event %0d: unexpected cluster %h %h", ev, w0, w1));
          else exp_all[side].delete(found);
        end
      end
      rx.delete();
    end
    repeat (2000) @(negedge clk);
    m_timecut = 0;
    for (int s = 0; s < NA; s++) m_timecut += n_clusters_timecut[s];
    m_removed = n_removed[0] + n_removed[1];
    m_kept = n_kept[0] + n_kept[1];
    // every track has at least two layers, and no layer more hits than tracks
    m_tracks = 0;
    for (int c = 0; c < 2; c++) for (int a = 0; a < 2; a++) begin
      int h;
      h = 0;
      m_tracks += n_tracks[c][a];
      for (int l = 0; l < 4; l++) begin
        h += trk_layer_hits[c][a][l];
        checks++;
        if (trk_layer_hits[c][a][l] > n_tracks[c][a]) fail("layer hits above track count");
      end
      checks++;
      if (h < 2 * n_tracks[c][a]) fail("track with fewer than two layers");
    end
    checks += 5;
    if (m_tracks == 0) fail("no track recorded");
    if (n_events_built != NEV) fail("events built");
    if (m_timecut != exp_rej) fail($sformatf("time-window cuts %0d expected %0d", m_timecut, exp_rej));
    if (m_sca_reads != 4 * NEV) fail($sformatf("SCA reads %0d", m_sca_reads));
    if (sca_lost_triggers != 0 || sca_write_overflows != 0) fail("SCA errors");
    $display("tracks: %0d", m_tracks);
    $display("mechanisms: timecut=%0d removed=%0d kept=%0d dx_contention=%0d rol_stall=%0d sca_reads=%0d test_route=%0d",
             m_timecut, m_removed, m_kept, m_dx_contention, m_rol_stall, m_sca_reads, m_test_route);
    checks += 7;
    if (m_timecut == 0) fail("no time-window cut");
    if (m_removed == 0) fail("no neutron removal");
    if (m_kept == 0) fail("no kept cluster");
    if (m_dx_contention == 0) fail("no DX contention");
    if (m_rol_stall == 0) fail("no ROL back-pressure");
    if (m_sca_reads == 0) fail("no SCA readout");
    if (m_test_route == 0) fail("no test routing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
