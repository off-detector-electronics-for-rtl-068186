// tb_rpu: sends random cluster records from five SPUs (four precision
// layers and the transverse SPU) followed by their end records, and checks
// that exactly the clusters with an overlapping cluster of the same
// orientation in another layer come out, in arrival order, followed by the
// end record and evt_done. Also checks that input is held off during the
// search and that the search takes one cycle per stored cluster, and
// compares the track and per-layer track-hit counters with the reference.
module tb_rpu;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, evt_done;
  cluster_t in_rec, out_rec;
  logic [15:0] n_kept, n_removed, n_overflow;
  logic [15:0] n_tracks [2], trk_layer_hits [2][4];
  int exp_tracks [2] = '{0, 0};
  int exp_hits [2][4] = '{default: 0};
  rpu #(.MAX_CLUSTERS(32)) dut (.*);

  int checks = 0, failures = 0;
  cluster_t expq [$];
  int ends_seen = 0, dones = 0, tot_kept = 0, tot_rem = 0;
  int search_cycles = 0, last_n = 0, max_extra = 0;

  // all sampling at the falling edge: what is seen here is what the design
  // sees at the next rising edge
  always @(negedge clk) if (rst_n) begin
    out_ready = ($urandom_range(0, 3) != 0);
    if (out_valid && out_ready) begin
      checks++;
      if (out_rec.is_end) begin
        ends_seen++;
        if (expq.size() != 0) begin failures++; $display("FAIL end early, %0d missing", expq.size()); expq.delete(); end
      end else if (expq.size() == 0 || out_rec != expq[0]) begin
        failures++; $display("FAIL out %p", out_rec);
        if (expq.size() > 0) void'(expq.pop_front());
      end else void'(expq.pop_front());
    end
    if (evt_done) dones++;
    if (dut.state == 2'd2) search_cycles++;   // R_SEARCH
  end

  // called at a falling edge; returns at the falling edge after the transfer
  task automatic send(input cluster_t r);
    in_valid = 1; in_rec = r;
    while (!in_ready) @(negedge clk);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_rec = '0; out_ready = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int ev = 0; ev < 20; ev++) begin
      cluster_t all [$];
      int n;
      all.delete();
      n = $urandom_range(0, 30);
      for (int i = 0; i < n; i++) begin
        cluster_t c;
        int f;
        c = '0;
        c.axis  = axis_e'($urandom_range(0, 1));
        c.layer = 2'($urandom_range(0, 3));
        f = $urandom_range(0, c.axis ? 47 : 191);
        c.first = 8'(f);
        c.last  = 8'(f + $urandom_range(0, 3));
        c.peak  = c.first;
        c.amp   = 16'($urandom);
        c.t_ns  = 10'($urandom_range(58, 92));
        all.push_back(c);
      end
      for (int i = 0; i < n; i++) if (has_partner(all, i, 0)) begin
        expq.push_back(all[i]); tot_kept++;
      end else tot_rem++;
      ref_tracks(all, exp_tracks, exp_hits);
      search_cycles = 0;
      // interleave the five end records with the clusters
      for (int i = 0; i < n; i++) begin
        send(all[i]);
        if (i < 4 && i < n) begin cluster_t e; e = '0; e.is_end = 1; send(e); end
      end
      for (int k = (n < 4 ? n : 4); k < 5; k++) begin cluster_t e; e = '0; e.is_end = 1; send(e); end
      wait (dones == ev + 1);
      checks++;
      if (search_cycles != n + 1) begin failures++; $display("FAIL search %0d cycles for %0d", search_cycles, n); end
      repeat (3) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    checks += 4;
    if (ends_seen != 20) begin failures++; $display("FAIL ends %0d", ends_seen); end
    if (expq.size() != 0) begin failures++; $display("FAIL missing %0d", expq.size()); end
    if (n_kept != 16'(tot_kept) || n_removed != 16'(tot_rem)) begin failures++; $display("FAIL counters"); end
    for (int a = 0; a < 2; a++) begin
      checks++;
      if (n_tracks[a] != 16'(exp_tracks[a])) begin failures++; $display("FAIL tracks[%0d] %0d exp %0d", a, n_tracks[a], exp_tracks[a]); end
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (trk_layer_hits[a][l] != 16'(exp_hits[a][l])) begin failures++; $display("FAIL hits[%0d][%0d] %0d exp %0d", a, l, trk_layer_hits[a][l], exp_hits[a][l]); end
      end
    end
    $display("tracks %0d/%0d", exp_tracks[0], exp_tracks[1]);
    if (tot_kept == 0 || tot_rem == 0) begin failures++; $display("FAIL test did not both keep and remove"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
