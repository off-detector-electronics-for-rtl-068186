// tb_ref_pkg: reference model of the sparsification and rejection steps,
// written as plain loops over a whole event, for the testbenches. It shares
// only the record type with the design.
package tb_ref_pkg;
  import csc_pkg::*;

  typedef int raw_ev_t [256][4];

  // clusters of one ASM board's event, in strip order
  function automatic void ref_clusters(
      input raw_ev_t raw, input int strips, input int spl, input int layer_base,
      input axis_e axis, input int thr [256], input int ped [256], input int gain [256],
      input int t_center, input int window, ref cluster_t q[$], output int n_found,
      output int n_rej);
    bit hit [256];
    bit flag [256];
    int corr [256][4];
    n_found = 0;
    n_rej = 0;
    for (int c = 0; c < strips; c++) begin
      int pk;
      pk = (raw[c][2] > raw[c][1]) ? raw[c][2] : raw[c][1];
      hit[c] = (pk > thr[c]) && (pk > raw[c][0]) && (pk > raw[c][3]);
      for (int k = 0; k < 4; k++) corr[c][k] = ((raw[c][k] - ped[c]) * gain[c]) >>> 12;
    end
    for (int c = 0; c < strips; c++) begin
      flag[c] = hit[c];
      if (c % spl != 0 && hit[c-1]) flag[c] = 1;
      if (c % spl != spl - 1 && c + 1 < strips && hit[c+1]) flag[c] = 1;
    end
    for (int c = 0; c < strips; c++) begin
      if (flag[c] && (c % spl == 0 || !flag[c-1])) begin
        int e, best, bamp, k, ym, y0, yp, d, t;
        cluster_t r;
        e = c;
        while (e + 1 < strips && (e + 1) % spl != 0 && flag[e+1]) e++;
        best = c;
        bamp = -1000000;
        for (int i = c; i <= e; i++) begin
          int a;
          a = (corr[i][2] > corr[i][1]) ? corr[i][2] : corr[i][1];
          if (a > bamp) begin bamp = a; best = i; end
        end
        k  = (corr[best][2] > corr[best][1]) ? 2 : 1;
        ym = corr[best][k-1]; y0 = corr[best][k]; yp = corr[best][k+1];
        d  = 2*y0 - ym - yp;
        t  = 50*k + ((d > 0) ? (25*(yp - ym)) / d : 0);
        n_found++;
        if (2*t >= 2*t_center - window && 2*t <= 2*t_center + window) begin
          r = '0;
          r.axis  = axis;
          r.layer = 2'(layer_base + c / spl);
          r.first = 8'(c % spl);
          r.last  = 8'(e % spl);
          r.peak  = 8'(best % spl);
          r.amp   = (y0 < 0) ? 16'h0 : (y0 > 65535) ? 16'hffff : 16'(y0);
          r.t_ns  = 10'(t);
          q.push_back(r);
        end else begin
          n_rej++;
        end
      end
    end
  endfunction

  // clusters of one chamber that have a partner in another layer
  function automatic bit has_partner(input cluster_t all[$], input int i, input int tol);
    for (int j = 0; j < all.size(); j++)
      if (all[j].axis == all[i].axis && all[j].layer != all[i].layer &&
          int'(all[j].first) <= int'(all[i].last) + tol &&
          int'(all[j].last) + tol >= int'(all[i].first))
        return 1;
    return 0;
  endfunction

  // track bookkeeping: cluster i starts a track if it has a partner and no
  // partner before it in arrival order; the track covers i's layer and the
  // layers of its partners. Adds to tracks[axis] and hits[axis][layer].
  function automatic void ref_tracks(input cluster_t all[$], ref int tracks[2],
                                     ref int hits[2][4]);
    for (int i = 0; i < all.size(); i++) begin
      bit first_ok, any;
      bit [3:0] lay;
      first_ok = 1; any = 0; lay = 4'b0001 << all[i].layer;
      for (int j = 0; j < all.size(); j++)
        if (all[j].axis == all[i].axis && all[j].layer != all[i].layer &&
            int'(all[j].first) <= int'(all[i].last) &&
            int'(all[j].last) >= int'(all[i].first)) begin
          any = 1; lay[all[j].layer] = 1;
          if (j < i) first_ok = 0;
        end
      if (any && first_ok) begin
        tracks[all[i].axis]++;
        for (int l = 0; l < 4; l++) if (lay[l]) hits[all[i].axis][l]++;
      end
    end
  endfunction

  // a bipolar-looking pulse: positive lobe peaking between samples 1 and 2
  function automatic void make_pulse(input int ped, input int amp, input int shape,
                                     output int unsigned s [4]);
    case (shape)
      0: begin s[0] = ped + amp*3/10; s[1] = ped + amp;    s[2] = ped + amp*9/10; s[3] = ped; end
      1: begin s[0] = ped + amp/8; s[1] = ped + amp*3/4;   s[2] = ped + amp;   s[3] = ped + amp/4; end
      2: begin s[0] = ped;         s[1] = ped + amp*9/10;  s[2] = ped + amp;   s[3] = ped + amp/3; end
      default: begin // out of time: rising through the last sample
        s[0] = ped; s[1] = ped + amp/10; s[2] = ped + amp; s[3] = ped + amp*95/100; end
    endcase
  endfunction
endpackage
