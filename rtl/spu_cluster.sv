// spu_cluster: second sparsification step of an SPU.
//
// Takes the flagged channel stream of spu_threshold. Contiguous flagged
// channels of one layer form a cluster. For each cluster the channel with the
// largest signal (the larger of its corrected second and third samples) is
// kept, and a parabola through that channel's three samples around its
// maximum (samples k-1, k, k+1, with k = 1 or 2) gives the peaking time:
//   t = 50*k + 25*(y[k+1] - y[k-1]) / (2*y[k] - y[k-1] - y[k+1])   [ns]
// A cluster whose peaking time lies outside a WINDOW_NS wide window centred
// on T_CENTER_NS is rejected as not belonging to the triggered crossing. The
// clustering, the parabola on the largest samples and the 35 ns window
// follow the document; the window centre and the integer arithmetic
// (division truncating toward zero) are this design's choices.
//
// Output: one cluster_t per kept cluster, registered, one cycle after the
// channel that closes it. evt_done pulses two cycles after the last channel
// of an event, after any cluster of that event. Counters give clusters found
// and rejected by the time window. Two output bits are constant by design:
// is_end is always 0 here (spu adds the end record) and axis is the AXIS
// parameter.
module spu_cluster
  import csc_pkg::*;
#(
  parameter int unsigned CORR_W      = 18,
  parameter axis_e       AXIS        = AXIS_PREC,
  parameter int          T_CENTER_NS = 75,
  parameter int          WINDOW_NS   = 35
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [STRIP_BITS-1:0]   in_strip,
  input  logic [1:0]              in_layer,
  input  logic                    in_flag,
  input  logic signed [CORR_W-1:0] in_corr [N_SAMPLES],
  input  logic                    in_layer_last,
  input  logic                    in_evt_last,
  output logic                    out_valid,
  output cluster_t                out_cluster,
  output logic                    evt_done,
  output logic [15:0]             n_found,
  output logic [15:0]             n_rejected
);
  typedef logic signed [CORR_W-1:0] corr_t;

  function automatic corr_t peak_of(input corr_t s1, input corr_t s2);
    return (s2 > s1) ? s2 : s1;
  endfunction

  // cluster being built
  logic                  active;
  logic [STRIP_BITS-1:0] c_first, c_best;
  logic [1:0]            c_layer;
  corr_t                 c_amp;
  corr_t                 c_y [N_SAMPLES];

  // cluster after taking the current channel
  logic                  n_active;
  logic [STRIP_BITS-1:0] n_first, n_best;
  logic [1:0]            n_layer;
  corr_t                 n_amp, in_amp;
  corr_t                 n_y [N_SAMPLES];
  logic                  close_now;

  always_comb begin
    in_amp   = peak_of(in_corr[1], in_corr[2]);
    n_first  = c_first;
    n_best   = c_best;
    n_layer  = c_layer;
    n_amp    = c_amp;
    n_y      = c_y;
    if (in_flag && !active) begin
      n_first = in_strip;
      n_best  = in_strip;
      n_layer = in_layer;
      n_amp   = in_amp;
      n_y     = in_corr;
    end else if (in_flag && in_amp > c_amp) begin
      n_best  = in_strip;
      n_amp   = in_amp;
      n_y     = in_corr;
    end
    // a cluster ends at an unflagged channel or at the end of a layer
    close_now = in_valid && (in_flag ? (in_layer_last || in_evt_last) : active);
    n_active  = in_valid ? (in_flag && !(in_layer_last || in_evt_last)) : active;
  end

  // record of the cluster that closes now
  logic [STRIP_BITS-1:0] r_first, r_last, r_best;
  logic [1:0]            r_layer;
  corr_t                 r_y [N_SAMPLES];
  always_comb begin
    if (in_flag) begin
      r_first = n_first; r_last = in_strip; r_best = n_best; r_layer = n_layer; r_y = n_y;
    end else begin
      // the cluster ended with the previous channel
      r_first = c_first; r_last = in_strip - 1'b1; r_best = c_best; r_layer = c_layer; r_y = c_y;
    end
  end

  // parabola through the three samples around the maximum
  logic signed [CORR_W+7:0] den, num, quo, t_full;
  logic [1:0] k;
  corr_t ym, y0, yp;
  logic keep;
  always_comb begin
    k   = (r_y[2] > r_y[1]) ? 2'd2 : 2'd1;
    ym  = r_y[k-1];
    y0  = r_y[k];
    yp  = r_y[k+1];
    den = 2 * (CORR_W+8)'(y0) - (CORR_W+8)'(ym) - (CORR_W+8)'(yp);
    num = 25 * ((CORR_W+8)'(yp) - (CORR_W+8)'(ym));
    quo = (den > 0) ? num / den : 0;
    t_full = 50 * (CORR_W+8)'(signed'({1'b0, k})) + quo;
    keep = (2 * t_full >= 2 * T_CENTER_NS - WINDOW_NS) &&
           (2 * t_full <= 2 * T_CENTER_NS + WINDOW_NS);
  end

  logic done_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      c_first     <= '0;
      c_best      <= '0;
      c_layer     <= '0;
      c_amp       <= '0;
      for (int i = 0; i < N_SAMPLES; i++) c_y[i] <= '0;
      out_valid   <= 1'b0;
      out_cluster <= '0;
      evt_done    <= 1'b0;
      done_d      <= 1'b0;
      n_found     <= '0;
      n_rejected  <= '0;
    end else begin
      if (in_valid) begin
        active  <= n_active;
        c_first <= n_first;
        c_best  <= n_best;
        c_layer <= n_layer;
        c_amp   <= n_amp;
        c_y     <= n_y;
      end
      out_valid <= close_now && keep;
      if (close_now) begin
        n_found <= n_found + 1'b1;
        if (!keep) n_rejected <= n_rejected + 1'b1;
        out_cluster.is_end <= 1'b0;
        out_cluster.axis   <= AXIS;
        out_cluster.layer  <= r_layer;
        out_cluster.first  <= r_first;
        out_cluster.last   <= r_last;
        out_cluster.peak   <= r_best;
        out_cluster.amp    <= (y0 < 0) ? '0 :
                              (y0 > corr_t'(2**AMP_BITS - 1)) ? '1 : AMP_BITS'(y0);
        out_cluster.t_ns   <= (t_full > 511) ? 10'sd511 :
                              (t_full < -512) ? -10'sd512 : TIME_BITS'(t_full);
      end
      done_d   <= in_valid && in_evt_last;
      evt_done <= done_d;
    end
  end
endmodule
