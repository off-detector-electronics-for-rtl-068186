// rpu: Rejection Processing Unit for one chamber.
//
// Muons cross all four layers of a chamber, neutrons usually leave a hit in
// one layer only. The RPU collects the cluster records that the chamber's
// five SPUs send over the Data Exchange and waits until it has an
// end-of-event record from each of them. It then examines each stored
// cluster in turn and compares it, in one cycle, with all stored clusters of
// the same strip orientation in the other three layers; two clusters overlap
// when their strip ranges, widened by OVERLAP_TOL strips, intersect. Clusters
// with an overlap are passed on, isolated ones are removed. An end-of-event
// record follows the kept clusters and evt_done pulses. Collecting from five
// SPUs, the overlap search over the other three layers and the removal of
// isolated clusters follow the document; the storage size, the overlap
// tolerance and the one-cluster-per-cycle search are this design's choices.
// Clusters beyond MAX_CLUSTERS in one event are dropped and counted.
//
// Track monitoring: overlapping clusters form a track. A kept cluster that
// has no overlapping partner stored before it starts a track; the track is
// that cluster and the clusters overlapping it. For every track the RPU
// counts one track of its orientation (n_tracks[axis]) and one hit for each
// layer the track has a cluster in (trk_layer_hits[axis][layer]), so
// trk_layer_hits/n_tracks is the layer efficiency. Saving overlapping groups
// as tracks for efficiency monitoring follows the document; this grouping
// rule and the counters as the form of the record are this design's choice.
//
// Timing: the search starts when the output FIFO is empty and takes one cycle
// per stored cluster. in_ready is low from the last end record until the
// search is over.
module rpu
  import csc_pkg::*;
#(
  parameter int unsigned N_SPU        = 5,
  parameter int unsigned MAX_CLUSTERS = 128,
  parameter int unsigned OVERLAP_TOL  = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cluster_t    in_rec,
  output logic        in_ready,
  output logic        out_valid,
  output cluster_t    out_rec,
  input  logic        out_ready,
  output logic        evt_done,
  output logic [15:0] n_kept,
  output logic [15:0] n_removed,
  output logic [15:0] n_overflow,
  output logic [15:0] n_tracks       [2],
  output logic [15:0] trk_layer_hits [2][4]
);
  localparam int unsigned NW  = $clog2(MAX_CLUSTERS + 1);
  localparam int unsigned EW  = $clog2(N_SPU + 1);
  localparam int unsigned OD  = MAX_CLUSTERS + 1;

  cluster_t          store [MAX_CLUSTERS];
  logic [NW-1:0]     n, idx;
  logic [EW-1:0]     ends;

  typedef enum logic [1:0] {R_COLLECT, R_WAIT, R_SEARCH, R_END} state_e;
  state_e state;

  logic fifo_push, fifo_pop, fifo_empty, fifo_full;
  cluster_t fifo_wdata;
  logic [$clog2(OD+1)-1:0] fifo_count;

  assign in_ready = (state == R_COLLECT);

  // overlap of cluster idx with any other stored cluster
  // (earlier: an overlapping cluster stored before it; layers: the layers of
  // the cluster and its partners)
  cluster_t   cur;
  logic       overlap, earlier;
  logic [3:0] layers;
  always_comb begin
    cur     = store[idx[$clog2(MAX_CLUSTERS)-1:0]];
    overlap = 1'b0;
    earlier = 1'b0;
    layers  = 4'b0001 << cur.layer;
    for (int j = 0; j < MAX_CLUSTERS; j++) begin
      if (NW'(j) < n && store[j].axis == cur.axis && store[j].layer != cur.layer &&
          (32'(store[j].first) <= 32'(cur.last) + OVERLAP_TOL) &&
          (32'(store[j].last) + OVERLAP_TOL >= 32'(cur.first))) begin
        overlap = 1'b1;
        if (NW'(j) < idx) earlier = 1'b1;
        layers[store[j].layer] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (state == R_COLLECT && in_valid && !in_rec.is_end && n < NW'(MAX_CLUSTERS))
      store[n[$clog2(MAX_CLUSTERS)-1:0]] <= in_rec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= R_COLLECT;
      n          <= '0;
      idx        <= '0;
      ends       <= '0;
      evt_done   <= 1'b0;
      n_kept     <= '0;
      n_removed  <= '0;
      n_overflow <= '0;
      n_tracks       <= '{default: '0};
      trk_layer_hits <= '{default: '0};
    end else begin
      evt_done <= 1'b0;
      case (state)
        R_COLLECT: if (in_valid) begin
          if (in_rec.is_end) begin
            ends <= ends + 1'b1;
            if (ends == EW'(N_SPU - 1)) state <= R_WAIT;
          end else if (n < NW'(MAX_CLUSTERS)) begin
            n <= n + 1'b1;
          end else begin
            n_overflow <= n_overflow + 1'b1;
          end
        end
        R_WAIT: if (fifo_empty) begin
          idx   <= '0;
          state <= R_SEARCH;
        end
        R_SEARCH: if (idx == n) begin
          state <= R_END;
        end else begin
          idx <= idx + 1'b1;
          if (overlap) n_kept    <= n_kept + 1'b1;
          else         n_removed <= n_removed + 1'b1;
          if (overlap && !earlier) begin
            n_tracks[cur.axis] <= n_tracks[cur.axis] + 1'b1;
            for (int l = 0; l < 4; l++)
              if (layers[l])
                trk_layer_hits[cur.axis][l] <= trk_layer_hits[cur.axis][l] + 1'b1;
          end
        end
        R_END: begin
          evt_done <= 1'b1;
          n        <= '0;
          ends     <= '0;
          state    <= R_COLLECT;
        end
        default: state <= R_COLLECT;
      endcase
    end
  end

  cluster_t end_rec;
  always_comb begin
    end_rec        = '0;
    end_rec.is_end = 1'b1;
  end
  assign fifo_push  = (state == R_SEARCH && idx != n && overlap) || (state == R_END);
  assign fifo_wdata = (state == R_END) ? end_rec : cur;
  assign fifo_pop   = out_valid && out_ready;
  assign out_valid  = !fifo_empty;

  sync_fifo #(.WIDTH(CLUSTER_BITS), .DEPTH(OD)) u_out (
    .clk, .rst_n, .push(fifo_push), .wr_data(fifo_wdata), .pop(fifo_pop),
    .rd_data(out_rec), .empty(fifo_empty), .full(fifo_full), .count(fifo_count));
endmodule
