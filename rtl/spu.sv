// spu: Sparsification Processing Unit for one ASM board.
//
// Receives the board's 17 backplane lines, buffers whole events (gpu_input),
// then scans the 192 channels of an event at one channel per cycle through
// the threshold/timing-cut/neighbour step (spu_threshold) and the clustering
// and peaking-time step (spu_cluster). Kept clusters go into an output FIFO
// towards the Data Exchange, followed by one end-of-event record. Per-channel
// threshold, pedestal and gain tables are loaded through a small write port.
// The document runs this algorithm as DSP software; here it is a pipeline
// with the same steps. A precision-strip SPU serves one layer (LAYER_BASE,
// 192 strips per layer); the transverse SPU serves four layers of 48 strips.
//
// Timing: an event is scanned in STRIPS cycles plus a few of pipeline, so the
// rate is one channel per clock. A scan starts only when the output FIFO has
// room for the largest number of clusters an event can hold, so the scan
// never stalls. cfg_sel: 0 threshold, 1 pedestal, 2 gain.
module spu
  import csc_pkg::*;
#(
  parameter int unsigned STRIPS           = 192,
  parameter int unsigned STRIPS_PER_LAYER = 192,
  parameter int unsigned LAYER_BASE       = 0,
  parameter axis_e       AXIS             = AXIS_PREC,
  parameter int unsigned NUM_BUFS         = 2,
  parameter int unsigned DEFAULT_THR      = 100,
  parameter int          T_CENTER_NS      = 75,
  parameter int          WINDOW_NS        = 35
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [16:0]  lines,
  // calibration table write port
  input  logic         cfg_we,
  input  logic [1:0]   cfg_sel,
  input  logic [7:0]   cfg_addr,
  input  logic [15:0]  cfg_data,
  // cluster records towards the Data Exchange
  output logic         out_valid,
  output cluster_t     out_rec,
  input  logic         out_ready,
  // monitoring
  output logic [15:0]  n_events,
  output logic [15:0]  n_found,
  output logic [15:0]  n_rejected,
  output logic [15:0]  dropped_events,
  output logic         busy
);
  localparam int unsigned CHW      = $clog2(STRIPS);
  localparam int unsigned CORR_W   = 18;
  localparam int unsigned OUT_DEPTH = STRIPS / 2 + 8;
  localparam int unsigned OCW      = $clog2(OUT_DEPTH + 1);

  // ---------------- input buffer ----------------
  logic           evt_avail, rd_en, evt_release;
  logic [CHW-1:0] rd_ch;
  samples_t       rd_samples;
  logic           word_valid;
  logic [31:0]    word;
  gpu_input #(.STRIPS(STRIPS), .NUM_BUFS(NUM_BUFS)) u_in (
    .clk, .rst_n, .lines, .word_valid, .word, .evt_avail, .rd_en, .rd_ch,
    .rd_samples, .evt_release, .dropped_events);

  // ---------------- calibration tables ----------------
  adc_t        thr_t  [STRIPS];
  adc_t        ped_t  [STRIPS];
  logic [15:0] gain_t [STRIPS];
  adc_t        thr_q, ped_q;
  logic [15:0] gain_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STRIPS; i++) begin
        thr_t[i]  <= ADC_BITS'(DEFAULT_THR);
        ped_t[i]  <= '0;
        gain_t[i] <= 16'd4096;            // 1.0 with 12 fraction bits
      end
    end else if (cfg_we && cfg_addr < 8'(STRIPS)) begin
      case (cfg_sel)
        2'd0: thr_t[cfg_addr[CHW-1:0]]  <= cfg_data[ADC_BITS-1:0];
        2'd1: ped_t[cfg_addr[CHW-1:0]]  <= cfg_data[ADC_BITS-1:0];
        2'd2: gain_t[cfg_addr[CHW-1:0]] <= cfg_data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      thr_q  <= thr_t[rd_ch];
      ped_q  <= ped_t[rd_ch];
      gain_q <= gain_t[rd_ch];
    end
  end

  // ---------------- scan sequencer ----------------
  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DRAIN, S_END} state_e;
  state_e state;
  logic   fifo_push, fifo_pop, fifo_empty, fifo_full;
  logic [OCW-1:0] fifo_count;
  cluster_t fifo_wdata;
  logic     cl_valid, cl_done;
  cluster_t cl_rec;

  // channel read this cycle: its data comes next cycle
  logic           s1_valid, s1_layer_last, s1_evt_last;
  logic [CHW-1:0] s1_ch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      rd_ch         <= '0;
      s1_valid      <= 1'b0;
      s1_ch         <= '0;
      s1_layer_last <= 1'b0;
      s1_evt_last   <= 1'b0;
      n_events      <= '0;
    end else begin
      s1_valid <= rd_en;
      if (rd_en) begin
        s1_ch         <= rd_ch;
        s1_layer_last <= (rd_ch % CHW'(STRIPS_PER_LAYER)) == CHW'(STRIPS_PER_LAYER - 1);
        s1_evt_last   <= rd_ch == CHW'(STRIPS - 1);
      end
      case (state)
        S_IDLE: if (evt_avail && (fifo_count <= OCW'(OUT_DEPTH - (STRIPS / 2 + 5)))) begin
          rd_ch <= '0;
          state <= S_SCAN;
        end
        S_SCAN: begin
          rd_ch <= rd_ch + 1'b1;
          if (rd_ch == CHW'(STRIPS - 1)) state <= S_DRAIN;
        end
        S_DRAIN: if (cl_done) state <= S_END;
        S_END: if (!fifo_full && !cl_valid) begin
          n_events <= n_events + 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rd_en       = (state == S_SCAN);
  assign evt_release = (state == S_END) && !fifo_full && !cl_valid;
  assign busy        = (state != S_IDLE);

  // ---------------- processing steps ----------------
  logic           th_valid, th_flag, th_hit, th_layer_last, th_evt_last;
  logic [CHW-1:0] th_ch;
  logic signed [CORR_W-1:0] th_corr [N_SAMPLES];

  spu_threshold #(.CH_BITS(CHW), .CORR_W(CORR_W)) u_thr (
    .clk, .rst_n,
    .in_valid(s1_valid), .in_ch(s1_ch), .in_raw(rd_samples),
    .in_thr(thr_q), .in_ped(ped_q), .in_gain(gain_q),
    .in_layer_last(s1_layer_last), .in_evt_last(s1_evt_last),
    .out_valid(th_valid), .out_ch(th_ch), .out_flag(th_flag), .out_hit(th_hit),
    .out_corr(th_corr), .out_layer_last(th_layer_last), .out_evt_last(th_evt_last));

  logic [STRIP_BITS-1:0] th_strip;
  logic [1:0]            th_layer;
  assign th_strip = STRIP_BITS'(th_ch % CHW'(STRIPS_PER_LAYER));
  assign th_layer = 2'(LAYER_BASE + 32'(th_ch) / STRIPS_PER_LAYER);

  spu_cluster #(.CORR_W(CORR_W), .AXIS(AXIS), .T_CENTER_NS(T_CENTER_NS),
                .WINDOW_NS(WINDOW_NS)) u_clu (
    .clk, .rst_n,
    .in_valid(th_valid), .in_strip(th_strip), .in_layer(th_layer), .in_flag(th_flag),
    .in_corr(th_corr), .in_layer_last(th_layer_last), .in_evt_last(th_evt_last),
    .out_valid(cl_valid), .out_cluster(cl_rec), .evt_done(cl_done),
    .n_found, .n_rejected);

  // ---------------- output FIFO ----------------
  cluster_t end_rec;
  always_comb begin
    end_rec        = '0;
    end_rec.is_end = 1'b1;
    end_rec.axis   = AXIS;
    end_rec.layer  = 2'(LAYER_BASE);
  end
  assign fifo_push  = cl_valid || evt_release;
  assign fifo_wdata = cl_valid ? cl_rec : end_rec;
  assign fifo_pop   = out_valid && out_ready;
  assign out_valid  = !fifo_empty;

  sync_fifo #(.WIDTH(CLUSTER_BITS), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n, .push(fifo_push), .wr_data(fifo_wdata), .pop(fifo_pop),
    .rd_data(out_rec), .empty(fifo_empty), .full(fifo_full), .count(fifo_count));

  initial begin
    assert (STRIPS % STRIPS_PER_LAYER == 0) else $error("layers must divide the strips");
    assert (STRIPS <= 256) else $error("channel address is 8 bits");
  end
endmodule
