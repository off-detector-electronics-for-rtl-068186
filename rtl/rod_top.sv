// rod_top: one CSC Readout Driver (ROD) with its Transition Module routing.
//
// A ROD reads out two cathode strip chambers. Each chamber has five ASM
// boards (four precision boards, one per layer, and one transverse board)
// that each send two 16-bit G-Link words per bunch crossing. The data path:
//   tm_link_mux (x10)   two words per crossing onto 17 lines each (170 lines)
//   rod_interconnect    192 lines routed to the 13 DSP-module slots
//   spu (x10)           buffering, threshold and timing cut, calibration,
//                       clustering and peaking-time window per ASM board
//   dx_arbiter (x2)     Data Exchange: the five SPUs of a chamber to its RPU
//   rpu (x2)            removal of clusters without partner in another layer,
//                       track counters for layer-efficiency monitoring
//   hpu_event_builder   header, both RPUs' clusters, trailer to the Readout Link
// Beside it, sca_controller runs the SCA cell lists for the on-detector
// analog memories and produces the control G-Link words.
//
// Clocking: one clock, the 80 MHz backplane line clock. bc_en is high one
// cycle in two and marks the 40 MHz bunch-crossing/G-Link word rate; l1a,
// bcid and the G-Link words are sampled with it. The G-Link receivers, the
// S-Link card and the control G-Link transmitter are outside this module:
// their word interfaces are the ports. Slot numbering (this design's
// choice): SPU slots 0..4 serve chamber 0 (precision layers 0..3, then
// transverse), slots 5..9 chamber 1, slots 10..12 (the RPU and HPU modules)
// only see their spare lines.
module rod_top
  import csc_pkg::*;
#(
  parameter int unsigned N_ASM       = 10,
  parameter int unsigned STRIPS      = 192,
  parameter int unsigned DEFAULT_THR = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bc_en,
  input  logic         l1a,
  input  logic [11:0]  bcid,
  // G-Link receivers, two links per ASM board
  input  logic         link_valid [N_ASM],
  input  logic [15:0]  link_a     [N_ASM],
  input  logic [15:0]  link_b     [N_ASM],
  // control G-Link towards the ASM boards
  output logic [16:0]  sca_ctrl_word,
  output logic         sca_ctrl_valid,
  output logic         sca_busy,
  // configuration
  input  logic         spu_cfg_we,
  input  logic [3:0]   spu_cfg_unit,
  input  logic [1:0]   spu_cfg_sel,
  input  logic [7:0]   spu_cfg_addr,
  input  logic [15:0]  spu_cfg_data,
  input  logic         ic_cfg_we,
  input  logic [15:0]  ic_cfg_addr,
  input  logic [15:0]  ic_cfg_src,
  input  logic [13*17-1:0] test_lines,
  output logic [3*17-1:0]  spare_lines,
  // Readout Link (S-Link) word interface
  output logic         rol_valid,
  output logic [31:0]  rol_data,
  output logic         rol_ctrl,
  input  logic         rol_ready,
  // monitoring
  output logic [15:0]  n_events_built,
  output logic [15:0]  n_clusters_found  [N_ASM],
  output logic [15:0]  n_clusters_timecut [N_ASM],
  output logic [15:0]  n_dropped_events  [N_ASM],
  output logic [15:0]  n_kept    [2],
  output logic [15:0]  n_removed [2],
  // RPU track monitoring, per chamber and orientation (0 precision, 1 transverse)
  output logic [15:0]  n_tracks       [2][2],
  output logic [15:0]  trk_layer_hits [2][2][4],
  output logic [15:0]  sca_lost_triggers,
  output logic [15:0]  sca_write_overflows
);
  localparam int unsigned N_DSP = 13;
  localparam int unsigned LPD   = LINES_PER_ASM;
  localparam int unsigned N_TM  = 192;

  // ---------------- SCA controller ----------------
  logic [$clog2(144+1)-1:0] free_cells;
  logic sca_ready;
  sca_controller u_sca (
    .clk, .rst_n, .bc_en, .l1a(l1a),
    .ctrl_word(sca_ctrl_word), .ctrl_valid(sca_ctrl_valid), .busy(sca_busy),
    .ready(sca_ready), .lost_triggers(sca_lost_triggers),
    .write_overflows(sca_write_overflows), .free_cells(free_cells));

  // ---------------- Transition Module ----------------
  logic [N_TM-1:0] tm_lines;
  assign tm_lines[N_TM-1:N_ASM*LPD] = '0;
  for (genvar a = 0; a < N_ASM; a++) begin : g_tm
    tm_link_mux u_mux (
      .clk, .rst_n, .word_en(bc_en), .valid(link_valid[a]),
      .word_a(link_a[a]), .word_b(link_b[a]), .lines(tm_lines[a*LPD +: LPD]));
  end

  // ---------------- Interconnect ----------------
  logic [N_DSP*LPD-1:0] dsp_lines;
  rod_interconnect #(.N_IN(N_TM), .N_DSP(N_DSP), .LINES_PER_DSP(LPD),
                     .DEFAULT_ROUTED(N_ASM*LPD)) u_ic (
    .clk, .rst_n, .tm_lines, .test_lines, .dsp_lines,
    .cfg_we(ic_cfg_we), .cfg_addr(ic_cfg_addr), .cfg_src(ic_cfg_src));
  assign spare_lines = dsp_lines[N_DSP*LPD-1 -: 3*LPD];

  // ---------------- SPUs ----------------
  logic     spu_valid [N_ASM];
  logic     spu_ready [N_ASM];
  cluster_t spu_rec   [N_ASM];
  logic     spu_busy  [N_ASM];
  logic [15:0] spu_events [N_ASM];

  for (genvar s = 0; s < N_ASM; s++) begin : g_spu
    localparam bit TRANS = (s % 5) == 4;
    spu #(
      .STRIPS(STRIPS),
      .STRIPS_PER_LAYER(TRANS ? STRIPS / 4 : STRIPS),
      .LAYER_BASE(TRANS ? 0 : s % 5),
      .AXIS(TRANS ? AXIS_TRANS : AXIS_PREC),
      .DEFAULT_THR(DEFAULT_THR)
    ) u_spu (
      .clk, .rst_n, .lines(dsp_lines[s*LPD +: LPD]),
      .cfg_we(spu_cfg_we && spu_cfg_unit == 4'(s)), .cfg_sel(spu_cfg_sel),
      .cfg_addr(spu_cfg_addr), .cfg_data(spu_cfg_data),
      .out_valid(spu_valid[s]), .out_rec(spu_rec[s]), .out_ready(spu_ready[s]),
      .n_events(spu_events[s]), .n_found(n_clusters_found[s]),
      .n_rejected(n_clusters_timecut[s]), .dropped_events(n_dropped_events[s]),
      .busy(spu_busy[s]));
  end

  // ---------------- Data Exchange and RPUs ----------------
  logic     rpu_in_valid [2];
  logic     rpu_in_ready [2];
  cluster_t rpu_in_rec   [2];
  logic     rpu_done  [2];
  logic     rpu_valid [2];
  logic     rpu_ready [2];
  cluster_t rpu_rec   [2];
  logic [15:0] rpu_overflow [2];

  for (genvar c = 0; c < 2; c++) begin : g_chamber
    logic [4:0]              v, r;
    logic [CLUSTER_BITS-1:0] d [5];
    logic [CLUSTER_BITS-1:0] od;
    logic [2:0]              osrc;
    for (genvar i = 0; i < 5; i++) begin : g_src
      assign v[i] = spu_valid[5*c+i];
      assign d[i] = spu_rec[5*c+i];
      assign spu_ready[5*c+i] = r[i];
    end
    dx_arbiter #(.N_SRC(5), .WIDTH(CLUSTER_BITS)) u_dx (
      .clk, .rst_n, .in_valid(v), .in_data(d), .in_ready(r),
      .out_valid(rpu_in_valid[c]), .out_data(od), .out_ready(rpu_in_ready[c]),
      .out_src(osrc));
    assign rpu_in_rec[c] = od;

    rpu u_rpu (
      .clk, .rst_n, .in_valid(rpu_in_valid[c]), .in_rec(rpu_in_rec[c]),
      .in_ready(rpu_in_ready[c]), .out_valid(rpu_valid[c]), .out_rec(rpu_rec[c]),
      .out_ready(rpu_ready[c]), .evt_done(rpu_done[c]), .n_kept(n_kept[c]),
      .n_removed(n_removed[c]), .n_overflow(rpu_overflow[c]),
      .n_tracks(n_tracks[c]), .trk_layer_hits(trk_layer_hits[c]));
  end

  // ---------------- HPU ----------------
  logic [15:0] status;
  logic        any_drop, any_rpu_ovf;
  logic [15:0] hpu_lost;
  always_comb begin
    any_drop = 1'b0;
    for (int s = 0; s < N_ASM; s++) any_drop |= (n_dropped_events[s] != 0);
    any_rpu_ovf = (rpu_overflow[0] != 0) || (rpu_overflow[1] != 0);
  end
  // status bits: 0 input event dropped, 1 RPU cluster overflow,
  // 2 SCA trigger lost, 3 SCA write overflow, 4 HPU trigger lost (sticky)
  assign status = {11'h0, hpu_lost != 0, sca_write_overflows != 0,
                   sca_lost_triggers != 0, any_rpu_ovf, any_drop};

  hpu_event_builder u_hpu (
    .clk, .rst_n, .l1a(l1a && bc_en), .bcid, .rpu_done, .rpu_valid, .rpu_rec,
    .rpu_ready, .status, .rol_valid, .rol_data, .rol_ctrl, .rol_ready,
    .n_built(n_events_built), .lost_triggers(hpu_lost));
endmodule
