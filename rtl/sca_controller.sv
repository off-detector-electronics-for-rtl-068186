// sca_controller: cell bookkeeping for the on-detector Switched Capacitor
// Array (SCA) analog memories.
//
// The shaped strip signals are stored in SCA cells every 50 ns (every
// BC_PER_SAMPLE bunch crossings) and must stay there for the LVL1 trigger
// latency. The controller keeps a free list (a FIFO of cell numbers) and a
// used list (a shift line of the cells written in the last LATENCY_SAMPLES
// samples). On every sample tick it takes a free cell as write address and
// pushes it into the used list; the cell leaving the end of the used list
// goes back to the free list. On a LVL1 Accept the four cells written
// LATENCY_SAMPLES .. LATENCY_SAMPLES-3 samples ago are held (per-cell
// reference count, so overlapping triggers may share cells) and queued for
// readout. The readout sequencer sends their four read addresses, waits
// READ_BC bunch crossings while the ASM digitises and ships the data, and
// then releases the cells. Free list, 50 ns write cadence, return after the
// latency and four samples per trigger follow the document; the cell count,
// latency, readout time, control-word layout and busy rule are this design's
// assumptions.
//
// Interface: bc_en marks one clock per 25 ns bunch crossing; l1a is sampled
// with bc_en. ctrl_word/ctrl_valid give one 17-bit word per bunch crossing
// for the control G-Link: [16] read strobe, [15:8] read cell, [7:0] write
// cell. busy is high while fewer than BUSY_LEVEL cells are free or the
// trigger queue is full. Counters report lost triggers and write overflows.
module sca_controller #(
  parameter int unsigned N_CELLS         = 144,
  parameter int unsigned LATENCY_SAMPLES = 50,
  parameter int unsigned BC_PER_SAMPLE   = 2,
  parameter int unsigned READ_BC         = 400,
  parameter int unsigned TRIG_DEPTH      = 8,
  parameter int unsigned BUSY_LEVEL      = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bc_en,
  input  logic        l1a,
  output logic [16:0] ctrl_word,
  output logic        ctrl_valid,
  output logic        busy,
  output logic        ready,          // initialisation of the free list done
  output logic [15:0] lost_triggers,
  output logic [15:0] write_overflows,
  output logic [$clog2(N_CELLS+1)-1:0] free_cells
);
  localparam int unsigned CW  = 8;                 // cell field of the control word
  localparam int unsigned LAT = LATENCY_SAMPLES;
  localparam int unsigned NS  = csc_pkg::N_SAMPLES;

  typedef logic [CW-1:0] cell_t;
  typedef cell_t [NS-1:0] group_t;

  // ---------------- free list ----------------
  logic  fl_push, fl_pop, fl_empty, fl_full;
  cell_t fl_wdata, fl_rdata;
  sync_fifo #(.WIDTH(CW), .DEPTH(N_CELLS)) u_free (
    .clk, .rst_n, .push(fl_push), .wr_data(fl_wdata), .pop(fl_pop),
    .rd_data(fl_rdata), .empty(fl_empty), .full(fl_full), .count(free_cells));

  // ---------------- used list ----------------
  cell_t            pipe   [LAT+1];
  logic [LAT:0]     pipe_v;
  logic [2:0]       refcnt [N_CELLS];
  logic [N_CELLS-1:0] retired;       // held cell that has left the used list

  logic [$clog2(N_CELLS+1)-1:0] init_cnt;
  logic [$clog2(BC_PER_SAMPLE)-1+1:0] phase;
  logic  tick;
  cell_t wr_cell;

  assign ready = (init_cnt == ($clog2(N_CELLS+1))'(N_CELLS));
  assign tick  = ready && bc_en && (phase == 0);

  // ---------------- trigger queue ----------------
  logic   tq_push, tq_pop, tq_empty, tq_full;
  group_t tq_wdata, tq_rdata;
  logic [$clog2(TRIG_DEPTH+1)-1:0] tq_count;
  sync_fifo #(.WIDTH(CW*NS), .DEPTH(TRIG_DEPTH)) u_trig (
    .clk, .rst_n, .push(tq_push), .wr_data(tq_wdata), .pop(tq_pop),
    .rd_data(tq_rdata), .empty(tq_empty), .full(tq_full), .count(tq_count));

  logic take_trig;
  assign take_trig = ready && bc_en && l1a && (&pipe_v[LAT:LAT-NS+1]) && !tq_full;
  always_comb begin
    for (int k = 0; k < NS; k++) tq_wdata[k] = pipe[LAT-k];   // oldest sample first
  end
  assign tq_push = take_trig;

  // ---------------- readout sequencer ----------------
  typedef enum logic [1:0] {RD_IDLE, RD_SEND, RD_WAIT, RD_RELEASE} rd_state_e;
  rd_state_e rd_state;
  logic [1:0]  rd_idx;
  logic [15:0] rd_wait;
  group_t      rd_group;

  // release happens on cycles without a sample tick, so the free list has one
  // writer per cycle
  logic  release_now;
  cell_t rel_cell;
  assign rel_cell    = rd_group[rd_idx];
  // and without an accepted trigger, so a reference count has one update per
  // cycle
  assign release_now = (rd_state == RD_RELEASE) && !tick && !(ready && bc_en && l1a);

  // exit of the used list
  cell_t exit_cell;
  logic  exit_valid, exit_held;
  assign exit_cell  = pipe[LAT];
  assign exit_valid = tick && pipe_v[LAT];
  assign exit_held  = (refcnt[exit_cell] != 0) || take_trig;  // exit cell is group member 0

  always_comb begin
    fl_push  = 1'b0;
    fl_wdata = '0;
    if (!ready) begin
      fl_push  = 1'b1;
      fl_wdata = CW'(init_cnt);
    end else if (exit_valid && !exit_held) begin
      fl_push  = 1'b1;
      fl_wdata = exit_cell;
    end else if (release_now && refcnt[rel_cell] == 3'd1 && retired[rel_cell]) begin
      fl_push  = 1'b1;
      fl_wdata = rel_cell;
    end
  end
  assign fl_pop = tick && !fl_empty;
  assign tq_pop = (rd_state == RD_IDLE) && !tq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_cnt        <= '0;
      phase           <= '0;
      pipe_v          <= '0;
      retired         <= '0;
      wr_cell         <= '0;
      lost_triggers   <= '0;
      write_overflows <= '0;
      rd_state        <= RD_IDLE;
      rd_idx          <= '0;
      rd_wait         <= '0;
      rd_group        <= '0;
      ctrl_word       <= '0;
      ctrl_valid      <= 1'b0;
      for (int i = 0; i < N_CELLS; i++) refcnt[i] <= '0;
      for (int i = 0; i <= LAT; i++) pipe[i] <= '0;
    end else begin
      if (!ready) init_cnt <= init_cnt + 1'b1;
      if (ready && bc_en)
        phase <= (phase == ($bits(phase))'(BC_PER_SAMPLE-1)) ? '0 : phase + 1'b1;

      // used list shift on each sample tick
      if (tick) begin
        for (int i = LAT; i > 0; i--) pipe[i] <= pipe[i-1];
        pipe_v <= {pipe_v[LAT-1:0], !fl_empty};
        if (!fl_empty) begin
          pipe[0] <= fl_rdata;
          wr_cell <= fl_rdata;
        end else begin
          write_overflows <= write_overflows + 1'b1;
        end
        if (exit_valid && exit_held) retired[exit_cell] <= 1'b1;
      end

      if (ready && bc_en && l1a && !take_trig) lost_triggers <= lost_triggers + 1'b1;

      // reference counts: +1 for every cell of an accepted trigger, -1 on release
      if (take_trig)
        for (int k = 0; k < NS; k++) refcnt[pipe[LAT-k]] <= refcnt[pipe[LAT-k]] + 1'b1;

      case (rd_state)
        RD_IDLE: if (!tq_empty) begin
          rd_group <= tq_rdata;
          rd_idx   <= '0;
          rd_state <= RD_SEND;
        end
        RD_SEND: if (bc_en) begin
          rd_idx    <= rd_idx + 1'b1;
          if (rd_idx == 2'(NS-1)) begin
            rd_wait  <= 16'(READ_BC);
            rd_state <= RD_WAIT;
          end
        end
        RD_WAIT: if (bc_en) begin
          if (rd_wait <= 16'd1) begin
            rd_idx   <= '0;
            rd_state <= RD_RELEASE;
          end
          rd_wait <= rd_wait - 1'b1;
        end
        RD_RELEASE: if (release_now) begin
          refcnt[rel_cell] <= refcnt[rel_cell] - 1'b1;
          if (refcnt[rel_cell] == 3'd1 && retired[rel_cell]) retired[rel_cell] <= 1'b0;
          rd_idx <= rd_idx + 1'b1;
          if (rd_idx == 2'(NS-1)) rd_state <= RD_IDLE;
        end
        default: rd_state <= RD_IDLE;
      endcase

      // one control word per bunch crossing
      if (bc_en) begin
        ctrl_valid <= ready;
        ctrl_word  <= {rd_state == RD_SEND,
                       (rd_state == RD_SEND) ? rd_group[rd_idx] : cell_t'(0),
                       (tick && !fl_empty) ? fl_rdata : wr_cell};
      end
    end
  end

  assign busy = !ready || (free_cells < ($bits(free_cells))'(BUSY_LEVEL)) || tq_full;

  initial begin
    assert (N_CELLS <= 256) else $error("cell numbers must fit the 8-bit control word fields");
    assert (LATENCY_SAMPLES >= csc_pkg::N_SAMPLES) else $error("latency too short");
  end
endmodule
