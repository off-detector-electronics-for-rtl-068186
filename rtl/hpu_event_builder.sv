// hpu_event_builder: event-fragment building done by the Host Processing Unit.
//
// For every LVL1 Accept the builder records an event number (L1ID, counted
// here) and the bunch-crossing number. When both RPUs of the ROD have
// finished their part of an event, it sends on the Readout Link a header,
// the kept clusters of RPU 0 and then RPU 1, and a trailer, as the document
// describes the HPU's transfer sequence. Word formats are this design's own:
//   header : HDR_MARKER, SOURCE_ID, {8'h0, L1ID}, {20'h0, BCID}  (rol_ctrl=1)
//   cluster: {4'hC, axis, layer, 1'b0, peak, first, last},
//            {amplitude, 6'h0, peaking time}                      (rol_ctrl=0)
//   trailer: {16'h0, status}, number of cluster words             (rol_ctrl=1)
// rol_valid/rol_ready follow the usual handshake; one word per cycle while
// the link is ready.
module hpu_event_builder
  import csc_pkg::*;
#(
  parameter logic [31:0] SOURCE_ID  = 32'h0069_0000,
  parameter int unsigned TRIG_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        l1a,
  input  logic [11:0] bcid,
  input  logic        rpu_done [2],
  input  logic        rpu_valid [2],
  input  cluster_t    rpu_rec [2],
  output logic        rpu_ready [2],
  input  logic [15:0] status,
  output logic        rol_valid,
  output logic [31:0] rol_data,
  output logic        rol_ctrl,
  input  logic        rol_ready,
  output logic [15:0] n_built,
  output logic [15:0] lost_triggers
);
  // ---------------- trigger information ----------------
  logic [23:0] l1id;
  logic        tq_push, tq_pop, tq_empty, tq_full;
  logic [35:0] tq_rdata;
  logic [$clog2(TRIG_DEPTH+1)-1:0] tq_count;
  assign tq_push = l1a && !tq_full;
  sync_fifo #(.WIDTH(36), .DEPTH(TRIG_DEPTH)) u_trig (
    .clk, .rst_n, .push(tq_push), .wr_data({l1id, bcid}), .pop(tq_pop),
    .rd_data(tq_rdata), .empty(tq_empty), .full(tq_full), .count(tq_count));

  // events finished by each RPU and not yet sent
  logic [7:0] pend [2];

  typedef enum logic [2:0] {B_IDLE, B_HDR, B_DATA, B_TRL} state_e;
  state_e      state;
  logic [1:0]  widx;          // word within header/trailer, or half of a cluster
  logic        src;           // RPU being read
  logic [15:0] nwords;
  logic [35:0] cur_trig;

  cluster_t c;
  assign c = rpu_rec[src];

  logic start;
  assign start = (state == B_IDLE) && !tq_empty && pend[0] != 0 && pend[1] != 0;
  assign tq_pop = start;

  always_comb begin
    rol_valid = 1'b0;
    rol_data  = '0;
    rol_ctrl  = 1'b0;
    rpu_ready[0] = 1'b0;
    rpu_ready[1] = 1'b0;
    case (state)
      B_HDR: begin
        rol_valid = 1'b1;
        rol_ctrl  = 1'b1;
        case (widx)
          2'd0: rol_data = HDR_MARKER;
          2'd1: rol_data = SOURCE_ID;
          2'd2: rol_data = {8'h0, cur_trig[35:12]};
          default: rol_data = {20'h0, cur_trig[11:0]};
        endcase
      end
      B_DATA: if (rpu_valid[src]) begin
        if (c.is_end) begin
          rpu_ready[src] = 1'b1;               // consume the end record
        end else begin
          rol_valid = 1'b1;
          rol_data  = (widx == 0) ?
                      {CLU_TAG, c.axis, c.layer, 1'b0, c.peak, c.first, c.last} :
                      {c.amp, 6'h0, c.t_ns};
          rpu_ready[src] = (widx == 1) && rol_ready;
        end
      end
      B_TRL: begin
        rol_valid = 1'b1;
        rol_ctrl  = 1'b1;
        rol_data  = (widx == 0) ? {16'h0, status} : {16'h0, nwords};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1id          <= '0;
      pend[0]       <= '0;
      pend[1]       <= '0;
      state         <= B_IDLE;
      widx          <= '0;
      src           <= 1'b0;
      nwords        <= '0;
      cur_trig      <= '0;
      n_built       <= '0;
      lost_triggers <= '0;
    end else begin
      if (l1a) begin
        l1id <= l1id + 1'b1;
        if (tq_full) lost_triggers <= lost_triggers + 1'b1;
      end
      for (int r = 0; r < 2; r++)
        pend[r] <= pend[r] + 8'(rpu_done[r]) - 8'(start);
      case (state)
        B_IDLE: if (start) begin
          cur_trig <= tq_rdata;
          widx     <= '0;
          nwords   <= '0;
          src      <= 1'b0;
          state    <= B_HDR;
        end
        B_HDR: if (rol_ready) begin
          widx <= widx + 1'b1;
          if (widx == 2'd3) begin
            widx  <= '0;
            state <= B_DATA;
          end
        end
        B_DATA: if (rpu_valid[src]) begin
          if (c.is_end) begin
            src <= 1'b1;
            if (src) state <= B_TRL;
          end else if (rol_ready) begin
            widx   <= (widx == 0) ? 2'd1 : 2'd0;
            nwords <= nwords + 1'b1;
          end
        end
        B_TRL: if (rol_ready) begin
          widx <= widx + 1'b1;
          if (widx == 2'd1) begin
            widx    <= '0;
            n_built <= n_built + 1'b1;
            state   <= B_IDLE;
          end
        end
        default: state <= B_IDLE;
      endcase
    end
  end
endmodule
