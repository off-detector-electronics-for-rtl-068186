// dx_arbiter: one destination port of the Data Exchange (DX).
//
// The DX connects the processing units of the ROD. Here each destination has
// an arbiter that grants one of N_SRC record sources per cycle, round robin,
// starting after the source served last, so that every source gets the bus
// within N_SRC transfers. Sources and destination use valid/ready: a record
// moves when valid and ready are both high. The document names the DX and
// says which units it connects; the arbitration scheme is this design's.
// Combinational path from in_valid/out_ready to out_valid/in_ready; no added
// latency.
module dx_arbiter #(
  parameter int unsigned N_SRC = 5,
  parameter int unsigned WIDTH = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_SRC-1:0]        in_valid,
  input  logic [WIDTH-1:0]        in_data [N_SRC],
  output logic [N_SRC-1:0]        in_ready,
  output logic                    out_valid,
  output logic [WIDTH-1:0]        out_data,
  input  logic                    out_ready,
  output logic [$clog2(N_SRC)-1:0] out_src
);
  localparam int unsigned SW = (N_SRC > 1) ? $clog2(N_SRC) : 1;

  logic [SW-1:0] last;       // source granted most recently
  logic [SW-1:0] sel;
  logic          any;

  always_comb begin
    sel = last;
    any = 1'b0;
    for (int i = 1; i <= N_SRC; i++) begin
      int unsigned c;
      c = (32'(last) + i) % N_SRC;
      if (!any && in_valid[c]) begin
        sel = SW'(c);
        any = 1'b1;
      end
    end
  end

  assign out_valid = any;
  assign out_data  = in_data[sel];
  assign out_src   = sel;
  always_comb begin
    in_ready = '0;
    in_ready[sel] = any && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last <= SW'(N_SRC - 1);
    else if (out_valid && out_ready) last <= sel;
  end

  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             out_valid && !out_ready |=> out_valid);
endmodule
