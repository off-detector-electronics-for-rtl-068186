// rod_interconnect: programmable line router of the ROD (Interconnect Subsystem).
//
// The ROD accepts N_IN data lines from the Transition Module and feeds
// LINES_PER_DSP input lines of each of its N_DSP DSP modules. Every output
// line has a source register: values 0..N_IN-1 select a Transition Module
// line, values N_IN.. select a test line driven by a DSP module (so one set
// of modules can send test data to another), and any larger value drives 0.
// After reset output line i takes Transition Module line i for
// i < DEFAULT_ROUTED, which is the CSC mapping of 170 lines onto the ten SPUs;
// the other lines are idle. Line counts follow the document; the source
// register per line, its reset value and the one-cycle registered path are
// this design's choices (the document describes an array of FPGAs).
module rod_interconnect #(
  parameter int unsigned N_IN           = 192,
  parameter int unsigned N_DSP          = 13,
  parameter int unsigned LINES_PER_DSP  = 17,
  parameter int unsigned DEFAULT_ROUTED = 170
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [N_IN-1:0]                  tm_lines,
  input  logic [N_DSP*LINES_PER_DSP-1:0]   test_lines,
  output logic [N_DSP*LINES_PER_DSP-1:0]   dsp_lines,
  input  logic                             cfg_we,
  input  logic [15:0]                      cfg_addr,
  input  logic [15:0]                      cfg_src
);
  localparam int unsigned N_OUT = N_DSP * LINES_PER_DSP;
  localparam int unsigned N_SRC = N_IN + N_OUT;
  localparam int unsigned SW    = $clog2(N_SRC + 1);

  logic [SW-1:0]    src [N_OUT];
  logic [N_SRC-1:0] all_src;
  assign all_src = {test_lines, tm_lines};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OUT; i++) src[i] <= (i < DEFAULT_ROUTED) ? SW'(i) : SW'(N_SRC);
    end else if (cfg_we && 32'(cfg_addr) < N_OUT) begin
      src[($clog2(N_OUT))'(cfg_addr)] <= (32'(cfg_src) < N_SRC) ? SW'(cfg_src) : SW'(N_SRC);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dsp_lines <= '0;
    else
      for (int i = 0; i < N_OUT; i++)
        dsp_lines[i] <= (32'(src[i]) < N_SRC) ? all_src[src[i]] : 1'b0;
  end
endmodule
