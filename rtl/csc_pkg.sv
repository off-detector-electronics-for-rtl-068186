// csc_pkg: types and constants shared by the CSC Readout Driver (ROD) logic.
//
// The ROD receives, per chamber, five ASM boards' worth of samples (four
// precision-strip boards, one per layer, and one transverse-strip board that
// covers all four layers), reduces them to clusters in the Sparsification
// Processing Units (SPUs), removes isolated neutron clusters in the Rejection
// Processing Units (RPUs) and builds one event fragment for the Readout Link.
// The numbers below follow the document where it gives them (192 strips per
// ASM board, 4 samples, 12-bit ADC, 16-bit G-Link words, 17-bit SCA control
// words, 17 backplane lines per ASM board); record formats are this design's
// own choice.
package csc_pkg;

  localparam int unsigned ADC_BITS      = 12;   // commercial 12-bit ADC
  localparam int unsigned N_SAMPLES     = 4;    // four time samples per trigger
  localparam int unsigned STRIPS_ASM    = 192;  // strips handled by one ASM board
  localparam int unsigned GLINK_BITS    = 16;   // G-Link data word
  localparam int unsigned LINES_PER_ASM = 17;   // 170 lines / 10 SPUs
  localparam int unsigned SCA_WORD_BITS = 17;   // SCA control G-Link word
  localparam int unsigned STRIP_BITS    = 8;    // strip number inside a layer (< 192)
  localparam int unsigned AMP_BITS      = 16;
  localparam int unsigned TIME_BITS     = 10;   // peaking time in ns, signed

  typedef logic [ADC_BITS-1:0] adc_t;
  typedef adc_t [N_SAMPLES-1:0] samples_t;      // samples_t[k] is time sample k

  // Cathode orientation: precision (bend direction) or transverse strips.
  typedef enum logic {AXIS_PREC = 1'b0, AXIS_TRANS = 1'b1} axis_e;

  // One record on the Data Exchange: a cluster, or the end of one SPU's or
  // RPU's share of an event.
  typedef struct packed {
    logic                        is_end;  // 1: end-of-event marker, other fields 0
    axis_e                       axis;
    logic [1:0]                  layer;
    logic [STRIP_BITS-1:0]       first;   // first strip of the cluster
    logic [STRIP_BITS-1:0]       last;    // last strip of the cluster
    logic [STRIP_BITS-1:0]       peak;    // strip with the largest signal
    logic [AMP_BITS-1:0]         amp;     // corrected amplitude of that strip
    logic signed [TIME_BITS-1:0] t_ns;    // peaking time, ns after sample 0
  } cluster_t;

  localparam int unsigned CLUSTER_BITS = $bits(cluster_t);

  // Readout Link words (format of this design).
  localparam logic [31:0] HDR_MARKER = 32'hEE1234EE;
  localparam logic [3:0]  CLU_TAG    = 4'hC;

endpackage
