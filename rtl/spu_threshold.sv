// spu_threshold: first sparsification step of an SPU.
//
// Channels arrive one per cycle with their four raw samples and their
// calibration constants. A channel is a hit when its peak sample, the larger
// of the second and third time sample, is above the channel's threshold and
// also larger than the first and the last sample (the 75 ns timing cut). A
// channel is flagged when it or a nearest neighbour in the same layer is a
// hit. Pedestal and gain corrections are applied to every channel:
// corr = ((raw - ped) * gain) >>> GAIN_FRAC, gain being unsigned with
// GAIN_FRAC fraction bits. The threshold test, the choice of sample, the
// timing cut and the neighbour rule follow the document; comparing the raw
// sample with a threshold that includes the pedestal, and the gain format,
// are this design's choices.
//
// Timing: the flag of a channel needs the next channel, so each channel comes
// out when the next one goes in, or one cycle after in_evt_last when no
// channel follows. in_layer_last marks the last channel of a layer, across
// which no neighbour is taken. Throughput one channel per cycle.
module spu_threshold
  import csc_pkg::*;
#(
  parameter int unsigned CH_BITS   = 8,
  parameter int unsigned GAIN_FRAC = 12,
  parameter int unsigned CORR_W    = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [CH_BITS-1:0] in_ch,
  input  samples_t           in_raw,
  input  adc_t               in_thr,
  input  adc_t               in_ped,
  input  logic [15:0]        in_gain,
  input  logic               in_layer_last,
  input  logic               in_evt_last,
  output logic               out_valid,
  output logic [CH_BITS-1:0] out_ch,
  output logic               out_flag,
  output logic               out_hit,
  output logic signed [CORR_W-1:0] out_corr [N_SAMPLES],
  output logic               out_layer_last,
  output logic               out_evt_last
);
  typedef logic signed [CORR_W-1:0] corr_t;

  adc_t  pk;
  logic  hit_in;
  corr_t corr_in [N_SAMPLES];

  always_comb begin
    pk     = (in_raw[2] > in_raw[1]) ? in_raw[2] : in_raw[1];
    hit_in = (pk > in_thr) && (pk > in_raw[0]) && (pk > in_raw[3]);
    for (int k = 0; k < N_SAMPLES; k++) begin
      logic signed [ADC_BITS:0]          diff;
      logic signed [ADC_BITS+17:0]       prod;
      diff       = $signed({1'b0, in_raw[k]}) - $signed({1'b0, in_ped});
      prod       = diff * $signed({1'b0, in_gain});
      corr_in[k] = corr_t'(prod >>> GAIN_FRAC);
    end
  end

  // pending channel, waiting for its right-hand neighbour
  logic               p_valid, p_hit, p_hit_left, p_layer_last, p_evt_last;
  logic [CH_BITS-1:0] p_ch;
  corr_t              p_corr [N_SAMPLES];

  logic emit, flush;
  assign flush = p_valid && p_evt_last && !in_valid;
  assign emit  = p_valid && (in_valid || flush);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid        <= 1'b0;
      p_hit          <= 1'b0;
      p_hit_left     <= 1'b0;
      p_layer_last   <= 1'b0;
      p_evt_last     <= 1'b0;
      p_ch           <= '0;
      out_valid      <= 1'b0;
      out_ch         <= '0;
      out_flag       <= 1'b0;
      out_hit        <= 1'b0;
      out_layer_last <= 1'b0;
      out_evt_last   <= 1'b0;
      for (int k = 0; k < N_SAMPLES; k++) begin
        p_corr[k]   <= '0;
        out_corr[k] <= '0;
      end
    end else begin
      out_valid <= emit;
      if (emit) begin
        out_ch         <= p_ch;
        out_hit        <= p_hit;
        out_flag       <= p_hit || p_hit_left ||
                          (in_valid && hit_in && !p_layer_last && !p_evt_last);
        out_layer_last <= p_layer_last;
        out_evt_last   <= p_evt_last;
        out_corr       <= p_corr;
      end
      if (in_valid) begin
        p_valid      <= 1'b1;
        p_ch         <= in_ch;
        p_hit        <= hit_in;
        p_hit_left   <= p_valid && p_hit && !p_layer_last && !p_evt_last;
        p_layer_last <= in_layer_last || in_evt_last;
        p_evt_last   <= in_evt_last;
        p_corr       <= corr_in;
      end else if (flush) begin
        p_valid <= 1'b0;
      end
    end
  end
endmodule
