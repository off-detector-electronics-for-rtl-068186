// tb_spu_threshold: checks the threshold, the 75 ns timing cut, the
// nearest-neighbour flags across a layer boundary and the pedestal/gain
// correction on a hand-built channel stream with known answers.
module tb_spu_threshold;
  import csc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_layer_last, in_evt_last;
  logic [7:0] in_ch;
  samples_t in_raw;
  adc_t in_thr, in_ped;
  logic [15:0] in_gain;
  logic out_valid, out_flag, out_hit, out_layer_last, out_evt_last;
  logic [7:0] out_ch;
  logic signed [17:0] out_corr [4];

  spu_threshold #(.CH_BITS(8)) dut (.*);

  int checks = 0, failures = 0;
  // channel table: samples, expected hit, expected flag
  // 8 channels, two layers of 4 (layer_last at channel 3)
  int smp [8][4] = '{'{100,100,100,100}, '{100,300,200,100}, '{100,100,100,100},
                     '{100,100,100,100}, '{100,300,200,310}, '{100,300,400,100},
                     '{100,120,110,100}, '{400,300,200,100}};
  bit exp_hit  [8] = '{0,1,0,0,0,1,0,0};
  bit exp_flag [8] = '{1,1,1,0,1,1,1,0};
  int got = 0;

  always @(posedge clk) if (out_valid) begin
    int c;
    c = out_ch;
    checks += 3;
    if (out_hit != exp_hit[c])   begin failures++; $display("FAIL hit ch %0d", c); end
    if (out_flag != exp_flag[c]) begin failures++; $display("FAIL flag ch %0d", c); end
    // ped 100, gain 1.5 (6144): corr = (s - 100) * 3 / 2
    if (out_corr[1] != 18'sd0 + (smp[c][1] - 100) * 3 / 2) begin
      failures++; $display("FAIL corr ch %0d = %0d", c, out_corr[1]);
    end
    checks++;
    if (out_evt_last != (c == 7)) failures++;
    got++;
  end

  initial begin
    in_valid = 0; in_layer_last = 0; in_evt_last = 0; in_ch = 0; in_raw = '0;
    in_thr = 12'd150; in_ped = 12'd100; in_gain = 16'd6144;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      in_valid = 1; in_ch = 8'(c);
      for (int k = 0; k < 4; k++) in_raw[k] = 12'(smp[c][k]);
      in_layer_last = (c == 3); in_evt_last = (c == 7);
      if (c == 5) begin   // a gap in the stream must not change anything
        in_valid = 0; @(negedge clk); in_valid = 1;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    checks++; if (got != 8) begin failures++; $display("FAIL got %0d channels", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
