// adc_scoreboard: reference model and checker for the converter pipeline,
// shared by the end-to-end testbenches.
//
// On each rising edge while active it follows the samples through the
// pipeline of flash_adc_top and compares:
//   dec   one cycle after vin: comparator i is 1 when vin > its trip point
//         (the die's offsets, flash_adc_pkg::gauss_offset_mv);
//   count one cycle later: the number of ones in dec;
//   vout  one cycle later: the floating-point piecewise-linear inverse
//         Gaussian of the count (adc_ref_pkg::ref_inv_gauss), within 2 mV.
// It also counts the design's mechanisms as they occur (bubbles in the
// comparator word, saturation at either tail, each count value) and sums the
// squared error between vout and the input three cycles earlier.
module adc_scoreboard
  import flash_adc_pkg::*;
  import adc_ref_pkg::*;
#(
  parameter int unsigned N     = N_COMP,
  parameter int          SIGMA = SIGMA_MV,
  parameter int unsigned SEED  = OFFSET_SEED
) (
  input logic                        clk,
  input logic                        active,
  input sample_t                     vin,
  input logic [N-1:0]                dec,
  input logic [count_width(N)-1:0]   count,
  input sample_t                     vout
);

  int checks = 0;
  int failures = 0;
  int n_bubble = 0;
  int n_sat_lo = 0;
  int n_sat_hi = 0;
  int n_samples = 0;
  int seen [N+1];
  real sq = 0.0;

  int trip [N];
  int vin_h [4];
  logic [N-1:0] dec_h1;
  int steps = 0;
  real want;

  initial begin
    for (int i = 0; i < int'(N); i++) trip[i] = gauss_offset_mv(i, SIGMA, SEED);
    for (int k = 0; k <= int'(N); k++) seen[k] = 0;
  end

  // Distinct count values seen so far.
  function automatic int distinct_counts();
    int d;
    d = 0;
    for (int k = 0; k <= int'(N); k++) if (seen[k] > 0) d++;
    return d;
  endfunction

  function automatic real rms_error();
    return (n_samples > 0) ? $sqrt(sq / real'(n_samples)) : 0.0;
  endfunction

  always @(posedge clk) begin
    #1;
    if (active) begin
      logic [N-1:0] exp_dec;
      int exp_cnt;
      real err;
      for (int k = 3; k > 0; k--) vin_h[k] = vin_h[k-1];
      vin_h[0] = int'(vin);
      if (steps >= 3) begin
        for (int i = 0; i < int'(N); i++) exp_dec[i] = vin_h[1] > trip[i];
        checks++;
        if (dec !== exp_dec) begin
          failures++;
          if (failures < 10) $display("dec %h expected %h", dec, exp_dec);
        end
        for (int i = 1; i < int'(N); i++)
          if (dec[i] && !dec[i-1]) begin
            n_bubble++;
            break;
          end
        exp_cnt = ones(64'(dec_h1), N);
        checks++;
        if (int'(count) != exp_cnt) begin
          failures++;
          if (failures < 10) $display("count %0d expected %0d", count, exp_cnt);
        end
        seen[count]++;
        if (count == 0) n_sat_lo++;
        if (int'(count) == N) n_sat_hi++;
      end
      if (steps >= 4) begin
        checks++;
        if ((real'(vout) - want) > 2.0 || (want - real'(vout)) > 2.0) begin
          failures++;
          if (failures < 10) $display("vout %0d expected %0.1f", vout, want);
        end
        err = real'(vout) - real'(vin_h[3]);
        sq += err * err;
        n_samples++;
      end
      want = ref_inv_gauss(int'(count), N, real'(SIGMA));
      dec_h1 = dec;
      steps++;
    end
  end

endmodule
