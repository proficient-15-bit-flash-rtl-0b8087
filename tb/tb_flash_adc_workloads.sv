// tb_flash_adc_workloads: the converter on two further input signals.
//
// Slow sine: the top is built with its sine source at 40 kHz (2500 samples per
// period at 100 MHz), so the input moves at most 7 mV per sample and sweeps
// every gap between trip points. Over one full period every count value 0..15
// must occur, and the RMS reconstruction error must stay below 600 mV, which
// bounds the error that the 15 random trip points of the modelled die leave
// after linearisation.
//
// Full-range sine: a second top is driven with 7 V peak to peak at 2 MHz, the
// whole reference range. Beyond +-2500 mV the input lies outside the
// linearised 90 % of the offset distribution, so the output must saturate
// there: it must reach +-2500 mV and never exceed it.
//
// adc_scoreboard checks every comparator word, count and output sample of
// both converters against its reference model.
module tb_flash_adc_workloads;
  import flash_adc_pkg::*;

  localparam int N = N_COMP;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic active;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  sample_t      vin, vout;
  logic [N-1:0] dec;
  logic [3:0]   count;

  flash_adc_top #(.FREQ_HZ(40_000)) dut (
    .clk(clk), .rst_n(rst_n), .en(en),
    .vin(vin), .dec(dec), .count(count), .vout(vout)
  );

  adc_scoreboard sb (
    .clk(clk), .active(active),
    .vin(vin), .dec(dec), .count(count), .vout(vout)
  );

  sample_t      vin_f, vout_f;
  logic [N-1:0] dec_f;
  logic [3:0]   count_f;

  flash_adc_top #(.FREQ_HZ(2_000_000), .AMPL_MV(3500)) dut_full (
    .clk(clk), .rst_n(rst_n), .en(en),
    .vin(vin_f), .dec(dec_f), .count(count_f), .vout(vout_f)
  );

  adc_scoreboard sb_full (
    .clk(clk), .active(active),
    .vin(vin_f), .dec(dec_f), .count(count_f), .vout(vout_f)
  );

  int vout_max = -100000;
  int vout_min = 100000;
  int vin_max  = -100000;
  always @(posedge clk) begin
    if (active) begin
      if (int'(vout_f) > vout_max) vout_max = int'(vout_f);
      if (int'(vout_f) < vout_min) vout_min = int'(vout_f);
      if (int'(vin_f) > vin_max) vin_max = int'(vin_f);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n  = 1'b0;
    en     = 1'b0;
    active = 1'b0;
    repeat (3) @(posedge clk);
    #2;
    rst_n  = 1'b1;
    en     = 1'b1;
    active = 1'b1;
    repeat (2510) @(posedge clk);
    #2;
    active = 1'b0;
    $display("slow sine: distinct counts %0d, rms error %0.1f mV over %0d samples",
             sb.distinct_counts(), sb.rms_error(), sb.n_samples);
    $display("full-range sine: input peak %0d mV, output %0d..%0d mV, saturated %0d/%0d samples",
             vin_max, vout_min, vout_max, sb_full.n_sat_lo, sb_full.n_sat_hi);
    checks += 2 + sb.checks;
    failures += sb.failures;
    if (sb.distinct_counts() != N + 1) failures++;
    if (sb.rms_error() > 600.0) failures++;
    checks += 5 + sb_full.checks;
    failures += sb_full.failures;
    if (vin_max < 3490) failures++;
    if (vout_max != 2500) failures++;
    if (vout_min != -2500) failures++;
    if (sb_full.n_sat_lo == 0) failures++;
    if (sb_full.n_sat_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
