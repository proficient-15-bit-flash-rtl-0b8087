// tb_flash_adc_top: end-to-end test of the converter at its default size.
//
// The top runs with all parameters at their defaults: the 1.6 MHz, 5 V
// peak-to-peak sine from the internal source is converted for 20 periods
// (1250 samples), with the source paused for 30 cycles in the middle.
// adc_scoreboard follows every sample through the three pipeline stages and
// checks dec, count and vout against its reference model. The test fails if
// a mechanism of the design never occurred: bubbles in the comparator word,
// counts saturating the inverse Gaussian at either tail, the paused source.
// At 62.5 samples per period the sine steps up to 250 mV per sample, so
// trip points closer together than that can hide a count value; at least 12
// of the 16 are required here (tb_flash_adc_workloads requires all of them).
module tb_flash_adc_top;
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

  flash_adc_top dut (
    .clk(clk), .rst_n(rst_n), .en(en),
    .vin(vin), .dec(dec), .count(count), .vout(vout)
  );

  adc_scoreboard sb (
    .clk(clk), .active(active),
    .vin(vin), .dec(dec), .count(count), .vout(vout)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_pause, prev;
    n_pause = 0;
    rst_n  = 1'b0;
    en     = 1'b0;
    active = 1'b0;
    repeat (3) @(posedge clk);
    #2;
    rst_n  = 1'b1;
    en     = 1'b1;
    active = 1'b1;
    prev   = int'(vin);
    for (int n = 0; n < 1280; n++) begin
      en = !(n >= 600 && n < 630);
      @(posedge clk); #2;
      if (!en) begin
        checks++;
        if (int'(vin) != prev) failures++;
        else n_pause++;
      end
      prev = int'(vin);
    end
    active = 1'b0;
    $display("bubbles %0d, saturated low %0d high %0d, paused samples %0d, distinct counts %0d",
             sb.n_bubble, sb.n_sat_lo, sb.n_sat_hi, n_pause, sb.distinct_counts());
    $display("rms error of vout against vin: %0.1f mV over %0d samples",
             sb.rms_error(), sb.n_samples);
    checks += 5 + sb.checks;
    failures += sb.failures;
    if (sb.n_bubble == 0) failures++;
    if (sb.n_sat_lo == 0) failures++;
    if (sb.n_sat_hi == 0) failures++;
    if (n_pause != 30) failures++;
    if (sb.distinct_counts() < 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
