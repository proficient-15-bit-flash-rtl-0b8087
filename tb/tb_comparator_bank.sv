// tb_comparator_bank: finds each comparator's trip point by sweeping the
// input, and checks the bank's statistics and behaviour.
//
// The input vin_p is swept from -6000 mV to +6000 mV in 1 mV steps with
// vin_n = 0, then swept again with vin_n = 1000 mV. Every comparator must
// switch from 0 to 1 exactly once per sweep (no hysteresis, no glitches) one
// clock after the input crosses its trip point, and the second sweep must
// shift every trip point by exactly 1000 mV (it responds to the difference).
// The trip points measured must be those of the modelled die
// (flash_adc_pkg::gauss_offset_mv) and, as a sample of a zero-mean Gaussian
// with sigma 1520 mV, have a mean within +-1000 mV and a standard deviation
// between 700 and 2400 mV. Outputs out of index order (bubbles) are counted.
module tb_comparator_bank;
  import flash_adc_pkg::*;

  localparam int N = 15;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  sample_t vp, vn;
  logic [N-1:0] dec;

  comparator_bank dut (.clk(clk), .rst_n(rst_n), .vin_p(vp), .vin_n(vn), .dec(dec));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int trip [2][N];
  int nsw  [2][N];

  initial begin
    logic [N-1:0] prevd;
    int bubbles;
    real mean, var_s, sd;
    rst_n = 1'b0;
    vp = '0; vn = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    bubbles = 0;
    for (int s = 0; s < 2; s++) begin
      vn = sample_t'(s * 1000);
      vp = sample_t'(-6000);
      @(posedge clk); #1;
      prevd = dec;
      checks++;
      if (dec != '0) failures++;
      for (int i = 0; i < N; i++) nsw[s][i] = 0;
      for (int v = -5999; v <= 6000; v++) begin
        vp = sample_t'(v);
        @(posedge clk); #1;
        for (int i = 0; i < N; i++) begin
          if (dec[i] != prevd[i]) begin
            nsw[s][i]++;
            // Switched at this edge: v - vn is the first difference above it.
            trip[s][i] = v - 1 - s * 1000;
            if (!dec[i]) nsw[s][i] += 100;   // a 1 -> 0 step is an error
          end
        end
        for (int i = 1; i < N; i++)
          if (dec[i] && !dec[i-1]) begin
            bubbles++;
            break;
          end
        prevd = dec;
      end
      checks++;
      if (dec != '1) failures++;
    end
    mean = 0.0;
    for (int i = 0; i < N; i++) begin
      checks += 3;
      if (nsw[0][i] != 1 || nsw[1][i] != 1) begin
        failures++;
        $display("comparator %0d switched %0d/%0d times", i, nsw[0][i], nsw[1][i]);
      end
      if (trip[0][i] != trip[1][i]) begin
        failures++;
        $display("comparator %0d: trip %0d vs %0d with offset input", i, trip[0][i], trip[1][i]);
      end
      if (trip[0][i] != gauss_offset_mv(i, SIGMA_MV, OFFSET_SEED)) begin
        failures++;
        $display("comparator %0d: trip %0d", i, trip[0][i]);
      end
      mean += real'(trip[0][i]);
    end
    mean /= real'(N);
    var_s = 0.0;
    for (int i = 0; i < N; i++) var_s += (real'(trip[0][i]) - mean) ** 2;
    sd = $sqrt(var_s / real'(N - 1));
    $display("trip points: mean %0.1f mV, sd %0.1f mV, input steps with bubbles %0d",
             mean, sd, bubbles);
    checks += 3;
    if (mean > 1000.0 || mean < -1000.0) failures++;
    if (sd < 700.0 || sd > 2400.0) failures++;
    if (bubbles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
