// tb_sine_gen: checks the sine source against an ideal sine.
//
// The default generator (1.6 MHz at 100 MHz, 2500 mV amplitude) runs for
// 3000 steps. Each sample must lie within 6 mV of 2500*sin(2*pi*1.6e6*n/1e8),
// computed in floating point; the extremes must reach +-2500 mV within 3 mV;
// the mean period between rising zero crossings must be 62.5 samples. With
// en low the output must hold. A 4x faster instance (6.4 MHz, 1000 mV) is
// checked against its own ideal sine the same way.
module tb_sine_gen;
  import flash_adc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  sample_t s, c, s2, c2;

  sine_gen dut (.clk(clk), .rst_n(rst_n), .en(en), .sample(s), .cosine(c));
  sine_gen #(.FREQ_HZ(6_400_000), .AMPL_MV(1000)) dut2
    (.clk(clk), .rst_n(rst_n), .en(en), .sample(s2), .cosine(c2));

  localparam real PI = 3.14159265358979;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, smax, smin, nzc, first_zc, last_zc, prev;
    real ideal, ideal2, err, maxerr, period;
    rst_n = 1'b0;
    en    = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;
    smax = -100000; smin = 100000; nzc = 0; first_zc = 0; last_zc = 0;
    maxerr = 0.0;
    prev = 0;
    for (n = 0; n < 3000; n++) begin
      ideal  = 2500.0 * $sin(2.0 * PI * 1.6e6 * real'(n) / 1.0e8);
      ideal2 = 1000.0 * $sin(2.0 * PI * 6.4e6 * real'(n) / 1.0e8);
      err = real'(s) - ideal;
      if (err < 0.0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > 6.0) begin
        failures++;
        if (failures < 10) $display("step %0d: %0d vs %0.1f", n, s, ideal);
      end
      err = real'(s2) - ideal2;
      checks++;
      if (err > 6.0 || err < -6.0) begin
        failures++;
        if (failures < 10) $display("fast step %0d: %0d vs %0.1f", n, s2, ideal2);
      end
      if (int'(s) > smax) smax = int'(s);
      if (int'(s) < smin) smin = int'(s);
      if (n > 0 && prev < 0 && int'(s) >= 0) begin
        if (nzc == 0) first_zc = n;
        last_zc = n;
        nzc++;
      end
      prev = int'(s);
      @(posedge clk); #1;
    end
    period = real'(last_zc - first_zc) / real'(nzc - 1);
    $display("max error %0.2f mV, peaks %0d/%0d mV, period %0.3f samples",
             maxerr, smax, smin, period);
    checks += 3;
    if (smax < 2497 || smax > 2503) failures++;
    if (smin > -2497 || smin < -2503) failures++;
    if (period < 62.3 || period > 62.7) failures++;
    // Hold with en low.
    en = 1'b0;
    prev = int'(s);
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (int'(s) != prev) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
