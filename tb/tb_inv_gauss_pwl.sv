// tb_inv_gauss_pwl: checks the piecewise-linear inverse Gaussian stage.
//
// Every count 0..N is applied to the default (N = 15, SIGMA = 1520 mV,
// registered) instance and to a combinational N = 31, SIGMA = 1000 mV
// instance. The output is compared with a floating-point evaluation of the
// same piecewise-linear curve (adc_ref_pkg::ref_inv_gauss), within 2 mV. The
// curve must also be odd-symmetric, monotonic, and saturate at +-1.645 SIGMA
// for counts in the outer 5 % tails. The one-cycle latency is checked.
module tb_inv_gauss_pwl;
  import flash_adc_pkg::*;
  import adc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0] c15;
  logic [4:0] c31;
  sample_t    v15, v31;

  inv_gauss_pwl dut15 (.clk(clk), .rst_n(rst_n), .count(c15), .vout(v15));
  inv_gauss_pwl #(.N(31), .SIGMA(1000), .PIPE(1'b0)) dut31
    (.clk(clk), .rst_n(rst_n), .count(c31), .vout(v31));

  int r15 [16];
  int r31 [32];

  function automatic int absi(input int a);
    return (a < 0) ? -a : a;
  endfunction

  task automatic cmp(input string tag, input int got, input real want);
    checks++;
    if ((real'(got) - want) > 2.0 || (want - real'(got)) > 2.0) begin
      failures++;
      $display("%s: got %0d expected %0.2f", tag, got, want);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    c15 = '0; c31 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c <= 15; c++) begin
      c15 = 4'(c);
      #2;
      // Registered: the old value stays until the edge.
      if (c > 0) begin
        checks++;
        if (int'(v15) != r15[c-1]) failures++;
      end
      @(posedge clk); #1;
      r15[c] = int'(v15);
      cmp($sformatf("N=15 count %0d", c), r15[c], ref_inv_gauss(c, 15, 1520.0));
    end
    for (int c = 0; c <= 31; c++) begin
      c31 = 5'(c);
      #1;
      r31[c] = int'(v31);
      cmp($sformatf("N=31 count %0d", c), r31[c], ref_inv_gauss(c, 31, 1000.0));
    end
    // Symmetry, monotonicity and saturation.
    for (int c = 0; c <= 15; c++) begin
      checks++;
      if (absi(r15[c] + r15[15-c]) > 1) failures++;
      if (c > 0) begin
        checks++;
        if (r15[c] <= r15[c-1]) failures++;
      end
    end
    checks += 2;
    if (absi(r15[0] + 2500) > 2) failures++;
    if (absi(r15[15] - 2500) > 2) failures++;
    checks += 2;
    if (r31[0] != r31[1]) failures++;            // both beyond the 5 % tail
    if (r31[31] != r31[30]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
