// tb_nand_comparator: checks the clocked comparator's decision and timing.
//
// Two instances with trip points 0 mV and -250 mV are driven with random
// differential inputs and with inputs at and next to the trip point. After
// each rising edge q must equal (vin_p - vin_n > trip), with ties low, and it
// must hold its value until the next edge even if the inputs change (the SR
// latch function).
module tb_nand_comparator;
  import flash_adc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  sample_t vp, vn;
  logic q0, q1;

  nand_comparator dut0 (.clk(clk), .rst_n(rst_n), .vin_p(vp), .vin_n(vn), .q(q0));
  nand_comparator #(.TRIP_MV(-250)) dut1 (.clk(clk), .rst_n(rst_n), .vin_p(vp), .vin_n(vn), .q(q1));

  task automatic apply(input int p, input int n);
    logic e0, e1;
    vp = sample_t'(p);
    vn = sample_t'(n);
    e0 = (p - n) > 0;
    e1 = (p - n) > -250;
    @(posedge clk);
    #1;
    checks += 2;
    if (q0 !== e0) begin
      failures++;
      $display("trip 0: p=%0d n=%0d q=%b", p, n, q0);
    end
    if (q1 !== e1) begin
      failures++;
      $display("trip -250: p=%0d n=%0d q=%b", p, n, q1);
    end
    // Inputs change mid-cycle: the latched decision must hold.
    vp = sample_t'(-p);
    vn = sample_t'(-n);
    #3;
    checks++;
    if (q0 !== e0 || q1 !== e1) begin
      failures++;
      $display("decision not held between edges");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    vp = '0; vn = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q0 !== 1'b0 || q1 !== 1'b0) failures++;
    rst_n = 1'b1;
    // Around both trip points.
    apply(0, 0); apply(1, 0); apply(0, 1); apply(-1, 0);
    apply(-250, 0); apply(-249, 0); apply(-251, 0);
    apply(1000, 1250); apply(1000, 1249); apply(-3000, -2751);
    // Extremes.
    apply(32767, -32768); apply(-32768, 32767);
    for (int i = 0; i < 3000; i++)
      apply(int'($urandom_range(8000)) - 4000, int'($urandom_range(8000)) - 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
