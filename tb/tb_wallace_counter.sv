// tb_wallace_counter: exhaustive check of the Wallace-tree ones counter.
//
// The default 15-input, pipelined counter is driven with all 2**15 input
// words, one per clock; every count is compared, one cycle later, with a
// bit-by-bit count of the word (this checks the one-cycle latency too). Two
// more instances exercise the generic reduction schedule: a combinational
// 7-input counter (exhaustive) and a 31-input counter (random words).
module tb_wallace_counter;
  import adc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [14:0] din15;
  logic [3:0]  cnt15;
  logic [6:0]  din7;
  logic [2:0]  cnt7;
  logic [30:0] din31;
  logic [4:0]  cnt31;

  wallace_counter dut15 (.clk(clk), .rst_n(rst_n), .din(din15), .count(cnt15));
  wallace_counter #(.N(7), .PIPE(1'b0)) dut7 (.clk(clk), .rst_n(rst_n), .din(din7), .count(cnt7));
  wallace_counter #(.N(31)) dut31 (.clk(clk), .rst_n(rst_n), .din(din31), .count(cnt31));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    din15 = '0; din7 = '0; din31 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Exhaustive, pipelined: count of word w appears after the next edge.
    for (int w = 0; w < (1 << 15); w++) begin
      din15 = 15'(w);
      din31 = 31'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (int'(cnt15) != ones(64'(w), 15)) begin
        failures++;
        if (failures < 10) $display("N=15 word %h: count %0d expected %0d", w, cnt15, ones(64'(w), 15));
      end
      checks++;
      if (int'(cnt31) != ones(64'(din31), 31)) begin
        failures++;
        if (failures < 10) $display("N=31 word %h: count %0d", din31, cnt31);
      end
    end
    // Latency: the count must not change before the clock edge.
    // The last word was all ones, so the count is 15 now.
    din15 = '0;
    #2;
    checks++;
    if (cnt15 != 4'd15) begin
      failures++;
      $display("count changed before the clock edge");
    end
    @(posedge clk); #1;
    checks++;
    if (cnt15 != 4'd0) failures++;
    // Exhaustive, combinational.
    for (int w = 0; w < (1 << 7); w++) begin
      din7 = 7'(w);
      #1;
      checks++;
      if (int'(cnt7) != ones(64'(w), 7)) begin
        failures++;
        $display("N=7 word %h: count %0d", w, cnt7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
